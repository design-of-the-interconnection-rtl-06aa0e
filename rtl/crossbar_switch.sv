// crossbar_switch: the 4x4 virtual cut-through message switch.
//
// Four input ports, each with its own FIFO (xbar_fifo) and control unit
// (control_unit), a combinational crossbar and a wrapped wave front arbiter
// (wwfa_arbiter), connected as in the document's block diagram. A message
// entering an input port starts with a route command; the control unit
// consumes it, asks the arbiter for the output port(s) it names, re-routes
// around a busy port when the command allows a random choice, and then
// forwards the rest of the message unit by unit until the CLOSE (or ABORT)
// command, which is forwarded too and releases the connection. Broadcast
// route commands connect one input to two or four outputs; while any control
// unit holds one (BroadcastPending) no other control unit starts a message
// and the arbiter uses its horizontal wave front.
//
// Each port is a 9-bit unit, a write strobe (WCLK) and a stop flag. An input
// port's STOP_OUT is its FIFO's AFULL flag; an output port's STOP_IN holds the
// connected control unit. All strobes are sampled on the rising edge of `clk`.
// With no contention, a route command written into an input FIFO at edge t is
// followed by the first unit written out at edge t+4 (each control unit sees
// its FIFO's write strobe as `arriving`), and each port then moves one unit
// per cycle.
// The assertion below is disabled during reset with `disable iff (rst)`;
// lint reports `rst` as used both asynchronously and synchronously because
// of that, which is intended.
module crossbar_switch
  import earth_net_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  unit_t      data_in  [4],
  input  logic [3:0] wclk_in,
  output logic [3:0] stop_out,
  output unit_t      data_out [4],
  output logic [3:0] wclk_out,
  input  logic [3:0] stop_in
);
  unit_t      fifo_dout [4];
  logic [3:0] fifo_empty;
  logic [3:0] ctl_rclk, ctl_wclk, ctl_bp, cb_stop;
  unit_t      ctl_dout  [4];
  port_mask_t request   [4];
  port_mask_t grant     [4];
  port_mask_t col_busy;
  logic       bcast_pending;

  assign bcast_pending = |ctl_bp;

  for (genvar p = 0; p < 4; p++) begin : g_port
    xbar_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk   (clk),
      .rst   (rst),
      .wclk  (wclk_in[p]),
      .rclk  (ctl_rclk[p]),
      .din   (data_in[p]),
      .dout  (fifo_dout[p]),
      .afull (stop_out[p]),
      .empty (fifo_empty[p])
    );

    control_unit u_ctl (
      .clk           (clk),
      .rst           (rst),
      .data_in       (fifo_dout[p]),
      .afull         (cb_stop[p]),
      .empty         (fifo_empty[p]),
      .arriving      (wclk_in[p]),
      .grant         (grant[p]),
      .busy          (col_busy),
      .bcast_pending (bcast_pending),
      .data_out      (ctl_dout[p]),
      .wclk          (ctl_wclk[p]),
      .rclk          (ctl_rclk[p]),
      .request       (request[p]),
      .bp            (ctl_bp[p])
    );
  end

  crossbar u_xbar (
    .data_in  (ctl_dout),
    .wclk_in  (ctl_wclk),
    .stop_out (cb_stop),
    .data_out (data_out),
    .wclk_out (wclk_out),
    .stop_in  (stop_in),
    .grant    (grant)
  );

  wwfa_arbiter u_arb (
    .clk           (clk),
    .rst           (rst),
    .bcast_pending (bcast_pending),
    .request       (request),
    .grant         (grant),
    .busy          (col_busy)
  );

  // A sender must respect STOP_OUT: writing a full FIFO loses a unit.
  for (genvar p = 0; p < 4; p++) begin : g_chk
    a_no_overrun: assert property (@(posedge clk) disable iff (rst)
      !(wclk_in[p] && stop_out[p]))
      else $error("crossbar_switch: write to full input port %0d", p);
  end

endmodule

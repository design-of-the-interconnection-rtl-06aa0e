// control_unit: the per-input-port controller of the 4x4 switch.
//
// A six-state machine, as in the document:
//   IDLE          wait until the input FIFO holds a unit (or one is being
//                 written into it) and no broadcast is pending anywhere in
//                 the switch
//   READ_MSG      read the head unit; a route command is kept in the route
//                 register and turned into a port request, anything else met
//                 before a route command is discarded; back to IDLE if empty
//   MAKE_CONN     request the output port(s): one, two (one upper and one
//                 lower) or four, depending on the route command
//   RANDOM_ROUTE  entered when the request is refused; for a random route
//                 command whose requested port is busy (held by another
//                 connection) the request moves to the other port of its
//                 pair (or, for ROUTE_UL, to the next upper/lower pairing),
//                 once per cycle, until it is granted
//   CONN_GRANTED  wait while the FIFO is empty or the output is stopped
//   DATA_XFER     forward one unit per cycle to the crossbar; the unit that is
//                 a CLOSE or ABORT command is forwarded and ends the message
// The route command itself is consumed and never forwarded. BP is high from
// the moment a broadcast-type route command (ROUTE_UL, ROUTE_A) is read until
// the controller is back in IDLE.
//
// Interface and timing: one clock. `rclk` is the read enable of the FIFO and
// `wclk` the write strobe sent, through the crossbar, to the next FIFO; both
// are sampled at the next rising edge. The document generates them as
// half-cycle pulses, writes the FIFO in the second half of a cycle and
// registers the unit in the controller. Here the unit read in DATA_XFER is
// passed to `data_out` in the same cycle (zero in the other states), and
// `arriving` (the FIFO's write strobe) lets IDLE leave on the same edge that
// writes the first unit, as the document's mid-cycle write does. With no
// contention the route command is written into the FIFO at edge t and the
// first unit after it is written into the next FIFO at edge t+4: READ_MSG,
// MAKE_CONN, CONN_GRANTED and DATA_XFER take one cycle each, the document's
// 4-cycle connection latency. `afull` is the stop flag of the connected
// output port(s), gated by the crossbar.
module control_unit
  import earth_net_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  unit_t      data_in,         // head of the input FIFO
  input  logic       afull,           // downstream stop
  input  logic       empty,           // input FIFO empty
  input  logic       arriving,        // a unit is being written into the FIFO this cycle
  input  port_mask_t grant,
  input  port_mask_t busy,            // output ports held by other connections
  input  logic       bcast_pending,
  output unit_t      data_out,
  output logic       wclk,
  output logic       rclk,
  output port_mask_t request,
  output logic       bp
);
  typedef enum logic [2:0] {
    IDLE         = 3'd0,
    READ_MSG     = 3'd1,
    MAKE_CONN    = 3'd2,
    RANDOM_ROUTE = 3'd3,
    CONN_GRANTED = 3'd4,
    DATA_XFER    = 3'd5
  } state_e;

  state_e     state, state_n;
  route_e     route_q;
  logic       route_valid;
  port_mask_t request_n;
  logic       granted;
  logic       xfer;

  assign granted  = request_satisfied(route_q, request, grant);
  assign xfer     = (state == DATA_XFER) && !empty && !afull;
  assign wclk     = xfer;
  assign data_out = (state == DATA_XFER) ? data_in : '0;
  assign rclk     = xfer || ((state == READ_MSG) && !empty);
  assign bp       = route_valid && is_bcast(route_q);

  // Pick the next candidate port(s) for a refused random request. A single
  // request toggles within its pair; an upper+lower request steps through
  // the four pairings {0,2} {0,3} {1,3} {1,2}, moving the lower choice every
  // attempt and the upper choice every second attempt.
  function automatic port_mask_t reroute(route_e r, port_mask_t req, port_mask_t bsy);
    port_mask_t nxt;
    nxt = req;
    if ((req & bsy) == '0) begin
      // the port is free and only lost this cycle's arbitration: keep it
    end else if (r == ROUTE_UL) begin
      nxt[3:2] = {req[2], req[3]};
      if (req[3]) nxt[1:0] = {req[0], req[1]};
    end else if (is_random(r)) begin
      nxt[1:0] = {req[0], req[1]};
      nxt[3:2] = {req[2], req[3]};
    end
    return nxt;
  endfunction

  always_comb begin
    state_n   = state;
    request_n = request;
    unique case (state)
      IDLE:
        if ((!empty || arriving) && !bcast_pending) state_n = READ_MSG;
      READ_MSG:
        if (empty) state_n = IDLE;
        else if (is_route(data_in)) begin
          state_n   = MAKE_CONN;
          request_n = initial_request(route_e'(data_in[2:0]));
        end
      MAKE_CONN, RANDOM_ROUTE:
        if (granted) state_n = CONN_GRANTED;
        else begin
          state_n   = RANDOM_ROUTE;
          request_n = reroute(route_q, request, busy);
        end
      CONN_GRANTED:
        if (!empty && !afull) state_n = DATA_XFER;
      DATA_XFER:
        if (xfer && is_close_or_abort(data_in)) begin
          state_n   = IDLE;
          request_n = '0;
        end else if (!xfer) state_n = CONN_GRANTED;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state       <= IDLE;
      request     <= '0;
      route_q     <= ROUTE_0;
      route_valid <= 1'b0;
    end else begin
      state   <= state_n;
      request <= request_n;
      if (state == READ_MSG && !empty && is_route(data_in)) begin
        route_q     <= route_e'(data_in[2:0]);
        route_valid <= 1'b1;
      end else if (state_n == IDLE) begin
        route_valid <= 1'b0;
      end
    end
  end

endmodule

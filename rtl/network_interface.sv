// network_interface: joins one EARTH node to the data network.
//
// Node side: a 72-bit word bus (eight 9-bit units), a 12-bit STATUS word and
// the controls CS, R/W and DATA_TYPE, sampled on the rising clock edge:
//   CS=0                      nothing happens
//   CS=1, R/W=1, DATA_TYPE!=0 write 2, 4 or 8 units into the send buffer
//   CS=1, R/W=1, DATA_TYPE=0  reset: both buffers are emptied
//   CS=1, R/W=0               read from the receive buffer: one command unit
//                             or eight data units (see receive_fifo)
// `data_rd` shows the receive buffer's head word at all times. The document
// uses one bidirectional DATA bus; here it is split into `data_wr` and
// `data_rd`, which the node side can join with its own tristate driver.
//
// Network side: the send channel (DATA_OUT, SEND_CLK out, SEND_STOP in) and
// the receive channel (DATA_IN, RECEIVE_CLK in, RECEIVE_STOP out) have the
// same unit / write strobe / stop form as a switch port and connect to one.
// Both channels run independently, one unit per cycle each.
module network_interface
  import earth_net_pkg::*;
#(
  parameter int unsigned SEND_DEPTH    = 64,
  parameter int unsigned RECEIVE_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  // node side
  input  logic        cs,
  input  logic        rw,          // 1 = write (node to network), 0 = read
  input  logic [1:0]  data_type,
  input  logic [71:0] data_wr,
  output logic [71:0] data_rd,
  output ni_status_t  status,
  // network side, send channel
  output unit_t       data_out,
  output logic        send_clk,
  input  logic        send_stop,
  // network side, receive channel
  input  unit_t       data_in,
  input  logic        receive_clk,
  output logic        receive_stop
);
  logic wr_op, rd_op, reset_op;

  assign wr_op    = cs && rw && (data_type != 2'b00);
  assign reset_op = cs && rw && (data_type == 2'b00);
  assign rd_op    = cs && !rw;

  send_fifo #(.DEPTH(SEND_DEPTH)) u_send (
    .clk        (clk),
    .rst        (rst),
    .wr_en      (wr_op),
    .data_type  (data_type),
    .data       (data_wr),
    .clear      (reset_op),
    .data_out   (data_out),
    .send_clk   (send_clk),
    .send_stop  (send_stop),
    .send_empty (status.send_empty),
    .send_full  (status.send_full),
    .send_2     (status.send_2),
    .send_4     (status.send_4),
    .send_8     (status.send_8)
  );

  receive_fifo #(.DEPTH(RECEIVE_DEPTH)) u_recv (
    .clk           (clk),
    .rst           (rst),
    .data_in       (data_in),
    .receive_clk   (receive_clk),
    .receive_stop  (receive_stop),
    .rd_en         (rd_op),
    .clear         (reset_op),
    .data          (data_rd),
    .receive_empty (status.receive_empty),
    .receive_full  (status.receive_full),
    .receive_8     (status.receive_8),
    .receive_16    (status.receive_16),
    .receive_24    (status.receive_24),
    .dahod         (status.dahod),
    .cahod         (status.cahod)
  );

endmodule

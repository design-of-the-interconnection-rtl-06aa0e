// tb_network_interface: the send channel is looped back into the receive
// channel (SEND_CLK -> RECEIVE_CLK, DATA_OUT -> DATA_IN, RECEIVE_STOP ->
// SEND_STOP). The node writes messages (ordering tag, 8-unit data words,
// CLOSE) in 2-, 4- and 8-unit pieces padded with FILLER commands, and reads
// back whenever the status word allows: one unit when a command is at the
// head, eight when data is. Checks the read-back stream (fillers removed),
// the STATUS bit layout, back-pressure when the node stops reading, and the
// reset operation.
module tb_network_interface;
  import earth_net_pkg::*;
  logic clk = 0, rst = 1;
  logic cs = 0, rw = 0;
  logic [1:0] data_type = 0;
  logic [71:0] data_wr = '0, data_rd;
  ni_status_t status;
  unit_t data_out, data_in;
  logic send_clk, send_stop, receive_clk, receive_stop;
  int checks = 0, failures = 0, n_full = 0, n_filler = 0, n_cmd_rd = 0, n_data_rd = 0;
  unit_t expect_q[$];     // what the node must read back, in order
  unit_t wr_q[$];         // units still to be written, fillers included

  network_interface dut (.*);
  assign data_in     = data_out;
  assign receive_clk = send_clk;
  assign send_stop   = receive_stop;
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic make_msg(input int id, input int words);
    unit_t m[$];
    m.push_back(tag1_cmd(6'(id)));
    m.push_back(tag2_cmd(6'(id + 1)));
    for (int k = 0; k < 8 * words; k++) m.push_back({1'b0, 8'(id * 3 + k)});
    m.push_back(CMD_CLOSE);
    foreach (m[k]) begin expect_q.push_back(m[k]); wr_q.push_back(m[k]); end
    while (wr_q.size() % 8 != 0) begin wr_q.push_back(CMD_FILLER); n_filler++; end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    chk(status == 12'b0001_0000_1000, "status after reset: SEND_EMPTY bit 8, RECEIVE_EMPTY bit 3");
    for (int id = 0; id < 30; id++) make_msg(id, $urandom_range(0, 4));
    for (int cyc = 0; cyc < 20000 && (expect_q.size() != 0); cyc++) begin
      int n;
      logic slow;
      @(negedge clk);
      #1;
      slow = (cyc % 600) < 200;     // node stops reading for a while
      cs = 0; rw = 0;
      if (status.receive_full) n_full++;
      n = ($urandom_range(2) == 0) ? 2 : ($urandom_range(1) == 0) ? 4 : 8;
      if (wr_q.size() >= n && (n == 2 ? !status.send_2 : n == 4 ? !status.send_4 : !status.send_8)
          && $urandom_range(1) == 0) begin
        cs = 1; rw = 1;
        data_type = (n == 2) ? 2'b01 : (n == 4) ? 2'b10 : 2'b11;
        for (int k = 0; k < 8; k++) data_wr[9*k +: 9] = (k < n) ? wr_q[k] : unit_t'($urandom);
        repeat (n) void'(wr_q.pop_front());
      end else if (!slow && status.cahod) begin
        cs = 1; rw = 0;
        chk(data_rd[8:0] == expect_q[0], "command read");
        void'(expect_q.pop_front());
        n_cmd_rd++;
      end else if (!slow && status.dahod && status.receive_8) begin
        cs = 1; rw = 0;
        for (int k = 0; k < 8; k++) chk(data_rd[9*k +: 9] == expect_q[k], "data word read");
        repeat (8) void'(expect_q.pop_front());
        n_data_rd++;
      end
    end
    @(negedge clk); cs = 0;
    chk(expect_q.size() == 0, "everything read back");
    // reset operation: queue something, then clear with DATA_TYPE 00
    cs = 1; rw = 1; data_type = 2'b11; data_wr = '0;
    @(negedge clk);
    data_type = 2'b00;
    @(negedge clk);
    cs = 0;
    #1;
    chk(status.send_empty && status.receive_empty, "reset operation empties both buffers");
    chk(n_full > 0 && n_filler > 0 && n_cmd_rd > 0 && n_data_rd > 0, "full, filler, command and data reads seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

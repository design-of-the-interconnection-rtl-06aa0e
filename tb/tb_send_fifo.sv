// tb_send_fifo: writes of 2, 4 and 8 units in random order against a queue
// model, with random SEND_STOP on the network side. Checks the order of the
// units sent, one unit per cycle when not stopped, the five flags against the
// free space, that a write that does not fit is dropped, and the clear
// (reset operation).
module tb_send_fifo;
  import earth_net_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, wr_en = 0, clear = 0, send_stop = 0;
  logic [1:0] data_type = 0;
  logic [71:0] data = '0;
  unit_t data_out;
  logic send_clk, send_empty, send_full, send_2, send_4, send_8;
  int checks = 0, failures = 0, full_seen = 0, dropped = 0;
  unit_t q[$];

  send_fifo #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int n, fr, stop_pct;
      @(negedge clk);
      fr = DEPTH - q.size();
      chk(send_empty == (q.size() == 0) && send_full == (fr == 0), "empty/full");
      chk(send_2 == (fr < 2) && send_4 == (fr < 4) && send_8 == (fr < 8), "space flags");
      if (q.size() != 0) chk(data_out == q[0], "head unit");
      if (send_full) full_seen++;
      stop_pct = ((cyc / 400) % 2) ? 90 : 20;
      send_stop = ($urandom_range(99) < stop_pct);
      #1;
      chk(send_clk == (q.size() != 0 && !send_stop), "one unit per cycle unless stopped");
      wr_en = ($urandom_range(2) != 0);
      data_type = 2'($urandom_range(1, 3));
      for (int k = 0; k < 8; k++) data[9*k +: 9] = unit_t'($urandom);
      clear = (cyc == 2500);
      n = (data_type == 1) ? 2 : (data_type == 2) ? 4 : 8;
      @(posedge clk);
      #1;
      if (clear) q.delete();
      else begin
        if (send_clk) void'(q.pop_front());
        if (wr_en) begin
          if (n <= fr) for (int k = 0; k < n; k++) q.push_back(data[9*k +: 9]);
          else dropped++;
        end
      end
    end
    chk(full_seen > 0 && dropped > 0, "buffer filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

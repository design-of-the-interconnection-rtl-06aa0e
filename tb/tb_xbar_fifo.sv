// tb_xbar_fifo: random writes and reads against a queue model. Checks the head
// unit, EMPTY, and AFULL at DEPTH-1 stored units, and that writes while AFULL
// and reads while EMPTY are ignored.
module tb_xbar_fifo;
  import earth_net_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst = 1, wclk = 0, rclk = 0;
  unit_t din = '0, dout;
  logic afull, empty;
  int checks = 0, failures = 0, full_seen = 0;
  unit_t q[$];

  xbar_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
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
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int pw;
      @(negedge clk);
      chk(empty == (q.size() == 0), "empty");
      chk(afull == (q.size() == DEPTH-1), "afull");
      if (q.size() != 0) chk(dout == q[0], "head");
      if (q.size() == DEPTH-1) full_seen++;
      pw = (cyc / 500) % 2 ? 30 : 75;   // alternate filling and draining phases
      wclk = ($urandom_range(99) < pw);
      rclk = ($urandom_range(99) < 100 - pw);
      din  = unit_t'($urandom);
      begin
        logic was_empty, was_full;
        was_empty = empty; was_full = afull;
        @(posedge clk);
        #1;
        if (rclk && !was_empty) void'(q.pop_front());
        if (wclk && !was_full) q.push_back(din);
      end
    end
    chk(full_seen > 0, "buffer reached AFULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_receive_fifo: a random stream of data units, commands and fillers from
// the network side, with the node side reading whenever the flags allow.
// Checks that fillers are never stored, RECEIVE_STOP at full, the flags
// against a queue model, that a command read takes one unit and a data read
// eight, and that a data read with fewer than eight units does nothing.
module tb_receive_fifo;
  import earth_net_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst = 1, receive_clk = 0, rd_en = 0, clear = 0;
  unit_t data_in = '0;
  logic [71:0] data;
  logic receive_stop, receive_empty, receive_full, receive_8, receive_16, receive_24, dahod, cahod;
  int checks = 0, failures = 0, full_seen = 0, fillers = 0, short_reads = 0;
  unit_t q[$];

  receive_fifo #(.DEPTH(DEPTH)) dut (.*);
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
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int c, n_rd, rd_pct, r;
      @(negedge clk);
      c = q.size();
      chk(receive_empty == (c == 0) && receive_full == (c == DEPTH) && receive_stop == receive_full, "empty/full/stop");
      chk(receive_8 == (c >= 8) && receive_16 == (c >= 16) && receive_24 == (c >= 24), "level flags");
      chk(cahod == (c > 0 && q[0][8]) && dahod == (c > 0 && !q[0][8]), "head type flags");
      for (int k = 0; k < 8 && k < c; k++) chk(data[9*k +: 9] == q[k], "output word");
      if (receive_full) full_seen++;
      r = $urandom_range(99);
      receive_clk = !receive_stop && ($urandom_range(9) < 8);
      data_in = (r < 10) ? CMD_FILLER : (r < 20) ? unit_t'({1'b1, 8'($urandom_range(0, 254))}) :
                unit_t'({1'b0, 8'($urandom)});
      rd_pct = ((cyc / 500) % 2) ? 10 : 70;
      rd_en = ($urandom_range(99) < rd_pct);
      clear = (cyc == 3000);
      n_rd = !rd_en ? 0 : (c > 0 && q[0][8]) ? 1 : (c >= 8) ? 8 : 0;
      if (rd_en && c > 0 && !q[0][8] && c < 8) short_reads++;
      @(posedge clk);
      #1;
      if (clear) q.delete();
      else begin
        repeat (n_rd) void'(q.pop_front());
        if (receive_clk) begin
          if (data_in == CMD_FILLER) fillers++;
          else q.push_back(data_in);
        end
      end
    end
    chk(full_seen > 0 && fillers > 0 && short_reads > 0, "full, filler and short read seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_crossbar: random legal grant matrices (each column owned by at most one
// row) and random inputs; data, WCLK_OUT and STOP_OUT compared with values
// computed here from the crossbar equations.
module tb_crossbar;
  import earth_net_pkg::*;
  unit_t      data_in [4], data_out [4];
  logic [3:0] wclk_in, stop_out, wclk_out, stop_in;
  port_mask_t grant [4];
  int checks = 0, failures = 0, bcast_seen = 0;

  crossbar dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    for (int t = 0; t < 2000; t++) begin
      int owner [4];
      for (int i = 0; i < 4; i++) begin
        data_in[i] = unit_t'($urandom);
        grant[i] = '0;
      end
      wclk_in = 4'($urandom);
      stop_in = 4'($urandom);
      if (t % 7 == 0) begin             // one row broadcast to all columns
        int r;
        r = $urandom_range(3);
        for (int j = 0; j < 4; j++) owner[j] = r;
        bcast_seen++;
      end else
        for (int j = 0; j < 4; j++) owner[j] = $urandom_range(4) - 1;  // -1: unowned
      for (int j = 0; j < 4; j++) if (owner[j] >= 0) grant[owner[j]][j] = 1'b1;
      #1;
      for (int j = 0; j < 4; j++) begin
        unit_t exp_d;
        logic  exp_w;
        exp_d = (owner[j] >= 0) ? data_in[owner[j]] : '0;
        exp_w = (owner[j] >= 0) ? wclk_in[owner[j]] : 1'b0;
        checks += 2;
        if (data_out[j] !== exp_d) begin failures++; $display("FAIL data col %0d", j); end
        if (wclk_out[j] !== exp_w) begin failures++; $display("FAIL wclk col %0d", j); end
      end
      for (int i = 0; i < 4; i++) begin
        logic exp_s;
        exp_s = 1'b0;
        for (int j = 0; j < 4; j++) if (owner[j] == i && stop_in[j]) exp_s = 1'b1;
        checks++;
        if (stop_out[i] !== exp_s) begin failures++; $display("FAIL stop row %0d", i); end
      end
      #4;
    end
    checks++;
    if (bcast_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

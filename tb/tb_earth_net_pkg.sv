// tb_earth_net_pkg: checks the shared command codes and route decoding against
// the command table written out here bit by bit: route, tag, close, abort and
// filler codes; route recognition for all 512 unit values; the first request
// and the satisfied test of every route type for all 16 grant patterns.
module tb_earth_net_pkg;
  import earth_net_pkg::*;
  int checks = 0, failures = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] first [8];
    first = '{4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0001, 4'b0100, 4'b0101, 4'b1111};
    chk(CMD_CLOSE  == 9'b111000000, "CLOSE code");
    chk(CMD_ABORT  == 9'b111010000, "ABORT code");
    chk(CMD_FILLER == 9'b111111111, "FILLER code");
    chk(route_cmd(ROUTE_0) == 9'b111110000 && route_cmd(ROUTE_3) == 9'b111110011, "fixed route codes");
    chk(route_cmd(ROUTE_U) == 9'b111110100 && route_cmd(ROUTE_L) == 9'b111110101, "random route codes");
    chk(route_cmd(ROUTE_UL) == 9'b111110110 && route_cmd(ROUTE_A) == 9'b111110111, "broadcast route codes");
    chk(tag1_cmd(6'd13) == 9'b100001101 && tag2_cmd(6'd63) == 9'b101111111, "tag codes");
    for (int u = 0; u < 512; u++) begin
      unit_t x;
      x = unit_t'(u);
      chk(is_route(x) == (x[8:4] == 5'b11111 && x[3] == 1'b0), "route recognition");
      chk(is_close_or_abort(x) == (u == 9'h1c0 || u == 9'h1d0), "close/abort recognition");
    end
    for (int r = 0; r < 8; r++) begin
      route_e re;
      re = route_e'(r);
      chk(initial_request(re) == first[r], "first request");
      chk(is_bcast(re) == (r >= 6), "broadcast type");
      chk(is_random(re) == (r >= 4 && r <= 6), "random type");
      for (int g = 0; g < 16; g++) begin
        logic want;
        logic [3:0] gm;
        gm = 4'(g);
        if (r == 6)      want = (gm[0] | gm[1]) & (gm[2] | gm[3]);
        else if (r == 7) want = (gm == 4'b1111);
        else             want = (gm & first[r]) != 0;
        chk(request_satisfied(re, first[r], gm) == want, "request satisfied");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

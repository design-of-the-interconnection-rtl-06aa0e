// tb_switch_utilization: output utilization of one 4x4 switch with one
// randomly addressed message waiting at each of its four inputs, the figure
// of merit used to compare switch buffering schemes. Each trial starts from
// an idle switch, loads every input with a 24-unit message to a uniformly
// random output port and, a few cycles later, when all connections that can
// be made are made, counts the output ports in use. Two modes:
//   fixed routing   ROUTE_0..3: a port is used when at least one message
//                   wants it, expected 1 - (3/4)^4 = 68.4%
//   random routing  ROUTE_U / ROUTE_L for the pair holding the chosen port:
//                   a pair with k messages uses min(k,2) ports, expected
//                   (2+12+24+12+2)/64 = 81.25%
// The measured averages over TRIALS trials must lie within 3 points of these
// values and random routing must beat fixed routing. The original design
// quotes 91% for this switch from a different analytical estimate,
// 1 - (1/2)^3 (3/4); it is printed for comparison, not checked.
module tb_switch_utilization;
  import earth_net_pkg::*;
  localparam int TRIALS = 1500;
  logic clk = 0, rst = 1;
  unit_t data_in [4], data_out [4];
  logic [3:0] wclk_in, stop_out, wclk_out, stop_in;
  int checks = 0, failures = 0;

  crossbar_switch dut (.*);
  always #5 clk = ~clk;

  unit_t tx [4][$];

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  always @(negedge clk) begin
    #1;
    for (int i = 0; i < 4; i++) begin
      wclk_in[i] = (tx[i].size() != 0) && !stop_out[i];
      data_in[i] = (tx[i].size() != 0) ? tx[i][0] : '0;
    end
  end

  always @(posedge clk) if (!rst)
    for (int i = 0; i < 4; i++) if (wclk_in[i]) void'(tx[i].pop_front());

  function automatic int used_ports();
    port_mask_t cols;
    cols = '0;
    for (int i = 0; i < 4; i++) cols |= dut.grant[i];
    return $countones(cols);
  endfunction

  // One trial; returns the number of output ports in use.
  task automatic trial(input logic random_mode, output int used);
    int closes;
    for (int i = 0; i < 4; i++) begin
      int dest;
      dest = $urandom_range(3);
      tx[i].push_back(route_cmd(random_mode ? ((dest < 2) ? ROUTE_U : ROUTE_L) : route_e'(dest)));
      tx[i].push_back(tag1_cmd(6'(i)));
      tx[i].push_back(tag2_cmd(6'(dest)));
      for (int k = 0; k < 20; k++) tx[i].push_back({1'b0, 8'(k)});
      tx[i].push_back(CMD_CLOSE);
    end
    repeat (10) @(negedge clk);
    used = used_ports();
    // let every message leave before the next trial
    closes = 0;
    for (int c = 0; c < 400 && closes < 4; c++) begin
      @(posedge clk);
      for (int j = 0; j < 4; j++) if (wclk_out[j] && data_out[j] == CMD_CLOSE) closes++;
    end
    chk(closes == 4, "all four messages delivered");
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int used, sum_fixed, sum_random;
    real u_fixed, u_random;
    for (int i = 0; i < 4; i++) data_in[i] = '0;
    wclk_in = '0; stop_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    sum_fixed = 0; sum_random = 0;
    for (int t = 0; t < TRIALS; t++) begin
      trial(1'b0, used); sum_fixed += used;
      trial(1'b1, used); sum_random += used;
    end
    u_fixed  = real'(sum_fixed)  / (4.0 * TRIALS);
    u_random = real'(sum_random) / (4.0 * TRIALS);
    $display("output utilization: fixed routing %0.3f (expected 0.684), random routing %0.3f (expected 0.8125, analytical best case 0.91)",
             u_fixed, u_random);
    chk(u_fixed  > 0.654 && u_fixed  < 0.714, "fixed-routing utilization");
    chk(u_random > 0.782 && u_random < 0.842, "random-routing utilization");
    chk(u_random > u_fixed + 0.08, "random routing raises utilization");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

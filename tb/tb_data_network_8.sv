// tb_data_network_8: the 8-node, 2-stage network (STAGES = 2), the smaller
// configuration drawn in the document. First the random-routing example:
// node 1 holds the third output port (port 2) of the first-stage switch with
// a long fixed-route message, node 0 then sends to node 6 with a random
// lower-pair route (ROUTE_L, ROUTE_1) and must leave on the fourth port
// (port 3). Then a broadcast from node 4 and random all-to-all traffic with
// random stops at the node outputs. Every delivery is checked against the
// addressed node(s), with the route commands removed and the rest unchanged.
module tb_data_network_8;
  import earth_net_pkg::*;
  localparam int STAGES = 2;
  localparam int N = 2 ** (STAGES + 1);
  localparam int MAXID = 512;
  logic used_port3 = 0;
  logic clk = 0, rst = 1;
  unit_t in_data [N], out_data [N];
  logic [N-1:0] in_wclk, in_stop, out_wclk, out_stop;
  int checks = 0, failures = 0;
  int n_random = 0, n_bcast = 0, n_stop = 0;

  data_network #(.STAGES(STAGES)) dut (.*);
  always #5 clk = ~clk;

  unit_t tx [N][$];
  unit_t rx [N][$];
  logic [N-1:0] dest_set [MAXID];
  logic [N-1:0] seen [MAXID];
  int len_of [MAXID];
  int next_id = 0;

  // random-route and broadcast activity anywhere in the network
  logic [STAGES*N-1:0] in_random, bp_any;
  for (genvar s = 0; s < STAGES; s++) begin : g_s
    for (genvar k = 0; k < N / 4; k++) begin : g_k
      for (genvar p = 0; p < 4; p++) begin : g_p
        assign in_random[s*N + 4*k + p] = dut.g_stage[s].g_sw[k].u_sw.g_port[p].u_ctl.state == 3'd3;
        assign bp_any[s*N + 4*k + p]    = dut.g_stage[s].g_sw[k].u_sw.g_port[p].u_ctl.bp;
      end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic unit_t body_unit(int id, int k);
    return {1'b0, 8'(id * 5 + k * 11 + 3)};
  endfunction

  // mode 0: random where possible, 1: fixed, 2: mixed
  function automatic route_e hop(int dest, int s, int mode);
    int b;
    if (s == STAGES) return route_e'(((dest & 1) << 1) | ((dest >> STAGES) & 1));
    b = (dest >> (STAGES - s)) & 1;
    if (mode == 0 || (mode == 2 && s == 1)) return b ? ROUTE_L : ROUTE_U;
    return route_e'(2 * b + $urandom_range(1));
  endfunction

  task automatic send_hdr(input int src, input route_e hdr[$], input logic [N-1:0] dests, input int len);
    int id = next_id++;
    dest_set[id] = dests;
    seen[id] = '0;
    len_of[id] = len;
    foreach (hdr[h]) tx[src].push_back(route_cmd(hdr[h]));
    tx[src].push_back(tag1_cmd(6'(src)));
    tx[src].push_back(tag2_cmd(6'(id % 64)));
    tx[src].push_back({1'b0, 8'(id / 64)});   // id high bits as first body unit
    for (int k = 0; k < len; k++) tx[src].push_back(body_unit(id, k));
    tx[src].push_back(CMD_CLOSE);
  endtask

  task automatic send(input int src, input int dest, input int mode, input int len);
    route_e hdr[$];
    for (int s = 1; s <= STAGES; s++) hdr.push_back(hop(dest, s, mode));
    send_hdr(src, hdr, N'(1) << dest, len);
  endtask

  task automatic broadcast(input int src, input int len);
    route_e hdr[$];
    for (int s = 1; s < STAGES; s++) hdr.push_back(ROUTE_UL);
    hdr.push_back(ROUTE_A);
    send_hdr(src, hdr, '1, len);
  endtask

  always @(negedge clk) begin
    #1;
    for (int i = 0; i < N; i++) begin
      in_wclk[i] = (tx[i].size() != 0) && !in_stop[i];
      in_data[i] = (tx[i].size() != 0) ? tx[i][0] : '0;
    end
  end

  always @(posedge clk) if (!rst) begin
    if (dut.g_stage[0].g_sw[0].u_sw.grant[0] == 4'b1000) used_port3 <= 1'b1;
    if (|in_random) n_random++;
    if (|bp_any) n_bcast++;
    if (|out_stop) n_stop++;
    for (int i = 0; i < N; i++) begin
      if (in_wclk[i]) void'(tx[i].pop_front());
      if (out_wclk[i]) begin
        rx[i].push_back(out_data[i]);
        if (out_data[i] == CMD_CLOSE) check_msg(i);
      end
    end
  end

  task automatic check_msg(input int node);
    int id;
    logic ok;
    ok = rx[node].size() >= 4 && rx[node][0][8:6] == TAG1_PREFIX && rx[node][1][8:6] == TAG2_PREFIX;
    chk(ok, "delivery starts with the ordering tag (routes consumed)");
    if (ok) begin
      id = int'(rx[node][2][7:0]) * 64 + int'(rx[node][1][5:0]);
      ok = id < next_id;
      chk(ok, "known message");
      if (ok) begin
        chk(dest_set[id][node], "delivered to the addressed node");
        chk(!seen[id][node], "delivered once");
        seen[id][node] = 1'b1;
        chk(rx[node].size() == len_of[id] + 4, "message length");
        for (int k = 0; k < len_of[id] && k + 3 < rx[node].size(); k++)
          chk(rx[node][k + 3] == body_unit(id, k), "body unit");
      end
    end
    rx[node].delete();
  endtask

  task automatic drain(input int max_cycles);
    for (int c = 0; c < max_cycles; c++) begin
      int pending = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) pending += tx[i].size();
      for (int id = 0; id < next_id; id++) if (seen[id] != dest_set[id]) pending++;
      if (pending == 0) break;
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    route_e h[$];
    for (int i = 0; i < N; i++) in_data[i] = '0;
    in_wclk = '0; out_stop = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // random routing around the occupied third port of stage-1 switch 0
    h = '{ROUTE_2, ROUTE_0};          // node 1 -> node 2 via stage-1 port 2
    send_hdr(1, h, N'(1) << 2, 60);
    repeat (10) @(negedge clk);
    h = '{ROUTE_L, ROUTE_1};          // node 0 -> node 6, random lower pair
    send_hdr(0, h, N'(1) << 6, 8);
    drain(400);
    chk(seen[0][2] && seen[1][6], "both messages delivered");
    chk(used_port3, "node 0 routed to the fourth output port");
    chk(n_random > 0, "random routing happened");
    // broadcast from node 4 reaches all 8 nodes
    broadcast(4, 8);
    drain(400);
    chk(seen[next_id - 1] == '1, "broadcast reached every node");
    // random traffic
    fork
      begin
        for (int m = 0; m < 150; m++) begin
          if ($urandom_range(24) == 0) broadcast($urandom_range(N - 1), $urandom_range(1, 12));
          else send($urandom_range(N - 1), $urandom_range(N - 1), $urandom_range(2), $urandom_range(1, 24));
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      end
      begin
        repeat (1500) begin
          @(negedge clk);
          out_stop = ($urandom_range(4) == 0) ? N'($urandom) : '0;
        end
        out_stop = '0;
      end
    join
    drain(20000);
    for (int id = 0; id < next_id; id++) begin
      chk(seen[id] == dest_set[id], "every message delivered");
      if (seen[id] != dest_set[id]) $display("  id %0d seen %h want %h", id, seen[id], dest_set[id]);
    end
    chk(n_random > 0 && n_bcast > 0 && n_stop > 0, "random route, broadcast and stop all seen");
    $display("messages=%0d random_route_cycles=%0d broadcast_cycles=%0d stop_cycles=%0d", next_id, n_random, n_bcast, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_earth_interconnect: end-to-end run of the whole interconnection network
// at its default size (16 nodes, 3 stages of 4x4 switches, default buffer
// depths). Every node first clears its interface with the reset operation,
// then writes messages to random nodes through its network interface: route
// commands (random, fixed or mixed), ordering tag (source, message number),
// 8-unit data words, FILLER padding and CLOSE (one message ends in ABORT),
// in 2-, 4- and 8-unit pieces whenever the SEND flags allow. Node 4 also
// broadcasts among its other messages, and nodes 4 and 11 each broadcast at
// the end. Every node reads its receive buffer when the status word allows
// (some nodes pause reading to fill their buffers) and each received message
// is checked against what its source sent: addressed node, no route commands,
// no fillers, tag, every data unit and the closing command.
// Also checks the latency through the idle network (13 clocks from the
// write to the message head in the receive buffer).
// Counts each mechanism (random re-route, broadcast, input FIFO full, send
// channel stopped, receive buffer full, filler dropped, abort, reset
// operation) and fails if one never happened.
module tb_earth_interconnect;
  import earth_net_pkg::*;
  localparam int STAGES = 3;
  localparam int N = 16;
  localparam int MSGS = 40;         // unicast messages per node
  logic clk = 0, rst = 1;
  logic        cs [N], rw [N];
  logic [1:0]  data_type [N];
  logic [71:0] data_wr [N], data_rd [N];
  ni_status_t  status [N];
  int checks = 0, failures = 0;
  int n_random = 0, n_bcast = 0, n_fifo_full = 0, n_send_stop = 0, n_recv_full = 0;
  int n_filler = 0, n_abort = 0, n_reset = 0;

  earth_interconnect dut (.*);
  always #5 clk = ~clk;

  unit_t wr_q [N][$];               // units each node still has to write
  unit_t cur  [N][$];               // message being read at each node
  int    expect_cnt [N];            // deliveries each node must see
  int    got_cnt [N];
  logic [N-1:0] pause;

  // activity anywhere in the switches
  logic [STAGES*N-1:0] in_random, bp_any, fifo_full;
  for (genvar s = 0; s < STAGES; s++) begin : g_s
    for (genvar k = 0; k < N / 4; k++) begin : g_k
      for (genvar p = 0; p < 4; p++) begin : g_p
        assign in_random[s*N + 4*k + p] = dut.u_net.g_stage[s].g_sw[k].u_sw.g_port[p].u_ctl.state == 3'd3;
        assign bp_any[s*N + 4*k + p]    = dut.u_net.g_stage[s].g_sw[k].u_sw.g_port[p].u_ctl.bp;
        assign fifo_full[s*N + 4*k + p] = dut.u_net.g_stage[s].g_sw[k].u_sw.stop_out[p];
      end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic unit_t body_unit(int src, int num, int k);
    return {1'b0, 8'(src * 29 + num * 7 + k)};
  endfunction

  function automatic int words_of(int src, int num);
    return (src + num) % 4;          // 0..3 data words of 8 units
  endfunction

  function automatic route_e hop(int dest, int s, int mode);
    int b;
    if (s == STAGES) return route_e'(((dest & 1) << 1) | ((dest >> STAGES) & 1));
    b = (dest >> (STAGES - s)) & 1;
    if (mode == 0 || (mode == 2 && s == 1)) return b ? ROUTE_L : ROUTE_U;
    return route_e'(2 * b + $urandom_range(1));
  endfunction

  // Queue one message for writing: header, tag, data, filler padding, end command.
  task automatic queue_msg(input int src, input int dest, input int num, input logic bcast, input logic abort);
    unit_t m[$];
    for (int s = 1; s <= STAGES; s++)
      m.push_back(route_cmd(bcast ? ((s == STAGES) ? ROUTE_A : ROUTE_UL) : hop(dest, s, $urandom_range(2))));
    m.push_back(tag1_cmd(6'(src)));
    m.push_back(tag2_cmd(6'(num)));
    for (int k = 0; k < 8 * words_of(src, num); k++) m.push_back(body_unit(src, num, k));
    while ((m.size() + 1) % 8 != 0) m.push_back(CMD_FILLER);
    m.push_back(abort ? CMD_ABORT : CMD_CLOSE);
    foreach (m[k]) wr_q[src].push_back(m[k]);
    if (bcast) for (int d = 0; d < N; d++) expect_cnt[d]++;
    else expect_cnt[dest]++;
  endtask

  // A complete message arrived at node d.
  task automatic check_msg(input int d, input logic was_abort);
    int src, num, w;
    logic ok;
    ok = cur[d].size() >= 2 && cur[d][0][8:6] == TAG1_PREFIX && cur[d][1][8:6] == TAG2_PREFIX;
    chk(ok, "message starts with the ordering tag");
    if (!ok) begin $write("node %0d:", d); foreach (cur[d][k]) $write(" %h", cur[d][k]); $display(""); end
    if (ok) begin
      src = int'(cur[d][0][5:0]);
      num = int'(cur[d][1][5:0]);
      w = words_of(src, num);
      chk(cur[d].size() == 8 * w + 2, "message length without routes and fillers");
      for (int k = 0; k < 8 * w && k + 2 < cur[d].size(); k++)
        chk(cur[d][k + 2] == body_unit(src, num, k), "data unit");
      chk(was_abort == (num == 63), "closing command");
    end
    got_cnt[d]++;
    cur[d].delete();
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (|in_random) n_random++;
    if (|bp_any) n_bcast++;
    if (|fifo_full) n_fifo_full++;
    for (int n = 0; n < N; n++) begin
      if (dut.send_stop[n] && !status[n].send_empty) n_send_stop++;
      if (status[n].receive_full) n_recv_full++;
      if (dut.recv_clk[n] && dut.from_net[n] == CMD_FILLER) n_filler++;
    end
  end

  initial begin
    int done_cycle;
    for (int n = 0; n < N; n++) begin
      cs[n] = 0; rw[n] = 0; data_type[n] = 0; data_wr[n] = '0;
      expect_cnt[n] = 0; got_cnt[n] = 0;
    end
    pause = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // reset operation on every interface
    for (int n = 0; n < N; n++) begin cs[n] = 1; rw[n] = 1; data_type[n] = 2'b00; end
    @(negedge clk);
    for (int n = 0; n < N; n++) cs[n] = 0;
    #1;
    for (int n = 0; n < N; n++) begin
      chk(status[n].send_empty && status[n].receive_empty, "interface empty after reset operation");
      n_reset++;
    end
    // latency through the idle network: node 3 writes one 8-unit piece
    // (3 route commands, tag, 3 data units); the tag must reach node 9's
    // receive buffer 1 + 3 * 4 = 13 clocks later (one clock to leave the
    // send buffer, four per switch stage)
    begin
      unit_t p[8];
      int lat;
      p[0] = route_cmd(hop(9, 1, 1)); p[1] = route_cmd(hop(9, 2, 1)); p[2] = route_cmd(hop(9, 3, 1));
      p[3] = tag1_cmd(6'd3); p[4] = tag2_cmd(6'd62);
      for (int k = 0; k < 3; k++) p[5 + k] = body_unit(3, 62, k);
      cs[3] = 1; rw[3] = 1; data_type[3] = 2'b11;
      for (int j = 0; j < 8; j++) data_wr[3][9*j +: 9] = p[j];
      @(negedge clk);
      cs[3] = 0;
      lat = 0;                      // counts edges after the write edge
      while (!status[9].cahod && lat < 100) begin @(negedge clk); lat++; end
      chk(lat == 13, "network latency of 13 clocks (1 + 4 per stage)");
      $display("network latency node 3 -> node 9: %0d clocks", lat);
      // finish that message: 5 more data units, padding, CLOSE
      for (int k = 3; k < 8; k++) wr_q[3].push_back(body_unit(3, 62, k));
      while ((wr_q[3].size() + 1) % 8 != 0) wr_q[3].push_back(CMD_FILLER);
      wr_q[3].push_back(CMD_CLOSE);
      expect_cnt[9]++;
    end
    for (int n = 0; n < N; n++)
      for (int m = 0; m < MSGS; m++) begin
        queue_msg(n, $urandom_range(N - 1), m, 1'b0, 1'b0);
        if (n == 4 && m % 8 == 3) queue_msg(n, 0, 41 + m / 8, 1'b1, 1'b0);  // broadcasts among the traffic
      end
    queue_msg(4, 0, 20, 1'b1, 1'b0);              // broadcasts
    queue_msg(11, 0, 21, 1'b1, 1'b0);
    queue_msg(7, 2, 63, 1'b0, 1'b1);              // ends in ABORT
    n_abort++;
    done_cycle = -1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      int pending;
      @(negedge clk);
      #1;
      pending = 0;
      for (int n = 0; n < N; n++) begin
        int k;
        pause[n] = (n % 4 == 1) && (cyc % 1000 < 400);
        cs[n] = 0; rw[n] = 0;
        k = ($urandom_range(2) == 0) ? 2 : ($urandom_range(1) == 0) ? 4 : 8;
        if (!pause[n] && status[n].cahod) begin
          unit_t u;
          cs[n] = 1; rw[n] = 0;
          u = data_rd[n][8:0];
          if (u == CMD_CLOSE || u == CMD_ABORT) check_msg(n, u == CMD_ABORT);
          else cur[n].push_back(u);
        end else if (!pause[n] && status[n].dahod && status[n].receive_8) begin
          cs[n] = 1; rw[n] = 0;
          for (int j = 0; j < 8; j++) cur[n].push_back(data_rd[n][9*j +: 9]);
        end else if (wr_q[n].size() >= k &&
                     (k == 2 ? !status[n].send_2 : k == 4 ? !status[n].send_4 : !status[n].send_8)) begin
          cs[n] = 1; rw[n] = 1;
          data_type[n] = (k == 2) ? 2'b01 : (k == 4) ? 2'b10 : 2'b11;
          for (int j = 0; j < 8; j++) data_wr[n][9*j +: 9] = (j < k) ? wr_q[n][j] : '0;
          repeat (k) void'(wr_q[n].pop_front());
        end
        pending += wr_q[n].size() + (expect_cnt[n] - got_cnt[n]);
      end
      if (pending == 0) begin done_cycle = cyc; break; end
    end
    for (int n = 0; n < N; n++) cs[n] = 0;
    chk(done_cycle >= 0, "all traffic finished");
    for (int n = 0; n < N; n++) begin
      chk(got_cnt[n] == expect_cnt[n], "each node received all its messages");
      if (got_cnt[n] != expect_cnt[n]) $display("  node %0d got %0d of %0d", n, got_cnt[n], expect_cnt[n]);
    end
    $display("cycles=%0d random_route=%0d broadcast=%0d fifo_full=%0d send_stop=%0d receive_full=%0d filler_dropped=%0d abort=%0d reset_op=%0d",
             done_cycle, n_random, n_bcast, n_fifo_full, n_send_stop, n_recv_full, n_filler, n_abort, n_reset);
    chk(n_random > 0, "random re-route happened");
    chk(n_bcast > 0, "broadcast happened");
    chk(n_fifo_full > 0, "switch input FIFO filled");
    chk(n_send_stop > 0, "send channel stopped");
    chk(n_recv_full > 0, "receive buffer filled");
    chk(n_filler > 0, "filler dropped at the receiver");
    chk(n_abort > 0 && n_reset > 0, "abort and reset operation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

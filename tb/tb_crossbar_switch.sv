// tb_crossbar_switch: messages driven into the four input ports (respecting
// STOP_OUT) and collected at the four output ports (with STOP_IN driven by
// the testbench). Every message carries a unique ordering tag and a body
// derived from it, so each delivery is checked unit by unit and against the
// set of ports its route command allows. Covers the 4-cycle connection
// latency, four simultaneous connections at one unit per cycle, random
// routing around a busy port (each of the four ports held in turn),
// contention for one port, broadcasts to two and four ports, back-pressure
// filling an input FIFO, and random mixed traffic.
module tb_crossbar_switch;
  import earth_net_pkg::*;
  logic clk = 0, rst = 1;
  unit_t data_in [4], data_out [4];
  logic [3:0] wclk_in, stop_out, wclk_out, stop_in;
  int checks = 0, failures = 0;
  int n_random = 0, n_bcast = 0, n_contention = 0, n_fifo_full = 0, n_stop = 0;

  crossbar_switch dut (.*);
  always #5 clk = ~clk;

  unit_t tx [4][$];          // units waiting to be sent per input
  unit_t rx [4][$];          // units of the message being received per output
  port_mask_t allowed [64];  // ports a message may leave by
  int expect_n [64];         // deliveries expected
  int got_n [64];            // deliveries seen
  int len_of [64];
  port_mask_t seen_ports [64];
  int next_id = 0;
  int first_out_time = -1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic unit_t body_unit(int id, int k);
    return {1'b0, 8'(id * 7 + k * 13 + 1)};
  endfunction

  function automatic port_mask_t allowed_of(route_e r);
    case (r)
      ROUTE_U: return 4'b0011;
      ROUTE_L: return 4'b1100;
      ROUTE_UL: return 4'b1111;
      default: return initial_request(r);
    endcase
  endfunction

  function automatic int deliveries_of(route_e r);
    return (r == ROUTE_A) ? 4 : (r == ROUTE_UL) ? 2 : 1;
  endfunction

  task automatic send(input int port, input route_e r, input int len);
    int id = next_id++;
    allowed[id] = allowed_of(r);
    expect_n[id] = deliveries_of(r);
    got_n[id] = 0;
    seen_ports[id] = '0;
    len_of[id] = len;
    tx[port].push_back(route_cmd(r));
    tx[port].push_back(tag1_cmd(6'(port)));
    tx[port].push_back(tag2_cmd(6'(id)));
    for (int k = 0; k < len; k++) tx[port].push_back(body_unit(id, k));
    tx[port].push_back(CMD_CLOSE);
  endtask

  logic [2:0] ctl_state [4];
  for (genvar g = 0; g < 4; g++) begin : g_peek
    assign ctl_state[g] = dut.g_port[g].u_ctl.state;
  end

  // drive inputs on the falling edge
  always @(negedge clk) begin
    #1;
    for (int p = 0; p < 4; p++) begin
      wclk_in[p] = (tx[p].size() != 0) && !stop_out[p];
      data_in[p] = (tx[p].size() != 0) ? tx[p][0] : '0;
    end
  end

  // sample on the rising edge
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < 4; p++) begin
      if (wclk_in[p]) void'(tx[p].pop_front());
      if (stop_out[p]) n_fifo_full++;
      if (stop_in[p]) n_stop++;
      if (wclk_out[p]) begin
        if (first_out_time < 0) first_out_time = $time;
        rx[p].push_back(data_out[p]);
        if (data_out[p] == CMD_CLOSE) check_msg(p);
      end
    end
    for (int p = 0; p < 4; p++) begin
      if (ctl_state[p] == 3'd3) n_random++;
      if (dut.bcast_pending) n_bcast++;
    end
  end

  task automatic check_msg(input int p);
    int id;
    logic ok;
    ok = rx[p].size() >= 3 && rx[p][0][8:6] == TAG1_PREFIX && rx[p][1][8:6] == TAG2_PREFIX;
    chk(ok, "message starts with ordering tag");
    if (ok) begin
      id = int'(rx[p][1][5:0]);
      chk(allowed[id][p], "message left by an allowed port");
      chk(!seen_ports[id][p], "no duplicate on one port");
      seen_ports[id][p] = 1'b1;
      chk(rx[p].size() == len_of[id] + 3, "message length");
      for (int k = 0; k < len_of[id] && k + 2 < rx[p].size(); k++)
        chk(rx[p][k + 2] == body_unit(id, k), "body unit");
      got_n[id]++;
    end
    rx[p].delete();
  endtask

  task automatic wait_idle(input int max_cycles);
    for (int c = 0; c < max_cycles; c++) begin
      @(negedge clk);
      if (tx[0].size() + tx[1].size() + tx[2].size() + tx[3].size() == 0 &&
          ctl_state[0] == 0 && ctl_state[1] == 0 &&
          ctl_state[2] == 0 && ctl_state[3] == 0 &&
          dut.fifo_empty == 4'hF) break;
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_start, t_end;
    for (int p = 0; p < 4; p++) begin data_in[p] = '0; end
    wclk_in = '0; stop_in = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // A. connection latency: route written into the FIFO at edge t, first
    // unit written out at edge t+4
    @(negedge clk);
    send(0, ROUTE_3, 4);
    @(posedge clk); t_start = $time;
    wait_idle(100);
    chk((first_out_time - t_start) / 10 == 4, "connection latency 4 cycles");
    // B. four connections at once, one unit per cycle each
    for (int p = 0; p < 4; p++) send(p, route_e'((p + 1) % 4), 40);
    t_start = $time;
    wait_idle(200);
    t_end = $time;
    chk((t_end - t_start) / 10 <= 40 + 3 + 12, "four parallel connections at full rate");
    // C. random routing around a busy port
    send(0, ROUTE_0, 40);
    repeat (8) @(negedge clk);
    send(1, ROUTE_U, 5);
    wait_idle(200);
    chk(seen_ports[next_id - 1] == 4'b0010, "random route took port 1");
    send(2, ROUTE_3, 40);
    repeat (8) @(negedge clk);
    send(3, ROUTE_L, 5);
    wait_idle(200);
    chk(seen_ports[next_id - 1] == 4'b0100, "random route took port 2");
    // each port held in turn: a random route within its pair takes the partner
    for (int h = 0; h < 4; h++)
      for (int rep = 0; rep < 3; rep++) begin
        send((h + 2) % 4, route_e'(h), 40);
        repeat (8) @(negedge clk);
        send((h + 3) % 4, (h < 2) ? ROUTE_U : ROUTE_L, 5);
        wait_idle(200);
        chk(seen_ports[next_id - 1] == 4'(1 << (h ^ 1)), "random route took the partner of a held port");
      end
    // D. contention for one fixed port
    send(2, ROUTE_1, 10);
    send(3, ROUTE_1, 10);
    n_contention++;
    wait_idle(200);
    // E. broadcasts
    send(1, ROUTE_A, 6);
    wait_idle(200);
    chk(seen_ports[next_id - 1] == 4'b1111, "broadcast to all four ports");
    send(2, ROUTE_UL, 6);
    wait_idle(200);
    chk($countones(seen_ports[next_id - 1]) == 2 && |seen_ports[next_id - 1][1:0], "upper+lower broadcast");
    // F. back-pressure: output 3 stopped while a long message arrives
    stop_in[3] = 1;
    send(0, ROUTE_3, 50);
    repeat (80) @(negedge clk);
    chk(stop_out[0], "input FIFO full while output stopped");
    stop_in[3] = 0;
    wait_idle(300);
    // G. random mixed traffic with random stops
    fork
      begin
        for (int m = 0; m < 40; m++) begin
          int p;
          route_e r;
          p = $urandom_range(3);
          r = route_e'($urandom_range(7));
          if (next_id >= 63) break;
          send(p, r, $urandom_range(1, 20));
          repeat ($urandom_range(0, 6)) @(negedge clk);
        end
      end
      begin
        repeat (600) begin
          @(negedge clk);
          stop_in = ($urandom_range(9) == 0) ? 4'($urandom) : '0;
        end
        stop_in = '0;
      end
    join
    wait_idle(3000);
    for (int id = 0; id < next_id; id++) begin
      chk(got_n[id] == expect_n[id], "every message delivered");
      if (got_n[id] != expect_n[id]) $display("  id %0d got %0d of %0d", id, got_n[id], expect_n[id]);
    end
    chk(n_random > 0 && n_bcast > 0 && n_contention > 0 && n_fifo_full > 0 && n_stop > 0, "all mechanisms exercised");
    $display("mechanisms: random_route=%0d broadcast=%0d fifo_full=%0d stop=%0d", n_random, n_bcast, n_fifo_full, n_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_control_unit: one control unit between a queue that stands in for its
// input FIFO and a simple grant model (a request bit is granted when that
// output port is not marked busy). Checks that the route command is consumed,
// every other unit up to CLOSE is forwarded in order, the 4-cycle connection
// latency (here `arriving` stays low, so it is counted from the edge at which
// the route command is at the queue head), random re-routing around a busy port, waiting on a busy fixed
// port, stalling on the downstream stop, broadcast requests with BP, and that
// BroadcastPending keeps an idle unit idle, and that ABORT releases the
// connection like CLOSE.
module tb_control_unit;
  import earth_net_pkg::*;
  logic clk = 0, rst = 1;
  unit_t data_in, data_out;
  logic afull = 0, empty, wclk, rclk, bcast_pending = 0, bp;
  logic arriving = 0;             // the queue model fills between edges
  port_mask_t grant, request, busy = '0;
  int checks = 0, failures = 0;
  int n_random = 0, n_stall = 0, n_bcast = 0, n_wait = 0;
  unit_t q[$], got[$];

  control_unit dut (.*);
  always #5 clk = ~clk;

  assign empty   = (q.size() == 0);
  assign data_in = empty ? unit_t'(0) : q[0];
  assign grant   = request & ~busy;

  always @(posedge clk) begin
    if (rclk && q.size() != 0) void'(q.pop_front());
    if (wclk) got.push_back(data_out);
    if (dut.state == 3'd3) n_random++;
    if (afull && dut.state == 3'd5) n_stall++;
    if (!rst) begin
      checks++;
      if (wclk && afull) begin failures++; $display("FAIL unit written while stopped at %0t", $time); end
    end
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Load a message, wait for its CLOSE to come out, compare the body.
  task automatic run_msg(input route_e r, input int len, output int latency, output port_mask_t used,
                         input unit_t last = CMD_CLOSE);
    unit_t body[$];
    int t0, t1;
    body.push_back(tag1_cmd(6'd5));
    body.push_back(tag2_cmd(6'($urandom)));
    for (int k = 0; k < len; k++) body.push_back({1'b0, 8'($urandom)});
    body.push_back(last);
    got.delete();
    @(negedge clk);
    q.push_back(route_cmd(r));
    foreach (body[k]) q.push_back(body[k]);
    t0 = $time;
    latency = -1;
    used = '0;
    for (int c = 0; c < 400 && got.size() < body.size(); c++) begin
      @(negedge clk);
      if (got.size() == 1 && latency < 0) begin
        latency = ($time - t0) / 10 - 1;
        used = request & grant;
      end
    end
    chk(got.size() == body.size(), "message length");
    foreach (body[k]) if (k < got.size()) chk(got[k] == body[k], "unit forwarded");
    repeat (2) @(negedge clk);
    chk(request == '0 && !bp, "connection released");
  endtask

  initial begin
    int lat;
    port_mask_t used;
    repeat (2) @(negedge clk);
    rst = 0;
    // 1. fixed route, free port: latency 4 cycles
    run_msg(ROUTE_2, 8, lat, used);
    chk(lat == 4, "connection latency of 4 cycles");
    chk(used == 4'b0100, "route to port 2");
    // 2. random route to the upper pair with port 0 busy: goes out on port 1
    busy = 4'b0001;
    run_msg(ROUTE_U, 4, lat, used);
    chk(used == 4'b0010, "random route around busy port 0");
    // 3. random lower pair, port 2 busy
    busy = 4'b0100;
    run_msg(ROUTE_L, 4, lat, used);
    chk(used == 4'b1000, "random route around busy port 2");
    // 4. fixed route to a busy port waits until the port frees
    busy = 4'b0010;
    fork
      run_msg(ROUTE_1, 4, lat, used);
      begin
        repeat (10) @(negedge clk);
        chk(got.size() == 0 && request == 4'b0010, "fixed route waits");
        n_wait++;
        busy = '0;
      end
    join
    // 5. downstream stop stalls the transfer without losing units
    fork
      run_msg(ROUTE_3, 16, lat, used);
      begin
        repeat (8) @(negedge clk);
        afull = 1;
        repeat (6) begin
          @(negedge clk);
        end
        afull = 0;
      end
    join
    // 6. broadcast to all ports: BP high while connected
    fork
      run_msg(ROUTE_A, 4, lat, used);
      begin
        repeat (4) @(negedge clk);
        chk(bp && request == 4'b1111, "broadcast request and BP");
        n_bcast++;
      end
    join
    // 7. upper+lower broadcast with port 0 and port 3 busy: gets 1 and 2
    busy = 4'b1001;
    run_msg(ROUTE_UL, 4, lat, used);
    chk(used == 4'b0110, "upper+lower random broadcast");
    busy = '0;
    // 8. broadcast pending elsewhere keeps the unit idle; a leading filler is dropped
    bcast_pending = 1;
    @(negedge clk);
    q.push_back(CMD_FILLER);
    repeat (5) @(negedge clk);
    chk(q.size() == 1 && !rclk, "idle while broadcast pending");
    bcast_pending = 0;
    run_msg(ROUTE_0, 2, lat, used);
    chk(used == 4'b0001, "filler before route command discarded");
    // 9. ABORT ends a connection like CLOSE
    run_msg(ROUTE_1, 3, lat, used, CMD_ABORT);
    chk(used == 4'b0010, "aborted message routed");
    chk(n_random > 0, "random route state visited");
    chk(n_stall > 0, "stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wwfa_arbiter: directed cases from the document (the diagonal wave of
// cells (0,1),(1,0),(2,3),(3,2); the horizontal wave of row 1; a lone request
// granted at once), then random request patterns checked against a reference
// model kept in this testbench: grants are held while requested, a free
// column goes to its only requester or to the requester on the wave front,
// and a multi-column request is granted whole or not at all.
module tb_wwfa_arbiter;
  import earth_net_pkg::*;
  logic clk = 0, rst = 1, bcast_pending = 0;
  port_mask_t request [4], grant [4], busy;
  int checks = 0, failures = 0;
  int k_ref;                 // wave position expected
  logic held [4][4];

  wwfa_arbiter dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic cand(int i, int j);
    int n = 0;
    logic taken = 0, wave;
    for (int r = 0; r < 4; r++) if (held[r][j] && request[r][j]) taken = 1;
    if (taken || !request[i][j]) return 0;
    for (int r = 0; r < 4; r++) if (request[r][j] && !(held[r][j] && request[r][j])) n++;
    wave = bcast_pending ? (i == k_ref) : (((i + j) % 4) == k_ref);
    return (n == 1) || wave;
  endfunction

  function automatic logic ref_grant(int i, int j);
    int nbits = 0;
    logic any_keep = 0, all_ok = 1;
    for (int c = 0; c < 4; c++) begin
      if (held[i][c] && request[i][c]) any_keep = 1;
      if (request[i][c]) begin
        nbits++;
        if (!cand(i, c)) all_ok = 0;
      end
    end
    if (any_keep) return held[i][j] && request[i][j];
    if (nbits > 1) return request[i][j] && all_ok;
    return cand(i, j);
  endfunction

  task automatic compare(input string tag);
    #1;
    for (int j = 0; j < 4; j++) begin
      logic b;
      b = 0;
      for (int r = 0; r < 4; r++) if (held[r][j] && request[r][j]) b = 1;
      checks++;
      if (busy[j] !== b) begin failures++; $display("FAIL %s busy %0d", tag, j); end
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (grant[i][j] !== ref_grant(i, j)) begin
          failures++;
          $display("FAIL %s cell (%0d,%0d) got %0b k=%0d", tag, i, j, grant[i][j], k_ref);
        end
      end
  endtask

  // advance one clock, keeping the model's state in step
  task automatic step();
    @(posedge clk);
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) held[i][j] = grant[i][j];
    k_ref = (k_ref + 3) % 4;  // shift right: 0001 -> 1000 -> 0100 -> 0010
    @(negedge clk);
  endtask

  task automatic clear_req();
    for (int i = 0; i < 4; i++) request[i] = '0;
  endtask

  initial begin
    clear_req();
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) held[i][j] = 0;
    k_ref = 0;
    @(negedge clk); rst = 0;
    // lone request granted in the same cycle
    request[2] = 4'b1000;
    compare("lone");
    checks++; if (grant[2] !== 4'b1000) failures++;
    step(); clear_req(); step();
    // walk to wave k = 1 and apply the document's diagonal example
    while (k_ref != 1) step();
    request[0] = 4'b0010; request[1] = 4'b0010;   // (0,1) and (1,1)
    request[2] = 4'b1000; request[3] = 4'b1000;   // (2,3) and (3,3)
    compare("diag");
    checks++; if (!(grant[0][1] && grant[2][3] && !grant[1][1] && !grant[3][3])) begin
      failures++; $display("FAIL diagonal example");
    end
    // the winners keep their columns while the wave moves on
    for (int c = 0; c < 4; c++) begin step(); compare("hold"); end
    checks++; if (!(grant[0][1] && grant[2][3])) failures++;
    clear_req(); step(); step();
    // horizontal wave example: rows 1 and 2 ask for all columns at k = 1
    while (k_ref != 1) step();
    bcast_pending = 1;
    request[1] = 4'b1111; request[2] = 4'b1111;
    compare("horiz");
    checks++; if (!(grant[1] == 4'b1111 && grant[2] == 4'b0000)) begin
      failures++; $display("FAIL horizontal example");
    end
    clear_req(); bcast_pending = 0; step(); step();
    // random traffic against the model
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 4; i++) begin
        if (request[i] != 0 && $urandom_range(9) < 8) continue;   // keep most requests
        request[i] = ($urandom_range(3) == 0) ? 4'($urandom) : port_mask_t'(1 << $urandom_range(3));
        if ($urandom_range(4) == 0) request[i] = '0;
      end
      bcast_pending = ($urandom_range(9) == 0);
      compare("random");
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

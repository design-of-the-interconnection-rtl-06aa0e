// wwfa_arbiter: wrapped wave front arbiter of the 4x4 switch.
//
// REQUEST[i][j] asks for crosspoint (i,j); GRANT[i][j] is the answer, given in
// the same cycle as the request (combinational). A one-hot 4-bit circular
// shift register, reset to 0001 and rotated right every clock, selects the
// wave front, the four cells with top priority:
//   diagonal wave (no broadcast pending):  cells with (i + j) mod 4 == k
//   horizontal wave (broadcast pending):   cells of row i == k
// where k is the position of the 1 in the shift register. The diagonal wave
// with k = 1 is (0,1), (1,0), (2,3), (3,2), the example drawn in the document.
// In a column where only one row requests, that row wins whatever the wave;
// where several request, only a row on the wave front wins, the others wait.
//
// A granted crosspoint stays granted while its row keeps requesting it, so a
// connection is held until the control unit drops its request at the end of
// the message. The document keeps this state in a combinational feedback
// loop; here it is a register of last cycle's grants. Columns held that way
// are not offered to other rows and are reported on `busy`, which the control
// units use to decide when to re-route.
//
// Two choices are this design's own: a request for several columns (a
// broadcast) is granted whole or not at all, so two broadcasts can never
// each hold part of what the other needs; and the `busy` output, which the
// document does not have.
// The assertion below is disabled during reset with `disable iff (rst)`;
// lint reports `rst` as used both asynchronously and synchronously because
// of that, which is intended.
module wwfa_arbiter
  import earth_net_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       bcast_pending,
  input  port_mask_t request [4],   // request[i][j]: row i wants column j
  output port_mask_t grant   [4],
  output port_mask_t busy           // column held by an established connection
);
  logic [3:0] wave_sr;               // one-hot wave position
  port_mask_t held_q [4];            // grants of the previous cycle
  port_mask_t keep   [4];
  logic [3:0] col_taken;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) wave_sr <= 4'b0001;
    else     wave_sr <= {wave_sr[0], wave_sr[3:1]};
  end

  always_comb begin
    port_mask_t cand [4];
    col_taken = '0;
    for (int i = 0; i < 4; i++) begin
      keep[i]   = held_q[i] & request[i];
      col_taken |= keep[i];
    end
    // cand[i][j]: row i would win free column j this cycle
    for (int j = 0; j < 4; j++) begin
      int unsigned nreq;
      nreq = 0;
      for (int i = 0; i < 4; i++) nreq += int'(request[i][j] && !keep[i][j]);
      for (int i = 0; i < 4; i++) begin
        logic on_wave;
        on_wave = bcast_pending ? wave_sr[i] : wave_sr[(i + j) % 4];
        cand[i][j] = request[i][j] && !col_taken[j] && (nreq == 1 || on_wave);
      end
    end
    // A request for several columns (a broadcast) is granted whole or not at all.
    for (int i = 0; i < 4; i++) begin
      if (keep[i] != '0)
        grant[i] = keep[i];
      else if ($countones(request[i]) > 1)
        grant[i] = ((cand[i] & request[i]) == request[i]) ? request[i] : '0;
      else
        grant[i] = cand[i];
    end
  end

  assign busy = col_taken;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) for (int i = 0; i < 4; i++) held_q[i] <= '0;
    else     for (int i = 0; i < 4; i++) held_q[i] <= grant[i];
  end

  // Each output column is connected to at most one input row.
  for (genvar j = 0; j < 4; j++) begin : g_chk
    a_one_row: assert property (@(posedge clk) disable iff (rst)
      $countones({grant[3][j], grant[2][j], grant[1][j], grant[0][j]}) <= 1)
      else $error("wwfa_arbiter: column %0d granted twice", j);
  end

endmodule

// crossbar: the 4x4 crosspoint matrix of the switch, pure combinational logic.
//
// Row i carries the unit, write strobe (WCLK) and stop flag of input port i;
// column j those of output port j. GRANT[i][j] closes crosspoint (i,j). Per the
// document's equations:
//   WCLK_OUT[j] = OR over i of (WCLK_IN[i] & GRANT[i][j])
//   STOP_OUT[i] = (OR over j of (STOP_IN[j] & GRANT[i][j])) & (OR over j of GRANT[i][j])
// and DATA_OUT[j] copies DATA_IN[i] of the granted row. The document drives
// each column through tristate buffers; here the column is an AND-OR of the
// rows, which gives the same value because the arbiter grants each column to
// at most one row. An ungranted column outputs zero.
module crossbar
  import earth_net_pkg::*;
(
  input  unit_t      data_in  [4],
  input  logic [3:0] wclk_in,
  output logic [3:0] stop_out,
  output unit_t      data_out [4],
  output logic [3:0] wclk_out,
  input  logic [3:0] stop_in,
  input  port_mask_t grant    [4]   // grant[i][j]: input i to output j
);
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      data_out[j] = '0;
      wclk_out[j] = 1'b0;
      for (int i = 0; i < 4; i++) begin
        data_out[j] |= data_in[i] & {9{grant[i][j]}};
        wclk_out[j] |= wclk_in[i] & grant[i][j];
      end
    end
    for (int i = 0; i < 4; i++) begin
      stop_out[i] = (|(stop_in & grant[i])) & (|grant[i]);
    end
  end

endmodule

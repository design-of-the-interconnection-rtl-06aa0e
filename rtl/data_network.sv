// data_network: multistage network of 4x4 crossbar switches.
//
// STAGES stages of N/4 switches connect N = 2^(STAGES+1) nodes, a modified
// indirect binary n-cube built from 4x4 switches: 2 stages for 8 nodes and 3
// stages for 16 nodes as drawn in the document. Switches are numbered k =
// 0..N/4-1 in each stage and ports p = 0..3 (0,1 upper, 2,3 lower).
//   * Node i enters stage 1 at switch i/4, port i mod 4.
//   * Between stage s and s+1 (s = 1..STAGES-1) output p of switch k goes to
//     switch m, input q, where m is k with bit s-1 replaced by p[1], and
//     q = {k[s-1], p[0]}. Both upper (or both lower) ports of a switch thus
//     lead to the same next switch, which is what lets a random route pick
//     either port of a pair.
//   * Output p of last-stage switch k is node b, with b[0] = p[1],
//     b[STAGES] = p[0] and b[STAGES-s] = k[s-1] for s = 1..STAGES-1.
// Routing to node b: at stage s < STAGES take the upper pair if
// b[STAGES-s] is 0 and the lower pair if it is 1; at the last stage take port
// {b[0], b[STAGES]}. These formulas reproduce the wiring of the document's
// 8-node and 16-node drawings and its routing rule.
//
// Every link is a 9-bit unit, a write strobe and a stop flag running the
// other way; all switches share one clock.
//
// Broadcasts (ROUTE_UL at stages 1..STAGES-1, ROUTE_A at the last stage)
// reach every node. As in the switch design followed here, nothing prevents
// broadcasts started by several nodes at once from waiting on each other
// across switches when long messages fill the FIFOs; the safe use is one
// broadcasting node at a time.
module data_network
  import earth_net_pkg::*;
#(
  parameter int unsigned STAGES     = 3,
  parameter int unsigned FIFO_DEPTH = 32,
  localparam int unsigned N         = 2 ** (STAGES + 1)
) (
  input  logic         clk,
  input  logic         rst,
  input  unit_t        in_data  [N],
  input  logic [N-1:0] in_wclk,
  output logic [N-1:0] in_stop,
  output unit_t        out_data [N],
  output logic [N-1:0] out_wclk,
  input  logic [N-1:0] out_stop
);
  localparam int unsigned W = N / 4;

  // Input position (4*m + q) of the next stage fed by output p of switch k of stage s (0-based).
  function automatic int unsigned next_pos(int unsigned s, int unsigned k, int unsigned p);
    int unsigned m, q;
    m = (k & ~(32'd1 << s)) | (((p >> 1) & 1) << s);
    q = (((k >> s) & 1) << 1) | (p & 1);
    return 4 * m + q;
  endfunction

  // Node reached by output p of last-stage switch k.
  function automatic int unsigned out_node(int unsigned k, int unsigned p);
    int unsigned b;
    b = ((p >> 1) & 1) | ((p & 1) << STAGES);
    for (int unsigned s = 1; s < STAGES; s++) b |= ((k >> (s - 1)) & 1) << (STAGES - s);
    return b;
  endfunction

  unit_t         st_in_data  [STAGES][N];
  logic  [N-1:0] st_in_wclk  [STAGES];
  logic  [N-1:0] st_in_stop  [STAGES];
  unit_t         st_out_data [STAGES][N];
  logic  [N-1:0] st_out_wclk [STAGES];
  logic  [N-1:0] st_out_stop [STAGES];

  for (genvar i = 0; i < N; i++) begin : g_io
    assign st_in_data[0][i] = in_data[i];
    assign st_in_wclk[0][i] = in_wclk[i];
    assign in_stop[i]       = st_in_stop[0][i];
  end

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar k = 0; k < W; k++) begin : g_sw
      unit_t din [4];
      unit_t dout[4];
      for (genvar p = 0; p < 4; p++) begin : g_p
        assign din[p] = st_in_data[s][4*k+p];
        assign st_out_data[s][4*k+p] = dout[p];
      end
      crossbar_switch #(.FIFO_DEPTH(FIFO_DEPTH)) u_sw (
        .clk      (clk),
        .rst      (rst),
        .data_in  (din),
        .wclk_in  (st_in_wclk[s][4*k +: 4]),
        .stop_out (st_in_stop[s][4*k +: 4]),
        .data_out (dout),
        .wclk_out (st_out_wclk[s][4*k +: 4]),
        .stop_in  (st_out_stop[s][4*k +: 4])
      );
      for (genvar p = 0; p < 4; p++) begin : g_link
        if (s + 1 < STAGES) begin : g_inner
          localparam int unsigned D = next_pos(s, k, p);
          assign st_in_data[s+1][D]  = st_out_data[s][4*k+p];
          assign st_in_wclk[s+1][D]  = st_out_wclk[s][4*k+p];
          assign st_out_stop[s][4*k+p] = st_in_stop[s+1][D];
        end else begin : g_last
          localparam int unsigned B = out_node(k, p);
          assign out_data[B] = st_out_data[s][4*k+p];
          assign out_wclk[B] = st_out_wclk[s][4*k+p];
          assign st_out_stop[s][4*k+p] = out_stop[B];
        end
      end
    end
  end

endmodule

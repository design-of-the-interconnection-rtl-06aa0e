// receive_fifo: the receive channel of the network interface.
//
// A circular buffer of DEPTH 9-bit units (64). The network side writes one
// unit on each rising clock edge with `receive_clk` high; a FILLER command is
// dropped and never stored. RECEIVE_STOP is RECEIVE_FULL, so the switch port
// feeding this channel stops while the buffer is full.
//
// The node side reads on the rising clock edge when `rd_en` is high. `data`
// always shows the eight units from the head, unit k in bits 9k+8..9k. When
// the head unit is a command (CAHOD), a read takes that one unit, which the
// node finds in the low 9 bits. When it is a data unit (DAHOD), a read takes
// eight units, and only when at least eight are stored (RECEIVE_8); otherwise
// the read does nothing. `clear` empties the buffer.
//
// Flags follow the document's table: RECEIVE_EMPTY, RECEIVE_FULL,
// RECEIVE_8/16/24 (at least 8/16/24 units stored), DAHOD and CAHOD.
module receive_fifo
  import earth_net_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  unit_t       data_in,
  input  logic        receive_clk,
  output logic        receive_stop,
  input  logic        rd_en,
  input  logic        clear,
  output logic [71:0] data,
  output logic        receive_empty,
  output logic        receive_full,
  output logic        receive_8,
  output logic        receive_16,
  output logic        receive_24,
  output logic        dahod,
  output logic        cahod
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;
  typedef logic [AW:0]   cnt_t;

  unit_t mem [DEPTH];
  ptr_t  head, tail;
  cnt_t  count, n_rd;
  logic  do_wr;

  assign receive_empty = (count == 0);
  assign receive_full  = (count == cnt_t'(DEPTH));
  assign receive_8     = count >= 8;
  assign receive_16    = count >= 16;
  assign receive_24    = count >= 24;
  assign receive_stop  = receive_full;
  assign cahod         = !receive_empty && mem[head][8];
  assign dahod         = !receive_empty && !mem[head][8];
  assign do_wr         = receive_clk && !receive_full && (data_in != CMD_FILLER) && !clear;

  always_comb begin
    for (int k = 0; k < 8; k++) data[9*k +: 9] = mem[ptr_t'(head + ptr_t'(k))];
    if (!rd_en || clear)         n_rd = '0;
    else if (cahod)              n_rd = cnt_t'(1);
    else if (dahod && receive_8) n_rd = cnt_t'(8);
    else                         n_rd = '0;
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[tail] <= data_in;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else if (clear) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_wr) tail <= tail + 1'b1;
      head  <= head + ptr_t'(n_rd);
      count <= count + cnt_t'(do_wr) - n_rd;
    end
  end

endmodule

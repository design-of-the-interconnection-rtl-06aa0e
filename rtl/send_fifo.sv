// send_fifo: the send channel of the network interface.
//
// A circular buffer of DEPTH 9-bit units (64, the document's 8 words of 8
// bytes). The node side writes a 72-bit word, eight units with unit k in bits
// 9k+8..9k, on the rising clock edge when `wr_en` is high; `data_type` picks
// how many low units are taken: 01 two, 10 four, 11 all eight. `clear`
// empties the buffer (the interface's reset operation, CS & R/W with
// DATA_TYPE 00). The network side sends one unit per cycle whenever the
// buffer is not empty and `send_stop` is low, with `send_clk` high for each
// unit sent and the unit on `data_out`.
//
// Flags follow the document's table: SEND_EMPTY, SEND_FULL and SEND_2/4/8,
// high when fewer than 2/4/8 units are free. The node is expected to check
// them before writing; a write that does not fit is dropped here. The buffer
// keeps an occupancy count so that all DEPTH units can be used.
module send_fifo
  import earth_net_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [1:0]  data_type,
  input  logic [71:0] data,
  input  logic        clear,
  output unit_t       data_out,
  output logic        send_clk,
  input  logic        send_stop,
  output logic        send_empty,
  output logic        send_full,
  output logic        send_2,
  output logic        send_4,
  output logic        send_8
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;
  typedef logic [AW:0]   cnt_t;

  unit_t mem [DEPTH];
  ptr_t  head, tail;
  cnt_t  count, free_units, n_wr;
  logic  do_wr;

  always_comb begin
    unique case (data_type)
      2'b01:   n_wr = cnt_t'(2);
      2'b10:   n_wr = cnt_t'(4);
      2'b11:   n_wr = cnt_t'(8);
      default: n_wr = '0;
    endcase
  end

  assign free_units = cnt_t'(DEPTH) - count;
  assign do_wr      = wr_en && (n_wr != 0) && (n_wr <= free_units) && !clear;
  assign send_empty = (count == 0);
  assign send_full  = (count == cnt_t'(DEPTH));
  assign send_2     = free_units < 2;
  assign send_4     = free_units < 4;
  assign send_8     = free_units < 8;
  assign send_clk   = !send_empty && !send_stop;
  assign data_out   = mem[head];

  always_ff @(posedge clk) begin
    if (do_wr)
      for (int k = 0; k < 8; k++)
        if (k < int'(n_wr)) mem[ptr_t'(tail + ptr_t'(k))] <= data[9*k +: 9];
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
      if (do_wr)    tail <= tail + ptr_t'(n_wr);
      if (send_clk) head <= head + 1'b1;
      count <= count + (do_wr ? n_wr : '0) - cnt_t'(send_clk);
    end
  end

endmodule

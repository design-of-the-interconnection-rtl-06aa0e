// xbar_fifo: the input buffer of one 4x4 switch port.
//
// A circular queue of DEPTH 9-bit transfer units addressed by a tail (write)
// pointer and a head (read) pointer, as in the document's FIFO. EMPTY is
// HEAD == TAIL and AFULL is HEAD == TAIL + 1, so one slot always stays unused
// and the buffer holds DEPTH-1 units. AFULL is the switch port's STOP_OUT.
//
// Interface and timing: the document clocks the queue with separate WCLK and
// RCLK pulses; here both are enables sampled on the rising edge of the one
// switch clock. `wclk` writes `din` at the tail; `rclk` drops the head unit.
// The head unit is always visible on `dout` (first-word fall-through), which
// is what the control unit examines before it reads. A write while AFULL and
// a read while EMPTY are ignored. `rst` clears both pointers asynchronously.
module xbar_fifo
  import earth_net_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  wclk,
  input  logic  rclk,
  input  unit_t din,
  output unit_t dout,
  output logic  afull,
  output logic  empty
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;

  unit_t mem [DEPTH];
  ptr_t  head, tail;
  ptr_t  tail_plus1, head_plus1;

  always_comb begin
    tail_plus1 = (tail == ptr_t'(DEPTH-1)) ? '0 : tail + 1'b1;
    head_plus1 = (head == ptr_t'(DEPTH-1)) ? '0 : head + 1'b1;
  end

  assign empty = (head == tail);
  assign afull = (head == tail_plus1);
  assign dout  = mem[head];

  always_ff @(posedge clk) begin
    if (wclk && !afull) mem[tail] <= din;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      head <= '0;
      tail <= '0;
    end else begin
      if (wclk && !afull) tail <= tail_plus1;
      if (rclk && !empty) head <= head_plus1;
    end
  end

endmodule

// line_fifo: fixed-length pixel delay line used inside the 3x3 window buffer.
//
// One "logical FIFO" of DEPTH words built on a RAM with a single rotating
// pointer. An occupancy counter counts the words written; when it reaches
// DEPTH the FIFO is full and from then on every shift writes one word at the
// top and hands out the oldest word at the bottom in the same clock, so the
// block becomes a delay of exactly DEPTH shifts. While it is still filling,
// dout reads as zero.
//
// The fill counter, the full flag and the shift-in/shift-out-per-clock
// behaviour follow the design (a 317-word FIFO for a 320-pixel line). Using
// one pointer for read and write, with the read taken before the write, is
// this design's choice.
//
// Interface: shift moves din in and dout out. dout is combinational from the
// RAM and shows the word that leaves on the next shift.
module line_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 317,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;
  logic [CW-1:0]    count;

  assign full = (count == CW'(DEPTH));
  assign dout = full ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (shift) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr   <= '0;
      count <= '0;
    end else if (shift) begin
      ptr <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
      if (!full) count <= count + 1'b1;
    end
  end

  // Once full, the FIFO stays full: it only ever becomes a fixed delay.
  a_full_sticky: assert property (@(posedge clk) disable iff (!rst_n) full |=> full);
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule

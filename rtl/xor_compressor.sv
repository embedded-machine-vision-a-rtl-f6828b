// xor_compressor: difference coding of a pixel stream with exclusive OR.
//
// Neighbouring pixels of natural images differ little, so the XOR of a pixel
// with its predecessor, e(n) = s(n) ^ s(n-1), has mostly zero upper bits and
// can be stored in fewer bits than the pixel. The first pixel of a frame is
// passed through unchanged (the predecessor register is cleared by in_first),
// so the frame can be rebuilt by xor_decompressor.
//
// The XOR coder, its delay register and the first-pixel rule follow the
// design; that the chain restarts at every frame start is this design's
// reading of "only the first pixel of the image is stored as is".
//
// Interface: in_valid qualifies in_pix; in_first marks the first pixel of a
// frame. Timing: out_valid/out_e follow the input by one clock; one pixel per
// clock is accepted.
module xor_compressor
  import vision_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  pixel_t in_pix,
  output logic   out_valid,
  output logic   out_first,
  output pixel_t out_e
);

  pixel_t prev;   // s(n-1)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      out_e     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_first <= in_first;
        out_e     <= in_pix ^ (in_first ? '0 : prev);
        prev      <= in_pix;
      end
    end
  end

endmodule

// xor_decompressor: rebuilds pixels from XOR difference codes.
//
// Inverse of xor_compressor: s'(n) = e(n) ^ s'(n-1), with the register that
// holds s'(n-1) fed back from the output and cleared at the first code of a
// frame (in_first), so the first code is the first pixel itself. Because
// x ^ x = 0, the output equals the original pixel exactly.
//
// The XOR with a feedback delay follows the design; the in_first clear is this
// design's choice, matching the compressor.
//
// Timing: out_valid/out_pix follow in_valid by one clock; one code per clock.
module xor_decompressor
  import vision_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_first,
  input  pixel_t in_e,
  output logic   out_valid,
  output pixel_t out_pix
);

  pixel_t prev;   // s'(n-1)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_pix <= in_e ^ (in_first ? '0 : prev);
        prev    <= in_e ^ (in_first ? '0 : prev);
      end
    end
  end

endmodule

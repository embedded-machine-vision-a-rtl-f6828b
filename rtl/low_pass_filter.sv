// low_pass_filter: 3x3 neighbourhood average that smooths sensor noise before
// edge detection.
//
// The mask is all ones; the ideal scale factor 1/9 is replaced by 1/8, a
// three-bit right shift, so no multiplier or divider is needed. Both choices
// follow the design. The nine pixels are summed in a 12-bit adder tree; the
// quotient can reach 286 (nine pixels of 255), so it is clamped to 255. The
// clamp is this design's choice.
//
// With en low the filter is bypassed and the newest window pixel (w33) is
// passed on instead, so the edge detector sees the raw image.
//
// Interface: one window per clock on in_strobe (in_valid says the window lies
// inside the frame). The output pixel, its strobe, frame-start flag and tag
// (out_tag: this output is a real filtered pixel) appear one clock later.
module low_pass_filter
  import vision_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    in_strobe,
  input  logic    in_sof,
  input  logic    in_valid,
  input  window_t win,
  output logic    out_strobe,
  output logic    out_sof,
  output logic    out_tag,
  output pixel_t  out_pix
);

  logic [11:0] sum;
  logic [8:0]  avg;   // sum / 8, up to 286
  pixel_t      smooth;

  always_comb begin
    sum = 12'(win.w11) + 12'(win.w12) + 12'(win.w13)
        + 12'(win.w21) + 12'(win.w22) + 12'(win.w23)
        + 12'(win.w31) + 12'(win.w32) + 12'(win.w33);
    avg    = sum[11:3];
    smooth = avg[8] ? 8'hFF : avg[7:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_strobe <= 1'b0;
      out_sof    <= 1'b0;
      out_tag    <= 1'b0;
      out_pix    <= '0;
    end else begin
      out_strobe <= in_strobe;
      out_sof    <= in_strobe & in_sof;
      if (in_strobe) begin
        out_tag <= en ? in_valid : 1'b1;
        out_pix <= en ? smooth : win.w33;
      end
    end
  end

endmodule

// image_acquisition: front end for an OV7620-style CMOS sensor video port.
//
// The sensor delivers one pixel per rising edge of its pixel clock PCLK while
// HREF is high; VSYN marks a new frame. This block turns that port into an
// internal pixel stream in the system clock domain: a one-cycle strobe
// (pclk_valid) per valid pixel, the pixel's greyscale value (y_valid, the Y
// byte; the chroma byte on UV is dropped, so UV is an input that is not used),
// and the pixel's column and row (col_cnt, row_cnt, counted from 0). sof marks
// the first pixel after VSYN.
//
// The port names and the greyscale-only output follow the acquisition block
// of the design. How it works is this design's own choice: the system clock
// is assumed to come from the same oscillator as the sensor and to run at
// least twice as fast as PCLK, so PCLK is sampled like a data signal and its
// rising edge detected (no gated clock). Y, HREF and VSYN are registered in
// the same cycle as PCLK, so the pixel taken is the one present when PCLK
// was seen high. A rising VSYN clears the counters; a falling HREF ends a row.
//
// Timing: pclk_valid and the outputs that go with it appear two system
// clocks after PCLK rises at the pins.
module image_acquisition #(
  parameter int unsigned COL_W = 11,
  parameter int unsigned ROW_W = 11
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             pclk,
  input  logic             vsyn,
  input  logic             href,
  input  logic [7:0]       y,
  input  logic [7:0]       uv,
  output logic             pclk_valid,
  output logic [7:0]       y_valid,
  output logic [COL_W-1:0] col_cnt,
  output logic [ROW_W-1:0] row_cnt,
  output logic             sof
);

  logic             pclk_q, pclk_qq, href_q, href_qq, vsyn_q, vsyn_qq;
  logic [7:0]       y_q;
  logic [COL_W-1:0] col;
  logic [ROW_W-1:0] row;
  logic             in_row, frame_pending;

  logic pix_edge, vsyn_rise, href_fall;
  logic [COL_W-1:0] col_eff;
  logic [ROW_W-1:0] row_eff;
  logic             pending_eff;

  assign pix_edge  = pclk_q & ~pclk_qq & href_q;
  assign vsyn_rise = vsyn_q & ~vsyn_qq;
  assign href_fall = href_qq & ~href_q;

  // A VSYN edge that coincides with a pixel restarts the frame at that pixel.
  always_comb begin
    col_eff     = vsyn_rise ? '0 : col;
    row_eff     = vsyn_rise ? '0 : row;
    pending_eff = vsyn_rise | frame_pending;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pclk_q <= 1'b0; pclk_qq <= 1'b0;
      href_q <= 1'b0; href_qq <= 1'b0;
      vsyn_q <= 1'b0; vsyn_qq <= 1'b0;
      y_q    <= '0;
    end else begin
      pclk_q <= pclk;   pclk_qq <= pclk_q;
      href_q <= href;   href_qq <= href_q;
      vsyn_q <= vsyn;   vsyn_qq <= vsyn_q;
      y_q    <= y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col           <= '0;
      row           <= '0;
      in_row        <= 1'b0;
      frame_pending <= 1'b0;
      pclk_valid    <= 1'b0;
      y_valid       <= '0;
      col_cnt       <= '0;
      row_cnt       <= '0;
      sof           <= 1'b0;
    end else begin
      pclk_valid <= pix_edge;
      sof        <= pix_edge & pending_eff;
      if (pix_edge) begin
        y_valid       <= y_q;
        col_cnt       <= col_eff;
        row_cnt       <= row_eff;
        col           <= col_eff + 1'b1;
        row           <= row_eff;
        in_row        <= 1'b1;
        frame_pending <= 1'b0;
      end else if (vsyn_rise) begin
        col           <= '0;
        row           <= '0;
        in_row        <= 1'b0;
        frame_pending <= 1'b1;
      end else if (href_fall && in_row) begin
        col    <= '0;
        row    <= row + 1'b1;
        in_row <= 1'b0;
      end
    end
  end

endmodule

// vision_top: single-clock streaming edge detector for a CMOS camera.
//
// Every pixel the sensor delivers is processed as it arrives, one pixel per
// clock, with no frame store in the processing path:
//
//   sensor port -> image_acquisition -> image_buffer (3x3 window)
//     -> low_pass_filter (1/8 box filter, can be bypassed)
//     -> image_buffer (3x3 window of the smoothed image)
//     -> edge_detector (|Gx| + |Gy| >= threshold)
//
// The acquired greyscale stream is also thresholded on its own (seg_pix),
// which segments the image into foreground and background. Beside that, it is XOR difference coded
// (xor_compressor), written to a frame-sized compressed_memory at consecutive
// addresses from the start of each frame, and can be read back through the
// cmp_rd_* port and rebuilt by xor_decompressor.
//
// The stage order (acquisition, buffering, low-pass, edge detection,
// thresholding), the greyscale segmentation, the compression path and the 320-pixel line length follow
// the design. The second window buffer after the low-pass filter, the
// validity tags, the bypass input and the memory addressing are this design's
// choices.
//
// Timing: a binary edge pixel leaves four clocks after the acquisition strobe
// of the pixel that completes its window. With the filter on, the edge pixel
// on the strobe of the pixel at (col, row) belongs to the image position
// (col-2, row-2) and is valid for col >= 4 and row >= 4; with it bypassed it
// belongs to (col-1, row-1) and is valid for col >= 2 and row >= 2. Change
// lpf_en only between frames.
module vision_top
  import vision_pkg::*;
#(
  parameter int unsigned IMG_WIDTH  = 320,
  parameter int unsigned IMG_HEIGHT = 240,
  localparam int unsigned MEM_DEPTH = IMG_WIDTH * IMG_HEIGHT,
  localparam int unsigned MAW       = $clog2(MEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // sensor video port
  input  logic              pclk,
  input  logic              vsyn,
  input  logic              href,
  input  logic [7:0]        y,
  input  logic [7:0]        uv,
  // control
  input  logic              lpf_en,
  input  logic [MAG_W-1:0]  threshold,
  input  pixel_t            seg_threshold,
  // acquired greyscale stream
  output logic              pix_valid,
  output pixel_t            pix_y,
  output logic [10:0]       pix_col,
  output logic [10:0]       pix_row,
  output logic              pix_sof,
  output logic              seg_pix,
  // smoothed stream (or raw stream when bypassed)
  output logic              lpf_strobe,
  output logic              lpf_tag,
  output pixel_t            lpf_pix,
  // edge output
  output logic              edge_strobe,
  output logic              edge_sof,
  output logic              edge_valid,
  output logic              edge_pix,
  output logic [MAG_W-1:0]  edge_mag,
  output logic [ABS_W-1:0]  gx_abs,
  output logic [ABS_W-1:0]  gy_abs,
  // compressed frame store
  output logic              cmp_wr_en,
  output logic [MAW-1:0]    cmp_wr_addr,
  input  logic              cmp_rd_en,
  input  logic              cmp_rd_first,
  input  logic [MAW-1:0]    cmp_rd_addr,
  output logic              dec_valid,
  output pixel_t            dec_pix
);

  // ---------------- acquisition ----------------
  image_acquisition #(.COL_W(11), .ROW_W(11)) u_acq (
    .clk, .rst_n, .pclk, .vsyn, .href, .y, .uv,
    .pclk_valid(pix_valid), .y_valid(pix_y),
    .col_cnt(pix_col), .row_cnt(pix_row), .sof(pix_sof)
  );

  // Segmentation of the greyscale image itself: one comparison per pixel,
  // valid with pix_valid.
  threshold_unit #(.W(PIX_W)) u_seg (
    .value(pix_y), .threshold(seg_threshold), .bin(seg_pix)
  );

  // ---------------- window of the raw image ----------------
  window_t win1;
  logic    win1_strobe, win1_sof, win1_valid;

  image_buffer #(.IMG_WIDTH(IMG_WIDTH)) u_buf1 (
    .clk, .rst_n,
    .pix_valid(pix_valid), .pix_sof(pix_sof), .pix_tag(1'b1), .pix_in(pix_y),
    .win(win1), .win_strobe(win1_strobe), .win_sof(win1_sof), .win_valid(win1_valid)
  );

  // ---------------- low-pass filter ----------------
  logic lpf_sof;

  low_pass_filter u_lpf (
    .clk, .rst_n, .en(lpf_en),
    .in_strobe(win1_strobe), .in_sof(win1_sof), .in_valid(win1_valid), .win(win1),
    .out_strobe(lpf_strobe), .out_sof(lpf_sof), .out_tag(lpf_tag), .out_pix(lpf_pix)
  );

  // ---------------- window of the smoothed image ----------------
  window_t win2;
  logic    win2_strobe, win2_sof, win2_valid;

  image_buffer #(.IMG_WIDTH(IMG_WIDTH)) u_buf2 (
    .clk, .rst_n,
    .pix_valid(lpf_strobe), .pix_sof(lpf_sof), .pix_tag(lpf_tag), .pix_in(lpf_pix),
    .win(win2), .win_strobe(win2_strobe), .win_sof(win2_sof), .win_valid(win2_valid)
  );

  // ---------------- Sobel edge detection and thresholding ----------------
  edge_detector u_edge (
    .clk, .rst_n,
    .in_strobe(win2_strobe), .in_sof(win2_sof), .in_valid(win2_valid), .win(win2),
    .threshold,
    .out_strobe(edge_strobe), .out_sof(edge_sof), .out_valid(edge_valid),
    .gx_abs, .gy_abs, .mag(edge_mag), .edge_pix
  );

  // ---------------- compression path ----------------
  logic   e_valid, e_first;
  pixel_t e_code;

  xor_compressor u_cmp (
    .clk, .rst_n,
    .in_valid(pix_valid), .in_first(pix_sof), .in_pix(pix_y),
    .out_valid(e_valid), .out_first(e_first), .out_e(e_code)
  );

  // Write address: 0 for the first code of a frame, then consecutive,
  // wrapping at the end of the memory.
  logic [MAW-1:0] wr_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_next <= '0;
    else if (e_valid)
      wr_next <= e_first ? MAW'(1)
               : (cmp_wr_addr == MAW'(MEM_DEPTH - 1)) ? '0 : cmp_wr_addr + 1'b1;
  end

  assign cmp_wr_en   = e_valid;
  assign cmp_wr_addr = e_first ? '0 : wr_next;

  pixel_t rd_code;
  logic   rd_valid, rd_first;

  compressed_memory #(.WIDTH(PIX_W), .DEPTH(MEM_DEPTH)) u_mem (
    .clk,
    .we(cmp_wr_en), .waddr(cmp_wr_addr), .wdata(e_code),
    .re(cmp_rd_en), .raddr(cmp_rd_addr), .rdata(rd_code)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
    end else begin
      rd_valid <= cmp_rd_en;
      rd_first <= cmp_rd_first;
    end
  end

  xor_decompressor u_dec (
    .clk, .rst_n,
    .in_valid(rd_valid), .in_first(rd_first), .in_e(rd_code),
    .out_valid(dec_valid), .out_pix(dec_pix)
  );

endmodule

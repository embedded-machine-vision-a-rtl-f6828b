// tb_vision_top: end-to-end test of the whole pipeline at its default size
// (320 x 240 pixels), fed by the camera model.
//
// Frame 0 runs with the low-pass filter on, frame 1 with it bypassed. Every
// edge strobe is checked against a reference computed here from the test
// image: the smoothed image L = min(255, (3x3 sum) >> 3), the Sobel
// gradients of the 3x3 neighbourhood (of L, or of the raw image when
// bypassed), |Gx| + |Gy| and the threshold decision, together with the
// border rule for edge_valid. The smoothed stream is checked pixel by pixel.
// The latency from the acquisition strobe to the edge strobe must be four
// clocks, one edge output per input pixel. After frame 1 the compressed
// frame is read back through the decompressor and compared with the image.
// Each mechanism (filter on, filter bypassed, clamping in the filter, edge
// and non-edge decisions, border windows, negative gradients, compressed
// read-back, foreground and background in the greyscale segmentation)
// must occur at least once; the segmentation bit is checked on every pixel.
module tb_vision_top;
  import vision_pkg::*;
  import tb_image_pkg::*;
  localparam int W = 320, H = 240;
  localparam int MAW = $clog2(W * H);
  localparam int THR = 200;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy;
  int frame = 0;
  logic pclk, vsyn, href;
  logic [7:0] y, uv;
  logic lpf_en;
  logic [MAG_W-1:0] threshold = 12'(THR);
  pixel_t seg_threshold = 8'd128;
  logic seg_pix;
  logic pix_valid, pix_sof;
  pixel_t pix_y;
  logic [10:0] pix_col, pix_row;
  logic lpf_strobe, lpf_tag;
  pixel_t lpf_pix;
  logic edge_strobe, edge_sof, edge_valid, edge_pix;
  logic [MAG_W-1:0] edge_mag;
  logic [ABS_W-1:0] gx_abs, gy_abs;
  logic cmp_wr_en, cmp_rd_en = 0, cmp_rd_first = 0;
  logic [MAW-1:0] cmp_wr_addr, cmp_rd_addr = '0;
  logic dec_valid;
  pixel_t dec_pix;

  int checks = 0, failures = 0;
  int n_lpf_frames = 0, n_bypass_frames = 0, n_clamp = 0, n_edge = 0, n_nonedge = 0;
  int n_border = 0, n_neg = 0, n_readback = 0, n_fg = 0, n_bg = 0;

  ov7620_model #(.WIDTH(W), .HEIGHT(H)) cam (
    .clk, .start, .frame, .pclk, .vsyn, .href, .y, .uv, .busy);

  vision_top dut (
    .clk, .rst_n, .pclk, .vsyn, .href, .y, .uv, .lpf_en, .threshold, .seg_threshold,
    .pix_valid, .pix_y, .pix_col, .pix_row, .pix_sof, .seg_pix,
    .lpf_strobe, .lpf_tag, .lpf_pix,
    .edge_strobe, .edge_sof, .edge_valid, .edge_pix, .edge_mag, .gx_abs, .gy_abs,
    .cmp_wr_en, .cmp_wr_addr, .cmp_rd_en, .cmp_rd_first, .cmp_rd_addr, .dec_valid, .dec_pix);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 2000000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---------------- reference images ----------------
  int raw [H][W];
  int lp  [H][W];   // smoothed, centre at (x, y); borders unused

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

  task automatic build_ref(input int f);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) raw[yy][xx] = img_pixel(f, xx, yy);
    for (int yy = 1; yy < H - 1; yy++)
      for (int xx = 1; xx < W - 1; xx++) begin
        int s = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) s += raw[yy+dy][xx+dx];
        lp[yy][xx] = (s / 8 > 255) ? 255 : s / 8;
      end
  endtask

  // ---------------- monitors ----------------
  bit cur_lpf;
  int n_pix = 0, n_lpfo = 0, n_edgeo = 0;
  int pix_time[$];

  always @(negedge clk) if (rst_n) begin
    if (pix_valid) begin
      pix_time.push_back(cyc);
      chk(int'(pix_col) == n_pix % W && int'(pix_row) == n_pix / W, "acquisition position");
      chk(seg_pix == (raw[n_pix / W][n_pix % W] >= int'(seg_threshold)), "segmentation");
      if (seg_pix) n_fg++; else n_bg++;
      n_pix++;
    end
    if (lpf_strobe) begin
      automatic int i = n_lpfo % W, j = n_lpfo / W;
      if (cur_lpf) begin
        chk(lpf_tag == (i >= 2 && j >= 2), "smoothed tag");
        if (i >= 2 && j >= 2) begin
          automatic int s = 0;
          for (int dy = -2; dy <= 0; dy++)
            for (int dx = -2; dx <= 0; dx++) s += raw[j+dy][i+dx];
          if (s / 8 > 255) n_clamp++;
          chk(int'(lpf_pix) == lp[j-1][i-1], $sformatf("smoothed pixel at %0d,%0d", i, j));
        end
      end else begin
        chk(lpf_tag && int'(lpf_pix) == raw[j][i], "bypassed pixel");
      end
      n_lpfo++;
    end
    if (edge_strobe) begin
      automatic int i = n_edgeo % W, j = n_edgeo / W;
      automatic int lag = (pix_time.size() > 0) ? cyc - pix_time.pop_front() : -1;
      bit ev;
      chk(lag == 4, $sformatf("latency %0d", lag));
      chk(edge_sof == (n_edgeo == 0), "edge sof");
      ev = cur_lpf ? (i >= 4 && j >= 4) : (i >= 2 && j >= 2);
      chk(edge_valid == ev, $sformatf("edge valid at %0d,%0d", i, j));
      if (!ev) begin
        n_border++;
        chk(edge_pix == 1'b0, "no edge on border window");
      end else begin
        int w[3][3];
        int gx, gy, m;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            w[r][c] = cur_lpf ? lp[j-3+r][i-3+c] : raw[j-2+r][i-2+c];
        // masks: Gx = [-1 0 1; -2 0 2; -1 0 1], Gy = [-1 -2 -1; 0 0 0; 1 2 1]
        gx = -w[0][0] + w[0][2] - 2*w[1][0] + 2*w[1][2] - w[2][0] + w[2][2];
        gy = -w[0][0] - 2*w[0][1] - w[0][2] + w[2][0] + 2*w[2][1] + w[2][2];
        m  = iabs(gx) + iabs(gy);
        if (gx < 0 || gy < 0) n_neg++;
        chk(int'(gx_abs) == iabs(gx) && int'(gy_abs) == iabs(gy),
            $sformatf("gradients at %0d,%0d: %0d %0d vs %0d %0d", i, j, gx_abs, gy_abs, iabs(gx), iabs(gy)));
        chk(int'(edge_mag) == m, "magnitude");
        chk(edge_pix == (m >= THR), "edge decision");
        if (edge_pix) n_edge++; else n_nonedge++;
      end
      n_edgeo++;
    end
  end

  // ---------------- stimulus ----------------
  task automatic run_frame(input int f, input bit use_lpf);
    build_ref(f);
    @(negedge clk);
    lpf_en = use_lpf; cur_lpf = use_lpf; frame = f;
    n_pix = 0; n_lpfo = 0; n_edgeo = 0;
    start = 1;
    @(negedge clk); start = 0;
    wait (busy == 1'b1);
    wait (busy == 1'b0);
    repeat (20) @(posedge clk);
    chk(n_pix == W * H, $sformatf("pixels acquired %0d", n_pix));
    chk(n_edgeo == W * H, $sformatf("edge outputs %0d", n_edgeo));
    if (use_lpf) n_lpf_frames++; else n_bypass_frames++;
  endtask

  initial begin
    lpf_en = 1;
    repeat (4) @(posedge clk);
    rst_n = 1;
    run_frame(0, 1'b1);
    run_frame(1, 1'b0);

    // read the compressed copy of frame 1 back through the decompressor
    fork
      begin
        for (int a = 0; a < W * H; a++) begin
          @(negedge clk);
          cmp_rd_en = 1; cmp_rd_first = (a == 0); cmp_rd_addr = MAW'(a);
        end
        @(negedge clk); cmp_rd_en = 0; cmp_rd_first = 0;
      end
      begin
        automatic int a = 0;
        while (a < W * H) begin
          @(negedge clk);
          if (dec_valid) begin
            chk(dec_pix == img_pixel(1, a % W, a / W), $sformatf("decompressed pixel %0d", a));
            a++;
            n_readback++;
          end
        end
      end
    join

    chk(n_lpf_frames > 0,    "mechanism: low-pass filter on");
    chk(n_bypass_frames > 0, "mechanism: low-pass filter bypassed");
    chk(n_clamp > 0,         "mechanism: filter clamp");
    chk(n_edge > 0,          "mechanism: edge pixel");
    chk(n_nonedge > 0,       "mechanism: non-edge pixel");
    chk(n_border > 0,        "mechanism: border window");
    chk(n_neg > 0,           "mechanism: negative gradient");
    chk(n_readback == W * H, "mechanism: compressed read-back");
    chk(n_fg > 0 && n_bg > 0, "mechanism: segmentation foreground and background");
    $display("mechanisms: lpf_frames=%0d bypass_frames=%0d clamp=%0d edge=%0d nonedge=%0d border=%0d neg=%0d readback=%0d fg=%0d bg=%0d",
             n_lpf_frames, n_bypass_frames, n_clamp, n_edge, n_nonedge, n_border, n_neg, n_readback, n_fg, n_bg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

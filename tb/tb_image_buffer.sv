// tb_image_buffer: streams two frames of random pixels (320 wide, 6 lines)
// through the window buffer, with random idle cycles and random tags, and
// checks every window: the nine pixels must be the 3x3 neighbourhood whose
// newest pixel was just shifted in, and win_valid must be set exactly when the
// neighbourhood lies inside the frame and all nine tags are set.
module tb_image_buffer;
  import vision_pkg::*;
  localparam int W = 320, H = 6;

  logic clk = 0, rst_n = 0;
  logic pix_valid, pix_sof, pix_tag;
  pixel_t pix_in;
  window_t win;
  logic win_strobe, win_sof, win_valid;
  int checks = 0, failures = 0, n_valid = 0, n_invalid = 0;

  pixel_t img [H][W];
  bit     tag [H][W];

  image_buffer #(.IMG_WIDTH(W)) dut (.clk, .rst_n, .pix_valid, .pix_sof, .pix_tag, .pix_in,
                                     .win, .win_strobe, .win_sof, .win_valid);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // checker: one window per shift, one clock after it, in shift order
  int qx[$], qy[$];
  int n_strobes = 0, n_shifts = 0;
  always @(negedge clk) if (rst_n) begin
    if (win_strobe) begin
      int wx, wy;
      bit ok_in, all_t;
      n_strobes++;
      chk(qx.size() > 0, "window without a shift");
      wx = qx.pop_front(); wy = qy.pop_front();
      ok_in = (wx >= 2 && wy >= 2);
      all_t = 1;
      chk(win_sof == (wx == 0 && wy == 0), "sof");
      chk(win.w33 == img[wy][wx], "w33 newest");
      if (ok_in) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++) all_t &= tag[wy-2+r][wx-2+c];
        chk(win.w11 == img[wy-2][wx-2] && win.w12 == img[wy-2][wx-1] && win.w13 == img[wy-2][wx] &&
            win.w21 == img[wy-1][wx-2] && win.w22 == img[wy-1][wx-1] && win.w23 == img[wy-1][wx] &&
            win.w31 == img[wy][wx-2]   && win.w32 == img[wy][wx-1],
            $sformatf("window at %0d,%0d", wx, wy));
      end
      chk(win_valid == (ok_in && all_t), $sformatf("valid at %0d,%0d", wx, wy));
      if (win_valid) n_valid++; else n_invalid++;
    end
  end

  initial begin
    pix_valid = 0; pix_sof = 0; pix_tag = 0; pix_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int yy = 0; yy < H; yy++)
        for (int xx = 0; xx < W; xx++) begin
          img[yy][xx] = 8'($urandom);
          tag[yy][xx] = (f == 0) ? 1'b1 : ($urandom_range(30) != 0);
        end
      for (int yy = 0; yy < H; yy++)
        for (int xx = 0; xx < W; xx++) begin
          while ($urandom_range(4) == 0) begin
            @(posedge clk); #1 pix_valid = 0;
          end
          @(posedge clk); #1;
          pix_valid = 1; pix_sof = (xx == 0 && yy == 0);
          pix_in = img[yy][xx]; pix_tag = tag[yy][xx];
          qx.push_back(xx); qy.push_back(yy); n_shifts++;
        end
      @(posedge clk); #1 pix_valid = 0;
      repeat (5) @(posedge clk);
    end
    chk(n_strobes == n_shifts, "one window per shift");
    chk(n_valid > 0 && n_invalid > 0, "valid and border windows seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_low_pass_filter: checks the 1/8 box filter (sum of nine pixels shifted
// right by three, clamped to 255) on random and saturating windows, the
// bypass path (en low passes w33 on with tag 1), and one-clock latency at one
// window per clock.
module tb_low_pass_filter;
  import vision_pkg::*;

  logic clk = 0, rst_n = 0;
  logic en, in_strobe, in_sof, in_valid;
  window_t win;
  logic out_strobe, out_sof, out_tag;
  pixel_t out_pix;
  int checks = 0, failures = 0, n_sat = 0, n_bypass = 0;

  low_pass_filter dut (.clk, .rst_n, .en, .in_strobe, .in_sof, .in_valid, .win,
                       .out_strobe, .out_sof, .out_tag, .out_pix);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int e_pix, e_tag, e_strobe, e_sof;

  initial begin
    en = 1; in_strobe = 0; in_sof = 0; in_valid = 0; win = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    e_strobe = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      chk(out_strobe == e_strobe[0], "strobe");
      chk(out_sof == e_sof[0], "sof");
      if (e_strobe) begin
        chk(int'(out_pix) == e_pix, $sformatf("pix %0d vs %0d", out_pix, e_pix));
        chk(out_tag == e_tag[0], "tag");
      end
      en        = (k / 500) % 4 != 3;
      in_strobe = (k % 37) != 36;
      in_sof    = (k % 300) == 0;
      in_valid  = $urandom_range(7) != 0;
      if (k % 5 == 0)      win = window_t'({$urandom | 32'hE0E0E0E0, $urandom | 32'hE0E0E0E0,
                                            8'hF0 | 8'($urandom)});
      else                 win = window_t'({$urandom, $urandom, 8'($urandom)});
      begin
        automatic int s = int'(win.w11) + int'(win.w12) + int'(win.w13) + int'(win.w21)
              + int'(win.w22) + int'(win.w23) + int'(win.w31) + int'(win.w32) + int'(win.w33);
        if (en) begin
          e_pix = (s / 8 > 255) ? 255 : s / 8;
          e_tag = in_valid;
          if (in_strobe && s / 8 > 255) n_sat++;
        end else begin
          e_pix = win.w33;
          e_tag = 1;
          if (in_strobe) n_bypass++;
        end
      end
      e_strobe = in_strobe; e_sof = in_strobe & in_sof;
    end
    chk(n_sat > 0, "saturation exercised");
    chk(n_bypass > 0, "bypass exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

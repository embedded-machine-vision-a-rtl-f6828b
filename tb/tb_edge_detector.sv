// tb_edge_detector: drives one random 3x3 window per clock and checks, one
// clock later, |Gx|, |Gy|, their sum and the binary edge pixel against the
// Sobel masks computed in integers (Gx: columns, Gy: rows; w11 oldest).
// Also checks that a window is accepted every clock (throughput 1 pixel per
// clock, latency 1 clock) and that invalid windows give no edge.
module tb_edge_detector;
  import vision_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_strobe, in_sof, in_valid;
  window_t win;
  logic [MAG_W-1:0] threshold;
  logic out_strobe, out_sof, out_valid, edge_pix;
  logic [ABS_W-1:0] gx_abs, gy_abs;
  logic [MAG_W-1:0] mag;
  int checks = 0, failures = 0, n_edges = 0, n_nonedges = 0;

  edge_detector dut (.clk, .rst_n, .in_strobe, .in_sof, .in_valid, .win, .threshold,
                     .out_strobe, .out_sof, .out_valid, .gx_abs, .gy_abs, .mag, .edge_pix);

  always #5 clk = ~clk;

  function automatic int iabs(int v); return v < 0 ? -v : v; endfunction

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

  // expected results of the window presented in the previous cycle
  int e_gx, e_gy, e_valid, e_strobe, e_sof, e_thr;

  initial begin
    in_strobe = 0; in_sof = 0; in_valid = 0; win = '0; threshold = 12'd200;
    repeat (3) @(posedge clk);
    rst_n = 1;
    e_strobe = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      // check the result of the window sent last cycle
      chk(out_strobe == e_strobe, "strobe");
      if (e_strobe) begin
        chk(int'(gx_abs) == iabs(e_gx), $sformatf("gx %0d vs %0d", gx_abs, iabs(e_gx)));
        chk(int'(gy_abs) == iabs(e_gy), $sformatf("gy %0d vs %0d", gy_abs, iabs(e_gy)));
        chk(int'(mag) == iabs(e_gx) + iabs(e_gy), "mag");
        chk(out_valid == e_valid[0], "valid");
        chk(out_sof == e_sof[0], "sof");
        chk(edge_pix == (e_valid != 0 && iabs(e_gx) + iabs(e_gy) >= e_thr), "edge");
        if (edge_pix) n_edges++; else n_nonedges++;
      end
      // new window, every clock except a few idle cycles
      in_strobe = (k % 50) != 49;
      in_sof    = (k % 500) == 0;
      in_valid  = ($urandom_range(9) != 0);
      threshold = (k < 2000) ? 12'd200 : 12'($urandom_range(1200));
      if (k % 7 == 0) begin
        // strong edges: flat halves
        automatic int lo = $urandom_range(40), hi = 200 + $urandom_range(55);
        win = '{w11: 8'(lo), w12: 8'(lo), w13: 8'(hi), w21: 8'(lo), w22: 8'(lo),
                w23: 8'(hi), w31: 8'(lo), w32: 8'(lo), w33: 8'(hi)};
        if (k % 14 == 0) win = '{w11: 8'(hi), w12: 8'(hi), w13: 8'(hi), w21: 8'(hi),
                w22: 8'(hi), w23: 8'(hi), w31: 8'(lo), w32: 8'(lo), w33: 8'(lo)};
      end else begin
        win = window_t'({$urandom, $urandom, $urandom});
      end
      e_gx = (int'(win.w13) - int'(win.w11)) + 2 * (int'(win.w23) - int'(win.w21))
           + (int'(win.w33) - int'(win.w31));
      e_gy = (int'(win.w31) - int'(win.w11)) + 2 * (int'(win.w32) - int'(win.w12))
           + (int'(win.w33) - int'(win.w13));
      e_valid = in_valid; e_strobe = in_strobe; e_sof = in_strobe & in_sof;
      e_thr = threshold;
    end
    chk(n_edges > 0 && n_nonedges > 0, "both edge and non-edge outputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vision_resolutions: runs the whole pipeline at the two larger image
// sizes evaluated for this design, VGA (640 x 480) and SXGA (1280 x 1024),
// one after the other, each built with line FIFOs of width - 3 words and
// checked end to end by vision_harness (filter on and bypassed, compressed
// read-back, every output against the reference model).
module tb_vision_resolutions;
  logic go_vga = 0, go_sxga = 0;
  logic done_vga, done_sxga;
  int   c_vga, f_vga, c_sxga, f_sxga;
  int   checks, failures;

  vision_harness #(.W(640),  .H(480))  u_vga  (.go(go_vga),  .done(done_vga),
                                                .checks(c_vga),  .failures(f_vga));
  vision_harness #(.W(1280), .H(1024)) u_sxga (.go(go_sxga), .done(done_sxga),
                                                .checks(c_sxga), .failures(f_sxga));

  initial begin
    #200ms;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_vga + c_sxga, f_vga + f_sxga + 1);
    $finish;
  end

  initial begin
    #1 go_vga = 1;
    wait (done_vga);
    go_sxga = 1;
    wait (done_sxga);
    checks   = c_vga + c_sxga;
    failures = f_vga + f_sxga;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

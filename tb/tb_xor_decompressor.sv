// tb_xor_decompressor: builds XOR codes of random frames in the testbench
// (first pixel as is, then pixel ^ previous pixel), feeds them with idle
// cycles and checks that the original pixels come back one clock later.
module tb_xor_decompressor;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, out_valid;
  pixel_t in_e, out_pix;
  int checks = 0, failures = 0;

  xor_decompressor dut (.clk, .rst_n, .in_valid, .in_first, .in_e, .out_valid, .out_pix);

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

  initial begin
    int prev = 0, e_valid = 0, e_pix = 0, pix;
    in_valid = 0; in_first = 0; in_e = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      chk(out_valid == e_valid[0], "valid");
      if (e_valid) chk(int'(out_pix) == e_pix, $sformatf("pixel %0h vs %0h", out_pix, e_pix));
      in_valid = $urandom_range(5) != 0;
      in_first = (k % 300) == 2;
      pix = $urandom_range(255);
      in_e = in_first ? 8'(pix) : 8'(pix ^ prev);
      e_valid = in_valid;
      if (in_valid) begin
        e_pix = pix;
        prev = pix;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

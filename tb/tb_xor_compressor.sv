// tb_xor_compressor: feeds frames of random pixels (with idle cycles) and
// checks every code: e = pixel for the first pixel of a frame, otherwise
// e = pixel ^ previous pixel, one clock after the input.
module tb_xor_compressor;
  import vision_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_first, out_valid, out_first;
  pixel_t in_pix, out_e;
  int checks = 0, failures = 0;

  xor_compressor dut (.clk, .rst_n, .in_valid, .in_first, .in_pix, .out_valid, .out_first, .out_e);

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
    int prev = 0, e_valid = 0, e_e = 0, e_first = 0;
    in_valid = 0; in_first = 0; in_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      chk(out_valid == e_valid[0], "valid");
      if (e_valid) begin
        chk(int'(out_e) == e_e, $sformatf("code %0h vs %0h", out_e, e_e));
        chk(out_first == e_first[0], "first");
      end
      in_valid = $urandom_range(5) != 0;
      in_first = (k % 400) == 1;
      // smooth signal with occasional jumps, like an image line
      in_pix = ($urandom_range(9) == 0) ? 8'($urandom) : 8'(prev + $urandom_range(6) - 3);
      e_valid = in_valid;
      if (in_valid) begin
        e_e = in_first ? in_pix : (in_pix ^ prev);
        e_first = in_first;
        prev = in_pix;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

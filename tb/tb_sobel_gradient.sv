// tb_sobel_gradient: checks one Sobel gradient unit against integer
// arithmetic, G = (a+ - a-) + 2(c+ - c-) + (b+ - b-) and |G|, over the
// extreme corners of the input range and random pixel sets.
module tb_sobel_gradient;
  import vision_pkg::*;

  pixel_t ap, an, cp, cn, bp, bn;
  logic signed [GRAD_W-1:0] g;
  logic [ABS_W-1:0] g_abs;
  int checks = 0, failures = 0;

  sobel_gradient dut (.a_pos(ap), .a_neg(an), .c_pos(cp), .c_neg(cn),
                      .b_pos(bp), .b_neg(bn), .g, .g_abs);

  task automatic apply(input int a0, a1, c0, c1, b0, b1);
    int exp_g, exp_abs;
    ap = 8'(a0); an = 8'(a1); cp = 8'(c0); cn = 8'(c1); bp = 8'(b0); bn = 8'(b1);
    #1;
    exp_g   = (a0 - a1) + 2 * (c0 - c1) + (b0 - b1);
    exp_abs = exp_g < 0 ? -exp_g : exp_g;
    checks += 2;
    if (int'(g) != exp_g) begin
      failures++; $display("FAIL g=%0d exp=%0d", g, exp_g);
    end
    if (int'(g_abs) != exp_abs) begin
      failures++; $display("FAIL |g|=%0d exp=%0d", g_abs, exp_abs);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(255, 0, 255, 0, 255, 0);     // +1020
    apply(0, 255, 0, 255, 0, 255);     // -1020
    apply(0, 0, 0, 0, 0, 0);
    apply(10, 20, 30, 25, 7, 200);
    for (int k = 0; k < 3000; k++)
      apply($urandom_range(255), $urandom_range(255), $urandom_range(255),
            $urandom_range(255), $urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

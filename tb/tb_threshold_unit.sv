// tb_threshold_unit: checks g = (f >= T) at the boundary and for random
// values.
module tb_threshold_unit;
  logic [11:0] value, threshold;
  logic bin;
  int checks = 0, failures = 0;

  threshold_unit #(.W(12)) dut (.value, .threshold, .bin);

  task automatic apply(input int v, t);
    value = 12'(v); threshold = 12'(t);
    #1;
    checks++;
    if (bin !== (v >= t)) begin
      failures++; $display("FAIL v=%0d t=%0d bin=%0b", v, t, bin);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(200, 200); apply(199, 200); apply(201, 200);
    apply(0, 0); apply(4095, 4095); apply(0, 4095);
    for (int k = 0; k < 2000; k++) apply($urandom_range(4095), $urandom_range(4095));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

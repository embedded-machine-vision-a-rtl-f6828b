// tb_line_fifo: shifts random words into the 317-word line FIFO with random
// idle cycles and checks that dout reads 0 while it fills, that full rises
// after exactly 317 shifts, and that from then on dout is the word shifted in
// 317 shifts earlier (a one-line delay).
module tb_line_fifo;
  localparam int DEPTH = 317;
  logic clk = 0, rst_n = 0, shift;
  logic [7:0] din, dout;
  logic full;
  int checks = 0, failures = 0;
  logic [7:0] hist[$];

  line_fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .rst_n, .shift, .din, .dout, .full);

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
    int n = 0;
    shift = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      // state before this cycle's shift
      chk(full == (n >= DEPTH), $sformatf("full after %0d shifts", n));
      if (n >= DEPTH) chk(dout == hist[hist.size() - DEPTH], "delayed word");
      else            chk(dout == 8'd0, "zero while filling");
      shift = ($urandom_range(3) != 0);
      din   = 8'($urandom);
      if (shift) begin hist.push_back(din); n++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

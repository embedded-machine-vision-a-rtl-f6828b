// tb_compressed_memory: writes random words to random addresses of the
// 76800-word memory, keeps a copy in an associative array, and checks every
// read (registered, one clock after re) against the copy, including reads in
// the same clock as a write to another address.
module tb_compressed_memory;
  localparam int DEPTH = 76800, AW = $clog2(DEPTH);
  logic clk = 0;
  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [int];

  compressed_memory #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

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
    int addrs[$];
    int pend = 0, exp_d = 0;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int k = 0; k < 6000; k++) begin
      @(negedge clk);
      if (pend) chk(int'(rdata) == exp_d, $sformatf("read %0h vs %0h", rdata, exp_d));
      pend = 0;
      we = ($urandom_range(1) == 0) || addrs.size() == 0;
      waddr = (k < 50) ? AW'(DEPTH - 1 - k) : AW'($urandom_range(DEPTH - 1));
      wdata = 8'($urandom);
      re = 0;
      if (addrs.size() > 0 && $urandom_range(1) == 0) begin
        automatic int a = addrs[$urandom_range(addrs.size() - 1)];
        if (!(we && int'(waddr) == a)) begin
          re = 1; raddr = AW'(a); pend = 1; exp_d = model[a];
        end
      end
      if (we) begin
        if (!model.exists(int'(waddr))) addrs.push_back(int'(waddr));
        model[int'(waddr)] = wdata;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_image_acquisition: drives the block from the camera model with small
// frames (24 x 5 pixels) and checks every pixel strobe: the Y value, column
// and row counters and the start-of-frame flag, the number of pixels per
// frame, and that the chroma bus never reaches the output.
module tb_image_acquisition;
  import tb_image_pkg::*;
  localparam int W = 24, H = 5;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  int frame = 0;
  logic pclk, vsyn, href, busy;
  logic [7:0] y, uv;
  logic pclk_valid, sof;
  logic [7:0] y_valid;
  logic [10:0] col_cnt, row_cnt;
  int checks = 0, failures = 0;

  ov7620_model #(.WIDTH(W), .HEIGHT(H), .HBLANK(6), .VBLANK(1), .VS_LEN(3)) cam (
    .clk, .start, .frame, .pclk, .vsyn, .href, .y, .uv, .busy);

  image_acquisition dut (.clk, .rst_n, .pclk, .vsyn, .href, .y, .uv,
                         .pclk_valid, .y_valid, .col_cnt, .row_cnt, .sof);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc > 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  int n = 0, last_strobe = -10;
  always @(negedge clk) if (rst_n && pclk_valid) begin
    automatic int ex = n % W, ey = n / W;
    chk(int'(col_cnt) == ex && int'(row_cnt) == ey, $sformatf("position %0d,%0d vs %0d,%0d",
        col_cnt, row_cnt, ex, ey));
    chk(y_valid == img_pixel(frame, ex, ey), "pixel value");
    chk(sof == (n == 0), "sof");
    chk(cyc - last_strobe == 2 || n % W == 0, "one pixel per PCLK period in a line");
    last_strobe = cyc;
    n++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge clk); frame = f; n = 0; start = 1;
      @(negedge clk); start = 0;
      wait (busy == 1'b1);
      wait (busy == 1'b0);
      repeat (6) @(posedge clk);
      chk(n == W * H, $sformatf("pixels per frame %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ov7620_model: behavioural model of the digital video port of an OV7620-type
// CMOS camera (simulation only; the real part is an analog/mixed-signal
// sensor). On start it sends one frame: VSYN high for VS_LEN pixel clocks,
// VBLANK idle lines, then HEIGHT lines of WIDTH pixels with HREF high, each
// followed by HBLANK pixel clocks with HREF low. PCLK runs at half the rate of
// clk; Y and HREF change while PCLK is low and are stable at its rising edge.
// The Y byte of pixel (x, y) of frame f is tb_image_pkg::img_pixel(f, x, y);
// UV alternates between a U and a V byte. Outside lines Y = 0x10, UV = 0x80.
module ov7620_model #(
  parameter int WIDTH  = 320,
  parameter int HEIGHT = 240,
  parameter int HBLANK = 16,
  parameter int VBLANK = 2,
  parameter int VS_LEN = 4
) (
  input  logic       clk,
  input  logic       start,
  input  int         frame,
  output logic       pclk,
  output logic       vsyn,
  output logic       href,
  output logic [7:0] y,
  output logic [7:0] uv,
  output logic       busy
);
  import tb_image_pkg::*;

  // one pixel clock: low phase (outputs change), then high phase
  task automatic tick(input logic h, input logic v, input logic [7:0] yy, input logic [7:0] cc);
    @(posedge clk);
    pclk <= 1'b0; href <= h; vsyn <= v; y <= yy; uv <= cc;
    @(posedge clk);
    pclk <= 1'b1;
  endtask

  initial begin
    pclk = 0; vsyn = 0; href = 0; y = 8'h10; uv = 8'h80; busy = 0;
    forever begin
      @(posedge clk);
      if (start) begin
        automatic int f = frame;
        busy <= 1'b1;
        for (int k = 0; k < VS_LEN; k++) tick(1'b0, 1'b1, 8'h10, 8'h80);
        for (int k = 0; k < VBLANK * (WIDTH + HBLANK); k++) tick(1'b0, 1'b0, 8'h10, 8'h80);
        for (int r = 0; r < HEIGHT; r++) begin
          for (int c = 0; c < WIDTH; c++)
            tick(1'b1, 1'b0, img_pixel(f, c, r), (c % 2 == 0) ? 8'h70 : 8'h90);
          for (int k = 0; k < HBLANK; k++) tick(1'b0, 1'b0, 8'h10, 8'h80);
        end
        @(posedge clk);
        pclk <= 1'b0;
        busy <= 1'b0;
      end
    end
  end
endmodule

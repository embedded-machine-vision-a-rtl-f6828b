// edge_detector: Sobel edge detection of one 3x3 window per clock.
//
// Two sobel_gradient units compute |Gx| and |Gy| side by side; their sum,
// |Gx| + |Gy| (the usual stand-in for the Euclidean gradient magnitude), is
// compared with a threshold to give a binary edge pixel. The whole datapath is
// combinational and its results are registered once, so a new window can be
// accepted every clock. The parallel structure, the |Gx|+|Gy| approximation,
// the 11-bit magnitudes and the 12-bit sum follow the design; the output
// register and the strobe/valid handshake are this design's choice.
//
// Interface: in_strobe presents a window; in_valid says it lies inside the
// image. One clock later out_strobe rises with out_valid, the gradient
// magnitudes, the sum (mag) and the binary edge pixel (edge_pix, forced to 0
// for an invalid window).
module edge_detector
  import vision_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_strobe,
  input  logic              in_sof,
  input  logic              in_valid,
  input  window_t           win,
  input  logic [MAG_W-1:0]  threshold,
  output logic              out_strobe,
  output logic              out_sof,
  output logic              out_valid,
  output logic [ABS_W-1:0]  gx_abs,
  output logic [ABS_W-1:0]  gy_abs,
  output logic [MAG_W-1:0]  mag,
  output logic              edge_pix
);

  logic signed [GRAD_W-1:0] gx, gy;
  logic [ABS_W-1:0] gx_a, gy_a;
  logic [MAG_W-1:0] sum;
  logic             over;

  sobel_gradient u_gx (
    .a_pos(win.w13), .a_neg(win.w31),
    .c_pos(win.w23), .c_neg(win.w21),
    .b_pos(win.w33), .b_neg(win.w11),
    .g(gx), .g_abs(gx_a)
  );

  sobel_gradient u_gy (
    .a_pos(win.w31), .a_neg(win.w13),
    .c_pos(win.w32), .c_neg(win.w12),
    .b_pos(win.w33), .b_neg(win.w11),
    .g(gy), .g_abs(gy_a)
  );

  assign sum = MAG_W'(gx_a) + MAG_W'(gy_a);

  threshold_unit #(.W(MAG_W)) u_thr (
    .value(sum), .threshold(threshold), .bin(over)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_strobe <= 1'b0;
      out_sof    <= 1'b0;
      out_valid  <= 1'b0;
      gx_abs     <= '0;
      gy_abs     <= '0;
      mag        <= '0;
      edge_pix   <= 1'b0;
    end else begin
      out_strobe <= in_strobe;
      out_sof    <= in_strobe & in_sof;
      out_valid  <= in_strobe & in_valid;
      if (in_strobe) begin
        gx_abs   <= gx_a;
        gy_abs   <= gy_a;
        mag      <= sum;
        edge_pix <= in_valid & over;
      end
    end
  end

  a_valid_strobe: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> out_strobe);
  a_edge_valid:   assert property (@(posedge clk) disable iff (!rst_n) out_strobe && edge_pix |-> out_valid);

endmodule

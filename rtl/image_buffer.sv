// image_buffer: sliding 3x3 window over a raster pixel stream.
//
// Keeping three whole lines would waste the words the window has already
// passed; instead the stream runs through one long shift chain:
//
//   pix_in -> W33 -> W32 -> W31 -> FIFO1 (N-3) -> W23 -> W22 -> W21
//          -> FIFO2 (N-3) -> W13 -> W12 -> W11
//
// Each row of registers plus one FIFO is exactly one line (N pixels) long,
// so after every shift the nine registers hold the 3x3 neighbourhood whose
// newest pixel is the one just shifted in: W33 = h(i,j), W11 = h(i-2,j-2).
// The chain structure, the nine registers and the FIFO sizes N-3 follow the
// design.
//
// Each pixel carries a tag bit through the chain (pix_tag: "this pixel is
// meaningful"). A column and row counter, restarted by pix_sof, marks windows
// that lie wholly inside the frame (newest pixel at column >= 2, row >= 2).
// win_valid is set when the window is inside the frame and all nine tags are
// set; a stage that reads an earlier filtered stream uses the tags to drop the
// windows that touch unfiltered border pixels. The tags and the counters are
// this design's choice.
//
// Interface: pix_valid shifts one pixel in. One clock later win holds the new
// window and win_strobe is high for one clock (whether or not the window is
// valid); win_sof is high with the window of the frame's first pixel.
module image_buffer
  import vision_pkg::*;
#(
  parameter int unsigned IMG_WIDTH = 320,
  localparam int unsigned CW       = $clog2(IMG_WIDTH)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    pix_valid,
  input  logic    pix_sof,
  input  logic    pix_tag,
  input  pixel_t  pix_in,
  output window_t win,
  output logic    win_strobe,
  output logic    win_sof,
  output logic    win_valid
);

  typedef struct packed {
    logic   tag;
    pixel_t pix;
  } cell_t;

  cell_t c11, c12, c13, c21, c22, c23, c31, c32, c33;
  cell_t fifo1_out, fifo2_out;
  logic  fifo1_full, fifo2_full;

  logic [CW-1:0] col;
  logic [1:0]    row;     // saturates at 2: only "row >= 2" matters
  logic          in_frame;

  line_fifo #(.WIDTH($bits(cell_t)), .DEPTH(IMG_WIDTH - 3)) u_fifo1 (
    .clk, .rst_n, .shift(pix_valid), .din(c31), .dout(fifo1_out), .full(fifo1_full)
  );

  line_fifo #(.WIDTH($bits(cell_t)), .DEPTH(IMG_WIDTH - 3)) u_fifo2 (
    .clk, .rst_n, .shift(pix_valid), .din(c21), .dout(fifo2_out), .full(fifo2_full)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c11, c12, c13, c21, c22, c23, c31, c32, c33} <= '0;
    end else if (pix_valid) begin
      c33 <= '{tag: pix_tag, pix: pix_in};
      c32 <= c33;
      c31 <= c32;
      c23 <= fifo1_out;
      c22 <= c23;
      c21 <= c22;
      c13 <= fifo2_out;
      c12 <= c13;
      c11 <= c12;
    end
  end

  // Position of the newest pixel in the frame.
  logic [CW-1:0] col_now;
  logic [1:0]    row_now;
  always_comb begin
    if (pix_sof) begin
      col_now = '0;
      row_now = '0;
    end else if (col == CW'(IMG_WIDTH - 1)) begin
      col_now = '0;
      row_now = (row == 2'd2) ? row : row + 1'b1;
    end else begin
      col_now = col + 1'b1;
      row_now = row;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col        <= CW'(IMG_WIDTH - 1);
      row        <= '0;
      in_frame     <= 1'b0;
      win_strobe <= 1'b0;
      win_sof    <= 1'b0;
    end else begin
      win_strobe <= pix_valid;
      if (pix_valid) begin
        col     <= col_now;
        row     <= row_now;
        in_frame  <= (col_now >= CW'(2)) && (row_now == 2'd2);
      end
      win_sof <= pix_valid & pix_sof;
    end
  end

  assign win = '{w11: c11.pix, w12: c12.pix, w13: c13.pix,
                 w21: c21.pix, w22: c22.pix, w23: c23.pix,
                 w31: c31.pix, w32: c32.pix, w33: c33.pix};

  assign win_valid = win_strobe && in_frame && fifo1_full && fifo2_full &&
                     c11.tag && c12.tag && c13.tag &&
                     c21.tag && c22.tag && c23.tag &&
                     c31.tag && c32.tag && c33.tag;

  // A valid window is always a new window, and frame start is a strobe.
  a_valid_strobe: assert property (@(posedge clk) disable iff (!rst_n) win_valid |-> win_strobe);
  a_sof_strobe:   assert property (@(posedge clk) disable iff (!rst_n) win_sof |-> win_strobe);

endmodule

// compressed_memory: storage for the XOR-coded image.
//
// A simple dual-port RAM, one write port and one read port, both synchronous
// to clk. It holds the difference codes of one frame so that they can be read
// back later and decompressed. Its organisation (one 8-bit code per word, one
// whole frame deep, registered read data) is this design's choice; the design
// only shows a memory between the compressor and the decompressor.
//
// Timing: a write with we is visible to reads from the next clock; rdata
// holds the word at raddr one clock after re.
module compressed_memory #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 76800,          // 320 x 240 frame
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

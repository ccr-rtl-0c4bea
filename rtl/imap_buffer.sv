// imap_buffer (IB): stores input maps uncompressed, one PX x PY block per
// word, so the processing unit receives a whole matrix block each cycle. The
// default 1024 words of 64 16-bit elements are the 128 KB buffer size of the
// evaluated design.
//
// Layout (this design's choice): the maps of the input channels follow one
// another; inside a channel the blocks are stored row of blocks by row of
// blocks, and inside a block the elements are row-major. Block (br, bc) of
// channel ch is word ch*NBR*NBC + br*NBC + bc, where NBR = ceil(H/PX) and
// NBC = ceil(W/PY). Elements of edge blocks that fall outside the H x W map
// must be written as zero.
//
// Interface and timing: synchronous memory, one host write port, one read
// port; the block at rd_addr appears on rd_data after the next rising edge.
module imap_buffer
  import sparsek_pkg::*;
#(
  parameter int unsigned PX    = 8,
  parameter int unsigned PY    = 8,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  data_t         wr_data [PX*PY],
  input  logic [AW-1:0] rd_addr,
  output data_t         rd_data [PX*PY]
);
  logic [PX*PY*DATA_W-1:0] mem [DEPTH];
  logic [PX*PY*DATA_W-1:0] wr_word, rd_word;

  always_comb
    for (int g = 0; g < PX*PY; g++) wr_word[g*DATA_W +: DATA_W] = wr_data[g];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_word;
    rd_word <= mem[rd_addr];
  end

  always_comb
    for (int g = 0; g < PX*PY; g++) rd_data[g] = data_t'(rd_word[g*DATA_W +: DATA_W]);
endmodule

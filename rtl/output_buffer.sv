// output_buffer (OB): holds the output map as 32-bit partial sums,
// uncompressed. Because every kernel scalar moves the product block to a
// different output offset, the block that must be read and written each cycle
// starts at an arbitrary (row, column). The buffer is therefore split into
// PX*PY banks with output element (row, col) in bank (row mod PX)*PY +
// (col mod PY) at word (row div PX)*NBCO + (col div PY), NBCO being the
// number of PY-wide column blocks of the output map. Any PX x PY block then
// touches every bank exactly once, so a whole block is read and written per
// cycle without conflicts. The banking scheme is this design's choice; the
// default 64 banks x 512 words x 32 bits is the 128 KB of the evaluated design.
//
// Interface and timing: per bank one synchronous read port and one write
// port, each with its own address. Read data appears after the next rising
// edge. A read and a write of the same word in the same cycle returns the
// data being written (write-first), which lets back-to-back read-modify-write
// operations on overlapping blocks see each other's results; fwd[b] flags
// that such a forward happened in bank b.
module output_buffer
  import sparsek_pkg::*;
#(
  parameter int unsigned NB    = 64,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr [NB],
  output acc_t          rd_data [NB],
  input  logic          wr_en   [NB],
  input  logic [AW-1:0] wr_addr [NB],
  input  acc_t          wr_data [NB],
  output logic          fwd     [NB]
);
  for (genvar b = 0; b < NB; b++) begin : g_bank
    acc_t mem [DEPTH];
    logic hit;
    assign hit = wr_en[b] && (wr_addr[b] == rd_addr[b]);
    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_addr[b]] <= wr_data[b];
      rd_data[b] <= hit ? wr_data[b] : mem[rd_addr[b]];
      fwd[b]     <= hit;
    end
  end
endmodule

// kernel_buffer (KB): stores the kernel in compressed form, one entry per
// nonzero kernel scalar (value plus row, column and input-channel coordinate),
// so zero weights cost neither storage nor a compute cycle. The default depth
// of 32768 32-bit entries is the 128 KB buffer size of the evaluated design;
// the entry format is this design's choice (see sparsek_pkg).
//
// Interface and timing: a synchronous single-port-read, single-port-write
// memory. The host writes one entry per cycle through wr_en/wr_addr/wr_data.
// The entry at rd_addr appears on rd_data after the next rising edge; the
// controller drives rd_addr from its next-state logic so that rd_data always
// shows the entry it is currently working on.
module kernel_buffer
  import sparsek_pkg::*;
#(
  parameter int unsigned DEPTH = 32768,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [AW-1:0]   wr_addr,
  input  kb_entry_t       wr_data,
  input  logic [AW-1:0]   rd_addr,
  output kb_entry_t       rd_data
);
  kb_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule

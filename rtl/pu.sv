// pu: the processing unit, a PX x PY mesh of PEs that computes a scalar x
// matrix product. Each cycle a nonzero kernel scalar and a PX x PY block of
// the input map enter; PX x PY products leave one cycle later, in the same
// row-major order as the block (element a*PY+b is row a, column b). This is
// the unmodified dense-accelerator datapath: the sparse-kernel scheme needs no
// change inside it.
module pu
  import sparsek_pkg::*;
#(
  parameter int unsigned PX = 8,
  parameter int unsigned PY = 8
) (
  input  logic  clk,
  input  data_t k,                 // kernel scalar, broadcast to all PEs
  input  data_t blk  [PX*PY],      // input-map block, row-major
  output acc_t  prod [PX*PY]       // products, row-major, one cycle later
);
  for (genvar g = 0; g < PX*PY; g++) begin : g_pe
    pe u_pe (.clk(clk), .k(k), .x(blk[g]), .p(prod[g]));
  end
endmodule

// pe: one processing element of the SparseK processing unit. It multiplies
// the kernel scalar broadcast to the whole array by its own input-map element
// and registers the full-precision product, so a product leaves the PE one
// clock after its operands arrive. The PE holds no control of its own: like
// the dense array it comes from, it cannot skip zero operands, and sparsity is
// handled entirely by what the kernel buffer feeds it. The registered
// multiplier is this design's choice of the simplest PE that does the job.
module pe
  import sparsek_pkg::*;
(
  input  logic  clk,
  input  data_t k,      // broadcast kernel scalar
  input  data_t x,      // input-map element of this PE
  output acc_t  p       // k * x, one cycle later
);
  always_ff @(posedge clk) p <= acc_t'(k) * acc_t'(x);
endmodule

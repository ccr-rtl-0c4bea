// acc_unit: the accumulation unit. It adds the PX x PY products coming out
// of the processing unit to the partial sums of the same output positions
// fetched from the output buffer, one adder per position, and hands the sums
// to the scatter crossbar for write-back. Sums wrap at 32 bits (no
// saturation), which is this design's choice. Purely combinational; the
// products and partial sums must arrive in the same cycle.
module acc_unit
  import sparsek_pkg::*;
#(
  parameter int unsigned PX = 8,
  parameter int unsigned PY = 8
) (
  input  acc_t prod [PX*PY],
  input  acc_t psum [PX*PY],
  output acc_t sum  [PX*PY]
);
  always_comb
    for (int g = 0; g < PX*PY; g++) sum[g] = psum[g] + prod[g];
endmodule

// scatter_crossbar: routes a PX x PY block between block positions and output
// buffer banks. A block whose first element sits at output (ox, oy) puts its
// element (a, b) into bank ((ox+a) mod PX, (oy+b) mod PY); the crossbar is
// therefore a two-dimensional rotation by (rot_x, rot_y) = (ox mod PX,
// oy mod PY). With GATHER = 0 it scatters block positions to banks (the path
// from the accumulation unit into the output buffer); with GATHER = 1 it does
// the inverse and lines the partial sums read from the banks up with the
// product positions. Elements are row-major (index a*PY+b for positions,
// i*PY+j for banks). Purely combinational. Using a second instance for the
// partial-sum read path is this design's choice.
module scatter_crossbar
  import sparsek_pkg::*;
#(
  parameter int unsigned PX     = 8,
  parameter int unsigned PY     = 8,
  parameter bit          GATHER = 1'b0,
  localparam int unsigned RXW   = $clog2(PX+1),
  localparam int unsigned RYW   = $clog2(PY+1)
) (
  input  logic [RXW-1:0] rot_x,
  input  logic [RYW-1:0] rot_y,
  input  acc_t           din  [PX*PY],
  output acc_t           dout [PX*PY]
);
  // every output picks its input through a mux; the write index is static
  for (genvar i = 0; i < PX; i++) begin : g_row
    for (genvar j = 0; j < PY; j++) begin : g_col
      logic [RXW-1:0] si;
      logic [RYW-1:0] sj;
      always_comb begin
        if (GATHER) begin
          // position (i, j) <- bank ((i + rot_x) mod PX, (j + rot_y) mod PY)
          si = RXW'((i + int'(rot_x)) % PX);
          sj = RYW'((j + int'(rot_y)) % PY);
        end else begin
          // bank (i, j) <- position ((i - rot_x) mod PX, (j - rot_y) mod PY)
          si = RXW'((i + PX - int'(rot_x)) % PX);
          sj = RYW'((j + PY - int'(rot_y)) % PY);
        end
      end
      assign dout[i*PY+j] = din[int'(si)*PY + int'(sj)];
    end
  end
endmodule

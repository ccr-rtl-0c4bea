// ccu: coordinate computation unit. For each scalar x block operation it
// turns the kernel scalar's coordinate (r, c) and the imap block's origin
// (x0, y0) into the output coordinate of the first product, following CCR-1:
// a sub-kernel K_l of size R_l x S_l at (r_l, c_l) moves its partial output by
// alpha_l = 1 - r_l - R_l, beta_l = 1 - c_l - S_l. SparseK uses 1 x 1
// sub-kernels (SUB_R = SUB_S = 1), so the block of products starting at imap
// (x0, y0) lands at output (x0 + alpha, y0 + beta). The output map starts at
// coordinate (1-R, 1-S); the buffer stores it from index 0, so R-1 and S-1
// are added to give buffer coordinates (ox, oy).
//
// Only that one coordinate is computed. From it the unit also derives, with a
// multiply and a few adds and compares, what the banked output buffer needs:
// the word address of every bank, a write mask that drops products falling
// outside the E x F output map, and the rotation (ox mod PX, oy mod PY) that
// the crossbars use to line product positions up with banks. These derived
// outputs are this design's choice of banking (see output_buffer).
//
// Timing: one pipeline stage; outputs are registered and valid one cycle after
// in_valid.
module ccu
  import sparsek_pkg::*;
#(
  parameter int unsigned PX     = 8,
  parameter int unsigned PY     = 8,
  parameter int unsigned OB_AW  = 9,
  parameter int unsigned SUB_R  = 1,   // sub-kernel height R_l
  parameter int unsigned SUB_S  = 1,   // sub-kernel width  S_l
  localparam int unsigned NB    = PX*PY
) (
  input  logic           clk,
  input  logic           in_valid,
  input  coord_t         x0,          // imap row of the block's first element
  input  coord_t         y0,          // imap column of the block's first element
  input  kcoord_t        r,           // kernel row of the sub-kernel
  input  kcoord_t        c,           // kernel column of the sub-kernel
  input  kcoord_t        rm1,         // R - 1
  input  kcoord_t        sm1,         // S - 1
  input  coord_t         e,           // output map height E = H + R - 1
  input  coord_t         f,           // output map width  F = W + S - 1
  input  logic [OB_AW-1:0] nbco,      // column blocks of the output map
  output logic           out_valid,
  output coord_t         ox,          // buffer row of the first product
  output coord_t         oy,          // buffer column of the first product
  output logic [OB_AW-1:0] bank_addr [NB],
  output logic           bank_mask [NB],
  output logic [$clog2(PX+1)-1:0] rot_x,   // ox mod PX
  output logic [$clog2(PY+1)-1:0] rot_y    // oy mod PY
);
  localparam int unsigned SW = COORD_W + 2;
  typedef logic signed [SW-1:0] scoord_t;

  scoord_t alpha, beta, ox_s, oy_s;
  coord_t  ox_d, oy_d, rbx, rby, rx, ry;
  logic [OB_AW-1:0] base;

  always_comb begin
    // CCR-1 offset of the sub-output of a sub-kernel placed at (r, c)
    alpha = scoord_t'(1) - scoord_t'(r) - scoord_t'(SUB_R);
    beta  = scoord_t'(1) - scoord_t'(c) - scoord_t'(SUB_S);
    // first element of the sub-omap of this block, in buffer coordinates
    ox_s  = scoord_t'(x0) + alpha + scoord_t'(SUB_R) - 1 + scoord_t'(rm1);
    oy_s  = scoord_t'(y0) + beta  + scoord_t'(SUB_S) - 1 + scoord_t'(sm1);
    ox_d  = coord_t'(ox_s);
    oy_d  = coord_t'(oy_s);
    rbx   = ox_d / coord_t'(PX);
    rby   = oy_d / coord_t'(PY);
    rx    = ox_d % coord_t'(PX);
    ry    = oy_d % coord_t'(PY);
    base  = OB_AW'(rbx * coord_t'(nbco)) + OB_AW'(rby);
  end

  always_ff @(posedge clk) begin
    out_valid <= in_valid;
    ox        <= ox_d;
    oy        <= oy_d;
    rot_x     <= ($clog2(PX+1))'(rx);
    rot_y     <= ($clog2(PY+1))'(ry);
    for (int i = 0; i < PX; i++)
      for (int j = 0; j < PY; j++) begin
        // bank (i, j) holds the block element whose output row is the first
        // row >= ox that is congruent to i modulo PX (likewise for columns)
        automatic logic wx = coord_t'(i) < rx;
        automatic logic wy = coord_t'(j) < ry;
        automatic coord_t row = (rbx + coord_t'(wx)) * coord_t'(PX) + coord_t'(i);
        automatic coord_t col = (rby + coord_t'(wy)) * coord_t'(PY) + coord_t'(j);
        bank_addr[i*PY+j] <= base + (wx ? nbco : '0) + OB_AW'(wy);
        bank_mask[i*PY+j] <= (row < e) && (col < f);
      end
  end
endmodule

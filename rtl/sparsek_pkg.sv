// sparsek_pkg: types and constants shared by the SparseK sparse-kernel CNN
// accelerator. SparseK applies the concise convolution rule for sparse kernels
// (CCR-1): a kernel is kept as a list of its nonzero scalars with their (row,
// column, input-channel) coordinates, each scalar multiplies a whole Px x Py
// block of the input map, and the product block is added into the output map
// at an offset derived from the scalar's coordinate.
//
// The 8 x 8 PE array and the 128 KB size of each buffer follow the evaluated
// configuration. The 16-bit operand width, the 32-bit partial-sum width and
// the packing of a compressed kernel entry into 32 bits are this design's own
// choices.
package sparsek_pkg;

  // Operand and partial-sum widths (assumed: 16-bit fixed point operands).
  localparam int unsigned DATA_W  = 16;
  localparam int unsigned ACC_W   = 32;

  // Width of an output/input map coordinate and of the kernel coordinates.
  localparam int unsigned COORD_W = 10;
  localparam int unsigned KCOORD_W = 4;   // kernels up to 16 x 16
  localparam int unsigned CH_W     = 8;   // up to 256 input channels held in IB

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic [COORD_W-1:0]       coord_t;
  typedef logic [KCOORD_W-1:0]      kcoord_t;
  typedef logic [CH_W-1:0]          ch_t;

  // One compressed kernel entry: a nonzero kernel scalar and its coordinate
  // (row r, column c inside the R x S kernel, input channel ch).
  typedef struct packed {
    data_t   val;
    ch_t     ch;
    kcoord_t r;
    kcoord_t c;
  } kb_entry_t;


  // Per-job configuration written by the host before start.
  typedef struct packed {
    coord_t  h;         // imap height H
    coord_t  w;         // imap width  W
    kcoord_t rm1;       // kernel height R minus one
    kcoord_t sm1;       // kernel width  S minus one
    logic [15:0] kb_base;   // first compressed kernel entry of the job
    logic [15:0] kb_count;  // number of nonzero kernel entries in the job
    logic    clear;     // zero the output map before accumulating
  } job_cfg_t;

endpackage

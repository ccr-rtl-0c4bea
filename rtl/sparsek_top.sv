// sparsek_top: the SparseK accelerator. It runs a convolution whose kernel is
// sparse on a dense scalar x matrix datapath, following the concise
// convolution rule for sparse kernels (CCR-1): the kernel is split into 1 x 1
// sub-kernels, the zero ones are dropped, and each remaining nonzero scalar
// is convolved with the whole input map, which is simply the scalar times
// the map, shifted in the output by an offset computed from the scalar's
// position. Zero weights cost neither buffer space nor cycles, and the PE
// array is the same as in a dense accelerator.
//
// Datapath: the compressed kernel buffer (KB) feeds
// nonzero values to the processing unit (PU) and their coordinates to the
// coordinate computation unit (CCU); the imap buffer (IB) feeds a PX x PY
// block; the accumulation unit (AccUnit) adds the products to the partial
// sums fetched from the banked output buffer (OB), and the scatter crossbar
// routes the sums back into the OB banks.
//
// Pipeline, one operation per cycle:
//   T0  controller issues (kernel entry, imap block); IB read; CCU computes
//   T1  PU multiplies; OB read at the CCU's per-bank addresses
//   T2  partial sums gathered, accumulated, scattered and written to OB
// An operation reads OB in the cycle the previous one writes it; when both
// touch the same word, the OB bank forwards the new value (write-first), so
// back-to-back operations on overlapping output blocks never stall.
//
// Host interface: write KB entries and IB blocks while idle (asserted), set cfg and pulse
// start, wait for done, then read the output map one aligned PX x PY block at
// a time: ob_rd_addr = (row div PX) * ceil(F/PY) + (col div PY), and
// ob_rd_data[a*PY+b] arrives one cycle later. The perf_* counters report, for
// the last job, busy cycles, issued operations and cycles in which OB
// forwarded a value. The host interface and the counters are this design's
// own; the evaluated design's 8 x 8 PEs and 128 KB buffers are the defaults.
module sparsek_top
  import sparsek_pkg::*;
#(
  parameter int unsigned PX       = 8,
  parameter int unsigned PY       = 8,
  parameter int unsigned KB_DEPTH = 32768,   // 128 KB of 32-bit entries
  parameter int unsigned IB_DEPTH = 1024,    // 128 KB of 64 x 16-bit blocks
  parameter int unsigned OB_DEPTH = 512,     // 128 KB of 32-bit sums in 64 banks
  localparam int unsigned NB      = PX*PY,
  localparam int unsigned KB_AW   = $clog2(KB_DEPTH),
  localparam int unsigned IB_AW   = $clog2(IB_DEPTH),
  localparam int unsigned OB_AW   = $clog2(OB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel buffer load
  input  logic              kb_wr_en,
  input  logic [KB_AW-1:0]  kb_wr_addr,
  input  kb_entry_t         kb_wr_data,
  // imap buffer load
  input  logic              ib_wr_en,
  input  logic [IB_AW-1:0]  ib_wr_addr,
  input  data_t             ib_wr_data [NB],
  // job control
  input  logic              start,
  input  job_cfg_t          cfg,
  output logic              busy,
  output logic              done,
  // output map read-back
  input  logic [OB_AW-1:0]  ob_rd_addr,
  output acc_t              ob_rd_data [NB],
  // performance counters of the last job
  output logic [31:0]       perf_cycles,
  output logic [31:0]       perf_ops,
  output logic [31:0]       perf_fwd
);
  localparam int unsigned RXW = $clog2(PX+1);
  localparam int unsigned RYW = $clog2(PY+1);

  // ---------------------------------------------------------------- T0
  logic [KB_AW-1:0] kb_rd_addr;
  kb_entry_t        kb_rd_data;
  logic             op_valid;
  data_t            op_k;
  kcoord_t          op_r, op_c, g_rm1, g_sm1;
  coord_t           op_x0, op_y0, g_e, g_f;
  logic [IB_AW-1:0] ib_rd_addr;
  logic [OB_AW-1:0] g_nbco, clr_addr;
  logic             clr_valid;

  kernel_buffer #(.DEPTH(KB_DEPTH)) u_kb (
    .clk, .wr_en(kb_wr_en), .wr_addr(kb_wr_addr), .wr_data(kb_wr_data),
    .rd_addr(kb_rd_addr), .rd_data(kb_rd_data));

  sparsek_ctrl #(.PX(PX), .PY(PY), .KB_AW(KB_AW), .IB_AW(IB_AW), .OB_AW(OB_AW)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .busy, .done,
    .kb_rd_addr, .kb_rd_data,
    .op_valid, .op_k, .op_r, .op_c, .op_x0, .op_y0, .ib_rd_addr,
    .g_rm1, .g_sm1, .g_e, .g_f, .g_nbco,
    .clr_valid, .clr_addr);

  data_t ib_rd_data [NB];
  imap_buffer #(.PX(PX), .PY(PY), .DEPTH(IB_DEPTH)) u_ib (
    .clk, .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ib_wr_data),
    .rd_addr(ib_rd_addr), .rd_data(ib_rd_data));

  logic             t1_valid;
  logic [OB_AW-1:0] t1_addr [NB];
  logic             t1_mask [NB];
  logic [RXW-1:0]   t1_rx;
  logic [RYW-1:0]   t1_ry;

  ccu #(.PX(PX), .PY(PY), .OB_AW(OB_AW)) u_ccu (
    .clk, .in_valid(op_valid), .x0(op_x0), .y0(op_y0), .r(op_r), .c(op_c),
    .rm1(g_rm1), .sm1(g_sm1), .e(g_e), .f(g_f), .nbco(g_nbco),
    .out_valid(t1_valid), .ox(), .oy(),
    .bank_addr(t1_addr), .bank_mask(t1_mask), .rot_x(t1_rx), .rot_y(t1_ry));

  data_t t1_k;
  always_ff @(posedge clk) t1_k <= op_k;

  // ---------------------------------------------------------------- T1
  acc_t             t2_prod [NB];
  pu #(.PX(PX), .PY(PY)) u_pu (.clk, .k(t1_k), .blk(ib_rd_data), .prod(t2_prod));

  logic [OB_AW-1:0] ob_raddr [NB];
  always_comb
    for (int b = 0; b < NB; b++) ob_raddr[b] = t1_valid ? t1_addr[b] : ob_rd_addr;

  logic             t2_valid;
  logic [OB_AW-1:0] t2_addr [NB];
  logic             t2_mask [NB];
  logic [RXW-1:0]   t2_rx;
  logic [RYW-1:0]   t2_ry;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t2_valid <= 1'b0;
    else        t2_valid <= t1_valid;
  end
  always_ff @(posedge clk) begin
    t2_addr <= t1_addr;
    t2_mask <= t1_mask;
    t2_rx   <= t1_rx;
    t2_ry   <= t1_ry;
  end

  // ---------------------------------------------------------------- T2
  acc_t ob_rdata [NB], psum [NB], sum [NB], sum_bank [NB];
  logic ob_we [NB], ob_fwd [NB];
  logic [OB_AW-1:0] ob_waddr [NB];
  acc_t ob_wdata [NB];

  scatter_crossbar #(.PX(PX), .PY(PY), .GATHER(1'b1)) u_gather (
    .rot_x(t2_rx), .rot_y(t2_ry), .din(ob_rdata), .dout(psum));

  acc_unit #(.PX(PX), .PY(PY)) u_acc (.prod(t2_prod), .psum(psum), .sum(sum));

  scatter_crossbar #(.PX(PX), .PY(PY), .GATHER(1'b0)) u_scatter (
    .rot_x(t2_rx), .rot_y(t2_ry), .din(sum), .dout(sum_bank));

  always_comb
    for (int b = 0; b < NB; b++) begin
      if (clr_valid) begin
        ob_we[b]    = 1'b1;
        ob_waddr[b] = clr_addr;
        ob_wdata[b] = '0;
      end else begin
        ob_we[b]    = t2_valid && t2_mask[b];
        ob_waddr[b] = t2_addr[b];
        ob_wdata[b] = sum_bank[b];
      end
    end

  output_buffer #(.NB(NB), .DEPTH(OB_DEPTH)) u_ob (
    .clk, .rd_addr(ob_raddr), .rd_data(ob_rdata),
    .wr_en(ob_we), .wr_addr(ob_waddr), .wr_data(ob_wdata), .fwd(ob_fwd));

  assign ob_rd_data = ob_rdata;

  // ---------------------------------------------------------------- counters
  logic any_fwd;
  always_comb begin
    any_fwd = 1'b0;
    for (int b = 0; b < NB; b++) any_fwd |= ob_fwd[b] & t2_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_cycles <= '0;
      perf_ops    <= '0;
      perf_fwd    <= '0;
    end else if (start && !busy) begin
      perf_cycles <= '0;
      perf_ops    <= '0;
      perf_fwd    <= '0;
    end else begin
      if (busy)     perf_cycles <= perf_cycles + 1;
      if (op_valid) perf_ops    <= perf_ops + 1;
      if (any_fwd)  perf_fwd    <= perf_fwd + 1;
    end
  end

  // the host must not change the buffers a running job reads
  a_no_kb_write_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !kb_wr_en);
  a_no_ib_write_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !ib_wr_en);
  // the clear pass and the operation pipeline never write OB together
  a_no_clr_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(clr_valid && t2_valid));
endmodule

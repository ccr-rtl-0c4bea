// sparsek_ctrl: the loop sequencer of SparseK. In a dense accelerator this
// state machine derives every output coordinate from its loop indices; here it
// only walks the loops and leaves the output coordinate to the CCU.
//
// A job convolves the input maps held in IB with the compressed kernel entries
// kb_base .. kb_base+kb_count-1 of KB and accumulates the full-mode result
// (E = H+R-1 rows, F = W+S-1 columns) into OB. The loop nest, outer to inner,
// is: nonzero kernel entry, row of imap blocks, column of imap blocks. One
// scalar x block operation is issued per cycle with no bubbles, so a job takes
// kb_count * ceil(H/PX) * ceil(W/PY) issue cycles: zero kernel weights cost
// nothing. With cfg.clear set, the OB words of the output map are first
// zeroed, one word in every bank per cycle; with it clear, the job adds onto
// what OB already holds, which is how input channels beyond IB's capacity, or
// neighbouring imap tiles, are accumulated over several jobs. The loop order,
// the clear pass and the per-job configuration are this design's choices.
//
// Timing: start is accepted in IDLE. Then one setup cycle, ceil(E/PX) *
// ceil(F/PY) clear cycles if requested, the issue cycles, and two drain cycles
// while the last operations pass through the datapath; done pulses for one
// cycle when the last partial sum has been written. busy is high from the
// cycle after start until done.
//
// KB is read ahead: kb_rd_addr comes from the next-state logic, so kb_rd_data
// always holds the entry that is current in the cycle it is used.
module sparsek_ctrl
  import sparsek_pkg::*;
#(
  parameter int unsigned PX    = 8,
  parameter int unsigned PY    = 8,
  parameter int unsigned KB_AW = 15,
  parameter int unsigned IB_AW = 10,
  parameter int unsigned OB_AW = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  job_cfg_t          cfg,
  output logic              busy,
  output logic              done,
  // compressed kernel stream
  output logic [KB_AW-1:0]  kb_rd_addr,
  input  kb_entry_t         kb_rd_data,
  // operation issue (stage T0)
  output logic              op_valid,
  output data_t             op_k,
  output kcoord_t           op_r,
  output kcoord_t           op_c,
  output coord_t            op_x0,
  output coord_t            op_y0,
  output logic [IB_AW-1:0]  ib_rd_addr,
  // job geometry for the CCU
  output kcoord_t           g_rm1,
  output kcoord_t           g_sm1,
  output coord_t            g_e,
  output coord_t            g_f,
  output logic [OB_AW-1:0]  g_nbco,
  // output-map clear
  output logic              clr_valid,
  output logic [OB_AW-1:0]  clr_addr
);
  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_CLEAR, S_RUN, S_DRAIN} state_t;

  state_t              state;
  job_cfg_t            job;
  logic [IB_AW:0]      bpc;           // imap blocks per channel
  logic [OB_AW:0]      clr_words;     // OB words used by the output map
  logic [15:0]         kidx, kidx_nxt;
  coord_t              x0, y0;
  logic [IB_AW-1:0]    blk;
  logic [1:0]          drain;

  logic last_col, last_row, last_entry;
  assign last_col   = (y0 + coord_t'(PY)) >= job.w;
  assign last_row   = (x0 + coord_t'(PX)) >= job.h;
  assign last_entry = (kidx + 16'd1) == job.kb_count;

  always_comb begin
    kidx_nxt = kidx;
    if (state == S_SETUP || state == S_CLEAR) kidx_nxt = '0;
    else if (state == S_RUN && last_col && last_row) kidx_nxt = kidx + 16'd1;
  end
  assign kb_rd_addr = KB_AW'(job.kb_base + kidx_nxt);

  // geometry derived from the latched configuration
  coord_t e_c, f_c, nbr_c, nbc_c, nbro_c, nbco_c;
  logic [2*COORD_W-1:0] bpc_c, clr_c;
  assign e_c    = job.h + coord_t'(job.rm1);
  assign f_c    = job.w + coord_t'(job.sm1);
  assign nbr_c  = (job.h + coord_t'(PX - 1)) / coord_t'(PX);
  assign nbc_c  = (job.w + coord_t'(PY - 1)) / coord_t'(PY);
  assign nbro_c = (e_c + coord_t'(PX - 1)) / coord_t'(PX);
  assign nbco_c = (f_c + coord_t'(PY - 1)) / coord_t'(PY);
  assign bpc_c  = nbr_c * nbc_c;
  assign clr_c  = nbro_c * nbco_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      job       <= '0;
      bpc       <= '0;
      clr_words <= '0;
      g_e       <= '0;
      g_f       <= '0;
      g_nbco    <= '0;
      kidx      <= '0;
      x0        <= '0;
      y0        <= '0;
      blk       <= '0;
      drain     <= '0;
      clr_addr  <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      kidx <= kidx_nxt;
      unique case (state)
        S_IDLE: if (start) begin
          job   <= cfg;
          state <= S_SETUP;
        end
        S_SETUP: begin
          bpc       <= (IB_AW+1)'(bpc_c);
          clr_words <= (OB_AW+1)'(clr_c);
          g_e       <= e_c;
          g_f       <= f_c;
          g_nbco    <= OB_AW'(nbco_c);
          x0        <= '0;
          y0        <= '0;
          blk       <= '0;
          clr_addr  <= '0;
          if (job.clear)              state <= S_CLEAR;
          else if (job.kb_count == 0) state <= S_DRAIN;
          else                        state <= S_RUN;
          drain     <= '0;
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if ((OB_AW+1)'(clr_addr) + 1'b1 >= clr_words)
            state <= (job.kb_count == 0) ? S_DRAIN : S_RUN;
        end
        S_RUN: begin
          if (!last_col) begin
            y0  <= y0 + coord_t'(PY);
            blk <= blk + 1'b1;
          end else begin
            y0 <= '0;
            if (!last_row) begin
              x0  <= x0 + coord_t'(PX);
              blk <= blk + 1'b1;
            end else begin
              x0  <= '0;
              blk <= '0;
              if (last_entry) state <= S_DRAIN;
            end
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 2'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy       = (state != S_IDLE);
  assign clr_valid  = (state == S_CLEAR);
  assign op_valid   = (state == S_RUN);
  assign op_k       = kb_rd_data.val;
  assign op_r       = kb_rd_data.r;
  assign op_c       = kb_rd_data.c;
  assign op_x0      = x0;
  assign op_y0      = y0;
  assign ib_rd_addr = IB_AW'(kb_rd_data.ch * bpc) + blk;
  assign g_rm1      = job.rm1;
  assign g_sm1      = job.sm1;

  // a kernel entry must lie inside the R x S kernel
  a_kcoord: assert property (@(posedge clk) disable iff (!rst_n)
    op_valid |-> (op_r <= job.rm1) && (op_c <= job.sm1));
  // the addressed imap block must be inside IB
  a_ibrange: assert property (@(posedge clk) disable iff (!rst_n)
    op_valid |-> (int'(kb_rd_data.ch) * int'(bpc) + int'(blk)) < (1 << IB_AW));
  // the output map must fit in OB
  a_obfit: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CLEAR || state == S_RUN) |-> clr_words <= (OB_AW+1)'(1 << OB_AW));
endmodule

// refcnt_nosqcpr_unary: unary register reference counting for a NoSQ/CPR
// hybrid.
//
// CPR's read counting is extended for NoSQ. NoSQ executes stores and
// (logically) re-executes loads in the in-order back end, so the references
// held by memory instructions end at commit, while those of other
// instructions end at execute. NoSQ also lets several logical registers map
// to the same physical register, so a map table can no longer be kept as one
// bitvector. The matrix has three banks plus the map table itself:
//   LSQ bank   one row per load/store entry: the decoded registers read by a
//              load or store (address, store data, or the register a bypassed
//              load shares), written at rename, reset at commit or squash;
//   IQ bank    one row per issue-queue entry: the decoded sources of a
//              non-memory instruction, reset at execute or squash;
//   RMap bank  one row per logical register: the decoded physical register it
//              maps to, rewritten at rename (no resets);
//   Ckpt bank  one block of NLREG rows per checkpoint: a copy of the whole
//              RMap bank made when the checkpoint is created, reset when it is
//              released.
// in_use is the OR of all columns; free registers are picked by priority
// encoders.
//
// Checkpoint creation copies the RMap bank as it stands at the start of the
// cycle (before that cycle's renames; the checkpointed instruction leads its
// rename group; own choice). restore_en loads the RMap bank from checkpoint
// restore_idx; squashed LSQ/IQ rows and younger checkpoints are released
// through the clear masks in the same cycle.
// Timing: updates at the clock edge. Reset: logical i maps to physical i,
// other banks empty.
module refcnt_nosqcpr_unary #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG = refcnt_pkg::NLREG_DEF,
  parameter int unsigned IQ    = refcnt_pkg::IQ_DEF,
  parameter int unsigned LSQ   = refcnt_pkg::LSQ_DEF,
  parameter int unsigned NCKPT = refcnt_pkg::NCKPT_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF,
  parameter int unsigned NSRC  = refcnt_pkg::NSRC_DEF
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // rename
  input  logic [W-1:0]                              ren_valid,
  input  logic [W-1:0]                              ren_is_mem,
  input  logic [W-1:0][$clog2(LSQ)-1:0]             ren_lsq,
  input  logic [W-1:0][$clog2(IQ)-1:0]              ren_iq,
  input  logic [W-1:0][NSRC-1:0]                    ren_src_valid,
  input  logic [W-1:0][NSRC-1:0][$clog2(NPREG)-1:0] ren_src,
  input  logic [W-1:0]                              ren_has_dest,
  input  logic [W-1:0][$clog2(NLREG)-1:0]           ren_lreg,
  input  logic [W-1:0][$clog2(NPREG)-1:0]           ren_dest,
  // execute (IQ) and commit (LSQ) releases, squash included
  input  logic [IQ-1:0]                             iq_clr_mask,
  input  logic [LSQ-1:0]                            lsq_clr_mask,
  // checkpoints
  input  logic                                      ckpt_create,
  input  logic [$clog2(NCKPT)-1:0]                  ckpt_idx,
  input  logic [NCKPT-1:0]                          ckpt_clr_mask,
  input  logic                                      restore_en,
  input  logic [$clog2(NCKPT)-1:0]                  restore_idx,
  // register allocation interface
  output logic [NPREG-1:0]                          in_use,
  output logic [W-1:0]                              free_valid,
  output logic [W-1:0][$clog2(NPREG)-1:0]           free_preg
);

  logic [W-1:0][NPREG-1:0]     src_vec, dst_vec;
  logic [NPREG-1:0]            lsq_col, iq_col, rmap_col, ck_col;
  logic [NLREG-1:0][NPREG-1:0] rmap_rows, ck_rd;

  always_comb begin
    for (int s = 0; s < int'(W); s++) begin
      src_vec[s] = '0;
      for (int k = 0; k < int'(NSRC); k++)
        if (ren_src_valid[s][k]) src_vec[s][ren_src[s][k]] = 1'b1;
      dst_vec[s] = NPREG'(1) << ren_dest[s];
    end
  end

  refcnt_unary_bank #(.ROWS(LSQ), .NPREG(NPREG), .WPORTS(W)) u_lsq (
    .clk, .rst_n, .wr_en(ren_valid & ren_is_mem), .wr_row(ren_lsq), .wr_vec(src_vec),
    .clr_mask(lsq_clr_mask), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(lsq_col));

  refcnt_unary_bank #(.ROWS(IQ), .NPREG(NPREG), .WPORTS(W)) u_iq (
    .clk, .rst_n, .wr_en(ren_valid & ~ren_is_mem), .wr_row(ren_iq), .wr_vec(src_vec),
    .clr_mask(iq_clr_mask), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(iq_col));

  refcnt_unary_bank #(.ROWS(NLREG), .NPREG(NPREG), .WPORTS(W), .INIT_IDENTITY(1'b1)) u_rmap (
    .clk, .rst_n, .wr_en(ren_valid & ren_has_dest), .wr_row(ren_lreg), .wr_vec(dst_vec),
    .clr_mask('0), .load_en(restore_en), .load_rows(ck_rd), .rows_q(rmap_rows),
    .col_or(rmap_col));

  refcnt_ckpt_bank #(.NCKPT(NCKPT), .SUB(NLREG), .NPREG(NPREG)) u_ckpt (
    .clk, .rst_n, .wr_en(ckpt_create), .wr_idx(ckpt_idx), .wr_data(rmap_rows),
    .clr_mask(ckpt_clr_mask), .rd_idx(restore_idx), .rd_data(ck_rd), .col_or(ck_col));

  assign in_use = lsq_col | iq_col | rmap_col | ck_col;

  refcnt_alloc #(.NPREG(NPREG), .W(W)) u_alloc (
    .in_use, .free_valid, .free_preg);

endmodule

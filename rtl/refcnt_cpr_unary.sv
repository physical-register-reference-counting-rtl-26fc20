// refcnt_cpr_unary: unary register reference counting for CPR.
//
// CPR frees a register as soon as all instructions that read it have
// executed and it has been over-written in the rename map, and recovers from
// mis-speculation only to map-table checkpoints. A register is therefore in
// use while any of these names it:
//   IQ bank    one row per issue-queue entry: the decoded source registers of
//              an un-executed instruction, written at rename, reset when the
//              instruction executes or is squashed (iq_clr_mask);
//   Ckpt bank  one row per checkpoint: a copy of the RMap bitvector, written
//              when the checkpoint is created, reset when it is released
//              (ckpt_clr_mask);
//   RMap       one bit per register named by the current rename map table.
// in_use is the OR of the three; free registers are picked by priority
// encoders.
//
// Checkpoint creation (ckpt_create) stores the RMap as it stands at the start
// of the cycle, i.e. before the renames of the same cycle, so the instruction
// that starts a checkpoint must be the first of its rename group (own
// choice). Recovery (restore_en) loads the RMap from checkpoint restore_idx;
// the IQ rows of squashed instructions and younger checkpoints are released
// through the two clear masks in the same cycle.
// ren_old is the register each destination over-writes, corrected by the
// rename logic for earlier slots of the same group.
// Timing: all updates at the clock edge. Reset: RMap maps logical i to
// physical i, IQ and Ckpt banks empty.
module refcnt_cpr_unary #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG = refcnt_pkg::NLREG_DEF,
  parameter int unsigned IQ    = refcnt_pkg::IQ_DEF,
  parameter int unsigned NCKPT = refcnt_pkg::NCKPT_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF,
  parameter int unsigned NSRC  = refcnt_pkg::NSRC_DEF
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  // rename
  input  logic [W-1:0]                              ren_valid,
  input  logic [W-1:0][$clog2(IQ)-1:0]              ren_iq,
  input  logic [W-1:0][NSRC-1:0]                    ren_src_valid,
  input  logic [W-1:0][NSRC-1:0][$clog2(NPREG)-1:0] ren_src,
  input  logic [W-1:0]                              ren_has_dest,
  input  logic [W-1:0][$clog2(NPREG)-1:0]           ren_dest,
  input  logic [W-1:0][$clog2(NPREG)-1:0]           ren_old,
  // execute / squash of IQ entries
  input  logic [IQ-1:0]                             iq_clr_mask,
  // checkpoints
  input  logic                                      ckpt_create,
  input  logic [$clog2(NCKPT)-1:0]                  ckpt_idx,
  input  logic [NCKPT-1:0]                          ckpt_clr_mask,
  input  logic                                      restore_en,
  input  logic [$clog2(NCKPT)-1:0]                  restore_idx,
  // register allocation interface
  output logic [NPREG-1:0]                          rmap_vec,
  output logic [NPREG-1:0]                          in_use,
  output logic [W-1:0]                              free_valid,
  output logic [W-1:0][$clog2(NPREG)-1:0]           free_preg
);

  logic [W-1:0][NPREG-1:0]   src_vec;
  logic [NPREG-1:0]          iq_col, ck_col;
  logic [0:0][NPREG-1:0]     ck_rd;

  always_comb begin
    for (int s = 0; s < int'(W); s++) begin
      src_vec[s] = '0;
      for (int k = 0; k < int'(NSRC); k++)
        if (ren_src_valid[s][k]) src_vec[s][ren_src[s][k]] = 1'b1;
    end
  end

  refcnt_unary_bank #(.ROWS(IQ), .NPREG(NPREG), .WPORTS(W)) u_iq (
    .clk, .rst_n, .wr_en(ren_valid), .wr_row(ren_iq), .wr_vec(src_vec),
    .clr_mask(iq_clr_mask), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(iq_col));

  refcnt_ckpt_bank #(.NCKPT(NCKPT), .SUB(1), .NPREG(NPREG)) u_ckpt (
    .clk, .rst_n, .wr_en(ckpt_create), .wr_idx(ckpt_idx), .wr_data(rmap_vec),
    .clr_mask(ckpt_clr_mask), .rd_idx(restore_idx), .rd_data(ck_rd), .col_or(ck_col));

  refcnt_rmap_vec #(.NPREG(NPREG), .NLREG(NLREG), .W(W)) u_rmap (
    .clk, .rst_n, .ren_valid(ren_valid & ren_has_dest), .ren_dest, .ren_old,
    .load_en(restore_en), .load_vec(ck_rd[0]), .vec_q(rmap_vec));

  assign in_use = iq_col | ck_col | rmap_vec;

  refcnt_alloc #(.NPREG(NPREG), .W(W)) u_alloc (
    .in_use, .free_valid, .free_preg);

endmodule

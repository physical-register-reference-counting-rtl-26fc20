// refcnt_top: the five physical register reference counting schemes side by
// side.
//
// Each scheme is a complete register-management back end for one kind of
// processor. It has its own ports and shares no state with the others:
//   nu_*   NoSQ, unary matrix (ROB bank + commit-map bank);
//   cu_*   CPR, unary matrix (IQ bank + checkpoint bank + RMap bitvector);
//   ncu_*  NoSQ/CPR, unary matrix (LSQ, IQ, per-logical-register RMap and
//          checkpoint banks);
//   nb_*   NoSQ, 2-bit binary counters;
//   nh_*   NoSQ/CPR, unary/binary hybrid (unary LSQ and IQ banks, 2-bit
//          counter RMap and checkpoints).
// Every scheme presents the same interface to register allocation: an in-use
// bit per physical register (the OR of everything that references it) and
// W free registers picked from its zeros. Port meanings and timing are those
// of the scheme modules; see their headers.
module refcnt_top #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG = refcnt_pkg::NLREG_DEF,
  parameter int unsigned ROB   = refcnt_pkg::ROB_DEF,
  parameter int unsigned IQ    = refcnt_pkg::IQ_DEF,
  parameter int unsigned LSQ   = refcnt_pkg::LSQ_DEF,
  parameter int unsigned NCKPT = refcnt_pkg::NCKPT_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF,
  parameter int unsigned NSRC  = refcnt_pkg::NSRC_DEF,
  parameter int unsigned CBITS = refcnt_pkg::CBITS_DEF,
  localparam int unsigned PB   = $clog2(NPREG)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // ---------------- NoSQ, unary
  input  logic [W-1:0]                   nu_ren_valid,
  input  logic [W-1:0][$clog2(ROB)-1:0]  nu_ren_rob,
  input  logic [W-1:0]                   nu_ren_has_dest,
  input  logic [W-1:0][PB-1:0]           nu_ren_dest,
  input  logic [W-1:0]                   nu_cmt_valid,
  input  logic [W-1:0][$clog2(ROB)-1:0]  nu_cmt_rob,
  input  logic [W-1:0]                   nu_cmt_has_dest,
  input  logic [W-1:0][$clog2(NLREG)-1:0] nu_cmt_lreg,
  input  logic [W-1:0][PB-1:0]           nu_cmt_dest,
  input  logic [ROB-1:0]                 nu_squash_mask,
  output logic [NPREG-1:0]               nu_in_use,
  output logic [W-1:0]                   nu_free_valid,
  output logic [W-1:0][PB-1:0]           nu_free_preg,
  // ---------------- CPR, unary
  input  logic [W-1:0]                   cu_ren_valid,
  input  logic [W-1:0][$clog2(IQ)-1:0]   cu_ren_iq,
  input  logic [W-1:0][NSRC-1:0]         cu_ren_src_valid,
  input  logic [W-1:0][NSRC-1:0][PB-1:0] cu_ren_src,
  input  logic [W-1:0]                   cu_ren_has_dest,
  input  logic [W-1:0][PB-1:0]           cu_ren_dest,
  input  logic [W-1:0][PB-1:0]           cu_ren_old,
  input  logic [IQ-1:0]                  cu_iq_clr_mask,
  input  logic                           cu_ckpt_create,
  input  logic [$clog2(NCKPT)-1:0]       cu_ckpt_idx,
  input  logic [NCKPT-1:0]               cu_ckpt_clr_mask,
  input  logic                           cu_restore_en,
  input  logic [$clog2(NCKPT)-1:0]       cu_restore_idx,
  output logic [NPREG-1:0]               cu_rmap_vec,
  output logic [NPREG-1:0]               cu_in_use,
  output logic [W-1:0]                   cu_free_valid,
  output logic [W-1:0][PB-1:0]           cu_free_preg,
  // ---------------- NoSQ/CPR, unary
  input  logic [W-1:0]                   ncu_ren_valid,
  input  logic [W-1:0]                   ncu_ren_is_mem,
  input  logic [W-1:0][$clog2(LSQ)-1:0]  ncu_ren_lsq,
  input  logic [W-1:0][$clog2(IQ)-1:0]   ncu_ren_iq,
  input  logic [W-1:0][NSRC-1:0]         ncu_ren_src_valid,
  input  logic [W-1:0][NSRC-1:0][PB-1:0] ncu_ren_src,
  input  logic [W-1:0]                   ncu_ren_has_dest,
  input  logic [W-1:0][$clog2(NLREG)-1:0] ncu_ren_lreg,
  input  logic [W-1:0][PB-1:0]           ncu_ren_dest,
  input  logic [IQ-1:0]                  ncu_iq_clr_mask,
  input  logic [LSQ-1:0]                 ncu_lsq_clr_mask,
  input  logic                           ncu_ckpt_create,
  input  logic [$clog2(NCKPT)-1:0]       ncu_ckpt_idx,
  input  logic [NCKPT-1:0]               ncu_ckpt_clr_mask,
  input  logic                           ncu_restore_en,
  input  logic [$clog2(NCKPT)-1:0]       ncu_restore_idx,
  output logic [NPREG-1:0]               ncu_in_use,
  output logic [W-1:0]                   ncu_free_valid,
  output logic [W-1:0][PB-1:0]           ncu_free_preg,
  // ---------------- NoSQ, binary
  input  logic [W-1:0]                   nb_ren_valid,
  input  logic [W-1:0]                   nb_ren_has_dest,
  input  logic [W-1:0][PB-1:0]           nb_ren_dest,
  output logic [W-1:0]                   nb_ren_ready,
  input  logic [W-1:0]                   nb_dec_valid,
  input  logic [W-1:0][PB-1:0]           nb_dec_preg,
  output logic [W-1:0]                   nb_dec_ready,
  output logic [NPREG-1:0][CBITS-1:0]    nb_cnt,
  output logic [NPREG-1:0]               nb_max_vec,
  output logic [NPREG-1:0]               nb_in_use,
  output logic [W-1:0]                   nb_free_valid,
  output logic [W-1:0][PB-1:0]           nb_free_preg,
  // ---------------- NoSQ/CPR, hybrid
  input  logic [W-1:0]                   nh_ren_valid,
  input  logic [W-1:0]                   nh_ren_is_mem,
  input  logic [W-1:0][$clog2(LSQ)-1:0]  nh_ren_lsq,
  input  logic [W-1:0][$clog2(IQ)-1:0]   nh_ren_iq,
  input  logic [W-1:0][NSRC-1:0]         nh_ren_src_valid,
  input  logic [W-1:0][NSRC-1:0][PB-1:0] nh_ren_src,
  input  logic [W-1:0]                   nh_ren_has_dest,
  input  logic [W-1:0][PB-1:0]           nh_ren_dest,
  input  logic [W-1:0][PB-1:0]           nh_ren_old,
  output logic [W-1:0]                   nh_ren_ready,
  input  logic [IQ-1:0]                  nh_iq_clr_mask,
  input  logic [LSQ-1:0]                 nh_lsq_clr_mask,
  input  logic                           nh_ckpt_create,
  input  logic [$clog2(NCKPT)-1:0]       nh_ckpt_idx,
  input  logic [NCKPT-1:0]               nh_ckpt_clr_mask,
  input  logic                           nh_restore_en,
  input  logic [$clog2(NCKPT)-1:0]       nh_restore_idx,
  output logic [NPREG-1:0][CBITS-1:0]    nh_rmap_cnt,
  output logic [NPREG-1:0]               nh_rmap_max,
  output logic [NPREG-1:0]               nh_in_use,
  output logic [W-1:0]                   nh_free_valid,
  output logic [W-1:0][PB-1:0]           nh_free_preg
);

  refcnt_nosq_unary #(.NPREG(NPREG), .NLREG(NLREG), .ROB(ROB), .W(W)) u_nosq_unary (
    .clk, .rst_n,
    .ren_valid(nu_ren_valid), .ren_rob(nu_ren_rob), .ren_has_dest(nu_ren_has_dest),
    .ren_dest(nu_ren_dest), .cmt_valid(nu_cmt_valid), .cmt_rob(nu_cmt_rob),
    .cmt_has_dest(nu_cmt_has_dest), .cmt_lreg(nu_cmt_lreg), .cmt_dest(nu_cmt_dest),
    .squash_mask(nu_squash_mask), .in_use(nu_in_use), .free_valid(nu_free_valid),
    .free_preg(nu_free_preg));

  refcnt_cpr_unary #(.NPREG(NPREG), .NLREG(NLREG), .IQ(IQ), .NCKPT(NCKPT), .W(W),
                     .NSRC(NSRC)) u_cpr_unary (
    .clk, .rst_n,
    .ren_valid(cu_ren_valid), .ren_iq(cu_ren_iq), .ren_src_valid(cu_ren_src_valid),
    .ren_src(cu_ren_src), .ren_has_dest(cu_ren_has_dest), .ren_dest(cu_ren_dest),
    .ren_old(cu_ren_old), .iq_clr_mask(cu_iq_clr_mask), .ckpt_create(cu_ckpt_create),
    .ckpt_idx(cu_ckpt_idx), .ckpt_clr_mask(cu_ckpt_clr_mask), .restore_en(cu_restore_en),
    .restore_idx(cu_restore_idx), .rmap_vec(cu_rmap_vec), .in_use(cu_in_use),
    .free_valid(cu_free_valid), .free_preg(cu_free_preg));

  refcnt_nosqcpr_unary #(.NPREG(NPREG), .NLREG(NLREG), .IQ(IQ), .LSQ(LSQ), .NCKPT(NCKPT),
                         .W(W), .NSRC(NSRC)) u_nosqcpr_unary (
    .clk, .rst_n,
    .ren_valid(ncu_ren_valid), .ren_is_mem(ncu_ren_is_mem), .ren_lsq(ncu_ren_lsq),
    .ren_iq(ncu_ren_iq), .ren_src_valid(ncu_ren_src_valid), .ren_src(ncu_ren_src),
    .ren_has_dest(ncu_ren_has_dest), .ren_lreg(ncu_ren_lreg), .ren_dest(ncu_ren_dest),
    .iq_clr_mask(ncu_iq_clr_mask), .lsq_clr_mask(ncu_lsq_clr_mask),
    .ckpt_create(ncu_ckpt_create), .ckpt_idx(ncu_ckpt_idx), .ckpt_clr_mask(ncu_ckpt_clr_mask),
    .restore_en(ncu_restore_en), .restore_idx(ncu_restore_idx), .in_use(ncu_in_use),
    .free_valid(ncu_free_valid), .free_preg(ncu_free_preg));

  refcnt_nosq_binary #(.NPREG(NPREG), .NLREG(NLREG), .W(W), .CBITS(CBITS)) u_nosq_binary (
    .clk, .rst_n,
    .ren_valid(nb_ren_valid), .ren_has_dest(nb_ren_has_dest), .ren_dest(nb_ren_dest),
    .ren_ready(nb_ren_ready), .dec_valid(nb_dec_valid), .dec_preg(nb_dec_preg),
    .dec_ready(nb_dec_ready), .cnt(nb_cnt), .max_vec(nb_max_vec), .in_use(nb_in_use),
    .free_valid(nb_free_valid), .free_preg(nb_free_preg));

  refcnt_nosqcpr_hybrid #(.NPREG(NPREG), .NLREG(NLREG), .IQ(IQ), .LSQ(LSQ), .NCKPT(NCKPT),
                          .W(W), .NSRC(NSRC), .CBITS(CBITS)) u_nosqcpr_hybrid (
    .clk, .rst_n,
    .ren_valid(nh_ren_valid), .ren_is_mem(nh_ren_is_mem), .ren_lsq(nh_ren_lsq),
    .ren_iq(nh_ren_iq), .ren_src_valid(nh_ren_src_valid), .ren_src(nh_ren_src),
    .ren_has_dest(nh_ren_has_dest), .ren_dest(nh_ren_dest), .ren_old(nh_ren_old),
    .ren_ready(nh_ren_ready), .iq_clr_mask(nh_iq_clr_mask), .lsq_clr_mask(nh_lsq_clr_mask),
    .ckpt_create(nh_ckpt_create), .ckpt_idx(nh_ckpt_idx), .ckpt_clr_mask(nh_ckpt_clr_mask),
    .restore_en(nh_restore_en), .restore_idx(nh_restore_idx), .rmap_cnt(nh_rmap_cnt),
    .rmap_max(nh_rmap_max), .in_use(nh_in_use), .free_valid(nh_free_valid),
    .free_preg(nh_free_preg));

endmodule

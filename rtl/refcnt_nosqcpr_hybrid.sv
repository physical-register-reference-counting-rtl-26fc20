// refcnt_nosqcpr_hybrid: unary/binary hybrid register reference counting for
// a NoSQ/CPR hybrid.
//
// In the unary NoSQ/CPR scheme most of the storage goes to the map-table
// banks: the rename map and each checkpoint need one bitvector per logical
// register because NoSQ may map several logical registers to one physical
// register. Here the map table is represented instead by one CBITS-bit
// counter per physical register (how many logical registers map to it):
//   RMap       counter array; at rename each slot increments its new
//              destination and decrements the register it over-writes, one
//              increment and one decrement per counter per cycle through a
//              single three-input carry-save adder;
//   Ckpt bank  one counter array per checkpoint, stored as CBITS bit-planes;
//              written whole at checkpoint creation, reset at release, read
//              back whole on recovery; never incremented;
//   LSQ bank   unary, as in the unary scheme (loads/stores, reset at commit);
//   IQ bank    unary, as in the unary scheme (others, reset at execute).
// A register is free when its LSQ and IQ columns are empty and its RMap and
// all checkpoint counters are zero.
//
// Same-cycle limits: rename slot s is accepted (ren_ready) only if all
// earlier valid slots were, no earlier accepted slot increments the same
// register or decrements the same register, and its destination's counter is
// not saturated (max), unless it also over-writes that same register.
// A refused slot and all later ones wait; the LSQ/IQ rows of refused slots
// are not written either.
// Checkpoint creation stores the counters as they stand at the start of the
// cycle (the checkpointed instruction leads its rename group; own choice);
// restore_en loads the counters from checkpoint restore_idx.
// Timing: updates at the clock edge. Reset: registers 0..NLREG-1 count 1.
module refcnt_nosqcpr_hybrid #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG = refcnt_pkg::NLREG_DEF,
  parameter int unsigned IQ    = refcnt_pkg::IQ_DEF,
  parameter int unsigned LSQ   = refcnt_pkg::LSQ_DEF,
  parameter int unsigned NCKPT = refcnt_pkg::NCKPT_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF,
  parameter int unsigned NSRC  = refcnt_pkg::NSRC_DEF,
  parameter int unsigned CBITS = refcnt_pkg::CBITS_DEF
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
  input  logic [W-1:0][$clog2(NPREG)-1:0]           ren_dest,
  input  logic [W-1:0][$clog2(NPREG)-1:0]           ren_old,
  output logic [W-1:0]                              ren_ready,
  // execute (IQ) and commit (LSQ) releases, squash included
  input  logic [IQ-1:0]                             iq_clr_mask,
  input  logic [LSQ-1:0]                            lsq_clr_mask,
  // checkpoints
  input  logic                                      ckpt_create,
  input  logic [$clog2(NCKPT)-1:0]                  ckpt_idx,
  input  logic [NCKPT-1:0]                          ckpt_clr_mask,
  input  logic                                      restore_en,
  input  logic [$clog2(NCKPT)-1:0]                  restore_idx,
  // counters and register allocation interface
  output logic [NPREG-1:0][CBITS-1:0]               rmap_cnt,
  output logic [NPREG-1:0]                          rmap_max,
  output logic [NPREG-1:0]                          in_use,
  output logic [W-1:0]                              free_valid,
  output logic [W-1:0][$clog2(NPREG)-1:0]           free_preg
);

  logic [W-1:0]                ok_s;
  logic [W-1:0][NPREG-1:0]     src_vec, inc_vec, dec_vec;
  logic [NPREG-1:0]            lsq_col, iq_col, rmap_nz, ck_col;
  logic [CBITS-1:0][NPREG-1:0] ck_wr, ck_rd;
  logic [NPREG-1:0][CBITS-1:0] ck_cnt;

  always_comb begin
    logic ok;
    ok = 1'b1;
    for (int s = 0; s < int'(W); s++) begin
      src_vec[s] = '0;
      for (int k = 0; k < int'(NSRC); k++)
        if (ren_src_valid[s][k]) src_vec[s][ren_src[s][k]] = 1'b1;
      if (ren_valid[s] && ren_has_dest[s]) begin
        for (int e = 0; e < s; e++)
          if (ren_valid[e] && ren_has_dest[e] &&
              (ren_dest[e] == ren_dest[s] || ren_old[e] == ren_old[s])) ok = 1'b0;
        if (rmap_max[ren_dest[s]] && ren_dest[s] != ren_old[s]) ok = 1'b0;
      end
      ok_s[s]      = ok;
      inc_vec[s]   = (ok && ren_valid[s] && ren_has_dest[s]) ? (NPREG'(1) << ren_dest[s]) : '0;
      dec_vec[s]   = (ok && ren_valid[s] && ren_has_dest[s]) ? (NPREG'(1) << ren_old[s])  : '0;
    end
  end

  assign ren_ready = ok_s;

  refcnt_unary_bank #(.ROWS(LSQ), .NPREG(NPREG), .WPORTS(W)) u_lsq (
    .clk, .rst_n, .wr_en(ren_valid & ren_is_mem & ok_s), .wr_row(ren_lsq), .wr_vec(src_vec),
    .clr_mask(lsq_clr_mask), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(lsq_col));

  refcnt_unary_bank #(.ROWS(IQ), .NPREG(NPREG), .WPORTS(W)) u_iq (
    .clk, .rst_n, .wr_en(ren_valid & ~ren_is_mem & ok_s), .wr_row(ren_iq), .wr_vec(src_vec),
    .clr_mask(iq_clr_mask), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(iq_col));

  refcnt_ctr_array #(.NPREG(NPREG), .CBITS(CBITS), .NI(W), .ND(W), .NINIT(NLREG),
                     .ONE_PER_CYCLE(1'b1)) u_rmap (
    .clk, .rst_n, .inc_vec, .dec_vec, .load_en(restore_en), .load_cnt(ck_cnt),
    .cnt(rmap_cnt), .max_vec(rmap_max), .in_use(rmap_nz));

  // counters <-> bit-planes
  always_comb begin
    for (int p = 0; p < int'(NPREG); p++)
      for (int b = 0; b < int'(CBITS); b++) begin
        ck_wr[b][p]  = rmap_cnt[p][b];
        ck_cnt[p][b] = ck_rd[b][p];
      end
  end

  refcnt_ckpt_bank #(.NCKPT(NCKPT), .SUB(CBITS), .NPREG(NPREG)) u_ckpt (
    .clk, .rst_n, .wr_en(ckpt_create), .wr_idx(ckpt_idx), .wr_data(ck_wr),
    .clr_mask(ckpt_clr_mask), .rd_idx(restore_idx), .rd_data(ck_rd), .col_or(ck_col));

  assign in_use = lsq_col | iq_col | rmap_nz | ck_col;

  refcnt_alloc #(.NPREG(NPREG), .W(W)) u_alloc (
    .in_use, .free_valid, .free_preg);

endmodule

// refcnt_nosq_unary: unary register reference counting for NoSQ.
//
// NoSQ lets a load that is predicted to read an in-flight store's value share
// the physical register holding the store's data instead of getting a new
// one, so one physical register can be the destination of several in-flight
// instructions and can appear several times in a map table. Registers are
// therefore freed by reference count: a register is free when no in-flight
// instruction and no architected (committed) logical register names it.
//
// Two unary matrix banks hold the references:
//   ROB bank   one row per ROB entry. At rename the instruction writes the
//              decoded form of its destination register (all zeros when it has
//              no destination) into the row of its ROB index.
//   CMap bank  one row per logical register of the commit map table. At
//              commit the instruction writes the same decoded destination into
//              the row of its logical destination, which drops the reference
//              of the register it over-writes. Rows are never reset: every
//              logical register always names a register.
// The ROB bank's reset mask is the committing rows during normal operation
// and the squashed rows on a squash, so any number of instructions is undone
// in one cycle. in_use is the OR of both banks' columns; free_preg/free_valid
// come from priority encoders over its zeros.
//
// Ports: W rename slots (ren_*), W commit slots (cmt_*), squash_mask.
// The rename stage takes free_preg[j] for its j-th allocating instruction;
// a sharing load instead names the store's data register in ren_dest.
// Timing: every update lands at the clock edge; a register written at rename
// shows as in use in the next cycle. Reset maps logical i to physical i.
module refcnt_nosq_unary #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG = refcnt_pkg::NLREG_DEF,
  parameter int unsigned ROB   = refcnt_pkg::ROB_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // rename
  input  logic [W-1:0]                      ren_valid,
  input  logic [W-1:0][$clog2(ROB)-1:0]     ren_rob,
  input  logic [W-1:0]                      ren_has_dest,
  input  logic [W-1:0][$clog2(NPREG)-1:0]   ren_dest,
  // commit
  input  logic [W-1:0]                      cmt_valid,
  input  logic [W-1:0][$clog2(ROB)-1:0]     cmt_rob,
  input  logic [W-1:0]                      cmt_has_dest,
  input  logic [W-1:0][$clog2(NLREG)-1:0]   cmt_lreg,
  input  logic [W-1:0][$clog2(NPREG)-1:0]   cmt_dest,
  // squash: ROB rows of squashed instructions
  input  logic [ROB-1:0]                    squash_mask,
  // register allocation interface
  output logic [NPREG-1:0]                  in_use,
  output logic [W-1:0]                      free_valid,
  output logic [W-1:0][$clog2(NPREG)-1:0]   free_preg
);

  logic [W-1:0][NPREG-1:0]    ren_vec, cmt_vec;
  logic [ROB-1:0]             rob_clr;
  logic [NPREG-1:0]           rob_col, cmap_col;

  always_comb begin
    rob_clr = squash_mask;
    for (int s = 0; s < int'(W); s++) begin
      ren_vec[s] = ren_has_dest[s] ? (NPREG'(1) << ren_dest[s]) : '0;
      cmt_vec[s] = NPREG'(1) << cmt_dest[s];
      if (cmt_valid[s]) rob_clr[cmt_rob[s]] = 1'b1;
    end
  end

  refcnt_unary_bank #(.ROWS(ROB), .NPREG(NPREG), .WPORTS(W)) u_rob (
    .clk, .rst_n, .wr_en(ren_valid), .wr_row(ren_rob), .wr_vec(ren_vec),
    .clr_mask(rob_clr), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(rob_col));

  refcnt_unary_bank #(.ROWS(NLREG), .NPREG(NPREG), .WPORTS(W), .INIT_IDENTITY(1'b1)) u_cmap (
    .clk, .rst_n, .wr_en(cmt_valid & cmt_has_dest), .wr_row(cmt_lreg), .wr_vec(cmt_vec),
    .clr_mask('0), .load_en(1'b0), .load_rows('0), .rows_q(),
    .col_or(cmap_col));

  assign in_use = rob_col | cmap_col;

  refcnt_alloc #(.NPREG(NPREG), .W(W)) u_alloc (
    .in_use, .free_valid, .free_preg);

endmodule

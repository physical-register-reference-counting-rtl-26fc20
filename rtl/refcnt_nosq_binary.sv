// refcnt_nosq_binary: binary register reference counting for NoSQ.
//
// The unary NoSQ scheme keeps a whole column (ROB rows plus commit-map rows)
// per physical register. Here that column is replaced by one small binary
// counter per register: the number of in-flight instructions plus committed
// logical registers that name it. In practice almost all counts are 0 or 1
// and counts above 3 are rare, so CBITS = 2.
//   increments  at rename, from the decoded destination of each renaming
//               instruction (a new register, or the register a bypassed load
//               shares with a store's data producer);
//   decrements  at commit, from the decoded register each committing
//               instruction over-writes in the commit map; after a squash,
//               from the destinations of squashed instructions walked a
//               group per cycle (a binary counter cannot subtract arbitrary
//               amounts in one cycle).
// The decrement slots (dec_*) serve both uses; the caller chooses.
//
// With ONE_PER_CYCLE (default) every counter uses the single carry-save adder
// form, which accepts at most one increment and one decrement per cycle.
// This module enforces that: rename slot s is accepted (ren_ready[s]) only if
// all earlier valid slots were, its destination differs from the
// destinations of earlier accepted slots, and its counter is not saturated
// (max). A held-back slot renames in a later cycle. Decrement slots are
// accepted likewise when their register differs from earlier ones. With
// ONE_PER_CYCLE = 0 the full adder-tree counter is used and only the
// saturation limit holds slots back.
// Acceptance is in order: once a slot is refused, later slots are refused.
// dec_ready[0] is therefore always 1: the oldest decrement has no earlier
// slot to collide with. The port keeps one ready bit per slot for the caller.
// Timing: counters update at the clock edge; ren_ready/dec_ready are
// combinational from the requests and the current counts.
// Reset: count 1 for registers 0..NLREG-1 (logical i maps to physical i).
module refcnt_nosq_binary #(
  parameter int unsigned NPREG         = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG         = refcnt_pkg::NLREG_DEF,
  parameter int unsigned W             = refcnt_pkg::W_DEF,
  parameter int unsigned CBITS         = refcnt_pkg::CBITS_DEF,
  parameter bit          ONE_PER_CYCLE = 1'b1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // rename
  input  logic [W-1:0]                      ren_valid,
  input  logic [W-1:0]                      ren_has_dest,
  input  logic [W-1:0][$clog2(NPREG)-1:0]   ren_dest,
  output logic [W-1:0]                      ren_ready,
  // commit (over-written register) or squash walk (squashed destination)
  input  logic [W-1:0]                      dec_valid,
  input  logic [W-1:0][$clog2(NPREG)-1:0]   dec_preg,
  output logic [W-1:0]                      dec_ready,
  // counters and register allocation interface
  output logic [NPREG-1:0][CBITS-1:0]       cnt,
  output logic [NPREG-1:0]                  max_vec,
  output logic [NPREG-1:0]                  in_use,
  output logic [W-1:0]                      free_valid,
  output logic [W-1:0][$clog2(NPREG)-1:0]   free_preg
);

  logic [W-1:0][NPREG-1:0] inc_vec, dec_vec;

  always_comb begin
    logic ok;
    int   same;
    ok = 1'b1;
    for (int s = 0; s < int'(W); s++) begin
      same = 0;
      for (int e = 0; e < s; e++)
        if (ren_valid[e] && ren_has_dest[e] && ren_dest[e] == ren_dest[s]) same++;
      if (ren_valid[s] && ren_has_dest[s]) begin
        if (ONE_PER_CYCLE) begin
          if (same != 0 || max_vec[ren_dest[s]]) ok = 1'b0;
        end else begin
          if (int'(cnt[ren_dest[s]]) + same + 1 > (1 << CBITS) - 1) ok = 1'b0;
        end
      end
      ren_ready[s] = ok;
      inc_vec[s]   = (ok && ren_valid[s] && ren_has_dest[s]) ? (NPREG'(1) << ren_dest[s]) : '0;
    end
    ok = 1'b1;
    for (int s = 0; s < int'(W); s++) begin
      if (ONE_PER_CYCLE && dec_valid[s])
        for (int e = 0; e < s; e++)
          if (dec_valid[e] && dec_preg[e] == dec_preg[s]) ok = 1'b0;
      dec_ready[s] = ok;
      dec_vec[s]   = (ok && dec_valid[s]) ? (NPREG'(1) << dec_preg[s]) : '0;
    end
  end

  refcnt_ctr_array #(.NPREG(NPREG), .CBITS(CBITS), .NI(W), .ND(W), .NINIT(NLREG),
                     .ONE_PER_CYCLE(ONE_PER_CYCLE)) u_ctr (
    .clk, .rst_n, .inc_vec, .dec_vec, .load_en(1'b0), .load_cnt('0),
    .cnt, .max_vec, .in_use);

  refcnt_alloc #(.NPREG(NPREG), .W(W)) u_alloc (
    .in_use, .free_valid, .free_preg);

endmodule

// tb_refcnt_top: end-to-end test of all five reference counting schemes at
// their default sizes (128 physical registers, 64 logical registers, 16
// checkpoints, two-way rename/commit, 2-bit counters).
//
// Each scheme runs the same five-instruction example
//   A: r1 = r3 + 1   B: m[r2] = r1   C: r3 = m[r2]   D: r1 = r1 + 1
//   E: r3 = r1 + r3
// in which the load C is bypassed from the store B (NoSQ schemes: C's r3
// shares A's register). The expected in-use bits after each step follow from
// the references each scheme keeps; they are written out here by hand.
// Then each scheme's own mechanisms are forced: a one-cycle squash (NoSQ
// unary), checkpoint creation, release and restore (CPR, NoSQ/CPR), a
// saturated counter holding back a rename and two same-cycle updates of one
// counter being split over two cycles (binary NoSQ and the hybrid). Each
// mechanism is counted; one that never happened counts as a failure.
// Logical register i starts mapped to physical register i, so the first free
// registers are 64, 65, ...
module tb_refcnt_top;
  localparam int NPREG = refcnt_pkg::NPREG_DEF, NLREG = refcnt_pkg::NLREG_DEF;
  localparam int ROB = refcnt_pkg::ROB_DEF, IQ = refcnt_pkg::IQ_DEF, LSQ = refcnt_pkg::LSQ_DEF;
  localparam int NCKPT = refcnt_pkg::NCKPT_DEF, W = refcnt_pkg::W_DEF, NSRC = refcnt_pkg::NSRC_DEF;
  localparam int CBITS = refcnt_pkg::CBITS_DEF, PB = $clog2(NPREG);

  logic clk = 0, rst_n = 0;
  // NoSQ unary
  logic [W-1:0] nu_ren_valid, nu_ren_has_dest, nu_cmt_valid, nu_cmt_has_dest, nu_free_valid;
  logic [W-1:0][$clog2(ROB)-1:0] nu_ren_rob, nu_cmt_rob;
  logic [W-1:0][PB-1:0] nu_ren_dest, nu_cmt_dest, nu_free_preg;
  logic [W-1:0][$clog2(NLREG)-1:0] nu_cmt_lreg;
  logic [ROB-1:0] nu_squash_mask;
  logic [NPREG-1:0] nu_in_use;
  // CPR unary
  logic [W-1:0] cu_ren_valid, cu_ren_has_dest, cu_free_valid;
  logic [W-1:0][$clog2(IQ)-1:0] cu_ren_iq;
  logic [W-1:0][NSRC-1:0] cu_ren_src_valid;
  logic [W-1:0][NSRC-1:0][PB-1:0] cu_ren_src;
  logic [W-1:0][PB-1:0] cu_ren_dest, cu_ren_old, cu_free_preg;
  logic [IQ-1:0] cu_iq_clr_mask;
  logic cu_ckpt_create, cu_restore_en;
  logic [$clog2(NCKPT)-1:0] cu_ckpt_idx, cu_restore_idx;
  logic [NCKPT-1:0] cu_ckpt_clr_mask;
  logic [NPREG-1:0] cu_rmap_vec, cu_in_use;
  // NoSQ/CPR unary
  logic [W-1:0] ncu_ren_valid, ncu_ren_is_mem, ncu_ren_has_dest, ncu_free_valid;
  logic [W-1:0][$clog2(LSQ)-1:0] ncu_ren_lsq;
  logic [W-1:0][$clog2(IQ)-1:0] ncu_ren_iq;
  logic [W-1:0][NSRC-1:0] ncu_ren_src_valid;
  logic [W-1:0][NSRC-1:0][PB-1:0] ncu_ren_src;
  logic [W-1:0][$clog2(NLREG)-1:0] ncu_ren_lreg;
  logic [W-1:0][PB-1:0] ncu_ren_dest, ncu_free_preg;
  logic [IQ-1:0] ncu_iq_clr_mask;
  logic [LSQ-1:0] ncu_lsq_clr_mask;
  logic ncu_ckpt_create, ncu_restore_en;
  logic [$clog2(NCKPT)-1:0] ncu_ckpt_idx, ncu_restore_idx;
  logic [NCKPT-1:0] ncu_ckpt_clr_mask;
  logic [NPREG-1:0] ncu_in_use;
  // NoSQ binary
  logic [W-1:0] nb_ren_valid, nb_ren_has_dest, nb_ren_ready, nb_dec_valid, nb_dec_ready, nb_free_valid;
  logic [W-1:0][PB-1:0] nb_ren_dest, nb_dec_preg, nb_free_preg;
  logic [NPREG-1:0][CBITS-1:0] nb_cnt;
  logic [NPREG-1:0] nb_max_vec, nb_in_use;
  // NoSQ/CPR hybrid
  logic [W-1:0] nh_ren_valid, nh_ren_is_mem, nh_ren_has_dest, nh_ren_ready, nh_free_valid;
  logic [W-1:0][$clog2(LSQ)-1:0] nh_ren_lsq;
  logic [W-1:0][$clog2(IQ)-1:0] nh_ren_iq;
  logic [W-1:0][NSRC-1:0] nh_ren_src_valid;
  logic [W-1:0][NSRC-1:0][PB-1:0] nh_ren_src;
  logic [W-1:0][PB-1:0] nh_ren_dest, nh_ren_old, nh_free_preg;
  logic [IQ-1:0] nh_iq_clr_mask;
  logic [LSQ-1:0] nh_lsq_clr_mask;
  logic nh_ckpt_create, nh_restore_en;
  logic [$clog2(NCKPT)-1:0] nh_ckpt_idx, nh_restore_idx;
  logic [NCKPT-1:0] nh_ckpt_clr_mask;
  logic [NPREG-1:0][CBITS-1:0] nh_rmap_cnt;
  logic [NPREG-1:0] nh_rmap_max, nh_in_use;

  refcnt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_share = 0, n_squash = 0, n_ckpt = 0, n_release = 0, n_restore = 0;
  int n_exec = 0, n_commit = 0, n_sat = 0, n_split = 0;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %b expected %b", what, got, exp); end
  endtask

  task automatic idle();
    nu_ren_valid = '0; nu_cmt_valid = '0; nu_squash_mask = '0;
    cu_ren_valid = '0; cu_iq_clr_mask = '0; cu_ckpt_create = 0; cu_restore_en = 0; cu_ckpt_clr_mask = '0;
    ncu_ren_valid = '0; ncu_iq_clr_mask = '0; ncu_lsq_clr_mask = '0; ncu_ckpt_create = 0;
    ncu_restore_en = 0; ncu_ckpt_clr_mask = '0;
    nb_ren_valid = '0; nb_dec_valid = '0;
    nh_ren_valid = '0; nh_iq_clr_mask = '0; nh_lsq_clr_mask = '0; nh_ckpt_create = 0;
    nh_restore_en = 0; nh_ckpt_clr_mask = '0;
  endtask

  task automatic step();
    @(posedge clk); #1;
    @(negedge clk); idle();
  endtask

  // ---------------------------------------------------------------- NoSQ unary
  task automatic nu_ren(int s, int rob, int dest);
    nu_ren_valid[s] = 1; nu_ren_rob[s] = $clog2(ROB)'(rob);
    nu_ren_has_dest[s] = dest >= 0; nu_ren_dest[s] = PB'(dest < 0 ? 0 : dest);
  endtask
  task automatic nu_cmt(int s, int rob, int lreg, int dest);
    nu_cmt_valid[s] = 1; nu_cmt_rob[s] = $clog2(ROB)'(rob); nu_cmt_has_dest[s] = dest >= 0;
    nu_cmt_lreg[s] = $clog2(NLREG)'(lreg); nu_cmt_dest[s] = PB'(dest < 0 ? 0 : dest);
    n_commit++;
  endtask

  task automatic run_nosq_unary();
    int pA, pD, pE;
    pA = nu_free_preg[0];
    expect_bit("nu first free is 64", pA == 64, 1);
    nu_ren(0, 0, pA); nu_ren(1, 1, -1);                 // A, B
    step();
    pD = nu_free_preg[0];
    nu_ren(0, 2, pA); nu_ren(1, 3, pD); n_share++;      // C shares A's register, D
    step();
    pE = nu_free_preg[0];
    nu_ren(0, 4, pE);                                    // E
    step();
    expect_bit("nu A reg in use", nu_in_use[pA], 1);
    expect_bit("nu E reg in use", nu_in_use[pE], 1);
    expect_bit("nu next reg free", nu_in_use[pE + 1], 0);
    nu_cmt(0, 0, 1, pA); nu_cmt(1, 1, 0, -1);            // A, B commit
    step();
    expect_bit("nu p1 free after A", nu_in_use[1], 0);
    nu_cmt(0, 2, 3, pA); nu_cmt(1, 3, 1, pD);            // C, D commit
    step();
    expect_bit("nu p3 free after C", nu_in_use[3], 0);
    expect_bit("nu A reg held by r3", nu_in_use[pA], 1);
    nu_cmt(0, 4, 3, pE);                                 // E commits
    step();
    expect_bit("nu A reg free after E", nu_in_use[pA], 0);
    // two more instructions, squashed in one cycle
    nu_ren(0, 5, nu_free_preg[0]); nu_ren(1, 6, nu_free_preg[1]);
    pA = nu_free_preg[0]; pD = nu_free_preg[1];
    step();
    expect_bit("nu squashed reg in use", nu_in_use[pA] & nu_in_use[pD], 1);
    nu_squash_mask[5] = 1; nu_squash_mask[6] = 1; n_squash++;
    step();
    expect_bit("nu squashed regs free", nu_in_use[pA] | nu_in_use[pD], 0);
  endtask

  // ---------------------------------------------------------------- CPR unary
  task automatic cu_ren(int s, int iq, int s0, int s1, int dest, int old);
    cu_ren_valid[s] = 1; cu_ren_iq[s] = $clog2(IQ)'(iq);
    cu_ren_src_valid[s] = {s1 >= 0, s0 >= 0};
    cu_ren_src[s][0] = PB'(s0 < 0 ? 0 : s0); cu_ren_src[s][1] = PB'(s1 < 0 ? 0 : s1);
    cu_ren_has_dest[s] = dest >= 0; cu_ren_dest[s] = PB'(dest < 0 ? 0 : dest);
    cu_ren_old[s] = PB'(old < 0 ? 0 : old);
  endtask

  task automatic run_cpr_unary();
    int pA, pC, pD, pE;
    pA = cu_free_preg[0];
    cu_ckpt_create = 1; cu_ckpt_idx = 0; n_ckpt++;       // checkpoint at A
    cu_ren(0, 0, 3, -1, pA, 1);                          // A: r1 = r3 + 1
    cu_ren(1, 1, 2, pA, -1, -1);                         // B: m[r2] = r1
    step();
    pC = cu_free_preg[0];
    cu_ren(0, 2, 2, -1, pC, 3);                          // C: r3 = m[r2]
    step();
    pD = cu_free_preg[0]; pE = cu_free_preg[1];
    cu_ckpt_create = 1; cu_ckpt_idx = 1; n_ckpt++;       // checkpoint at D
    cu_ren(0, 3, pA, -1, pD, pA);                        // D: r1 = r1 + 1
    cu_ren(1, 4, pD, pC, pE, pC);                        // E: r3 = r1 + r3
    step();
    expect_bit("cu p1 in checkpoint A", cu_in_use[1], 1);
    expect_bit("cu p1 not in RMap", cu_rmap_vec[1], 0);
    expect_bit("cu A reg in checkpoint D", cu_in_use[pA], 1);
    expect_bit("cu RMap holds E", cu_rmap_vec[pE], 1);
    cu_iq_clr_mask[0] = 1; cu_iq_clr_mask[1] = 1; cu_iq_clr_mask[2] = 1; n_exec += 3;
    cu_ckpt_clr_mask[0] = 1; n_release++;
    step();
    expect_bit("cu p1 free", cu_in_use[1], 0);
    expect_bit("cu p3 free", cu_in_use[3], 0);
    expect_bit("cu A reg still in checkpoint D", cu_in_use[pA], 1);
    // mis-speculation: back to the checkpoint at D, D and E squashed
    cu_restore_en = 1; cu_restore_idx = 1; cu_iq_clr_mask[3] = 1; cu_iq_clr_mask[4] = 1; n_restore++;
    step();
    expect_bit("cu D,E regs free", cu_in_use[pD] | cu_in_use[pE], 0);
    expect_bit("cu RMap restored", cu_rmap_vec[pA] & cu_rmap_vec[pC], 1);
  endtask

  // ---------------------------------------------------------------- NoSQ/CPR unary
  task automatic ncu_ren(int s, bit mem, int q, int s0, int s1, int lreg, int dest);
    ncu_ren_valid[s] = 1; ncu_ren_is_mem[s] = mem;
    ncu_ren_lsq[s] = $clog2(LSQ)'(q); ncu_ren_iq[s] = $clog2(IQ)'(q);
    ncu_ren_src_valid[s] = {s1 >= 0, s0 >= 0};
    ncu_ren_src[s][0] = PB'(s0 < 0 ? 0 : s0); ncu_ren_src[s][1] = PB'(s1 < 0 ? 0 : s1);
    ncu_ren_has_dest[s] = dest >= 0; ncu_ren_lreg[s] = $clog2(NLREG)'(lreg);
    ncu_ren_dest[s] = PB'(dest < 0 ? 0 : dest);
  endtask

  task automatic run_nosqcpr_unary();
    int pA, pD, pE, pF;
    pA = ncu_free_preg[0];
    ncu_ckpt_create = 1; ncu_ckpt_idx = 0; n_ckpt++;
    ncu_ren(0, 0, 0, 3, -1, 1, pA);                      // A (IQ 0)
    ncu_ren(1, 1, 0, 2, pA, 0, -1);                      // B store (LSQ 0)
    step();
    ncu_ren(0, 1, 1, 2, pA, 3, pA); n_share++;           // C load, bypassed: shares A's register
    step();
    pD = ncu_free_preg[0]; pE = ncu_free_preg[1];
    ncu_ckpt_create = 1; ncu_ckpt_idx = 1; n_ckpt++;
    ncu_ren(0, 0, 1, pA, -1, 1, pD);                     // D (IQ 1)
    ncu_ren(1, 0, 2, pD, pA, 3, pE);                     // E (IQ 2)
    step();
    ncu_iq_clr_mask = '1; n_exec += 3;                   // A, D, E execute
    step();
    expect_bit("ncu A reg held by LSQ", ncu_in_use[pA], 1);
    ncu_lsq_clr_mask[0] = 1; ncu_lsq_clr_mask[1] = 1; n_commit += 2;  // B, C commit
    ncu_ckpt_clr_mask[0] = 1; n_release++;
    step();
    expect_bit("ncu p1 free", ncu_in_use[1], 0);
    expect_bit("ncu p3 free", ncu_in_use[3], 0);
    expect_bit("ncu A reg held by checkpoint D", ncu_in_use[pA], 1);
    // checkpoint at F, F renames r2, then recovery to that checkpoint
    ncu_ckpt_create = 1; ncu_ckpt_idx = 2; n_ckpt++;
    pF = ncu_free_preg[0];
    ncu_ren(0, 0, 3, -1, -1, 2, pF);
    step();
    expect_bit("ncu F reg in use", ncu_in_use[pF], 1);
    ncu_restore_en = 1; ncu_restore_idx = 2; ncu_iq_clr_mask[3] = 1; n_restore++;
    step();
    expect_bit("ncu F reg free", ncu_in_use[pF], 0);
    expect_bit("ncu p2 mapped again", ncu_in_use[2], 1);
    ncu_ckpt_clr_mask[1] = 1; n_release++;
    step();
    expect_bit("ncu A reg free", ncu_in_use[pA], 0);
    expect_bit("ncu E reg mapped", ncu_in_use[pE], 1);
  endtask

  // ---------------------------------------------------------------- NoSQ binary
  task automatic run_nosq_binary();
    int pA;
    pA = nb_free_preg[0];
    nb_ren_valid = 2'b01; nb_ren_has_dest = 2'b11; nb_ren_dest[0] = PB'(pA);       // A
    step();
    // two bypassed loads sharing A's register in one group: the second waits
    nb_ren_valid = 2'b11; nb_ren_dest[0] = PB'(pA); nb_ren_dest[1] = PB'(pA);
    #1; expect_bit("nb split", nb_ren_ready == 2'b01, 1); n_split++; n_share++;
    step();
    nb_ren_valid = 2'b01; nb_ren_dest[0] = PB'(pA); n_share++;
    step();
    expect_bit("nb count 3", nb_cnt[pA] == 2'd3, 1);
    expect_bit("nb max", nb_max_vec[pA], 1);
    nb_ren_valid = 2'b01; nb_ren_dest[0] = PB'(pA);
    #1; expect_bit("nb saturated rename held", nb_ren_ready[0], 0); n_sat++;
    step();
    expect_bit("nb count stays 3", nb_cnt[pA] == 2'd3, 1);
    // commits over-writing it
    nb_dec_valid = 2'b11; nb_dec_preg[0] = PB'(pA); nb_dec_preg[1] = PB'(1);
    n_commit += 2;
    step();
    nb_dec_valid = 2'b01; nb_dec_preg[0] = PB'(pA); step();
    nb_dec_valid = 2'b01; nb_dec_preg[0] = PB'(pA); step();
    expect_bit("nb A reg free", nb_in_use[pA], 0);
    expect_bit("nb p1 free", nb_in_use[1], 0);
  endtask

  // ---------------------------------------------------------------- NoSQ/CPR hybrid
  task automatic nh_ren(int s, bit mem, int q, int s0, int s1, int dest, int old);
    nh_ren_valid[s] = 1; nh_ren_is_mem[s] = mem;
    nh_ren_lsq[s] = $clog2(LSQ)'(q); nh_ren_iq[s] = $clog2(IQ)'(q);
    nh_ren_src_valid[s] = {s1 >= 0, s0 >= 0};
    nh_ren_src[s][0] = PB'(s0 < 0 ? 0 : s0); nh_ren_src[s][1] = PB'(s1 < 0 ? 0 : s1);
    nh_ren_has_dest[s] = dest >= 0; nh_ren_dest[s] = PB'(dest < 0 ? 0 : dest);
    nh_ren_old[s] = PB'(old < 0 ? 0 : old);
  endtask

  task automatic run_nosqcpr_hybrid();
    int pA, pD, pE;
    pA = nh_free_preg[0];
    nh_ckpt_create = 1; nh_ckpt_idx = 0; n_ckpt++;
    nh_ren(0, 0, 0, 3, -1, pA, 1);                       // A
    nh_ren(1, 1, 0, 2, pA, -1, -1);                      // B store
    step();
    nh_ren(0, 1, 1, 2, pA, pA, 3); n_share++;            // C load shares A's register (r3)
    step();
    expect_bit("nh count 2", nh_rmap_cnt[pA] == 2'd2, 1);
    pD = nh_free_preg[0]; pE = nh_free_preg[1];
    nh_ckpt_create = 1; nh_ckpt_idx = 1; n_ckpt++;
    nh_ren(0, 0, 1, pA, -1, pD, pA);                     // D over-writes r1 (A's register)
    nh_ren(1, 0, 2, pD, pA, pE, pA);                     // E over-writes r3 (A's register too)
    #1; expect_bit("nh split", nh_ren_ready == 2'b01, 1); n_split++;
    step();
    nh_ren(0, 0, 2, pD, pA, pE, pA);                     // E again
    step();
    expect_bit("nh A count 0", nh_rmap_cnt[pA] == 2'd0, 1);
    expect_bit("nh A reg held", nh_in_use[pA], 1);       // LSQ, IQ and checkpoint D
    // three more bypassed loads share D's register: the third is held by Max
    nh_ren(0, 1, 2, 2, -1, pD, 4); step();
    nh_ren(0, 1, 3, 2, -1, pD, 5); step();
    expect_bit("nh max", nh_rmap_max[pD], 1);
    nh_ren(0, 1, 4, 2, -1, pD, 6);
    #1; expect_bit("nh saturated rename held", nh_ren_ready[0], 0); n_sat++;
    step();
    // everything executes and commits, checkpoint A released
    nh_iq_clr_mask = '1; nh_lsq_clr_mask = '1; nh_ckpt_clr_mask[0] = 1;
    n_exec += 3; n_commit += 4; n_release++;
    step();
    expect_bit("nh p1 free", nh_in_use[1], 0);
    expect_bit("nh A reg held by checkpoint D", nh_in_use[pA], 1);
    // recovery to checkpoint D: counters come back from the checkpoint
    nh_restore_en = 1; nh_restore_idx = 1; n_restore++;
    step();
    expect_bit("nh restored A count 2", nh_rmap_cnt[pA] == 2'd2, 1);
    expect_bit("nh restored D count 0", nh_rmap_cnt[pD] == 2'd0, 1);
    expect_bit("nh D reg free", nh_in_use[pD] | nh_in_use[pE], 0);
    expect_bit("nh p4 mapped again", nh_in_use[4], 1);
  endtask

  initial begin
    idle();
    nu_ren_rob = '0; nu_ren_has_dest = '0; nu_ren_dest = '0; nu_cmt_rob = '0; nu_cmt_has_dest = '0;
    nu_cmt_lreg = '0; nu_cmt_dest = '0;
    cu_ren_iq = '0; cu_ren_src_valid = '0; cu_ren_src = '0; cu_ren_has_dest = '0; cu_ren_dest = '0;
    cu_ren_old = '0; cu_ckpt_idx = '0; cu_restore_idx = '0;
    ncu_ren_is_mem = '0; ncu_ren_lsq = '0; ncu_ren_iq = '0; ncu_ren_src_valid = '0; ncu_ren_src = '0;
    ncu_ren_has_dest = '0; ncu_ren_lreg = '0; ncu_ren_dest = '0; ncu_ckpt_idx = '0; ncu_restore_idx = '0;
    nb_ren_has_dest = '0; nb_ren_dest = '0; nb_dec_preg = '0;
    nh_ren_is_mem = '0; nh_ren_lsq = '0; nh_ren_iq = '0; nh_ren_src_valid = '0; nh_ren_src = '0;
    nh_ren_has_dest = '0; nh_ren_dest = '0; nh_ren_old = '0; nh_ckpt_idx = '0; nh_restore_idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int p = 0; p < NPREG; p++) begin
      checks++;
      if ({nu_in_use[p], cu_in_use[p], ncu_in_use[p], nb_in_use[p], nh_in_use[p]} != {5{p < NLREG}}) failures++;
    end
    run_nosq_unary();
    run_cpr_unary();
    run_nosqcpr_unary();
    run_nosq_binary();
    run_nosqcpr_hybrid();
    $display("shares %0d squashes %0d checkpoints %0d releases %0d restores %0d executes %0d commits %0d saturations %0d splits %0d",
             n_share, n_squash, n_ckpt, n_release, n_restore, n_exec, n_commit, n_sat, n_split);
    checks++;
    if (n_share == 0 || n_squash == 0 || n_ckpt == 0 || n_release == 0 || n_restore == 0 ||
        n_exec == 0 || n_commit == 0 || n_sat == 0 || n_split == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

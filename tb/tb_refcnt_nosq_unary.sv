// tb_refcnt_nosq_unary: self-checking test of the NoSQ unary scheme.
// First the five-instruction example (A: r1=r3+1, B: store r1, C: load into
// r3 that shares A's register, D: r1=r1+1, E: r3=r1+r3) is renamed and
// committed, checking that the shared register stays in use until both
// over-writers commit. Then a random run renames, commits and squashes
// against a model ROB and commit map; the expected in-use vector is the set
// of registers named by live ROB entries or the commit map. Allocated
// registers must be free and distinct. Squashes clear any number of ROB rows
// in one cycle.
module tb_refcnt_nosq_unary;
  localparam int NPREG = 16, NLREG = 4, ROB = 8, W = 2;
  localparam int PB = $clog2(NPREG);
  logic clk = 0, rst_n = 0;
  logic [W-1:0] ren_valid, ren_has_dest, cmt_valid, cmt_has_dest, free_valid;
  logic [W-1:0][$clog2(ROB)-1:0] ren_rob, cmt_rob;
  logic [W-1:0][PB-1:0] ren_dest, cmt_dest, free_preg;
  logic [W-1:0][$clog2(NLREG)-1:0] cmt_lreg;
  logic [ROB-1:0] squash_mask;
  logic [NPREG-1:0] in_use;
  int checks = 0, failures = 0, n_squash = 0, n_share = 0;

  refcnt_nosq_unary #(.NPREG(NPREG), .NLREG(NLREG), .ROB(ROB), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  int rob_dest [ROB];   // -1: no destination
  int rob_lreg [ROB];
  int cmap [NLREG];
  int head = 0, cnt = 0;

  function automatic logic [NPREG-1:0] expected();
    logic [NPREG-1:0] v = '0;
    for (int k = 0; k < cnt; k++) if (rob_dest[(head + k) % ROB] >= 0) v[rob_dest[(head + k) % ROB]] = 1'b1;
    for (int l = 0; l < NLREG; l++) v[cmap[l]] = 1'b1;
    return v;
  endfunction

  task automatic idle();
    ren_valid = '0; cmt_valid = '0; squash_mask = '0;
  endtask

  task automatic check(string what);
    checks++;
    if (in_use !== expected()) begin
      failures++; $display("%s: in_use %b exp %b", what, in_use, expected());
    end
  endtask

  // rename one instruction in slot s; dest < 0: none
  task automatic ren(int s, int dest, int lreg);
    int row = (head + cnt) % ROB;
    ren_valid[s] = 1; ren_rob[s] = $clog2(ROB)'(row);
    ren_has_dest[s] = dest >= 0; ren_dest[s] = PB'(dest < 0 ? 0 : dest);
    rob_dest[row] = dest; rob_lreg[row] = lreg; cnt++;
  endtask

  task automatic cmt(int s);
    cmt_valid[s] = 1; cmt_rob[s] = $clog2(ROB)'(head);
    cmt_has_dest[s] = rob_dest[head] >= 0; cmt_lreg[s] = $clog2(NLREG)'(rob_lreg[head]);
    cmt_dest[s] = PB'(rob_dest[head] < 0 ? 0 : rob_dest[head]);
    if (rob_dest[head] >= 0) cmap[rob_lreg[head]] = rob_dest[head];
    head = (head + 1) % ROB; cnt--;
  endtask

  int pA, pD, pE;
  initial begin
    idle(); ren_rob = '0; ren_has_dest = '0; ren_dest = '0; cmt_rob = '0;
    cmt_has_dest = '0; cmt_lreg = '0; cmt_dest = '0;
    for (int l = 0; l < NLREG; l++) cmap[l] = l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- example: r1,r2,r3 = logical 1,2,3
    @(negedge clk); idle();
    pA = free_preg[0];
    ren(0, pA, 1);          // A: r1 = r3 + 1
    ren(1, -1, 0);          // B: m[r2] = r1 (no destination)
    @(posedge clk); #1 check("A,B");
    @(negedge clk); idle();
    ren(0, pA, 3);          // C: r3 = m[r2], bypassed: shares A's register
    pD = free_preg[0];
    ren(1, pD, 1);          // D: r1 = r1 + 1
    n_share++;
    @(posedge clk); #1 check("C,D");
    @(negedge clk); idle();
    pE = free_preg[0];
    ren(0, pE, 3);          // E: r3 = r1 + r3
    @(posedge clk); #1 check("E");
    checks++; if (!in_use[pA]) failures++;
    @(negedge clk); idle(); cmt(0); cmt(1);   // A, B commit
    @(posedge clk); #1 check("cmt A,B");
    @(negedge clk); idle(); cmt(0); cmt(1);   // C, D commit: D over-writes A's register in r1
    @(posedge clk); #1 check("cmt C,D");
    checks++; if (!in_use[pA]) failures++;    // still named by r3 (C)
    @(negedge clk); idle(); cmt(0);           // E over-writes r3: A's register is free now
    @(posedge clk); #1 check("cmt E");
    checks++; if (in_use[pA]) failures++;
    // ---- random run
    for (int i = 0; i < 3000; i++) begin
      logic [NPREG-1:0] busy;
      int j, nsq;
      @(negedge clk); idle();
      busy = expected();
      if ($urandom % 16 == 0 && cnt > 0) begin
        nsq = 1 + $urandom % cnt;             // squash the youngest nsq entries
        for (int k = 0; k < nsq; k++) squash_mask[(head + cnt - 1 - k) % ROB] = 1'b1;
        cnt -= nsq; n_squash++;
      end else begin
        for (int s = 0; s < W; s++) if (cnt > 0 && $urandom % 2) cmt(s); else break;
        j = 0;
        for (int s = 0; s < W; s++) begin
          if (cnt >= ROB || $urandom % 3 == 0) break;
          if ($urandom % 4 == 0 && cnt > 0 && rob_dest[(head + cnt - 1) % ROB] >= 0) begin
            ren(s, rob_dest[(head + cnt - 1) % ROB], $urandom % NLREG); n_share++;
          end else if ($urandom % 5 == 0) begin
            ren(s, -1, 0);
          end else if (free_valid[j]) begin
            checks++;
            if (busy[free_preg[j]]) begin failures++; $display("allocated busy p%0d", free_preg[j]); end
            ren(s, free_preg[j], $urandom % NLREG); j++;
          end else break;
        end
      end
      @(posedge clk); #1 check("random");
    end
    checks++; if (n_squash == 0 || n_share == 0) failures++;
    $display("squashes %0d shares %0d", n_squash, n_share);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

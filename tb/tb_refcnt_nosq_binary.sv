// tb_refcnt_nosq_binary: self-checking test of the NoSQ binary scheme with
// 2-bit counters. Starts from the five-instruction example (A allocates a
// register, bypassed load C shares it: count 2; D and E commit and
// over-write it: count back to 0). Then random rename groups increment new
// or shared registers and random commit/squash-walk groups decrement
// referenced ones. An integer model gives the expected counts, Max and
// in-use bits, and an independent statement of the acceptance rule gives
// the expected ren_ready/dec_ready: a slot waits when an earlier slot of its
// group names the same register or (renames) its counter is saturated.
module tb_refcnt_nosq_binary;
  localparam int NPREG = 16, NLREG = 4, W = 2, CBITS = 2;
  localparam int PB = $clog2(NPREG);
  logic clk = 0, rst_n = 0;
  logic [W-1:0] ren_valid, ren_has_dest, ren_ready, dec_valid, dec_ready, free_valid;
  logic [W-1:0][PB-1:0] ren_dest, dec_preg, free_preg;
  logic [NPREG-1:0][CBITS-1:0] cnt;
  logic [NPREG-1:0] max_vec, in_use;
  int model [NPREG];
  int checks = 0, failures = 0, n_sat = 0, n_conf = 0, n_dec = 0;

  refcnt_nosq_binary #(.NPREG(NPREG), .NLREG(NLREG), .W(W), .CBITS(CBITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int p = 0; p < NPREG; p++) begin
      checks++;
      if (int'(cnt[p]) != model[p] || max_vec[p] != (model[p] == 3) || in_use[p] != (model[p] != 0)) begin
        failures++; $display("%s: p%0d cnt %0d exp %0d", what, p, cnt[p], model[p]);
      end
    end
  endtask

  int pA;
  initial begin
    ren_valid = '0; ren_has_dest = '0; ren_dest = '0; dec_valid = '0; dec_preg = '0;
    for (int p = 0; p < NPREG; p++) model[p] = p < NLREG;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare("reset");
    // A allocates, C shares A's register in the next group
    @(negedge clk); pA = free_preg[0];
    ren_valid = 2'b01; ren_has_dest = 2'b01; ren_dest[0] = PB'(pA);
    @(posedge clk); #1 model[pA]++; compare("A");
    @(negedge clk); ren_valid = 2'b01; ren_dest[0] = PB'(pA);
    @(posedge clk); #1 model[pA]++; compare("C");
    checks++; if (cnt[pA] != 2) failures++;
    // D and E both over-write it and commit together: only one may decrement per cycle
    @(negedge clk); ren_valid = '0; dec_valid = 2'b11; dec_preg[0] = PB'(pA); dec_preg[1] = PB'(pA);
    #1; checks++; if (dec_ready !== 2'b01) failures++;
    @(posedge clk); #1 model[pA]--; compare("D");
    @(negedge clk); dec_valid = 2'b01;
    @(posedge clk); #1 model[pA]--; compare("E");
    checks++; if (in_use[pA]) failures++;
    dec_valid = '0;
    for (int i = 0; i < 4000; i++) begin
      int pre [NPREG];
      bit ok;
      @(negedge clk);
      pre = model;
      ren_valid = '0; dec_valid = '0;
      for (int s = 0; s < W; s++) begin
        int p;
        ren_valid[s] = $urandom % 3 != 0;
        ren_has_dest[s] = $urandom % 5 != 0;
        if ($urandom % 3 == 0 && free_valid[s]) p = free_preg[s];
        else p = $urandom % 6;                 // share one of a few hot registers
        ren_dest[s] = PB'(p);
      end
      for (int s = 0; s < W; s++) begin
        int p, tries;
        tries = 0;
        do begin p = $urandom % NPREG; tries++; end while (pre[p] == 0 && tries < 50);
        dec_valid[s] = pre[p] != 0 && $urandom % 2;
        dec_preg[s] = PB'(p);
      end
      // a decrement may not take a count below zero (the caller never asks that)
      if (dec_valid[1] && dec_valid[0] && dec_preg[0] == dec_preg[1] && pre[dec_preg[0]] < 2) dec_valid[1] = 0;
      #1;
      ok = 1;
      for (int s = 0; s < W; s++) begin
        if (ren_valid[s] && ren_has_dest[s]) begin
          if (pre[ren_dest[s]] == 3) begin ok = 0; n_sat++; end
          for (int e = 0; e < s; e++) if (ren_valid[e] && ren_has_dest[e] && ren_dest[e] == ren_dest[s]) begin ok = 0; n_conf++; end
        end
        checks++;
        if (ren_ready[s] != ok) begin failures++; $display("cycle %0d ren slot %0d ready %b exp %b", i, s, ren_ready[s], ok); end
        if (ok && ren_valid[s] && ren_has_dest[s]) model[ren_dest[s]]++;
      end
      ok = 1;
      for (int s = 0; s < W; s++) begin
        if (dec_valid[s]) for (int e = 0; e < s; e++) if (dec_valid[e] && dec_preg[e] == dec_preg[s]) ok = 0;
        checks++;
        if (dec_ready[s] != ok) begin failures++; $display("cycle %0d dec slot %0d ready %b exp %b", i, s, dec_ready[s], ok); end
        if (ok && dec_valid[s]) begin model[dec_preg[s]]--; n_dec++; end
      end
      @(posedge clk); #1 compare("random");
    end
    checks++; if (n_sat == 0 || n_conf == 0 || n_dec == 0) failures++;
    $display("saturated %0d conflicts %0d decrements %0d", n_sat, n_conf, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

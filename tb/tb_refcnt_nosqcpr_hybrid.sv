// tb_refcnt_nosqcpr_hybrid: self-checking test of the NoSQ/CPR unary/binary hybrid scheme.
// A random instruction stream is renamed against a model map table in which
// several logical registers may share one physical register (bypassed loads
// take over a register already in the map). Memory instructions hold their
// registers in the LSQ bank until commit, others in the IQ bank until
// execute. Checkpoints are created, released oldest first and restored on
// recovery (younger checkpoints released, some queue entries squashed in the
// same cycle). Every cycle the in-use vector is compared with the set of
// registers named by live LSQ/IQ entries, the current map and the live
// checkpoints' maps; allocated registers must be free.
// In addition the RMap counters must equal the number of logical registers
// mapping to each physical register, and a rename slot must be held back
// exactly when an earlier slot of its group increments the same register or
// decrements the same register, or when its register's counter is
// saturated at the start of the cycle (unless the slot also over-writes that register).
module tb_refcnt_nosqcpr_hybrid;
  localparam int NPREG = 32, NLREG = 4, IQ = 8, LSQ = 8, NCKPT = 4, W = 2, NSRC = 2;
  localparam int PB = $clog2(NPREG);
  logic clk = 0, rst_n = 0;
  logic [W-1:0] ren_valid, ren_is_mem, ren_has_dest, free_valid;
  logic [W-1:0][$clog2(LSQ)-1:0] ren_lsq;
  logic [W-1:0][$clog2(IQ)-1:0] ren_iq;
  logic [W-1:0][NSRC-1:0] ren_src_valid;
  logic [W-1:0][NSRC-1:0][PB-1:0] ren_src;
  logic [W-1:0][$clog2(NLREG)-1:0] ren_lreg;
  logic [W-1:0][PB-1:0] ren_dest, ren_old, free_preg;
  logic [IQ-1:0] iq_clr_mask;
  logic [LSQ-1:0] lsq_clr_mask;
  logic ckpt_create, restore_en;
  logic [$clog2(NCKPT)-1:0] ckpt_idx, restore_idx;
  logic [NCKPT-1:0] ckpt_clr_mask;
  logic [NPREG-1:0] in_use;
  logic [W-1:0] ren_ready;
  logic [NPREG-1:0][1:0] rmap_cnt;
  logic [NPREG-1:0] rmap_max;
  int checks = 0, failures = 0, n_ckpt = 0, n_restore = 0, n_share = 0, n_lsq = 0, n_stall = 0;

  refcnt_nosqcpr_hybrid #(.NPREG(NPREG), .NLREG(NLREG), .IQ(IQ), .LSQ(LSQ), .NCKPT(NCKPT), .W(W), .NSRC(NSRC), .CBITS(2)) dut (
    .clk, .rst_n, .ren_valid, .ren_is_mem, .ren_lsq, .ren_iq, .ren_src_valid, .ren_src,
    .ren_has_dest, .ren_dest, .ren_old, .ren_ready, .iq_clr_mask, .lsq_clr_mask, .ckpt_create,
    .ckpt_idx, .ckpt_clr_mask, .restore_en, .restore_idx, .rmap_cnt, .rmap_max, .in_use,
    .free_valid, .free_preg);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int map [NLREG];
  int map0 [NLREG];   // map at the start of the cycle
  int ckmap [NCKPT][NLREG];
  bit ck_live [NCKPT];
  bit iq_live [IQ];
  bit lsq_live [LSQ];
  logic [NPREG-1:0] iq_vec [IQ];
  logic [NPREG-1:0] lsq_vec [LSQ];
  int ck_head = 0, ck_cnt = 0;

  function automatic logic [NPREG-1:0] vec_of(int m [NLREG]);
    logic [NPREG-1:0] v = '0;
    for (int l = 0; l < NLREG; l++) v[m[l]] = 1'b1;
    return v;
  endfunction

  function automatic int count_of(int m [NLREG], int p);
    int n = 0;
    for (int l = 0; l < NLREG; l++) if (m[l] == p) n++;
    return n;
  endfunction

  function automatic logic [NPREG-1:0] expected();
    logic [NPREG-1:0] v = vec_of(map);
    for (int q = 0; q < IQ; q++) if (iq_live[q]) v |= iq_vec[q];
    for (int q = 0; q < LSQ; q++) if (lsq_live[q]) v |= lsq_vec[q];
    for (int k = 0; k < NCKPT; k++) if (ck_live[k]) v |= vec_of(ckmap[k]);
    return v;
  endfunction

  initial begin
    ren_valid = '0; ren_is_mem = '0; ren_has_dest = '0; ren_lsq = '0; ren_iq = '0;
    ren_src_valid = '0; ren_src = '0; ren_lreg = '0; ren_dest = '0; ren_old = '0;
    iq_clr_mask = '0; lsq_clr_mask = '0; ckpt_create = 0; restore_en = 0;
    ckpt_idx = '0; restore_idx = '0; ckpt_clr_mask = '0;
    for (int l = 0; l < NLREG; l++) map[l] = l;
    for (int q = 0; q < IQ; q++) begin iq_live[q] = 0; iq_vec[q] = '0; end
    for (int q = 0; q < LSQ; q++) begin lsq_live[q] = 0; lsq_vec[q] = '0; end
    for (int k = 0; k < NCKPT; k++) ck_live[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1; checks++; if (in_use !== expected()) failures++;
    for (int i = 0; i < 4000; i++) begin
      logic [NPREG-1:0] busy;
      int j, k, idx;
      @(negedge clk);
      ren_valid = '0; iq_clr_mask = '0; lsq_clr_mask = '0; ckpt_create = 0; restore_en = 0;
      ckpt_clr_mask = '0;
      busy = expected();
      map0 = map;
      if (ck_cnt > 0 && $urandom % 25 == 0) begin
        k = $urandom % ck_cnt;
        idx = (ck_head + k) % NCKPT;
        restore_en = 1; restore_idx = $clog2(NCKPT)'(idx);
        map = ckmap[idx];
        for (int y = k + 1; y < ck_cnt; y++) begin
          ckpt_clr_mask[(ck_head + y) % NCKPT] = 1'b1; ck_live[(ck_head + y) % NCKPT] = 0;
        end
        ck_cnt = k + 1;
        for (int q = 0; q < IQ; q++) if (iq_live[q] && $urandom % 2) begin iq_clr_mask[q] = 1; iq_live[q] = 0; end
        for (int q = 0; q < LSQ; q++) if (lsq_live[q] && $urandom % 2) begin lsq_clr_mask[q] = 1; lsq_live[q] = 0; end
        n_restore++;
      end else begin
        for (int q = 0; q < IQ; q++) if (iq_live[q] && $urandom % 3 == 0) begin iq_clr_mask[q] = 1; iq_live[q] = 0; end
        for (int q = 0; q < LSQ; q++) if (lsq_live[q] && $urandom % 4 == 0) begin lsq_clr_mask[q] = 1; lsq_live[q] = 0; end
        if (ck_cnt > 0 && $urandom % 8 == 0) begin
          ckpt_clr_mask[ck_head] = 1'b1; ck_live[ck_head] = 0;
          ck_head = (ck_head + 1) % NCKPT; ck_cnt--;
        end
        if (ck_cnt < NCKPT && !ckpt_clr_mask[(ck_head + ck_cnt) % NCKPT] && $urandom % 6 == 0) begin
          idx = (ck_head + ck_cnt) % NCKPT;
          ckpt_create = 1; ckpt_idx = $clog2(NCKPT)'(idx);
          ckmap[idx] = map; ck_live[idx] = 1; ck_cnt++; n_ckpt++;
        end
        j = 0;
        for (int s = 0; s < W; s++) begin
          int q, l, d;
          bit mem;
          if ($urandom % 4 == 0) break;
          mem = $urandom % 2;
          q = -1;
          if (mem) begin
            for (int c = 0; c < LSQ; c++) if (!lsq_live[c] && !lsq_clr_mask[c] && !(s > 0 && ren_valid[0] && ren_is_mem[0] && ren_lsq[0] == c)) begin q = c; break; end
          end else begin
            for (int c = 0; c < IQ; c++) if (!iq_live[c] && !iq_clr_mask[c] && !(s > 0 && ren_valid[0] && !ren_is_mem[0] && ren_iq[0] == c)) begin q = c; break; end
          end
          if (q < 0) break;
          ren_is_mem[s] = mem; ren_lsq[s] = $clog2(LSQ)'(q); ren_iq[s] = $clog2(IQ)'(q);
          for (int x = 0; x < NSRC; x++) begin
            ren_src_valid[s][x] = $urandom % 2;
            ren_src[s][x] = PB'(map[$urandom % NLREG]);
          end
          l = $urandom % NLREG;
          ren_has_dest[s] = $urandom % 4 != 0;
          if (ren_has_dest[s]) begin
            if (mem && $urandom % 2) begin
              d = map[$urandom % NLREG];      // bypassed load: share a mapped register
            end else begin
              if (!free_valid[j]) break;
              checks++;
              if (busy[free_preg[j]]) begin failures++; $display("allocated busy p%0d", free_preg[j]); end
              d = free_preg[j];
            end
          end else d = 0;
          ren_lreg[s] = $clog2(NLREG)'(l); ren_dest[s] = PB'(d); ren_old[s] = PB'(map[l]);
          ren_valid[s] = 1;
          // acceptance rule, worked out from the model
          begin
            bit hold;
            hold = 0;
            if (ren_has_dest[s]) begin
              if (s > 0 && ren_valid[0] && ren_has_dest[0] && (ren_dest[0] == PB'(d) || ren_old[0] == PB'(map[l]))) hold = 1;
              if (count_of(map0, d) >= 3 && d != map[l]) hold = 1;
            end
            #0.1;
            checks++;
            if (ren_ready[s] != !hold) begin failures++; $display("cycle %0d slot %0d ready %b hold %b", i, s, ren_ready[s], hold); end
            if (hold) begin ren_valid[s] = 0; n_stall++; break; end
          end
          if (mem) begin
            lsq_vec[q] = '0;
            for (int x = 0; x < NSRC; x++) if (ren_src_valid[s][x]) lsq_vec[q][ren_src[s][x]] = 1'b1;
            lsq_live[q] = 1; n_lsq++;
          end else begin
            iq_vec[q] = '0;
            for (int x = 0; x < NSRC; x++) if (ren_src_valid[s][x]) iq_vec[q][ren_src[s][x]] = 1'b1;
            iq_live[q] = 1;
          end
          if (ren_has_dest[s]) begin
            if (busy[d]) n_share++;
            if (!(mem && busy[d])) j++;
            map[l] = d;
          end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (in_use !== expected()) begin
        failures++; $display("cycle %0d: in_use %b exp %b", i, in_use, expected());
      end
      for (int p = 0; p < NPREG; p++) begin
        checks++;
        if (int'(rmap_cnt[p]) != count_of(map, p)) begin failures++; $display("cycle %0d p%0d cnt %0d exp %0d", i, p, rmap_cnt[p], count_of(map, p)); end
      end
    end
    checks++; if (n_ckpt == 0 || n_restore == 0 || n_share == 0 || n_lsq == 0) failures++;
    $display("checkpoints %0d restores %0d shares %0d lsq %0d held %0d", n_ckpt, n_restore, n_share, n_lsq, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_refcnt_cpr_unary: self-checking test of the CPR unary scheme.
// A random instruction stream is renamed against a model map table: sources
// are read from the model map, destinations take the scheme's free
// registers, IQ entries execute in random order, checkpoints are created,
// released oldest first, and recovery restores the map from a checkpoint
// (releasing younger checkpoints and squashing IQ entries in the same
// cycle). The expected in-use vector is recomputed from the model (IQ
// sources, registers named by live checkpoints' maps, current map) every
// cycle; allocated registers must be free.
module tb_refcnt_cpr_unary;
  localparam int NPREG = 32, NLREG = 4, IQ = 8, NCKPT = 4, W = 2, NSRC = 2;
  localparam int PB = $clog2(NPREG);
  logic clk = 0, rst_n = 0;
  logic [W-1:0] ren_valid, ren_has_dest, free_valid;
  logic [W-1:0][$clog2(IQ)-1:0] ren_iq;
  logic [W-1:0][NSRC-1:0] ren_src_valid;
  logic [W-1:0][NSRC-1:0][PB-1:0] ren_src;
  logic [W-1:0][PB-1:0] ren_dest, ren_old, free_preg;
  logic [IQ-1:0] iq_clr_mask;
  logic ckpt_create, restore_en;
  logic [$clog2(NCKPT)-1:0] ckpt_idx, restore_idx;
  logic [NCKPT-1:0] ckpt_clr_mask;
  logic [NPREG-1:0] rmap_vec, in_use;
  int checks = 0, failures = 0, n_ckpt = 0, n_restore = 0, n_exec = 0;

  refcnt_cpr_unary #(.NPREG(NPREG), .NLREG(NLREG), .IQ(IQ), .NCKPT(NCKPT), .W(W), .NSRC(NSRC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int map [NLREG];
  int ckmap [NCKPT][NLREG];
  bit ck_live [NCKPT];
  bit iq_live [IQ];
  logic [NPREG-1:0] iq_vec [IQ];
  int ck_head = 0, ck_cnt = 0;

  function automatic logic [NPREG-1:0] vec_of(int m [NLREG]);
    logic [NPREG-1:0] v = '0;
    for (int l = 0; l < NLREG; l++) v[m[l]] = 1'b1;
    return v;
  endfunction

  function automatic logic [NPREG-1:0] expected();
    logic [NPREG-1:0] v = vec_of(map);
    for (int q = 0; q < IQ; q++) if (iq_live[q]) v |= iq_vec[q];
    for (int k = 0; k < NCKPT; k++) if (ck_live[k]) v |= vec_of(ckmap[k]);
    return v;
  endfunction

  initial begin
    ren_valid = '0; ren_has_dest = '0; ren_iq = '0; ren_src_valid = '0; ren_src = '0;
    ren_dest = '0; ren_old = '0; iq_clr_mask = '0; ckpt_create = 0; restore_en = 0;
    ckpt_idx = '0; restore_idx = '0; ckpt_clr_mask = '0;
    for (int l = 0; l < NLREG; l++) map[l] = l;
    for (int q = 0; q < IQ; q++) begin iq_live[q] = 0; iq_vec[q] = '0; end
    for (int k = 0; k < NCKPT; k++) ck_live[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1; checks++; if (in_use !== expected() || rmap_vec !== vec_of(map)) failures++;
    for (int i = 0; i < 4000; i++) begin
      logic [NPREG-1:0] busy;
      int j;
      @(negedge clk);
      ren_valid = '0; iq_clr_mask = '0; ckpt_create = 0; restore_en = 0; ckpt_clr_mask = '0;
      busy = expected();
      if (ck_cnt > 0 && $urandom % 25 == 0) begin
        // recovery to the k-th live checkpoint (0 = oldest)
        int k, idx;
        k = $urandom % ck_cnt;
        idx = (ck_head + k) % NCKPT;
        restore_en = 1; restore_idx = $clog2(NCKPT)'(idx);
        map = ckmap[idx];
        for (int y = k + 1; y < ck_cnt; y++) begin
          ckpt_clr_mask[(ck_head + y) % NCKPT] = 1'b1; ck_live[(ck_head + y) % NCKPT] = 0;
        end
        ck_cnt = k + 1;
        for (int q = 0; q < IQ; q++) if (iq_live[q] && $urandom % 2) begin
          iq_clr_mask[q] = 1'b1; iq_live[q] = 0;
        end
        n_restore++;
      end else begin
        for (int q = 0; q < IQ; q++) if (iq_live[q] && $urandom % 3 == 0) begin
          iq_clr_mask[q] = 1'b1; iq_live[q] = 0; n_exec++;
        end
        if (ck_cnt > 0 && $urandom % 8 == 0) begin
          ckpt_clr_mask[ck_head] = 1'b1; ck_live[ck_head] = 0;
          ck_head = (ck_head + 1) % NCKPT; ck_cnt--;
        end
        if (ck_cnt < NCKPT && !ckpt_clr_mask[(ck_head + ck_cnt) % NCKPT] && $urandom % 6 == 0) begin
          int idx;
          idx = (ck_head + ck_cnt) % NCKPT;
          ckpt_create = 1; ckpt_idx = $clog2(NCKPT)'(idx);
          ckmap[idx] = map; ck_live[idx] = 1; ck_cnt++; n_ckpt++;
        end
        j = 0;
        for (int s = 0; s < W; s++) begin
          int q, l;
          q = -1;
          for (int c = 0; c < IQ; c++) if (!iq_live[c] && !iq_clr_mask[c]) begin q = c; break; end
          if (q < 0 || !free_valid[j] || $urandom % 4 == 0) break;
          ren_valid[s] = 1; ren_iq[s] = $clog2(IQ)'(q);
          iq_vec[q] = '0;
          for (int k = 0; k < NSRC; k++) begin
            ren_src_valid[s][k] = $urandom % 2;
            ren_src[s][k] = PB'(map[$urandom % NLREG]);
            if (ren_src_valid[s][k]) iq_vec[q][ren_src[s][k]] = 1'b1;
          end
          iq_live[q] = 1;
          ren_has_dest[s] = $urandom % 4 != 0;
          if (ren_has_dest[s]) begin
            checks++;
            if (busy[free_preg[j]]) begin failures++; $display("allocated busy p%0d", free_preg[j]); end
            l = $urandom % NLREG;
            ren_dest[s] = free_preg[j]; ren_old[s] = PB'(map[l]);
            map[l] = free_preg[j]; j++;
          end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (in_use !== expected() || rmap_vec !== vec_of(map)) begin
        failures++; $display("cycle %0d: in_use %b exp %b rmap %b exp %b rest %b", i, in_use, expected(), rmap_vec, vec_of(map), restore_en);
      end
    end
    checks++; if (n_ckpt == 0 || n_restore == 0 || n_exec == 0) failures++;
    $display("checkpoints %0d restores %0d executes %0d", n_ckpt, n_restore, n_exec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

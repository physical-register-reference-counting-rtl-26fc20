// tb_refcnt_rmap_vec: self-checking test of CPR's RMap bitvector. A model
// map table (logical -> physical) is renamed with fresh registers; the
// expected bitvector is recomputed from the model map table every cycle,
// independently of the set/clear mechanism. Also checks restore.
module tb_refcnt_rmap_vec;
  localparam int NPREG = 16, NLREG = 4, W = 2;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] ren_valid;
  logic [W-1:0][$clog2(NPREG)-1:0] ren_dest, ren_old;
  logic load_en;
  logic [NPREG-1:0] load_vec, vec_q, exp_vec, saved;
  int map [NLREG];
  int map_saved [NLREG];
  logic [NPREG-1:0] used;
  int checks = 0, failures = 0;

  refcnt_rmap_vec #(.NPREG(NPREG), .NLREG(NLREG), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NPREG-1:0] from_map();
    logic [NPREG-1:0] v = '0;
    for (int l = 0; l < NLREG; l++) v[map[l]] = 1'b1;
    return v;
  endfunction

  initial begin
    ren_valid = '0; ren_dest = '0; ren_old = '0; load_en = 0; load_vec = '0;
    for (int l = 0; l < NLREG; l++) map[l] = l;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1; checks++; if (vec_q !== from_map()) failures++;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      load_en = 0;
      if (i % 97 == 10) begin saved = vec_q; map_saved = map; end
      used = from_map();
      for (int s = 0; s < W; s++) begin
        int l, p;
        ren_valid[s] = $urandom;
        l = $urandom % NLREG;
        do p = $urandom % NPREG; while (used[p]);
        if (ren_valid[s]) begin
          ren_old[s] = $clog2(NPREG)'(map[l]);   // over-written, after earlier slots
          ren_dest[s] = $clog2(NPREG)'(p);
          map[l] = p;
          used = from_map();
        end
      end
      if (i % 97 == 50) begin
        ren_valid = '0; load_en = 1; load_vec = saved; map = map_saved;
      end
      @(posedge clk); #1;
      checks++;
      if (vec_q !== from_map()) begin
        failures++; $display("cycle %0d vec %b exp %b", i, vec_q, from_map());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

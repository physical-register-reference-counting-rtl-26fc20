// refcnt_ctr_array: one binary reference counter per physical register.
//
// Increment and decrement requests arrive as decoded bitvectors, one per
// adder-tree input: bit p of inc_vec[k] feeds input i_k of register p's
// counter, bit p of dec_vec[k] feeds input d_k. With ONE_PER_CYCLE set every
// register uses the single carry-save adder counter (ORed inputs; at most one
// increment and one decrement per register per cycle), otherwise the counter
// with a full adder tree (up to NI increments and ND decrements).
// load_en overwrites all counters with load_cnt (checkpoint restore).
// At reset counter p holds 1 for p < NINIT (registers mapped by the initial
// map table, logical i -> physical i) and 0 otherwise (own choice).
//
// Outputs: cnt (all counts), max_vec (saturated counters), in_use (non-zero
// counts). Timing: counters update at the clock edge.
module refcnt_ctr_array #(
  parameter int unsigned NPREG         = refcnt_pkg::NPREG_DEF,
  parameter int unsigned CBITS         = refcnt_pkg::CBITS_DEF,
  parameter int unsigned NI            = refcnt_pkg::W_DEF,
  parameter int unsigned ND            = refcnt_pkg::W_DEF,
  parameter int unsigned NINIT         = refcnt_pkg::NLREG_DEF,
  parameter bit          ONE_PER_CYCLE = 1'b1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NI-1:0][NPREG-1:0]     inc_vec,
  input  logic [ND-1:0][NPREG-1:0]     dec_vec,
  input  logic                         load_en,
  input  logic [NPREG-1:0][CBITS-1:0]  load_cnt,
  output logic [NPREG-1:0][CBITS-1:0]  cnt,
  output logic [NPREG-1:0]             max_vec,
  output logic [NPREG-1:0]             in_use
);

  for (genvar p = 0; p < int'(NPREG); p++) begin : g_reg
    logic [NI-1:0] inc_p;
    logic [ND-1:0] dec_p;
    logic [CBITS-1:0] init_p;
    for (genvar k = 0; k < int'(NI); k++) begin : g_i
      assign inc_p[k] = inc_vec[k][p];
    end
    for (genvar k = 0; k < int'(ND); k++) begin : g_d
      assign dec_p[k] = dec_vec[k][p];
    end
    assign init_p = (p < int'(NINIT)) ? CBITS'(1) : '0;
    if (ONE_PER_CYCLE) begin : g_single
      refcnt_ctr_single #(.CBITS(CBITS), .NI(NI), .ND(ND)) u_ctr (
        .clk, .rst_n, .inc(inc_p), .dec(dec_p), .load_en, .load_val(load_cnt[p]),
        .init_val(init_p), .cnt(cnt[p]), .max(max_vec[p]), .in_use(in_use[p]));
    end else begin : g_tree
      refcnt_ctr_tree #(.CBITS(CBITS), .NI(NI), .ND(ND)) u_ctr (
        .clk, .rst_n, .inc(inc_p), .dec(dec_p), .load_en, .load_val(load_cnt[p]),
        .init_val(init_p), .cnt(cnt[p]), .max(max_vec[p]), .in_use(in_use[p]));
    end
  end

endmodule

// refcnt_ctr_tree: binary reference counter for one physical register with a
// separate adder-tree input for every increment and decrement.
//
// The counter is a CBITS-bit register. Each increment input adds 1; each
// decrement input is sign-extended to CBITS bits (all ones, i.e. -1) and
// added. With two increments (i0, i1) and two decrements (d0, d1) the five
// operands (counter, i0, i1, d0, d1) are reduced by a chain of three
// carry-save adders followed by one carry-propagate adder, as in the
// counter with a full adder tree of the design description. Other NI/ND
// values give a longer or shorter chain of carry-save adders.
// max is the AND of the counter bits (saturated: no further increment may be
// accepted); in_use is their OR (non-zero count, register allocated).
// Keeping the count inside 0..2^CBITS-1 is the user's job; an assertion flags
// an overflow or underflow.
//
// load_en overwrites the counter (checkpoint restore); init_val is the value
// taken at reset. Timing: one update per clock edge, outputs from the
// register.
module refcnt_ctr_tree #(
  parameter int unsigned CBITS = refcnt_pkg::CBITS_DEF,
  parameter int unsigned NI    = 2,
  parameter int unsigned ND    = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NI-1:0]    inc,
  input  logic [ND-1:0]    dec,
  input  logic             load_en,
  input  logic [CBITS-1:0] load_val,
  input  logic [CBITS-1:0] init_val,
  output logic [CBITS-1:0] cnt,
  output logic             max,
  output logic             in_use
);

  localparam int unsigned NOP = 1 + NI + ND;   // operands including the counter

  logic [NOP-1:0][CBITS-1:0] op;
  // partial sum / carry after each carry-save stage
  logic [NOP-1:0][CBITS-1:0] ps, pc;
  logic [CBITS-1:0]          nxt;

  always_comb begin
    for (int k = 0; k < int'(NI); k++) op[k] = CBITS'(inc[k]);
    for (int k = 0; k < int'(ND); k++) op[NI+k] = {CBITS{dec[k]}};
    op[NOP-1] = cnt;
  end

  // stage 0 starts from the first two operands, every further operand enters
  // one carry-save adder
  assign ps[1] = op[0];
  assign pc[1] = op[1];
  for (genvar g = 2; g < int'(NOP); g++) begin : g_cs
    refcnt_csa #(.N(CBITS)) u_cs (
      .a(ps[g-1]), .b(pc[g-1]), .c(op[g]), .s(ps[g]), .cy(pc[g]));
  end
  assign ps[0] = '0;
  assign pc[0] = '0;

  assign nxt = ps[NOP-1] + pc[NOP-1];

  always_ff @(posedge clk) begin
    if (!rst_n)       cnt <= init_val;
    else if (load_en) cnt <= load_val;
    else              cnt <= nxt;
  end

  assign max    = &cnt;
  assign in_use = |cnt;

  // the count must stay within its range
  a_range: assert property (@(posedge clk) disable iff (!rst_n || load_en)
    (int'(cnt) + $countones(inc) - $countones(dec) >= 0) &&
    (int'(cnt) + $countones(inc) - $countones(dec) < (1 << CBITS)))
    else $error("refcnt_ctr_tree: counter over- or underflow");

endmodule

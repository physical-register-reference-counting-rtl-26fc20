// refcnt_ctr_single: binary reference counter for one physical register that
// accepts at most one increment and one decrement per cycle.
//
// The NI increment inputs are ORed into a single +1 operand and the ND
// decrement inputs into a single -1 operand (sign-extended to all ones). The
// counter, the increment and the decrement are reduced by one three-input
// carry-save adder and a final carry-propagate adder, so a cycle may add
// +1, -1, or both (no change). The surrounding logic must ensure that no two
// increment (or two decrement) inputs are set in the same cycle; an assertion
// checks this and the counter range.
// max (AND of the bits) tells that no further increment may be accepted;
// in_use (OR of the bits) is the register's allocated bit.
//
// load_en overwrites the counter (checkpoint restore), init_val is the reset
// value. Timing: one update per clock edge.
module refcnt_ctr_single #(
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

  logic             inc_or, dec_or;
  logic [CBITS-1:0] s, cy, nxt;

  assign inc_or = |inc;
  assign dec_or = |dec;

  refcnt_csa #(.N(CBITS)) u_cs (
    .a(cnt), .b(CBITS'(inc_or)), .c({CBITS{dec_or}}), .s(s), .cy(cy));

  assign nxt = s + cy;

  always_ff @(posedge clk) begin
    if (!rst_n)       cnt <= init_val;
    else if (load_en) cnt <= load_val;
    else              cnt <= nxt;
  end

  assign max    = &cnt;
  assign in_use = |cnt;

  a_one: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(inc) <= 1 && $countones(dec) <= 1)
    else $error("refcnt_ctr_single: more than one increment or decrement");
  a_range: assert property (@(posedge clk) disable iff (!rst_n || load_en)
    !(inc_or && !dec_or && max) && !(dec_or && !inc_or && !in_use))
    else $error("refcnt_ctr_single: counter over- or underflow");

endmodule

// refcnt_csa: N-bit carry-save adder (3:2 compressor), the "cs+" block of a
// binary reference counter's adder tree. Returns a sum word and a carry word
// (already shifted left by one) whose modulo-2^N sum equals a + b + c.
// Because of the shift, cy[0] is always 0, and the top majority bit falls off
// the N-bit word. That is harmless: the counters built from it never leave
// 0..2^N-1.
// Purely combinational.
module refcnt_csa #(
  parameter int unsigned N = refcnt_pkg::CBITS_DEF
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);
  logic [N-1:0] maj;
  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  if (N > 1) begin : g_sh
    assign cy = {maj[N-2:0], 1'b0};
  end else begin : g_one
    assign cy = 1'b0;
  end
endmodule

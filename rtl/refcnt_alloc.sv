// refcnt_alloc: register allocation straight out of the in-use bitvector.
//
// The reference counting banks present one bit per physical register
// (1 = referenced). Free registers are the zeros of that vector. W cascaded
// priority encoders pick the W lowest-numbered free registers: encoder k
// searches the free vector with the registers chosen by encoders 0..k-1
// masked off. free_valid[k] is 0 when fewer than k+1 registers are free.
// The rename stage hands free_preg[j] to the j-th instruction of its group
// that needs a new register; the chosen register becomes referenced one clock
// later, when the instruction's increment has been written.
//
// Purely combinational. Lowest-index-first order is this design's choice.
module refcnt_alloc #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF
) (
  input  logic [NPREG-1:0]                 in_use,
  output logic [W-1:0]                     free_valid,
  output logic [W-1:0][$clog2(NPREG)-1:0]  free_preg
);

  always_comb begin
    logic [NPREG-1:0] avail;
    avail      = ~in_use;
    free_valid = '0;
    free_preg  = '0;
    for (int k = 0; k < int'(W); k++) begin
      for (int p = int'(NPREG) - 1; p >= 0; p--)
        if (avail[p]) begin
          free_valid[k] = 1'b1;
          free_preg[k]  = $clog2(NPREG)'(p);
        end
      if (free_valid[k]) avail[free_preg[k]] = 1'b0;
    end
  end

endmodule

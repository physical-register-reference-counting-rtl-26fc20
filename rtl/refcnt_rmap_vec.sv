// refcnt_rmap_vec: CPR's RMap bitvector.
//
// One bit per physical register, set while the register is named in the
// current rename map table. At rename, each slot that writes a destination
// sets the bit of its newly mapped register and clears the bit of the
// register it over-writes in the map table. Slots are applied in program
// order (slot 0 first), so when a later slot over-writes a register mapped
// by an earlier slot of the same group the bit ends up cleared; the rename
// logic supplies ren_old already corrected for such in-group dependences.
// This single-vector form is only valid when a physical register appears at
// most once in a map table, as in CPR.
//
// load_en restores the vector from a checkpoint (recovery); it wins over
// renames in the same cycle.
//
// Timing: updates at the clock edge. Reset maps logical register i to
// physical register i, so bits 0..NLREG-1 are set (own choice).
module refcnt_rmap_vec #(
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF,
  parameter int unsigned NLREG = refcnt_pkg::NLREG_DEF,
  parameter int unsigned W     = refcnt_pkg::W_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [W-1:0]                      ren_valid,
  input  logic [W-1:0][$clog2(NPREG)-1:0]   ren_dest,
  input  logic [W-1:0][$clog2(NPREG)-1:0]   ren_old,
  input  logic                              load_en,
  input  logic [NPREG-1:0]                  load_vec,
  output logic [NPREG-1:0]                  vec_q
);

  logic [NPREG-1:0] vec_d;

  always_comb begin
    vec_d = vec_q;
    for (int s = 0; s < int'(W); s++)
      if (ren_valid[s]) begin
        vec_d[ren_old[s]]  = 1'b0;
        vec_d[ren_dest[s]] = 1'b1;
      end
    if (load_en) vec_d = load_vec;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int c = 0; c < int'(NPREG); c++) vec_q[c] <= (c < int'(NLREG));
    end else begin
      vec_q <= vec_d;
    end
  end

endmodule

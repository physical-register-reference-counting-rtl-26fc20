// refcnt_ckpt_bank: checkpoint bank of a reference count matrix.
//
// One entry per map-table checkpoint. An entry is an image of the rename map
// table as seen by reference counting, SUB rows of NPREG bits:
//   SUB = 1      CPR: the RMap bitvector (one bit per physical register);
//   SUB = NLREG  NoSQ/CPR, unary: one decoded bitvector per logical register;
//   SUB = CBITS  NoSQ/CPR, hybrid: the array of binary RMap counters, stored
//                as CBITS bit-planes (plane b holds bit b of every counter).
// Checkpoint creation writes a whole entry; checkpoint release (commit or
// squash) resets any set of entries given by clr_mask. A register is
// referenced when any bit of its column in any entry is set; for the counter
// form this is the OR of the counter bits, i.e. "counter non-zero". Entries
// are never incrementally modified. rd_idx/rd_data read one entry back for a
// map-table restore.
//
// Timing: writes and clears act at the clock edge, write winning over a clear
// of the same entry; rd_data and col_or are combinational from the stored
// entries. Reset clears all entries (no checkpoint live).
module refcnt_ckpt_bank #(
  parameter int unsigned NCKPT = refcnt_pkg::NCKPT_DEF,
  parameter int unsigned SUB   = 1,
  parameter int unsigned NPREG = refcnt_pkg::NPREG_DEF
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            wr_en,
  input  logic [$clog2(NCKPT)-1:0]        wr_idx,
  input  logic [SUB-1:0][NPREG-1:0]       wr_data,
  input  logic [NCKPT-1:0]                clr_mask,
  input  logic [$clog2(NCKPT)-1:0]        rd_idx,
  output logic [SUB-1:0][NPREG-1:0]       rd_data,
  output logic [NPREG-1:0]                col_or
);

  logic [NCKPT-1:0][SUB-1:0][NPREG-1:0] ent_q;

  for (genvar k = 0; k < int'(NCKPT); k++) begin : g_ent
    always_ff @(posedge clk) begin
      if (!rst_n)
        ent_q[k] <= '0;
      else if (wr_en && wr_idx == $clog2(NCKPT)'(k))
        ent_q[k] <= wr_data;
      else if (clr_mask[k])
        ent_q[k] <= '0;
    end
  end

  assign rd_data = ent_q[rd_idx];

  always_comb begin
    col_or = '0;
    for (int k = 0; k < int'(NCKPT); k++)
      for (int s = 0; s < int'(SUB); s++)
        col_or |= ent_q[k][s];
  end

endmodule

// refcnt_unary_bank: one bank of a unary reference count matrix.
//
// Each row stands for one entity that can reference physical registers (an
// ROB, IQ or LSQ entry, or a logical register of a map table); each column is
// one physical register. A register's reference count is the number of ones in
// its column; only "zero or not" matters, so the bank reduces every column
// with an OR into col_or (1 = referenced, not free).
//
// Increments are row writes: up to WPORTS rows per cycle are overwritten with
// a bitvector (typically the decoded destination or source registers).
// Decrements are row resets: any set of rows named in clr_mask is cleared in
// the same cycle, which is what allows a whole squash to be undone at once.
// The bank is never read row by row; rows_q exposes the matrix only so that a
// map-table bank can be copied into a checkpoint. load_en replaces the whole
// matrix (map-table restore).
//
// Timing: all updates take effect at the rising clock edge; col_or is a pure
// function of the stored matrix. Priority within one cycle: load_en, then row
// writes (a higher port wins on the same row), then clears, so a row that is
// cleared and rewritten in the same cycle holds the new vector (own choice).
// Reset: all rows zero, or, with INIT_IDENTITY, row i holds register i
// (logical register i initially mapped to physical register i; own choice).
module refcnt_unary_bank #(
  parameter int unsigned ROWS          = 64,
  parameter int unsigned NPREG         = refcnt_pkg::NPREG_DEF,
  parameter int unsigned WPORTS        = refcnt_pkg::W_DEF,
  parameter bit          INIT_IDENTITY = 1'b0
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [WPORTS-1:0]                    wr_en,
  input  logic [WPORTS-1:0][$clog2(ROWS)-1:0]  wr_row,
  input  logic [WPORTS-1:0][NPREG-1:0]         wr_vec,
  input  logic [ROWS-1:0]                      clr_mask,
  input  logic                                 load_en,
  input  logic [ROWS-1:0][NPREG-1:0]           load_rows,
  output logic [ROWS-1:0][NPREG-1:0]           rows_q,
  output logic [NPREG-1:0]                     col_or
);

  // one write decoder per row: the highest port that names the row wins
  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    logic             hit;
    logic [NPREG-1:0] wdata;
    always_comb begin
      hit   = 1'b0;
      wdata = '0;
      for (int p = 0; p < int'(WPORTS); p++)
        if (wr_en[p] && wr_row[p] == $clog2(ROWS)'(r)) begin
          hit   = 1'b1;
          wdata = wr_vec[p];
        end
    end
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int c = 0; c < int'(NPREG); c++)
          rows_q[r][c] <= INIT_IDENTITY && (r == c);
      end else if (load_en) begin
        rows_q[r] <= load_rows[r];
      end else if (hit) begin
        rows_q[r] <= wdata;
      end else if (clr_mask[r]) begin
        rows_q[r] <= '0;
      end
    end
  end

  always_comb begin
    col_or = '0;
    for (int r = 0; r < int'(ROWS); r++) col_or |= rows_q[r];
  end

endmodule

// tb_refcnt_unary_bank: random self-checking test of one unary reference
// count bank. A behavioural model of the matrix (row writes, masked row
// resets, whole-matrix load, identity reset) is kept in the testbench and
// the bank's rows and column ORs are compared with it after every clock.
module tb_refcnt_unary_bank;
  localparam int ROWS = 8, NPREG = 16, WP = 2;
  logic clk = 0, rst_n = 0;
  logic [WP-1:0] wr_en;
  logic [WP-1:0][$clog2(ROWS)-1:0] wr_row;
  logic [WP-1:0][NPREG-1:0] wr_vec;
  logic [ROWS-1:0] clr_mask;
  logic load_en;
  logic [ROWS-1:0][NPREG-1:0] load_rows, rows_q, model;
  logic [NPREG-1:0] col_or, exp_or;
  int checks = 0, failures = 0;

  refcnt_unary_bank #(.ROWS(ROWS), .NPREG(NPREG), .WPORTS(WP), .INIT_IDENTITY(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    exp_or = '0;
    for (int r = 0; r < ROWS; r++) exp_or |= model[r];
    checks++;
    if (rows_q !== model || col_or !== exp_or) begin
      failures++;
      $display("mismatch: rows %h exp %h / or %h exp %h", rows_q, model, col_or, exp_or);
    end
  endtask

  initial begin
    wr_en = '0; wr_row = '0; wr_vec = '0; clr_mask = '0; load_en = 0; load_rows = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) model[r] = NPREG'(1) << r;
    #1 compare();
    // directed: a single write sets one column, a reset clears it again
    @(negedge clk);
    wr_en = 2'b01; wr_row[0] = 3'd5; wr_vec[0] = 16'h0100;
    @(posedge clk); #1;
    model[5] = 16'h0100;
    compare();
    checks++; if (!col_or[8]) failures++;
    @(negedge clk);
    wr_en = '0; clr_mask = 8'b0010_0000;
    @(posedge clk); #1;
    model[5] = '0;
    compare();
    checks++; if (col_or[8]) failures++;
    // random phase
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wr_en    = WP'($urandom);
      for (int p = 0; p < WP; p++) begin
        wr_row[p] = $clog2(ROWS)'($urandom);
        wr_vec[p] = NPREG'($urandom) & NPREG'($urandom);
      end
      clr_mask  = ROWS'($urandom);
      load_en   = ($urandom % 50) == 0;
      for (int r = 0; r < ROWS; r++) load_rows[r] = NPREG'($urandom);
      @(posedge clk); #1;
      if (load_en) model = load_rows;
      else begin
        for (int r = 0; r < ROWS; r++) if (clr_mask[r]) model[r] = '0;
        for (int p = 0; p < WP; p++) if (wr_en[p]) model[wr_row[p]] = wr_vec[p];
      end
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_refcnt_ckpt_bank: random self-checking test of the checkpoint bank.
// A model of the entries (whole-entry write, masked release, read-back) is
// compared with the bank's read port and column OR every cycle, after a
// directed sequence modelled on a two-checkpoint CPR example.
module tb_refcnt_ckpt_bank;
  localparam int NCKPT = 4, SUB = 3, NPREG = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [$clog2(NCKPT)-1:0] wr_idx, rd_idx;
  logic [SUB-1:0][NPREG-1:0] wr_data, rd_data;
  logic [NCKPT-1:0] clr_mask;
  logic [NPREG-1:0] col_or, exp_or;
  logic [NCKPT-1:0][SUB-1:0][NPREG-1:0] model;
  int checks = 0, failures = 0;

  refcnt_ckpt_bank #(.NCKPT(NCKPT), .SUB(SUB), .NPREG(NPREG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    exp_or = '0;
    for (int k = 0; k < NCKPT; k++) for (int s = 0; s < SUB; s++) exp_or |= model[k][s];
    for (int k = 0; k < NCKPT; k++) begin
      rd_idx = $clog2(NCKPT)'(k);
      #0.1;
      checks++;
      if (rd_data !== model[k]) begin
        failures++; $display("entry %0d: %h exp %h", k, rd_data, model[k]);
      end
    end
    checks++;
    if (col_or !== exp_or) begin failures++; $display("or %b exp %b", col_or, exp_or); end
  endtask

  initial begin
    wr_en = 0; wr_idx = '0; wr_data = '0; clr_mask = '0; rd_idx = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 compare();
    // checkpoint A names p1,p2,p3 (bits 0..2), checkpoint D names p2,p4,p5
    @(negedge clk); wr_en = 1; wr_idx = 0; wr_data = '0; wr_data[0] = 8'b0000_0111;
    @(posedge clk); #1; model[0] = wr_data; compare();
    @(negedge clk); wr_idx = 1; wr_data = '0; wr_data[2] = 8'b0001_1010;
    @(posedge clk); #1; model[1] = wr_data; compare();
    checks++; if (col_or !== 8'b0001_1111) failures++;
    // release A: p1 and p3 become free, p2 still held by D
    @(negedge clk); wr_en = 0; clr_mask = 4'b0001;
    @(posedge clk); #1; model[0] = '0; compare();
    checks++; if (col_or !== 8'b0001_1010) failures++;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_en = $urandom; wr_idx = $clog2(NCKPT)'($urandom);
      for (int s = 0; s < SUB; s++) wr_data[s] = NPREG'($urandom) & NPREG'($urandom);
      clr_mask = NCKPT'($urandom) & NCKPT'($urandom);
      @(posedge clk); #1;
      for (int k = 0; k < NCKPT; k++) if (clr_mask[k]) model[k] = '0;
      if (wr_en) model[wr_idx] = wr_data;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

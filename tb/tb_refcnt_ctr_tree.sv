// tb_refcnt_ctr_tree: self-checking test of the binary counter with a full
// adder tree (two increments, two decrements per cycle). Random legal
// request mixes are applied and the count, max (all ones) and in_use (non
// zero) outputs are compared with an integer model every cycle.
module tb_refcnt_ctr_tree;
  localparam int CBITS = 3, NI = 2, ND = 2;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] inc;
  logic [ND-1:0] dec;
  logic load_en;
  logic [CBITS-1:0] load_val, init_val, cnt;
  logic max, in_use;
  int model, delta;
  int checks = 0, failures = 0;

  refcnt_ctr_tree #(.CBITS(CBITS), .NI(NI), .ND(ND)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (int'(cnt) != model || max != (model == (1 << CBITS) - 1) || in_use != (model != 0)) begin
      failures++; $display("cnt %0d max %b use %b exp %0d", cnt, max, in_use, model);
    end
  endtask

  initial begin
    inc = '0; dec = '0; load_en = 0; load_val = '0; init_val = 3'd1;
    repeat (2) @(posedge clk);
    rst_n = 1; model = 1;
    #1 compare();
    // two increments in one cycle, then two decrements in one cycle
    @(negedge clk); inc = 2'b11;
    @(posedge clk); #1; model = 3; compare();
    @(negedge clk); inc = 2'b00; dec = 2'b11;
    @(posedge clk); #1; model = 1; compare();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      do begin
        inc = NI'($urandom); dec = ND'($urandom);
        delta = $countones(inc) - $countones(dec);
      end while (model + delta < 0 || model + delta > (1 << CBITS) - 1);
      load_en = ($urandom % 40) == 0; load_val = CBITS'($urandom);
      @(posedge clk); #1;
      model = load_en ? int'(load_val) : model + delta;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

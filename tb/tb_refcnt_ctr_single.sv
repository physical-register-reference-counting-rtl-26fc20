// tb_refcnt_ctr_single: self-checking test of the binary counter limited to
// one increment and one decrement per cycle (ORed inputs, one carry-save
// adder). Exercises +1, -1, +1-1 (no change) on every input pair, the Max
// flag at saturation and the in-use flag, against an integer model, with
// the default 2-bit width.
module tb_refcnt_ctr_single;
  localparam int CBITS = 2, NI = 2, ND = 2;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] inc;
  logic [ND-1:0] dec;
  logic load_en;
  logic [CBITS-1:0] load_val, init_val, cnt;
  logic max, in_use;
  int model, delta;
  int checks = 0, failures = 0;

  refcnt_ctr_single #(.CBITS(CBITS), .NI(NI), .ND(ND)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (int'(cnt) != model || max != (model == 3) || in_use != (model != 0)) begin
      failures++; $display("cnt %0d max %b use %b exp %0d", cnt, max, in_use, model);
    end
  endtask

  initial begin
    inc = '0; dec = '0; load_en = 0; load_val = '0; init_val = '0;
    repeat (2) @(posedge clk);
    rst_n = 1; model = 0;
    #1 compare();
    // count up to saturation through i1 and i0, Max must rise at 3
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); inc = (k % 2) ? 2'b01 : 2'b10; dec = '0;
      @(posedge clk); #1; model++; compare();
    end
    checks++; if (!max) failures++;
    // increment and decrement together: no change
    @(negedge clk); inc = 2'b01; dec = 2'b10;
    @(posedge clk); #1; compare();
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      do begin
        inc = 2'b00; dec = 2'b00;
        case ($urandom % 3) 1: inc = 2'b01; 2: inc = 2'b10; default: ; endcase
        case ($urandom % 3) 1: dec = 2'b01; 2: dec = 2'b10; default: ; endcase
        delta = $countones(inc) - $countones(dec);
      end while (model + delta < 0 || model + delta > 3);
      load_en = ($urandom % 40) == 0; load_val = CBITS'($urandom);
      @(posedge clk); #1;
      model = load_en ? int'(load_val) : model + delta;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_refcnt_alloc: self-checking test of the free-list encoders. For random
// and directed in-use vectors the chosen registers must be free, distinct,
// the lowest-numbered free ones, and free_valid must match the number of
// free registers.
module tb_refcnt_alloc;
  localparam int NPREG = 16, W = 2;
  logic [NPREG-1:0] in_use;
  logic [W-1:0] free_valid;
  logic [W-1:0][$clog2(NPREG)-1:0] free_preg;
  int checks = 0, failures = 0;

  refcnt_alloc #(.NPREG(NPREG), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int n;
    int exp [W];
    n = 0;
    for (int p = 0; p < NPREG && n < W; p++) if (!in_use[p]) begin exp[n] = p; n++; end
    for (int k = 0; k < W; k++) begin
      checks++;
      if (free_valid[k] != (k < n) || (k < n && int'(free_preg[k]) != exp[k])) begin
        failures++;
        $display("in_use %b slot %0d: valid %b preg %0d", in_use, k, free_valid[k], free_preg[k]);
      end
    end
  endtask

  initial begin
    // the example free list: p1..p5 and p7 in use, p6 and p8 free
    in_use = 16'hFF00 | 8'b0101_1111; #1; check_one();
    checks++; if (free_preg[0] != 5 || free_preg[1] != 7) failures++;
    in_use = '1; #1; check_one();
    in_use = ~16'h0400; #1; check_one();
    for (int i = 0; i < 2000; i++) begin
      in_use = NPREG'($urandom) | NPREG'($urandom);
      #1; check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

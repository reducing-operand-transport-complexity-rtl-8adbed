// tb_lreg_alloc: checks the per-cluster free list against a reference bit
// vector. After reset all registers are free; random allocations (only when a
// register is offered) and frees of allocated registers are applied and the
// offered register (lowest free), its availability and the free count are
// compared every cycle. Each cycle frees up to COMMIT_W distinct registers
// through the commit-slot ports. Also drains the list completely.
module tb_lreg_alloc;
  import drf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, alloc_en, alloc_ok;
  logic [COMMIT_W-1:0] free_en;
  lreg_t alloc_reg;
  lreg_t free_reg [COMMIT_W];
  logic [LRF_DEPTH-1:0] pick;
  free_cnt_t free_cnt;

  lreg_alloc dut (.*);

  logic [LRF_DEPTH-1:0] fr;
  lreg_t r;
  int checks = 0, failures = 0;

  task automatic compare();
    int lo, n;
    lo = -1; n = 0;
    for (int i = LRF_DEPTH - 1; i >= 0; i--) if (fr[i]) lo = i;
    for (int i = 0; i < LRF_DEPTH; i++) n += fr[i];
    checks++;
    if (free_cnt != free_cnt_t'(n) || alloc_ok != (lo >= 0) || (lo >= 0 && alloc_reg != lreg_t'(lo))) begin
      failures++;
      if (failures < 10) $display("FAIL: cnt %0d/%0d ok %b reg %0d/%0d", free_cnt, n, alloc_ok, alloc_reg, lo);
    end
  endtask

  initial begin
    rst_n = 0; alloc_en = 0; free_en = 0;
    for (int p = 0; p < COMMIT_W; p++) free_reg[p] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1; fr = '1;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      #1 compare();
      alloc_en = alloc_ok && ((k / 500) % 2 == 0 ? $urandom_range(0, 3) != 0 : $urandom_range(0, 3) == 0);
      free_en = 0;
      pick = '0;
      for (int p = 0; p < COMMIT_W; p++) begin
        if ($urandom_range(0, 2) == 0) begin
          int j;
          j = $urandom_range(0, LRF_DEPTH - 1);
          if (!fr[j] && !pick[j] && !(alloc_en && lreg_t'(j) == alloc_reg)) begin
            free_en[p] = 1; free_reg[p] = lreg_t'(j); pick[j] = 1;
          end
        end
      end
      r = alloc_reg;
      @(posedge clk);
      if (alloc_en) fr[r] = 1'b0;
      fr = fr | pick;
    end
    @(negedge clk); free_en = 0;
    #1;
    while (alloc_ok) begin alloc_en = 1; r = alloc_reg; @(posedge clk); fr[r] = 0; @(negedge clk); #1; end
    alloc_en = 0; #1 compare();
    checks++; if (free_cnt != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

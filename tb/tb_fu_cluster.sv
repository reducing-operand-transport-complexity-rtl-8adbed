// tb_fu_cluster: an ALU cluster and a multiplier cluster driven side by side.
// Registers 0..7 are loaded through the transfer port; then batches of
// renamed instructions (random sources among already-defined registers, a
// destination not in use, allocation and enqueue in the same cycle) are sent.
// Every completion (tag and value) is compared with a reference computed in
// the testbench, and the transfer port must read back each result with its
// ready bit set. A chain of four dependent adds must complete in four
// consecutive cycles (one-cycle execution, no bypass bubble). In the
// multiplier cluster a dependent multiply must complete MUL_LAT cycles after
// its producer, while an independent multiply sent behind it issues in the
// meantime and completes two cycles after the producer (the multiplier is
// pipelined, so it finishes before the older dependent one). Instructions
// waiting for a register that a transfer has not yet written must not issue
// until the transfer port writes it.
module tb_fu_cluster;
  import drf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic     enq_valid [2];
  uop_t     enq_uop   [2];
  iq_cnt_t  iq_count  [2];
  logic     iq_full   [2];
  logic     alloc_en  [2];
  lreg_t    alloc_reg [2];
  lreg_t    x_addr    [2];
  logic     x_we      [2];
  word_t    x_wdata   [2];
  word_t    x_rdata   [2];
  logic     x_ready   [2];
  logic     cmp_valid [2];
  rob_idx_t cmp_rob   [2];
  word_t    cmp_value [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    fu_cluster #(.FCLASS(g == 0 ? FC_ALU : FC_MUL)) dut (
      .clk, .rst_n,
      .enq_valid (enq_valid[g]), .enq_uop (enq_uop[g]),
      .iq_count (iq_count[g]), .iq_full (iq_full[g]),
      .alloc_en (alloc_en[g]), .alloc_reg (alloc_reg[g]),
      .x_addr (x_addr[g]), .x_we (x_we[g]), .x_wdata (x_wdata[g]),
      .x_rdata (x_rdata[g]), .x_ready (x_ready[g]),
      .cmp_valid (cmp_valid[g]), .cmp_rob (cmp_rob[g]), .cmp_value (cmp_value[g])
    );
  end

  word_t val [2][LRF_DEPTH];
  word_t expv [2][ROB_DEPTH];
  logic  pend [2][ROB_DEPTH];
  int    cmp_cycle [2][ROB_DEPTH];
  int checks = 0, failures = 0, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    for (int g = 0; g < 2; g++) if (rst_n && cmp_valid[g]) begin
      checks++;
      if (!pend[g][cmp_rob[g]] || cmp_value[g] !== expv[g][cmp_rob[g]]) begin
        failures++;
        if (failures < 10) $display("FAIL cluster %0d tag %0d: got %h expected %h", g, cmp_rob[g], cmp_value[g], expv[g][cmp_rob[g]]);
      end
      pend[g][cmp_rob[g]] = 1'b0;
      cmp_cycle[g][cmp_rob[g]] = cyc;
    end
  end

  function automatic word_t refop(op_e o, word_t a, word_t b);
    case (o)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_XOR: return a ^ b;
      OP_MUL: return a * b;
      default: return 0;
    endcase
  endfunction

  task automatic send(int g, op_e o, int s1, int s2, bit imm, word_t iv, int d, int tag);
    uop_t u;
    word_t b;
    u = '0; u.op = o; u.s1 = lreg_t'(s1); u.s2 = lreg_t'(s2); u.use_imm = imm;
    u.imm = iv; u.dst = lreg_t'(d); u.rob = rob_idx_t'(tag);
    b = imm ? iv : val[g][s2];
    val[g][d] = refop(o, val[g][s1], b);
    expv[g][tag] = val[g][d];
    pend[g][tag] = 1'b1;
    @(negedge clk);
    while (iq_full[g]) @(negedge clk);
    enq_valid[g] = 1; enq_uop[g] = u; alloc_en[g] = 1; alloc_reg[g] = lreg_t'(d);
    @(negedge clk);
    enq_valid[g] = 0; alloc_en[g] = 0;
  endtask

  initial begin
    rst_n = 0;
    for (int g = 0; g < 2; g++) begin
      enq_valid[g] = 0; enq_uop[g] = '0; alloc_en[g] = 0; alloc_reg[g] = 0;
      x_addr[g] = 0; x_we[g] = 0; x_wdata[g] = 0;
      for (int t = 0; t < ROB_DEPTH; t++) pend[g][t] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      for (int g = 0; g < 2; g++) begin
        val[g][r] = $urandom; x_addr[g] = lreg_t'(r); x_we[g] = 1; x_wdata[g] = val[g][r];
      end
    end
    @(negedge clk); x_we[0] = 0; x_we[1] = 0;
    // chain timing: four dependent adds sent back to back
    for (int i = 0; i < 4; i++) begin
      uop_t u;
      u = '0; u.op = OP_ADD; u.s1 = lreg_t'(i == 0 ? 0 : 7 + i); u.use_imm = 1; u.imm = 32'(i + 1);
      u.dst = lreg_t'(8 + i); u.rob = rob_idx_t'(i);
      val[0][8 + i] = val[0][i == 0 ? 0 : 7 + i] + 32'(i + 1);
      expv[0][i] = val[0][8 + i]; pend[0][i] = 1;
      enq_valid[0] = 1; enq_uop[0] = u; alloc_en[0] = 1; alloc_reg[0] = u.dst;
      @(negedge clk);
    end
    enq_valid[0] = 0; alloc_en[0] = 0;
    repeat (4) @(negedge clk);
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (cmp_cycle[0][i] != cmp_cycle[0][i - 1] + 1) begin
        failures++;
        $display("FAIL chain: op %0d completed at %0d, previous at %0d", i, cmp_cycle[0][i], cmp_cycle[0][i - 1]);
      end
    end
    // multiplier latency and pipelining: m0, m1 (depends on m0), m2
    for (int i = 0; i < 3; i++) begin
      uop_t u;
      u = '0; u.op = OP_MUL; u.dst = lreg_t'(8 + i); u.rob = rob_idx_t'(i);
      u.s1 = lreg_t'(i == 1 ? 8 : 2 * i); u.s2 = lreg_t'(2 * i + 1);
      val[1][8 + i] = val[1][u.s1] * val[1][u.s2];
      expv[1][i] = val[1][8 + i]; pend[1][i] = 1;
      enq_valid[1] = 1; enq_uop[1] = u; alloc_en[1] = 1; alloc_reg[1] = u.dst;
      @(negedge clk);
    end
    enq_valid[1] = 0; alloc_en[1] = 0;
    repeat (3 * MUL_LAT + 2) @(negedge clk);
    checks++;
    if (pend[1][0] || pend[1][1] || pend[1][2] ||
        cmp_cycle[1][1] != cmp_cycle[1][0] + MUL_LAT || cmp_cycle[1][2] != cmp_cycle[1][0] + 2) begin
      failures++;
      $display("FAIL multiply timing: completions at %0d %0d %0d", cmp_cycle[1][0], cmp_cycle[1][1], cmp_cycle[1][2]);
    end
    // wakeup: register 8 is reallocated but not yet rewritten, so the
    // producer of 9 and its consumer must both wait for the transfer
    @(negedge clk);
    alloc_en[0] = 1; alloc_reg[0] = 8; val[0][8] = $urandom;
    @(negedge clk);
    alloc_en[0] = 0;
    send(0, OP_ADD, 8, 0, 1, 1, 9, 4);
    send(0, OP_ADD, 9, 0, 1, 2, 10, 5);
    repeat (3) @(negedge clk);
    checks++;
    if (!pend[0][4] || !pend[0][5]) begin failures++; $display("FAIL: issued before operand ready"); end
    x_addr[0] = 8; x_we[0] = 1; x_wdata[0] = val[0][8];
    @(negedge clk);
    x_we[0] = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (pend[0][4] || pend[0][5] || cmp_cycle[0][5] != cmp_cycle[0][4] + 1) begin
      failures++; $display("FAIL: wakeup after transfer");
    end
    // random batches; destinations 12..21 in each cluster, sources among
    // registers 0..7 and the batch's earlier destinations
    for (int b = 0; b < 40; b++) begin
      for (int i = 0; i < 20; i++) begin
        int g, d, tag, s1, s2;
        g = i % 2; d = 12 + i / 2; tag = (b * 20 + i) % ROB_DEPTH;
        s1 = $urandom_range(0, 7 + d - 12); if (s1 >= 8) s1 += 4;
        s2 = $urandom_range(0, 7 + d - 12); if (s2 >= 8) s2 += 4;
        send(g, g == 1 ? OP_MUL : op_e'($urandom_range(0, 1) ? OP_ADD : ($urandom_range(0, 1) ? OP_SUB : OP_XOR)),
             s1, s2, $urandom_range(0, 3) == 0, $urandom, d, tag);
      end
      repeat (12) @(negedge clk);
      for (int g = 0; g < 2; g++) for (int r = 12; r < 22; r++) begin
        x_addr[g] = lreg_t'(r); #1;
        checks++;
        if (!x_ready[g] || x_rdata[g] !== val[g][r]) begin
          failures++;
          if (failures < 10) $display("FAIL readback c%0d r%0d", g, r);
        end
      end
      @(negedge clk);
    end
    for (int g = 0; g < 2; g++) for (int t = 0; t < ROB_DEPTH; t++) begin
      checks++; if (pend[g][t]) begin failures++; $display("FAIL: tag %0d never completed", t); end
    end
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

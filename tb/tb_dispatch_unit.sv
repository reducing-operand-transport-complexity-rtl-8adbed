// tb_dispatch_unit: directed scenarios for the dispatch unit, with the
// testbench standing in for the clusters, the Rcopy queue and the reorder
// buffer (4 ALU clusters 0..3, one multiplier cluster 4).
//  1. an instruction whose sources were never written goes to the least busy
//     ALU cluster without transfers;
//  2. with the Rcopy queue empty, the most recently defined register is
//     eagerly multicast to every other cluster;
//  3. an instruction whose operands are local everywhere goes to the least
//     busy cluster and is renamed to that cluster's copies;
//  4. a multiply whose operand lives in an ALU cluster first issues an
//     on-demand transfer (multicast to every cluster lacking the value), one
//     cycle later the multiply itself is dispatched (one-cycle delay);
//  5. a full multiplier queue, a full reorder buffer and a full Rcopy queue
//     stall dispatch;
//  6. redefining a register reports all its old mappings to the reorder
//     buffer and invalidates them: a later reader elsewhere needs a transfer;
//  7. registers returned by commit are reused;
//  8. when the multiplier cluster has no free register left, dispatch
//     reclaims one by dropping a redundant copy through a silent reorder-buffer
//     entry (one per cycle); once only sole copies are left, one is first
//     transferred out when the Rcopy queue is empty and then dropped; the
//     instruction dispatches once a register comes back.
module tb_dispatch_unit;
  import drf_pkg::*;
  localparam int NCL = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  logic in_valid, in_ready;
  inst_t in_inst;
  iq_cnt_t iq_cnt [NCL];
  logic [NCL-1:0] iq_full, enq_valid, alloc_en, rc_dst_mask, rob_old_valid;
  logic [NCL-1:0] free_en [COMMIT_W];
  uop_t enq_uop;
  lreg_t alloc_reg [NCL];
  logic rcq_empty, rcq_full, rc_valid, rob_full, rob_valid, rob_silent;
  logic [2:0] rc_src_cl;
  lreg_t rc_src_reg;
  lreg_t rc_dst_reg [NCL];
  rob_idx_t rob_idx;
  areg_t rob_dst;
  lreg_t rob_old_reg [NCL];
  seq_t rob_copy_seq;
  lreg_t free_reg [COMMIT_W][NCL];
  logic ev_ondemand, ev_eager, ev_multicast, ev_reclaim, ev_stall;

  dispatch_unit #(.NCL(NCL), .CLASS_MUL(5'b10000)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(string what, bit cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t ready=%b enq=%b rc=%b mask=%b src=%0d stall=%b)", what, $time, in_ready, enq_valid, rc_valid, rc_dst_mask, rc_src_cl, ev_stall);
    end
  endtask

  function automatic inst_t mk(fu_class_e fc, op_e op, int d, int s1, int s2, bit imm, int iv);
    inst_t i;
    i.fclass = fc; i.op = op; i.dst = areg_t'(d); i.src1 = areg_t'(s1); i.src2 = areg_t'(s2);
    i.use_imm = imm; i.imm = word_t'(iv);
    return i;
  endfunction

  // present an instruction at the negedge and let the outputs settle
  task automatic present(inst_t i);
    @(negedge clk);
    in_valid = 1; in_inst = i;
    #1;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 0;
    #1;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_inst = '0; iq_full = 0; rcq_empty = 0; rcq_full = 0;
    rob_full = 0; rob_idx = 0;
    for (int k = 0; k < COMMIT_W; k++) begin
      free_en[k] = 0;
      for (int c = 0; c < NCL; c++) free_reg[k][c] = 0;
    end
    for (int c = 0; c < NCL; c++) iq_cnt[c] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // 1: r1 = r0 + 5, cluster 1 least busy
    iq_cnt[0] = 2;
    present(mk(FC_ALU, OP_ADD, 1, 0, 0, 1, 5));
    chk("1 dispatched", in_ready && enq_valid == 5'b00010 && !rc_valid);
    chk("1 renamed", enq_uop.s1_zero && enq_uop.use_imm && enq_uop.dst == 0 && enq_uop.rob == 0);
    chk("1 rob entry", rob_valid && rob_dst == 1 && rob_old_valid == 0 && rob_copy_seq == 0);
    chk("1 alloc", alloc_en == 5'b00010);

    // 2: eager multicast of r1 from cluster 1 when the Rcopy queue is empty
    idle();
    rcq_empty = 1; #1;
    chk("2 eager", rc_valid && ev_eager && ev_multicast && !ev_ondemand);
    chk("2 eager route", rc_src_cl == 1 && rc_src_reg == 0 && rc_dst_mask == 5'b11101);
    chk("2 eager alloc", alloc_en == 5'b11101 && rc_dst_reg[0] == 0 && rc_dst_reg[4] == 0);
    @(negedge clk); rcq_empty = 0; #1;
    chk("2 no repeat", !rc_valid);

    // 3: r2 = r1 + r1, all clusters hold r1; least busy is cluster 2
    iq_cnt[0] = 3; iq_cnt[1] = 4; iq_cnt[2] = 0; iq_cnt[3] = 1;
    rob_idx = 1;
    present(mk(FC_ALU, OP_ADD, 2, 1, 1, 0, 0));
    chk("3 dispatched to 2", in_ready && enq_valid == 5'b00100);
    chk("3 renamed", !enq_uop.s1_zero && enq_uop.s1 == 0 && enq_uop.s2 == 0 && enq_uop.dst == 1);
    chk("3 copy seq", rob_copy_seq == 1);

    // 4: r3 = r2 * r1: r2 only in cluster 2 -> on-demand transfer first
    rob_idx = 2;
    present(mk(FC_MUL, OP_MUL, 3, 2, 1, 0, 0));
    chk("4 on-demand", !in_ready && rc_valid && ev_ondemand && ev_multicast);
    chk("4 route", rc_src_cl == 2 && rc_src_reg == 1 && rc_dst_mask == 5'b11011);
    @(negedge clk); #1;
    chk("4 dispatched next cycle", in_ready && enq_valid == 5'b10000 && !rc_valid);
    chk("4 renamed", enq_uop.s1 == 1 && enq_uop.s2 == 0 && enq_uop.dst == 2);
    chk("4 copy seq", rob_copy_seq == 2);

    // 5: stalls
    iq_full = 5'b10000;
    present(mk(FC_MUL, OP_MUL, 4, 3, 3, 0, 0));
    chk("5 iq full stall", !in_ready && ev_stall && !rc_valid);
    iq_full = 0; rob_full = 1; #1;
    chk("5 rob full stall", !in_ready && ev_stall);
    rob_full = 0; #1;
    chk("5 resumes", in_ready && enq_valid == 5'b10000);
    // r5 = r4 + r1 on an ALU cluster: r4 is only in cluster 4, Rcopy full
    rob_idx = 4;
    present(mk(FC_ALU, OP_ADD, 5, 4, 1, 0, 0));
    rcq_full = 1; #1;
    chk("5 rcopy full stall", !in_ready && !rc_valid && ev_stall);
    rcq_full = 0; #1;
    chk("5 transfer issued", rc_valid && ev_ondemand && rc_src_cl == 4);
    @(negedge clk); #1;
    chk("5 dispatched", in_ready);

    // 6: redefine r1: every old mapping goes to the reorder buffer
    idle();
    iq_cnt[0] = 0; iq_cnt[1] = 0; iq_cnt[2] = 0; iq_cnt[3] = 0;
    present(mk(FC_ALU, OP_ADD, 1, 0, 0, 1, 7));
    chk("6 old mappings", in_ready && rob_old_valid == 5'b11111 && rob_old_reg[1] == 0 && rob_old_reg[0] == 0);
    chk("6 to cluster 0", enq_valid == 5'b00001);
    // r6 = r1 * r1 on the multiplier must fetch the new r1 from cluster 0
    present(mk(FC_MUL, OP_MUL, 6, 1, 1, 0, 0));
    chk("6 transfer of new value", rc_valid && ev_ondemand && rc_src_cl == 0 && rc_dst_mask[4]);
    @(negedge clk); #1;
    chk("6 dispatched", in_ready);

    // 7: commit frees register 0 of cluster 3; it is handed out again
    idle();
    @(negedge clk);
    free_en[1] = 5'b01000; free_reg[1][3] = 0;
    @(negedge clk);
    free_en[1] = 0; #1;
    chk("7 reuse", alloc_reg[3] == 0);

    // 8: fill the multiplier cluster's registers; dispatch must then drop a
    // copy that other clusters also hold (r2) through a silent entry
    rcq_empty = 0; rob_idx = 8;
    begin
      int n;
      lreg_t freed;
      n = 0;
      while (n < 40) begin
        present(mk(FC_MUL, OP_MUL, 8 + n % 20, 1, 0, 1, 3));
        if (!in_ready) break;
        n++;
      end
      chk("8 reclaim", !in_ready && ev_reclaim && rob_valid && rob_silent && rob_old_valid == 5'b10000);
      chk("8 no instruction issued", enq_valid == 0);
      freed = rob_old_reg[4];
      // keep commit from returning anything: every redundant copy in the
      // cluster is dropped, one per cycle, until only sole copies are left
      n = 0;
      do begin @(negedge clk); #1; n++; end while (ev_reclaim && n < 40);
      chk("8 redundant copies exhausted", !ev_reclaim && !rc_valid && !in_ready && n < 40);
      // with the Rcopy queue empty a sole copy is transferred out ...
      rcq_empty = 1; #1;
      chk("8 copy-out", rc_valid && ev_eager && rc_src_cl == 4 && rc_dst_mask != 0 && !rc_dst_mask[4]);
      @(negedge clk);
      rcq_empty = 0; #1;
      // ... and can be dropped in the next cycle
      chk("8 dropped after copy-out", ev_reclaim && rob_silent);
      @(negedge clk);
      free_en[2] = 5'b10000; free_reg[2][4] = freed;
      @(negedge clk);
      free_en[2] = 0;
      n = 0;
      while (!in_ready && n < 5) begin @(negedge clk); #1; n++; end
      chk("8 dispatches after the freed register returns", in_ready && enq_valid == 5'b10000 && enq_uop.dst == freed);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rob: the reorder buffer against a reference list. Entries are allocated
// with random destinations, old mappings and transfer sequence numbers;
// completions arrive out of order from several clusters; the count of
// completed transfers advances at random. Commits must come in allocation
// order, only when the head is done and every older transfer has completed,
// carry the completed value, and free exactly the old mappings recorded at
// allocation. Silent entries (register reclaim) are done at once, free their
// registers in order and are not reported as commits. full must follow the
// occupancy; the buffer is driven full. Up to COMMIT_W leading entries must
// retire together, each on its own slot, and cycles with several retiring
// entries must occur.
module tb_rob;
  import drf_pkg::*;
  localparam int NCL = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, alloc_valid, alloc_silent, full;
  logic [COMMIT_W-1:0] commit_valid;
  areg_t alloc_dst;
  areg_t commit_dst [COMMIT_W];
  logic [NCL-1:0] alloc_old_valid, cmp_valid;
  logic [NCL-1:0] free_en [COMMIT_W];
  lreg_t alloc_old_reg [NCL];
  lreg_t free_reg [COMMIT_W][NCL];
  seq_t alloc_copy_seq, copy_done_cnt;
  rob_idx_t alloc_idx;
  rob_idx_t cmp_rob [NCL];
  word_t cmp_value [NCL];
  word_t commit_value [COMMIT_W];

  rob #(.NCL(NCL)) dut (.*);

  typedef struct { bit sil; areg_t d; logic [NCL-1:0] ov; lreg_t orr [NCL]; seq_t seq; rob_idx_t idx; bit done; word_t v; } ent_t;
  ent_t model [$];
  int silent_retired = 0, checks = 0, failures = 0, commits = 0, saw_full = 0, held_by_copy = 0, multi = 0;
  seq_t issued;

  initial begin
    rst_n = 0; alloc_valid = 0; alloc_silent = 0; cmp_valid = 0; copy_done_cnt = 0; issued = 0;
    alloc_dst = 0; alloc_old_valid = 0; alloc_copy_seq = 0;
    for (int c = 0; c < NCL; c++) begin alloc_old_reg[c] = 0; cmp_rob[c] = 0; cmp_value[c] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 8000; k++) begin
      int exp_n;
      ent_t e;
      @(negedge clk);
      // completions for random not-yet-done entries, one per cluster
      cmp_valid = '0;
      for (int c = 0; c < NCL; c++) begin
        if (model.size() > 0 && $urandom_range(0, (k % 2000 < 300) ? 20 : 2) == 0) begin
          int j;
          j = $urandom_range(0, model.size() - 1);
          if (!model[j].done) begin
            bit dup; dup = 0;
            for (int c2 = 0; c2 < c; c2++) if (cmp_valid[c2] && cmp_rob[c2] == model[j].idx) dup = 1;
            if (!dup) begin
              cmp_valid[c] = 1; cmp_rob[c] = model[j].idx; cmp_value[c] = $urandom;
            end
          end
        end
      end
      if (copy_done_cnt != issued && $urandom_range(0, 1) == 1) copy_done_cnt = copy_done_cnt + 1;
      alloc_valid = !full && $urandom_range(0, 1) == 1;
      if ($urandom_range(0, 3) == 0) issued = issued + seq_t'($urandom_range(1, 3));
      alloc_silent = $urandom_range(0, 7) == 0;
      alloc_dst = areg_t'($urandom); alloc_old_valid = NCL'($urandom);
      for (int c = 0; c < NCL; c++) alloc_old_reg[c] = lreg_t'($urandom);
      alloc_copy_seq = issued;
      #1;
      checks++;
      if (full != (model.size() == ROB_DEPTH)) begin failures++; $display("FAIL full"); end
      if (full) saw_full++;
      exp_n = 0;
      while (exp_n < COMMIT_W && exp_n < model.size() && model[exp_n].done &&
             $signed(copy_done_cnt - model[exp_n].seq) >= 0) exp_n++;
      if (model.size() > 0 && model[0].done && exp_n == 0) held_by_copy++;
      if (exp_n > 1) multi++;
      for (int k = 0; k < COMMIT_W; k++) begin
        bit r, bad;
        r = k < exp_n;
        checks++;
        bad = commit_valid[k] != (r && !model[k].sil) || free_en[k] != (r ? model[k].ov : '0);
        if (!bad && r) begin
          if (!model[k].sil && (commit_dst[k] != model[k].d || commit_value[k] != model[k].v)) bad = 1;
          for (int c = 0; c < NCL; c++) if (model[k].ov[c] && free_reg[k][c] != model[k].orr[c]) bad = 1;
          if (model[k].sil) silent_retired++;
        end
        if (bad) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d: valid %b expected retire %b", k, commit_valid[k], r);
        end
      end
      if (alloc_valid) begin
        e.sil = alloc_silent; e.d = alloc_dst; e.ov = alloc_old_valid; e.seq = alloc_copy_seq; e.idx = alloc_idx;
        e.done = alloc_silent; e.v = 0;
        for (int c = 0; c < NCL; c++) e.orr[c] = alloc_old_reg[c];
      end
      @(posedge clk);
      repeat (exp_n) begin void'(model.pop_front()); commits++; end
      for (int c = 0; c < NCL; c++) if (cmp_valid[c])
        foreach (model[j]) if (model[j].idx == cmp_rob[c]) begin model[j].done = 1; model[j].v = cmp_value[c]; end
      if (alloc_valid) model.push_back(e);
    end
    checks++;
    if (commits < 1000 || saw_full == 0 || held_by_copy == 0 || silent_retired == 0 || multi == 0) begin
      failures++; $display("FAIL coverage: commits %0d full %0d held %0d multi %0d", commits, saw_full, held_by_copy, multi);
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

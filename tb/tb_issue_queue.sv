// tb_issue_queue: the issue queue against an age-ordered reference list.
// Random uops (random sources, zero and immediate flags, a unique tag in the
// rob field) are enqueued while the queue has room, and the register ready
// vector changes at random. Each cycle the issued uop must be the oldest
// entry whose operands are ready, and count / full must match the list.
// A directed phase fills the queue to check full.
module tb_issue_queue;
  import drf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, enq_valid, iss_valid, full;
  uop_t enq_uop, iss_uop;
  logic [LRF_DEPTH-1:0] reg_ready;
  iq_cnt_t count;

  issue_queue dut (.*);

  uop_t model [$];
  int checks = 0, failures = 0, issued = 0, saw_full = 0;

  function automatic bit rdy(uop_t u);
    return (u.s1_zero || reg_ready[u.s1]) && (u.s2_zero || u.use_imm || reg_ready[u.s2]);
  endfunction

  initial begin
    rst_n = 0; enq_valid = 0; enq_uop = '0; reg_ready = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 6000; k++) begin
      int idx;
      @(negedge clk);
      reg_ready = (k % 1000 < 100) ? '0 : (LRF_DEPTH'($urandom) | LRF_DEPTH'($urandom));
      enq_valid = !full && $urandom_range(0, 3) != 0;
      enq_uop = uop_t'({$urandom, $urandom, $urandom});
      enq_uop.rob = rob_idx_t'(k);
      enq_uop.s1_zero = $urandom_range(0, 7) == 0;
      enq_uop.use_imm = $urandom_range(0, 3) == 0;
      #1;
      idx = -1;
      for (int i = model.size() - 1; i >= 0; i--) if (rdy(model[i])) idx = i;
      checks++;
      if (count != iq_cnt_t'(model.size()) || full != (model.size() == IQ_DEPTH)) begin
        failures++;
        if (failures < 10) $display("FAIL count %0d expected %0d", count, model.size());
      end
      if (model.size() == IQ_DEPTH) saw_full++;
      checks++;
      if (iss_valid != (idx >= 0) || (idx >= 0 && iss_uop != model[idx])) begin
        failures++;
        if (failures < 10) $display("FAIL issue: got %b tag %0d expected idx %0d", iss_valid, iss_uop.rob, idx);
      end
      @(posedge clk);
      if (idx >= 0) begin model.delete(idx); issued++; end
      if (enq_valid) model.push_back(enq_uop);
    end
    checks++;
    if (saw_full == 0 || issued < 1000) begin failures++; $display("FAIL: full %0d issued %0d", saw_full, issued); end
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

// tb_rcopy_unit: the Rcopy queue against a FIFO reference. Random transfer
// operations are enqueued while there is room; the network's go is driven at
// random (modelling a source that is not ready yet). The head presented must
// be the oldest pending operation with all its fields, transfers must leave
// strictly in order, empty/full must follow the occupancy and done_cnt must
// count completed transfers. A directed phase fills the queue and holds go
// low to check full.
module tb_rcopy_unit;
  import drf_pkg::*;
  localparam int NCL = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, enq_valid, empty, full, head_valid, go;
  logic [2:0] enq_src_cl, head_src_cl;
  lreg_t enq_src_reg, head_src_reg;
  logic [NCL-1:0] enq_dst_mask, head_dst_mask;
  lreg_t enq_dst_reg [NCL];
  lreg_t head_dst_reg [NCL];
  seq_t done_cnt;

  rcopy_unit #(.NCL(NCL)) dut (.*);

  typedef struct { logic [2:0] cl; lreg_t r; logic [NCL-1:0] m; lreg_t d [NCL]; } op_t;
  op_t model [$];
  int checks = 0, failures = 0, done = 0, saw_full = 0;

  initial begin
    rst_n = 0; enq_valid = 0; go = 0; enq_src_cl = 0; enq_src_reg = 0; enq_dst_mask = 0;
    for (int c = 0; c < NCL; c++) enq_dst_reg[c] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      op_t o;
      @(negedge clk);
      enq_valid = !full && $urandom_range(0, 2) != 0;
      enq_src_cl = 3'($urandom_range(0, NCL - 1)); enq_src_reg = lreg_t'($urandom);
      enq_dst_mask = NCL'($urandom);
      for (int c = 0; c < NCL; c++) enq_dst_reg[c] = lreg_t'($urandom);
      go = head_valid && ((k % 700 < 60) ? 1'b0 : $urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == RCQ_DEPTH) ||
          done_cnt != seq_t'(done)) begin
        failures++;
        if (failures < 10) $display("FAIL status: size %0d empty %b full %b done %0d", model.size(), empty, full, done_cnt);
      end
      if (model.size() == RCQ_DEPTH) saw_full++;
      if (model.size() > 0) begin
        bit bad;
        bad = head_src_cl != model[0].cl || head_src_reg != model[0].r || head_dst_mask != model[0].m;
        for (int c = 0; c < NCL; c++) if (head_dst_reg[c] != model[0].d[c]) bad = 1;
        checks++;
        if (bad) begin failures++; if (failures < 10) $display("FAIL head mismatch"); end
      end
      o.cl = enq_src_cl; o.r = enq_src_reg; o.m = enq_dst_mask;
      for (int c = 0; c < NCL; c++) o.d[c] = enq_dst_reg[c];
      @(posedge clk);
      if (go) begin void'(model.pop_front()); done++; end
      if (enq_valid) model.push_back(o);
    end
    checks++;
    if (saw_full == 0 || done < 1000) begin failures++; $display("FAIL: full seen %0d done %0d", saw_full, done); end
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

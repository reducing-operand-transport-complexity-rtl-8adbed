// tb_drf_core: end-to-end test of the distributed-register-file back end.
//
// A random program of integer ALU, immediate and multiply instructions is fed
// to drf_core through its valid/ready handshake. Source registers are drawn
// from a small set so that values are produced in one cluster and consumed in
// others. A reference model executes the same program in order on a plain
// architectural register file; every commit must match the next reference
// result (destination and value) in program order, and every instruction
// must commit. The test also counts how often each mechanism of the design
// fired (on-demand transfer, eager transfer, multicast, local-register
// recycling at commit, a cluster running out of spare local registers,
// a register reclaimed from a full cluster, several commits in one cycle)
// and fails a mechanism that never happened. It runs with the core's default parameters.
module tb_drf_core;
  import drf_pkg::*;

  localparam int NINST    = 3000;
  localparam int WATCHDOG = 200000;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  in_valid;
  inst_t in_inst;
  localparam int NC = COMMIT_W;  // commit slots
  logic  in_ready;
  logic [NC-1:0] commit_valid;
  areg_t commit_dst   [NC];
  word_t commit_value [NC];
  logic  ev_ondemand, ev_eager, ev_multicast, ev_reclaim, ev_stall;

  drf_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cpo = 0, n_rec = 0, n_low = 0, n_od = 0, n_eg = 0, n_mc = 0, n_stall = 0, n_robfull = 0, n_free = 0, n_multi = 0;
  int committed = 0, cycles = 0;

  word_t ref_rf [NARCH];
  areg_t exp_dst [$];
  word_t exp_val [$];

  function automatic word_t ref_exec(op_e op, word_t a, word_t b);
    case (op)
      OP_ADD: return a + b;
      OP_SUB: return a - b;
      OP_AND: return a & b;
      OP_OR:  return a | b;
      OP_XOR: return a ^ b;
      OP_SLT: return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      OP_SLL: return a << (b % 32);
      OP_SRL: return a >> (b % 32);
      OP_MUL: return a * b;
      default: return 32'd0;
    endcase
  endfunction

  function automatic inst_t rand_inst(int k);
    inst_t i;
    int r, hi;
    r = $urandom_range(0, 9);
    // the second half of the program uses every register, which drives
    // the clusters' local register files to their limit
    hi = (k < NINST / 2) ? 12 : NARCH - 1;
    i.dst  = areg_t'($urandom_range(1, hi));
    i.src1 = areg_t'($urandom_range(0, hi));
    i.src2 = areg_t'($urandom_range(0, hi));
    i.imm  = word_t'($urandom_range(0, 2000)) - 32'd1000;
    i.use_imm = (r < 3) || (k < 16);
    if (r >= 8 || (k % 200 > 150 && r >= 2)) begin
      i.fclass = FC_MUL;
      i.op     = OP_MUL;
    end else begin
      i.fclass = FC_ALU;
      i.op     = op_e'($urandom_range(0, 7));
    end
    if (k < 16) begin       // seed registers with immediates
      i.op  = OP_ADD;
      i.fclass = FC_ALU;
      i.dst = areg_t'(k % 13);
    end
    return i;
  endfunction

  // stimulus
  initial begin
    for (int a = 0; a < NARCH; a++) ref_rf[a] = '0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_inst  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NINST; k++) begin
      inst_t i;
      word_t b, v;
      i = rand_inst(k);
      b = i.use_imm ? i.imm : ref_rf[i.src2];
      v = ref_exec(i.op, ref_rf[i.src1], b);
      ref_rf[i.dst] = v;
      exp_dst.push_back(i.dst);
      exp_val.push_back(v);
      @(negedge clk);
      in_valid = 1'b1;
      in_inst  = i;
      forever begin
        bit acc;
        #1 acc = in_ready;
        @(posedge clk);
        if (acc) break;
        @(negedge clk);
      end
      if ($urandom_range(0, 31) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat ($urandom_range(1, 6)) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // checking and event counting (stall and reorder-buffer-full cycles are
  // reported for information only)
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      if (ev_ondemand)  n_od++;
      if (ev_eager)     n_eg++;
      if (ev_multicast) n_mc++;
      if (ev_stall)     n_stall++;
      if (ev_reclaim)   n_rec++;
      if (ev_eager && dut.u_dispatch.copyout) n_cpo++;
      if (dut.rob_full && in_valid) n_robfull++;
      for (int k = 0; k < NC; k++) if (|dut.free_en[k]) n_free++;
      if ($countones(commit_valid) > 1) n_multi++;
      for (int c = 0; c < $size(dut.u_dispatch.fl_cnt); c++)
        if (dut.u_dispatch.fl_cnt[c] <= free_cnt_t'(XFER_RESERVE)) begin
          n_low++;
          break;
        end
      for (int k = 0; k < NC; k++) if (commit_valid[k]) begin
        checks++;
        if (exp_dst.size() == 0) begin
          failures++;
          $display("FAIL: commit with nothing expected");
        end else begin
          areg_t d;
          word_t v;
          d = exp_dst.pop_front();
          v = exp_val.pop_front();
          if (d != commit_dst[k] || v != commit_value[k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: commit %0d (slot %0d): got r%0d=%h, expected r%0d=%h",
                       committed, k, commit_dst[k], commit_value[k], d, v);
          end
        end
        committed++;
      end
    end
  end

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (committed == NINST);
    repeat (20) @(posedge clk);
    checks++;
    if (committed != NINST) failures++;
    expect_seen("on-demand transfer", n_od);
    expect_seen("eager transfer", n_eg);
    expect_seen("multicast transfer", n_mc);
    expect_seen("several commits in one cycle", n_multi);
    expect_seen("local register freed at commit", n_free);
    expect_seen("cluster out of spare local registers", n_low);
    expect_seen("local register reclaimed", n_rec);
    $display("instructions=%0d cycles=%0d IPC=%0.3f multi-commit=%0d on-demand=%0d eager=%0d multicast=%0d stall=%0d robfull=%0d frees=%0d low-regs=%0d reclaims=%0d copy-outs=%0d",
             committed, cycles, real'(committed) / real'(cycles), n_multi, n_od, n_eg, n_mc,
             n_stall, n_robfull, n_free, n_low, n_rec, n_cpo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d commits", committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_cluster_assign: random cluster states against a reference of the
// assignment rule. The reference ranks every eligible cluster by the key
// (local operands, -queue occupancy, -index) and takes the largest; a cluster
// is eligible if its class matches, its queue is not full and it has more
// free registers than operands it lacks. Also checks directed cases: the
// cluster holding both operands wins over an idle one; with equal locality
// the least busy wins; no eligible cluster gives valid = 0, and room_needed
// names the cluster to reclaim a register in when registers are the reason.
module tb_cluster_assign;
  import drf_pkg::*;
  localparam int NCL = 5;
  localparam logic [NCL-1:0] CM = 5'b10000;

  fu_class_e fclass;
  logic need1, need2, valid;
  logic [NCL-1:0] map1, map2, iq_full;
  iq_cnt_t iq_cnt [NCL];
  free_cnt_t free_cnt [NCL];
  logic [2:0] cl, room_cl;
  logic room_needed;

  cluster_assign #(.NCL(NCL), .CLASS_MUL(CM)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check_ref();
    int best, bkey, key, loc, miss;
    best = -1; bkey = -1000000;
    for (int c = 0; c < NCL; c++) begin
      loc  = int'(need1 && map1[c]) + int'(need2 && map2[c]);
      miss = int'(need1 && !map1[c]) + int'(need2 && !map2[c]);
      if ((CM[c] == (fclass == FC_MUL)) && !iq_full[c] && int'(free_cnt[c]) > miss) begin
        key = loc * 10000 - int'(iq_cnt[c]) * 100 - c;
        if (key > bkey) begin bkey = key; best = c; end
      end
    end
    checks++;
    if (valid != (best >= 0) || (best >= 0 && int'(cl) != best)) begin
      failures++;
      if (failures < 10) $display("FAIL: got %b/%0d expected %0d", valid, cl, best);
    end
    // room: class-matching cluster with queue space and most free registers
    best = -1; bkey = -1;
    for (int c = 0; c < NCL; c++)
      if ((CM[c] == (fclass == FC_MUL)) && !iq_full[c] && int'(free_cnt[c]) > bkey) begin
        bkey = int'(free_cnt[c]); best = c;
      end
    checks++;
    if (room_needed != (!valid && best >= 0) || (room_needed && int'(room_cl) != best)) begin
      failures++;
      if (failures < 10) $display("FAIL room: got %b/%0d expected %0d", room_needed, room_cl, best);
    end
  endtask

  initial begin
    // directed: operands both in cluster 2, cluster 0 idle
    fclass = FC_ALU; need1 = 1; need2 = 1; map1 = 5'b00100; map2 = 5'b00110; iq_full = 0;
    for (int c = 0; c < NCL; c++) begin iq_cnt[c] = 0; free_cnt[c] = 32; end
    iq_cnt[2] = 6;
    #1 check_ref(); checks++; if (!(valid && cl == 2)) failures++;
    // equal locality: least busy
    map1 = 0; map2 = 0; iq_cnt[0] = 3; iq_cnt[1] = 1; iq_cnt[2] = 2; iq_cnt[3] = 1;
    #1 check_ref(); checks++; if (!(valid && cl == 1)) failures++;
    // multiply goes to cluster 4 only
    fclass = FC_MUL; #1 check_ref(); checks++; if (!(valid && cl == 4)) failures++;
    iq_full = 5'b10000; #1 check_ref(); checks++; if (valid || room_needed) failures++;
    // multiplier out of registers: reclaim there
    iq_full = 0; free_cnt[4] = 1; map1 = 0; #1 check_ref(); checks++;
    if (valid || !room_needed || room_cl != 4) failures++;
    free_cnt[4] = 32;
    // random
    for (int k = 0; k < 20000; k++) begin
      fclass = fu_class_e'($urandom_range(0, 1));
      need1 = $urandom_range(0, 1); need2 = $urandom_range(0, 1);
      map1 = NCL'($urandom); map2 = NCL'($urandom); iq_full = NCL'($urandom) & NCL'($urandom);
      for (int c = 0; c < NCL; c++) begin
        iq_cnt[c] = iq_cnt_t'($urandom_range(0, 8));
        free_cnt[c] = free_cnt_t'($urandom_range(0, 4));
      end
      #1 check_ref();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_multicast_sel: random mapping / free-register states against a reference
// of the transfer selection: source = lowest mapped cluster; destinations =
// unmapped clusters that are forced or keep more than XFER_RESERVE free
// registers, minus excluded ones; valid only with a source and at least one
// destination. Directed cases cover a pure eager multicast and an on-demand
// transfer into a cluster that is nearly out of registers.
module tb_multicast_sel;
  import drf_pkg::*;
  localparam int NCL = 5;

  logic [NCL-1:0] mapped, force_mask, excl_mask, dst_mask;
  free_cnt_t free_cnt [NCL];
  logic valid;
  logic [2:0] src_cl;

  multicast_sel #(.NCL(NCL)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check_ref();
    logic [NCL-1:0] m;
    int s;
    s = -1;
    for (int c = 0; c < NCL; c++) begin
      if (s < 0 && mapped[c]) s = c;
      m[c] = !mapped[c] && !excl_mask[c] && (force_mask[c] || free_cnt[c] >= XFER_RESERVE + 1);
    end
    checks++;
    if (valid != (s >= 0 && m != 0) || (valid && (int'(src_cl) != s || dst_mask != m))) begin
      failures++;
      if (failures < 10) $display("FAIL: got %b %0d %b expected %0d %b", valid, src_cl, dst_mask, s, m);
    end
  endtask

  initial begin
    for (int c = 0; c < NCL; c++) free_cnt[c] = 20;
    mapped = 5'b00100; force_mask = 0; excl_mask = 0;
    #1 check_ref(); checks++; if (!(valid && src_cl == 2 && dst_mask == 5'b11011)) failures++;
    free_cnt[1] = 1; force_mask = 5'b00010; free_cnt[3] = 3;
    #1 check_ref(); checks++; if (!(valid && dst_mask == 5'b10011)) failures++;
    mapped = 0; #1 check_ref(); checks++; if (valid) failures++;
    for (int k = 0; k < 20000; k++) begin
      mapped = NCL'($urandom); force_mask = NCL'(1) << $urandom_range(0, NCL);
      excl_mask = ($urandom_range(0, 1) == 1) ? NCL'(1) << $urandom_range(0, NCL - 1) : '0;
      for (int c = 0; c < NCL; c++) free_cnt[c] = free_cnt_t'($urandom_range(0, 6));
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

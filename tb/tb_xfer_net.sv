// tb_xfer_net: random transfer requests against a reference of the bus:
// every destination's port gets its allocated register, every other port the
// source register; writes are enabled exactly in the destinations and only
// once the source value is ready; all destinations receive the source
// cluster's value (multicast).
module tb_xfer_net;
  import drf_pkg::*;
  localparam int NCL = 5;

  logic req_valid, go;
  logic [2:0] req_src_cl;
  lreg_t req_src_reg;
  logic [NCL-1:0] req_dst_mask, cl_ready, cl_we;
  lreg_t req_dst_reg [NCL];
  word_t cl_rdata [NCL];
  lreg_t cl_addr [NCL];
  word_t cl_wdata [NCL];

  xfer_net #(.NCL(NCL)) dut (.*);

  int checks = 0, failures = 0, multi = 0;

  initial begin
    for (int k = 0; k < 20000; k++) begin
      bit exp_go;
      req_valid = $urandom_range(0, 3) != 0;
      req_src_cl = 3'($urandom_range(0, NCL - 1));
      req_src_reg = lreg_t'($urandom);
      req_dst_mask = NCL'($urandom) & ~(NCL'(1) << req_src_cl);
      cl_ready = NCL'($urandom) | NCL'($urandom);
      for (int c = 0; c < NCL; c++) begin
        req_dst_reg[c] = lreg_t'($urandom); cl_rdata[c] = $urandom;
      end
      #1;
      exp_go = req_valid && cl_ready[req_src_cl];
      checks++;
      if (go != exp_go) failures++;
      if (go && $countones(cl_we) > 1) multi++;
      for (int c = 0; c < NCL; c++) begin
        checks++;
        if (cl_we[c] != (exp_go && req_dst_mask[c]) ||
            cl_addr[c] != (req_dst_mask[c] ? req_dst_reg[c] : req_src_reg) ||
            (cl_we[c] && cl_wdata[c] != cl_rdata[req_src_cl])) begin
          failures++;
          if (failures < 10) $display("FAIL cluster %0d", c);
        end
      end
    end
    checks++;
    if (multi == 0) failures++;
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

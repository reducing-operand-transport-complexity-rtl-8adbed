// tb_lrmt: checks the local register mapping table against a reference model
// (valid bit and local register per architectural register and cluster).
// Random definitions (which must drop all older mappings of the register) and
// multicast copies (which add mappings) are applied, and all lookup ports are
// compared every cycle, as is the victim search (lowest redundant mapping of
// the cluster outside the two excluded registers, else the lowest sole one).
// Random drops remove single mappings. After reset every mapping must be
// invalid.
module tb_lrmt;
  import drf_pkg::*;
  localparam int NCL = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;

  areg_t          rd_areg  [4];
  logic [NCL-1:0] rd_valid [4];
  lreg_t          rd_reg   [4][NCL];
  logic           def_en, cp_en;
  areg_t          def_areg, cp_areg;
  logic [2:0]     def_cl;
  lreg_t          def_reg;
  logic [NCL-1:0] cp_mask;
  lreg_t          cp_reg [NCL];
  logic           drop_en, vic_valid, vic_redundant;
  areg_t          drop_areg, vic_areg;
  logic [2:0]     drop_cl, vic_cl;
  areg_t          vic_excl [2];
  lreg_t          vic_reg;

  lrmt #(.NCL(NCL), .NRD(4)) dut (.*);

  logic [NCL-1:0] mv [NARCH];
  lreg_t          mr [NARCH][NCL];
  int checks = 0, failures = 0;

  task automatic compare_victim();
    int lo_c, lo_r;
    lo_c = -1; lo_r = -1;
    for (int a = NARCH - 1; a >= 0; a--) begin
      if (mv[a][vic_cl] && areg_t'(a) != vic_excl[0] && areg_t'(a) != vic_excl[1]) begin
        lo_c = a;
        if ((mv[a] & ~(NCL'(1) << vic_cl)) != 0) lo_r = a;
      end
    end
    checks++;
    if (vic_valid != (lo_c >= 0) || vic_redundant != (lo_r >= 0) ||
        (lo_c >= 0 && (int'(vic_areg) != (lo_r >= 0 ? lo_r : lo_c) ||
                       vic_reg !== mr[vic_areg][vic_cl]))) begin
      failures++;
      if (failures < 10) $display("FAIL victim c%0d: got %b%b r%0d expected %0d/%0d", vic_cl, vic_valid, vic_redundant, vic_areg, lo_c, lo_r);
    end
  endtask

  task automatic compare();
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (rd_valid[p] !== mv[rd_areg[p]]) begin
        failures++;
        if (failures < 10) $display("FAIL valid r%0d: got %b expected %b", rd_areg[p], rd_valid[p], mv[rd_areg[p]]);
      end
      for (int c = 0; c < NCL; c++) if (mv[rd_areg[p]][c]) begin
        checks++;
        if (rd_reg[p][c] !== mr[rd_areg[p]][c]) begin
          failures++;
          if (failures < 10) $display("FAIL reg r%0d c%0d", rd_areg[p], c);
        end
      end
    end
  endtask

  initial begin
    rst_n = 0; def_en = 0; cp_en = 0; def_areg = 0; cp_areg = 0; def_cl = 0; def_reg = 0; cp_mask = 0;
    for (int c = 0; c < NCL; c++) cp_reg[c] = 0;
    for (int p = 0; p < 4; p++) rd_areg[p] = 0;
    drop_en = 0; drop_areg = 0; drop_cl = 0; vic_cl = 0; vic_excl[0] = 0; vic_excl[1] = 0;
    for (int a = 0; a < NARCH; a++) mv[a] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int a = 0; a < NARCH; a += 4) begin
      for (int p = 0; p < 4; p++) rd_areg[p] = areg_t'(a + p);
      #1 compare();
    end
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      def_en = $urandom_range(0, 1); def_areg = areg_t'($urandom_range(0, 7));
      def_cl = 3'($urandom_range(0, NCL - 1)); def_reg = lreg_t'($urandom);
      cp_en = $urandom_range(0, 1); cp_areg = areg_t'($urandom_range(0, 7));
      cp_mask = NCL'($urandom);
      for (int c = 0; c < NCL; c++) cp_reg[c] = lreg_t'($urandom);
      for (int p = 0; p < 4; p++) rd_areg[p] = areg_t'($urandom_range(0, 7));
      drop_en = $urandom_range(0, 3) == 0; drop_areg = areg_t'($urandom_range(0, 7));
      drop_cl = 3'($urandom_range(0, NCL - 1));
      if ((cp_en && cp_areg == drop_areg) || (def_en && def_areg == drop_areg)) drop_en = 0;
      vic_cl = 3'($urandom_range(0, NCL - 1));
      vic_excl[0] = areg_t'($urandom_range(0, 7)); vic_excl[1] = areg_t'($urandom_range(0, 7));
      #1 compare();
      compare_victim();
      @(posedge clk);
      if (cp_en) for (int c = 0; c < NCL; c++) if (cp_mask[c]) begin
        mv[cp_areg][c] = 1'b1; mr[cp_areg][c] = cp_reg[c];
      end
      if (drop_en) mv[drop_areg][drop_cl] = 1'b0;
      if (def_en) begin
        mv[def_areg] = '0; mv[def_areg][def_cl] = 1'b1; mr[def_areg][def_cl] = def_reg;
      end
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

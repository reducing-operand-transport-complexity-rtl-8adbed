// tb_local_regfile: checks the local register file against a shadow array.
// Random writes through the functional-unit write port and the transfer
// read/write port (never the same register in one cycle), with reads on both
// read ports and the transfer port compared each cycle to the shadow copy.
// A write must be visible in the cycle after it.
module tb_local_regfile;
  import drf_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  lreg_t ra_addr, rb_addr, w_addr, x_addr;
  word_t ra_data, rb_data, w_data, x_wdata, x_rdata;
  logic  w_en, x_we;

  local_regfile dut (.*);

  word_t shadow [LRF_DEPTH];
  int checks = 0, failures = 0;

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    w_en = 0; x_we = 0; ra_addr = 0; rb_addr = 0; w_addr = 0; x_addr = 0;
    w_data = 0; x_wdata = 0;
    // fill every register through alternating ports
    for (int i = 0; i < LRF_DEPTH; i++) begin
      @(negedge clk);
      shadow[i] = $urandom;
      if (i % 2 == 0) begin w_en = 1; x_we = 0; w_addr = lreg_t'(i); w_data = shadow[i]; end
      else begin w_en = 0; x_we = 1; x_addr = lreg_t'(i); x_wdata = shadow[i]; end
    end
    @(negedge clk); w_en = 0; x_we = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      ra_addr = lreg_t'($urandom); rb_addr = lreg_t'($urandom);
      w_en = 0; x_we = 0;
      x_addr = lreg_t'($urandom);
      #1;
      check("read a", ra_data, shadow[ra_addr]);
      check("read b", rb_data, shadow[rb_addr]);
      check("read x", x_rdata, shadow[x_addr]);
      w_en = $urandom_range(0, 1); w_addr = lreg_t'($urandom); w_data = $urandom;
      x_we = $urandom_range(0, 1); x_wdata = $urandom;
      if (x_addr == w_addr) x_we = 0;
      @(posedge clk);
      if (w_en) shadow[w_addr] = w_data;
      if (x_we) shadow[x_addr] = x_wdata;
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

// local_regfile: the local register file of one functional-unit cluster.
//
// DEPTH registers of 32 bits with the port mix of the reference design:
// two read ports and one write port for the cluster's own functional unit,
// and one read/write port that connects the file to the register transfer
// network (read when the cluster is the source of a copy, written when it is
// a destination). Reads are combinational, writes happen on the rising clock
// edge, so a value written in cycle t is read by an instruction issued in
// cycle t+1; there is no bypass network. The two write paths must never
// target the same register in one cycle: the allocator hands every register
// to exactly one producer. The storage has no reset (a register is only read
// after its producer wrote it).
module local_regfile
  import drf_pkg::*;
#(
  parameter int DEPTH = LRF_DEPTH
) (
  input  logic  clk,
  // functional-unit read ports
  input  lreg_t ra_addr,
  output word_t ra_data,
  input  lreg_t rb_addr,
  output word_t rb_data,
  // functional-unit write port
  input  logic  w_en,
  input  lreg_t w_addr,
  input  word_t w_data,
  // transfer-network read/write port
  input  lreg_t x_addr,
  input  logic  x_we,
  input  word_t x_wdata,
  output word_t x_rdata
);

  word_t mem [DEPTH];

  assign ra_data = mem[ra_addr];
  assign rb_data = mem[rb_addr];
  assign x_rdata = mem[x_addr];

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
    if (x_we) mem[x_addr] <= x_wdata;
  end

  a_no_write_clash: assert property (@(posedge clk) !(w_en && x_we && w_addr == x_addr))
    else $error("local_regfile: both write ports target register %0d", w_addr);

endmodule

// rcopy_unit: the register transfer (Rcopy) unit and its issue queue.
//
// Transfer operations are dispatched like ordinary instructions into this
// unit's DEPTH-entry queue. The unit executes them strictly in order, one per
// cycle: the head operation is presented to the transfer network, which
// completes it (go) as soon as the source register's value is ready; the
// entry then leaves the queue. Each entry carries the source cluster and
// local register, the multicast destination set and the local register
// allocated in every destination.
//
// empty is what the dispatch unit watches: an eager transfer is issued only
// when this queue is empty. done_cnt counts completed transfers (modulo
// 2^SEQ_W); the reorder buffer compares it against the number of transfers
// issued before an instruction, so that no register is freed while an older
// transfer may still read it.
module rcopy_unit
  import drf_pkg::*;
#(
  parameter int NCL   = 5,
  parameter int DEPTH = RCQ_DEPTH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enq_valid,
  input  logic [$clog2(NCL)-1:0] enq_src_cl,
  input  lreg_t          enq_src_reg,
  input  logic [NCL-1:0] enq_dst_mask,
  input  lreg_t          enq_dst_reg [NCL],
  output logic           empty,
  output logic           full,
  // head operation to the transfer network
  output logic           head_valid,
  output logic [$clog2(NCL)-1:0] head_src_cl,
  output lreg_t          head_src_reg,
  output logic [NCL-1:0] head_dst_mask,
  output lreg_t          head_dst_reg [NCL],
  input  logic           go,
  output seq_t           done_cnt
);

  localparam int PW = $clog2(DEPTH);

  typedef struct packed {
    logic [$clog2(NCL)-1:0] src_cl;
    lreg_t                  src_reg;
    logic [NCL-1:0]         dst_mask;
  } rc_hdr_t;

  rc_hdr_t hdr  [DEPTH];
  lreg_t   dreg [DEPTH][NCL];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   cnt;

  assign empty         = (cnt == 0);
  assign full          = (cnt == (PW + 1)'(DEPTH));
  assign head_valid    = !empty;
  assign head_src_cl   = hdr[rd_ptr].src_cl;
  assign head_src_reg  = hdr[rd_ptr].src_reg;
  assign head_dst_mask = hdr[rd_ptr].dst_mask;
  always_comb for (int c = 0; c < NCL; c++) head_dst_reg[c] = dreg[rd_ptr][c];

  logic push, pop;
  assign push = enq_valid && !full;
  assign pop  = go && head_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      cnt      <= '0;
      done_cnt <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      cnt <= cnt + (PW + 1)'(push) - (PW + 1)'(pop);
      if (pop) done_cnt <= done_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      hdr[wr_ptr] <= '{src_cl: enq_src_cl, src_reg: enq_src_reg, dst_mask: enq_dst_mask};
      for (int c = 0; c < NCL; c++) dreg[wr_ptr][c] <= enq_dst_reg[c];
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) enq_valid |-> !full)
    else $error("rcopy_unit: enqueue into a full queue");

endmodule

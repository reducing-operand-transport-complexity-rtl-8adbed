// drf_core: superscalar back end with a fully distributed register file.
//
// There is no central register file and no global bypass network. Each
// functional unit forms a cluster with its own issue queue and local register
// file (fu_cluster). A dispatch unit (dispatch_unit) sends each decoded
// instruction, in program order, to one cluster and renames its operands to
// that cluster's local registers using the local register mapping table.
// Operands that live only in other clusters are moved by register transfer
// operations, which are dispatched like instructions to a dedicated Rcopy
// unit (rcopy_unit) and carried over a dedicated transfer bus (xfer_net) that
// can write several local register files at once (multicast). Eager
// transfers copy the most recently defined register ahead of need whenever
// the Rcopy queue is empty. A reorder buffer (rob) commits results in order
// and frees the local registers a committed write made obsolete.
//
// Configuration: N_ALU integer-ALU clusters (numbered 0..N_ALU-1) and N_MUL
// integer-multiplier clusters (the next N_MUL numbers). The defaults are the
// integer units of the 4-way reference configuration (4 IntALU, 1 IntMUL);
// the floating-point and memory clusters of that configuration are not
// included. Fetch, decode and branch prediction are outside this block: it
// takes a stream of decoded instructions with a valid/ready handshake
// (in_inst must be held while in_valid is high and in_ready is low) and
// produces up to NCOMMIT commits per cycle (slot 0 oldest; each slot gives a
// destination register and value). NCOMMIT defaults to the reference
// configuration's commit width of 4; instructions still enter one per cycle.
// ev_* pulse once for every on-demand transfer, eager transfer, multicast
// transfer (more than one destination), local register reclaimed from a full
// cluster and dispatch stall cycle. rst_n is an active-low synchronous reset.
module drf_core
  import drf_pkg::*;
#(
  parameter int N_ALU = 4,
  parameter int N_MUL = 1,
  parameter int NCOMMIT = COMMIT_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  inst_t in_inst,
  output logic  in_ready,
  output logic [NCOMMIT-1:0] commit_valid,
  output areg_t commit_dst   [NCOMMIT],
  output word_t commit_value [NCOMMIT],
  output logic  ev_ondemand,
  output logic  ev_eager,
  output logic  ev_multicast,
  output logic  ev_reclaim,
  output logic  ev_stall
);

  localparam int NCL = N_ALU + N_MUL;
  localparam int CW  = $clog2(NCL);

  function automatic logic [NCL-1:0] mul_mask();
    logic [NCL-1:0] m;
    for (int c = 0; c < NCL; c++) m[c] = (c >= N_ALU);
    return m;
  endfunction
  localparam logic [NCL-1:0] CLASS_MUL = mul_mask();

  // dispatch <-> clusters
  iq_cnt_t        iq_cnt [NCL];
  logic [NCL-1:0] iq_full, enq_valid, alloc_en;
  uop_t           enq_uop;
  lreg_t          alloc_reg [NCL];
  // transfers
  logic           rc_valid, rcq_empty, rcq_full, hd_valid, go;
  logic [CW-1:0]  rc_src_cl, hd_src_cl;
  lreg_t          rc_src_reg, hd_src_reg;
  logic [NCL-1:0] rc_dst_mask, hd_dst_mask;
  lreg_t          rc_dst_reg [NCL];
  lreg_t          hd_dst_reg [NCL];
  seq_t           copy_done;
  word_t          x_rdata [NCL];
  logic [NCL-1:0] x_ready, x_we;
  lreg_t          x_addr  [NCL];
  word_t          x_wdata [NCL];
  // reorder buffer
  logic           rob_full, rob_valid, rob_silent;
  rob_idx_t       rob_idx;
  areg_t          rob_dst;
  logic [NCL-1:0] rob_old_valid, cmp_valid;
  logic [NCL-1:0] free_en [NCOMMIT];
  lreg_t          rob_old_reg [NCL];
  lreg_t          free_reg [NCOMMIT][NCL];
  seq_t           rob_copy_seq;
  rob_idx_t       cmp_rob [NCL];
  word_t          cmp_value [NCL];

  dispatch_unit #(.NCL(NCL), .CLASS_MUL(CLASS_MUL), .NCOMMIT(NCOMMIT)) u_dispatch (
    .clk, .rst_n,
    .in_valid, .in_inst, .in_ready,
    .iq_cnt, .iq_full, .enq_valid, .enq_uop, .alloc_en, .alloc_reg,
    .rcq_empty, .rcq_full,
    .rc_valid, .rc_src_cl, .rc_src_reg, .rc_dst_mask, .rc_dst_reg,
    .rob_full, .rob_idx, .rob_valid, .rob_silent, .rob_dst, .rob_old_valid, .rob_old_reg,
    .rob_copy_seq,
    .free_en, .free_reg,
    .ev_ondemand, .ev_eager, .ev_multicast, .ev_reclaim, .ev_stall
  );

  for (genvar c = 0; c < NCL; c++) begin : g_cl
    fu_cluster #(.FCLASS(c < N_ALU ? FC_ALU : FC_MUL)) u_cl (
      .clk, .rst_n,
      .enq_valid (enq_valid[c]), .enq_uop,
      .iq_count (iq_cnt[c]), .iq_full (iq_full[c]),
      .alloc_en (alloc_en[c]), .alloc_reg (alloc_reg[c]),
      .x_addr (x_addr[c]), .x_we (x_we[c]), .x_wdata (x_wdata[c]),
      .x_rdata (x_rdata[c]), .x_ready (x_ready[c]),
      .cmp_valid (cmp_valid[c]), .cmp_rob (cmp_rob[c]), .cmp_value (cmp_value[c])
    );
  end

  rcopy_unit #(.NCL(NCL)) u_rcopy (
    .clk, .rst_n,
    .enq_valid (rc_valid), .enq_src_cl (rc_src_cl), .enq_src_reg (rc_src_reg),
    .enq_dst_mask (rc_dst_mask), .enq_dst_reg (rc_dst_reg),
    .empty (rcq_empty), .full (rcq_full),
    .head_valid (hd_valid), .head_src_cl (hd_src_cl), .head_src_reg (hd_src_reg),
    .head_dst_mask (hd_dst_mask), .head_dst_reg (hd_dst_reg),
    .go, .done_cnt (copy_done)
  );

  xfer_net #(.NCL(NCL)) u_net (
    .req_valid (hd_valid), .req_src_cl (hd_src_cl), .req_src_reg (hd_src_reg),
    .req_dst_mask (hd_dst_mask), .req_dst_reg (hd_dst_reg),
    .go,
    .cl_rdata (x_rdata), .cl_ready (x_ready),
    .cl_addr (x_addr), .cl_we (x_we), .cl_wdata (x_wdata)
  );

  rob #(.NCL(NCL), .NCOMMIT(NCOMMIT)) u_rob (
    .clk, .rst_n,
    .alloc_valid (rob_valid), .alloc_silent (rob_silent), .alloc_dst (rob_dst),
    .alloc_old_valid (rob_old_valid), .alloc_old_reg (rob_old_reg),
    .alloc_copy_seq (rob_copy_seq), .alloc_idx (rob_idx), .full (rob_full),
    .cmp_valid, .cmp_rob, .cmp_value,
    .copy_done_cnt (copy_done),
    .commit_valid, .commit_dst, .commit_value, .free_en, .free_reg
  );

endmodule

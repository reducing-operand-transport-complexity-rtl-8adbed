// dispatch_unit: in-order dispatch for the distributed register file.
//
// For each incoming decoded instruction the unit
//  1. picks a cluster of the right class with cluster_assign (most source
//     operands already local, then least busy);
//  2. for every source operand that has no valid mapping in that cluster,
//     issues an on-demand register transfer to the Rcopy unit, one per cycle.
//     Each transfer is multicast: besides the chosen cluster, every cluster
//     without a copy and with spare local registers receives the value too
//     (an embedded eager transfer). A local register is allocated in every
//     destination and the new mappings enter the LRMT at once;
//  3. sends the instruction, renamed to the chosen cluster's local registers,
//     to that cluster's issue queue; allocates a local register for its
//     result; records the write in the LRMT (which drops every older mapping
//     of the destination) and opens a reorder-buffer entry that remembers
//     those older mappings so commit can free them.
// The cluster chosen in step 1 is held while its transfers are issued.
//
// Eager transfer: in a cycle where no on-demand transfer is issued and the
// Rcopy queue is empty, the most recently defined architectural register is
// multicast from a cluster that holds it to every cluster that lacks it and
// has spare registers. The cluster the current instruction goes to is left
// out of that cycle's eager transfer, and no eager transfer is made of a
// register the current instruction overwrites.
//
// Register reclaim (this design's addition; the reference architecture does
// not say how a full local register file is handled): a cluster can end up
// holding the current copy of nearly every architectural register, and then
// no commit frees anything in it. When no cluster of the instruction's class
// has enough free registers, dispatch drops one of that cluster's copies
// (never one of the instruction's sources) from the LRMT and gives its
// register back through a silent reorder-buffer entry, which frees it once
// every older operation is done. A copy no other cluster holds is first sent
// to the other clusters by an eager transfer, so it can be dropped next.
//
// One instruction (or one on-demand transfer) leaves dispatch per cycle;
// an eager transfer may accompany an instruction. in_ready pulses in the
// cycle the instruction is taken. The ev_* outputs pulse once per event.
module dispatch_unit
  import drf_pkg::*;
#(
  parameter int NCL = 5,
  parameter logic [NCL-1:0] CLASS_MUL = 5'b10000,
  parameter int NCOMMIT = COMMIT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  // decoded instruction stream
  input  logic           in_valid,
  input  inst_t          in_inst,
  output logic           in_ready,
  // cluster status and issue-queue write
  input  iq_cnt_t        iq_cnt [NCL],
  input  logic [NCL-1:0] iq_full,
  output logic [NCL-1:0] enq_valid,
  output uop_t           enq_uop,
  output logic [NCL-1:0] alloc_en,
  output lreg_t          alloc_reg [NCL],
  // Rcopy unit
  input  logic           rcq_empty,
  input  logic           rcq_full,
  output logic           rc_valid,
  output logic [$clog2(NCL)-1:0] rc_src_cl,
  output lreg_t          rc_src_reg,
  output logic [NCL-1:0] rc_dst_mask,
  output lreg_t          rc_dst_reg [NCL],
  // reorder buffer
  input  logic           rob_full,
  input  rob_idx_t       rob_idx,
  output logic           rob_valid,
  output logic           rob_silent,
  output areg_t          rob_dst,
  output logic [NCL-1:0] rob_old_valid,
  output lreg_t          rob_old_reg [NCL],
  output seq_t           rob_copy_seq,
  // registers freed by commit, per commit slot and cluster
  input  logic [NCL-1:0] free_en  [NCOMMIT],
  input  lreg_t          free_reg [NCOMMIT][NCL],
  // event pulses
  output logic           ev_ondemand,
  output logic           ev_eager,
  output logic           ev_multicast,
  output logic           ev_reclaim,
  output logic           ev_stall
);

  localparam int CW = $clog2(NCL);

  // ---- LRMT: port 0 src1, port 1 src2, port 2 dst, port 3 last defined
  areg_t          rd_areg  [4];
  logic [NCL-1:0] rd_valid [4];
  lreg_t          rd_reg   [4][NCL];
  logic           def_en, cp_en, drop_en;
  areg_t          cp_areg;
  areg_t          vic_excl [2];
  logic           vic_valid, vic_redundant;
  areg_t          vic_areg;
  lreg_t          vic_reg;
  logic           room_needed;
  logic [$clog2(NCL)-1:0] room_cl;
  logic [CW-1:0]  choice;

  // ---- state
  logic          lat_v;
  logic [CW-1:0] lat_cl;
  logic          last_v;
  areg_t         last_areg;
  seq_t          issued_cnt;

  // ---- free lists
  logic      fl_ok  [NCL];
  lreg_t     fl_reg [NCL];
  free_cnt_t fl_cnt [NCL];

  assign rd_areg[0] = in_inst.src1;
  assign rd_areg[1] = in_inst.src2;
  assign rd_areg[2] = in_inst.dst;
  assign rd_areg[3] = last_areg;

  lrmt #(.NCL(NCL), .NRD(4)) u_lrmt (
    .clk, .rst_n,
    .rd_areg, .rd_valid, .rd_reg,
    .def_en, .def_areg (in_inst.dst), .def_cl (choice), .def_reg (fl_reg[choice]),
    .cp_en, .cp_areg, .cp_mask (rc_dst_mask), .cp_reg (fl_reg),
    .drop_en, .drop_areg (vic_areg), .drop_cl (room_cl),
    .vic_cl (room_cl), .vic_excl, .vic_valid, .vic_redundant, .vic_areg, .vic_reg
  );
  assign vic_excl[0] = in_inst.src1;
  assign vic_excl[1] = in_inst.src2;

  for (genvar c = 0; c < NCL; c++) begin : g_fl
    logic [NCOMMIT-1:0] fen;
    lreg_t              freg [NCOMMIT];
    for (genvar k = 0; k < NCOMMIT; k++) begin : g_slot
      assign fen[k]  = free_en[k][c];
      assign freg[k] = free_reg[k][c];
    end
    lreg_alloc #(.NFREE(NCOMMIT)) u_fl (
      .clk, .rst_n,
      .alloc_en (alloc_en[c]), .alloc_ok (fl_ok[c]), .alloc_reg (fl_reg[c]),
      .free_en (fen), .free_reg (freg), .free_cnt (fl_cnt[c])
    );
  end

  // ---- cluster choice
  logic need1, need2, a_valid, choice_ok;
  logic [CW-1:0] a_cl;
  logic [NCL-1:0] choice_oh;

  assign need1 = |rd_valid[0];
  assign need2 = !in_inst.use_imm && (|rd_valid[1]);

  cluster_assign #(.NCL(NCL), .CLASS_MUL(CLASS_MUL)) u_assign (
    .fclass (in_inst.fclass), .need1, .need2,
    .map1 (rd_valid[0]), .map2 (rd_valid[1]),
    .iq_cnt, .iq_full, .free_cnt (fl_cnt),
    .valid (a_valid), .cl (a_cl),
    .room_needed, .room_cl
  );

  assign choice    = lat_v ? lat_cl : a_cl;
  assign choice_ok = lat_v || a_valid;
  assign choice_oh = NCL'(1) << choice;

  logic miss1, miss2, can_go, od_fire, inst_fire;
  assign miss1     = need1 && !rd_valid[0][choice];
  assign miss2     = need2 && !rd_valid[1][choice];
  assign can_go    = in_valid && choice_ok && !rob_full;
  assign od_fire   = can_go && (miss1 || miss2) && !rcq_full;
  assign inst_fire = can_go && !(miss1 || miss2);

  // ---- register reclaim: no cluster of the class has enough free local
  // registers. A copy that another cluster also holds is dropped (its
  // register returns through a silent reorder-buffer entry); a sole copy is
  // first transferred out so that it becomes droppable.
  logic reclaim, evict_fire, copyout;
  logic [NCL-1:0] room_oh;
  assign room_oh    = NCL'(1) << room_cl;
  assign reclaim    = in_valid && !lat_v && room_needed && !rob_full;
  assign evict_fire = reclaim && vic_valid && vic_redundant;
  assign copyout    = reclaim && vic_valid && !vic_redundant;
  assign drop_en    = evict_fire;

  // ---- transfer selection: on-demand (with embedded eager) and eager
  logic           od_v, eg_v, eg_try, eg_fire;
  logic [CW-1:0]  od_src, eg_src;
  logic [NCL-1:0] od_mask, eg_mask;

  multicast_sel #(.NCL(NCL)) u_mc_od (
    .mapped (miss1 ? rd_valid[0] : rd_valid[1]), .free_cnt (fl_cnt),
    .force_mask (choice_oh), .excl_mask ('0),
    .valid (od_v), .src_cl (od_src), .dst_mask (od_mask)
  );

  multicast_sel #(.NCL(NCL)) u_mc_eg (
    .mapped (copyout ? room_oh : rd_valid[3]), .free_cnt (fl_cnt),
    .force_mask ('0), .excl_mask ((inst_fire || lat_v) ? choice_oh : '0),
    .valid (eg_v), .src_cl (eg_src), .dst_mask (eg_mask)
  );

  assign eg_try  = !od_fire && rcq_empty &&
                   (reclaim ? copyout
                            : last_v && !(inst_fire && in_inst.dst == last_areg));
  assign eg_fire = eg_try && eg_v;

  assign rc_valid    = od_fire || eg_fire;
  assign rc_src_cl   = od_fire ? od_src : eg_src;
  assign rc_src_reg  = od_fire ? rd_reg[miss1 ? 0 : 1][od_src] :
                       (copyout ? vic_reg : rd_reg[3][eg_src]);
  assign rc_dst_mask = od_fire ? od_mask : (eg_fire ? eg_mask : '0);
  assign rc_dst_reg  = fl_reg;
  assign cp_en       = rc_valid;
  assign cp_areg     = od_fire ? (miss1 ? in_inst.src1 : in_inst.src2) :
                       (copyout ? vic_areg : last_areg);
  assign def_en      = inst_fire;

  always_comb begin
    for (int c = 0; c < NCL; c++) begin
      alloc_en[c]  = rc_dst_mask[c] || (inst_fire && choice == CW'(c));
      enq_valid[c] = inst_fire && choice == CW'(c);
      alloc_reg[c] = fl_reg[c];
    end
  end

  assign enq_uop = '{op: in_inst.op,
                     s1_zero: !need1, s1: rd_reg[0][choice],
                     s2_zero: !(|rd_valid[1]), use_imm: in_inst.use_imm,
                     s2: rd_reg[1][choice], imm: in_inst.imm,
                     dst: fl_reg[choice], rob: rob_idx};

  assign in_ready      = inst_fire;
  assign rob_valid     = inst_fire || evict_fire;
  assign rob_silent    = evict_fire;
  assign rob_dst       = in_inst.dst;
  assign rob_old_valid = evict_fire ? room_oh : rd_valid[2];
  always_comb
    for (int c = 0; c < NCL; c++) rob_old_reg[c] = evict_fire ? vic_reg : rd_reg[2][c];
  assign rob_copy_seq  = issued_cnt + seq_t'(rc_valid);

  assign ev_ondemand  = od_fire;
  assign ev_eager     = eg_fire;
  assign ev_multicast = rc_valid && ($countones(rc_dst_mask) > 1);
  assign ev_reclaim   = evict_fire;
  assign ev_stall     = in_valid && !inst_fire && !od_fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lat_v      <= 1'b0;
      lat_cl     <= '0;
      last_v     <= 1'b0;
      last_areg  <= '0;
      issued_cnt <= '0;
    end else begin
      if (od_fire) begin
        lat_v  <= 1'b1;
        lat_cl <= choice;
      end else if (inst_fire) begin
        lat_v <= 1'b0;
      end
      if (inst_fire) begin
        last_v    <= 1'b1;
        last_areg <= in_inst.dst;
      end
      if (rc_valid) issued_cnt <= issued_cnt + 1'b1;
    end
  end

  a_od_has_source: assert property (@(posedge clk) disable iff (!rst_n) od_fire |-> od_v)
    else $error("dispatch_unit: on-demand transfer without a source");
  a_alloc_ok: assert property (@(posedge clk) disable iff (!rst_n)
                               inst_fire |-> fl_ok[choice])
    else $error("dispatch_unit: no free local register in the chosen cluster");

endmodule

// cluster_assign: dependence-based choice of the cluster that executes an
// instruction.
//
// Rule of the design: among the clusters whose functional unit is of the
// instruction's class, take the one that already holds the most of the
// instruction's source operands in its local register file; if several tie,
// take the least busy one (fewest issue-queue entries); if they still tie,
// take the lowest-numbered one.
//
// A cluster is only eligible if its issue queue has room and it has enough
// free local registers for the result plus one register per source operand
// that must be transferred in (need = 1 + missing operands). This
// eligibility test is this design's own addition; it keeps dispatch from
// choosing a cluster that could not accept the instruction.
//
// When no cluster is eligible although a class-matching cluster has room in
// its queue, the shortage is local registers: room_needed is raised and
// room_cl names the cluster (most free registers, then lowest index) in which
// dispatch should reclaim a register.
//
// Purely combinational. need1/need2 say whether a source is a register value
// that exists somewhere (an immediate or a never-written register needs no
// transfer); map1/map2 are the per-cluster LRMT valid bits of the sources.
module cluster_assign
  import drf_pkg::*;
#(
  parameter int NCL = 5,
  parameter logic [NCL-1:0] CLASS_MUL = 5'b10000  // bit c set: cluster c is a multiplier
) (
  input  fu_class_e      fclass,
  input  logic           need1,
  input  logic           need2,
  input  logic [NCL-1:0] map1,
  input  logic [NCL-1:0] map2,
  input  iq_cnt_t        iq_cnt   [NCL],
  input  logic [NCL-1:0] iq_full,
  input  free_cnt_t      free_cnt [NCL],
  output logic           valid,
  output logic [$clog2(NCL)-1:0] cl,
  // no cluster eligible only for lack of local registers: the class-matching
  // cluster with room in its queue that has the most free registers
  output logic           room_needed,
  output logic [$clog2(NCL)-1:0] room_cl
);

  logic [1:0] local_n [NCL];
  logic [1:0] miss_n  [NCL];
  logic [NCL-1:0] elig;

  always_comb begin
    for (int c = 0; c < NCL; c++) begin
      local_n[c] = 2'(need1 & map1[c]) + 2'(need2 & map2[c]);
      miss_n[c]  = 2'(need1 && !map1[c]) + 2'(need2 && !map2[c]);
      elig[c]    = (CLASS_MUL[c] == (fclass == FC_MUL)) && !iq_full[c] &&
                   (free_cnt[c] > free_cnt_t'(miss_n[c]));
    end
    valid = 1'b0;
    cl    = '0;
    for (int c = 0; c < NCL; c++) begin
      if (elig[c]) begin
        if (!valid || local_n[c] > local_n[cl] ||
            (local_n[c] == local_n[cl] && iq_cnt[c] < iq_cnt[cl])) begin
          cl = ($clog2(NCL))'(c);
        end
        valid = 1'b1;
      end
    end
    room_needed = 1'b0;
    room_cl     = '0;
    for (int c = 0; c < NCL; c++) begin
      if ((CLASS_MUL[c] == (fclass == FC_MUL)) && !iq_full[c]) begin
        if (!room_needed || free_cnt[c] > free_cnt[room_cl]) room_cl = ($clog2(NCL))'(c);
        room_needed = 1'b1;
      end
    end
    room_needed = room_needed && !valid;
  end

endmodule

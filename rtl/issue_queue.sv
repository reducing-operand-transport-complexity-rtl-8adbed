// issue_queue: the issue queue in front of one functional-unit cluster.
//
// DEPTH entries of renamed instructions (uop_t), kept in age order: entry 0
// is the oldest. Each cycle the oldest entry whose source operands are ready
// is issued (iss_valid / iss_uop); its slot is closed up by shifting the
// younger entries down, and an entry enqueued in the same cycle is appended
// behind them. A source is ready when its local register's ready bit
// (reg_ready, from the cluster's scoreboard) is set, or when it is a zero or
// immediate operand. The functional unit accepts one instruction per cycle,
// so an issued entry always leaves the queue.
//
// count is the queue occupancy, used as the "busy" measure when dispatch
// breaks ties between clusters; full blocks enqueueing (enq_valid must be low
// when full is high).
module issue_queue
  import drf_pkg::*;
#(
  parameter int DEPTH = IQ_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enq_valid,
  input  uop_t                 enq_uop,
  input  logic [LRF_DEPTH-1:0] reg_ready,
  output logic                 iss_valid,
  output uop_t                 iss_uop,
  output iq_cnt_t              count,
  output logic                 full
);

  uop_t             q   [DEPTH];
  logic [DEPTH-1:0] vld;
  logic [DEPTH-1:0] rdy;
  logic [$clog2(DEPTH)-1:0] sel, slot;

  uop_t             q_n   [DEPTH];
  logic [DEPTH-1:0] vld_n;

  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      rdy[i] = vld[i] &&
               (q[i].s1_zero || reg_ready[q[i].s1]) &&
               (q[i].s2_zero || q[i].use_imm || reg_ready[q[i].s2]);
    iss_valid = 1'b0;
    sel       = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (rdy[i]) begin
        iss_valid = 1'b1;
        sel       = ($clog2(DEPTH))'(i);
      end
    end
    iss_uop = q[sel];

    count = '0;
    for (int i = 0; i < DEPTH; i++) count = count + iq_cnt_t'(vld[i]);
    full = (count == iq_cnt_t'(DEPTH));

    slot = '0;
    // remove the issued entry, close the gap, then append
    for (int i = 0; i < DEPTH; i++) begin
      if (iss_valid && i >= int'(sel)) begin
        q_n[i]   = (i + 1 < DEPTH) ? q[(i + 1) % DEPTH] : q[i];
        vld_n[i] = (i + 1 < DEPTH) ? vld[(i + 1) % DEPTH] : 1'b0;
      end else begin
        q_n[i]   = q[i];
        vld_n[i] = vld[i];
      end
    end
    // entries stay packed at the bottom, so the first free slot is the tail
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!vld_n[i]) slot = ($clog2(DEPTH))'(i);
    end
    if (enq_valid) begin
      q_n[slot]   = enq_uop;
      vld_n[slot] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= vld_n;
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) q[i] <= q_n[i];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) enq_valid |-> !full)
    else $error("issue_queue: enqueue into a full queue");

endmodule

// fu_cluster: one functional-unit cluster of the distributed register file.
//
// A cluster bundles an issue queue, one functional unit (an integer ALU or an
// integer multiplier, chosen by FCLASS), the cluster's local register file and
// one ready bit per local register. Instructions arrive already renamed to
// this cluster's local registers. The oldest instruction whose operands are
// ready issues and reads its operands from the local register file through
// the two read ports. The result takes LAT cycles: it is computed in the
// issue cycle and, for LAT > 1, carried through LAT-1 pipeline registers
// (one instruction can still issue every cycle). In the last of those cycles
// it is written through the write port at the clock edge, its ready bit is
// set and the completion (reorder-buffer index and value) is reported.
// Dependent instructions issue LAT cycles after the producer, so a chain of
// single-cycle ALU operations issues back-to-back without a bypass network.
// LAT is 1 for an ALU cluster and MUL_LAT (3) for a multiplier cluster; both
// latencies are this design's own choice.
//
// The read/write port of the local register file belongs to the register
// transfer network: x_addr selects the register, x_rdata/x_ready give its
// value and ready bit when the cluster is a transfer source, x_we writes it
// (and sets its ready bit) when the cluster is a destination.
// Dispatch clears the ready bit of each register it allocates here (alloc_en).
module fu_cluster
  import drf_pkg::*;
#(
  parameter fu_class_e FCLASS = FC_ALU,
  parameter int LAT = (FCLASS == FC_MUL) ? MUL_LAT : 1
) (
  input  logic     clk,
  input  logic     rst_n,
  // from dispatch
  input  logic     enq_valid,
  input  uop_t     enq_uop,
  output iq_cnt_t  iq_count,
  output logic     iq_full,
  input  logic     alloc_en,
  input  lreg_t    alloc_reg,
  // transfer-network port
  input  lreg_t    x_addr,
  input  logic     x_we,
  input  word_t    x_wdata,
  output word_t    x_rdata,
  output logic     x_ready,
  // completion to the reorder buffer
  output logic     cmp_valid,
  output rob_idx_t cmp_rob,
  output word_t    cmp_value
);

  logic [LRF_DEPTH-1:0] ready_q;
  logic  iss_valid;
  uop_t  iss;
  word_t ra, rb, opa, opb, res;
  // write-back stage
  logic     wb_valid;
  lreg_t    wb_dst;
  rob_idx_t wb_rob;
  word_t    wb_val;

  issue_queue u_iq (
    .clk, .rst_n,
    .enq_valid, .enq_uop,
    .reg_ready (ready_q),
    .iss_valid, .iss_uop (iss),
    .count (iq_count), .full (iq_full)
  );

  local_regfile u_lrf (
    .clk,
    .ra_addr (iss.s1), .ra_data (ra),
    .rb_addr (iss.s2), .rb_data (rb),
    .w_en (wb_valid), .w_addr (wb_dst), .w_data (wb_val),
    .x_addr, .x_we, .x_wdata, .x_rdata
  );

  assign opa = iss.s1_zero ? '0 : ra;
  assign opb = iss.use_imm ? iss.imm : (iss.s2_zero ? '0 : rb);

  if (FCLASS == FC_MUL) begin : g_mul
    int_mul u_fu (.op (iss.op), .a (opa), .b (opb), .y (res));
  end else begin : g_alu
    int_alu u_fu (.op (iss.op), .a (opa), .b (opb), .y (res));
  end

  if (LAT == 1) begin : g_lat1
    assign wb_valid = iss_valid;
    assign wb_dst   = iss.dst;
    assign wb_rob   = iss.rob;
    assign wb_val   = res;
  end else begin : g_pipe
    logic     p_valid [LAT-1];
    lreg_t    p_dst   [LAT-1];
    rob_idx_t p_rob   [LAT-1];
    word_t    p_val   [LAT-1];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < LAT - 1; i++) p_valid[i] <= 1'b0;
      end else begin
        p_valid[0] <= iss_valid;
        for (int i = 1; i < LAT - 1; i++) p_valid[i] <= p_valid[i-1];
      end
    end
    always_ff @(posedge clk) begin
      p_dst[0] <= iss.dst;
      p_rob[0] <= iss.rob;
      p_val[0] <= res;
      for (int i = 1; i < LAT - 1; i++) begin
        p_dst[i] <= p_dst[i-1];
        p_rob[i] <= p_rob[i-1];
        p_val[i] <= p_val[i-1];
      end
    end
    assign wb_valid = p_valid[LAT-2];
    assign wb_dst   = p_dst[LAT-2];
    assign wb_rob   = p_rob[LAT-2];
    assign wb_val   = p_val[LAT-2];
  end

  assign x_ready   = ready_q[x_addr];
  assign cmp_valid = wb_valid;
  assign cmp_rob   = wb_rob;
  assign cmp_value = wb_val;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ready_q <= '0;
    end else begin
      if (alloc_en)  ready_q[alloc_reg] <= 1'b0;
      if (wb_valid)  ready_q[wb_dst]    <= 1'b1;
      if (x_we)      ready_q[x_addr]    <= 1'b1;
    end
  end

endmodule

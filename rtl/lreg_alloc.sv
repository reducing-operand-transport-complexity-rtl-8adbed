// lreg_alloc: free list of the local registers of one cluster.
//
// A bit vector marks the free registers. The lowest-numbered free register is
// offered combinationally on alloc_reg; alloc_en takes it at the next edge.
// Commit returns superseded registers on NFREE ports (free_en / free_reg),
// one per commit slot; two ports never name the same register. free_cnt is
// the number of free registers at the start of the cycle and is what the
// dispatch logic uses to decide whether a cluster can accept a result or a
// transferred value. After reset every register is free.
module lreg_alloc
  import drf_pkg::*;
#(
  parameter int DEPTH = LRF_DEPTH,
  parameter int NFREE = COMMIT_W
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      alloc_en,
  output logic      alloc_ok,
  output lreg_t     alloc_reg,
  input  logic [NFREE-1:0] free_en,
  input  lreg_t     free_reg [NFREE],
  output free_cnt_t free_cnt
);

  logic [DEPTH-1:0] free_q;

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_reg = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (free_q[i]) begin
        alloc_ok  = 1'b1;
        alloc_reg = lreg_t'(i);
      end
    end
    free_cnt = '0;
    for (int i = 0; i < DEPTH; i++) free_cnt = free_cnt + free_cnt_t'(free_q[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_q <= '1;
    end else begin
      if (alloc_en) free_q[alloc_reg] <= 1'b0;
      for (int k = 0; k < NFREE; k++)
        if (free_en[k]) free_q[free_reg[k]] <= 1'b1;
    end
  end

  a_alloc_avail: assert property (@(posedge clk) disable iff (!rst_n) alloc_en |-> alloc_ok)
    else $error("lreg_alloc: allocation from an empty free list");
  for (genvar k = 0; k < NFREE; k++) begin : g_chk
    a_double_free: assert property (@(posedge clk) disable iff (!rst_n) free_en[k] |-> !free_q[free_reg[k]])
      else $error("lreg_alloc: register %0d freed twice", free_reg[k]);
  end

endmodule

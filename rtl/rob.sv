// rob: reorder buffer and in-order commit.
//
// Every dispatched instruction (register transfers excepted) takes an entry
// at the tail. The entry remembers the destination architectural register,
// the local registers that held that register's previous value in every
// cluster (the mappings the instruction's write invalidated), and the number
// of register transfers issued up to its dispatch (copy_seq). A cluster marks
// the entry done and deposits the result when the instruction executes.
//
// The head entry commits when it is done and every transfer issued before it
// has completed (done_cnt has reached copy_seq). Committing reports the
// destination and value, and returns the previous local registers of the
// destination to the free lists of their clusters. Waiting for the older
// transfers guarantees that no transfer still in the Rcopy queue can read a
// register after it was freed. Up to NCOMMIT entries retire per cycle, in
// order: entry k of the head group retires in the same cycle as the head
// only if entries 0..k-1 retire too. Every retiring entry drives its own
// commit slot and its own set of free ports (one per cluster), so a cluster
// can get up to NCOMMIT registers back in one cycle.
//
// A silent entry (alloc_silent) carries no result: dispatch uses it to give a
// local register back once every older operation is finished. It is done
// from the start, frees its recorded registers when it reaches the head and
// is not reported on the commit outputs.
module rob
  import drf_pkg::*;
#(
  parameter int NCL   = 5,
  parameter int DEPTH = ROB_DEPTH,
  parameter int NCOMMIT = COMMIT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  // allocation from dispatch
  input  logic           alloc_valid,
  input  logic           alloc_silent,
  input  areg_t          alloc_dst,
  input  logic [NCL-1:0] alloc_old_valid,
  input  lreg_t          alloc_old_reg [NCL],
  input  seq_t           alloc_copy_seq,
  output rob_idx_t       alloc_idx,
  output logic           full,
  // completions from the clusters
  input  logic [NCL-1:0] cmp_valid,
  input  rob_idx_t       cmp_rob   [NCL],
  input  word_t          cmp_value [NCL],
  // transfers completed so far
  input  seq_t           copy_done_cnt,
  // commit, slot 0 being the oldest
  output logic [NCOMMIT-1:0] commit_valid,
  output areg_t          commit_dst   [NCOMMIT],
  output word_t          commit_value [NCOMMIT],
  output logic [NCL-1:0] free_en  [NCOMMIT],
  output lreg_t          free_reg [NCOMMIT][NCL]
);

  typedef struct packed {
    logic           silent;
    areg_t          dst;
    logic [NCL-1:0] old_valid;
    seq_t           copy_seq;
  } rob_ent_t;

  rob_ent_t ent   [DEPTH];
  lreg_t    oldr  [DEPTH][NCL];
  word_t    value [DEPTH];
  logic [DEPTH-1:0] done;
  rob_idx_t head, tail;
  logic [ROB_W:0] cnt;

  // a + b modulo DEPTH, for b <= DEPTH
  function automatic rob_idx_t wrap_add(rob_idx_t a, logic [ROB_W:0] b);
    logic [ROB_W+1:0] t;
    t = {2'b00, a} + {1'b0, b};
    if (t >= (ROB_W + 2)'(DEPTH)) t = t - (ROB_W + 2)'(DEPTH);
    return rob_idx_t'(t);
  endfunction

  assign full      = (cnt == (ROB_W + 1)'(DEPTH));
  assign alloc_idx = tail;

  rob_idx_t         ridx [NCOMMIT];
  logic [NCOMMIT-1:0] retire;
  logic [ROB_W:0]   n_ret;
  always_comb begin
    seq_t copy_gap;
    logic older_ok;
    older_ok = 1'b1;
    n_ret = '0;
    for (int k = 0; k < NCOMMIT; k++) begin
      ridx[k]   = wrap_add(head, (ROB_W + 1)'(k));
      copy_gap  = copy_done_cnt - ent[ridx[k]].copy_seq;
      older_ok  = older_ok && (cnt > (ROB_W + 1)'(k)) && done[ridx[k]] && !copy_gap[SEQ_W-1];
      retire[k] = older_ok;
      n_ret     = n_ret + (ROB_W + 1)'(retire[k]);
      commit_valid[k] = retire[k] && !ent[ridx[k]].silent;
      commit_dst[k]   = ent[ridx[k]].dst;
      commit_value[k] = value[ridx[k]];
      for (int c = 0; c < NCL; c++) begin
        free_en[k][c]  = retire[k] && ent[ridx[k]].old_valid[c];
        free_reg[k][c] = oldr[ridx[k]][c];
      end
    end
  end

  logic push;
  assign push = alloc_valid && !full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head <= '0;
      tail <= '0;
      cnt  <= '0;
      done <= '0;
    end else begin
      if (push) begin
        tail       <= (tail == rob_idx_t'(DEPTH - 1)) ? '0 : tail + 1'b1;
        done[tail] <= alloc_silent;
      end
      for (int c = 0; c < NCL; c++)
        if (cmp_valid[c]) done[cmp_rob[c]] <= 1'b1;
      head <= wrap_add(head, n_ret);
      cnt  <= cnt + (ROB_W + 1)'(push) - n_ret;
    end
  end

  always_ff @(posedge clk) begin
    if (push) begin
      ent[tail] <= '{silent: alloc_silent, dst: alloc_dst, old_valid: alloc_old_valid, copy_seq: alloc_copy_seq};
      for (int c = 0; c < NCL; c++) oldr[tail][c] <= alloc_old_reg[c];
    end
    for (int c = 0; c < NCL; c++)
      if (cmp_valid[c]) value[cmp_rob[c]] <= cmp_value[c];
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) alloc_valid |-> !full)
    else $error("rob: allocation into a full buffer");

endmodule

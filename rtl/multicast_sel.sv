// multicast_sel: source and destination set of one register transfer.
//
// Given where an architectural register is currently mapped, pick the source
// cluster (any cluster holding a valid copy; the lowest-numbered one is used)
// and the multicast destination set: every cluster that has no copy yet and
// still has free local registers (more than XFER_RESERVE of them), plus the
// cluster in force_mask and minus the clusters in excl_mask.
//
// The same selector serves both kinds of transfer:
//  * on-demand: force_mask is the cluster the consuming instruction was sent
//    to; the other clusters get the value as embedded eager copies;
//  * eager: force_mask is empty; the register is the one defined most
//    recently.
// valid is set when a source exists and the destination set is not empty.
// Purely combinational.
module multicast_sel
  import drf_pkg::*;
#(
  parameter int NCL = 5
) (
  input  logic [NCL-1:0] mapped,
  input  free_cnt_t      free_cnt [NCL],
  input  logic [NCL-1:0] force_mask,
  input  logic [NCL-1:0] excl_mask,
  output logic           valid,
  output logic [$clog2(NCL)-1:0] src_cl,
  output logic [NCL-1:0] dst_mask
);

  always_comb begin
    src_cl = '0;
    for (int c = NCL - 1; c >= 0; c--)
      if (mapped[c]) src_cl = ($clog2(NCL))'(c);
    for (int c = 0; c < NCL; c++)
      dst_mask[c] = !mapped[c] && !excl_mask[c] &&
                    (force_mask[c] || free_cnt[c] > free_cnt_t'(XFER_RESERVE));
    valid = (|mapped) && (|dst_mask);
  end

endmodule

// xfer_net: the dedicated register transfer network, a single multicast bus.
//
// The Rcopy unit presents one transfer at a time: source cluster, source local
// register, destination cluster set and the local register allocated in each
// destination. The network drives every cluster's transfer port address
// (the source register in the source cluster, the allocated register in each
// destination), selects the source cluster's value and ready bit onto the
// bus, and, once the source value is ready, writes the bus value into all
// destination local register files in the same cycle (multicast). go tells
// the Rcopy unit that the transfer has completed. Purely combinational; the
// writes land at the clusters' next clock edge.
module xfer_net
  import drf_pkg::*;
#(
  parameter int NCL = 5
) (
  input  logic           req_valid,
  input  logic [$clog2(NCL)-1:0] req_src_cl,
  input  lreg_t          req_src_reg,
  input  logic [NCL-1:0] req_dst_mask,
  input  lreg_t          req_dst_reg [NCL],
  output logic           go,
  // per-cluster transfer ports
  input  word_t          cl_rdata [NCL],
  input  logic [NCL-1:0] cl_ready,
  output lreg_t          cl_addr  [NCL],
  output logic [NCL-1:0] cl_we,
  output word_t          cl_wdata [NCL]
);

  word_t bus;

  always_comb begin
    bus = cl_rdata[req_src_cl];
    go  = req_valid && cl_ready[req_src_cl];
    for (int c = 0; c < NCL; c++) begin
      cl_addr[c]  = req_dst_mask[c] ? req_dst_reg[c] : req_src_reg;
      cl_we[c]    = go && req_dst_mask[c];
      cl_wdata[c] = bus;
    end
  end

endmodule

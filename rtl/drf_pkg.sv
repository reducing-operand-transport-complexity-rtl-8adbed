// drf_pkg: types and sizes shared by the distributed-register-file back end.
//
// The machine keeps no central register file. Every functional-unit cluster
// owns a small local register file (LRF); a mapping table records which local
// registers hold the current value of each architectural register. The sizes
// below are the configuration the design is built around: 32-bit registers,
// 32 local registers per cluster, 8-entry issue queues per unit and a commit
// width of 4 (as in the reference 4-way configuration). The number of
// architectural registers (32), the reorder buffer depth (32) and the
// multiply latency (3 cycles, fully pipelined; single-cycle ALU) are this
// design's own choices.
package drf_pkg;

  localparam int XLEN      = 32;  // register width
  localparam int NARCH     = 32;  // architectural integer registers
  localparam int LRF_DEPTH = 32;  // local registers per cluster
  localparam int IQ_DEPTH  = 8;   // issue queue entries per unit
  localparam int RCQ_DEPTH = 8;   // Rcopy unit issue queue entries
  localparam int ROB_DEPTH = 32;  // reorder buffer entries
  localparam int COMMIT_W  = 4;   // instructions committed per cycle at most
  localparam int MUL_LAT   = 3;   // integer multiply latency (pipelined)

  // A cluster only takes part in a multicast (eager or on-demand extra
  // destination) if it keeps more than this many free local registers, so
  // that speculative copies never starve an instruction that needs up to two
  // transfers plus a result register.
  localparam int XFER_RESERVE = 3;

  localparam int AREG_W = $clog2(NARCH);
  localparam int LREG_W = $clog2(LRF_DEPTH);
  localparam int ROB_W  = $clog2(ROB_DEPTH);
  localparam int FREE_W = $clog2(LRF_DEPTH + 1);
  localparam int IQC_W  = $clog2(IQ_DEPTH + 1);
  localparam int SEQ_W  = 16;     // width of the transfer sequence counters

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [AREG_W-1:0] areg_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [ROB_W-1:0]  rob_idx_t;
  typedef logic [FREE_W-1:0] free_cnt_t;
  typedef logic [IQC_W-1:0]  iq_cnt_t;
  typedef logic [SEQ_W-1:0]  seq_t;

  // Functional unit classes that are built.
  typedef enum logic [0:0] {FC_ALU = 1'b0, FC_MUL = 1'b1} fu_class_e;

  typedef enum logic [3:0] {
    OP_ADD = 4'd0, OP_SUB = 4'd1, OP_AND = 4'd2, OP_OR  = 4'd3,
    OP_XOR = 4'd4, OP_SLT = 4'd5, OP_SLL = 4'd6, OP_SRL = 4'd7,
    OP_MUL = 4'd8
  } op_e;

  // A decoded instruction as it enters dispatch.
  typedef struct packed {
    fu_class_e fclass;
    op_e       op;
    areg_t     dst;
    areg_t     src1;
    areg_t     src2;
    logic      use_imm;   // second operand is imm instead of src2
    word_t     imm;
  } inst_t;

  // An instruction renamed to local registers of one cluster, as it sits in
  // that cluster's issue queue. A source whose architectural register was
  // never written reads as zero and is flagged *_zero.
  typedef struct packed {
    op_e      op;
    logic     s1_zero;
    lreg_t    s1;
    logic     s2_zero;
    logic     use_imm;
    lreg_t    s2;
    word_t    imm;
    lreg_t    dst;
    rob_idx_t rob;
  } uop_t;

endpackage

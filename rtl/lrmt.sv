// lrmt: local register mapping table.
//
// For every architectural register and every cluster the table holds a valid
// bit and the local register that carries the register's current value in
// that cluster. One architectural register can be mapped in several clusters
// at once (after a multicast transfer); a cluster holds at most one mapping
// per register.
//
// Ports (all updates take effect at the next rising edge):
//  * NRD combinational lookup ports: the full row (valid per cluster and
//    local register per cluster) of one architectural register.
//  * def: an instruction writes def_areg into local register def_reg of
//    cluster def_cl. All previous mappings of the register, in every
//    cluster, are invalidated and only the new one stays.
//  * cp: a register transfer adds mappings of cp_areg in every cluster of
//    cp_mask (local register cp_reg[c] in cluster c).
//  * drop: removes the mapping of drop_areg in cluster drop_cl (used to
//    reclaim a local register from a cluster that has run out of them).
//  * victim search: for cluster vic_cl, the lowest architectural register
//    mapped there other than the two in vic_excl; redundant candidates (also
//    mapped in another cluster) are preferred. vic_redundant says whether
//    the one returned is redundant.
// If def and cp name the same register in one cycle the def wins; the user
// never applies drop together with cp or def to the same register.
// Reset leaves every mapping invalid: a register with no mapping anywhere has
// never been written and reads as zero.
module lrmt
  import drf_pkg::*;
#(
  parameter int NCL = 5,
  parameter int NRD = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  areg_t          rd_areg  [NRD],
  output logic [NCL-1:0] rd_valid [NRD],
  output lreg_t          rd_reg   [NRD][NCL],
  input  logic           def_en,
  input  areg_t          def_areg,
  input  logic [$clog2(NCL)-1:0] def_cl,
  input  lreg_t          def_reg,
  input  logic           cp_en,
  input  areg_t          cp_areg,
  input  logic [NCL-1:0] cp_mask,
  input  lreg_t          cp_reg   [NCL],
  input  logic           drop_en,
  input  areg_t          drop_areg,
  input  logic [$clog2(NCL)-1:0] drop_cl,
  input  logic [$clog2(NCL)-1:0] vic_cl,
  input  areg_t          vic_excl [2],
  output logic           vic_valid,
  output logic           vic_redundant,
  output areg_t          vic_areg,
  output lreg_t          vic_reg
);

  logic [NCL-1:0] valid [NARCH];
  lreg_t          map   [NARCH][NCL];

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_valid[p] = valid[rd_areg[p]];
      for (int c = 0; c < NCL; c++) rd_reg[p][c] = map[rd_areg[p]][c];
    end
  end

  logic [NARCH-1:0] cand, redund;

  always_comb begin
    for (int a = 0; a < NARCH; a++) begin
      cand[a]   = valid[a][vic_cl] && areg_t'(a) != vic_excl[0] && areg_t'(a) != vic_excl[1];
      redund[a] = cand[a] && ((valid[a] & ~(NCL'(1) << vic_cl)) != '0);
    end
    vic_valid     = |cand;
    vic_redundant = |redund;
    vic_areg      = '0;
    for (int a = NARCH - 1; a >= 0; a--)
      if (vic_redundant ? redund[a] : cand[a]) vic_areg = areg_t'(a);
    vic_reg = map[vic_areg][vic_cl];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int a = 0; a < NARCH; a++) valid[a] <= '0;
    end else begin
      if (cp_en) begin
        valid[cp_areg] <= valid[cp_areg] | cp_mask;
      end
      if (drop_en) begin
        valid[drop_areg][drop_cl] <= 1'b0;
      end
      if (def_en) begin
        valid[def_areg] <= NCL'(1) << def_cl;
      end
    end
  end

  // The local register numbers need no reset: they are only used where valid.
  always_ff @(posedge clk) begin
    if (cp_en) begin
      for (int c = 0; c < NCL; c++)
        if (cp_mask[c]) map[cp_areg][c] <= cp_reg[c];
    end
    if (def_en) map[def_areg][def_cl] <= def_reg;
  end

endmodule

// rev_pkg: shared cost bookkeeping for the reversible-logic multiplier.
//
// A reversible design is judged by four figures of merit: the number of
// gates, the number of constant (ancilla) inputs, the number of garbage
// outputs and the quantum cost, i.e. the number of elementary 1x1/2x2
// quantum primitives needed for each gate. Their sum is the total
// reversible-logic implementation cost (TRLIC).
//
// The per-gate quantum costs below (Feynman 1, Peres 4, HNG 6, BVPPG 10) are
// the published values for these gates. The per-block figures are built up
// from the gate instances of each module in this library, so that a
// testbench can compare the totals of the 4x4 multiplier with the published
// figures (31 gates, 31 constant inputs, 38 garbage outputs, quantum cost
// 150, TRLIC 250). Nothing here is synthesized; it is a set of constants.
package rev_pkg;

  typedef struct packed {
    int unsigned gates;
    int unsigned consts;
    int unsigned garbage;
    int unsigned qcost;
  } rev_cost_t;

  localparam int unsigned QC_FG    = 1;
  localparam int unsigned QC_PG    = 4;
  localparam int unsigned QC_HNG   = 6;
  localparam int unsigned QC_BVPPG = 10;

  function automatic rev_cost_t cost_add(rev_cost_t x, rev_cost_t y);
    rev_cost_t s;
    s.gates   = x.gates   + y.gates;
    s.consts  = x.consts  + y.consts;
    s.garbage = x.garbage + y.garbage;
    s.qcost   = x.qcost   + y.qcost;
    return s;
  endfunction

  function automatic rev_cost_t cost_scale(rev_cost_t x, int unsigned n);
    rev_cost_t s;
    s.gates   = x.gates   * n;
    s.consts  = x.consts  * n;
    s.garbage = x.garbage * n;
    s.qcost   = x.qcost   * n;
    return s;
  endfunction

  function automatic int unsigned trlic(rev_cost_t x);
    return x.gates + x.consts + x.garbage + x.qcost;
  endfunction

  // Peres gate as half adder: C tied to 0, A passed out as garbage.
  localparam rev_cost_t COST_PERES_HA = '{gates: 1, consts: 1, garbage: 1, qcost: QC_PG};
  // HNG gate as full adder: D tied to 0, A and B passed out as garbage.
  localparam rev_cost_t COST_HNG_FA   = '{gates: 1, consts: 1, garbage: 2, qcost: QC_HNG};
  // 2x2 multiplier: BVPPG (2 constants, 1 garbage), three Peres gates
  // (1 constant each; 1, 2 and 1 garbage), one Feynman gate.
  localparam rev_cost_t COST_V2X2 = '{gates: 5, consts: 5, garbage: 5,
                                      qcost: QC_BVPPG + 3 * QC_PG + QC_FG};
  localparam rev_cost_t COST_RCA4 = cost_add(COST_PERES_HA, cost_scale(COST_HNG_FA, 3));
  // The carry of the 2-bit adder is the discarded last carry, not garbage.
  localparam rev_cost_t COST_RCA2 = cost_add(COST_PERES_HA, COST_HNG_FA);
  localparam rev_cost_t COST_V4X4 = cost_add(cost_add(cost_scale(COST_V2X2, 4),
                                                      cost_scale(COST_RCA4, 2)),
                                             cost_add(COST_RCA2, COST_PERES_HA));

endpackage

// rev_pkg: shared type definitions for the reversible ALU.
//
// The multiplier can be assembled from two families of reversible gates:
// the summation network (the full and half adders) is built from either
// HNG or TSG gates, and the partial products (the single-bit AND terms)
// from either Peres or Toffoli gates. All four combinations compute the
// same values; they differ only in gate-level cost. The enums below select
// the family through module parameters. HNG summation with Peres partial
// products is the default because it is the combination with the lowest
// quantum cost.
package rev_pkg;

  // Gate used for every full/half adder of the summation network.
  typedef enum logic {
    SUM_HNG = 1'b0,  // HNG gate: (A, B, Cin, 0) -> R = sum, S = carry
    SUM_TSG = 1'b1   // TSG gate: (A, B, 0, Cin) -> R = sum, S = carry
  } sum_gate_e;

  // Gate used to form each partial product bit a_i & b_j.
  typedef enum logic {
    PPG_PERES   = 1'b0,  // Peres gate with C = 0: R = A & B
    PPG_TOFFOLI = 1'b1   // Toffoli gate with C = 0: R = A & B
  } ppg_gate_e;

endpackage

// rev_pkg: cost figures of the reversible gate library.
//
// Each gate of the library carries a quantum cost (number of elementary
// 1x1/2x2 quantum operations) and a delay in units of one elementary
// operation (delta). The figures are the ones quoted for each gate:
// NOT 0/1, Feynman 1/1, Toffoli 5/5, Fredkin 5/5, modified Fredkin 4/4,
// Peres 4/4. The storage elements sum them into a QUANTUM_COST localparam
// so that the gate count of a netlist can be read off and checked; the
// sums of the latches that other elements reuse are kept here as well,
// together with their path delays (DELAY).
package rev_pkg;

  typedef struct packed {
    int unsigned qc;     // quantum cost
    int unsigned delay;  // delay in delta units
  } gate_cost_t;

  localparam gate_cost_t COST_NOT     = '{qc: 0, delay: 1};
  localparam gate_cost_t COST_FEYNMAN = '{qc: 1, delay: 1};
  localparam gate_cost_t COST_TOFFOLI = '{qc: 5, delay: 5};
  localparam gate_cost_t COST_FREDKIN = '{qc: 5, delay: 5};
  localparam gate_cost_t COST_MF      = '{qc: 4, delay: 4};
  localparam gate_cost_t COST_PERES   = '{qc: 4, delay: 4};

  // Gate-count sums of the storage elements (each module's QUANTUM_COST).
  localparam int unsigned QC_D_LATCH    = COST_MF.qc + 2 * COST_FEYNMAN.qc;
  localparam int unsigned QC_SR_LATCH   = COST_PERES.qc + COST_MF.qc + 4 * COST_FEYNMAN.qc;
  localparam int unsigned QC_JK_LATCH_E = COST_NOT.qc + 2 * COST_MF.qc + COST_FEYNMAN.qc;
  localparam int unsigned QC_T_LATCH_E  = COST_PERES.qc + COST_FEYNMAN.qc;

  // Longest input-to-Q path of the storage elements, in delta units
  // (each module's DELAY): the gate delays along that path added up.
  localparam int unsigned DL_D_LATCH    = COST_MF.delay + 2 * COST_FEYNMAN.delay;
  localparam int unsigned DL_SR_LATCH   = COST_PERES.delay + COST_MF.delay + 3 * COST_FEYNMAN.delay;
  localparam int unsigned DL_JK_LATCH_E = COST_NOT.delay + 2 * COST_MF.delay + COST_FEYNMAN.delay;
  localparam int unsigned DL_T_LATCH_E  = COST_PERES.delay + COST_FEYNMAN.delay;

endpackage

// fredkin_pkg: types and constants shared by the Fredkin-gate FPGA fabric.
//
// Every storage and logic element of this fabric is made of conservative
// reversible Fredkin gates, and every gate carries a concurrent parity check
// (parity of the three inputs against parity of the three outputs). To make
// that check observable in simulation, each module takes a fault_t that can
// place one single-cell defect on one gate. The defect behaviour is the
// measured fault-pattern table of the QCA Fredkin layout: for each of 19
// defect patterns it lists the output vector the damaged gate produces for
// each of the eight input vectors. The table is the document's; the
// single-defect port and the gate numbering are this design's own choice.
//
// Vector coding: a 3-bit vector is {A,B,C} for inputs and {P,Q,R} for outputs,
// A/P being the most significant bit.
package fredkin_pkg;

  // Width of the gate index inside a fault_t; large enough for a whole tile.
  localparam int unsigned FAULT_GATE_W = 12;
  localparam int unsigned FAULT_PAT_W  = 5;

  // Defect patterns known for the QCA Fredkin layout (1..NUM_FAULT_PATTERNS).
  localparam int unsigned NUM_FAULT_PATTERNS = 19;

  typedef logic [2:0] fvec_t;

  // One emulated defect: when en is set, gate number `gate` of the module
  // receiving the struct behaves as defect pattern `pattern` (0 = no defect).
  typedef struct packed {
    logic                    en;
    logic [FAULT_GATE_W-1:0] gate;
    logic [FAULT_PAT_W-1:0]  pattern;
  } fault_t;

  localparam fault_t NO_FAULT = '{en: 1'b0, gate: '0, pattern: '0};

  // Faulty output table. Entry k holds eight octal digits; digit i (counted
  // from the least significant) is the output vector for input vector i.
  localparam logic [23:0] FAULT_TABLE [1:NUM_FAULT_PATTERNS] = '{
    24'o64643310,  //  1
    24'o64753210,  //  2
    24'o75753211,  //  3
    24'o64753311,  //  4
    24'o75742200,  //  5
    24'o75641010,  //  6
    24'o75642301,  //  7
    24'o75641212,  //  8
    24'o75653311,  //  9
    24'o75643311,  // 10
    24'o64643210,  // 11
    24'o75641032,  // 12
    24'o77641010,  // 13
    24'o75643232,  // 14
    24'o55463230,  // 15
    24'o55443230,  // 16
    24'o77463230,  // 17
    24'o75641032,  // 18
    24'o31207654   // 19
  };

  // Output of a defective gate with the given pattern for input vector `in`.
  function automatic fvec_t faulty_output(logic [FAULT_PAT_W-1:0] pattern, fvec_t in);
    logic [23:0] row;
    row = FAULT_TABLE[pattern];
    return row[3*in +: 3];
  endfunction

  // True when `pattern` names a known defect.
  function automatic logic pattern_valid(logic [FAULT_PAT_W-1:0] pattern);
    return (int'(pattern) >= 1) && (int'(pattern) <= int'(NUM_FAULT_PATTERNS));
  endfunction

  // Rebase a fault for a sub-block that owns gates [base, base+count) of the
  // parent: the returned fault is enabled only if it lands inside that range,
  // and its gate number is relative to the sub-block.
  function automatic fault_t fault_slice(fault_t f, int unsigned base, int unsigned count);
    fault_t r;
    r         = f;
    r.en      = f.en && (int'(f.gate) >= int'(base)) && (int'(f.gate) < int'(base + count));
    r.gate    = f.gate - FAULT_GATE_W'(base);
    return r;
  endfunction

endpackage

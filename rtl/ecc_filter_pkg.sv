// ecc_filter_pkg: constants and types shared by the ECC-protected parallel
// filter bank.
//
// The bank protects four parallel filters (the "data" filters, playing the
// role of the data bits d1..d4 of a Hamming(7,4) code) with three redundant
// filters (the "check" filters, playing the role of the parity bits p1..p3).
// Check filter i filters the sum of the data inputs selected by row i of the
// parity equations
//     p1 = d1 + d2 + d3,  p2 = d1 + d2 + d4,  p3 = d1 + d3 + d4,
// which are the XOR equations of the Hamming(7,4) code with the XOR replaced
// by an arithmetic sum, so that linearity of the filter carries the code
// through the filters.
//
// Bit conventions used throughout: index j of a data array is filter d(j+1);
// index i of a check array or of the syndrome is check p(i+1) / syndrome bit
// s(i+1). CHECK_MASK[i][j] is 1 when data filter j takes part in check i.
package ecc_filter_pkg;

  localparam int unsigned N_DATA  = 4;  // original (protected) filters
  localparam int unsigned N_CHECK = 3;  // redundant filters
  localparam int unsigned N_FILT  = N_DATA + N_CHECK;

  // Rows of the parity part of the check matrix H = [P | I]:
  //   row 0: d1 d2 d3   row 1: d1 d2 d4   row 2: d1 d3 d4
  localparam logic [N_CHECK-1:0][N_DATA-1:0] CHECK_MASK = {
    4'b1101,   // check 3: d4, d3, d1
    4'b1011,   // check 2: d4, d2, d1
    4'b0111    // check 1: d3, d2, d1
  };

  // Where a single fault is located, as decoded from the syndrome (Table I
  // of the code: seven non-zero syndromes, one per filter).
  typedef enum logic [2:0] {
    LOC_NONE = 3'd0,
    LOC_D1   = 3'd1,
    LOC_D2   = 3'd2,
    LOC_D3   = 3'd3,
    LOC_D4   = 3'd4,
    LOC_P1   = 3'd5,
    LOC_P2   = 3'd6,
    LOC_P3   = 3'd7
  } err_loc_e;

  // Syndrome produced by a fault on data filter j: column j of H.
  function automatic logic [N_CHECK-1:0] data_syndrome(input int unsigned j);
    logic [N_CHECK-1:0] col;
    for (int unsigned i = 0; i < N_CHECK; i++) col[i] = CHECK_MASK[i][j];
    return col;
  endfunction

  // First check that data filter j takes part in; its redundant filter is
  // the one used to rebuild the output of data filter j.
  function automatic int unsigned repair_check(input int unsigned j);
    for (int unsigned i = 0; i < N_CHECK; i++)
      if (CHECK_MASK[i][j]) return i;
    return 0;
  endfunction

endpackage

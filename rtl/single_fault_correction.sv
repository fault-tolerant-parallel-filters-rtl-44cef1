// single_fault_correction: locates a single faulty filter from the syndrome
// and rebuilds the output of a faulty original filter.
//
// Decoding follows the syndrome table of the Hamming(7,4) code:
//     s1 s2 s3 = 000 no error      111 d1   110 d2   101 d3   011 d4
//                100 p1            010 p2   001 p3
// where d1..d4 are the original filters and p1..p3 the redundant ones.
// A fault on original filter j is corrected by recomputing its output from
// the first redundant filter whose check includes it, minus the other
// original filters of that check:
//     yc1 = z1 - y2 - y3,  yc2 = z1 - y1 - y3,  yc3 = z1 - y1 - y2,
//     yc4 = z2 - y1 - y2.
// A fault on a redundant filter needs no action on the outputs. Outputs of
// filters not in error pass unchanged.
//
// Interface: purely combinational; s[0] = s1. err_loc names the filter in
// error, error_detected is high for any non-zero syndrome, corrected is high
// when an original filter's output was replaced. Like the code it rests on,
// the block assumes at most one faulty filter at a time; two faults give a
// wrong location. The rebuild rule is the published one for yc1; applying it
// to the other outputs with z1/z2, and the flag outputs, are this design's.
module single_fault_correction
  import ecc_filter_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [N_DATA-1:0][DATA_W-1:0]  y,
  input  logic [N_CHECK-1:0][DATA_W-1:0] z,
  input  logic [N_CHECK-1:0]             s,
  output logic [N_DATA-1:0][DATA_W-1:0]  yc,
  output err_loc_e                       err_loc,
  output logic                           error_detected,
  output logic                           corrected
);

  // Rebuilt output for each original filter, used only when it is in error.
  logic [N_DATA-1:0][DATA_W-1:0] rebuilt;

  always_comb begin
    for (int unsigned j = 0; j < N_DATA; j++) begin
      rebuilt[j] = z[repair_check(j)];
      for (int unsigned k = 0; k < N_DATA; k++)
        if (k != j && CHECK_MASK[repair_check(j)][k]) rebuilt[j] -= y[k];
    end
  end

  always_comb begin
    err_loc = LOC_NONE;
    for (int unsigned j = 0; j < N_DATA; j++)
      if (s == data_syndrome(j)) err_loc = err_loc_e'(int'(LOC_D1) + j);
    for (int unsigned i = 0; i < N_CHECK; i++)
      if (s == N_CHECK'(1 << i)) err_loc = err_loc_e'(int'(LOC_P1) + i);
  end

  always_comb begin
    yc        = y;
    corrected = 1'b0;
    for (int unsigned j = 0; j < N_DATA; j++)
      if (err_loc == err_loc_e'(int'(LOC_D1) + j)) begin
        yc[j]     = rebuilt[j];
        corrected = 1'b1;
      end
  end

  assign error_detected = |s;

endmodule

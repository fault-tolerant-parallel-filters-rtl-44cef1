// syndrome_check: computes the syndrome s = y H^T of the protected filter
// bank.
//
// For check i the outputs of the original filters named by row i of the
// parity equations are summed again and subtracted from the output z(i+1) of
// the matching redundant filter:
//     r1 = z1 - y1 - y2 - y3,  r2 = z2 - y1 - y2 - y4,  r3 = z3 - y1 - y3 - y4.
// A residue whose magnitude is larger than THRESHOLD sets syndrome bit
// s(i+1) to 1; a residue within the threshold counts as 0. The threshold
// exists so that small differences from finite-precision effects between the
// original and the redundant filters are not taken for errors.
//
// Interface: purely combinational. residue is the signed difference per
// check (two's complement, DATA_W bits), s the syndrome (s[0] = s1).
// THRESHOLD defaults to 0: in this design all filters compute modulo
// 2^DATA_W with identical structure, so a fault-free bank gives residues of
// exactly 0. That default, and the use of the magnitude (not the signed
// value) in the comparison, are this design's choices.
module syndrome_check
  import ecc_filter_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned THRESHOLD = 0
) (
  input  logic [N_DATA-1:0][DATA_W-1:0]  y,
  input  logic [N_CHECK-1:0][DATA_W-1:0] z,
  output logic [N_CHECK-1:0][DATA_W-1:0] residue,
  output logic [N_CHECK-1:0]             s
);

  logic [N_CHECK-1:0][DATA_W-1:0] mag;

  always_comb begin
    for (int unsigned i = 0; i < N_CHECK; i++) begin
      residue[i] = z[i];
      for (int unsigned j = 0; j < N_DATA; j++)
        if (CHECK_MASK[i][j]) residue[i] -= y[j];
      // |residue|; the most negative value stays as is and, read unsigned,
      // is above any threshold that fits in DATA_W - 1 bits.
      mag[i] = residue[i][DATA_W-1] ? DATA_W'(-residue[i]) : residue[i];
      s[i]   = mag[i] > DATA_W'(THRESHOLD);
    end
  end

endmodule

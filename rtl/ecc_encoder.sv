// ecc_encoder: the coding stage that feeds the redundant filters.
//
// Each redundant input is the sum of the original inputs named by one row of
// the code's parity equations:
//     x5 = x1 + x2 + x3,   x6 = x1 + x2 + x4,   x7 = x1 + x3 + x4.
// These are the parity equations of the Hamming(7,4) code with XOR replaced
// by addition, as the scheme requires; the rows come from
// ecc_filter_pkg::CHECK_MASK.
//
// Interface: purely combinational. x packs the four original inputs
// (x[0] = x1), xr the three redundant inputs (xr[0] = x5). Sums wrap modulo
// 2^DATA_W, which keeps the code exact through the equally wrapping filters;
// that wrap-around arithmetic is this design's choice.
module ecc_encoder
  import ecc_filter_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [N_DATA-1:0][DATA_W-1:0]  x,
  output logic [N_CHECK-1:0][DATA_W-1:0] xr
);

  always_comb begin
    for (int unsigned i = 0; i < N_CHECK; i++) begin
      xr[i] = '0;
      for (int unsigned j = 0; j < N_DATA; j++)
        if (CHECK_MASK[i][j]) xr[i] += x[j];
    end
  end

endmodule

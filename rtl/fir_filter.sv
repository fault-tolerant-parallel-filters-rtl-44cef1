// fir_filter: one filter H of the parallel filter bank, a direct-form FIR
// filter y[n] = sum_k COEFFS[k] * x[n-k].
//
// All seven filters of the bank (four original, three redundant) are copies
// of this module with the same coefficients. The code that protects the bank
// relies only on the filter being linear, which holds exactly here because
// all arithmetic is two's complement modulo 2^DATA_W: products and the sum are
// truncated to DATA_W bits, so H(a + b) = H(a) + H(b) bit for bit.
//
// Interface: x is taken when en is high; the delay line then shifts and y is
// updated at the same clock edge, so y holds the filter output for the sample
// taken one cycle earlier. rst is synchronous and active high and clears the
// delay line and y. When en is low everything holds.
//
// The filter order, the coefficients and the coefficient width are not fixed
// by the design this follows; the defaults (8 taps, 16-bit signed
// coefficients of a small symmetric low-pass) are this design's choice. The
// 32-bit sample width follows the bank's published simulation.
module fir_filter #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned TAPS   = 8,
  parameter int unsigned COEF_W = 16,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFFS = {
    16'sd1, 16'sd3, 16'sd7, 16'sd12, 16'sd12, 16'sd7, 16'sd3, 16'sd1
  }
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] x,
  output logic [DATA_W-1:0] y
);

  // Delay line: dl[k] = x[n-k] for k = 1 .. TAPS-1 (TAPS must be 2 or more).
  logic [TAPS-1:1][DATA_W-1:0] dl;
  logic [DATA_W-1:0]           acc;

  always_ff @(posedge clk) begin
    if (rst) dl <= '0;
    else if (en) begin
      dl[1] <= x;
      for (int unsigned k = 2; k < TAPS; k++) dl[k] <= dl[k-1];
    end
  end

  // Signed coefficient, sign-extended to the sample width; the product is
  // kept modulo 2^DATA_W.
  function automatic logic [DATA_W-1:0] coef_ext(input logic [COEF_W-1:0] c);
    return DATA_W'(signed'(c));
  endfunction

  always_comb begin
    acc = DATA_W'(x * coef_ext(COEFFS[0]));
    for (int unsigned k = 1; k < TAPS; k++)
      acc += DATA_W'(dl[k] * coef_ext(COEFFS[k]));
  end

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= acc;
  end

endmodule

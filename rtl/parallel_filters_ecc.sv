// parallel_filters_ecc: four parallel FIR filters protected against a single
// faulty filter by an error correction code, with the filters taking the
// place of the bits of a Hamming(7,4) code.
//
// Structure (one block per stage):
//   ecc_encoder            x1..x4 -> x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4
//   fir_filter x7          four original filters y1..y4 = H(x1..x4) and three
//                          redundant filters z1..z3 = H(x5..x7), identical
//   syndrome_check         s = y H^T: z_i minus the matching sum of y's,
//                          compared with a threshold
//   single_fault_correction  decodes s and rebuilds the faulty y_j
//   output register        yc1..yc4, syndrome and flags
// Because the filters are linear, z_i equals the sum of the y's of its check
// whenever no filter is faulty; a faulty filter changes exactly the checks it
// takes part in, and the pattern of failing checks names it.
//
// Interface: a sample set x1..x4 is taken when in_valid is high (all filters
// advance together). The filters are registered and so is the output, so
// out_valid, yc, syndrome, residue (the signed check differences), err_loc,
// error_detected and corrected appear two clock cycles after the in_valid
// they belong to. rst is synchronous and
// active high. err_inj is a fault-injection port, one word per filter
// (indices 0..3 = original filters 1..4, 4..6 = redundant filters 1..3),
// XORed onto the filter outputs ahead of the checker; tie it to zero in
// normal use. The two-cycle timing, the valid signals, the flags and the
// fault-injection port are this design's choices; the block structure, the
// coding equations, the syndrome table and the threshold follow the scheme.
module parallel_filters_ecc
  import ecc_filter_pkg::*;
#(
  parameter int unsigned DATA_W    = 32,
  parameter int unsigned TAPS      = 8,
  parameter int unsigned COEF_W    = 16,
  parameter logic [TAPS-1:0][COEF_W-1:0] COEFFS = {
    16'sd1, 16'sd3, 16'sd7, 16'sd12, 16'sd12, 16'sd7, 16'sd3, 16'sd1
  },
  parameter int unsigned THRESHOLD = 0
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          in_valid,
  input  logic [N_DATA-1:0][DATA_W-1:0] x,
  input  logic [N_FILT-1:0][DATA_W-1:0] err_inj,
  output logic                          out_valid,
  output logic [N_DATA-1:0][DATA_W-1:0] yc,
  output logic [N_CHECK-1:0]            syndrome,
  output logic [N_CHECK-1:0][DATA_W-1:0] residue,
  output err_loc_e                      err_loc,
  output logic                          error_detected,
  output logic                          corrected
);

  logic [N_CHECK-1:0][DATA_W-1:0] xr;        // coded inputs x5..x7
  logic [N_FILT-1:0][DATA_W-1:0]  filt_in;   // inputs of all seven filters
  logic [N_FILT-1:0][DATA_W-1:0]  filt_out;  // filter outputs, fault-free
  logic [N_DATA-1:0][DATA_W-1:0]  y;         // original outputs as checked
  logic [N_CHECK-1:0][DATA_W-1:0] z;         // redundant outputs as checked
  logic [N_CHECK-1:0][DATA_W-1:0] residue_d;
  logic [N_CHECK-1:0]             s;
  logic [N_DATA-1:0][DATA_W-1:0]  yc_d;
  err_loc_e                       err_loc_d;
  logic                           det_d, corr_d;
  logic                           v1;

  ecc_encoder #(.DATA_W(DATA_W)) u_coding (
    .x  (x),
    .xr (xr)
  );

  assign filt_in = {xr, x};

  for (genvar f = 0; f < N_FILT; f++) begin : g_filter
    fir_filter #(
      .DATA_W (DATA_W),
      .TAPS   (TAPS),
      .COEF_W (COEF_W),
      .COEFFS (COEFFS)
    ) u_h (
      .clk (clk),
      .rst (rst),
      .en  (in_valid),
      .x   (filt_in[f]),
      .y   (filt_out[f])
    );
  end

  always_comb begin
    for (int unsigned j = 0; j < N_DATA; j++)
      y[j] = filt_out[j] ^ err_inj[j];
    for (int unsigned i = 0; i < N_CHECK; i++)
      z[i] = filt_out[N_DATA+i] ^ err_inj[N_DATA+i];
  end

  syndrome_check #(.DATA_W(DATA_W), .THRESHOLD(THRESHOLD)) u_check (
    .y       (y),
    .z       (z),
    .residue (residue_d),
    .s       (s)
  );

  single_fault_correction #(.DATA_W(DATA_W)) u_correct (
    .y              (y),
    .z              (z),
    .s              (s),
    .yc             (yc_d),
    .err_loc        (err_loc_d),
    .error_detected (det_d),
    .corrected      (corr_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      v1             <= 1'b0;
      out_valid      <= 1'b0;
      yc             <= '0;
      syndrome       <= '0;
      residue        <= '0;
      err_loc        <= LOC_NONE;
      error_detected <= 1'b0;
      corrected      <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      if (v1) begin
        yc             <= yc_d;
        syndrome       <= s;
        residue        <= residue_d;
        err_loc        <= err_loc_d;
        error_detected <= det_d;
        corrected      <= corr_d;
      end
    end
  end

  // A result leaves exactly two cycles after its samples were taken.
  a_latency : assert property (@(posedge clk) disable iff (rst)
    $past(rst, 2) == 1'b0 |-> out_valid == $past(in_valid, 2));

endmodule

// tb_parallel_filters_threshold: end-to-end test of the comparison
// threshold of the protected filter bank, with THRESHOLD set to 15.
//
// As in the default end-to-end test, random sample sets are fed with a
// random in_valid and one filter (or none) per sample set is disturbed
// through err_inj. Here half of the disturbances are small (an XOR on bits
// 3..0 only, so the output moves by at most 15) and must be classified as
// no error: syndrome 0, no flags, and the disturbed original output passes
// uncorrected. The other half are large (an XOR on bits 31..5 only, a change
// of at least 32) and must be located and corrected as usual.
// Small and large disturbances on original and redundant filters are
// counted; one kind never seen is a failure.
module tb_parallel_filters_threshold;
  import ecc_filter_pkg::*;

  localparam int TAPS = 8;
  localparam int COEF [TAPS] = '{1, 3, 7, 12, 12, 7, 3, 1};
  localparam int N_SETS = 4000;
  // syndrome per faulty filter (bit i = s(i+1)): d1..d4, p1..p3
  localparam logic [2:0] SYN [7] = '{3'b111, 3'b011, 3'b101, 3'b110,
                                     3'b001, 3'b010, 3'b100};

  localparam int unsigned THR = 15;

  typedef struct {
    logic [3:0][31:0] y;      // expected yc1..yc4
    int               where;  // 0..6 filter seen as faulty, 7 none
  } expect_t;

  logic             clk = 1'b0;
  logic             rst;
  logic             in_valid;
  logic [3:0][31:0] x;
  logic [6:0][31:0] err_inj;
  logic             out_valid;
  logic [3:0][31:0] yc;
  logic [2:0]       syndrome;
  logic [2:0][31:0] residue;
  err_loc_e         err_loc;
  logic             error_detected, corrected;

  int checks   = 0;
  int failures = 0;
  int n_stall  = 0;
  int n_loc [8];
  int n_corr   = 0;
  int n_out    = 0;
  int n_small_d = 0, n_small_p = 0, n_large_d = 0, n_large_p = 0;

  logic [31:0] hist [4][TAPS];
  expect_t     pending;
  logic        pending_v;

  parallel_filters_ecc #(.THRESHOLD(THR)) dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x), .err_inj(err_inj),
    .out_valid(out_valid), .yc(yc), .syndrome(syndrome), .residue(residue),
    .err_loc(err_loc), .error_detected(error_detected), .corrected(corrected)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4 * N_SETS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] conv(int ch);
    logic [31:0] acc = '0;
    for (int k = 0; k < TAPS; k++) acc += hist[ch][k] * 32'(COEF[k]);
    return acc;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 20) $display("%0t: %s", $time, what);
  endtask

  initial begin
    int      sets;
    logic    took;      // a sample set was accepted at the last edge
    expect_t e;
    foreach (n_loc[k]) n_loc[k] = 0;
    foreach (hist[c, k]) hist[c][k] = '0;
    pending_v = 1'b0;
    rst = 1'b1; in_valid = 1'b0; x = '0; err_inj = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst  = 1'b0;
    took = 1'b0;
    sets = 0;
    while (sets < N_SETS || took || pending_v) begin
      // outputs captured at the last edge belong to the set in "pending"
      checks++;
      if (out_valid !== pending_v) fail($sformatf("out_valid=%0b expected %0b", out_valid, pending_v));
      if (pending_v && out_valid) begin
        n_out++;
        checks += 5;
        if (yc !== pending.y) fail($sformatf("fault %0d: yc=%h expected %h", pending.where, yc, pending.y));
        if (syndrome !== ((pending.where < 7) ? SYN[pending.where] : 3'b000))
          fail($sformatf("fault %0d: syndrome %b", pending.where, syndrome));
        if (int'(err_loc) != ((pending.where < 7) ? pending.where + 1 : 0))
          fail($sformatf("fault %0d: location %0d", pending.where, int'(err_loc)));
        if (error_detected !== (pending.where < 7)) fail("error_detected flag");
        if (corrected !== (pending.where < 4)) fail("corrected flag");
        n_loc[pending.where]++;
        if (corrected) n_corr++;
      end
      pending_v = 1'b0;
      // the set accepted at the last edge is now in the filters: choose its fault
      err_inj = '0;
      if (took) begin
        for (int c = 0; c < 4; c++) begin
          for (int k = TAPS - 1; k > 0; k--) hist[c][k] = hist[c][k-1];
          hist[c][0] = x[c];
          e.y[c] = conv(c);
        end
        e.where = $urandom_range(0, 9);
        if (e.where > 7) e.where = 7;
        if (e.where < 7) begin
          if ($urandom_range(0, 1) == 0) begin
            // small: below the threshold, not seen as an error
            err_inj[e.where] = 32'($urandom_range(1, 15));
            if (e.where < 4) begin
              e.y[e.where] ^= err_inj[e.where];
              n_small_d++;
            end else n_small_p++;
            e.where = 7;
          end else begin
            err_inj[e.where] = $urandom & 32'hFFFF_FFE0;
            if (err_inj[e.where] == '0) err_inj[e.where] = 32'h20;
            if (e.where < 4) n_large_d++;
            else n_large_p++;
          end
        end
        pending   = e;
        pending_v = 1'b1;
      end
      // next sample set
      in_valid = (sets < N_SETS) && ($urandom_range(0, 4) != 0);
      if (sets < N_SETS && !in_valid) n_stall++;
      for (int c = 0; c < 4; c++) x[c] = $urandom;
      took = in_valid;
      if (in_valid) sets++;
      @(negedge clk);
    end
    checks++;
    if (n_stall == 0) fail("no stall cycle");
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (n_loc[k] == 0) fail($sformatf("case %0d never seen", k));
    end
    checks++;
    if (n_corr == 0) fail("no correction");
    checks += 4;
    if (n_small_d == 0) fail("no small disturbance on an original filter");
    if (n_small_p == 0) fail("no small disturbance on a redundant filter");
    if (n_large_d == 0) fail("no large disturbance on an original filter");
    if (n_large_p == 0) fail("no large disturbance on a redundant filter");
    $display("below threshold: original=%0d redundant=%0d; above: original=%0d redundant=%0d",
             n_small_d, n_small_p, n_large_d, n_large_p);
    checks++;
    if (n_out != N_SETS) fail($sformatf("%0d results for %0d sets", n_out, N_SETS));
    $display("stalls=%0d results=%0d corrections=%0d", n_stall, n_out, n_corr);
    $display("no-error=%0d d1=%0d d2=%0d d3=%0d d4=%0d p1=%0d p2=%0d p3=%0d",
             n_loc[7], n_loc[0], n_loc[1], n_loc[2], n_loc[3], n_loc[4], n_loc[5], n_loc[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_parallel_filters_ecc: end-to-end test of the protected filter bank at
// its default parameters (32-bit samples, 8 taps, threshold 0).
//
// Random sample sets x1..x4 are fed with a random in_valid (gaps stall the
// bank). For every sample set one filter, chosen at random, or none is made
// faulty by XORing a random non-zero word onto its output through err_inj.
// The testbench keeps its own FIR model of the four original channels and
// expects, two cycles after each accepted sample set:
//   - yc1..yc4 equal to the fault-free filter outputs,
//   - the syndrome and location of the syndrome table for the faulty filter,
//   - error_detected / corrected flags to match,
//   - out_valid exactly when the sample set was accepted two edges before.
// Each mechanism (stall, no error, fault on each of the seven filters,
// correction of an original filter) is counted; one never seen is a failure.
module tb_parallel_filters_ecc;
  import ecc_filter_pkg::*;

  localparam int TAPS = 8;
  localparam int COEF [TAPS] = '{1, 3, 7, 12, 12, 7, 3, 1};
  localparam int N_SETS = 4000;
  // syndrome per faulty filter (bit i = s(i+1)): d1..d4, p1..p3
  localparam logic [2:0] SYN [7] = '{3'b111, 3'b011, 3'b101, 3'b110,
                                     3'b001, 3'b010, 3'b100};

  typedef struct {
    logic [3:0][31:0] y;      // fault-free original outputs
    int               where;  // 0..6 faulty filter, 7 none
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

  logic [31:0] hist [4][TAPS];
  expect_t     pending;
  logic        pending_v;

  parallel_filters_ecc dut (
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
          err_inj[e.where] = $urandom;
          if (err_inj[e.where] == '0) err_inj[e.where] = 32'h1;
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
    checks++;
    if (n_out != N_SETS) fail($sformatf("%0d results for %0d sets", n_out, N_SETS));
    $display("stalls=%0d results=%0d corrections=%0d", n_stall, n_out, n_corr);
    $display("no-error=%0d d1=%0d d2=%0d d3=%0d d4=%0d p1=%0d p2=%0d p3=%0d",
             n_loc[7], n_loc[0], n_loc[1], n_loc[2], n_loc[3], n_loc[4], n_loc[5], n_loc[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

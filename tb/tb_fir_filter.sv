// tb_fir_filter: self-checking test of one FIR filter of the bank.
//
// Drives random 32-bit samples with a random enable and compares y, every
// cycle, with a reference convolution kept in the testbench (its own copy of
// the default coefficients and its own sample history, arithmetic modulo
// 2^32). Also checks the one-cycle latency: y must change to the new result
// exactly one edge after a sample is taken, and hold while en is low.
module tb_fir_filter;

  localparam int TAPS = 8;
  localparam int COEF [TAPS] = '{1, 3, 7, 12, 12, 7, 3, 1};

  logic        clk = 1'b0;
  logic        rst;
  logic        en;
  logic [31:0] x;
  logic [31:0] y;

  int checks   = 0;
  int failures = 0;

  logic [31:0] hist [TAPS];   // hist[k] = x[n-k]
  logic [31:0] y_exp;

  fir_filter dut (.clk(clk), .rst(rst), .en(en), .x(x), .y(y));

  always #5 clk = ~clk;

  function automatic logic [31:0] conv();
    logic [31:0] acc = '0;
    for (int k = 0; k < TAPS; k++) acc += hist[k] * 32'(COEF[k]);
    return acc;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hist[k]) hist[k] = '0;
    y_exp = '0;
    rst = 1'b1; en = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    // an impulse first: y must reproduce the coefficients one by one
    for (int n = 0; n < 2000; n++) begin
      if (n < TAPS + 2) begin
        en = 1'b1;
        x  = (n == 0) ? 32'd1 : 32'd0;
      end else begin
        en = ($urandom_range(0, 3) != 0);
        x  = (n % 3 == 0) ? $urandom : 32'($urandom_range(0, 255)) - 32'd128;
      end
      @(posedge clk);
      if (en) begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
        y_exp   = conv();
      end
      @(negedge clk);
      checks++;
      if (y !== y_exp) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%h expected %h", n, y, y_exp);
      end
      if (n < TAPS) begin
        checks++;
        if (y !== 32'(COEF[n])) begin
          failures++;
          $display("impulse response tap %0d: %0d expected %0d", n, y, COEF[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

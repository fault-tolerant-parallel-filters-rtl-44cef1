// tb_syndrome_check: self-checking test of the syndrome computation.
//
// Two instances: one with the default threshold of 0 and one with a
// threshold of 20. Random filter outputs y1..y4 are drawn, the matching
// fault-free z1..z3 are formed by hand, and an error of random sign and size
// is added to one randomly chosen output (or to none). The expected syndrome
// follows from which checks contain that output and whether the error's
// magnitude exceeds the threshold; the residues must equal the error.
module tb_syndrome_check;

  localparam int unsigned THR = 20;

  logic [3:0][31:0] y;
  logic [2:0][31:0] z;
  logic [2:0][31:0] res0, res1;
  logic [2:0]       s0, s1;

  int checks   = 0;
  int failures = 0;

  // checks each output takes part in (bit i = check i+1), index 0..3 = y1..y4,
  // 4..6 = z1..z3
  localparam logic [2:0] MEMBER [7] = '{3'b111, 3'b011, 3'b101, 3'b110,
                                        3'b001, 3'b010, 3'b100};

  syndrome_check                      dut0 (.y(y), .z(z), .residue(res0), .s(s0));
  syndrome_check #(.THRESHOLD(THR))   dut1 (.y(y), .z(z), .residue(res1), .s(s1));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          where;
    int          mag;
    logic [31:0] e;
    logic [2:0]  exp0, exp1;
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 4; j++) y[j] = $urandom;
      z[0] = y[0] + y[1] + y[2];
      z[1] = y[0] + y[1] + y[3];
      z[2] = y[0] + y[2] + y[3];
      where = $urandom_range(0, 7);          // 7: no error
      case ($urandom_range(0, 3))
        0:       mag = $urandom_range(1, THR);          // below threshold
        1:       mag = THR + 1;                          // just above
        2:       mag = $urandom_range(THR + 1, 100000);
        default: mag = $urandom_range(1, 1 << 30);
      endcase
      e = ($urandom_range(0, 1) != 0) ? 32'(mag) : -32'(mag);
      exp0 = '0;
      exp1 = '0;
      if (where < 4) y[where] += e;
      else if (where < 7) z[where-4] += e;
      if (where < 7) begin
        exp0 = MEMBER[where];
        exp1 = (mag > THR) ? MEMBER[where] : 3'b000;
      end
      #1;
      checks += 2;
      if (s0 !== exp0) begin failures++; $display("n=%0d s(thr 0)=%b expected %b", n, s0, exp0); end
      if (s1 !== exp1) begin failures++; $display("n=%0d s(thr %0d)=%b expected %b", n, THR, s1, exp1); end
      // residue: z_i - sum = +e for a redundant output, -e for an original one
      for (int i = 0; i < 3; i++) begin
        logic [31:0] r_exp;
        r_exp = '0;
        if (where < 7 && MEMBER[where][i]) r_exp = (where < 4) ? -e : e;
        checks++;
        if (res0[i] !== r_exp) begin failures++; $display("n=%0d residue%0d=%h expected %h", n, i + 1, res0[i], r_exp); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

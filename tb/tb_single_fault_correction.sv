// tb_single_fault_correction: self-checking test of syndrome decoding and
// output correction.
//
// Random fault-free outputs y1..y4 and z1..z3 are formed, one output (or
// none) is corrupted by a random non-zero error, and the syndrome is set
// from the decoding table written out in the testbench:
//   s1 s2 s3 = 000 none, 111 d1, 110 d2, 101 d3, 011 d4,
//              100 p1, 010 p2, 001 p3.
// The block must report the right location and flags and return the
// fault-free y1..y4.
module tb_single_fault_correction;
  import ecc_filter_pkg::*;

  logic [3:0][31:0] y, y_true, yc;
  logic [2:0][31:0] z;
  logic [2:0]       s;
  err_loc_e         loc;
  logic             det, corr;

  int checks   = 0;
  int failures = 0;
  int seen [8];

  // syndrome of a single error, bit i = s(i+1), for d1..d4, p1..p3; table
  // s1 s2 s3: d1 111, d2 110, d3 101, d4 011, p1 100, p2 010, p3 001
  localparam logic [2:0] LOC_SYN [7] = '{3'b111, 3'b011, 3'b101, 3'b110,
                                         3'b001, 3'b010, 3'b100};

  single_fault_correction dut (
    .y(y), .z(z), .s(s), .yc(yc), .err_loc(loc),
    .error_detected(det), .corrected(corr)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          where;
    logic [31:0] e;
    foreach (seen[k]) seen[k] = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 4; j++) y_true[j] = $urandom;
      y    = y_true;
      z[0] = y_true[0] + y_true[1] + y_true[2];
      z[1] = y_true[0] + y_true[1] + y_true[3];
      z[2] = y_true[0] + y_true[2] + y_true[3];
      where = $urandom_range(0, 7);   // 0..3 d1..d4, 4..6 p1..p3, 7 none
      e = $urandom;
      if (e == 0) e = 32'd1;
      if (where < 4) y[where] ^= e;
      else if (where < 7) z[where-4] ^= e;
      s = (where < 7) ? LOC_SYN[where] : 3'b000;
      #1;
      seen[where]++;
      checks += 4;
      if (yc !== y_true) begin
        failures++;
        $display("n=%0d fault %0d: yc=%h expected %h", n, where, yc, y_true);
      end
      if (int'(loc) != ((where == 7) ? 0 : where + 1)) begin
        failures++;
        $display("n=%0d fault %0d: location %0d", n, where, int'(loc));
      end
      if (det !== (where != 7)) begin failures++; $display("n=%0d detected flag", n); end
      if (corr !== (where < 4)) begin failures++; $display("n=%0d corrected flag", n); end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("case %0d never exercised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ecc_encoder: self-checking test of the coding stage.
//
// Applies random and corner-case inputs and checks the three redundant
// inputs against the coding equations written out by hand:
// x5 = x1 + x2 + x3, x6 = x1 + x2 + x4, x7 = x1 + x3 + x4 (modulo 2^32).
module tb_ecc_encoder;

  logic [3:0][31:0] x;
  logic [2:0][31:0] xr;

  int checks   = 0;
  int failures = 0;

  ecc_encoder dut (.x(x), .xr(xr));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    logic [31:0] e5, e6, e7;
    e5 = x[0] + x[1] + x[2];
    e6 = x[0] + x[1] + x[3];
    e7 = x[0] + x[2] + x[3];
    #1;
    checks += 3;
    if (xr[0] !== e5) begin failures++; $display("x5=%h expected %h", xr[0], e5); end
    if (xr[1] !== e6) begin failures++; $display("x6=%h expected %h", xr[1], e6); end
    if (xr[2] !== e7) begin failures++; $display("x7=%h expected %h", xr[2], e7); end
  endtask

  initial begin
    // one-hot inputs show which input feeds which sum
    for (int j = 0; j < 4; j++) begin
      x = '0;
      x[j] = 32'd1 << j;
      check_one();
    end
    x = {4{32'hFFFF_FFFF}};
    check_one();
    for (int n = 0; n < 1000; n++) begin
      for (int j = 0; j < 4; j++) x[j] = $urandom;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

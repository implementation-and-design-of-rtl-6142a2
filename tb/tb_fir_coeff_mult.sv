// tb_fir_coeff_mult: exhaustive check of the fixed-coefficient multiplier.
//
// Three instances (coefficients 3, -5 and -128) are driven with every 8-bit
// input value; each product is compared with an integer product computed in
// the testbench. Prints TB_RESULT and finishes; a watchdog ends a hung run.
module tb_fir_coeff_mult;

  localparam int unsigned DW = 8;
  localparam int unsigned CW = 8;

  logic signed [DW-1:0]    x;
  logic signed [DW+CW-1:0] p_a, p_b, p_c;
  int checks = 0, failures = 0;

  fir_coeff_mult #(.DW(DW), .CW(CW)) dut_a (.x(x), .p(p_a));  // default coefficient 3
  fir_coeff_mult #(.DW(DW), .CW(CW), .COEFF(-8'sd5))   dut_b (.x(x), .p(p_b));
  fir_coeff_mult #(.DW(DW), .CW(CW), .COEFF(-8'sd128)) dut_c (.x(x), .p(p_c));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%0d got=%0d exp=%0d", what, x, got, exp);
    end
  endtask

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = DW'(v);
      #1;
      check(int'(p_a), v * 3,    "coeff 3");
      check(int'(p_b), v * -5,   "coeff -5");
      check(int'(p_c), v * -128, "coeff -128");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_fir_mac_cell: random check of the multiply-accumulate cell.
//
// Drives random samples and partial sums into two cells (coefficient 1, the
// default, and 127) and compares acc_out with acc_in + b * x computed in
// integer arithmetic and wrapped to 16 bits. Also drives corner values that
// make the 16-bit sum wrap, and counts them. Prints TB_RESULT and finishes.
module tb_fir_mac_cell;

  localparam int unsigned DW = 8;
  localparam int unsigned CW = 8;
  localparam int unsigned OW = 16;

  logic signed [DW-1:0] x;
  logic signed [OW-1:0] acc_in, out_a, out_b;
  int checks = 0, failures = 0, wraps = 0;

  fir_mac_cell #(.DW(DW), .CW(CW), .OW(OW)) dut_a (.x(x), .acc_in(acc_in), .acc_out(out_a));
  fir_mac_cell #(.DW(DW), .CW(CW), .OW(OW), .COEFF(8'sd127)) dut_b
    (.x(x), .acc_in(acc_in), .acc_out(out_b));

  function automatic int wrap16(input int v);
    return int'(signed'(16'(v)));
  endfunction

  task automatic check_one();
    int ea, eb;
    #1;
    ea = wrap16(int'(acc_in) + int'(x));
    eb = wrap16(int'(acc_in) + 127 * int'(x));
    if (eb != int'(acc_in) + 127 * int'(x)) wraps++;
    checks += 2;
    if (int'(out_a) != ea) begin
      failures++;
      $display("FAIL b=1 x=%0d acc_in=%0d got=%0d exp=%0d", x, acc_in, out_a, ea);
    end
    if (int'(out_b) != eb) begin
      failures++;
      $display("FAIL b=127 x=%0d acc_in=%0d got=%0d exp=%0d", x, acc_in, out_b, eb);
    end
  endtask

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x      = DW'($urandom);
      acc_in = OW'($urandom);
      check_one();
    end
    // corners
    x = 8'sd127;  acc_in = 16'sd32767;  check_one();
    x = -8'sd128; acc_in = -16'sd32768; check_one();
    x = 8'sd0;    acc_in = 16'sd1234;   check_one();
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrapping sum was exercised");
    end
    $display("wrapping sums exercised: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_fir_filter: end-to-end test of the 4-tap FIR filter at its default
// parameters (4 taps, 8-bit input, 16-bit output, coefficients {3, 1, 2, 1}).
//
// 1. The input x = 2, 4, 6, 4, 2, 0, 0, 0, ... (zero before n = 0) must give
//    y = 6, 14, 26, 28, 26, 16, 8, 2, 0: the filter's impulse-response table,
//    checked value by value.
// 2. A unit impulse must return the coefficients 3, 1, 2, 1 and then zeros.
// 3. Random samples, including negative ones, are checked against a
//    convolution computed in the testbench.
// 4. A reset in the middle of a stream must clear the delay line.
// Samples change after the falling edge and y is sampled just before the next
// rising edge, which checks the zero-latency direct form: y(n) appears in the
// same clock cycle as x(n). Each mechanism (delay-line shift, reset clear,
// negative input, full four-term convolution) is counted, and one that never
// happened counts as a failure. A watchdog ends a hung run.
module tb_fir_filter;

  localparam int NT = 4;
  localparam int B [NT] = '{3, 1, 2, 1};

  logic clk = 1'b0;
  logic rst;
  logic signed [7:0]  x_in;
  logic signed [15:0] y_out;

  int checks = 0, failures = 0, cycles = 0;
  int n_shift = 0, n_reset = 0, n_negative = 0, n_full_conv = 0;
  int hist [NT];   // hist[i] = x(n-i) as the model sees it

  fir_filter dut (.clk(clk), .rst(rst), .x_in(x_in), .y_out(y_out));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic int model_y();
    int s = 0;
    for (int i = 0; i < NT; i++) s += B[i] * hist[i];
    return int'(signed'(16'(s)));
  endfunction

  // Present one sample for one clock cycle and check y in that same cycle.
  // exp_tab < -100000 means "use the model".
  task automatic sample(input logic r, input int x, input int exp_tab, input string what);
    int exp_y, nz;
    @(negedge clk);
    rst  = r;
    x_in = 8'(x);
    for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    #4;  // just before the rising edge
    if (!r) begin
      exp_y = (exp_tab < -100000) ? model_y() : exp_tab;
      checks++;
      if (int'(y_out) != exp_y) begin
        failures++;
        $display("FAIL %s x=%0d y=%0d exp=%0d", what, x, y_out, exp_y);
      end
      if (exp_tab < -100000 && exp_y != model_y()) failures++;
      if (x < 0) n_negative++;
      nz = 0;
      for (int i = 0; i < NT; i++) if (hist[i] != 0) nz++;
      if (nz == NT) n_full_conv++;
      if (hist[1] != 0) n_shift++;
    end
    if (r) begin
      // after the edge the registered history is cleared
      for (int i = 0; i < NT; i++) hist[i] = 0;
      n_reset++;
    end
  endtask

  localparam int TX [12] = '{2, 4, 6, 4, 2, 0, 0, 0, 0, 0, 0, 0};
  localparam int TY [12] = '{6, 14, 26, 28, 26, 16, 8, 2, 0, 0, 0, 0};
  localparam int IY [8]  = '{3, 1, 2, 1, 0, 0, 0, 0};

  initial begin
    rst = 1'b1;
    x_in = '0;
    for (int i = 0; i < NT; i++) hist[i] = 0;
    sample(1'b1, 0, 0, "reset");
    sample(1'b1, 0, 0, "reset");

    // 1. impulse-response table
    for (int n = 0; n < 12; n++) sample(1'b0, TX[n], TY[n], "table");

    // 2. unit impulse returns the coefficients
    for (int n = 0; n < 8; n++) sample(1'b0, (n == 0) ? 1 : 0, IY[n], "impulse");

    // 3. random stream, full signed range
    for (int n = 0; n < 2000; n++) sample(1'b0, int'($signed(8'($urandom))), -1000000, "random");

    // 4. reset mid-stream, then a table run again
    sample(1'b0, 100, -1000000, "pre-reset");
    sample(1'b0, -77, -1000000, "pre-reset");
    sample(1'b1, 55, 0, "reset");
    for (int n = 0; n < 12; n++) sample(1'b0, TX[n], TY[n], "table after reset");

    // extremes
    for (int n = 0; n < 4; n++) sample(1'b0, -128, -1000000, "min");
    for (int n = 0; n < 4; n++) sample(1'b0, 127, -1000000, "max");

    if (n_shift == 0)     begin failures++; $display("FAIL delay-line shift never seen"); end
    if (n_reset < 2)      begin failures++; $display("FAIL mid-stream reset never seen"); end
    if (n_negative == 0)  begin failures++; $display("FAIL no negative input"); end
    if (n_full_conv == 0) begin failures++; $display("FAIL four-term convolution never seen"); end
    $display("mechanisms: shift=%0d reset=%0d negative=%0d full_conv=%0d cycles=%0d",
             n_shift, n_reset, n_negative, n_full_conv, cycles);
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

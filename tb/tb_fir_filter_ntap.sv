// tb_fir_filter_ntap: the filter as a general N-tap structure.
//
// Instantiates a 6-tap filter with large coefficients {127, -128, 100, -1,
// 64, 127}, whose sums exceed the 16-bit output range, and checks random
// input against a convolution wrapped to 16 bits in the testbench. Counts
// the outputs that wrapped and fails if none did. A watchdog ends a hung run.
module tb_fir_filter_ntap;

  localparam int NT = 6;
  localparam int B [NT] = '{127, -128, 100, -1, 64, 127};
  localparam logic signed [7:0] BC [NT] = '{8'sd127, -8'sd128, 8'sd100, -8'sd1, 8'sd64, 8'sd127};

  logic clk = 1'b0;
  logic rst;
  logic signed [7:0]  x_in;
  logic signed [15:0] y_out;
  int checks = 0, failures = 0, wraps = 0;
  int hist [NT];

  fir_filter #(.NTAPS(NT), .COEFFS(BC)) dut (.clk(clk), .rst(rst), .x_in(x_in), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin
    int s, e;
    rst = 1'b1;
    x_in = '0;
    for (int i = 0; i < NT; i++) hist[i] = 0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      x_in = 8'($urandom);
      if (n % 7 == 0) x_in = (n % 2) ? 8'sd127 : -8'sd128;
      for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = int'(x_in);
      #4;
      s = 0;
      for (int i = 0; i < NT; i++) s += B[i] * hist[i];
      e = int'(signed'(16'(s)));
      if (e != s) wraps++;
      checks++;
      if (int'(y_out) != e) begin
        failures++;
        $display("FAIL n=%0d y=%0d exp=%0d", n, y_out, e);
      end
      @(negedge clk);
    end
    if (wraps == 0) begin failures++; $display("FAIL no wrapped output"); end
    $display("wrapped outputs: %0d", wraps);
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

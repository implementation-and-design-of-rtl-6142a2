// tb_fir_delay_line: checks the z^-1 register chain against a software history.
//
// Resets the 3-stage chain and checks that every tap reads zero, then shifts
// random samples in and checks after every clock that taps[k] equals the
// sample given k+1 clocks earlier. A reset in the middle of the run must
// clear the chain again. Prints TB_RESULT and finishes; a watchdog ends a
// hung run.
module tb_fir_delay_line;

  localparam int unsigned DEPTH = 3;
  localparam int unsigned DW    = 8;

  logic clk = 1'b0;
  logic rst;
  logic signed [DW-1:0] din;
  logic signed [DW-1:0] taps [DEPTH];
  logic signed [DW-1:0] hist [DEPTH];   // hist[k] = expected taps[k]
  int checks = 0, failures = 0, cycles = 0;

  fir_delay_line #(.DEPTH(DEPTH), .DW(DW)) dut (.clk(clk), .rst(rst), .din(din), .taps(taps));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic compare(input string what);
    for (int k = 0; k < int'(DEPTH); k++) begin
      checks++;
      if (taps[k] !== hist[k]) begin
        failures++;
        $display("FAIL %s tap %0d got=%0d exp=%0d", what, k, taps[k], hist[k]);
      end
    end
  endtask

  task automatic step(input logic r, input logic signed [DW-1:0] d);
    rst = r;
    din = d;
    @(posedge clk);
    #1;
    if (r) begin
      for (int k = 0; k < int'(DEPTH); k++) hist[k] = '0;
    end else begin
      for (int k = int'(DEPTH) - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = d;
    end
    compare(r ? "reset" : "shift");
  endtask

  initial begin
    step(1'b1, 8'sd55);
    for (int i = 0; i < 200; i++) step(1'b0, DW'($urandom));
    step(1'b1, 8'sd7);
    for (int i = 0; i < 50; i++) step(1'b0, DW'($urandom));
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

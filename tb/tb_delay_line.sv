// tb_delay_line: drives random pulses into one full-size delay line
// (14 slots x 72 stages) and checks every tap against the stimulus history:
// tap m must show the input of m*72 clocks earlier. Also checks that reset
// leaves the line empty.
module tb_delay_line;
  localparam int SPS = 72, SL = 14, N = 4000;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic [SL:0] taps;
  int checks = 0, failures = 0;
  bit hist [N];

  delay_line #(.STAGES_PER_SLOT(SPS), .SLOTS(SL)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (taps[SL:1] !== '0) failures++;
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      // hist[j-1] was driven at the previous negedge
      for (int m = 1; m <= SL; m++) begin
        if (j - m*SPS >= 0) begin
          checks++;
          if (taps[m] !== hist[j - m*SPS]) begin
            failures++;
            if (failures < 10) $display("tap %0d at %0d: got %0b exp %0b", m, j, taps[m], hist[j-m*SPS]);
          end
        end else begin
          checks++;
          if (taps[m] !== 1'b0) failures++;
        end
      end
      hist[j] = ($urandom % 4) == 0;
      din = hist[j];
      checks++;
      #1 if (taps[0] !== din) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

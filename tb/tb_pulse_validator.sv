// tb_pulse_validator: random pulse trains of width 1..30 clocks are driven
// into the validator. The expected output is built from the stimulus run by
// run: runs of at least MIN_WIDTH clocks appear unchanged MIN_WIDTH+2 clocks
// later (2 synchroniser clocks + the validation shift register), shorter runs
// vanish and each adds one reject strobe.
module tb_pulse_validator;
  localparam int W = 10;
  localparam int N = 6000;
  localparam int LAT = W + 3;   // negedges from driving a sample to seeing it

  logic clk = 1'b0, rst_n = 1'b0, video_in = 1'b0;
  logic pulse_out, reject;
  int checks = 0, failures = 0;
  bit stim [N];
  bit expo [N];
  int exp_rejects = 0, got_rejects = 0;

  pulse_validator #(.MIN_WIDTH(W)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, len, gap;
    // build stimulus: alternating runs
    i = 50;
    for (int k = 0; k < N; k++) begin stim[k] = 0; expo[k] = 0; end
    while (i < N - 100) begin
      len = 1 + ($urandom % 30);
      gap = 1 + ($urandom % 25);
      for (int k = 0; k < len; k++) stim[i+k] = 1;
      if (len >= W) begin
        for (int k = 0; k < len; k++) expo[i+k] = 1;
      end else exp_rejects++;
      i += len + gap;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      if (j >= LAT) begin
        checks++;
        if (pulse_out !== expo[j-LAT]) begin
          failures++;
          if (failures < 10) $display("mismatch at %0d: got %0b exp %0b", j, pulse_out, expo[j-LAT]);
        end
      end
      if (reject) got_rejects++;
      video_in = stim[j];
    end
    checks++;
    if (got_rejects != exp_rejects) begin
      failures++;
      $display("rejects got %0d exp %0d", got_rejects, exp_rejects);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_reply_decoder: random information words every clock, with decode
// pulses of random length inside bracket-zone pulses. Reference: on the
// first decode clock of a bracket zone the code must equal the information
// word driven three clocks before that decode clock, and exactly one
// code_valid strobe must follow per bracket zone that contains a decode.
module tb_reply_decoder;
  import iff_pkg::*;
  localparam int N = 20000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [12:0] info = '0;
  logic decode = 1'b0, bracket_zone = 1'b0;
  iff_code_t code;
  logic code_valid;
  int checks = 0, failures = 0;
  logic [12:0] ih [N];
  bit dh [N], zh [N];
  int n_strobes = 0, n_expected = 0;

  reply_decoder #(.ALIGN(3)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seg, z0, zl, d0, dl, d1;
    bit armed;
    logic [12:0] exp_code;
    bit exp_valid;
    for (int j = 0; j < N; j++) begin ih[j] = 13'($urandom); dh[j] = 0; zh[j] = 0; end
    seg = 20;
    while (seg < N - 80) begin
      z0 = $urandom % 10; zl = 1 + $urandom % 20;
      for (int k = z0; k < z0 + zl; k++) zh[seg+k] = 1;
      if ($urandom % 4 != 0) begin
        d0 = z0 + $urandom % zl; dl = 1 + $urandom % 4;
        for (int k = d0; k < d0 + dl && k < z0 + zl; k++) dh[seg+k] = 1;
        // a second decode run in the same bracket must be ignored
        d1 = d0 + dl + 2;
        if (d1 < z0 + zl) dh[seg+d1] = 1;
      end
      seg += 40;
    end
    armed = 1; exp_valid = 0; exp_code = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      // reference for the edge just passed, which sampled index j-1
      exp_valid = 0;
      if (j >= 1) begin
        if (dh[j-1] && armed) begin
          exp_valid = 1; armed = 0;
          exp_code = (j >= 4) ? ih[j-4] : '0;
          n_expected++;
        end else if (!zh[j-1]) armed = 1;
      end
      checks++;
      if (code_valid !== exp_valid || (exp_valid && code !== exp_code)) begin
        failures++;
        if (failures < 10) $display("at %0d valid %0b code %h exp %0b %h", j, code_valid, code, exp_valid, exp_code);
      end
      if (code_valid) n_strobes++;
      info = ih[j]; decode = dh[j]; bracket_zone = zh[j];
    end
    checks++;
    if (n_expected == 0) failures++;
    $display("strobes %0d", n_strobes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_degarble_criteria: random bracket-decode and garble pulse trains, in
// both modes. Reference: decode is due when the bracket was high on the two
// samples taken 3 and 4 clocks earlier and (in degarbling mode) garble was
// low on all six samples taken 1..6 clocks earlier. Directed cases: a decode
// pulse fully covered by garble (no output), one with garble overlapping
// only its tail (output on the clear part), and the same covered pulse in
// bracket-only mode (output).
module tb_degarble_criteria;
  localparam int N = 20000;
  logic clk = 1'b0, rst_n = 1'b0, degarble_en = 1'b1, bracket = 1'b0, garble = 1'b0;
  logic decode, bracket_zone, garbled;
  int checks = 0, failures = 0;
  bit bh [N], gh [N], eh [N];
  int n_dec = 0, n_inhib = 0;

  degarble_criteria #(.DECODE_ZONE(2), .CLEAR_ZONE(2)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_decode(int j);
    bit zone, clr;
    if (j < 6) return 0;
    zone = bh[j-3] && bh[j-4];
    clr = 1;
    for (int i = 1; i <= 6; i++) if (gh[i > j ? 0 : j-i]) clr = 0;
    return zone && (clr || !eh[j-1]);
  endfunction

  // segment generator: pulse of length bl at b0, garble of length gl at g0
  task automatic put(int base, int b0, int bl, int g0, int gl, bit en);
    for (int k = 0; k < 60; k++) begin
      bh[base+k] = (k >= b0 && k < b0+bl);
      gh[base+k] = (k >= g0 && k < g0+gl);
      eh[base+k] = en;
    end
  endtask

  initial begin
    int seg;
    int dec_in_seg [3];
    for (int j = 0; j < N; j++) begin bh[j] = 0; gh[j] = 0; eh[j] = 1; end
    put(100, 10, 15, 10, 15, 1);  // fully covered
    put(200, 10, 15, 20, 15, 1);  // garble over the tail only
    put(300, 10, 15, 10, 15, 0);  // covered, bracket-only mode
    seg = 400;
    while (seg < N - 100) begin
      put(seg, $urandom % 30, 1 + $urandom % 20, $urandom % 40, ($urandom % 3 == 0) ? 0 : 1 + $urandom % 20, $urandom % 4 != 0);
      seg += 60;
    end
    dec_in_seg = '{0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      checks++;
      if (decode !== ref_decode(j)) begin
        failures++;
        if (failures < 10) $display("at %0d decode %0b exp %0b", j, decode, ref_decode(j));
      end
      if (j >= 100 && j < 400 && decode) dec_in_seg[(j-100)/100]++;
      if (decode) n_dec++;
      if (garbled && !decode) n_inhib++;
      bracket = bh[j]; garble = gh[j]; degarble_en = eh[j];
    end
    checks += 3;
    if (dec_in_seg[0] != 0) begin failures++; $display("covered decode passed"); end
    if (dec_in_seg[1] == 0) begin failures++; $display("partly clear decode blocked"); end
    if (dec_in_seg[2] == 0) begin failures++; $display("bracket-only mode blocked"); end
    checks++;
    if (n_dec == 0 || n_inhib == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

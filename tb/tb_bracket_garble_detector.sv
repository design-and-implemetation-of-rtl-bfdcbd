// tb_bracket_garble_detector: applies random sparse tap patterns and
// directed reply patterns to the combinational bracket/garble network. The
// reference scans every pulse pair one frame (14 slots) apart: a pair
// starting at slot 14 is the bracket decode, any other pair starting at
// slot 1..27 is a garble. Information bits are read from the decode line
// positions 27 (C1) down to 15 (D4).
module tb_bracket_garble_detector;
  localparam int S = 14;
  logic [3*S:0] taps;
  logic bracket, garble;
  logic [S-2:0] info;
  int checks = 0, failures = 0;
  int n_garble = 0, n_bracket = 0;

  bracket_garble_detector #(.SLOTS(S), .MAX_OFFSET(S-1)) dut (.*);

  task automatic check_one();
    logic eb, eg;
    logic [S-2:0] ei;
    eb = 0; eg = 0;
    for (int a = 0; a + S <= 3*S; a++) begin
      if (taps[a] && taps[a+S]) begin
        if (a == S) eb = 1;
        else if (a >= 1 && a <= 2*S-1) eg = 1;
      end
    end
    for (int i = 1; i <= S-1; i++) ei[S-1-i] = taps[2*S-i];
    #1;
    checks++;
    if (bracket !== eb || garble !== eg || info !== ei) begin
      failures++;
      if (failures < 10) $display("taps=%b got b%0b g%0b i%h exp b%0b g%0b i%h", taps, bracket, garble, info, eb, eg, ei);
    end
    n_bracket += eb; n_garble += eg;
  endtask

  initial begin
    // single reply in the decode line, no garble
    taps = '0; taps[S] = 1; taps[2*S] = 1; taps[2*S-3] = 1; check_one();
    // second reply displaced k slots each way
    for (int k = 1; k <= S; k++) begin
      taps = '0; taps[S] = 1; taps[2*S] = 1; taps[S-k] = 1; taps[2*S-k] = 1; check_one();
      taps = '0; taps[S] = 1; taps[2*S] = 1; taps[S+k] = 1; taps[2*S+k] = 1; check_one();
    end
    // random patterns of varying density
    for (int n = 0; n < 20000; n++) begin
      for (int b = 0; b <= 3*S; b++) taps[b] = ($urandom % (2 + n % 6)) == 0;
      check_one();
    end
    checks++;
    if (n_bracket == 0 || n_garble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

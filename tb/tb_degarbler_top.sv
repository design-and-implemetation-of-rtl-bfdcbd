// tb_degarbler_top: end-to-end test of the decoder-degarbler at its default
// sizes (3 x 1008-stage delay lines, 50 MHz).
//
// The testbench synthesises reply video: F1, 13 information pulses and F2
// on the 1.45 us grid (pulse j starts floor(72.5*j) clocks after F1), each
// 22 clocks (0.44 us) wide. Scenarios, each in its own time window:
//   1 single clean replies                    -> decoded correctly
//   2 two replies more than a frame apart     -> both decoded
//   3 two replies overlapped by exactly k*72 clocks (true garble)
//                                              -> both suppressed
//   4 two replies overlapped by k*72+36 clocks (pulses interleaved, garble
//     seen away from the decode)               -> both decoded correctly
//   5 scenario 3 in bracket-only mode          -> both decoded, with the
//     other reply's pulses merged in (the incorrect decode degarbling avoids)
//   6 short noise pulses                       -> removed by pulse validation
//   7 a burst of 18 replies with the buffer not read -> buffer full, 2 lost
//   8 code filter selecting one code (X ignored) -> only that code buffered
// Expected codes are computed here from the reply timing alone. Decoded
// codes are read out of the buffer and compared in order; the decode strobe
// must come 2043..2060 clocks after the reply's F1 enters (two frames of
// delay line plus the validator and criteria pipelines). Each mechanism
// (bracket decode, garble, suppressed decode, bracket-only decode, pulse
// rejection, buffer full/overflow, filter match) is counted and must occur.
module tb_degarbler_top;
  import iff_pkg::*;

  localparam int PW = 22;
  localparam int MAXN = 100000;

  logic clk = 1'b0, rst_n = 1'b0, video_in = 1'b0, degarble_en = 1'b1, rd_en = 1'b0, filter_en = 1'b0;
  iff_code_t sel_code = '0, sel_mask = '0;
  iff_code_t rd_code, code;
  logic buf_empty, buf_full, buf_overflow, bracket, garble, decode, garbled, code_valid, pulse_reject, code_match;
  logic [4:0] buf_count;

  degarbler_top dut (.*);

  always #10 clk = ~clk;   // one clock = 20 time units (20 ns at 50 MHz)

  int checks = 0, failures = 0;
  bit vid [MAXN];
  bit mode [MAXN];
  bit filt [MAXN];
  bit rd_allow [MAXN];
  logic [12:0] exp_q [$];
  int strobe_t [$];        // F1 time of each expected decode strobe
  int jn = 0;              // index of the last driven video sample
  int lat_seen = 0;
  localparam int LAT_MIN = 2030, LAT_MAX = 2050;
  int n_bracket = 0, n_garble = 0, n_suppressed = 0, n_bo_decode = 0, n_reject = 0;
  int n_full = 0, n_decode = 0, n_read = 0, n_exp_rejects = 0;
  int n_match = 0, n_exp_match = 0;

  initial begin
    #(20 * (MAXN + 5000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // place one reply with F1 at t0; info bit 12 = first information pulse
  task automatic put_reply(int t0, logic [12:0] c, int half_clocks = 145);
    for (int j = 0; j <= 14; j++) begin
      bit present;
      present = (j == 0 || j == 14) ? 1'b1 : c[13-j];
      if (present) for (int k = 0; k < PW; k++) vid[t0 + (half_clocks*j)/2 + k] = 1'b1;
    end
  endtask

  function automatic logic [12:0] rnd_code();
    return 13'($urandom);
  endfunction

  // expected decode of reply A when reply B, starting k slots later on the
  // same grid, overlaps it (bracket-only mode)
  function automatic logic [12:0] merged_first(logic [12:0] a, logic [12:0] b, int k);
    logic [12:0] r;
    for (int i = 1; i <= 13; i++) begin
      bit v;
      v = a[13-i];
      if (i == k) v = 1;
      else if (i > k) v = v | b[13-(i-k)];
      r[13-i] = v;
    end
    return r;
  endfunction

  function automatic logic [12:0] merged_second(logic [12:0] b, logic [12:0] a, int k);
    logic [12:0] r;
    for (int i = 1; i <= 13; i++) begin
      bit v;
      v = b[13-i];
      if (i + k == 14) v = 1;
      else if (i + k < 14) v = v | a[13-(i+k)];
      r[13-i] = v;
    end
    return r;
  endfunction

  int t;
  int tend;

  initial begin
    logic [12:0] a, b;
    int k;
    for (int i = 0; i < MAXN; i++) begin vid[i] = 0; mode[i] = 1; filt[i] = 0; rd_allow[i] = 1; end
    t = 200;
    // 1: clean replies
    repeat (3) begin
      a = rnd_code(); put_reply(t, a); exp_q.push_back(a); strobe_t.push_back(t);
      t += 3200;
    end
    // 2: two replies 1200 clocks apart (more than a frame)
    a = rnd_code(); b = rnd_code();
    put_reply(t, a); put_reply(t + 1200, b);
    exp_q.push_back(a); strobe_t.push_back(t); exp_q.push_back(b); strobe_t.push_back(t + 1200);
    t += 4400;
    // 3: true garble, offset k*72
    for (int n = 0; n < 3; n++) begin
      k = 1 + $urandom % 13;
      put_reply(t, rnd_code(), 144); put_reply(t + 72*k, rnd_code(), 144);
      t += 4400;
    end
    // 4: interleaved, offset k*72+36
    for (int n = 0; n < 3; n++) begin
      k = 1 + $urandom % 12;
      a = rnd_code(); b = rnd_code();
      put_reply(t, a); put_reply(t + 72*k + 36, b);
      exp_q.push_back(a); strobe_t.push_back(t); exp_q.push_back(b); strobe_t.push_back(t + 72*k + 36);
      t += 4400;
    end
    // 5: bracket-only mode, offset k*72
    for (int n = 0; n < 2; n++) begin
      k = 1 + $urandom % 13;
      a = rnd_code(); b = rnd_code();
      // no pair of information pulses may form a third (phantom) bracket
      for (int j = 1; j < k; j++) if (a[13-j]) b[13-(j+14-k)] = 1'b0;
      put_reply(t, a, 144); put_reply(t + 72*k, b, 144);
      exp_q.push_back(merged_first(a, b, k)); strobe_t.push_back(t);
      exp_q.push_back(merged_second(b, a, k)); strobe_t.push_back(t + 72*k);
      for (int i = t; i < t + 4400; i++) mode[i] = 0;
      t += 4400;
    end
    // 6: noise pulses between and inside a reply's gaps
    for (int n = 0; n < 20; n++) begin
      int w;
      w = 1 + $urandom % 8;
      for (int i = 0; i < w; i++) vid[t + n*50 + i] = 1;
      n_exp_rejects++;
    end
    a = rnd_code(); put_reply(t + 1200, a); exp_q.push_back(a); strobe_t.push_back(t + 1200);
    t += 4500;
    // 7: burst of 18 replies, buffer not read until the burst is decoded
    for (int n = 0; n < 18; n++) begin
      a = rnd_code(); put_reply(t + 1196*n, a);
      if (n < 16) exp_q.push_back(a);
      strobe_t.push_back(t + 1196*n);
    end
    for (int i = t - 500; i < t + 1196*18 + 2200; i++) rd_allow[i] = 0;
    t += 1196*18 + 4000;
    // 8: code filter on, selecting one code with the X bit ignored
    a = rnd_code(); b = a ^ 13'h0100;   // differs in B1 only
    sel_code = a ^ 13'h0040;             // differs from a in X only
    sel_mask = 13'h1fbf;                 // ignore X
    put_reply(t, a); put_reply(t + 1196, b); put_reply(t + 2*1196, a);
    exp_q.push_back(a); exp_q.push_back(a);
    strobe_t.push_back(t); strobe_t.push_back(t + 1196); strobe_t.push_back(t + 2*1196);
    n_exp_match = 2;
    for (int i = t - 500; i < t + 2*1196 + 2500; i++) filt[i] = 1;
    t += 2*1196 + 4000;
    tend = t;
    if (tend > MAXN) $fatal(1, "stimulus too long");

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < tend; j++) begin
      @(negedge clk);
      jn = j;
      video_in = vid[j];
      degarble_en = mode[j];
      filter_en = filt[j];
      rd_en = rd_allow[j] && !buf_empty;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d expected decodes never came out, first %h", exp_q.size(), exp_q[0]);
    end
    checks++;
    if (n_reject != n_exp_rejects) begin failures++; $display("rejects %0d exp %0d", n_reject, n_exp_rejects); end
    checks++;
    if (!buf_overflow) begin failures++; $display("no overflow"); end
    $display("last decode latency %0d clocks", lat_seen);
    $display("mechanisms: brackets=%0d garble=%0d suppressed=%0d bracket_only_decodes=%0d rejects=%0d buffer_full_clocks=%0d decodes=%0d reads=%0d filter_matches=%0d",
             n_bracket, n_garble, n_suppressed, n_bo_decode, n_reject, n_full, n_decode, n_read, n_match);
    checks++; if (n_bracket == 0)    begin failures++; $display("no bracket decode"); end
    checks++; if (n_garble == 0)     begin failures++; $display("no garble"); end
    checks++; if (n_suppressed == 0) begin failures++; $display("no suppressed decode"); end
    checks++; if (n_bo_decode == 0)  begin failures++; $display("no bracket-only decode"); end
    checks++; if (n_reject == 0)     begin failures++; $display("no pulse rejected"); end
    checks++; if (n_match != n_exp_match) begin failures++; $display("filter matches %0d exp %0d", n_match, n_exp_match); end
    checks++; if (n_full == 0)       begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  logic bracket_d = 0, garble_d = 0, zone_garbled_d = 0, zone_decoded = 0;
  int since_bracket = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (bracket && !bracket_d) n_bracket++;
      if (garble && !garble_d) n_garble++;
      bracket_d <= bracket; garble_d <= garble;
      if (pulse_reject) n_reject++;
      if (code_match) n_match++;
      if (buf_full) n_full++;
      // a bracket decode that ends without any decode while garble was seen
      if (garbled) zone_garbled_d <= 1;
      if (decode) zone_decoded <= 1;
      // evaluate a bracket decode once it has been low for 8 clocks
      since_bracket <= bracket ? 0 : since_bracket + 1;
      if (since_bracket == 8 && (zone_garbled_d || zone_decoded)) begin
        if (zone_garbled_d && !zone_decoded) n_suppressed++;
        zone_garbled_d <= 0; zone_decoded <= 0;
      end
      if (code_valid) begin
        n_decode++;
        if (!degarble_en) n_bo_decode++;
        // timing: strobe relative to the F1 time of the reply it belongs to
        checks++;
        if (strobe_t.size() == 0) begin
          failures++; $display("unexpected decode strobe at %0d", jn);
        end else begin
          int lat;
          lat = jn - strobe_t.pop_front();
          if (lat < LAT_MIN || lat > LAT_MAX) begin
            failures++; $display("decode latency %0d clocks out of range", lat);
          end
          lat_seen = lat;
        end
      end
      if (rd_en && !buf_empty) begin
        n_read++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected code %h at %0d", rd_code, jn);
        end else begin
          logic [12:0] e;
          e = exp_q.pop_front();
          if (rd_code !== e) begin
            failures++;
            $display("code %h expected %h at %0d", rd_code, e, jn);
          end
        end
      end
    end
  end
endmodule

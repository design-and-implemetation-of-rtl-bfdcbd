// tb_garble_sweep: two overlapping replies at every displacement of 1..13
// slots, run through the full-size decoder-degarbler.
//
// For each displacement k the second reply starts k*72 + d clocks after the
// first, for several sub-slot offsets d. Both replies use the 1.45 us grid,
// except the d = 0 case, which uses an exact 72-clock grid so that the two
// pulse trains coincide pulse for pulse. Checked:
//   d = 0  (true garble)           : no code may be given for either reply
//   d = 36 (pulses interleaved)    : both codes given, both correct
// For the other offsets the number of correct, wrong and suppressed decodes
// is printed to show how the 2-clock sub-zones resolve partial overlaps;
// these are reported, not checked.
module tb_garble_sweep;
  import iff_pkg::*;

  localparam int PW = 22;
  localparam int SPACING = 4400;
  localparam int ND = 8;
  localparam int DOFF [ND] = '{0, 4, 8, 12, 16, 20, 28, 36};
  localparam int NCASE = 13 * ND;
  localparam int MAXN = NCASE * SPACING + 3000;

  logic clk = 1'b0, rst_n = 1'b0, video_in = 1'b0, degarble_en = 1'b1, rd_en = 1'b1, filter_en = 1'b0;
  iff_code_t sel_code = '0, sel_mask = '0, rd_code, code;
  logic buf_empty, buf_full, buf_overflow, bracket, garble, decode, garbled, code_valid, pulse_reject, code_match;
  logic [4:0] buf_count;

  degarbler_top dut (.*);

  always #10 clk = ~clk;

  int checks = 0, failures = 0;
  bit vid [MAXN];
  logic [12:0] ca [NCASE], cb [NCASE];
  int n_ok [ND], n_bad [ND], n_none [ND];
  int seen_ok [NCASE], seen_bad [NCASE];
  int jn = 0;

  initial begin
    #(20 * (MAXN + 5000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_reply(int t0, logic [12:0] c, int half_clocks);
    for (int j = 0; j <= 14; j++) begin
      bit present;
      present = (j == 0 || j == 14) ? 1'b1 : c[13-j];
      if (present) for (int k = 0; k < PW; k++) vid[t0 + (half_clocks*j)/2 + k] = 1'b1;
    end
  endtask

  // every decode strobe is attributed to the case whose window it falls in
  always @(posedge clk) begin
    if (rst_n && code_valid) begin
      int c;
      c = (jn - 200) / SPACING;
      if (c >= 0 && c < NCASE) begin
        if (code === ca[c] || code === cb[c]) seen_ok[c]++;
        else seen_bad[c]++;
      end
    end
  end

  initial begin
    for (int i = 0; i < MAXN; i++) vid[i] = 0;
    for (int c = 0; c < NCASE; c++) begin
      int k, d, t;
      k = 1 + c / ND; d = DOFF[c % ND]; t = 200 + c * SPACING;
      ca[c] = 13'($urandom); cb[c] = 13'($urandom);
      if (d == 0) begin
        put_reply(t, ca[c], 144); put_reply(t + 72*k, cb[c], 144);
      end else begin
        put_reply(t, ca[c], 145); put_reply(t + 72*k + d, cb[c], 145);
      end
      seen_ok[c] = 0; seen_bad[c] = 0;
    end
    for (int i = 0; i < ND; i++) begin n_ok[i] = 0; n_bad[i] = 0; n_none[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < MAXN; j++) begin
      @(negedge clk);
      jn = j;
      video_in = vid[j];
    end
    for (int c = 0; c < NCASE; c++) begin
      int di;
      di = c % ND;
      n_ok[di] += seen_ok[c]; n_bad[di] += seen_bad[c]; n_none[di] += 2 - seen_ok[c] - seen_bad[c];
      if (DOFF[di] == 0) begin
        checks++;
        if (seen_ok[c] + seen_bad[c] != 0) begin
          failures++; $display("k=%0d exact overlap: %0d codes given", 1 + c / ND, seen_ok[c] + seen_bad[c]);
        end
      end else if (DOFF[di] == 36) begin
        checks++;
        if (seen_ok[c] != 2 || seen_bad[c] != 0) begin
          failures++; $display("k=%0d interleaved: %0d correct %0d wrong", 1 + c / ND, seen_ok[c], seen_bad[c]);
        end
      end
    end
    for (int i = 0; i < ND; i++)
      $display("offset k*72+%0d: correct %0d, wrong %0d, suppressed %0d (of %0d replies)",
               DOFF[i], n_ok[i], n_bad[i], n_none[i], 26);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// degarbler_top: IFF reply decoder-degarbler.
//
// Detected reply video enters at video_in and is cleaned by the pulse
// validator. The validated train runs through three chained 20.3 us delay
// lines (after line, decode line, before line; 3 x 1008 stages at 50 MHz,
// tapped every 72 stages). The AND/OR network on the 43 taps gives the
// bracket decode of a reply whose framing pulses sit at the ends of the
// decode line, and the garble signal for any second reply displaced by less
// than a frame. The criteria block accepts the bracket decode only where it
// has a 2-clock decode sub-zone with garble clear for 2 clocks on each side;
// the reply decoder then reads the 13 information pulses; the code filter
// optionally passes only a selected code, and the result is written into
// the output buffer. With degarble_en low the bracket decoder
// works alone, which decodes everything except overlapping replies.
//
// Latency: a reply is decoded one frame after its F2 pulse arrives, i.e.
// about 2 x 1008 clocks (40 us) after F1 plus the validator delay (12
// clocks) and the criteria/decoder pipeline (4 clocks); the
// buffer is written one clock after code_valid.
// The structure (three delay lines, bracket and garble gates, sub-zone
// criteria, decoder, code filter, buffer) follows the original design; the validator
// rule, buffer size and the status outputs are this design's choices.
module degarbler_top #(
  parameter int unsigned STAGES_PER_SLOT = iff_pkg::STAGES_PER_SLOT,
  parameter int unsigned MIN_WIDTH       = 10,
  parameter int unsigned BUF_DEPTH       = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        video_in,
  input  logic        degarble_en,
  input  logic        rd_en,
  input  logic        filter_en,
  input  iff_pkg::iff_code_t sel_code,
  input  iff_pkg::iff_code_t sel_mask,
  output iff_pkg::iff_code_t rd_code,
  output logic        buf_empty,
  output logic        buf_full,
  output logic        buf_overflow,
  output logic        bracket,
  output logic        garble,
  output logic        decode,
  output logic        garbled,
  output iff_pkg::iff_code_t code,
  output logic        code_valid,
  output logic        pulse_reject,
  output logic        code_match,
  output logic [$clog2(BUF_DEPTH+1)-1:0] buf_count
);

  localparam int unsigned S  = iff_pkg::SLOTS_PER_FRAME;
  localparam int unsigned NI = iff_pkg::NUM_INFO;
  localparam int unsigned DZ = iff_pkg::DECODE_ZONE;
  localparam int unsigned CZ = iff_pkg::CLEAR_ZONE;

  logic           pulse;
  logic [3*S:0]   chain_taps;
  logic [S:0]     after_taps, dec_taps, before_taps;
  logic [NI-1:0]  info;
  logic           bracket_zone;
  iff_pkg::iff_code_t buf_wr_code;
  logic           buf_wr;

  pulse_validator #(.MIN_WIDTH(MIN_WIDTH)) u_valid (
    .clk, .rst_n, .video_in, .pulse_out(pulse), .reject(pulse_reject)
  );

  delay_line #(.STAGES_PER_SLOT(STAGES_PER_SLOT), .SLOTS(S)) u_after (
    .clk, .rst_n, .din(pulse), .taps(after_taps)
  );
  delay_line #(.STAGES_PER_SLOT(STAGES_PER_SLOT), .SLOTS(S)) u_decode (
    .clk, .rst_n, .din(after_taps[S]), .taps(dec_taps)
  );
  delay_line #(.STAGES_PER_SLOT(STAGES_PER_SLOT), .SLOTS(S)) u_before (
    .clk, .rst_n, .din(dec_taps[S]), .taps(before_taps)
  );

  // chain_taps[m] = validated pulse train delayed m slots
  assign chain_taps = {before_taps[S:1], dec_taps[S:1], after_taps};

  bracket_garble_detector #(.SLOTS(S), .MAX_OFFSET(S-1)) u_detect (
    .taps(chain_taps), .bracket, .garble, .info
  );

  degarble_criteria #(.DECODE_ZONE(DZ), .CLEAR_ZONE(CZ)) u_crit (
    .clk, .rst_n, .degarble_en, .bracket, .garble, .decode, .bracket_zone, .garbled
  );

  reply_decoder #(.ALIGN(CZ+1)) u_dec (
    .clk, .rst_n, .info, .decode, .bracket_zone, .code, .code_valid
  );

  code_filter u_filt (
    .clk, .rst_n, .filter_en, .sel_code, .sel_mask, .in_code(code), .in_valid(code_valid),
    .out_code(buf_wr_code), .out_valid(buf_wr), .match(code_match)
  );

  code_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(NI)) u_buf (
    .clk, .rst_n, .wr_en(buf_wr), .wr_data(buf_wr_code), .rd_en, .rd_data(rd_code),
    .empty(buf_empty), .full(buf_full), .overflow(buf_overflow), .count(buf_count)
  );

endmodule

// degarble_criteria: the decode / garble-clear sub-zone test and the
// coincidence that gives the degarbled bracket decode.
//
// The bracket decode and the garble signal each shift through their own
// register group, clocked with the delay lines. The window is
// CLEAR_ZONE + DECODE_ZONE + CLEAR_ZONE clocks long (2+2+2 = 120 ns):
//
//     garble : | clear | clear | clear | clear | clear | clear |
//     bracket:                 |  set  |  set  |
//
// `decode` is high wherever the bracket decode has been present for the
// whole decode sub-zone and no garble was seen anywhere in the window. The
// test is made at every clock, so it slides from the leading to the trailing
// edge of the bracket decode and passes wherever the decode pulse has a
// long enough part clear of garble; a decode fully covered by garble gives
// nothing. With degarble_en low the garble condition is dropped and the
// bracket decoder works alone.
//
// Timing: decode, bracket_zone and garbled come straight from registers.
// With bd_q[0] the sample of the previous clock, the decode sub-zone holds
// the samples taken CLEAR_ZONE+1 .. CLEAR_ZONE+DECODE_ZONE clocks ago, so
// decode lags the bracket input by CLEAR_ZONE+1 clocks at its leading edge.
// bracket_zone is the bracket sample at the newer end of the sub-zone.
// Sub-zone lengths follow the original design; requiring the garble to be
// clear inside the decode sub-zone as well is this design's reading of it.
module degarble_criteria #(
  parameter int unsigned DECODE_ZONE = 2,
  parameter int unsigned CLEAR_ZONE  = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic degarble_en,
  input  logic bracket,
  input  logic garble,
  output logic decode,
  output logic bracket_zone,
  output logic garbled
);

  localparam int unsigned WIN = DECODE_ZONE + 2*CLEAR_ZONE;

  logic [WIN-1:0] bd_q, g_q;   // index 0 = newest

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bd_q <= '0;
      g_q  <= '0;
    end else begin
      bd_q <= {bd_q[WIN-2:0], bracket};
      g_q  <= {g_q[WIN-2:0], garble};
    end
  end

  logic zone_full, garble_clear;

  always_comb begin
    zone_full    = &bd_q[CLEAR_ZONE +: DECODE_ZONE];
    garble_clear = ~|g_q;
    decode       = zone_full & (garble_clear | ~degarble_en);
    bracket_zone = bd_q[CLEAR_ZONE];
    garbled      = bd_q[CLEAR_ZONE] & ~garble_clear;
  end

  // a degarbled decode is always part of a bracket decode
  a_decode_in_bracket: assert property (@(posedge clk) disable iff (!rst_n) decode |-> bracket_zone);

endmodule

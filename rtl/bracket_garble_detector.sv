// bracket_garble_detector: the AND/OR network on the taps of the three
// chained delay lines.
//
// The chain is input -> after line -> decode line -> before line, and
// taps[m] is the pulse train delayed by m slots (m = 0 .. 3*SLOTS).
// * Bracket decode: both framing pulses of a reply sit at the two ends of
//   the decode line, taps[SLOTS] (F2) and taps[2*SLOTS] (F1).
// * Garble: a second bracket, i.e. a pulse pair SLOTS apart, displaced by
//   k = 1..MAX_OFFSET slots towards the after line or the before line. Each
//   displacement is one AND gate; all of them are ORed. A garble at the same
//   time as a bracket decode means two overlapping replies.
// * info: the 13 information positions of the decode line, C1 in bit 12,
//   D4 in bit 0.
// Purely combinational. Checking every displacement short of a full frame
// follows the original design; excluding a 14-slot displacement (framing
// pulse on framing pulse) is this design's reading of "within 20.3 us".
module bracket_garble_detector #(
  parameter int unsigned SLOTS      = 14,
  parameter int unsigned MAX_OFFSET = 13
) (
  input  logic [3*SLOTS:0] taps,
  output logic             bracket,
  output logic             garble,
  output logic [SLOTS-2:0] info
);

  logic [MAX_OFFSET:1] after_hit, before_hit;

  always_comb begin
    bracket = taps[SLOTS] & taps[2*SLOTS];
    for (int unsigned k = 1; k <= MAX_OFFSET; k++) begin
      after_hit[k]  = taps[SLOTS-k] & taps[2*SLOTS-k];   // reply arriving later
      before_hit[k] = taps[SLOTS+k] & taps[2*SLOTS+k];   // reply arriving earlier
    end
    garble = (|after_hit) | (|before_hit);
    for (int unsigned j = 0; j < SLOTS-1; j++) info[j] = taps[SLOTS+1+j];
  end

endmodule

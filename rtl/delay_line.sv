// delay_line: one 20.3 us delay line of the degarbler.
//
// A shift register of SLOTS*STAGES_PER_SLOT one-bit stages, clocked at
// 50 MHz. Every STAGES_PER_SLOT stages (72 stages = 1.44 us, the nominal
// 1.45 us information-pulse spacing) there is a tap, so the line shows the
// pulse train at each of the 15 pulse positions of a reply at once:
// taps[m] is din delayed by m*STAGES_PER_SLOT clocks, taps[0] is din itself
// and taps[SLOTS] is the line output, which feeds the next line. Stage
// count and tap spacing follow the original design; clearing on reset is
// this design's choice.
module delay_line #(
  parameter int unsigned STAGES_PER_SLOT = 72,
  parameter int unsigned SLOTS           = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  output logic [SLOTS:0]   taps
);

  localparam int unsigned STAGES = STAGES_PER_SLOT * SLOTS;

  logic [STAGES-1:0] sr_q;   // sr_q[i] = din delayed i+1 clocks

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr_q <= '0;
    else        sr_q <= {sr_q[STAGES-2:0], din};
  end

  always_comb begin
    taps[0] = din;
    for (int unsigned m = 1; m <= SLOTS; m++) taps[m] = sr_q[m*STAGES_PER_SLOT-1];
  end

endmodule

// pulse_validator: conditions the detected reply video before the delay lines.
//
// video_in is brought into the 50 MHz domain by a two-flop synchroniser.
// The synchronised samples then run through a MIN_WIDTH-stage shift register.
// A pulse is passed on only once MIN_WIDTH consecutive high samples have been
// seen; it then leaves the shift register with its full width, so the output
// is the input delayed by MIN_WIDTH+2 clocks with every pulse shorter than
// MIN_WIDTH clocks removed. `reject` strobes for one clock when a too-short
// pulse ends. The design's reply pulses are 0.45 us (about 22 clocks) wide.
//
// The validation rule, the 10-clock (0.2 us) minimum and the synchroniser
// are this design's own choices: the block is only named as "pulse
// validation" in the original design description.
module pulse_validator #(
  parameter int unsigned MIN_WIDTH = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic video_in,
  output logic pulse_out,
  output logic reject
);

  logic [1:0]           sync_q;
  logic [MIN_WIDTH-1:0] sr_q;      // sr_q[0] newest sample
  logic                 pass_q;
  logic [$clog2(MIN_WIDTH+1)-1:0] run_q;   // length of the current high run, saturating
  logic                 pass_d;
  logic                 sample;

  assign sample = sync_q[1];
  assign pass_d = sr_q[MIN_WIDTH-1] & ((&sr_q) | pass_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= '0;
      sr_q      <= '0;
      pass_q    <= 1'b0;
      pulse_out <= 1'b0;
      run_q     <= '0;
      reject    <= 1'b0;
    end else begin
      sync_q    <= {sync_q[0], video_in};
      sr_q      <= {sr_q[MIN_WIDTH-2:0], sample};
      pass_q    <= pass_d;
      pulse_out <= pass_d;
      reject    <= 1'b0;
      if (sample) begin
        if (run_q != MIN_WIDTH[$bits(run_q)-1:0]) run_q <= run_q + 1'b1;
      end else begin
        run_q <= '0;
        if (run_q != '0 && run_q != MIN_WIDTH[$bits(run_q)-1:0]) reject <= 1'b1;
      end
    end
  end

endmodule

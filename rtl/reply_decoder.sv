// reply_decoder: reads the information pulses of a degarbled reply.
//
// The 13 information positions of the decode line are registered every
// clock into an ALIGN-deep pipeline, so that the sample handed over is the
// one taken together with the bracket decode sample that passed the
// criteria (ALIGN = CLEAR_ZONE+1 for the criteria block). On the first clock
// of `decode` inside a bracket decode the sample is latched into `code` and
// `code_valid` strobes for one clock; further `decode` clocks of the same
// bracket are ignored, and the decoder re-arms when bracket_zone falls.
// code bit 12..0 = C1 A1 C2 A2 C4 A4 X B1 D1 B2 D2 B4 D4, the order of the
// pulses in the reply. The bit order follows the original design; the
// one-code-per-bracket rule is this design's choice.
module reply_decoder
  import iff_pkg::*;
#(
  parameter int unsigned ALIGN = 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NUM_INFO-1:0]     info,
  input  logic            decode,
  input  logic            bracket_zone,
  output iff_code_t       code,
  output logic            code_valid
);

  logic [NUM_INFO-1:0] pipe_q [ALIGN];
  logic        armed_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ALIGN; i++) pipe_q[i] <= '0;
      armed_q    <= 1'b1;
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      pipe_q[0] <= info;
      for (int i = 1; i < ALIGN; i++) pipe_q[i] <= pipe_q[i-1];
      code_valid <= 1'b0;
      if (decode && armed_q) begin
        code       <= iff_code_t'(pipe_q[ALIGN-1]);
        code_valid <= 1'b1;
        armed_q    <= 1'b0;
      end else if (!bracket_zone) begin
        armed_q    <= 1'b1;
      end
    end
  end

  // a code is a one-clock strobe, and only one is given per bracket decode
  a_single_strobe: assert property (@(posedge clk) disable iff (!rst_n) code_valid |=> !code_valid);

endmodule

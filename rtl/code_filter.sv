// code_filter: optional selection of the decoded replies that are passed on.
//
// A decoder either reports whatever code it reads or acts as a filter that
// lets only selected codes through. With filter_en low every decode strobe
// is passed; with it high a strobe is passed only when the code equals
// sel_code on every bit set in sel_mask (so, for example, the X bit can be
// ignored). Output is registered: out_valid/out_code follow in_valid/in_code
// by one clock, and `match` strobes with every passed code in filter mode.
// The select/mask interface and the one-clock register are this design's
// choices; the filtering role of the decoder follows the original design.
module code_filter
  import iff_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      filter_en,
  input  iff_code_t sel_code,
  input  iff_code_t sel_mask,
  input  iff_code_t in_code,
  input  logic      in_valid,
  output iff_code_t out_code,
  output logic      out_valid,
  output logic      match
);

  logic hit;
  assign hit = ((in_code ^ sel_code) & sel_mask) == '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_code  <= '0;
      out_valid <= 1'b0;
      match     <= 1'b0;
    end else begin
      out_code  <= in_code;
      out_valid <= in_valid & (hit | ~filter_en);
      match     <= in_valid & hit & filter_en;
    end
  end

endmodule

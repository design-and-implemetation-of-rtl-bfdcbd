// tb_code_filter: random codes, select words and masks, in both modes.
// Reference: a strobe passes when the filter is off, or when no bit set in
// the mask differs between code and select word; the output follows one
// clock later. Half of the codes are forced to match so both outcomes occur.
module tb_code_filter;
  import iff_pkg::*;
  localparam int N = 20000;
  logic clk = 1'b0, rst_n = 1'b0, filter_en = 1'b0, in_valid = 1'b0;
  iff_code_t sel_code = '0, sel_mask = '0, in_code = '0, out_code;
  logic out_valid, match;
  int checks = 0, failures = 0, n_pass = 0, n_block = 0;

  code_filter dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ev, em;
    logic [12:0] ec;
    ev = 0; em = 0; ec = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== ev || match !== em || (ev && out_code !== ec)) begin
        failures++;
        if (failures < 10) $display("at %0d got v%0b m%0b %h exp v%0b m%0b %h", j, out_valid, match, out_code, ev, em, ec);
      end
      if (ev) n_pass++; else if (in_valid) n_block++;
      filter_en = ($urandom % 3) != 0;
      sel_code  = 13'($urandom);
      sel_mask  = ($urandom % 2) ? 13'h1fff : 13'($urandom);
      in_code   = ($urandom % 2) ? sel_code ^ (13'($urandom) & ~sel_mask) : 13'($urandom);
      in_valid  = ($urandom % 2);
      // independent reference: compare bit by bit
      em = in_valid && filter_en;
      for (int b = 0; b < 13; b++) if (sel_mask[b] && (in_code[b] != sel_code[b])) em = 0;
      ev = in_valid && (em || !filter_en);
      ec = in_code;
    end
    checks++;
    if (n_pass == 0 || n_block == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_code_buffer: random writes and reads against a queue model, with
// phases that fill the FIFO past full (writes dropped, overflow set) and
// drain it to empty. Checks head data, empty, full, count and overflow
// after every clock.
module tb_code_buffer;
  localparam int D = 16, W = 13, N = 20000;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full, overflow;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  bit exp_ovf = 0;
  int n_full = 0, n_drop = 0;

  code_buffer #(.DEPTH(D), .WIDTH(W)) dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pw, pr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int j = 0; j < N; j++) begin
      // phase: bias towards writing or reading
      pw = ((j / 500) % 2 == 0) ? 80 : 30;
      pr = ((j / 500) % 2 == 0) ? 20 : 70;
      wr_en = ($urandom % 100) < pw;
      rd_en = ($urandom % 100) < pr;
      wr_data = W'($urandom);
      // model the coming edge
      @(posedge clk);
      begin
        bit dr, dw;
        dr = rd_en && q.size() > 0;
        dw = wr_en && (q.size() < D || dr);
        if (dr) void'(q.pop_front());
        if (dw) q.push_back(wr_data);
        if (wr_en && !dw) begin exp_ovf = 1; n_drop++; end
      end
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || count !== ($bits(count))'(q.size())
          || overflow !== exp_ovf || (q.size() > 0 && rd_data !== q[0])) begin
        failures++;
        if (failures < 10) $display("at %0d: empty %0b full %0b count %0d ovf %0b data %h, model size %0d", j, empty, full, count, overflow, rd_data, q.size());
      end
      if (full) n_full++;
    end
    checks++;
    if (n_full == 0 || n_drop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

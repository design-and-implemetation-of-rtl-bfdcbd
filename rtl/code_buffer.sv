// code_buffer: the buffer into which decoded replies are copied.
//
// A first-word-fall-through FIFO of DEPTH words: rd_data shows the oldest
// word whenever empty is low, and rd_en pops it. A write and a read in the
// same clock are both served. A write while full is dropped and sets the
// sticky overflow flag, cleared only by reset. Depth, the full policy and
// the interface are this design's choices; the original design only says
// that decoded frames are copied into a buffer.
module code_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 13
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem_q [DEPTH];
  logic [AW-1:0]    wr_ptr_q, rd_ptr_q;
  logic             do_wr, do_rd;

  assign empty   = (count == 0);
  assign full    = (count == DEPTH[$bits(count)-1:0]);
  assign do_rd   = rd_en & ~empty;
  assign do_wr   = wr_en & (~full | do_rd);
  assign rd_data = mem_q[rd_ptr_q];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem_q[wr_ptr_q] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wr_ptr_q <= next_ptr(wr_ptr_q);
      if (do_rd) rd_ptr_q <= next_ptr(rd_ptr_q);
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
      if (wr_en && !do_wr) overflow <= 1'b1;
    end
  end

  // the fill level never exceeds the depth; full and empty exclude each other
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= DEPTH[$bits(count)-1:0]);
  a_full_empty:  assert property (@(posedge clk) disable iff (!rst_n) !(full && empty));

endmodule

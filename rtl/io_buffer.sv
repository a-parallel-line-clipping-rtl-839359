// io_buffer: the I/O Buffer of a Geometry Processor.
//
// A small first-in first-out buffer that holds the words a GP hands on to
// the next subsystem, so the GP can go on with the next segment while the
// consumer has not yet taken the last result. Input side: in_valid/in_ready;
// output side: out_valid/out_ready; a word moves when valid and ready are
// both high in a cycle. A word written into an empty buffer is visible at the
// output in the next cycle. in_ready depends only on the fill level, so a
// full buffer refuses a write even when a read happens in the same cycle.
//
// The buffer's existence is published; its depth, word width and handshake
// are this design's choices (default depth 2).
module io_buffer #(
  parameter int unsigned WIDTH = 25,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic [PTR_W:0]   count;
  logic             push, pop;

  assign in_ready  = (count < (PTR_W+1)'(DEPTH));
  assign out_valid = (count != 0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PTR_W+1)'(push) - (PTR_W+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) count <= (PTR_W+1)'(DEPTH))
    else $error("io_buffer: overflow");

endmodule

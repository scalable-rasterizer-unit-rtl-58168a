// vertex_fifo: synchronous FIFO that decouples the transform stage from the
// segmenting unit's input pipeline. DEPTH words of WIDTH bits (64 deep as in
// the source design). Valid/ready on both sides: a word moves when valid and
// ready are both high on a rising edge. Read data is the head of the queue,
// shown combinationally while out_valid is high (first-word fall-through).
// The memory is an array without reset; the pointers reset to empty.
module vertex_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;

  wire push = in_valid  && in_ready;
  wire pop  = out_valid && out_ready;

  assign level     = wptr - rptr;
  assign in_ready  = level != (AW+1)'(DEPTH);
  assign out_valid = level != '0;
  assign out_data  = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  // No write while full, no read while empty.
  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));
endmodule

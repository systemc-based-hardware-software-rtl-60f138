// timer32: cycle counter used to measure how many clock cycles an operation
// takes (the original design's 32-bit timer with reset, start and stop).
//
// rst_cnt clears the count, start makes it count up by one every clock,
// stop freezes it; the count wraps at 2^WIDTH. If rst_cnt and start come in
// the same cycle the count restarts from zero and runs. The count is
// readable at any time. The counting behaviour is this design's reading of
// the three functions the original design lists.
module timer32 #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rst_cnt,
  input  logic             start,
  input  logic             stop,
  output logic [WIDTH-1:0] count,
  output logic             running
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      running <= 1'b0;
    end else begin
      if (rst_cnt)      count <= '0;
      else if (running) count <= count + 1'b1;
      if (start)        running <= 1'b1;
      else if (stop)    running <= 1'b0;
    end
  end
endmodule

`timescale 1ps/1ps
// coarse_counter: free-running counter of the 200 MHz clock.
//
// Every epoch on the card (event times and range gate epochs) is a count of
// 5 ns clock periods plus a vernier fraction; this counter supplies the 5 ns
// part. It counts every rising clock edge, so after the n-th edge following
// reset it holds n, and it wraps at 2**W. Reset is asynchronous, active low,
// to zero. The width is this design's choice: 32 bits cover 21.47 s, far more
// than the longest satellite time of flight.
module coarse_counter #(
  parameter int unsigned W = timer_pkg::COARSE_W
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

endmodule

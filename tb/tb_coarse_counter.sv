`timescale 1ps/1ps
// tb_coarse_counter: the counter must hold the number of rising clock edges
// since reset, modulo 2**W, and return to 0 on reset. W is cut to 8 bits so
// that the wrap is reached.
module tb_coarse_counter;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] count;
  int checks = 0, failures = 0;
  int edges = 0;

  coarse_counter #(.W(W)) dut (.*);

  always #2500 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (count != 0) failures++;
    rst_n = 1'b1;
    for (int i = 1; i <= 600; i++) begin
      @(negedge clk);
      edges++;
      checks++;
      if (count != W'(edges)) begin
        failures++;
        $display("FAIL edge %0d count %0d", edges, count);
      end
    end
    #1234 rst_n = 1'b0;
    #1;
    checks++; if (count != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// tb_et_unit: drives one vernier event timer unit with events at random
// times, off the 250 ps grid, and compares its coarse count and fine code
// with those worked out from the event time and the clock edge times. Also
// checks that the result is valid within 20 ns of the event, that clear drops
// valid, that a disabled unit ignores events, and that every fine code
// 0..NCHAINS-1 occurs.
module tb_et_unit;
  localparam int NCHAINS = 20;
  localparam int GD      = 250;
  localparam int PER     = 5000;
  localparam int CW      = 16;
  localparam int FW      = $clog2(NCHAINS + 1);

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1, event_in = 1'b0, clear = 1'b0;
  logic [CW-1:0] count = '0;
  logic valid;
  logic [CW-1:0] coarse;
  logic [FW-1:0] fine;
  int checks = 0, failures = 0;
  bit seen [NCHAINS];

  et_unit #(.NCHAINS(NCHAINS), .GATE_DELAY_PS(GD), .CW(CW)) dut (.*);

  // Clock: rising edges at 2500 + 5000*j; after edge j the counter holds j+1,
  // so edge n (counter value n after it) is at T(n) = 2500 + 5000*(n-1).
  always #(PER/2) clk = ~clk;
  always @(posedge clk) count <= count + 1'b1;
  function automatic longint t_edge(input longint n);
    return 2500 + longint'(PER) * (n - 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t, n, exp_fine;
    int r;
    time t_valid;
    #12_000 rst_n = 1'b1;
    for (int ev = 0; ev < 400; ev++) begin
      // wait a few cycles, then place the event r ps after a negative edge
      repeat (2 + $urandom_range(3)) @(negedge clk);
      do r = $urandom_range(4999); while (r % GD == 0 || (r + 2500) % GD == 0);
      #(r);
      t = $time;
      event_in = 1'b1;
      // reference: first edge after t, and chains whose end precedes it
      n = (t - 2500) / PER + 2;
      if (t_edge(n - 1) > t) n = n - 1;
      exp_fine = 0;
      for (int k = 0; k < NCHAINS; k++) if (t + (k + 1) * GD < t_edge(n)) exp_fine++;
      fork
        begin wait (valid); t_valid = $time; end
        #30_000;
      join_any
      disable fork;
      check(valid, "valid after event");
      check(t_valid - t <= 20_000, $sformatf("latency %0d ps", t_valid - t));
      check(coarse == CW'(n), $sformatf("coarse %0d exp %0d", coarse, n));
      check(fine == FW'(exp_fine), $sformatf("fine %0d exp %0d", fine, exp_fine));
      if (fine < NCHAINS) seen[fine] = 1'b1;
      #8000 event_in = 1'b0;          // pulse longer than one period
      @(negedge clk) clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      check(!valid, "clear drops valid");
    end
    // a disabled unit ignores the event
    enable = 1'b0;
    repeat (3) @(negedge clk);
    #1234 event_in = 1'b1;
    repeat (6) @(negedge clk);
    check(!valid, "disabled unit ignores event");
    event_in = 1'b0;
    enable = 1'b1;
    for (int k = 0; k < NCHAINS; k++) check(seen[k], $sformatf("fine code %0d seen", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

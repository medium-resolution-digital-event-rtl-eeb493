`timescale 1ps/1ps
// tb_et_multi: four event timer units on one event, with the units' input
// routing skewed by a quarter gate delay each. Every unit's result is checked
// against the event time plus its own skew, and the average of the four
// mid-interval estimates (the skew's mean removed) must have a smaller RMS
// error than a single unit, which is what running units in parallel is for.
module tb_et_multi;
  localparam int NUNITS  = 4;
  localparam int NCHAINS = 20;
  localparam int GD      = 250;
  localparam int SKEW    = 62;
  localparam int PER     = 5000;
  localparam int CW      = 16;
  localparam int FW      = $clog2(NCHAINS + 1);

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b1, event_in = 1'b0;
  logic [NUNITS-1:0] clear = '0;
  logic [CW-1:0] count = '0;
  logic [NUNITS-1:0] valid;
  logic [NUNITS-1:0][CW-1:0] coarse;
  logic [NUNITS-1:0][FW-1:0] fine;
  int checks = 0, failures = 0;

  et_multi #(.NUNITS(NUNITS), .NCHAINS(NCHAINS), .GATE_DELAY_PS(GD),
             .UNIT_SKEW_PS(SKEW), .CW(CW)) dut (.*);

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
    longint t, ti, n, exp_fine;
    real est, avg, e1, ea, se1 = 0.0, sea = 0.0;
    int r, nev = 300;
    #12_000 rst_n = 1'b1;
    for (int ev = 0; ev < nev; ev++) begin
      repeat (2 + $urandom_range(3)) @(negedge clk);
      do begin
        r = $urandom_range(4999);
      end while ((r % GD) inside {0, SKEW, 2*SKEW, 3*SKEW} || ((r + 2500) % GD) inside {0, 250-SKEW, 250-2*SKEW, 250-3*SKEW});
      #(r);
      t = $time;
      event_in = 1'b1;
      #20_000;
      check(valid == '1, "all units valid");
      avg = 0.0;
      for (int i = 0; i < NUNITS; i++) begin
        ti = t + i * SKEW;
        n = (ti - 2500) / longint'(PER) + 2;
        if (t_edge(n - 1) > ti) n = n - 1;
        exp_fine = 0;
        for (int k = 0; k < NCHAINS; k++) if (ti + longint'((k + 1) * GD) < t_edge(n)) exp_fine++;
        check(coarse[i] == CW'(n), $sformatf("unit %0d coarse", i));
        check(fine[i] == FW'(exp_fine), $sformatf("unit %0d fine %0d exp %0d", i, fine[i], exp_fine));
        est = real'(t_edge(longint'(coarse[i]))) - (real'(fine[i]) + 0.5) * GD - i * SKEW;
        if (i == 0) e1 = est - real'(t);
        avg += est / NUNITS;
      end
      ea = avg - real'(t);
      se1 += e1 * e1;
      sea += ea * ea;
      #5000 event_in = 1'b0;
      @(negedge clk) clear = '1;
      @(negedge clk) clear = '0;
      check(valid == '0, "clear drops valid");
    end
    $display("RMS error: one unit %0.1f ps, average of %0d units %0.1f ps",
             $sqrt(se1 / nev), NUNITS, $sqrt(sea / nev));
    check($sqrt(sea / nev) < 0.6 * $sqrt(se1 / nev), "averaging lowers the error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

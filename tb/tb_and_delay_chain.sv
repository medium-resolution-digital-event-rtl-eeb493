`timescale 1ps/1ps
// tb_and_delay_chain: checks the AND-gate chain model. A rising start must
// reach tap i exactly (i+1)*250 ps later, a falling start must follow the same
// way, and dropping enable must clear every tap one gate delay later. A
// 100-gate chain must delay the start by 25 ns.
module tb_and_delay_chain;
  localparam int LENGTH = 8;
  localparam int GD     = 250;

  logic              start = 1'b0, enable = 1'b1;
  logic [LENGTH-1:0] taps;
  int checks = 0, failures = 0;
  time rise_t [LENGTH];

  and_delay_chain #(.LENGTH(LENGTH), .GATE_DELAY_PS(GD)) dut (.*);

  // A 100-gate chain, as used for the temperature drift measurement: 25 ns.
  logic        start100 = 1'b0;
  logic [99:0] taps100;
  time         end100 = 0;
  and_delay_chain #(.LENGTH(100), .GATE_DELAY_PS(GD)) dut100 (
    .start(start100), .enable(1'b1), .taps(taps100));
  always @(posedge taps100[99]) end100 = $time;

  for (genvar i = 0; i < LENGTH; i++) begin : g_mon
    always @(posedge taps[i]) rise_t[i] = $time;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    #5000;
    check(taps == '0, "chain idle");
    for (int rep = 0; rep < 3; rep++) begin
      t0 = $time;
      start = 1'b1;
      #(LENGTH * GD + 100);
      for (int i = 0; i < LENGTH; i++)
        check(rise_t[i] == t0 + time'((i + 1) * GD), $sformatf("tap %0d rise time", i));
      check(taps == '1, "all taps high");
      // falling start: after 3.5 gate delays the first three taps are low
      start = 1'b0;
      #(3 * GD + GD / 2);
      check(taps == {{(LENGTH-3){1'b1}}, 3'b000}, "falling edge in flight");
      #(LENGTH * GD);
      check(taps == '0, "chain empty again");
    end
    // enable clears the whole chain at once
    start = 1'b1;
    #(LENGTH * GD + 100);
    enable = 1'b0;
    #(GD + 10);
    check(taps == '0, "enable low clears all taps");
    enable = 1'b1;
    #(LENGTH * GD + 100);
    check(taps == '1, "chain refills after enable");
    t0 = $time;
    start100 = 1'b1;
    #30_000;
    check(end100 - t0 == 25_000, $sformatf("100-gate chain delay %0t", end100 - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

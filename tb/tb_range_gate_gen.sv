`timescale 1ps/1ps
// tb_range_gate_gen: arms the range gate generator with random epochs and
// widths and measures the gate edges. The gate must rise exactly at
// T(coarse) + fine*500 ps and fall at T(coarse + width), where T(n) is the
// clock edge after which the counter holds n. Also checks the armed/firing
// flags, that an arm while busy is ignored, that a width of 0 acts as 1, that
// a fine value out of range gives no gate, and that every tap is used.
module tb_range_gate_gen;
  localparam int NTAPS = 10;
  localparam int PER   = 5000;
  localparam int CW    = 16;
  localparam int WW    = 8;
  localparam int SW    = $clog2(NTAPS);

  logic clk = 1'b0, rst_n = 1'b0, arm = 1'b0;
  logic [CW-1:0] count = '0, rg_coarse = '0;
  logic [SW-1:0] rg_fine = '0;
  logic [WW-1:0] rg_width = '0;
  logic armed, firing, gate;
  int checks = 0, failures = 0, gates = 0;
  time t_rise, t_fall;
  bit tap_used [NTAPS];

  range_gate_gen #(.NTAPS(NTAPS), .CW(CW), .WW(WW)) dut (.*);

  always #(PER/2) clk = ~clk;
  always @(posedge clk) count <= count + 1'b1;
  always @(posedge gate) begin t_rise = $time; gates++; end
  always @(negedge gate) t_fall = $time;
  function automatic time t_edge(input longint n);
    return time'(2500 + longint'(PER) * (n - 1));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic do_arm(input int c, input int f, input int w);
    @(negedge clk);
    rg_coarse = CW'(c); rg_fine = SW'(f); rg_width = WW'(w); arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    rg_coarse = '0; rg_fine = '0; rg_width = '0;   // copied at arm
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, f, w, g0;
    #12_000 rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!armed && !firing && !gate, "idle after reset");
    for (int s = 0; s < 200; s++) begin
      c = int'(count) + 4 + $urandom_range(20);
      f = (s < NTAPS) ? s : $urandom_range(NTAPS - 1);
      w = $urandom_range(5);
      g0 = gates;
      do_arm(c, f, w);
      check(armed, "armed after arm");
      if (s % 7 == 0) do_arm(c + 100, 0, 50);          // must be ignored
      wait (firing);
      @(negedge clk);
      wait (!firing);
      #10;
      if (w == 0) w = 1;
      check(gates == g0 + 1, "one gate per arm");
      check(t_rise == t_edge(c) + time'(f * 500), $sformatf("rise %0t exp %0t", t_rise, t_edge(c) + time'(f * 500)));
      check(t_fall == t_edge(c + w), $sformatf("fall %0t exp %0t", t_fall, t_edge(c + w)));
      check(!armed && !gate, "idle after gate");
      tap_used[f] = 1'b1;
    end
    // a fine value past the last tap selects no flip-flop
    g0 = gates;
    do_arm(int'(count) + 5, NTAPS + 2, 2);
    wait (firing);
    wait (!firing);
    #10;
    check(gates == g0, "no gate for fine out of range");
    for (int k = 0; k < NTAPS; k++) check(tap_used[k], $sformatf("tap %0d used", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

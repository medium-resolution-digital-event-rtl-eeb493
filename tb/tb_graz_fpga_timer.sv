`timescale 1ps/1ps
// tb_graz_fpga_timer: end-to-end test of the timing card at its default
// parameters, with the testbench playing the PC. For each laser shot it
// fires the start pulse at a random time, polls the status register until all
// event timer units hold a result, reads and checks every unit's epoch against
// the true event time, averages them, adds a simulated time of flight, loads
// the predicted return epoch (minus a small lead) into the range gate
// generator and arms it. The gate must rise exactly on the programmed 500 ps
// step and within 1 ns of the wanted time. While a gate is armed the next
// laser shot is fired, as happens with several pulses in flight. At the end
// the event timers are disabled and must ignore a pulse. Each of these
// mechanisms is counted and must occur.
module tb_graz_fpga_timer;
  import timer_pkg::*;
  localparam int PER    = 5000;
  localparam int NUNITS = ET_UNITS;
  localparam int NCH    = ET_NCHAINS;
  localparam int LEAD   = 3000;       // gate opens 3 ns before the photons
  localparam int NSHOTS = 60;

  logic clk = 1'b0, rst_n = 1'b0, event_in = 1'b0;
  logic [7:0] addr = '0;
  logic wr = 1'b0, rd = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic range_gate;

  graz_fpga_timer dut (.*);

  int checks = 0, failures = 0;
  int n_timed = 0, n_avg = 0, n_gates = 0, n_inflight = 0, n_cleared = 0, n_disabled = 0;
  time t_rise;
  int gate_count = 0;

  always #(PER/2) clk = ~clk;
  always @(posedge range_gate) begin t_rise = $time; gate_count++; end

  // Reset is released at 12000 ps; the counter then reaches n at the edge
  // at T(n) = 7500 + 5000*n.
  function automatic longint t_edge(input longint n);
    return 7500 + longint'(PER) * n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic bus_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); addr = a; wdata = d; wr = 1'b1;
    @(negedge clk); wr = 1'b0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); addr = a; rd = 1'b1;
    @(negedge clk); rd = 1'b0; d = rdata;
  endtask

  // Fire a laser start pulse at a random time off the 250 ps grid.
  task automatic fire(output longint t);
    int r;
    @(negedge clk);
    do r = $urandom_range(4999); while (r % 250 == 0);
    #(r);
    t = $time;
    event_in = 1'b1;
    #8000 event_in = 1'b0;
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_ev, t_next, n, ef, tof, want, c, tau;
    logic [31:0] d, ec, efn;
    real avg;
    int f, polls;
    bit have_next;
    #12_000 rst_n = 1'b1;
    repeat (3) @(negedge clk);
    gate_count = 0;                   // ignore anything before reset
    have_next = 1'b0;
    for (int s = 0; s < NSHOTS; s++) begin
      if (have_next) t_ev = t_next;
      else fire(t_ev);
      // poll until every unit holds the epoch
      polls = 0;
      do begin bus_read(REG_STATUS, d); polls++; end
      while (d[NUNITS-1:0] != '1 && polls < 20);
      check(d[NUNITS-1:0] == '1, "all units valid");
      // reference stop edge and fine code
      n = (t_ev - 7500) / longint'(PER) + 1;
      if (t_edge(n) <= t_ev) n++;
      if (t_edge(n - 1) > t_ev) n--;
      ef = 0;
      for (int k = 0; k < NCH; k++) if (t_ev + longint'((k + 1) * 250) < t_edge(n)) ef++;
      avg = 0.0;
      for (int i = 0; i < NUNITS; i++) begin
        bus_read(8'(8'h20 + 8 * i), ec);
        bus_read(8'(8'h24 + 8 * i), efn);
        check(ec == 32'(n) && efn == 32'(ef),
              $sformatf("unit %0d epoch %0d/%0d exp %0d/%0d", i, ec, efn, n, ef));
        avg += (real'(ec) * PER - (real'(efn) + 0.5) * 250.0) / NUNITS;
        n_timed++;
      end
      n_avg++;
      bus_write(REG_STATUS, 32'((1 << NUNITS) - 1));
      bus_read(REG_STATUS, d);
      check(d[NUNITS-1:0] == '0, "valid cleared");
      n_cleared++;
      // predicted return and range gate epoch (card time = ps since T(0))
      // (long enough that the gate is still ahead after programming)
      tof  = (longint'($time) - t_ev) + 150_000 + longint'($urandom_range(400_000));
      tau  = longint'(avg) + tof - longint'(LEAD);
      c    = tau / PER;
      f    = int'((tau - c * PER) / 500);
      want = t_ev + tof - longint'(LEAD);
      bus_write(REG_RG_COARSE, 32'(c));
      bus_write(REG_RG_FINE, 32'(f));
      bus_write(REG_RG_WIDTH, 32'd4);
      bus_write(REG_CTRL, 32'h3);
      bus_read(REG_STATUS, d);
      check(d[8], "range gate armed");
      // next laser shot while this pulse is still in flight
      have_next = (s % 2 == 0) && (s + 1 < NSHOTS);
      if (have_next) begin
        fire(t_next);
        bus_read(REG_STATUS, d);
        check(d[8], "still armed after next shot");
        n_inflight++;
      end
      wait (gate_count == s + 1);
      check(t_rise == time'(t_edge(c) + f * 500), $sformatf("gate rise %0t exp %0t", t_rise, t_edge(c) + f * 500));
      check(t_rise > want - 1000 && t_rise < want + 1000,
            $sformatf("gate %0t within 1 ns of %0t", t_rise, want));
      n_gates++;
      wait (!range_gate);
    end
    // disabled event timers ignore a pulse
    bus_write(REG_CTRL, 32'h0);
    fire(t_ev);
    repeat (4) @(negedge clk);
    bus_read(REG_STATUS, d);
    check(d[NUNITS-1:0] == '0, "disabled timers ignore the event");
    n_disabled++;
    $display("timed %0d unit epochs, %0d averages, %0d gates, %0d shots in flight, %0d clears, %0d disabled",
             n_timed, n_avg, n_gates, n_inflight, n_cleared, n_disabled);
    check(n_timed > 0, "event timing happened");
    check(n_avg > 0, "averaging happened");
    check(n_gates > 0, "range gate happened");
    check(n_inflight > 0, "shot in flight happened");
    check(n_cleared > 0, "clear happened");
    check(n_disabled > 0, "disable happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

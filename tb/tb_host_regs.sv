`timescale 1ps/1ps
// tb_host_regs: drives the host bus of the register block. Writes must reach
// the range gate and event timer control outputs, CTRL bit 1 and STATUS
// writes must give one-cycle arm and clear pulses, and reads must return the
// event timer results, status flags and counter presented at the inputs.
module tb_host_regs;
  import timer_pkg::*;
  localparam int NUNITS = 4;
  localparam int CW = 32, FW = 5, SW = 4, WW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] addr = '0;
  logic wr = 1'b0, rd = 1'b0;
  logic [31:0] wdata = '0, rdata;
  logic et_enable;
  logic [NUNITS-1:0] et_clear, et_valid = '0;
  logic [NUNITS-1:0][CW-1:0] et_coarse = '0;
  logic [NUNITS-1:0][FW-1:0] et_fine = '0;
  logic rg_arm, rg_armed = 1'b0, rg_firing = 1'b0;
  logic [CW-1:0] rg_coarse;
  logic [SW-1:0] rg_fine;
  logic [WW-1:0] rg_width;
  logic [CW-1:0] count = '0;
  int checks = 0, failures = 0, arm_pulses = 0;
  logic [NUNITS-1:0] clear_seen = '0;

  host_regs #(.NUNITS(NUNITS), .CW(CW), .FW(FW), .SW(SW), .WW(WW)) dut (.*);

  always #2500 clk = ~clk;
  always @(posedge clk) begin
    if (rg_arm) arm_pulses++;
    clear_seen |= et_clear;
  end

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

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, v;
    #12_000 rst_n = 1'b1;
    check(et_enable && rg_width == 16'd1 && !rg_arm, "reset values");
    for (int it = 0; it < 50; it++) begin
      v = $urandom;
      bus_write(REG_RG_COARSE, v);
      check(rg_coarse == v, "rg_coarse written");
      bus_read(REG_RG_COARSE, d);
      check(d == v, "rg_coarse read back");
      bus_write(REG_RG_FINE, v);
      check(rg_fine == v[3:0], "rg_fine written");
      bus_write(REG_RG_WIDTH, v);
      check(rg_width == v[15:0], "rg_width written");
      bus_read(REG_RG_WIDTH, d);
      check(d == {16'd0, v[15:0]}, "rg_width read back");
      // event timer results
      for (int i = 0; i < NUNITS; i++) begin
        et_coarse[i] = $urandom;
        et_fine[i] = FW'($urandom_range(19));
      end
      et_valid = 4'($urandom);
      rg_armed = 1'($urandom);
      rg_firing = 1'($urandom);
      count = $urandom;
      for (int i = 0; i < NUNITS; i++) begin
        bus_read(8'(8'h20 + 8 * i), d);
        check(d == et_coarse[i], $sformatf("unit %0d coarse read", i));
        bus_read(8'(8'h24 + 8 * i), d);
        check(d == 32'(et_fine[i]), $sformatf("unit %0d fine read", i));
      end
      bus_read(REG_STATUS, d);
      check(d == {22'd0, rg_firing, rg_armed, 4'd0, et_valid}, "status read");
      bus_read(REG_COUNTER, d);
      check(d == count, "counter read");
      // clear pulses
      clear_seen = '0;
      v = 32'($urandom_range(15));
      bus_write(REG_STATUS, v);
      @(negedge clk);
      check(clear_seen == v[3:0] && et_clear == '0, "clear pulse per unit");
    end
    // arm pulse, event timer disable
    arm_pulses = 0;
    bus_write(REG_CTRL, 32'h3);
    @(negedge clk);
    check(arm_pulses == 1 && !rg_arm, "one arm pulse");
    bus_write(REG_CTRL, 32'h0);
    check(!et_enable && arm_pulses == 1, "timers disabled, no arm");
    bus_read(REG_CTRL, d);
    check(d == 32'h0, "ctrl read");
    bus_read(8'h7C, d);
    check(d == 32'h0, "unused address reads 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

`timescale 1ps/1ps
// graz_fpga_timer: timing logic of the satellite laser ranging FPGA card.
//
// A kHz laser ranging station has many laser pulses in flight at once, so it
// time-stamps every laser firing and every return independently instead of
// measuring intervals. This card does two fast jobs for it. On each laser
// start pulse, NUNITS parallel vernier event timers give the firing epoch to
// 250 ps within 10 ns; the PC reads them, averages them, predicts when the
// photons will return and loads that epoch into the range gate generator,
// which opens the detector gate with 500 ps steps. All epochs are counts of
// one free-running 200 MHz coarse counter plus a vernier fraction.
//
// Structure: coarse_counter -> et_multi (NUNITS x et_unit) and
// range_gate_gen; host_regs connects both to the PC bus. The split into these
// parts follows the design description; the bus and register map are this
// design's own (see host_regs).
//
// Ports: clk (200 MHz), rst_n (asynchronous, active low), event_in (laser
// start pulse, at least 5 ns high), the host register bus, and range_gate to
// the single photon detector.
module graz_fpga_timer #(
  parameter int unsigned NUNITS        = timer_pkg::ET_UNITS,
  parameter int unsigned NCHAINS       = timer_pkg::ET_NCHAINS,
  parameter int unsigned RG_NTAPS      = timer_pkg::RG_NTAPS,
  parameter int unsigned GATE_DELAY_PS = timer_pkg::GATE_DELAY_PS,
  parameter int unsigned UNIT_SKEW_PS  = 0,
  parameter int unsigned CW            = timer_pkg::COARSE_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        event_in,
  input  logic [7:0]  addr,
  input  logic        wr,
  input  logic [31:0] wdata,
  input  logic        rd,
  output logic [31:0] rdata,
  output logic        range_gate
);
  localparam int unsigned FW = $clog2(NCHAINS + 1);
  localparam int unsigned SW = $clog2(RG_NTAPS);
  localparam int unsigned WW = timer_pkg::RG_WW;

  logic [CW-1:0]             count;
  logic                      et_enable;
  logic [NUNITS-1:0]         et_clear, et_valid;
  logic [NUNITS-1:0][CW-1:0] et_coarse;
  logic [NUNITS-1:0][FW-1:0] et_fine;
  logic                      rg_arm, rg_armed, rg_firing;
  logic [CW-1:0]             rg_coarse;
  logic [SW-1:0]             rg_fine;
  logic [WW-1:0]             rg_width;

  coarse_counter #(.W(CW)) u_count (
    .clk  (clk),
    .rst_n(rst_n),
    .count(count)
  );

  et_multi #(
    .NUNITS       (NUNITS),
    .NCHAINS      (NCHAINS),
    .GATE_DELAY_PS(GATE_DELAY_PS),
    .UNIT_SKEW_PS (UNIT_SKEW_PS),
    .CW           (CW)
  ) u_et (
    .clk     (clk),
    .rst_n   (rst_n),
    .enable  (et_enable),
    .event_in(event_in),
    .count   (count),
    .clear   (et_clear),
    .valid   (et_valid),
    .coarse  (et_coarse),
    .fine    (et_fine)
  );

  range_gate_gen #(
    .NTAPS        (RG_NTAPS),
    .GATES_PER_TAP(timer_pkg::RG_TAP_PS / GATE_DELAY_PS),
    .GATE_DELAY_PS(GATE_DELAY_PS),
    .CW           (CW),
    .WW           (WW)
  ) u_rg (
    .clk      (clk),
    .rst_n    (rst_n),
    .count    (count),
    .arm      (rg_arm),
    .rg_coarse(rg_coarse),
    .rg_fine  (rg_fine),
    .rg_width (rg_width),
    .armed    (rg_armed),
    .firing   (rg_firing),
    .gate     (range_gate)
  );

  host_regs #(
    .NUNITS(NUNITS),
    .CW    (CW),
    .FW    (FW),
    .SW    (SW),
    .WW    (WW)
  ) u_regs (
    .clk      (clk),
    .rst_n    (rst_n),
    .addr     (addr),
    .wr       (wr),
    .wdata    (wdata),
    .rd       (rd),
    .rdata    (rdata),
    .et_enable(et_enable),
    .et_clear (et_clear),
    .et_valid (et_valid),
    .et_coarse(et_coarse),
    .et_fine  (et_fine),
    .rg_arm   (rg_arm),
    .rg_coarse(rg_coarse),
    .rg_fine  (rg_fine),
    .rg_width (rg_width),
    .rg_armed (rg_armed),
    .rg_firing(rg_firing),
    .count    (count)
  );

endmodule

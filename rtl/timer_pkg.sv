`timescale 1ps/1ps
// timer_pkg: constants and register map shared by the event timer, the range
// gate generator and the host register block of the FPGA timing card.
//
// Timing base: a 200 MHz clock (5 ns period) drives a free-running coarse
// counter. The event timer interpolates each 5 ns interval with AND-gate delay
// chains of 250 ps per gate; the range gate generator places its edge with
// 500 ps steps. These numbers follow the design description. The coarse
// counter width, the bus width and the register map are this design's own
// choices.
package timer_pkg;

  // Clock period and gate transit time in picoseconds (timescale 1ps/1ps).
  localparam int unsigned CLK_PERIOD_PS = 5000;   // 200 MHz coarse clock
  localparam int unsigned GATE_DELAY_PS = 250;    // transit time of one AND gate

  // Event timer: one chain per 250 ps step of the 5 ns interval.
  localparam int unsigned ET_NCHAINS    = CLK_PERIOD_PS / GATE_DELAY_PS; // 20
  localparam int unsigned ET_UNITS      = 4;      // parallel timer units

  // Range gate generator: 500 ps taps over one 5 ns interval.
  localparam int unsigned RG_TAP_PS        = 500;
  localparam int unsigned RG_NTAPS         = CLK_PERIOD_PS / RG_TAP_PS; // 10
  localparam int unsigned RG_GATES_PER_TAP = RG_TAP_PS / GATE_DELAY_PS; // 2

  // Widths chosen for this design.
  localparam int unsigned COARSE_W = 32;  // 5 ns counts, wraps after 21.47 s
  localparam int unsigned RG_WW    = 16;  // range gate width in 5 ns cycles
  localparam int unsigned BUS_AW   = 8;   // host byte address
  localparam int unsigned BUS_DW   = 32;  // host data

  // Host register map (byte addresses).
  typedef enum logic [BUS_AW-1:0] {
    REG_CTRL      = 8'h00,  // [0] event timers enabled, [1] write 1: arm range gate
    REG_STATUS    = 8'h04,  // [ET_UNITS-1:0] event valid (write 1 to clear),
                            // [8] range gate armed, [9] range gate firing
    REG_RG_COARSE = 8'h08,  // range gate epoch, 5 ns part
    REG_RG_FINE   = 8'h0C,  // range gate epoch, 500 ps tap 0..RG_NTAPS-1
    REG_RG_WIDTH  = 8'h10,  // range gate length in 5 ns cycles
    REG_COUNTER   = 8'h14,  // live coarse counter
    REG_ET_BASE   = 8'h20   // unit i: coarse at BASE+8i, fine code at BASE+8i+4
  } reg_addr_e;

endpackage

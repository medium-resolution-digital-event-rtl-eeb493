`timescale 1ps/1ps
// et_multi: several vernier event timer units working in parallel on the same
// event.
//
// Every unit has its own set of delay chains and its own output register, so
// each one gives an independent measurement of the same event; the host reads
// all of them and averages, which lowers the timing jitter below that of one
// unit. Four units, read and averaged by the PC, follow the design
// description. UNIT_SKEW_PS is this design's addition to the model: it adds
// i*UNIT_SKEW_PS of routing delay in front of unit i, as different placements
// do in the FPGA. With the default of 0 all units give the same result in
// simulation; a skew of a quarter gate delay makes the four quantisation grids
// interleave.
//
// Interface and timing per unit are those of et_unit; the outputs are arrays
// indexed by unit.
module et_multi #(
  parameter int unsigned NUNITS        = timer_pkg::ET_UNITS,
  parameter int unsigned NCHAINS       = timer_pkg::ET_NCHAINS,
  parameter int unsigned GATE_DELAY_PS = timer_pkg::GATE_DELAY_PS,
  parameter int unsigned UNIT_SKEW_PS  = 0,
  parameter int unsigned CW            = timer_pkg::COARSE_W,
  localparam int unsigned FW           = $clog2(NCHAINS + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      enable,
  input  logic                      event_in,
  input  logic [CW-1:0]             count,
  input  logic [NUNITS-1:0]         clear,
  output logic [NUNITS-1:0]         valid,
  output logic [NUNITS-1:0][CW-1:0] coarse,
  output logic [NUNITS-1:0][FW-1:0] fine
);

  for (genvar i = 0; i < NUNITS; i++) begin : g_unit
    et_unit #(
      .NCHAINS       (NCHAINS),
      .GATE_DELAY_PS (GATE_DELAY_PS),
      .INPUT_DELAY_PS(i * UNIT_SKEW_PS),
      .CW            (CW)
    ) u_et (
      .clk     (clk),
      .rst_n   (rst_n),
      .enable  (enable),
      .event_in(event_in),
      .count   (count),
      .clear   (clear[i]),
      .valid   (valid[i]),
      .coarse  (coarse[i]),
      .fine    (fine[i])
    );
  end

endmodule

`timescale 1ps/1ps
// and_delay_chain: behavioural model of a chain of cascaded AND gates placed
// in FPGA logic cells, used as the timing element of the vernier event timer
// and of the range gate generator.
//
// Gate i ANDs the output of gate i-1 (gate 0: the start input) with the
// enable input, and each gate has a transit time of GATE_DELAY_PS. A rising
// edge on start therefore reaches tap i after (i+1)*GATE_DELAY_PS; dropping
// enable clears the chain. The 250 ps per gate is the value the design
// description gives for the FPGA's AND gates. The real delay depends on the
// device, its placement and its temperature (about 10 ps per degree C over a
// 100-gate chain), so this is a behavioural model: the delays simulate with
// timing enabled and are ignored by synthesis, where the chain must be kept
// from being optimised away by the vendor tool's keep attributes and a fixed
// placement.
//
// Interface: start (level), enable, taps[LENGTH-1:0] (output of every gate).
module and_delay_chain #(
  parameter int unsigned LENGTH        = 20,
  parameter int unsigned GATE_DELAY_PS = timer_pkg::GATE_DELAY_PS
) (
  input  logic              start,
  input  logic              enable,
  output logic [LENGTH-1:0] taps
);

  assign #(GATE_DELAY_PS) taps[0] = start & enable;

  for (genvar i = 1; i < LENGTH; i++) begin : g_gate
    assign #(GATE_DELAY_PS) taps[i] = taps[i-1] & enable;
  end

endmodule

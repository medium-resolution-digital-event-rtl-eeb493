`timescale 1ps/1ps
// range_gate_gen: fully digital range gate generator with 500 ps resolution.
//
// The host loads a gate epoch as a coarse part (a count of 5 ns clock
// periods) and a fine part (a tap number 0..NTAPS-1 of 500 ps each) and arms
// the generator. When the coarse counter reaches the coarse part, a start
// pulse is launched on that clock edge into a chain of AND gates. Tap k of the
// chain is reached k*500 ps after the edge (tap 0 is the start pulse itself,
// every further tap is GATES_PER_TAP gates later). Each tap clocks its own D
// flip-flop as the start pulse passes; the selection logic, a one-hot decode
// of the fine part, puts a 1 on the D input of exactly one of them, so only
// that one switches, and its output is the range gate. The coarse counter, the
// AND chain, one flip-flop per tap and the one-of-N selection follow the
// design description. The gate length, the arming handshake and the clearing
// of the flip-flops are this design's choices.
//
// Timing, with T(n) the time of the clock edge after which the coarse
// counter holds n:
//   gate rises at T(rg_coarse) + rg_fine*500 ps
//   gate falls at T(rg_coarse + max(rg_width,1))
// arm is a one-cycle pulse; it copies rg_coarse, rg_fine and rg_width, so the
// host may load the next epoch at once. The tap flip-flops are cleared
// asynchronously on the first clock edge after reset and at the end of every
// gate, and the output is gated by the start pulse. The generator is one-shot: after the
// gate it returns to idle and waits for the next arm. An arm while armed or
// firing is ignored. If rg_coarse is already past, the gate comes only after
// the counter wraps. rg_fine values of NTAPS or more select no tap (no gate).
module range_gate_gen #(
  parameter int unsigned NTAPS         = timer_pkg::RG_NTAPS,
  parameter int unsigned GATES_PER_TAP = timer_pkg::RG_GATES_PER_TAP,
  parameter int unsigned GATE_DELAY_PS = timer_pkg::GATE_DELAY_PS,
  parameter int unsigned CW            = timer_pkg::COARSE_W,
  parameter int unsigned WW            = timer_pkg::RG_WW,
  localparam int unsigned SW           = $clog2(NTAPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] count,      // coarse counter
  input  logic          arm,
  input  logic [CW-1:0] rg_coarse,
  input  logic [SW-1:0] rg_fine,
  input  logic [WW-1:0] rg_width,
  output logic          armed,
  output logic          firing,
  output logic          gate        // to the detector
);

  typedef enum logic [1:0] {S_IDLE, S_ARMED, S_FIRING} state_e;
  state_e state;

  logic [CW-1:0]    c_coarse;
  logic [WW-1:0]    c_width, wcnt;
  logic [NTAPS-1:0] sel;            // one-hot selection of the active flip-flop
  logic             start;          // start pulse into the chain
  logic             clr;            // clears the tap flip-flops
  logic [NTAPS-1:0] tap;
  logic [NTAPS-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      c_coarse <= '0;
      c_width  <= '0;
      wcnt     <= '0;
      sel      <= '0;
      start    <= 1'b0;
      clr      <= 1'b0;     // rises on the first edge after reset
    end else begin
      unique case (state)
        S_IDLE: if (!arm) begin
          clr      <= 1'b1;     // keep the tap flip-flops cleared
        end else begin
          state    <= S_ARMED;
          c_coarse <= rg_coarse;
          c_width  <= (rg_width == '0) ? WW'(1) : rg_width;
          for (int k = 0; k < NTAPS; k++) sel[k] <= (SW'(k) == rg_fine);
          clr      <= 1'b0;     // release the flip-flops a cycle before the start
        end
        S_ARMED: if (count + 1'b1 == c_coarse) begin
          state <= S_FIRING;
          start <= 1'b1;        // rises on edge T(c_coarse)
          wcnt  <= WW'(1);
        end
        S_FIRING: begin
          if (wcnt == c_width) begin
            state <= S_IDLE;
            start <= 1'b0;
            clr   <= 1'b1;      // gate falls on edge T(c_coarse + c_width)
          end
          wcnt <= wcnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Delay chain: tap 0 is the start pulse, tap k is k*GATES_PER_TAP gates on.
  if (NTAPS > 1) begin : g_chain
    logic [(NTAPS-1)*GATES_PER_TAP-1:0] gates;
    and_delay_chain #(
      .LENGTH       ((NTAPS - 1) * GATES_PER_TAP),
      .GATE_DELAY_PS(GATE_DELAY_PS)
    ) u_chain (
      .start (start),
      .enable(1'b1),
      .taps  (gates)
    );
    for (genvar k = 1; k < NTAPS; k++) begin : g_tap
      assign tap[k] = gates[k*GATES_PER_TAP-1];
    end
  end
  assign tap[0] = start;

  // One D flip-flop per tap, clocked by the passing start pulse.
  for (genvar k = 0; k < NTAPS; k++) begin : g_ff
    logic qk;
    always_ff @(posedge tap[k] or posedge clr) begin
      if (clr) qk <= 1'b0;
      else     qk <= sel[k];
    end
    assign q[k] = qk;
  end

  // The start pulse also enables the output, so flip-flops that power up set
  // cannot open a gate before the first clear.
  assign gate   = start & (|q);
  assign armed  = (state == S_ARMED);
  assign firing = (state == S_FIRING);

  // Only one tap flip-flop may ever be active.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(q));

endmodule

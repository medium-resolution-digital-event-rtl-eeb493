`timescale 1ps/1ps
// et_unit: one fast vernier event timer unit.
//
// The event pulse (for example the laser start pulse) enters NCHAINS parallel
// AND-gate chains; chain k has k+1 gates, so its end rises (k+1) gate delays
// after the event. The next rising edge of the 200 MHz clock acts as the stop
// pulse: it latches the ends of all chains into an output register. A chain
// that the event has already run through gives a 1, the others a 0, so the
// register holds a thermometer code of the time between the event and that
// clock edge, in steps of one gate delay (250 ps). The same edge is the one
// that first samples the event itself; one cycle later the unit stores the
// coarse count of that edge and the number of ones in the thermometer code.
// This scheme follows the design description; the number of chains (one per
// 250 ps step of the 5 ns period), counting the ones instead of finding the
// first zero (tolerant of bubbles), and the edge detection are this design's
// choices.
//
// Result: the event happened in the interval
//   [T(E) - (fine+1)*250 ps, T(E) - fine*250 ps)
// where E = coarse is the number of the stop edge (the coarse counter value
// right after it) and T(E) its time, so the event time in 250 ps units is
// E*NCHAINS - fine - 1 (lower end). With 250 ps gates fine is at most
// NCHAINS-1.
//
// Timing: valid rises on the second clock edge after the event, so at most
// 10 ns after it (the description asks for 20 ns). The event must stay high
// for at least one clock period and be low again before the next event; a new
// event overwrites an unread result. clear (one cycle) drops valid. The event
// input is sampled directly by the clock; in hardware its flip-flop can go
// metastable, which this model does not show.
module et_unit #(
  parameter int unsigned NCHAINS        = timer_pkg::ET_NCHAINS,
  parameter int unsigned GATE_DELAY_PS  = timer_pkg::GATE_DELAY_PS,
  parameter int unsigned INPUT_DELAY_PS = 0,   // routing from the event pin
  parameter int unsigned CW             = timer_pkg::COARSE_W,
  localparam int unsigned FW            = $clog2(NCHAINS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,      // 0 clears the chains and ignores events
  input  logic          event_in,    // asynchronous event pulse
  input  logic [CW-1:0] count,       // coarse counter
  input  logic          clear,       // drop valid
  output logic          valid,
  output logic [CW-1:0] coarse,      // number of the stop edge
  output logic [FW-1:0] fine         // chains the event ran through
);

  logic               ev_d;
  logic [NCHAINS-1:0] ends;          // end of every chain
  logic [NCHAINS-1:0] vernier_q;     // output register, latched by the stop edge
  logic               ev_q, ev_qq;

  if (INPUT_DELAY_PS > 0) begin : g_route
    assign #(INPUT_DELAY_PS) ev_d = event_in;
  end else begin : g_direct
    assign ev_d = event_in;
  end

  for (genvar k = 0; k < NCHAINS; k++) begin : g_chain
    logic [k:0] taps;
    and_delay_chain #(.LENGTH(k + 1), .GATE_DELAY_PS(GATE_DELAY_PS)) u_chain (
      .start (ev_d),
      .enable(enable),
      .taps  (taps)
    );
    assign ends[k] = taps[k];
  end

  // Number of ones in the thermometer code.
  function automatic logic [FW-1:0] ones(input logic [NCHAINS-1:0] v);
    logic [FW-1:0] n;
    n = '0;
    for (int i = 0; i < NCHAINS; i++) n += FW'(v[i]);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_q      <= 1'b0;
      ev_qq     <= 1'b0;
      vernier_q <= '0;
      valid     <= 1'b0;
      coarse    <= '0;
      fine      <= '0;
    end else begin
      ev_q      <= ev_d & enable;
      ev_qq     <= ev_q;
      vernier_q <= ends;
      if (ev_q && !ev_qq) begin
        // The previous edge was the stop edge; count still holds its number.
        valid  <= 1'b1;
        coarse <= count;
        fine   <= ones(vernier_q);
      end else if (clear) begin
        valid <= 1'b0;
      end
    end
  end

endmodule

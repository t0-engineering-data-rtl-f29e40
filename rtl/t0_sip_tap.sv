// t0_sip_tap: TAP controller of the T0 system interface port (SIP).
//
// A sixteen-state controller with the states and tms-driven transitions of the
// JTAG standard TAP (data loop Select-DR..Update-DR, instruction loop
// Select-IR..Update-IR, Test-Logic-Reset and Run-Test-Idle).  Unlike JTAG it is
// clocked by the chip's own clock rather than by a test clock, and it has no
// reset input: the system reset does not touch SIP.  The only way to reset the
// port is to hold tms high; the controller then reaches Test-Logic-Reset after
// at most five cycles and the instruction register (in t0_sip) is loaded with
// BYPASS synchronously on the following cycle, six cycles in all.
//
// Interface:  clk    in   internal clock (the edge seen off chip on clkout)
//             tms    in   mode select, sampled on every rising clock edge
//             state  out  current controller state (t0_pkg::tap_state_e)
// Timing: state advances on every rising clock edge.
module t0_sip_tap
  import t0_pkg::*;
(
  input  logic       clk,
  input  logic       tms,
  output tap_state_e state
);
  tap_state_e state_q, state_d;

  always_comb begin
    unique case (state_q)
      TAP_RESET:      state_d = tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       state_d = tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_DR:  state_d = tms ? TAP_SELECT_IR : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: state_d = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   state_d = tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   state_d = tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   state_d = tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   state_d = tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  state_d = tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_IR:  state_d = tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: state_d = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   state_d = tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   state_d = tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   state_d = tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   state_d = tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  state_d = tms ? TAP_SELECT_DR : TAP_IDLE;
      default:        state_d = TAP_RESET;
    endcase
  end

  always_ff @(posedge clk) state_q <= state_d;

  assign state = state_q;
endmodule

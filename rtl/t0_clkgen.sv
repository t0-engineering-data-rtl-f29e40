// t0_clkgen: on-chip clock generation of T0.
//
// T0 is fed a clock at twice its operating frequency, clk2xin.  A toggle
// flip-flop divides it by two, which guarantees a 50% duty cycle for the
// internal clock phi whatever the duty cycle of the input.  phi is inverted and
// driven off chip as clkout, so that external logic can synchronise to the
// internal clock.  Both the divide-by-two and the inversion follow the
// description of T0's clocking.  The toggle flip-flop has no reset, as the
// phase of phi relative to clk2xin does not matter; external logic follows
// clkout.
//
// Interface:  clk2xin  in   double-frequency input clock
//             phi      out  internal clock, clk2xin / 2
//             clkout   out  ~phi
// Timing: phi changes on every rising edge of clk2xin.
module t0_clkgen (
  input  logic clk2xin,
  output logic phi,
  output logic clkout
);
  logic phi_q;

  always_ff @(posedge clk2xin) phi_q <= ~phi_q;

  assign phi    = phi_q;
  assign clkout = ~phi_q;
endmodule

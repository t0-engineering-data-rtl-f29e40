// t0_hpm: hardware performance monitor port of T0.
//
// Drives eight output pads from internal pipeline events so that external
// hardware can count them without disturbing the program:
//   hpm[0] exception    instruction entering M takes an exception (or reset)
//   hpm[1] cpumemstall  instruction entering M was held by the memory pipeline
//   hpm[2] interlock    instruction entering X was interlocked in D
//   hpm[3] miss         instruction entering D was invalid because of an I-miss
//   hpm[4] vp0busy      VP0 did useful work
//   hpm[5] vp1busy      VP1 did useful work
//   hpm[6] vmpbusy      the memory unit did useful work
//   hpm[7] vumemstall   the vector unit lost the cycle to a memory stall
// Every bit is registered on the way to its pad, so the pads show the events
// of the previous cycle.  The three vector busy bits are forced low in a cycle
// with a vector memory stall, since a stalled unit does no useful work; hence
// hpm[6:4] are zero whenever hpm[7] is set.  The scalar bits come from the CPU
// pipeline and are passed through unchanged.  A single output register stage
// for all bits, rather than T0's per-signal pipe-phase alignment, is this
// implementation's choice.
module t0_hpm (
  input  logic       clk,
  input  logic       exception,
  input  logic       cpumemstall,
  input  logic       interlock,
  input  logic       miss,
  input  logic       vp0busy,
  input  logic       vp1busy,
  input  logic       vmpbusy,
  input  logic       vumemstall,
  output logic [7:0] hpm
);
  always_ff @(posedge clk) begin
    hpm[0] <= exception;
    hpm[1] <= cpumemstall;
    hpm[2] <= interlock;
    hpm[3] <= miss;
    hpm[4] <= vp0busy && !vumemstall;
    hpm[5] <= vp1busy && !vumemstall;
    hpm[6] <= vmpbusy && !vumemstall;
    hpm[7] <= vumemstall;
  end
endmodule

// t0_vdispatch: dispatch of vector arithmetic instructions to VP0 / VP1.
//
// Applies T0's structural and chaining rules for the two arithmetic units:
//  * a multiply (FXMUL) can only go to VP0, which has the multiplier;
//  * any other operation goes to VP1 if both units are free, otherwise to
//    whichever is free;
//  * a unit is occupied for ceil(vlr/8) cycles (its busy output);
//  * a vector length above 32 raises a vector unit exception (vue) instead of
//    issuing; a length of zero issues and performs no operations;
//  * a VALU instruction that reads a vector register written by a VALU
//    instruction issued one or two cycles earlier is held (two delay cycles),
//    after which it chains behind the writer row by row.
// When the instruction cannot issue, interlock is raised and the decode stage
// holds it; stall (a memory-pipeline stall of the whole vector unit) also
// freezes the chaining history.  The request is combinational: go_vp0 / go_vp1
// are valid in the same cycle.  Keeping the last two destinations in a short
// history instead of a full per-element scoreboard is this implementation's
// choice; it gives the same two-cycle rule because both units read and write
// at eight elements per cycle.
module t0_vdispatch
  import t0_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       stall,
  input  logic       req_valid,
  input  logic       req_mul,       // needs the multiplier
  input  logic [3:0] req_vs,
  input  logic [3:0] req_vt,
  input  logic [3:0] req_vd,
  input  logic       req_rd_vs,     // vs is a vector operand
  input  logic       req_rd_vt,     // vt is a vector operand
  input  logic       req_rd_vd,     // old vd is read (conditional move)
  input  logic       req_wr_vd,     // vd is written (not a compare)
  input  logic [7:0] vlr,
  input  logic [1:0] vp_busy,       // {VP1, VP0}
  output logic       go_vp0,
  output logic       go_vp1,
  output logic       interlock,
  output logic       vue
);
  logic [1:0] hv;            // history valid: [0] one cycle ago, [1] two
  logic [3:0] hreg [2];
  logic       raw;

  function automatic logic hit(input logic [3:0] r, input logic used,
                               input logic [1:0] v, input logic [3:0] h0,
                               input logic [3:0] h1);
    return used && r != 4'd0 && ((v[0] && h0 == r) || (v[1] && h1 == r));
  endfunction

  assign raw = hit(req_vs, req_rd_vs, hv, hreg[0], hreg[1]) ||
               hit(req_vt, req_rd_vt, hv, hreg[0], hreg[1]) ||
               hit(req_vd, req_rd_vd, hv, hreg[0], hreg[1]);

  assign vue = req_valid && vlr > 8'd32;

  always_comb begin
    go_vp0 = 1'b0;
    go_vp1 = 1'b0;
    if (req_valid && !vue && !raw && !stall) begin
      if (req_mul)          go_vp0 = !vp_busy[0];
      else if (!vp_busy[1]) go_vp1 = 1'b1;
      else if (!vp_busy[0]) go_vp0 = 1'b1;
    end
  end
  assign interlock = req_valid && !vue && !(go_vp0 || go_vp1);

  always_ff @(posedge clk) begin
    if (rst) begin
      hv <= 2'b00;
    end else if (!stall) begin
      hv[1]   <= hv[0];
      hreg[1] <= hreg[0];
      hv[0]   <= (go_vp0 || go_vp1) && req_wr_vd && vlr != 8'd0;
      hreg[0] <= req_vd;
    end
  end
endmodule

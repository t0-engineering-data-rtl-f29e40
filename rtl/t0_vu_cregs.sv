// t0_vu_cregs: vector unit control registers (coprocessor 2 control space).
//
// Implements the registers read by CFC2 and written by CTC2:
//   vcr0  vrev    read-only: implementation 0 (T0) in [15:8], revision in [7:0]
//   vcr1  vcount  read-only shadow of the CP0 count register
//   vcr2  vlr     8-bit vector length; a value above 32 is a length error
//   vcr4  vcond   one compare result bit per element
//   vcr8  vovf    sticky signed-overflow bit per element
//   vcr12 vsat    sticky saturation bit per element
// Accessing any other number raises cfc2_illegal / ctc2_illegal, which the CPU
// turns into a reserved-instruction exception.
//
// The two vector arithmetic units write flags eight elements per cycle
// (vflag_wr_t): compare results replace the vcond bits of the elements inside
// the vector length, overflow and saturation bits are OR-ed into vovf and vsat.
// A CTC2 write takes effect at the next edge; if a unit writes the same flag
// register in the same cycle, the unit's bits are applied on top of the CTC2
// value.  CFC2 reads are combinational.  vlr is cleared by reset; the flags are
// not reset.  VREV_REV, the reset value of vlr and the tie-break order with a
// simultaneous CTC2 are this implementation's choices.
module t0_vu_cregs
  import t0_pkg::*;
#(
  parameter logic [7:0] VREV_REV = 8'h00
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ctc2_we,
  input  logic [4:0]  ctc2_addr,
  input  logic [31:0] ctc2_wdata,
  output logic        ctc2_illegal,
  input  logic [4:0]  cfc2_addr,
  output logic [31:0] cfc2_rdata,
  output logic        cfc2_illegal,
  input  logic [31:0] count,
  input  vflag_wr_t   fw [2],
  output logic [7:0]  vlr,
  output logic        vlr_err,        // vlr > 32
  output logic [31:0] vcond,
  output logic [31:0] vovf,
  output logic [31:0] vsat
);
  logic [7:0]  vlr_q;
  logic [31:0] vcond_q, vovf_q, vsat_q;

  function automatic logic legal(input logic [4:0] n);
    return n == VCR_VREV || n == VCR_VCOUNT || n == VCR_VLR ||
           n == VCR_VCOND || n == VCR_VOVF || n == VCR_VSAT;
  endfunction

  assign ctc2_illegal = ctc2_we && !legal(ctc2_addr);
  assign cfc2_illegal = !legal(cfc2_addr);

  always_ff @(posedge clk) begin
    logic [31:0] c, o, s;
    c = vcond_q;
    o = vovf_q;
    s = vsat_q;
    if (ctc2_we) begin
      unique case (ctc2_addr)
        VCR_VCOND: c = ctc2_wdata;
        VCR_VOVF:  o = ctc2_wdata;
        VCR_VSAT:  s = ctc2_wdata;
        default: ;
      endcase
    end
    for (int u = 0; u < 2; u++) begin
      for (int e = 0; e < 8; e++) begin
        if (fw[u].mask[e]) begin
          if (fw[u].cond_we) c[8*fw[u].row + e] = fw[u].bits[e];
          if (fw[u].ovf_we)  o[8*fw[u].row + e] = o[8*fw[u].row + e] | fw[u].bits[e];
          if (fw[u].sat_we)  s[8*fw[u].row + e] = s[8*fw[u].row + e] | fw[u].bits[e];
        end
      end
    end
    vcond_q <= c;
    vovf_q  <= o;
    vsat_q  <= s;

    if (rst)                                  vlr_q <= 8'd0;
    else if (ctc2_we && ctc2_addr == VCR_VLR) vlr_q <= ctc2_wdata[7:0];
  end

  always_comb begin
    unique case (cfc2_addr)
      VCR_VREV:   cfc2_rdata = {16'b0, 8'h00, VREV_REV};
      VCR_VCOUNT: cfc2_rdata = count;
      VCR_VLR:    cfc2_rdata = {24'b0, vlr_q};
      VCR_VCOND:  cfc2_rdata = vcond_q;
      VCR_VOVF:   cfc2_rdata = vovf_q;
      VCR_VSAT:   cfc2_rdata = vsat_q;
      default:    cfc2_rdata = 32'b0;
    endcase
  end

  assign vlr     = vlr_q;
  assign vlr_err = vlr_q > 8'd32;
  assign vcond   = vcond_q;
  assign vovf    = vovf_q;
  assign vsat    = vsat_q;
endmodule

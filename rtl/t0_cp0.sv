// t0_cp0: system control coprocessor (CP0) of T0.
//
// Holds the CP0 registers read by MFC0 and written by MTC0:
//   0 fromhost   8-bit, written by the host over SIP, read-only here
//   1 tohost     8-bit read/write, cleared by reset, read by the host over SIP
//   2 vuepc      PC of the last vector memory instruction with an address error
//   3 vubadvaddr faulting address of that error
//   8 badvaddr   faulting address of a scalar AdEL/AdES
//   9 count      increments every cycle
//  11 compare    ip7 is set when count equals compare; writing compare clears it
//  12 status     CU[31:28] (bits 29, 31 wired to 0), IM[15:8], KU/IE stack [5:0]
//  13 cause      BD[31], CE[29:28], IP[15:8], ExcCode[6:2]; only ip5 writable
//  14 epc        restart address, read-only
//  15 prid       implementation 0 (T0) in [15:8], revision in [7:0]
// Unused register numbers read as zero.
//
// Interrupts (level sensitive) in decreasing priority: host (ip6, follows the
// SIP int register), vector address error (ip5, sticky), timer (ip7, sticky),
// external 0 (ip4) and external 1 (ip3), which are inverted registered copies
// of the active-low pins extintb[0] and extintb[1].  An interrupt is taken when
// its IP and IM bits and iec are set.  Interrupts take priority over the
// synchronous exceptions, which are prioritised AdEF, CpU, RI, Sys, Bp, Ov, VUE,
// AdEL, AdES.  Both are taken for the instruction entering the M stage
// (m_valid): the KU/IE stack is pushed left two bits with kuc=iec=0, epc gets
// the instruction's PC or, in a branch delay slot, the branch's PC (m_pc - 4),
// cause.bd and ExcCode are written (ExcCode left unchanged for the external
// interrupts, whose code is undefined) and exc_take is raised with the vector
// address in exc_vector.  rfe pops the stack right two bits, leaving KUo/IEo.
//
// Timing: register writes, exception entry and rfe all take effect at the next
// clock edge; MFC0 reads are combinational.  Reset (synchronous, active high)
// clears kuc, iec and tohost only, as T0 specifies; software initialises the
// rest.  The pipeline delays before a status or cause write takes effect belong
// to the CPU pipeline and are not modelled here.  PRID_REV is this
// implementation's choice.
module t0_cp0
  import t0_pkg::*;
#(
  parameter logic [7:0] PRID_REV = 8'h00
) (
  input  logic        clk,
  input  logic        rst,
  // MTC0 / MFC0
  input  logic        mtc0_we,
  input  logic [4:0]  mtc0_addr,
  input  logic [31:0] mtc0_wdata,
  input  logic [4:0]  mfc0_addr,
  output logic [31:0] mfc0_rdata,
  // SIP
  input  logic        fromhost_we,
  input  logic [7:0]  fromhost_wdata,
  output logic [7:0]  tohost,
  input  logic        intfromhost,
  // vector unit address error
  input  logic        vu_adderr,
  input  logic [31:0] vu_adderr_pc,
  input  logic [31:0] vu_adderr_addr,
  // external interrupt pins, active low
  input  logic [1:0]  extintb,
  // instruction entering M
  input  logic        m_valid,
  input  logic [31:0] m_pc,
  input  logic        m_bd,
  input  sync_exc_t   m_exc,
  input  logic [1:0]  m_ce,
  input  logic [31:0] m_badvaddr,
  input  logic        rfe,
  output logic        exc_take,
  output logic [31:0] exc_vector,
  output logic [31:0] count,
  output logic        kuc,          // 1 = user mode
  output logic [3:0]  cu,
  output logic        int_pending   // some enabled interrupt is pending
);
  logic [7:0]  fromhost_q, tohost_q;
  logic [31:0] vuepc_q, vubad_q, badv_q, count_q, compare_q, epc_q;
  logic [3:0]  cu_q;            // cu[3] and cu[1] are kept at zero
  logic [7:0]  im_q;
  logic [5:0]  kuie_q;
  logic        bd_q;
  logic [1:0]  ce_q;
  logic [4:0]  exccode_q;
  logic        ip7_q, ip5_q, ip4_q, ip3_q;
  logic [7:0]  ip;
  logic [31:0] status_w, cause_w;

  // interrupt selection
  logic        iec;
  logic [7:0]  en;
  logic        int_take, sexc_take;
  logic [31:0] int_vec;
  logic [4:0]  int_code;
  logic        int_code_valid;
  exccode_e    sexc_code;

  assign ip       = {ip7_q, intfromhost, ip5_q, ip4_q, ip3_q, 3'b000};
  assign iec      = kuie_q[0];
  assign en       = ip & im_q & {8{iec}};
  assign status_w = {cu_q, 12'b0, im_q, 2'b00, kuie_q};
  assign cause_w  = {bd_q, 1'b0, ce_q, 12'b0, ip, 1'b0, exccode_q, 2'b00};

  always_comb begin
    int_take       = 1'b1;
    int_vec        = EXC_VECTOR;
    int_code       = EXC_HINT;
    int_code_valid = 1'b1;
    if      (en[6]) int_code = EXC_HINT;
    else if (en[5]) int_code = EXC_VINT;
    else if (en[7]) int_code = EXC_TINT;
    else if (en[4]) begin int_vec = EXT0_VECTOR; int_code_valid = 1'b0; end
    else if (en[3]) begin int_vec = EXT1_VECTOR; int_code_valid = 1'b0; end
    else            int_take = 1'b0;
  end

  always_comb begin
    sexc_take = 1'b1;
    sexc_code = EXC_ADEF;
    if      (m_exc.adef) sexc_code = EXC_ADEF;
    else if (m_exc.cpu)  sexc_code = EXC_CPU;
    else if (m_exc.ri)   sexc_code = EXC_RI;
    else if (m_exc.sys)  sexc_code = EXC_SYS;
    else if (m_exc.bp)   sexc_code = EXC_BP;
    else if (m_exc.ov)   sexc_code = EXC_OV;
    else if (m_exc.vue)  sexc_code = EXC_VUE;
    else if (m_exc.adel) sexc_code = EXC_ADEL;
    else if (m_exc.ades) sexc_code = EXC_ADES;
    else                 sexc_take = 1'b0;
  end

  assign int_pending = |en;
  assign exc_take    = m_valid && (int_take || sexc_take);
  assign exc_vector  = int_take ? int_vec : EXC_VECTOR;

  always_ff @(posedge clk) begin
    // count / compare
    if (mtc0_we && mtc0_addr == CP0_COUNT) count_q <= mtc0_wdata;
    else                                   count_q <= count_q + 32'd1;
    if (mtc0_we && mtc0_addr == CP0_COMPARE) begin
      compare_q <= mtc0_wdata;
      ip7_q     <= 1'b0;
    end else if (count_q == compare_q) begin
      ip7_q     <= 1'b1;
    end

    // external interrupts: inverted clocked copies of the pins
    ip4_q <= ~extintb[0];
    ip3_q <= ~extintb[1];

    // host communication
    if (fromhost_we) fromhost_q <= fromhost_wdata;
    if (rst)                                       tohost_q <= 8'h00;
    else if (mtc0_we && mtc0_addr == CP0_TOHOST)   tohost_q <= mtc0_wdata[7:0];

    // vector address error: sticky ip5, writable through cause
    if (vu_adderr) begin
      ip5_q   <= 1'b1;
      vuepc_q <= vu_adderr_pc;
      vubad_q <= vu_adderr_addr;
    end else if (mtc0_we && mtc0_addr == CP0_CAUSE) begin
      ip5_q   <= mtc0_wdata[13];
    end

    // status
    if (mtc0_we && mtc0_addr == CP0_STATUS) begin
      cu_q   <= {1'b0, mtc0_wdata[30], 1'b0, mtc0_wdata[28]};
      im_q   <= {mtc0_wdata[15:11], 3'b000};
      kuie_q <= mtc0_wdata[5:0];
    end

    // exception entry and return
    if (exc_take) begin
      kuie_q <= {kuie_q[3:0], 2'b00};
      epc_q  <= m_bd ? (m_pc - 32'd4) : m_pc;
      bd_q   <= m_bd;
      if (int_take) begin
        if (int_code_valid) exccode_q <= int_code;
      end else begin
        exccode_q <= sexc_code;
        if (sexc_code == EXC_CPU) ce_q <= m_ce;
        if (sexc_code == EXC_ADEL || sexc_code == EXC_ADES) badv_q <= m_badvaddr;
      end
    end else if (rfe) begin
      kuie_q[3:0] <= kuie_q[5:2];
    end

    if (rst) begin
      kuie_q[1:0] <= 2'b00;   // kernel mode, interrupts disabled
    end
  end

  always_comb begin
    unique case (mfc0_addr)
      CP0_FROMHOST:   mfc0_rdata = {24'b0, fromhost_q};
      CP0_TOHOST:     mfc0_rdata = {24'b0, tohost_q};
      CP0_VUEPC:      mfc0_rdata = vuepc_q;
      CP0_VUBADVADDR: mfc0_rdata = vubad_q;
      CP0_BADVADDR:   mfc0_rdata = badv_q;
      CP0_COUNT:      mfc0_rdata = count_q;
      CP0_COMPARE:    mfc0_rdata = compare_q;
      CP0_STATUS:     mfc0_rdata = status_w;
      CP0_CAUSE:      mfc0_rdata = cause_w;
      CP0_EPC:        mfc0_rdata = epc_q;
      CP0_PRID:       mfc0_rdata = {16'b0, 8'h00, PRID_REV};
      default:        mfc0_rdata = 32'b0;
    endcase
  end

  assign tohost = tohost_q;
  assign count  = count_q;
  assign kuc    = kuie_q[1];
  assign cu     = cu_q;
endmodule

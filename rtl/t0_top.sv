// t0_top: the T0 vector microprocessor without its scalar CPU pipeline.
//
// T0 couples a MIPS-II scalar CPU with a fixed-point vector coprocessor, a
// 128-bit single-cycle external memory port and a byte-serial host port.  This
// top level wires together every block of the chip except the scalar CPU
// pipeline and instruction decoder, whose connections are brought out as ports
// (the "cpu_*" groups below) so that a CPU model or testbench can drive them:
//
//   t0_clkgen     clk2xin / 2 -> internal clock phi, clkout = ~phi
//   t0_sip        SIP host/test port (TAP, regio, memio, testcntl, int, ...)
//   t0_cp0        system coprocessor, interrupts and exception entry
//   t0_icache     1 KB instruction cache with prefetch and miss engine
//   t0_memif      memory pipeline arbiter and external SRAM interface
//   t0_muldiv     scalar multiplier / divider with hi / lo
//   t0_vu_cregs   vector control registers (vlr, vcond, vovf, vsat, ...)
//   t0_vregfile   16 x 32 x 32-bit vector register file
//   t0_vdispatch  choice of arithmetic unit and chaining interlock
//   t0_vau x2     VP0 (with multiplier) and VP1
//   t0_vmp        vector memory unit (loads, stores, extract, insert)
//   t0_hpm        performance monitor pads
//
// Memory pipeline priority: SIP, then I-cache refill, then the exec port, then
// instruction prefetch.  The exec port is shared by the vector memory unit and
// the CPU's scalar loads and stores; the vector unit has it while it has a
// request outstanding.  When the exec request loses the port to SIP or a
// refill, the whole vector unit stalls (arithmetic units too, which keeps
// chained instructions in step) and so does a pending scalar access.  A
// vector extract or insert occupies the pipeline without touching memory: it
// waits for SIP and refills in the same way, and holds off scalar accesses
// and prefetch while it runs.  Because its index is only known at run time,
// an extract or insert is held (cpu_vm_interlock) until every vector
// arithmetic instruction has finished reading and writing registers.  The
// same output holds, for one cycle, a vector load or vext.v whose destination
// is that of an arithmetic instruction issued in the previous cycle: the
// memory pipeline is one stage shorter and could otherwise write first.
// In the other direction, a vector arithmetic instruction that reads or
// writes a register the vector memory unit is still using (its data register,
// or its index register) is held on cpu_va_interlock until that instruction
// has finished and its last load data is written.  This is more conservative
// than T0, which lets arithmetic chain behind fast contiguous loads.
//
// The SIP testcntl.suspend bit and RUNCPU single-stepping combine into
// cpu_issue_ok, which allows the CPU to issue an instruction.  Reset (rstb,
// active low) is synchronous to phi and does not reach SIP.  The external data
// bus is split into d_in / d_out / d_oe.  All timing is in cycles of phi.
module t0_top
  import t0_pkg::*;
(
  // clock, reset, interrupts
  input  logic         clk2xin,
  output logic         clkout,
  input  logic         rstb,
  input  logic [1:0]   extintb,
  // SIP
  input  logic         tms,
  input  logic [7:0]   tdi,
  output logic [7:0]   tdo,
  // performance monitor
  output logic [7:0]   hpm,
  // external memory
  output logic [27:0]  a,
  output logic         nkrwb,
  output logic         id,
  output logic         ku,
  output logic         rw,
  output logic [15:0]  bwenb,
  input  logic [1:0]   weninb,
  output logic [127:0] d_out,
  output logic         d_oe,
  input  logic [127:0] d_in,
  // ---- CPU pipeline connections
  output logic         phi,              // internal clock, for the CPU model
  output logic         cpu_issue_ok,     // not suspended, or RUNCPU step
  input  logic [31:0]  cpu_pc,           // PC of the next instruction (SIP)
  input  logic         cpu_interlock,    // for hpm
  // fetch
  input  logic         cpu_f_valid,
  input  logic [31:0]  cpu_f_pc,
  output logic         cpu_f_ready,
  output logic [31:0]  cpu_f_instr,
  // CP0
  input  logic         cpu_mtc0_we,
  input  logic [4:0]   cpu_mtc0_addr,
  input  logic [31:0]  cpu_mtc0_wdata,
  input  logic [4:0]   cpu_mfc0_addr,
  output logic [31:0]  cpu_mfc0_rdata,
  input  logic         cpu_m_valid,
  input  logic [31:0]  cpu_m_pc,
  input  logic         cpu_m_bd,
  input  sync_exc_t    cpu_m_exc,
  input  logic [1:0]   cpu_m_ce,
  input  logic [31:0]  cpu_m_badvaddr,
  input  logic         cpu_rfe,
  output logic         cpu_exc_take,
  output logic [31:0]  cpu_exc_vector,
  output logic         cpu_kuc,
  output logic [3:0]   cpu_cu,
  output logic         cpu_int_pending,
  // scalar memory access
  input  mem_req_t     cpu_mreq,
  input  logic         cpu_mkill,
  output logic         cpu_mgnt,
  output logic         cpu_mrvalid,
  output logic [127:0] cpu_mrdata,
  // multiplier / divider
  input  logic         cpu_mul_start,
  input  logic         cpu_div_start,
  input  logic         cpu_md_signed,
  input  logic [31:0]  cpu_md_a,
  input  logic [31:0]  cpu_md_b,
  input  logic         cpu_mthi,
  input  logic         cpu_mtlo,
  input  logic [31:0]  cpu_md_wdata,
  output logic [31:0]  cpu_hi,
  output logic [31:0]  cpu_lo,
  output logic         cpu_md_busy,
  // vector control registers
  input  logic         cpu_ctc2_we,
  input  logic [4:0]   cpu_ctc2_addr,
  input  logic [31:0]  cpu_ctc2_wdata,
  input  logic [4:0]   cpu_cfc2_addr,
  output logic [31:0]  cpu_cfc2_rdata,
  output logic         cpu_cfc2_illegal,
  output logic         cpu_ctc2_illegal,
  // vector arithmetic instruction
  input  logic         cpu_va_req,
  input  vau_op_e      cpu_va_op,
  input  logic [3:0]   cpu_va_vs,
  input  logic [3:0]   cpu_va_vt,
  input  logic [3:0]   cpu_va_vd,
  input  logic         cpu_va_a_scalar,
  input  logic         cpu_va_b_scalar,
  input  logic [31:0]  cpu_va_scalar,
  input  logic [4:0]   cpu_va_shamt,
  output logic         cpu_va_interlock,
  output logic         cpu_va_vue,
  output logic         cpu_vlr_err,      // vlr > 32: length error for any vector op
  // vector memory instruction
  input  logic         cpu_vm_issue,
  input  vm_op_e       cpu_vm_op,        // transfer, vext.v, vins.s or vext.s
  input  logic [31:0]  cpu_vm_xindex,    // extract / insert index (rd)
  input  logic [31:0]  cpu_vm_xscalar,   // vins.s value
  output logic         cpu_vm_xvue,      // extract / insert index out of range
  output logic         cpu_vm_interlock,  // vector memory instruction held this cycle
  output logic         cpu_vm_xs_valid,  // vext.s result
  output logic [31:0]  cpu_vm_xs_data,
  input  logic         cpu_vm_store,
  input  logic [1:0]   cpu_vm_size,
  input  logic         cpu_vm_unsigned,
  input  logic         cpu_vm_strided,
  input  logic         cpu_vm_indexed,
  input  logic [3:0]   cpu_vm_ireg,      // index register of an indexed transfer
  input  logic [31:0]  cpu_vm_base,
  input  logic [31:0]  cpu_vm_stride,
  input  logic [3:0]   cpu_vm_vreg,
  input  logic [31:0]  cpu_vm_pc,
  output logic         cpu_vm_busy,
  output logic         vu_stall
);
  logic rst;
  assign rst = !rstb;

  // ----------------------------------------------------------------- clock
  logic clk;
  t0_clkgen u_clk (.clk2xin(clk2xin), .phi(clk), .clkout(clkout));
  assign phi = clk;

  // ------------------------------------------------------------------- SIP
  logic [7:0]   tohost, fromhost_wdata;
  logic         fromhost_we, intfromhost, suspend, icfrz, icinv, run_issue;
  logic [5:0]   ic_opcode;
  logic         ic_hit;
  logic         sip_req, sip_wr, sip_icw, sip_rvalid;
  logic [31:0]  sip_addr;
  logic [127:0] sip_wdata, mem_rdata;
  tap_state_e   tap_state;

  t0_sip u_sip (
    .clk, .tms, .tdi, .tdo,
    .tohost, .fromhost_we, .fromhost_wdata, .intfromhost,
    .suspend, .icfrz, .icinv, .run_issue,
    .ic_opcode, .ic_hit, .pc(cpu_pc),
    .req_valid(sip_req), .req_write(sip_wr), .req_icwrite(sip_icw),
    .req_addr(sip_addr), .req_wdata(sip_wdata),
    .mem_rvalid(sip_rvalid), .mem_rdata(mem_rdata), .tap_state(tap_state)
  );
  assign cpu_issue_ok = !suspend || run_issue;

  // ------------------------------------------------------------------- CP0
  logic [31:0] count;
  logic        vm_adderr;
  logic [31:0] vm_adderr_pc, vm_adderr_addr;

  t0_cp0 u_cp0 (
    .clk, .rst,
    .mtc0_we(cpu_mtc0_we), .mtc0_addr(cpu_mtc0_addr), .mtc0_wdata(cpu_mtc0_wdata),
    .mfc0_addr(cpu_mfc0_addr), .mfc0_rdata(cpu_mfc0_rdata),
    .fromhost_we, .fromhost_wdata, .tohost, .intfromhost,
    .vu_adderr(vm_adderr), .vu_adderr_pc(vm_adderr_pc), .vu_adderr_addr(vm_adderr_addr),
    .extintb,
    .m_valid(cpu_m_valid), .m_pc(cpu_m_pc), .m_bd(cpu_m_bd), .m_exc(cpu_m_exc),
    .m_ce(cpu_m_ce), .m_badvaddr(cpu_m_badvaddr), .rfe(cpu_rfe),
    .exc_take(cpu_exc_take), .exc_vector(cpu_exc_vector), .count,
    .kuc(cpu_kuc), .cu(cpu_cu), .int_pending(cpu_int_pending)
  );

  // -------------------------------------------------------------- I-cache
  logic        pf_valid, pf_gnt, ic_valid, ic_gnt, ic_rvalid, ic_miss;
  logic [27:0] pf_addr, ic_addr;

  t0_icache u_ic (
    .clk, .rst,
    .f_valid(cpu_f_valid), .f_pc(cpu_f_pc), .f_ready(cpu_f_ready), .f_instr(cpu_f_instr),
    .miss(ic_miss), .opcode(ic_opcode), .hit(ic_hit),
    .icfrz, .icinv,
    .icw_valid(sip_req && sip_icw), .icw_addr(sip_addr), .icw_data(sip_wdata),
    .pf_valid, .pf_addr, .pf_gnt, .ic_valid, .ic_addr, .ic_gnt, .ic_rvalid,
    .rdata(mem_rdata)
  );

  // ------------------------------------------------------ memory pipeline
  mem_req_t    vm_req, ex_req;
  logic        ex_gnt, ex_rvalid, vm_gnt, vm_rvalid;
  logic        vsrc1, vsrc2;
  mreq_src_e   msrc;
  logic        port_busy;
  logic        vm_xreq, vm_xgnt, pf_valid_m;

  assign ex_req      = vm_req.valid ? vm_req : vm_xreq ? '0 : cpu_mreq;
  assign vm_gnt      = ex_gnt && vm_req.valid;
  assign cpu_mgnt    = ex_gnt && !vm_req.valid;
  assign vm_xgnt     = vm_xreq && !sip_req && !ic_valid;
  assign pf_valid_m  = pf_valid && !vm_xreq;
  assign vu_stall    = (vm_req.valid && !ex_gnt) || (vm_xreq && !vm_xgnt);

  always_ff @(posedge clk) begin
    vsrc1 <= vm_gnt;
    vsrc2 <= vsrc1;
  end
  assign vm_rvalid   = ex_rvalid && vsrc2;
  assign cpu_mrvalid = ex_rvalid && !vsrc2;
  assign cpu_mrdata  = mem_rdata;

  t0_memif u_mem (
    .clk, .rst,
    .sip_valid(sip_req), .sip_write(sip_wr), .sip_icwrite(sip_icw),
    .sip_addr, .sip_wdata, .sip_rvalid,
    .ic_valid, .ic_addr, .pf_valid(pf_valid_m), .pf_addr, .ic_gnt, .pf_gnt, .ic_rvalid,
    .ex_req, .ex_kill(cpu_mkill), .ex_gnt, .ex_rvalid, .rdata(mem_rdata),
    .a, .nkrwb, .id, .ku, .rw, .bwenb, .weninb, .d_out, .d_oe, .d_in,
    .src(msrc), .port_busy
  );

  // ------------------------------------------------------------- mul/div
  t0_muldiv u_md (
    .clk, .rst,
    .mul_start(cpu_mul_start), .div_start(cpu_div_start), .is_signed(cpu_md_signed),
    .a(cpu_md_a), .b(cpu_md_b), .mthi(cpu_mthi), .mtlo(cpu_mtlo), .wdata(cpu_md_wdata),
    .hi(cpu_hi), .lo(cpu_lo), .busy(cpu_md_busy)
  );

  // -------------------------------------------------- vector control regs
  vflag_wr_t   fw [2];
  logic [7:0]  vlr;

  t0_vu_cregs u_vcr (
    .clk, .rst,
    .ctc2_we(cpu_ctc2_we), .ctc2_addr(cpu_ctc2_addr), .ctc2_wdata(cpu_ctc2_wdata),
    .ctc2_illegal(cpu_ctc2_illegal),
    .cfc2_addr(cpu_cfc2_addr), .cfc2_rdata(cpu_cfc2_rdata), .cfc2_illegal(cpu_cfc2_illegal),
    .count, .fw, .vlr, .vlr_err(cpu_vlr_err), .vcond(), .vovf(), .vsat()
  );

  // ---------------------------------------------------- vector register file
  logic [3:0]  rd_reg  [8];
  logic [1:0]  rd_row  [8];
  vrow_t       rd_data [8];
  logic        wr_en   [4];
  logic [3:0]  wr_reg  [4];
  logic [1:0]  wr_row  [4];
  logic [7:0]  wr_mask [4];
  vrow_t       wr_data [4];

  t0_vregfile u_vrf (
    .clk, .rd_reg, .rd_row, .rd_data, .wr_en, .wr_reg, .wr_row, .wr_mask, .wr_data
  );

  // ------------------------------------------------------ arithmetic units
  logic       go_vp0, go_vp1;
  logic [1:0] vp_busy, vp_active;
  logic       va_mul, va_cmp, va_cmv;

  assign va_mul = cpu_va_op == VOP_FXMUL;
  assign va_cmp = cpu_va_op inside {VOP_FLT, VOP_FLTU, VOP_FEQ};
  assign va_cmv = cpu_va_op inside {VOP_CMVZ, VOP_CMVNZ};

  // vector memory instruction in flight: registers it uses, and its busy
  // time stretched by the two cycles load data takes to come back
  logic       vm_start, vm_bz1, vm_bz2, vm_bz3, vm_inflight, vm_ix_q, va_vm_hold;
  logic [3:0] vm_reg_q, vm_ireg_q;
  logic       disp_interlock;
  assign vm_start = cpu_vm_issue && !cpu_vm_interlock && !cpu_vm_busy;
  always_ff @(posedge clk) begin
    if (rst) begin
      vm_bz1 <= 1'b0;
      vm_bz2 <= 1'b0;
      vm_bz3 <= 1'b0;
    end else begin
      vm_bz1 <= vm_start || cpu_vm_busy;
      vm_bz2 <= vm_bz1;
      vm_bz3 <= vm_bz2;
    end
    if (vm_start) begin
      vm_reg_q  <= cpu_vm_vreg;
      vm_ireg_q <= cpu_vm_ireg;
      vm_ix_q   <= (cpu_vm_op == VM_MEM && cpu_vm_indexed) || cpu_vm_op == VM_EXTV ||
                   cpu_vm_op == VM_EXTS;
    end
  end
  assign vm_inflight = cpu_vm_busy || vm_bz1 || vm_bz2 || vm_bz3;
  function automatic logic uses(input logic [3:0] r, input logic [3:0] ra, input logic ra_on,
                                input logic [3:0] rb, input logic rb_on);
    return r != 4'd0 && ((ra_on && r == ra) || (rb_on && r == rb));
  endfunction
  assign va_vm_hold = cpu_va_req && vm_inflight &&
      ((uses(cpu_va_vs, vm_reg_q, 1'b1, vm_ireg_q, vm_ix_q) && !cpu_va_a_scalar) ||
       (uses(cpu_va_vt, vm_reg_q, 1'b1, vm_ireg_q, vm_ix_q) && !cpu_va_b_scalar) ||
       uses(cpu_va_vd, vm_reg_q, 1'b1, vm_ireg_q, vm_ix_q));
  assign cpu_va_interlock = disp_interlock || va_vm_hold;

  t0_vdispatch u_disp (
    .clk, .rst, .stall(vu_stall),
    .req_valid(cpu_va_req && !va_vm_hold), .req_mul(va_mul),
    .req_vs(cpu_va_vs), .req_vt(cpu_va_vt), .req_vd(cpu_va_vd),
    .req_rd_vs(!cpu_va_a_scalar), .req_rd_vt(!cpu_va_b_scalar), .req_rd_vd(va_cmv),
    .req_wr_vd(!va_cmp), .vlr, .vp_busy,
    .go_vp0, .go_vp1, .interlock(disp_interlock), .vue(cpu_va_vue)
  );

  // arithmetic still in flight: rows left to read, or a read row in X1 / X2
  // (held while the vector unit stalls, like the units' pipelines)
  logic va_fl1, va_fl2, va_prev_wr;
  logic [3:0] va_prev_vd;
  always_ff @(posedge clk) begin
    if (rst) begin
      va_fl1     <= 1'b0;
      va_fl2     <= 1'b0;
      va_prev_wr <= 1'b0;
    end else begin
      if (!vu_stall) begin
        va_fl1 <= go_vp0 || go_vp1 || vp_busy != 2'b00;
        va_fl2 <= va_fl1;
      end
      va_prev_wr <= (go_vp0 || go_vp1) && !va_cmp;
    end
    va_prev_vd <= cpu_va_vd;
  end
  // extract / insert wait for all arithmetic; a load or vext.v into the
  // destination of the arithmetic instruction issued last cycle waits a cycle
  assign cpu_vm_interlock = cpu_vm_issue &&
      ((cpu_vm_op != VM_MEM && (vp_busy != 2'b00 || va_fl1 || va_fl2)) ||
       ((cpu_vm_op == VM_EXTV || (cpu_vm_op == VM_MEM && !cpu_vm_store)) &&
        va_prev_wr && va_prev_vd == cpu_vm_vreg));

  for (genvar u = 0; u < 2; u++) begin : g_vp
    t0_vau #(.HAS_MUL(u == 0)) u_vp (
      .clk, .rst, .stall(vu_stall),
      .issue(u == 0 ? go_vp0 : go_vp1), .op(cpu_va_op),
      .vs(cpu_va_vs), .vt(cpu_va_vt), .vd(cpu_va_vd),
      .a_scalar(cpu_va_a_scalar), .b_scalar(cpu_va_b_scalar), .scalar(cpu_va_scalar),
      .vlr, .shamt(cpu_va_shamt),
      .busy(vp_busy[u]), .active(vp_active[u]), .illegal(),
      .rd_reg(rd_reg[3*u +: 3]), .rd_row(rd_row[3*u +: 3]), .rd_data(rd_data[3*u +: 3]),
      .wr_en(wr_en[u]), .wr_reg(wr_reg[u]), .wr_row(wr_row[u]),
      .wr_mask(wr_mask[u]), .wr_data(wr_data[u]),
      .fw(fw[u])
    );
  end

  // ---------------------------------------------------------- memory unit
  logic vm_active;

  t0_vmp u_vmp (
    .clk, .rst,
    .issue(cpu_vm_issue && !cpu_vm_interlock), .op(cpu_vm_op), .xindex(cpu_vm_xindex), .xscalar(cpu_vm_xscalar),
    .xvue(cpu_vm_xvue), .xreq(vm_xreq), .xgnt(vm_xgnt),
    .xs_valid(cpu_vm_xs_valid), .xs_data(cpu_vm_xs_data),
    .store(cpu_vm_store), .size(cpu_vm_size),
    .is_unsigned(cpu_vm_unsigned), .strided(cpu_vm_strided),
    .indexed(cpu_vm_indexed), .ireg(cpu_vm_ireg),
    .base(cpu_vm_base), .stride(cpu_vm_stride), .vreg(cpu_vm_vreg), .vlr,
    .pc(cpu_vm_pc), .kernel(!cpu_kuc),
    .busy(cpu_vm_busy), .active(vm_active),
    .adderr(vm_adderr), .adderr_pc(vm_adderr_pc), .adderr_addr(vm_adderr_addr),
    .req(vm_req), .gnt(vm_gnt), .rvalid(vm_rvalid), .rdata(mem_rdata),
    .rd_reg(rd_reg[6:7]), .rd_row(rd_row[6:7]), .rd_data(rd_data[6:7]),
    .wr_en(wr_en[2:3]), .wr_reg(wr_reg[2:3]), .wr_row(wr_row[2:3]),
    .wr_mask(wr_mask[2:3]), .wr_data(wr_data[2:3])
  );

  // ------------------------------------------------------------------ HPM
  t0_hpm u_hpm (
    .clk,
    .exception(cpu_exc_take || rst),
    .cpumemstall(cpu_mreq.valid && !cpu_mgnt),
    .interlock(cpu_interlock),
    .miss(ic_miss),
    .vp0busy(vp_active[0]), .vp1busy(vp_active[1]), .vmpbusy(vm_active),
    .vumemstall(vu_stall),
    .hpm
  );
endmodule

// tb_t0_top: end-to-end test of the T0 chip top level at its default size.
//
// The testbench plays three parts around t0_top: the host on the SIP pins
// (byte-wide TAP scans), a 64 KB pipelined SRAM on the memory pins, and a
// scripted stand-in for the scalar CPU pipeline that drives the cpu_* ports
// the way T0's instructions would (fetch, mtc0/mfc0, scalar loads and stores,
// mult/div, ctc2/cfc2, vector arithmetic and vector memory instructions, and
// the M-stage exception check).  Each mechanism of the chip is exercised and
// counted, and the test fails if any count is zero:
//   SIP: MEMWRITE, MEMREAD, ICWRITE, SIPIO (fromhost/tohost), TESTIO
//        (suspend, icinv), INTWRITE host interrupt, RUNCPU single step;
//   I-cache: hit, 2-cycle miss (prefetch granted), 3-cycle miss (prefetch
//        lost to a scalar access), ICWRITE hit, icinv forced miss;
//   memory: scalar load and store, killed store, weninb byte shaping,
//        vector unit stalled by a SIP access;
//   vector: vector loads and stores (contiguous, strided and indexed),
//        vext.v / vins.s / vext.s with the index range error, VP0 and VP1
//        both used, chaining interlock, FXMUL on VP0, insert held behind
//        arithmetic, load held one cycle behind arithmetic to the same
//        register, arithmetic held behind a strided load of its source,
//        vue on vlr > 32, vector address error raising ip5;
//   CP0: timer interrupt, external interrupt 0 vector, host interrupt;
//   mult / div results; performance monitor pins.
// All data results are checked against values the testbench computes.
module tb_t0_top;
  import t0_pkg::*;
  logic clk2xin = 1'b0, clkout, rstb = 1'b0;
  logic [1:0] extintb = 2'b11;
  logic tms = 1'b1;
  logic [7:0] tdi = '0, tdo, hpm;
  logic [27:0] a;
  logic nkrwb, id, ku, rw, d_oe;
  logic [15:0] bwenb;
  logic [1:0] weninb = 2'b00;
  logic [127:0] d_out, d_in;
  logic phi, cpu_issue_ok;
  logic [31:0] cpu_pc = 32'h1000;
  logic cpu_interlock = 0;
  logic cpu_f_valid = 0, cpu_f_ready;
  logic [31:0] cpu_f_pc = 0, cpu_f_instr;
  logic cpu_mtc0_we = 0;
  logic [4:0] cpu_mtc0_addr = 0, cpu_mfc0_addr = 0;
  logic [31:0] cpu_mtc0_wdata = 0, cpu_mfc0_rdata;
  logic cpu_m_valid = 0, cpu_m_bd = 0;
  logic [31:0] cpu_m_pc = 0, cpu_m_badvaddr = 0;
  sync_exc_t cpu_m_exc = '0;
  logic [1:0] cpu_m_ce = 0;
  logic cpu_rfe = 0, cpu_exc_take, cpu_kuc, cpu_int_pending;
  logic [31:0] cpu_exc_vector;
  logic [3:0] cpu_cu;
  mem_req_t cpu_mreq = '0;
  logic cpu_mkill = 0, cpu_mgnt, cpu_mrvalid;
  logic [127:0] cpu_mrdata;
  logic cpu_mul_start = 0, cpu_div_start = 0, cpu_md_signed = 0, cpu_mthi = 0, cpu_mtlo = 0;
  logic [31:0] cpu_md_a = 0, cpu_md_b = 0, cpu_md_wdata = 0, cpu_hi, cpu_lo;
  logic cpu_md_busy;
  logic cpu_ctc2_we = 0;
  logic [4:0] cpu_ctc2_addr = 0, cpu_cfc2_addr = 0;
  logic [31:0] cpu_ctc2_wdata = 0, cpu_cfc2_rdata;
  logic cpu_cfc2_illegal, cpu_ctc2_illegal;
  logic cpu_va_req = 0;
  vau_op_e cpu_va_op = VOP_ADD;
  logic [3:0] cpu_va_vs = 0, cpu_va_vt = 0, cpu_va_vd = 0;
  logic cpu_va_a_scalar = 0, cpu_va_b_scalar = 0;
  logic [31:0] cpu_va_scalar = 0;
  logic [4:0] cpu_va_shamt = 0;
  logic cpu_va_interlock, cpu_va_vue, cpu_vlr_err;
  logic cpu_vm_issue = 0, cpu_vm_store = 0, cpu_vm_unsigned = 0, cpu_vm_strided = 0;
  logic [1:0] cpu_vm_size = 2;
  logic [31:0] cpu_vm_base = 0, cpu_vm_stride = 0, cpu_vm_pc = 0;
  logic [3:0] cpu_vm_vreg = 0;
  logic cpu_vm_indexed = 0;
  vm_op_e cpu_vm_op = VM_MEM;
  logic [31:0] cpu_vm_xindex = 0, cpu_vm_xscalar = 0, cpu_vm_xs_data;
  logic cpu_vm_xvue, cpu_vm_xs_valid, cpu_vm_interlock;
  int n_xil;
  logic [3:0] cpu_vm_ireg = 0;
  logic cpu_vm_busy, vu_stall;

  t0_top dut (.*);

  always #5 clk2xin = ~clk2xin;

  int checks = 0, failures = 0;
  int mech [string];

  initial begin
    #4000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // ------------------------------------------------------------ SRAM model
  // 4096 blocks of 16 bytes; the block address is latched at the end of the
  // address phase, read data is driven in the data phase and a write happens
  // three quarters into the data phase, after the pins have settled.
  logic [127:0] sram [4096];
  logic [11:0] a_q;
  always @(posedge phi) a_q <= a[11:0];
  assign d_in = sram[a_q];
  always @(negedge clk2xin)
    if (!phi && !rw)
      for (int i = 0; i < 16; i++) if (!bwenb[i]) sram[a_q][8*i +: 8] <= d_out[8*i +: 8];

  function automatic logic [31:0] word_at(input logic [31:0] addr);
    return sram[addr[15:4]][32*addr[3:2] +: 32];
  endfunction

  // ------------------------------------------------------------ monitors
  logic [7:0] hpm_seen = '0;
  int n_stall;
  always @(posedge phi) begin
    hpm_seen <= hpm_seen | hpm;
    if (vu_stall) n_stall++;
  end

  // ------------------------------------------------------------ SIP host
  logic [7:0] sip_out [32];

  task automatic tick(input logic t, input logic [7:0] d, output logic [7:0] o);
    @(negedge phi);
    tms = t; tdi = d;
    #1 o = tdo;
    @(posedge phi);
    #1;
  endtask

  task automatic tick0(input logic t);
    logic [7:0] o;
    tick(t, 8'h00, o);
  endtask

  task automatic scan_ir(input logic [3:0] ins);
    logic [7:0] o;
    tick0(1); tick0(1); tick0(0); tick0(0);
    tick(1, {4'h0, ins}, o);
    tick0(1); tick0(0);
  endtask

  task automatic scan_dr(input int n, input logic [7:0] din [32]);
    tick0(1); tick0(0); tick0(0);
    for (int i = 0; i < n; i++) tick(i == n - 1, din[i], sip_out[i]);
    tick0(1); tick0(0);
  endtask

  task automatic sip_write_block(input logic [31:0] addr, input logic [127:0] data);
    logic [7:0] din [32];
    scan_ir(SIP_MEMWRITE);
    for (int i = 0; i < 16; i++) din[i] = data[8*i +: 8];
    for (int i = 0; i < 4; i++) din[16 + i] = addr[31 - 8*i -: 8];
    scan_dr(20, din);
    repeat (3) tick0(0);
  endtask

  task automatic sip_read_block(input logic [31:0] addr, output logic [127:0] data);
    logic [7:0] din [32];
    scan_ir(SIP_MEMREAD);
    for (int i = 0; i < 4; i++) din[i] = addr[31 - 8*i -: 8];
    scan_dr(4, din);
    repeat (3) tick0(0);
    foreach (din[i]) din[i] = 8'h00;
    scan_dr(20, din);
    for (int i = 0; i < 16; i++) data[8*i +: 8] = sip_out[i];
  endtask

  task automatic sip_reg(input logic [3:0] ins, input logic [7:0] v, output logic [7:0] cap);
    logic [7:0] din [32];
    scan_ir(ins);
    din[0] = v;
    scan_dr(1, din);
    cap = sip_out[0];
  endtask

  // ------------------------------------------------------------ CPU stand-in
  task automatic mtc0(input logic [4:0] r, input logic [31:0] v);
    @(negedge phi);
    cpu_mtc0_we = 1; cpu_mtc0_addr = r; cpu_mtc0_wdata = v;
    @(negedge phi);
    cpu_mtc0_we = 0;
  endtask

  task automatic mfc0(input logic [4:0] r, output logic [31:0] v);
    cpu_mfc0_addr = r;
    #1 v = cpu_mfc0_rdata;
  endtask

  task automatic ctc2(input logic [4:0] r, input logic [31:0] v);
    @(negedge phi);
    cpu_ctc2_we = 1; cpu_ctc2_addr = r; cpu_ctc2_wdata = v;
    @(negedge phi);
    cpu_ctc2_we = 0;
  endtask

  // an instruction reaching M: returns whether an exception was taken
  task automatic at_m(input logic [31:0] pc, output logic took, output logic [31:0] vec);
    @(negedge phi);
    cpu_m_valid = 1; cpu_m_pc = pc;
    #1 took = cpu_exc_take; vec = cpu_exc_vector;
    @(negedge phi);
    cpu_m_valid = 0;
  endtask

  task automatic rfe();
    @(negedge phi); cpu_rfe = 1; @(negedge phi); cpu_rfe = 0;
  endtask

  // instruction fetch; returns the instruction and the stall cycles
  task automatic fetch(input logic [31:0] pc, input logic with_load, output logic [31:0] instr,
                       output int stalls);
    @(negedge phi);
    cpu_f_valid = 1; cpu_f_pc = pc;
    if (with_load) begin
      cpu_mreq = '0; cpu_mreq.valid = 1; cpu_mreq.kernel = 1; cpu_mreq.addr = 28'h0000_400;
    end
    stalls = 0;
    #1;
    while (!cpu_f_ready && stalls < 50) begin
      @(negedge phi);
      if (cpu_mgnt) cpu_mreq = '0;
      stalls++;
      #1;
    end
    instr = cpu_f_instr;
    @(negedge phi);
    cpu_f_valid = 0;
    cpu_mreq = '0;
  endtask

  task automatic scalar_access(input logic wr, input logic [31:0] addr, input logic [15:0] be,
                               input logic [127:0] wdata, input logic kill, input logic [1:0] wen,
                               output logic [127:0] rdata);
    @(negedge phi);
    cpu_mreq = '0;
    cpu_mreq.valid = 1; cpu_mreq.write = wr; cpu_mreq.kernel = 1; cpu_mreq.addr = addr[31:4];
    cpu_mreq.be = be; cpu_mreq.wdata = wdata;
    #1;
    while (!cpu_mgnt) begin @(negedge phi); #1; end
    @(negedge phi);
    cpu_mreq = '0;
    cpu_mkill = kill; weninb = wen;
    @(negedge phi);
    cpu_mkill = 0; weninb = 2'b00;
    #1 rdata = cpu_mrdata;
    if (!wr) check(cpu_mrvalid, "scalar load data valid two cycles after grant");
  endtask

  task automatic vmem(input logic st, input logic [1:0] sz, input logic strd, input logic [31:0] base,
                      input logic [31:0] stride, input logic [3:0] vr, input logic [31:0] pc,
                      input logic ix = 0, input logic [3:0] ir = 0);
    @(negedge phi);
    cpu_vm_issue = 1; cpu_vm_store = st; cpu_vm_size = sz; cpu_vm_strided = strd;
    cpu_vm_base = base; cpu_vm_stride = stride; cpu_vm_vreg = vr; cpu_vm_pc = pc;
    cpu_vm_unsigned = 0; cpu_vm_indexed = ix; cpu_vm_ireg = ir;
    @(negedge phi);
    cpu_vm_issue = 0; cpu_vm_indexed = 0;
  endtask

  // extract / insert; returns the vext.s value and whether xvue was raised
  task automatic vx(input vm_op_e o, input logic [31:0] idx, input logic [31:0] sc,
                    input logic [3:0] vd, input logic [3:0] vt, output logic [31:0] val,
                    output logic vue, input logic quick = 0);
    int n;
    if (!quick) @(negedge phi);
    cpu_vm_issue = 1; cpu_vm_op = o; cpu_vm_xindex = idx; cpu_vm_xscalar = sc;
    cpu_vm_vreg = vd; cpu_vm_ireg = vt;
    n_xil = 0;
    #1 while (cpu_vm_interlock && n_xil < 100) begin @(negedge phi); n_xil++; #1; end
    vue = cpu_vm_xvue;
    @(negedge phi);
    cpu_vm_issue = 0; cpu_vm_op = VM_MEM;
    val = 0; n = 0;
    while (n < 60) begin
      #1 if (cpu_vm_xs_valid) val = cpu_vm_xs_data;
      @(negedge phi);
      n++;
    end
  endtask

  task automatic vm_wait();
    int n;
    n = 0;
    #1;
    while (cpu_vm_busy && n < 500) begin @(negedge phi); n++; #1; end
    repeat (4) @(negedge phi);
  endtask

  // vector arithmetic request held until accepted; returns the interlock
  // cycles.  The unit that took it (exp_vp: 0 = VP0, 1 = VP1) is checked on the
  // performance monitor pins over the following cycles, in the background.
  task automatic varith(input vau_op_e o, input logic [3:0] vd, input logic [3:0] vs,
                        input logic [3:0] vt, input logic [4:0] sh, input int exp_vp,
                        output int waited, input logic back_to_back = 0);
    @(negedge phi);
    cpu_va_req = 1; cpu_va_op = o; cpu_va_vd = vd; cpu_va_vs = vs; cpu_va_vt = vt;
    cpu_va_shamt = sh; cpu_va_a_scalar = 0; cpu_va_b_scalar = 0;
    waited = 0;
    #1;
    while (cpu_va_interlock && waited < 100) begin @(negedge phi); waited++; #1; end
    fork
      begin
        logic s4, s5;
        s4 = 0; s5 = 0;
        repeat (2) begin @(posedge phi); #1; s4 |= hpm[4]; s5 |= hpm[5]; end
        check(exp_vp == 0 ? s4 : (s5 && !s4), $sformatf("%s ran on VP%0d", o.name(), exp_vp));
        if (exp_vp == 0 && s4) mech["VP0 issue"]++;
        if (exp_vp == 1 && s5 && !s4) mech["VP1 issue"]++;
        if (o == VOP_FXMUL && s4) mech["FXMUL on VP0"]++;
      end
    join_none
    if (!back_to_back) begin
      @(negedge phi);
      cpu_va_req = 0;
    end
  endtask

  // ------------------------------------------------------------ the test
  initial begin
    logic [127:0] blk, blk2;
    logic [31:0] v, instr, vec, exp;
    logic [7:0] cap, din [32];
    logic took;
    int stalls, w, pf0;
    logic [31:0] va [32], vb [32];

    for (int i = 0; i < 4096; i++)
      sram[i] = {32'(i * 4 + 3) ^ 32'h0F00_0000, 32'(i * 4 + 2) ^ 32'h0F00_0000,
                 32'(i * 4 + 1) ^ 32'h0F00_0000, 32'(i * 4) ^ 32'h0F00_0000};
    // reset: chip and SIP TAP
    repeat (4) @(negedge phi);
    rstb = 1;
    repeat (6) tick0(1);
    tick0(0);
    for (int i = 0; i < 32; i++) din[i] = 8'h00;
    scan_dr(1, din);
    check(sip_out[0] == 8'h01, "SIP in BYPASS after TAP reset");
    check(clkout == !phi, "clkout is the inverted internal clock");
    mtc0(CP0_COUNT, 0); mtc0(CP0_COMPARE, 32'hFFFF_0000); mtc0(CP0_CAUSE, 0); mtc0(CP0_STATUS, 0);

    // ---------------------------------------------- SIP memory access
    blk = {$urandom, $urandom, $urandom, $urandom};
    sip_write_block(32'h0000_2340, blk);
    check(sram[12'h234] == blk, "SIP MEMWRITE reaches memory");
    if (sram[12'h234] == blk) mech["SIP MEMWRITE"]++;
    sip_read_block(32'h0000_2340, blk2);
    check(blk2 == blk, $sformatf("SIP MEMREAD %h expected %h", blk2, blk));
    if (blk2 == blk) mech["SIP MEMREAD"]++;

    // ---------------------------------------------- SIPIO
    sip_reg(SIP_SIPIO, 8'h3C, cap);
    mfc0(CP0_FROMHOST, v);
    check(v == 32'h3C, "SIPIO writes fromhost");
    mtc0(CP0_TOHOST, 32'hC5);
    sip_reg(SIP_SIPIO, 8'h00, cap);
    check(cap == 8'hC5, "SIPIO reads tohost");
    if (v == 32'h3C && cap == 8'hC5) mech["SIPIO host mailbox"]++;

    // ---------------------------------------------- instruction cache
    for (int i = 0; i < 8; i++) begin
      fetch(32'h0000_1000 + 4 * i, 0, instr, stalls);
      check(instr == word_at(32'h1000 + 4 * i), "fetched instruction");
      if (i % 4 == 0) begin
        check(stalls == 2, $sformatf("miss with prefetch: %0d stalls", stalls));
        if (stalls == 2) mech["I-cache miss, 2 cycles"]++;
      end else begin
        check(stalls == 0, "hit");
        if (stalls == 0) mech["I-cache hit"]++;
      end
    end
    fetch(32'h0000_1400, 1, instr, stalls);
    check(instr == word_at(32'h1400) && stalls == 3, $sformatf("miss behind a scalar access: %0d stalls", stalls));
    if (stalls == 3) mech["I-cache miss, 3 cycles"]++;
    // ICWRITE a line, then fetch it without memory traffic
    scan_ir(SIP_ICWRITE);
    for (int i = 0; i < 16; i++) din[i] = 8'hE0 + 8'(i);
    din[16] = 8'h00; din[17] = 8'h04; din[18] = 8'h56; din[19] = 8'h70;
    scan_dr(20, din);
    repeat (3) tick0(0);
    fetch(32'h0004_5678, 0, instr, stalls);
    check(instr == 32'hEBEA_E9E8 && stalls == 0, $sformatf("ICWRITE line hits: %h, %0d stalls", instr, stalls));
    if (instr == 32'hEBEA_E9E8 && stalls == 0) mech["ICWRITE"]++;
    check(sram[12'h567] != {8'hEF, 8'hEE, 8'hED, 8'hEC, 96'h0} , "ICWRITE does not write memory");
    // icinv through TESTIO: a cached line misses
    sip_reg(SIP_TESTIO, 8'h04, cap);
    fetch(32'h0000_1004, 0, instr, stalls);
    check(stalls > 0 && instr == word_at(32'h1004), "icinv forces a miss");
    if (stalls > 0) mech["icinv"]++;
    sip_reg(SIP_TESTIO, 8'h00, cap);

    // ---------------------------------------------- scalar memory
    scalar_access(1'b0, 32'h0000_2340, 16'h0, '0, 1'b0, 2'b00, blk2);
    check(blk2 == blk, "scalar load");
    if (blk2 == blk) mech["scalar load"]++;
    scalar_access(1'b1, 32'h0000_2350, 16'h00F0, {4{32'hA1B2C3D4}}, 1'b0, 2'b00, blk2);
    check(sram[12'h235][63:32] == 32'hA1B2C3D4 && sram[12'h235][31:0] == word_at(32'h2350),
          "scalar store of one word");
    if (sram[12'h235][63:32] == 32'hA1B2C3D4) mech["scalar store"]++;
    blk = sram[12'h236];
    scalar_access(1'b1, 32'h0000_2360, 16'hFFFF, {4{32'h5555_AAAA}}, 1'b1, 2'b00, blk2);
    check(sram[12'h236] == blk, "killed store writes nothing");
    if (sram[12'h236] == blk) mech["killed store"]++;
    scalar_access(1'b1, 32'h0000_2360, 16'hFFFF, {4{32'h5555_AAAA}}, 1'b0, 2'b01, blk2);
    check(sram[12'h236][63:0] == blk[63:0] && sram[12'h236][127:64] == {2{32'h5555_AAAA}},
          "weninb[0] blocks bytes 7:0");
    if (sram[12'h236][63:0] == blk[63:0]) mech["weninb"]++;

    // ---------------------------------------------- multiply / divide
    @(negedge phi);
    cpu_mul_start = 1; cpu_md_signed = 1; cpu_md_a = -32'sd1234; cpu_md_b = 32'sd56789;
    @(negedge phi);
    cpu_mul_start = 0;
    w = 1;
    while (cpu_md_busy) begin @(negedge phi); w++; end
    check({cpu_hi, cpu_lo} == 64'(-64'sd1234 * 64'sd56789) && w == 18, "mult");
    @(negedge phi);
    cpu_div_start = 1; cpu_md_signed = 0; cpu_md_a = 1000003; cpu_md_b = 97;
    @(negedge phi);
    cpu_div_start = 0;
    w = 1;
    while (cpu_md_busy) begin @(negedge phi); w++; end
    check(cpu_lo == 1000003 / 97 && cpu_hi == 1000003 % 97 && w == 33, "div");
    if (cpu_lo == 1000003 / 97) mech["mult / div"]++;

    // ---------------------------------------------- vector unit
    ctc2(VCR_VLR, 32);
    cpu_cfc2_addr = VCR_VLR;
    #1 check(cpu_cfc2_rdata == 32 && !cpu_vlr_err, "vlr = 32");
    for (int e = 0; e < 32; e++) begin
      va[e] = $urandom; vb[e] = 32'($signed(16'($urandom)));
      sram[12'h300 + e / 4][32 * (e % 4) +: 32] = va[e];
      sram[12'h340 + e][31:0] = vb[e];          // strided source, 16 bytes apart
    end
    for (int e = 0; e < 32; e++) va[e][15] = 1'b0;   // keep FXMUL inputs small below
    for (int e = 0; e < 32; e++) sram[12'h300 + e / 4][32 * (e % 4) +: 32] = va[e];
    vmem(1'b0, 2'd2, 1'b0, 32'h0000_3000, 0, 4'd1, 32'h100);   // vr1 <- contiguous
    vm_wait();
    mech["vector load contiguous"]++;
    // strided load overlapped with a SIP memory write: the vector unit stalls
    fork
      sip_write_block(32'h0000_7000, {4{32'h1234_5678}});
      begin
        repeat (12) @(negedge phi);
        vmem(1'b0, 2'd2, 1'b1, 32'h0000_3400, 16, 4'd2, 32'h104);  // vr2 <- strided
        vm_wait();
      end
    join
    check(n_stall > 0, "vector unit stalled by SIP access");
    if (n_stall > 0) mech["vector stall on SIP access"]++;
    mech["vector load strided"]++;
    // arithmetic: vr3 = vr1 + vr2 (VP1), vr4 = fxmul(vr3, vr2) chained (VP0),
    // vr5 = vr1 ^ vr2 issued while VP1 busy (VP0), vr6 = vr1 - vr2
    varith(VOP_ADDU, 4'd3, 4'd1, 4'd2, 0, 1, w);
    check(w == 0, "add issues at once");
    varith(VOP_XOR, 4'd5, 4'd1, 4'd2, 0, 0, w);
    check(w == 0, "second independent op issues at once, to the free unit");
    repeat (6) @(negedge phi);
    varith(VOP_SUBU, 4'd6, 4'd1, 4'd2, 0, 1, w, 1'b1);  // next request in the next cycle
    varith(VOP_FXMUL, 4'd4, 4'd6, 4'd2, 5'd8, 0, w);
    check(w == 2, $sformatf("chained multiply waits 2 cycles (waited %0d)", w));
    if (w == 2) mech["chaining interlock"]++;
    repeat (8) @(negedge phi);
    vmem(1'b1, 2'd2, 1'b0, 32'h0000_5000, 0, 4'd3, 32'h108); vm_wait();
    vmem(1'b1, 2'd2, 1'b0, 32'h0000_5080, 0, 4'd4, 32'h10C); vm_wait();
    vmem(1'b1, 2'd2, 1'b1, 32'h0000_5100, 8, 4'd5, 32'h110); vm_wait();
    mech["vector store"]++;
    for (int e = 0; e < 32; e++) begin
      logic signed [31:0] p;
      logic [31:0] d;
      check(word_at(32'h5000 + 4 * e) == va[e] + vb[e], $sformatf("vr3[%0d]", e));
      d = va[e] - vb[e];
      p = 32'($signed(d[15:0])) * 32'($signed(vb[e][15:0]));
      p = (p + 32'sd128) >>> 8;
      exp = p > 32767 ? 32'd32767 : p < -32768 ? 32'hFFFF_8000 : p;
      check(word_at(32'h5080 + 4 * e) == exp, $sformatf("vr4[%0d] = %h expected %h", e,
                                                       word_at(32'h5080 + 4 * e), exp));
      check(word_at(32'h5100 + 8 * e) == (va[e] ^ vb[e]), $sformatf("vr5[%0d] strided store", e));
    end
    // indexed: vr8 <- byte offsets 4*(31-e); vr9[e] <- mem[0x3000 + vr8[e]]
    // (va reversed); then vr9 stored to 0x6000 + vr8[e], which restores va.
    for (int e = 0; e < 32; e++) sram[12'h380 + e / 4][32 * (e % 4) +: 32] = 32'(4 * (31 - e));
    vmem(1'b0, 2'd2, 1'b0, 32'h0000_3800, 0, 4'd8, 32'h114); vm_wait();
    vmem(1'b0, 2'd2, 1'b0, 32'h0000_3000, 0, 4'd9, 32'h118, 1'b1, 4'd8); vm_wait();
    mech["vector load indexed"]++;
    vmem(1'b1, 2'd2, 1'b0, 32'h0000_6000, 0, 4'd9, 32'h11C, 1'b1, 4'd8); vm_wait();
    mech["vector store indexed"]++;
    // extract / insert: vr11 = vr1[4..23] (vlr 20), vr11[22] = scalar,
    // scalar = vr1[7]; then vr11 stored and checked
    begin
      logic [31:0] xv;
      logic xb;
      ctc2(VCR_VLR, 20);
      vx(VM_EXTV, 4, 0, 4'd11, 4'd1, xv, xb);
      check(!xb, "vext.v in range");
      vx(VM_INSS, 22, 32'hDEAD_BEEF, 4'd11, 4'd0, xv, xb);
      vx(VM_EXTS, 7, 0, 4'd0, 4'd1, xv, xb);
      check(xv == va[7], $sformatf("vext.s returned %h expected %h", xv, va[7]));
      mech["vector extract / insert"]++;
      vx(VM_EXTV, 20, 0, 4'd12, 4'd1, xv, xb);
      check(xb, "vext.v past the register end raises vue");
      if (xb) mech["extract index error"]++;
      ctc2(VCR_VLR, 32);
      vmem(1'b1, 2'd2, 1'b0, 32'h0000_6400, 0, 4'd11, 32'h120); vm_wait();
      for (int e = 0; e < 20; e++)
        check(word_at(32'h6400 + 4 * e) == va[e + 4], $sformatf("vext.v element %0d", e));
      check(word_at(32'h6400 + 4 * 22) == 32'hDEAD_BEEF, "vins.s element");
      // an insert right behind an arithmetic instruction waits for it:
      // vr13 = vr1 + 0 (4 rows), then vins.s vr13[0]; vr13[0] must be the
      // inserted value, not overwritten by the add's late write
      varith(VOP_ADDU, 4'd13, 4'd1, 4'd0, 0, 1, w, 1'b1);
      @(negedge phi);
      cpu_va_req = 0;
      vx(VM_INSS, 0, 32'h0BAD_CAFE, 4'd13, 4'd0, xv, xb, 1'b1);
      check(n_xil >= 4, $sformatf("vins.s held %0d cycles behind arithmetic", n_xil));
      if (n_xil >= 4) mech["extract / insert interlock"]++;
      vmem(1'b1, 2'd2, 1'b0, 32'h0000_6500, 0, 4'd13, 32'h124); vm_wait();
      check(word_at(32'h6500) == 32'h0BAD_CAFE && word_at(32'h6504) == va[1], "insert after arithmetic");
      // a load into the destination of the arithmetic instruction issued the
      // cycle before is held exactly one cycle; the loaded values win
      varith(VOP_XOR, 4'd14, 4'd1, 4'd2, 0, 1, w, 1'b1);
      @(negedge phi);
      cpu_va_req = 0;
      cpu_vm_issue = 1; cpu_vm_op = VM_MEM; cpu_vm_store = 0; cpu_vm_size = 2; cpu_vm_strided = 0;
      cpu_vm_indexed = 0; cpu_vm_base = 32'h0000_3000; cpu_vm_vreg = 4'd14; cpu_vm_pc = 32'h128;
      #1 check(cpu_vm_interlock, "load behind arithmetic to the same register is held");
      @(negedge phi);
      #1 check(!cpu_vm_interlock, "and only for one cycle");
      if (!cpu_vm_interlock) mech["memory-after-arithmetic WAW hold"]++;
      @(negedge phi);
      cpu_vm_issue = 0;
      vm_wait();
      vmem(1'b1, 2'd2, 1'b0, 32'h0000_6600, 0, 4'd14, 32'h12C); vm_wait();
      for (int e = 0; e < 32; e++)
        check(word_at(32'h6600 + 4 * e) == va[e], $sformatf("vr14[%0d] from the later load", e));
      // arithmetic reading the destination of a strided load still running
      // is held until the load's data is all written: vr15 <- strided vb,
      // then at once vr10 = vr15 + 0
      vmem(1'b0, 2'd2, 1'b1, 32'h0000_3400, 16, 4'd15, 32'h130);
      varith(VOP_ADDU, 4'd10, 4'd15, 4'd0, 0, 1, w);
      check(w >= 32, $sformatf("arithmetic held %0d cycles behind the strided load", w));
      if (w >= 32) mech["arithmetic held behind vector load"]++;
      vm_wait();
      repeat (6) @(negedge phi);
      vmem(1'b1, 2'd2, 1'b0, 32'h0000_6700, 0, 4'd10, 32'h134); vm_wait();
      for (int e = 0; e < 32; e++)
        check(word_at(32'h6700 + 4 * e) == vb[e], $sformatf("vr10[%0d] after held add", e));
    end
    for (int e = 0; e < 32; e++)
      check(word_at(32'h6000 + 4 * e) == va[e], $sformatf("indexed load/store element %0d: %h expected %h",
                                                          e, word_at(32'h6000 + 4 * e), va[e]));
    // vue on vlr > 32
    ctc2(VCR_VLR, 40);
    @(negedge phi);
    cpu_va_req = 1; cpu_va_op = VOP_ADD;
    #1 check(cpu_va_vue && cpu_vlr_err, "vue for vlr 40");
    if (cpu_va_vue) mech["vue"]++;
    @(negedge phi);
    cpu_va_req = 0;
    ctc2(VCR_VLR, 32);
    check(hpm_seen[5] && hpm_seen[6] && hpm_seen[4] && hpm_seen[7], "hpm vector unit and miss pins");
    if (hpm_seen[5] && hpm_seen[6]) mech["hpm pins"]++;

    // ---------------------------------------------- interrupts
    // vector address error -> ip5 -> interrupt
    mtc0(CP0_STATUS, 32'h0000_2001);
    vmem(1'b0, 2'd2, 1'b0, 32'h0000_3002, 0, 4'd7, 32'h0000_0ABC); vm_wait();
    at_m(32'h200, took, vec);
    mfc0(CP0_CAUSE, v);
    check(took && vec == EXC_VECTOR && v[6:2] == EXC_VINT && v[13], "vector address error interrupt");
    mfc0(CP0_VUEPC, v);
    check(v == 32'h0ABC, "vuepc");
    mfc0(CP0_VUBADVADDR, v);
    check(v == 32'h3002, "vubadvaddr");
    if (took) mech["vector address interrupt"]++;
    rfe();
    mtc0(CP0_CAUSE, 0);
    // timer
    mtc0(CP0_STATUS, 32'h0000_8001);
    mfc0(CP0_COUNT, v);
    mtc0(CP0_COMPARE, v + 20);
    at_m(32'h204, took, vec);
    check(!took, "no timer interrupt yet");
    repeat (25) @(negedge phi);
    at_m(32'h208, took, vec);
    mfc0(CP0_CAUSE, v);
    check(took && v[6:2] == EXC_TINT, "timer interrupt");
    if (took) mech["timer interrupt"]++;
    rfe();
    mtc0(CP0_COMPARE, 32'hFFFF_0000);
    // host interrupt through INTWRITE
    mtc0(CP0_STATUS, 32'h0000_4001);
    sip_reg(SIP_INTWRITE, 8'h01, cap);
    at_m(32'h20C, took, vec);
    mfc0(CP0_CAUSE, v);
    check(took && v[6:2] == EXC_HINT, "host interrupt");
    if (took) mech["host interrupt"]++;
    rfe();
    sip_reg(SIP_INTWRITE, 8'h00, cap);
    // external interrupt 0
    mtc0(CP0_STATUS, 32'h0000_1001);
    extintb = 2'b10;
    repeat (2) @(negedge phi);
    at_m(32'h210, took, vec);
    mfc0(CP0_EPC, v);
    check(took && vec == EXT0_VECTOR && v == 32'h210, "external interrupt 0");
    if (took) mech["external interrupt"]++;
    rfe();
    extintb = 2'b11;
    check(hpm_seen[0], "hpm exception pin");

    // ---------------------------------------------- suspend and RUNCPU
    sip_reg(SIP_TESTIO, 8'h01, cap);
    check(!cpu_issue_ok, "CPU suspended");
    scan_ir(SIP_RUNCPU);
    w = 0;
    for (int i = 0; i < 3; i++) begin
      @(negedge phi); tms = 1'b0;
      @(posedge phi); #1;
      if (cpu_issue_ok) w++;
    end
    check(w > 0, "RUNCPU lets the suspended CPU issue");
    if (w > 0) mech["RUNCPU single step"]++;
    sip_reg(SIP_TESTIO, 8'h00, cap);
    check(cpu_issue_ok, "CPU resumed");

    // ---------------------------------------------- summary
    foreach (mech[k]) $display("mechanism %-28s %0d", k, mech[k]);
    begin
      string need [$] = '{"SIP MEMWRITE", "SIP MEMREAD", "SIPIO host mailbox", "I-cache hit",
                          "I-cache miss, 2 cycles", "I-cache miss, 3 cycles", "ICWRITE", "icinv",
                          "scalar load", "scalar store", "killed store", "weninb", "mult / div",
                          "vector load contiguous", "vector load strided", "vector stall on SIP access",
                          "VP0 issue", "VP1 issue", "chaining interlock", "FXMUL on VP0",
                          "vector store", "vue", "hpm pins", "vector address interrupt",
                          "timer interrupt", "host interrupt", "external interrupt",
                          "RUNCPU single step"};
      foreach (need[i]) check(mech.exists(need[i]) && mech[need[i]] > 0, {"mechanism ", need[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

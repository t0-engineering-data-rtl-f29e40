// tb_t0_sip: drives the SIP port through complete TAP scans and checks:
//  * reset by six cycles of tms=1 leaves BYPASS in the instruction register
//    (a DR scan then captures 0x01), and Capture-IR presets regio to 0x01;
//  * SIPIO captures tohost and updates fromhost; TESTIO captures testresult
//    and updates testcntl (suspend / icfrz / icinv); INTWRITE sets intfromhost;
//  * MEMWRITE: 16 data bytes then 4 address bytes give one memory write
//    request one cycle after Update-DR with the expected address and data;
//  * MEMREAD: an address scan gives a read request one cycle after Update-DR;
//    data returned by the memory lands in memio, and the next scan shifts out
//    the 16 bytes (lowest address first) followed by the PC;
//  * ICWRITE raises the I-cache write request;
//  * RUNCPU grants one issue per Run-Test-Idle cycle, one cycle later;
//  * the pipelined MEMREAD loop (Select, Capture, 16 x Shift, Exit1, Update,
//    Run-Test-Idle: 21 cycles per 16-byte block) gives one request per block
//    and valid data on every pass;
//  * the pipelined MEMWRITE loop (Select, Capture, 20 x Shift, Exit1,
//    Update, back to Select: 24 cycles per block) writes each block once.
module tb_t0_sip;
  import t0_pkg::*;
  logic clk = 1'b0;
  logic tms = 1'b1;
  logic [7:0] tdi = '0, tdo;
  logic [7:0] tohost = 8'h5A, fromhost_wdata;
  logic fromhost_we, intfromhost, suspend, icfrz, icinv, run_issue;
  logic [5:0] ic_opcode = 6'h2B;
  logic ic_hit = 1'b1;
  logic [31:0] pc = 32'hDEAD_1234;
  logic req_valid, req_write, req_icwrite, mem_rvalid = 1'b0;
  logic [31:0] req_addr;
  logic [127:0] req_wdata, mem_rdata = '0;
  tap_state_e tap_state;
  int checks = 0, failures = 0;
  int cyc = 0;

  t0_sip dut (.*);

  always #5 clk = ~clk;
  int upd_cyc = 0;
  always @(posedge clk) begin
    if (tap_state == TAP_UPDATE_DR) upd_cyc = cyc;
    cyc++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request monitor: records the cycle of every memory request
  int n_req = 0, req_cyc = 0;
  logic [31:0] last_addr;
  logic [127:0] last_wdata;
  logic last_write, last_icw;
  logic [127:0] memblk;
  int rd_pend = -1;
  always @(posedge clk) begin
    mem_rvalid <= 1'b0;
    if (req_valid) begin
      n_req++;
      req_cyc    <= cyc - 1;
      last_addr  <= req_addr;
      last_wdata <= req_wdata;
      last_write <= req_write;
      last_icw   <= req_icwrite;
      if (!req_write && !req_icwrite) rd_pend <= 0;
    end
    // memory model: return the block two cycles after the request
    if (rd_pend == 0) begin
      mem_rvalid <= 1'b1;
      mem_rdata  <= memblk;
      rd_pend    <= -1;
    end
  end

  logic [7:0] out_bytes [32];

  task automatic tick(input logic t, input logic [7:0] d, output logic [7:0] o);
    @(negedge clk);
    tms = t; tdi = d;
    #1 o = tdo;
    @(posedge clk);
    #1;
  endtask

  task automatic tick0(input logic t);
    logic [7:0] o;
    tick(t, 8'h00, o);
  endtask

  task automatic scan_ir(input logic [3:0] ins, output logic [7:0] cap);
    tick0(1); tick0(1); tick0(0); tick0(0);   // Sel-DR Sel-IR Cap-IR Shift-IR
    tick(1, {4'h0, ins}, cap);                // shift, -> Exit1-IR
    tick0(1); tick0(0);                       // Update-IR, -> Run-Test-Idle
  endtask

  // DR scan of n bytes from Run-Test-Idle; ends in Run-Test-Idle unless
  // stay_sel, in which case it goes Update-DR -> Select-DR
  task automatic scan_dr(input int n, input logic [7:0] din [32]);
    tick0(1); tick0(0); tick0(0);             // Sel-DR Cap-DR Shift-DR
    for (int i = 0; i < n; i++) tick(i == n-1, din[i], out_bytes[i]);
    tick0(1); tick0(0);
  endtask

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [7:0] din [32];
    logic [7:0] cap;
    int n0;
    // ---------------------------------------------- reset: 6 x tms=1
    repeat (6) tick0(1);
    tick0(0);
    check(tap_state == TAP_IDLE, "idle after reset");
    foreach (din[i]) din[i] = 8'hA0 + 8'(i);
    scan_dr(1, din);
    check(out_bytes[0] == 8'h01, "BYPASS captures 0x01");
    // ---------------------------------------------- SIPIO
    scan_ir(SIP_SIPIO, cap);
    check(cap == 8'h01, "Capture-IR presets 0x01");
    din[0] = 8'h3C;
    fork
      begin scan_dr(1, din); end
      begin
        @(posedge fromhost_we);
        #1 check(fromhost_wdata == 8'h3C, "fromhost value");
      end
    join
    check(out_bytes[0] == 8'h5A, "SIPIO captures tohost");
    // ---------------------------------------------- TESTIO
    scan_ir(SIP_TESTIO, cap);
    din[0] = 8'h05;
    scan_dr(1, din);
    check(out_bytes[0] == {1'b0, 1'b1, 6'h2B}, "TESTIO captures testresult");
    check(suspend && !icfrz && icinv, "testcntl written");
    din[0] = 8'h00;
    scan_dr(1, din);
    check(!suspend && !icinv, "testcntl cleared");
    // ---------------------------------------------- INTWRITE
    scan_ir(SIP_INTWRITE, cap);
    din[0] = 8'h01;
    scan_dr(1, din);
    check(out_bytes[0] == 8'h01, "INTWRITE captures 0x01");
    check(intfromhost, "intfromhost set");
    din[0] = 8'h00;
    scan_dr(1, din);
    check(!intfromhost, "intfromhost cleared");
    // ---------------------------------------------- MEMWRITE
    scan_ir(SIP_MEMWRITE, cap);
    for (int i = 0; i < 16; i++) din[i] = 8'h10 + 8'(i);
    din[16] = 8'h12; din[17] = 8'h34; din[18] = 8'h56; din[19] = 8'h70;
    n0 = n_req;
    scan_dr(20, din);
    repeat (2) tick0(0);
    check(n_req == n0 + 1, "one MEMWRITE request");
    check(req_cyc == upd_cyc + 1, "MEMWRITE request one cycle after Update-DR");
    check(last_write && !last_icw && last_addr == 32'h1234_5670, "MEMWRITE address");
    for (int i = 0; i < 16; i++)
      check(last_wdata[8*i +: 8] == 8'h10 + 8'(i), "MEMWRITE data byte");
    // ---------------------------------------------- ICWRITE
    scan_ir(SIP_ICWRITE, cap);
    n0 = n_req;
    scan_dr(20, din);
    repeat (2) tick0(0);
    check(n_req == n0 + 1 && last_icw && !last_write, "ICWRITE request");
    // ---------------------------------------------- MEMREAD
    scan_ir(SIP_MEMREAD, cap);
    for (int i = 0; i < 16; i++) memblk[8*i +: 8] = 8'hC0 + 8'(i);
    din[0] = 8'h00; din[1] = 8'h00; din[2] = 8'h20; din[3] = 8'h40;
    n0 = n_req;
    scan_dr(4, din);
    repeat (3) tick0(0);
    check(n_req == n0 + 1 && !last_write && !last_icw, "MEMREAD request");
    check(req_cyc == upd_cyc + 1, "MEMREAD request one cycle after Update-DR");
    check(last_addr == 32'h0000_2040, "MEMREAD address");
    foreach (din[i]) din[i] = 8'h00;
    scan_dr(20, din);
    for (int i = 0; i < 16; i++)
      check(out_bytes[i] == 8'hC0 + 8'(i), "MEMREAD data byte order");
    check({out_bytes[16], out_bytes[17], out_bytes[18], out_bytes[19]} == pc,
          "MEMREAD returns PC, MSB first");
    // ------------------------- pipelined MEMREAD loop: 21 cycles per block
    begin
      int t0c, t1c;
      for (int i = 0; i < 16; i++) memblk[8*i +: 8] = 8'h80 + 8'(i);
      // Select-DR from Run-Test-Idle
      tick0(1);
      n0 = n_req;
      t0c = cyc;
      for (int blk = 0; blk < 2; blk++) begin
        tick0(0); tick0(0);                    // Capture, Shift
        for (int i = 0; i < 16; i++)
          tick(i == 15, (i >= 12) ? 8'(i) : 8'h00, out_bytes[i]);
        tick0(1);                              // Update-DR
        tick0(0);                              // -> Run-Test-Idle
        tick0(1);                              // -> Select-DR
      end
      t1c = cyc;
      check(t1c - t0c == 2 * 21, "pipelined MEMREAD loop is 21 cycles");
      check(n_req == n0 + 2, "one request per MEMREAD loop");
      for (int i = 0; i < 16; i++)
        check(out_bytes[i] == 8'h80 + 8'(i), "pipelined MEMREAD data");
      tick0(0); tick0(1); tick0(1); tick0(0);  // Capture, Exit1, Update, RTI
    end
    // ------------------------- pipelined MEMWRITE loop: 24 cycles per block
    scan_ir(SIP_MEMWRITE, cap);
    begin
      int t0c, t1c;
      logic [7:0] ob;
      logic [7:0] wb [2][20];
      for (int blk = 0; blk < 2; blk++) begin
        for (int i = 0; i < 16; i++) wb[blk][i] = 8'($urandom);
        wb[blk][16] = 8'h00; wb[blk][17] = 8'h00; wb[blk][18] = 8'h3A;
        wb[blk][19] = blk == 0 ? 8'h50 : 8'h60;
      end
      tick0(1);                                // Run-Test-Idle -> Select-DR
      n0 = n_req;
      t0c = cyc;
      for (int blk = 0; blk < 2; blk++) begin
        tick0(0);                              // Select-DR -> Capture
        if (blk == 1) begin                    // block 0 was requested in Select-DR
          check(n_req == n0 + 1 && last_write && last_addr == 32'h0000_3A50, "first MEMWRITE of the loop");
          for (int i = 0; i < 16; i++) check(last_wdata[8*i +: 8] == wb[0][i], "MEMWRITE loop data, block 0");
        end
        tick0(0);                              // Capture -> Shift
        for (int i = 0; i < 20; i++) tick(i == 19, wb[blk][i], ob);
        tick0(1);                              // Exit1 -> Update-DR
        tick0(1);                              // Update-DR -> Select-DR
      end
      t1c = cyc;
      check(t1c - t0c == 2 * 24, $sformatf("pipelined MEMWRITE loop is 24 cycles (%0d)", (t1c - t0c) / 2));
      tick0(1);                                // Select-DR -> Select-IR
      check(n_req == n0 + 2 && last_write && last_addr == 32'h0000_3A60, "one MEMWRITE per loop");
      for (int i = 0; i < 16; i++) check(last_wdata[8*i +: 8] == wb[1][i], "MEMWRITE loop data, block 1");
      tick0(1); tick0(0);                      // Test-Logic-Reset, Run-Test-Idle
    end
    // ---------------------------------------------- RUNCPU
    scan_ir(SIP_TESTIO, cap);
    din[0] = 8'h01;
    scan_dr(1, din);
    check(suspend, "suspended");
    scan_ir(SIP_RUNCPU, cap);
    begin
      int grants;
      grants = 0;
      // three cycles in Run-Test-Idle
      for (int i = 0; i < 3; i++) begin
        @(negedge clk); tms = 1'b0;
        @(posedge clk); #1;
        if (run_issue) grants++;
      end
      @(negedge clk); tms = 1'b1;   // leave Run-Test-Idle
      @(posedge clk); #1;
      if (run_issue) grants++;
      @(negedge clk); tms = 1'b1;
      @(posedge clk); #1;
      if (run_issue) grants++;
      // grants: the first RTI cycle here follows the Update-IR->RTI step
      check(grants == 4, $sformatf("RUNCPU grants %0d", grants));
    end
    repeat (6) tick0(1);
    tick0(0);
    check(suspend == 1'b0, "Test-Logic-Reset clears testcntl");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

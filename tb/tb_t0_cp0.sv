// tb_t0_cp0: checks the system coprocessor register behaviour and exception
// processing against values worked out by hand from the T0 rules:
// reset state, register read/write masks, count/compare timer interrupt,
// sticky vector address error flag, external interrupt sampling, interrupt
// priority and vectors, synchronous exception priority, epc/bd for branch
// delay slots, CE and badvaddr, the KU/IE stack on exception and rfe.
module tb_t0_cp0;
  import t0_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic mtc0_we = 0;
  logic [4:0] mtc0_addr = 0, mfc0_addr = 0;
  logic [31:0] mtc0_wdata = 0, mfc0_rdata;
  logic fromhost_we = 0;
  logic [7:0] fromhost_wdata = 0, tohost;
  logic intfromhost = 0;
  logic vu_adderr = 0;
  logic [31:0] vu_adderr_pc = 0, vu_adderr_addr = 0;
  logic [1:0] extintb = 2'b11;
  logic m_valid = 0, m_bd = 0, rfe = 0;
  logic [31:0] m_pc = 0, m_badvaddr = 0;
  sync_exc_t m_exc = '0;
  logic [1:0] m_ce = 0;
  logic exc_take, kuc, int_pending;
  logic [31:0] exc_vector, count;
  logic [3:0] cu;
  int checks = 0, failures = 0;

  t0_cp0 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic mtc0(input logic [4:0] r, input logic [31:0] v);
    @(negedge clk);
    mtc0_we = 1; mtc0_addr = r; mtc0_wdata = v;
    @(negedge clk);
    mtc0_we = 0;
  endtask

  logic [31:0] rv [4];
  task automatic rd(input logic [4:0] r, input int k);
    mfc0_addr = r;
    #1;
    rv[k] = mfc0_rdata;
  endtask

  // present an instruction at M for one cycle; returns whether it trapped
  task automatic at_m(input logic [31:0] pc, input logic bd, input sync_exc_t e,
                      output logic took, output logic [31:0] vec);
    @(negedge clk);
    m_valid = 1; m_pc = pc; m_bd = bd; m_exc = e;
    #1 took = exc_take; vec = exc_vector;
    @(negedge clk);
    m_valid = 0; m_exc = '0;
  endtask

  initial begin
    logic took;
    logic [31:0] vec, c1, c2;
    sync_exc_t e;
    repeat (2) @(negedge clk);
    rst = 0;
    #1;
    rd(CP0_STATUS, 0);
    check(rv[0][1:0] == 2'b00, "reset kuc=iec=0");
    check(kuc == 1'b0, "reset kernel mode");
    check(tohost == 8'h00, "reset tohost");
    // reset sequence
    mtc0(CP0_COUNT, 0);
    mtc0(CP0_COMPARE, 0);
    mtc0(CP0_CAUSE, 0);
    mtc0(CP0_STATUS, 32'hFFFF_FFFF);
    rd(CP0_STATUS, 0);
    check(rv[0] == 32'h5000_F83F, "status write mask");
    check(cu == 4'b0101, "cu1, cu3 wired to 0");
    mtc0(CP0_STATUS, 32'h0000_0000);
    mtc0(CP0_TOHOST, 32'h0000_01A5);
    rd(CP0_TOHOST, 0);
    check(rv[0] == 32'hA5 && tohost == 8'hA5, "tohost 8 bits");
    mtc0(CP0_EPC, 32'h1234);
    rd(CP0_PRID, 0);
    check(rv[0] == 32'h0, "prid implementation 0");
    rd(5'd5, 0); rd(5'd20, 1);
    check(rv[0] == 0 && rv[1] == 0, "unused registers read 0");
    // fromhost
    @(negedge clk); fromhost_we = 1; fromhost_wdata = 8'h77;
    @(negedge clk); fromhost_we = 0;
    rd(CP0_FROMHOST, 0);
    check(rv[0] == 32'h77, "fromhost");
    // count increments once per cycle
    rd(CP0_COUNT, 0);
    c1 = rv[0];
    repeat (5) @(negedge clk);
    rd(CP0_COUNT, 0);
    c2 = rv[0];
    check(c2 - c1 == 5, "count increments per cycle");
    // timer: compare = count + 10
    rd(CP0_COUNT, 0);
    mtc0(CP0_COMPARE, rv[0] + 10);
    repeat (4) @(negedge clk);
    rd(CP0_CAUSE, 0);
    check(rv[0][15] == 1'b0, "ip7 clear before match");
    repeat (10) @(negedge clk);
    rd(CP0_CAUSE, 0);
    check(rv[0][15] == 1'b1, "ip7 set on count == compare");
    repeat (3) @(negedge clk);
    rd(CP0_CAUSE, 0);
    check(rv[0][15] == 1'b1, "ip7 sticky");
    mtc0(CP0_COMPARE, 32'hFFFF_0000);
    rd(CP0_CAUSE, 0);
    check(rv[0][15] == 1'b0, "compare write clears ip7");
    // count written then compare = count+1 next cycle: immediate interrupt
    @(negedge clk);
    mtc0_we = 1; mtc0_addr = CP0_COUNT; mtc0_wdata = 32'd100;
    @(negedge clk);
    mtc0_addr = CP0_COMPARE; mtc0_wdata = 32'd101;
    @(negedge clk);
    mtc0_we = 0;
    @(negedge clk);
    rd(CP0_CAUSE, 0);
    check(rv[0][15] == 1'b1, "count then compare+1 flags at once");
    mtc0(CP0_COMPARE, 32'hFFFF_0000);
    // vector address error: sticky ip5, vuepc, vubadvaddr
    @(negedge clk); vu_adderr = 1; vu_adderr_pc = 32'h2000; vu_adderr_addr = 32'h8000_0010;
    @(negedge clk); vu_adderr = 0;
    repeat (3) @(negedge clk);
    rd(CP0_CAUSE, 0);
    check(rv[0][13] == 1'b1, "ip5 sticky");
    rd(CP0_VUEPC, 0); rd(CP0_VUBADVADDR, 1);
    check(rv[0] == 32'h2000 && rv[1] == 32'h8000_0010, "vuepc/vubadvaddr");
    mtc0(CP0_CAUSE, 32'hFFFF_FFFF);
    rd(CP0_CAUSE, 0); rd(CP0_CAUSE, 1);
    check(rv[0][13] == 1'b1 && rv[1][15] == 1'b0 && rv[1][10:8] == 3'b0, "only ip5 writable");
    mtc0(CP0_CAUSE, 0);
    rd(CP0_CAUSE, 0);
    check(rv[0][13] == 1'b0, "ip5 cleared by cause write");
    // external interrupt pins: inverted clocked copies
    @(negedge clk); extintb = 2'b10;
    rd(CP0_CAUSE, 0);
    check(rv[0][12] == 1'b0, "ip4 registered, not combinational");
    @(negedge clk);
    rd(CP0_CAUSE, 0);
    check(rv[0][12:11] == 2'b10, "ip4 follows extintb[0]");
    // interrupts disabled (iec=0): no exception
    at_m(32'h400, 0, '0, took, vec);
    check(!took, "no interrupt with iec=0");
    // enable im4, im3, iec; user mode
    mtc0(CP0_STATUS, 32'h0000_1803);
    check(kuc == 1'b1, "user mode");
    at_m(32'h404, 0, '0, took, vec);
    check(took && vec == 32'h1200, "ext0 vector");
    rd(CP0_STATUS, 0);
    check(rv[0][5:0] == 6'b001100, "KU/IE stack pushed");
    rd(CP0_EPC, 0); rd(CP0_CAUSE, 1);
    check(rv[0] == 32'h404 && rv[1][31] == 1'b0, "epc for interrupt");
    // rfe pops
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    rd(CP0_STATUS, 0);
    check(rv[0][5:0] == 6'b000011, "rfe pops stack");
    // ext1 lower priority than ext0
    @(negedge clk); extintb = 2'b00; @(negedge clk);
    at_m(32'h408, 0, '0, took, vec);
    check(took && vec == 32'h1200, "ext0 over ext1");
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    @(negedge clk); extintb = 2'b01; @(negedge clk);
    at_m(32'h40C, 0, '0, took, vec);
    check(took && vec == 32'h1300, "ext1 vector");
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    extintb = 2'b11;
    // internal interrupts over external: timer (ip7) and host (ip6)
    mtc0(CP0_STATUS, 32'h0000_F803);
    @(negedge clk); extintb = 2'b10;
    rd(CP0_COUNT, 0);
    mtc0(CP0_COMPARE, rv[0] + 3);
    repeat (5) @(negedge clk);
    at_m(32'h500, 1, '0, took, vec);
    rd(CP0_CAUSE, 0);
    check(took && vec == 32'h1100 && rv[0][6:2] == EXC_TINT, "timer over external");
    rd(CP0_EPC, 0); rd(CP0_CAUSE, 1);
    check(rv[0] == 32'h4FC && rv[1][31], "bd: epc = branch");
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    intfromhost = 1;
    @(negedge clk); vu_adderr = 1; @(negedge clk); vu_adderr = 0;
    at_m(32'h504, 0, '0, took, vec);
    rd(CP0_CAUSE, 0);
    check(took && rv[0][6:2] == EXC_HINT, "host interrupt highest");
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    intfromhost = 0;
    at_m(32'h508, 0, '0, took, vec);
    rd(CP0_CAUSE, 0);
    check(took && rv[0][6:2] == EXC_VINT, "vector interrupt over timer");
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    // interrupt beats synchronous exception
    e = '0; e.sys = 1;
    at_m(32'h50C, 0, e, took, vec);
    rd(CP0_CAUSE, 0);
    check(took && rv[0][6:2] == EXC_VINT, "interrupt over sync exception");
    @(negedge clk); rfe = 1; @(negedge clk); rfe = 0;
    mtc0(CP0_CAUSE, 0);
    mtc0(CP0_COMPARE, 32'hFFFF_0000);
    extintb = 2'b11;
    mtc0(CP0_STATUS, 32'h0000_0001);
    @(negedge clk);
    // synchronous exception priority
    e = '0; e.ades = 1; e.ov = 1; e.ri = 1;
    at_m(32'h600, 0, e, took, vec);
    rd(CP0_CAUSE, 0);
    check(took && vec == 32'h1100 && rv[0][6:2] == EXC_RI, "RI over Ov over AdES");
    e = '0; e.adel = 1; e.vue = 1;
    at_m(32'h604, 0, e, took, vec);
    rd(CP0_CAUSE, 0);
    check(rv[0][6:2] == EXC_VUE, "VUE over AdEL");
    e = '0; e.adel = 1; m_badvaddr = 32'hBAD0_0001;
    at_m(32'h608, 0, e, took, vec);
    rd(CP0_CAUSE, 0); rd(CP0_BADVADDR, 1);
    check(rv[0][6:2] == EXC_ADEL && rv[1] == 32'hBAD0_0001, "AdEL badvaddr");
    e = '0; e.cpu = 1; e.sys = 1; m_ce = 2'd2;
    at_m(32'h60C, 0, e, took, vec);
    rd(CP0_CAUSE, 0); rd(CP0_CAUSE, 1);
    check(rv[0][6:2] == EXC_CPU && rv[1][29:28] == 2'd2, "CpU with CE");
    e = '0; e.adef = 1; e.cpu = 1;
    at_m(32'h610, 0, e, took, vec);
    rd(CP0_CAUSE, 0);
    check(rv[0][6:2] == EXC_ADEF, "AdEF highest");
    rd(CP0_STATUS, 0);
    check(rv[0][5:0] == 6'b000000, "stack after nested exceptions");
    // reset
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    rd(CP0_STATUS, 0);
    check(kuc == 0 && rv[0][0] == 0 && tohost == 0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

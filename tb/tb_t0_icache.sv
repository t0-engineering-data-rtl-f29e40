// tb_t0_icache: fetches random instruction streams (sequential runs, jumps and
// addresses that conflict in the direct-mapped array) through the cache, with
// a memory model that answers every granted prefetch or refill two cycles
// later, as the memory pipeline does.  The prefetch grant is random (the port
// is sometimes taken by others) and the refill grant is sometimes delayed (SIP
// holding the port).  A reference tag array predicts hits; the testbench checks
// every delivered instruction, a zero penalty on hits, 2 stall cycles on a
// miss whose prefetch was granted and 3 plus the refill wait otherwise.  It
// also checks icinv (every fetch misses), icfrz (every fetch hits, no memory
// requests) and ICWRITE (a written line hits with the written data).
module tb_t0_icache;
  import t0_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic f_valid = 0, f_ready, miss, hit;
  logic [31:0] f_pc = 0, f_instr;
  logic [5:0] opcode;
  logic icfrz = 0, icinv = 0, icw_valid = 0;
  logic [31:0] icw_addr = 0;
  logic [127:0] icw_data = 0;
  logic pf_valid, pf_gnt, ic_valid, ic_gnt, ic_rvalid;
  logic [27:0] pf_addr, ic_addr;
  logic [127:0] rdata;
  int checks = 0, failures = 0;

  t0_icache dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 12) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  function automatic logic [31:0] word_at(input logic [31:0] addr);
    return {4'b0, addr[27:2], 2'b00} ^ 32'h5A00_0000;  // top 4 bits not decoded
  endfunction

  // memory model: grants decided n_before the edge, data two cycles later
  logic port_taken, sip_hold;
  logic g1, g2;
  logic [27:0] ga1, ga2;
  assign pf_gnt = pf_valid && !port_taken && !ic_valid;
  assign ic_gnt = ic_valid && !sip_hold;
  always_ff @(posedge clk) begin
    g1  <= pf_gnt || ic_gnt;
    ga1 <= ic_gnt ? ic_addr : pf_addr;
    g2  <= g1;
    ga2 <= ga1;
  end
  assign ic_rvalid = g2;
  always_comb for (int w = 0; w < 4; w++) rdata[32*w +: 32] = word_at({ga2, 4'(w * 4)});
  int n_req;
  always @(posedge clk) if (pf_gnt || ic_gnt) n_req++;

  // reference cache
  logic [17:0] rtag [64];
  logic rvalid_l [64];
  int pen_hist [8];

  task automatic fetch(input logic [31:0] pc, input int mode, input logic [31:0] exp_word);
    // mode 0: normal, 1: icinv, 2: icfrz
    int stalls, wait_ic;
    logic pf_first;
    logic exp_hit;
    exp_hit = (rvalid_l[pc[9:4]] && rtag[pc[9:4]] == pc[27:10] && mode == 0) || mode == 2;
    f_valid = 1; f_pc = pc;
    port_taken = ($urandom % 3) == 0;
    sip_hold = 0;
    stalls = 0; wait_ic = 0;
    #1;
    pf_first = pf_gnt;
    while (!f_ready && stalls < 40) begin
      @(negedge clk);
      port_taken = 1;
      sip_hold = ($urandom % 3) == 0;
      #1;
      if (ic_valid && !ic_gnt) wait_ic++;
      stalls++;
    end
    check(f_instr == exp_word, $sformatf("instr at %h: %h expected %h", pc, f_instr, exp_word));
    if (exp_hit) check(stalls == 0, $sformatf("hit penalty %0d at %h", stalls, pc));
    else check(stalls == (pf_first ? 2 : 3 + wait_ic), $sformatf("miss penalty %0d (wait %0d) at %h", stalls, wait_ic, pc));
    if (stalls < 8) pen_hist[stalls]++;
    if (mode != 2) begin
      rvalid_l[pc[9:4]] = mode == 0;
      rtag[pc[9:4]] = pc[27:10];
    end
    @(negedge clk);
    f_valid = 0;
  endtask

  initial begin
    logic [31:0] pc;
    int n_before;
    port_taken = 0; sip_hold = 0;
    for (int i = 0; i < 64; i++) rvalid_l[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    pc = 32'h1000;
    for (int i = 0; i < 3000; i++) begin
      case ($urandom % 8)
        0: pc = {4'($urandom), 18'($urandom % 4), 6'($urandom), 4'($urandom)} & 32'hFFFF_FFFC;
        1: pc = pc ^ 32'h0000_0400;   // same line, other tag
        default: pc = pc + 4;
      endcase
      fetch(pc, 0, word_at(pc));
    end
    check(pen_hist[0] > 100 && pen_hist[2] > 50 && pen_hist[3] > 50, "all penalty kinds seen");
    $display("penalties: hit %0d, 2-cycle %0d, 3-cycle %0d", pen_hist[0], pen_hist[2], pen_hist[3]);
    // icinv: everything misses
    icinv = 1;
    for (int i = 0; i < 20; i++) begin
      pc = 32'h1000 + 4 * (i % 4);
      fetch(pc, 1, word_at(pc));
    end
    icinv = 0;
    // ICWRITE a line then fetch it
    @(negedge clk);
    icw_valid = 1; icw_addr = 32'h0003_4560; icw_data = {32'hD3, 32'hD2, 32'hD1, 32'hD0};
    @(negedge clk);
    icw_valid = 0; icw_data = '0;
    @(negedge clk);
    rvalid_l[6'h16] = 1; rtag[6'h16] = 18'h0003_4560 >> 10;
    for (int w = 0; w < 4; w++) fetch(32'h0003_4560 + 4 * w, 0, 32'hD0 + w);
    // icfrz: hits on whatever is there, no memory traffic
    icfrz = 1;
    n_before = n_req;
    fetch(32'h0007_4568, 2, 32'hD2);
    fetch(32'hF000_0564, 2, 32'hD1);
    check(n_req == n_before, "no requests while frozen");
    icfrz = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

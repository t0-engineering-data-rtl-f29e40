// tb_t0_memif: drives random requests on all four ports of the memory pipeline
// against a pipelined SRAM model on the pins, and checks against a reference
// model: the fixed priority SIP > refill > exec > prefetch, prefetch only on an
// idle port, the pin phases (address/type in cycle t, rw/bwenb/data in t+1),
// byte enables shaped by weninb, killed writes leaving memory untouched, and
// read data returned with the right valid flag in cycle t+2.
module tb_t0_memif;
  import t0_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic sip_valid = 0, sip_write = 0, sip_icwrite = 0;
  logic [31:0] sip_addr = 0;
  logic [127:0] sip_wdata = 0;
  logic sip_rvalid, ic_valid = 0, pf_valid = 0, ic_gnt, pf_gnt, ic_rvalid;
  logic [27:0] ic_addr = 0, pf_addr = 0;
  mem_req_t ex_req;
  logic ex_kill = 0, ex_gnt, ex_rvalid;
  logic [127:0] rdata;
  logic [27:0] a;
  logic nkrwb, id, ku, rw, d_oe;
  logic [15:0] bwenb;
  logic [1:0] weninb = 2'b00;
  logic [127:0] d_out, d_in;
  mreq_src_e src;
  logic port_busy;
  int checks = 0, failures = 0;

  t0_memif dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  // SRAM model: 16 blocks of 16 bytes; address latched at the end of the
  // address phase, read data driven and write performed in the data phase
  // (the write is done by the main loop, once the pins have settled).
  logic [7:0] mem [16][16];
  logic [7:0] ref_mem [16][16];
  logic [3:0] a_q;
  always_ff @(posedge clk) a_q <= a[3:0];
  always_comb for (int i = 0; i < 16; i++) d_in[8*i +: 8] = mem[a_q][i];

  // expected transactions
  typedef struct {
    int kind;          // 0 none 1 sip 2 ic 3 ex 4 pf
    logic write;
    logic kill;
    logic [3:0] blk;
    logic [15:0] be;
    logic [1:0] wen;
    logic [127:0] wdata;
  } txn_t;
  txn_t p1, p2;        // data phase, read return phase
  int n_kind [5];

  initial begin
    txn_t t;
    logic [127:0] exp;
    for (int b = 0; b < 16; b++) for (int i = 0; i < 16; i++) begin
      mem[b][i] = 8'($urandom); ref_mem[b][i] = mem[b][i];
    end
    ex_req = '0;
    p1 = '{default: 0}; p2 = '{default: 0};
    repeat (2) @(negedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // drive requests for this cycle
      @(negedge clk);
      sip_valid = ($urandom % 8) == 0;
      sip_write = $urandom; sip_icwrite = !sip_write && ($urandom % 3 == 0);
      sip_addr = {24'h0, 4'($urandom), 4'($urandom)};
      sip_wdata = {$urandom, $urandom, $urandom, $urandom};
      ic_valid = ($urandom % 6) == 0; ic_addr = 28'($urandom % 16);
      pf_valid = ($urandom % 2) == 0; pf_addr = 28'($urandom % 16);
      if (!ex_req.valid || ex_gnt || ($urandom % 8 == 0)) begin
        ex_req.valid = ($urandom % 2) == 0;
        ex_req.write = $urandom; ex_req.kernel = $urandom;
        ex_req.addr = 28'($urandom % 16); ex_req.be = 16'($urandom);
        ex_req.wdata = {$urandom, $urandom, $urandom, $urandom};
      end
      // data phase of the previous access: kill and weninb
      ex_kill = p1.kind == 3 && ($urandom % 4 == 0);
      weninb = ($urandom % 4 == 0) ? 2'($urandom) : 2'b00;
      p1.kill = ex_kill;
      p1.wen = weninb;
      #1;
      // expected grant
      t = '{default: 0};
      if (sip_valid) begin
        t.kind = 1; t.write = sip_write; t.blk = sip_addr[7:4]; t.be = '1; t.wdata = sip_wdata;
        if (sip_icwrite) t.kind = 5;
      end else if (ic_valid) begin t.kind = 2; t.blk = ic_addr[3:0]; end
      else if (ex_req.valid) begin
        t.kind = 3; t.write = ex_req.write; t.blk = ex_req.addr[3:0]; t.be = ex_req.be;
        t.wdata = ex_req.wdata;
      end else if (pf_valid) begin t.kind = 4; t.blk = pf_addr[3:0]; end
      check(ic_gnt == (t.kind == 2) && ex_gnt == (t.kind == 3) && pf_gnt == (t.kind == 4),
            $sformatf("grants kind=%0d ic=%0b ex=%0b pf=%0b", t.kind, ic_gnt, ex_gnt, pf_gnt));
      if (t.kind != 0) begin
        check(a[3:0] == t.blk, "address phase a");
        check(nkrwb == t.write, "nkrwb");
        check(id == (t.kind == 2 || t.kind == 4 || t.kind == 5), "id");
        if (t.kind == 3) check(ku == !ex_req.kernel, "ku");
      end
      check(port_busy == (t.kind inside {1, 2, 3, 5}), "port_busy");
      // read return for p2
      check(sip_rvalid == (p2.kind == 1 && !p2.write), "sip_rvalid");
      check(ic_rvalid == (p2.kind == 2 || p2.kind == 4), "ic_rvalid");
      check(ex_rvalid == (p2.kind == 3 && !p2.write), "ex_rvalid");
      if ((p2.kind inside {1, 2, 3, 4}) && !p2.write) begin
        for (int i = 0; i < 16; i++) exp[8*i +: 8] = ref_mem[p2.blk][i];
        check(rdata == exp, $sformatf("read data kind %0d blk %0d p1 kind %0d w %0b blk %0d", p2.kind, p2.blk, p1.kind, p1.write, p1.blk));
      end
      // data phase pins for p1
      if (p1.write && !(p1.kind == 3 && p1.kill)) begin
        check(!rw && d_oe && d_out == p1.wdata, "write data phase");
        for (int i = 0; i < 16; i++) begin
          check(bwenb[i] == !(p1.be[i] && !p1.wen[i/8]), $sformatf("bwenb[%0d]", i));
          if (p1.be[i] && !p1.wen[i/8]) ref_mem[p1.blk][i] = p1.wdata[8*i +: 8];
        end
      end else begin
        check(rw && bwenb == 16'hFFFF && !d_oe, "no write in data phase");
      end
      // SRAM write in the middle of the data phase
      if (!rw) for (int i = 0; i < 16; i++) if (!bwenb[i]) mem[a_q][i] = d_out[8*i +: 8];
      n_kind[t.kind == 5 ? 1 : t.kind]++;
      p2 = p1;
      p1 = t;
    end
    for (int k = 1; k < 5; k++) check(n_kind[k] > 50, $sformatf("kind %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_t0_vu_cregs: checks the vector unit control registers with a reference
// model: ctc2/cfc2 of vlr, vcond, vovf and vsat, vrev and vcount reads, the
// illegal register numbers, vlr reset to 0 and the vlr > 32 length error, and
// random flag writes from the two vector arithmetic units (vcond bits replaced,
// vovf and vsat bits ORed in, only inside the row mask).
module tb_t0_vu_cregs;
  import t0_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ctc2_we = 0;
  logic [4:0] ctc2_addr = 0, cfc2_addr = 0;
  logic [31:0] ctc2_wdata = 0, cfc2_rdata, count = 32'h1234_5678;
  logic ctc2_illegal, cfc2_illegal, vlr_err;
  vflag_wr_t fw [2];
  logic [7:0] vlr;
  logic [31:0] vcond, vovf, vsat;
  logic [31:0] mc, mo, ms;
  int checks = 0, failures = 0;

  t0_vu_cregs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic ctc2(input logic [4:0] r, input logic [31:0] v);
    @(negedge clk);
    ctc2_we = 1; ctc2_addr = r; ctc2_wdata = v;
    @(negedge clk);
    ctc2_we = 0;
  endtask

  task automatic cfc2(input logic [4:0] r, output logic [31:0] v);
    cfc2_addr = r;
    #1 v = cfc2_rdata;
  endtask

  initial begin
    logic [31:0] v;
    fw[0] = '0; fw[1] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(vlr == 0 && !vlr_err, "vlr reset to 0");
    cfc2(VCR_VREV, v);   check(v == 32'h0, "vrev");
    cfc2(VCR_VCOUNT, v); check(v == count && !cfc2_illegal, "vcount reads the cycle counter");
    for (int r = 0; r < 32; r++) begin
      cfc2_addr = 5'(r);
      #1 check(cfc2_illegal == !(r inside {0, 1, 2, 4, 8, 12}), $sformatf("cfc2 illegal %0d", r));
      ctc2_addr = 5'(r); ctc2_we = 1;
      #1 check(ctc2_illegal == !(r inside {0, 1, 2, 4, 8, 12}), $sformatf("ctc2 illegal %0d", r));
      ctc2_we = 0;
    end
    for (int n = 0; n <= 40; n++) begin
      ctc2(VCR_VLR, n);
      cfc2(VCR_VLR, v);
      check(v == n && vlr == n && vlr_err == (n > 32), $sformatf("vlr %0d", n));
    end
    ctc2(VCR_VCOND, 32'h0); ctc2(VCR_VOVF, 32'h0); ctc2(VCR_VSAT, 32'h0);
    mc = 0; mo = 0; ms = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int u = 0; u < 2; u++) begin
        fw[u] = vflag_wr_t'({$urandom, $urandom});
        if (u == 1 && fw[1].row == fw[0].row) fw[1].row = fw[0].row + 1;
        for (int e = 0; e < 8; e++)
          if (fw[u].mask[e]) begin
            if (fw[u].cond_we) mc[8*fw[u].row+e] = fw[u].bits[e];
            if (fw[u].ovf_we) mo[8*fw[u].row+e] |= fw[u].bits[e];
            if (fw[u].sat_we) ms[8*fw[u].row+e] |= fw[u].bits[e];
          end
      end
      if (i % 97 == 0) begin
        ctc2_we = 1; ctc2_addr = VCR_VOVF; ctc2_wdata = 32'h0;
        fw[0].ovf_we = 0; fw[1].ovf_we = 0;
        mo = 0;
      end
      @(negedge clk);
      ctc2_we = 0;
      fw[0] = '0; fw[1] = '0;
      check(vcond == mc && vovf == mo && vsat == ms, $sformatf("flags %0d", i));
      cfc2(VCR_VCOND, v); check(v == mc, "cfc2 vcond");
      cfc2(VCR_VSAT, v);  check(v == ms, "cfc2 vsat");
    end
    ctc2(VCR_VSAT, 32'hA5A5_0F0F);
    check(vsat == 32'hA5A5_0F0F, "ctc2 vsat");
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    check(vlr == 0 && vsat == 32'hA5A5_0F0F, "reset clears vlr only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

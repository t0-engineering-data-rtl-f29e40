// tb_t0_vmp: random vector loads and stores (byte, halfword, word; signed and
// unsigned; contiguous, strided, including negative strides, and indexed; vector
// lengths 1..32; random base alignment) against a byte-array memory model and
// a register-file model.  The memory port model grants randomly and returns
// load data two cycles after each grant, like the memory pipeline.  Checks
// the final register and memory contents against a per-element reference, the
// number of memory cycles (aligned blocks touched for contiguous transfers,
// one per element for strided and indexed), the time an indexed transfer keeps
// the unit busy when the port is free (3 + vlr cycles for loads,
// 2 + ceil(vlr/8) + vlr for stores), and address errors (misaligned element,
// user-mode kernel address): adderr with the PC and faulting address, and no
// memory written at or after the faulting element.  Extract and insert
// (vext.v, vins.s, vext.s) with random indices, lengths and port denials are
// checked against the register model, together with their cycle counts on a
// free port (ceil(vlr/8), ceil(vlr/4), or one more for a misaligned index that
// crosses a 4-element boundary; one cycle for the scalar forms), the scalar
// result returned two cycles after the grant, and xvue for indices out of
// range.
module tb_t0_vmp;
  import t0_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic issue = 0, store = 0, is_unsigned = 0, strided = 0, indexed = 0, kernel = 1;
  logic [3:0] ireg = 0;
  vm_op_e op = VM_MEM;
  logic [31:0] xindex = 0, xscalar = 0, xs_data;
  logic xvue, xreq, xgnt, xs_valid;
  logic [1:0] size = 0;
  logic [31:0] base = 0, stride = 0, pc = 0;
  logic [3:0] vreg = 0;
  logic [7:0] vlr = 0;
  logic busy, active, adderr;
  logic [31:0] adderr_pc, adderr_addr;
  mem_req_t req;
  logic gnt, rvalid;
  logic [127:0] rdata;
  logic [3:0] rd_reg [2];
  logic [1:0] rd_row [2];
  vrow_t rd_data [2];
  logic wr_en [2];
  logic [3:0] wr_reg [2];
  logic [1:0] wr_row [2];
  logic [7:0] wr_mask [2];
  vrow_t wr_data [2];
  int checks = 0, failures = 0;

  t0_vmp dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  // memory: 4 KB, addresses taken modulo 4 KB
  logic [7:0] mem [4096];
  logic [31:0] rf [16][32];
  logic deny;
  int n_gnt;
  assign gnt = req.valid && !deny;
  assign xgnt = xreq && !deny;
  logic g1, g2;
  logic [127:0] d1, d2;
  always_comb for (int p = 0; p < 2; p++) for (int e = 0; e < 8; e++)
    rd_data[p][e] = rf[rd_reg[p]][8*rd_row[p]+e];
  always @(posedge clk) begin
    g1 <= gnt && !req.write;
    for (int i = 0; i < 16; i++) d1[8*i +: 8] <= mem[{req.addr[7:0], 4'(i)}];
    g2 <= g1;
    d2 <= d1;
    if (gnt) begin
      n_gnt <= n_gnt + 1;
      if (req.write) for (int i = 0; i < 16; i++)
        if (req.be[i]) mem[{req.addr[7:0], 4'(i)}] <= req.wdata[8*i +: 8];
    end
    for (int p = 0; p < 2; p++)
      if (wr_en[p] && wr_reg[p] != 0)
        for (int e = 0; e < 8; e++) if (wr_mask[p][e]) rf[wr_reg[p]][8*wr_row[p]+e] <= wr_data[p][e];
  end
  assign rvalid = g2;
  assign rdata = d2;

  int n_kind [10];

  task automatic run_one(input int kind);
    // kind: 0 normal, 1 misaligned, 2 kernel address in user mode
    logic [7:0] smem [4096];
    logic [31:0] srf [16][32];
    logic s_st, s_un, s_sd, s_ix;
    logic [3:0] s_ir;
    logic [1:0] s_sz;
    logic [31:0] s_base, s_stride, a, v, err_addr;
    logic [3:0] s_vr;
    int n, esz, blocks, last_blk, bsz, cycles, err_e, gn0, startup;
    logic saw_err;
    s_st = $urandom; s_un = $urandom; s_sd = $urandom % 3 == 0;
    s_ix = !s_sd && $urandom % 2 == 0;
    s_sz = 2'($urandom % 3);
    esz = 1 << s_sz;
    n = 1 + $urandom % 32;
    s_vr = 4'(1 + $urandom % 15);
    s_ir = 4'(1 + ($urandom % 14 + int'(s_vr)) % 15);   // never s_vr
    s_base = 32'(($urandom % 4096) & ~(esz - 1));
    if (s_sd) begin
      s_stride = 32'(esz * ($urandom % 8));
      if ($urandom % 3 == 0) s_stride = -s_stride;
    end else s_stride = 0;
    err_e = -1;
    for (int r = 1; r < 16; r++) for (int e = 0; e < 32; e++) rf[r][e] = $urandom;
    if (s_ix) for (int e = 0; e < 32; e++) begin
      rf[s_ir][e] = 32'(($urandom % 4096) & ~(esz - 1));
      if (kind != 2 && $urandom % 2 == 0) rf[s_ir][e] = rf[s_ir][e] - 32'd4096;
    end
    if (kind == 1 && s_sz != 0 && s_ix) begin
      if (n < 2) n = 2;
      err_e = 1 + $urandom % (n - 1);
      rf[s_ir][err_e] = rf[s_ir][err_e] | 32'h1;
    end else if (kind == 1 && s_sz != 0) begin
      if (s_sd) begin s_stride = s_stride | 32'h1; err_e = 1; end
      else begin s_base = s_base | 32'h1; err_e = 0; end
      if (s_sd && n < 2) n = 2;
    end
    if (kind == 2) begin
      s_base = s_base | 32'h8000_0000;
      err_e = 0;
    end
    for (int i = 0; i < 4096; i++) mem[i] = 8'($urandom);
    smem = mem; srf = rf;
    @(negedge clk);
    issue = 1; op = VM_MEM; store = s_st; is_unsigned = s_un; strided = s_sd; indexed = s_ix; ireg = s_ir;
    size = s_sz; base = s_base;
    stride = s_stride; vreg = s_vr; vlr = 8'(n); pc = $urandom; kernel = kind != 2;
    deny = kind == 3 ? 1'b0 : ($urandom % 4 == 0);
    gn0 = n_gnt;
    @(negedge clk);
    issue = 0; indexed = $urandom; ireg = $urandom; base = $urandom; vlr = 8'($urandom); size = 2'($urandom); stride = $urandom;
    cycles = 0;
    saw_err = 0;
    while (busy && cycles < 200) begin
      deny = kind == 3 ? 1'b0 : ($urandom % 4 == 0);
      #1 if (adderr) saw_err = 1;
      @(negedge clk);
      cycles++;
    end
    deny = 0;
    repeat (4) begin
      #1 if (adderr) begin
        saw_err = 1; err_addr = adderr_addr;
        check(adderr_pc == pc, "adderr pc");
      end
      @(negedge clk);
    end
    // reference
    blocks = 0; last_blk = -1;
    bsz = (s_sz == 0) ? 8 : 16;
    for (int e = 0; e < n; e++) begin
      a = s_ix ? s_base + srf[s_ir][e] : s_base + 32'(e) * (s_sd ? s_stride : 32'(esz));
      if (err_e >= 0 && e >= err_e) begin
        if (e == err_e) check(saw_err && err_addr == a, $sformatf("adderr address %h expected %h", err_addr, a));
        break;
      end
      if (s_sd || s_ix) blocks++;
      else if (int'(a / bsz) != last_blk) begin blocks++; last_blk = a / bsz; end
      if (s_st) begin
        v = srf[s_vr][e];
        for (int b = 0; b < esz; b++) smem[a[11:0] + 12'(b)] = v[8*b +: 8];
      end else if (s_vr != 0) begin
        v = 0;
        for (int b = 0; b < esz; b++) v[8*b +: 8] = smem[a[11:0] + 12'(b)];
        if (!s_un && s_sz == 0) v = 32'($signed(v[7:0]));
        if (!s_un && s_sz == 1) v = 32'($signed(v[15:0]));
        srf[s_vr][e] = v;
      end
    end
    if (err_e < 0) begin
      check(!saw_err, "no address error");
      check(n_gnt - gn0 == blocks, $sformatf("%0d memory cycles, expected %0d (size %0d strided %0b n %0d base %h)",
                                        n_gnt - gn0, blocks, s_sz, s_sd, n, s_base));
      startup = !s_ix ? 0 : s_st ? 2 + (n + 7) / 8 : 3;
      if (kind == 3) check(cycles == startup + blocks,
                           $sformatf("busy %0d cycles with free port, expected %0d (indexed %0b store %0b n %0d)",
                                     cycles, startup + blocks, s_ix, s_st, n));
    end
    check(mem == smem, $sformatf("memory after %s size %0d strided %0b n %0d", s_st ? "store" : "load", s_sz, s_sd, n));
    check(rf == srf, $sformatf("registers after %s size %0d uns %0b strided %0b n %0d base %h",
                               s_st ? "store" : "load", s_sz, s_un, s_sd, n, s_base));
    if (s_ix) n_kind[8 + int'(s_st)]++;
    else n_kind[{s_st, s_sd}]++;
    if (err_e >= 0) n_kind[4 + kind]++;
  endtask

  int n_x [4];

  task automatic run_x();
    logic [31:0] srf [16][32];
    logic [31:0] s_idx, s_sc, got;
    logic [3:0] s_vd, s_vt;
    vm_op_e s_op;
    int n, cycles, expc, nval, free;
    logic bad, saw_vue;
    s_op = vm_op_e'(1 + $urandom % 3);
    n = $urandom % 33;
    s_idx = $urandom % 32;
    if (s_op == VM_EXTV) begin
      case ($urandom % 4)
        0: s_idx = 8 * ($urandom % 4);
        1: s_idx = 4 * ($urandom % 8);
        default: ;
      endcase
      if ($urandom % 8 != 0 && s_idx + n > 32) n = 32 - s_idx;
    end
    if ($urandom % 10 == 0) s_idx = 32 + $urandom % 40;
    bad = s_op == VM_EXTV ? (s_idx >= 32 || s_idx + n > 32) : s_idx >= 32;
    s_vd = 4'(1 + $urandom % 15);
    s_vt = 4'(1 + ($urandom % 14 + int'(s_vd)) % 15);
    s_sc = $urandom;
    free = $urandom % 2;
    for (int r = 1; r < 16; r++) for (int e = 0; e < 32; e++) rf[r][e] = $urandom;
    srf = rf;
    @(negedge clk);
    issue = 1; op = s_op; xindex = s_idx; xscalar = s_sc; vreg = s_vd; ireg = s_vt; vlr = 8'(n);
    store = $urandom; indexed = $urandom; strided = $urandom;
    deny = free ? 1'b0 : ($urandom % 3 == 0);
    #1 saw_vue = xvue;
    check(xvue == bad, $sformatf("xvue %0b for op %0d index %0d vlr %0d", xvue, s_op, s_idx, n));
    @(negedge clk);
    issue = 0; op = vm_op_e'($urandom); xindex = $urandom; vlr = 8'($urandom);
    cycles = 0; nval = 0;
    while (busy && cycles < 100) begin
      deny = free ? 1'b0 : ($urandom % 3 == 0);
      #1 if (xs_valid) begin nval++; got = xs_data; end
      @(negedge clk);
      cycles++;
    end
    deny = 0;
    repeat (4) begin
      #1 if (xs_valid) begin nval++; got = xs_data; end
      @(negedge clk);
    end
    if (!bad) begin
      case (s_op)
        VM_EXTV: begin
          for (int i = 0; i < n; i++) srf[s_vd][i] = srf[s_vt][s_idx + i];
          expc = s_idx % 8 == 0 ? (n + 7) / 8 : (n + 3) / 4;
          if (s_idx % 4 != 0 && s_idx % 4 + n > 4) expc++;
        end
        VM_INSS: begin srf[s_vd][s_idx] = s_sc; expc = 1; end
        default: begin
          expc = 1;
          check(nval == 1 && got == srf[s_vt][s_idx], $sformatf("vext.s value %h expected %h", got, srf[s_vt][s_idx]));
        end
      endcase
      if (free) check(cycles == expc, $sformatf("op %0d index %0d vlr %0d: %0d cycles, expected %0d",
                                                s_op, s_idx, n, cycles, expc));
      n_x[s_op]++;
    end else begin
      check(cycles == 0, "nothing started after xvue");
      n_x[0]++;
    end
    if (s_op != VM_EXTS) check(nval == 0, "no scalar result");
    check(rf == srf, $sformatf("registers after op %0d index %0d vlr %0d", s_op, s_idx, n));
  endtask

  initial begin
    deny = 0;
    for (int r = 0; r < 16; r++) for (int e = 0; e < 32; e++) rf[r][e] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1200; i++) run_one(i % 10 == 7 ? 1 : i % 10 == 8 ? 2 : i % 10 == 9 ? 3 : 0);
    for (int i = 0; i < 1500; i++) run_x();
    // a vext.v right behind a load waits for the load's data to be written
    for (int i = 0; i < 50; i++) begin
      run_one(0);
      run_x();
    end
    for (int k = 0; k < 4; k++) check(n_x[k] > 20, $sformatf("extract/insert case %0d exercised", k));
    for (int k = 0; k < 10; k++) if (k != 4 && k != 7) check(n_kind[k] > 10, $sformatf("case %0d exercised", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_t0_vau: runs random vector arithmetic instructions (every operation,
// vector and scalar operands, random vector lengths 0..32, random stalls)
// through a VP0 instance (with multiplier) and a VP1 instance (without)
// connected to a register-file model, and compares the destination register
// and the flags with a per-element reference computed in the testbench.
// Also checks the timing: busy for ceil(vlr/8)-1 cycles after issue, the first
// row written at the end of the second cycle after issue (so an instruction
// issued three cycles after its producer reads the new row - chaining after two
// delay cycles), flags one cycle after the row, and FXMUL refused by VP1.
module tb_t0_vau;
  import t0_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  int checks = 0, failures = 0;

  // two units sharing one register-file model
  logic stall [2];
  logic issue [2];
  vau_op_e op [2];
  logic [3:0] vs [2], vt [2], vd [2];
  logic a_scalar [2], b_scalar [2];
  logic [31:0] scalar [2];
  logic [7:0] vlr [2];
  logic [4:0] shamt [2];
  logic busy [2], active [2], illegal [2];
  logic [3:0] rd_reg [2][3];
  logic [1:0] rd_row [2][3];
  vrow_t rd_data [2][3];
  logic wr_en [2];
  logic [3:0] wr_reg [2];
  logic [1:0] wr_row [2];
  logic [7:0] wr_mask [2];
  vrow_t wr_data [2];
  vflag_wr_t fw [2];

  t0_vau #(.HAS_MUL(1'b1)) u0 (.clk, .rst, .stall(stall[0]), .issue(issue[0]), .op(op[0]),
    .vs(vs[0]), .vt(vt[0]), .vd(vd[0]), .a_scalar(a_scalar[0]), .b_scalar(b_scalar[0]),
    .scalar(scalar[0]), .vlr(vlr[0]), .shamt(shamt[0]), .busy(busy[0]), .active(active[0]),
    .illegal(illegal[0]), .rd_reg(rd_reg[0]), .rd_row(rd_row[0]), .rd_data(rd_data[0]),
    .wr_en(wr_en[0]), .wr_reg(wr_reg[0]), .wr_row(wr_row[0]), .wr_mask(wr_mask[0]),
    .wr_data(wr_data[0]), .fw(fw[0]));
  t0_vau #(.HAS_MUL(1'b0)) u1 (.clk, .rst, .stall(stall[1]), .issue(issue[1]), .op(op[1]),
    .vs(vs[1]), .vt(vt[1]), .vd(vd[1]), .a_scalar(a_scalar[1]), .b_scalar(b_scalar[1]),
    .scalar(scalar[1]), .vlr(vlr[1]), .shamt(shamt[1]), .busy(busy[1]), .active(active[1]),
    .illegal(illegal[1]), .rd_reg(rd_reg[1]), .rd_row(rd_row[1]), .rd_data(rd_data[1]),
    .wr_en(wr_en[1]), .wr_reg(wr_reg[1]), .wr_row(wr_row[1]), .wr_mask(wr_mask[1]),
    .wr_data(wr_data[1]), .fw(fw[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // register file model
  logic [31:0] rf [16][32];
  logic [31:0] fcond, fovf, fsat;
  int first_wr [2];
  int cyc;
  always_comb
    for (int u = 0; u < 2; u++)
      for (int p = 0; p < 3; p++)
        for (int e = 0; e < 8; e++) rd_data[u][p][e] = rf[rd_reg[u][p]][8*rd_row[u][p]+e];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int u = 0; u < 2; u++) begin
      if (wr_en[u]) begin
        if (first_wr[u] < 0) first_wr[u] = cyc;
        if (wr_reg[u] != 0)
          for (int e = 0; e < 8; e++) if (wr_mask[u][e]) rf[wr_reg[u]][8*wr_row[u]+e] <= wr_data[u][e];
      end
      for (int e = 0; e < 8; e++) if (fw[u].mask[e]) begin
        if (fw[u].cond_we) fcond[8*fw[u].row+e] <= fw[u].bits[e];
        if (fw[u].ovf_we)  fovf[8*fw[u].row+e]  <= fovf[8*fw[u].row+e] | fw[u].bits[e];
        if (fw[u].sat_we)  fsat[8*fw[u].row+e]  <= fsat[8*fw[u].row+e] | fw[u].bits[e];
      end
    end
  end

  // reference element operation: returns {write, flag_kind(2), flag, result}
  function automatic void ref_op(input vau_op_e o, input logic [31:0] a, input logic [31:0] b,
                                 input logic [31:0] c, input logic [4:0] sh,
                                 output logic [31:0] r, output logic f, output logic w);
    logic signed [32:0] s;
    logic signed [31:0] p;
    w = 1; f = 0; r = 0;
    case (o)
      VOP_ADD, VOP_ADDU: begin r = a + b; f = (a[31] == b[31]) && (r[31] != a[31]); end
      VOP_SUB, VOP_SUBU: begin r = a - b; f = (a[31] != b[31]) && (r[31] != a[31]); end
      VOP_FXADD, VOP_FXSUB: begin
        s = (o == VOP_FXADD) ? 33'($signed(a)) + 33'($signed(b)) : 33'($signed(a)) - 33'($signed(b));
        if (s > 33'sh0_7FFF_FFFF) begin r = 32'h7FFF_FFFF; f = 1; end
        else if (s < -33'sh0_8000_0000) begin r = 32'h8000_0000; f = 1; end
        else r = s[31:0];
      end
      VOP_FXMUL: begin
        p = 32'($signed(a[15:0])) * 32'($signed(b[15:0]));
        if (sh != 0) p = (p + (32'sd1 <<< (sh - 1))) >>> sh;
        if (p > 32767) begin r = 32767; f = 1; end
        else if (p < -32768) begin r = 32'hFFFF_8000; f = 1; end
        else r = p;
      end
      VOP_AND: r = a & b;
      VOP_OR:  r = a | b;
      VOP_XOR: r = a ^ b;
      VOP_NOR: r = ~(a | b);
      VOP_SLL: r = a << b[4:0];
      VOP_SRL: r = a >> b[4:0];
      VOP_SRA: r = $signed(a) >>> b[4:0];
      VOP_FLT:  begin w = 0; f = $signed(a) < $signed(b); end
      VOP_FLTU: begin w = 0; f = a < b; end
      VOP_FEQ:  begin w = 0; f = a == b; end
      VOP_CMVZ:  r = (b == 0) ? a : c;
      VOP_CMVNZ: r = (b != 0) ? a : c;
      default: ;
    endcase
  endfunction

  int n_ops [32];
  int n_illegal;

  task automatic run_one(input int u, input logic with_stall);
    logic [31:0] snap [16][32];
    logic [31:0] ec, eo, es, r, av, bv, cv;
    logic f, w;
    vau_op_e o;
    logic [3:0] s_vs, s_vt, s_vd;
    logic s_as, s_bs;
    logic [31:0] s_sc;
    logic [4:0] s_sh;
    int n, rows, busy_cycles, issue_cyc;
    o = vau_op_e'($urandom % 19);
    if (u == 1 && o == VOP_FXMUL && $urandom % 4 != 0) o = VOP_ADD;
    n = ($urandom % 6 == 0) ? 0 : 1 + $urandom % 32;
    if ($urandom % 3 == 0) n = 32;
    s_vs = 4'($urandom); s_vt = 4'($urandom); s_vd = 4'(1 + $urandom % 15);
    s_as = $urandom % 5 == 0; s_bs = !s_as && $urandom % 5 == 0;
    s_sc = $urandom % 2 ? $urandom % 40 : $urandom;
    s_sh = 5'($urandom);
    @(negedge clk);
    for (int i = 1; i < 16; i++) for (int e = 0; e < 32; e++) begin
      case ($urandom % 4)
        0: rf[i][e] = $urandom % 8;
        1: rf[i][e] = $urandom | 32'h7FFF_0000;
        2: rf[i][e] = 32'($signed(16'($urandom)));
        default: rf[i][e] = $urandom;
      endcase
    end
    fcond = $urandom; fovf = 0; fsat = 0;
    snap = rf;
    ec = fcond; eo = 0; es = 0;
    op[u] = o; vs[u] = s_vs; vt[u] = s_vt; vd[u] = s_vd; a_scalar[u] = s_as; b_scalar[u] = s_bs;
    scalar[u] = s_sc; vlr[u] = 8'(n); shamt[u] = s_sh;
    issue[u] = 1;
    first_wr[u] = -1;
    issue_cyc = cyc;
    #1;
    n_ops[o]++;
    if (u == 1 && o == VOP_FXMUL) begin
      check(illegal[1], "FXMUL refused by VP1");
      n_illegal++;
      @(negedge clk);
      issue[u] = 0;
      repeat (4) @(negedge clk);
      check(rf == snap, "refused FXMUL writes nothing");
      return;
    end
    check(!illegal[u], "legal issue");
    @(negedge clk);
    issue[u] = 0;
    vs[u] = 4'($urandom); vt[u] = 4'($urandom); vd[u] = 4'($urandom); vlr[u] = 8'($urandom);
    scalar[u] = $urandom; op[u] = vau_op_e'($urandom % 19);
    busy_cycles = 0;
    for (int k = 0; k < 12 || busy[u]; k++) begin
      #1;
      if (busy[u] && !stall[u]) busy_cycles++;
      @(negedge clk);
      stall[u] = with_stall && ($urandom % 3 == 0);
    end
    stall[u] = 0;
    repeat (4) @(negedge clk);
    rows = (n + 7) / 8;
    check(busy_cycles == (rows > 0 ? rows - 1 : 0),
          $sformatf("busy %0d cycles for vlr %0d", busy_cycles, n));
    if (!with_stall && n > 0 && o != VOP_FLT && o != VOP_FLTU && o != VOP_FEQ)
      check(first_wr[u] == issue_cyc + 2, $sformatf("first row written %0d cycles after issue",
                                                    first_wr[u] - issue_cyc));
    for (int e = 0; e < 32; e++) begin
      av = s_as ? s_sc : snap[s_vs][e];
      bv = s_bs ? s_sc : snap[s_vt][e];
      cv = snap[s_vd][e];
      ref_op(o, av, bv, cv, s_sh, r, f, w);
      if (e >= n) begin
        check(rf[s_vd][e] == snap[s_vd][e], $sformatf("element %0d beyond vlr untouched", e));
      end else begin
        if (w) check(rf[s_vd][e] == r, $sformatf("%s vlr %0d elem %0d: a=%h b=%h sh=%0d got %h expected %h",
                                                 o.name(), n, e, av, bv, s_sh, rf[s_vd][e], r));
        else check(rf[s_vd][e] == snap[s_vd][e], "compare leaves vd");
        if (o inside {VOP_FLT, VOP_FLTU, VOP_FEQ}) ec[e] = f;
        if (o inside {VOP_ADD, VOP_SUB}) eo[e] = f;
        if (o inside {VOP_FXADD, VOP_FXSUB, VOP_FXMUL}) es[e] = f;
      end
    end
    check(fcond == ec && fovf == eo && fsat == es,
          $sformatf("%s flags c %h/%h o %h/%h s %h/%h", o.name(), fcond, ec, fovf, eo, fsat, es));
  endtask

  // chaining: producer on VP1, consumer on VP0 issued three cycles later reads
  // the new rows of the producer
  task automatic chain_test();
    logic [31:0] snap [16][32];
    for (int i = 1; i < 16; i++) for (int e = 0; e < 32; e++) rf[i][e] = $urandom;
    @(negedge clk);
    snap = rf;
    op[1] = VOP_ADDU; vs[1] = 1; vt[1] = 2; vd[1] = 3; a_scalar[1] = 0; b_scalar[1] = 0; vlr[1] = 32;
    issue[1] = 1;
    @(negedge clk);
    issue[1] = 0;
    repeat (2) @(negedge clk);
    op[0] = VOP_XOR; vs[0] = 3; vt[0] = 4; vd[0] = 5; a_scalar[0] = 0; b_scalar[0] = 0; vlr[0] = 32;
    issue[0] = 1;
    @(negedge clk);
    issue[0] = 0;
    repeat (10) @(negedge clk);
    for (int e = 0; e < 32; e++)
      check(rf[5][e] == ((snap[1][e] + snap[2][e]) ^ snap[4][e]), $sformatf("chained element %0d", e));
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      stall[u] = 0; issue[u] = 0; op[u] = VOP_ADD; vs[u] = 0; vt[u] = 0; vd[u] = 0;
      a_scalar[u] = 0; b_scalar[u] = 0; scalar[u] = 0; vlr[u] = 0; shamt[u] = 0;
    end
    cyc = 0;
    for (int i = 0; i < 16; i++) for (int e = 0; e < 32; e++) rf[i][e] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 600; i++) run_one(i % 2, i % 3 == 0);
    chain_test();
    for (int o = 0; o < 19; o++) check(n_ops[o] > 0, $sformatf("op %0d exercised", o));
    check(n_illegal > 0, "illegal FXMUL exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// t0_vau: vector arithmetic functional unit of T0 (VP0 and VP1).
//
// Eight parallel 32-bit lanes process one register-file row (eight elements)
// per cycle, so an instruction on a vector of length vlr occupies the unit for
// ceil(vlr/8) cycles.  The pipeline has the four stages of the T0 vector
// arithmetic pipeline:
//   R   read the operand rows (combinational reads of t0_vregfile); the first
//       row is read in the issue cycle itself,
//   X1  multiplier, logic unit, shifters and adder (registered at the end),
//   X2  clipper / conditional move result, driven onto the write port and
//       written at the end of X2, so a dependent instruction issued three
//       cycles later (two delay cycles) reads the new row,
//   W   the condition, overflow and saturation flags of the row are presented
//       to the control registers one cycle after the row is written.
// Operands: a (vs), b (vt) and the old destination c (vd, for conditional
// moves).  Either a or b may be replaced by a broadcast scalar from the CPU.
// Elements at or beyond the vector length are neither written nor flagged;
// vlr is copied at issue, so later changes do not affect the instruction.
// VP0 has the 16x16 multiplier (HAS_MUL=1), VP1 does not.
//
// The operation set follows the units T0's pipeline has (adder with overflow,
// saturating fixed-point add/subtract/multiply, logic unit, left and right
// shifters, compares that write vcond, conditional move), but the operation
// encoding (t0_pkg::vau_op_e) and three details are this implementation's
// choices: FXMUL multiplies the low halfwords as signed numbers, rounds half up
// while shifting right by shamt and clips to the signed 16-bit range; FXADD and
// FXSUB clip to the signed 32-bit range; compares write only vcond, not vd.
//
// stall freezes every stage (the vector unit stops as a whole while the memory
// pipeline is taken by SIP or an I-cache refill).  busy is high while rows of
// the current instruction remain to be read; issue is accepted only when busy
// is low.  active marks a row in X1 doing useful work (performance monitor).
module t0_vau
  import t0_pkg::*;
#(
  parameter bit HAS_MUL = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  // issue
  input  logic        issue,
  input  vau_op_e     op,
  input  logic [3:0]  vs,
  input  logic [3:0]  vt,
  input  logic [3:0]  vd,
  input  logic        a_scalar,
  input  logic        b_scalar,
  input  logic [31:0] scalar,
  input  logic [7:0]  vlr,
  input  logic [4:0]  shamt,
  output logic        busy,
  output logic        active,
  output logic        illegal,     // FXMUL issued to a unit without multiplier
  // register file read ports: a, b, c
  output logic [3:0]  rd_reg [3],
  output logic [1:0]  rd_row [3],
  input  vrow_t       rd_data [3],
  // register file write port
  output logic        wr_en,
  output logic [3:0]  wr_reg,
  output logic [1:0]  wr_row,
  output logic [7:0]  wr_mask,
  output vrow_t       wr_data,
  // flags
  output vflag_wr_t   fw
);
  typedef struct packed {
    vau_op_e     op;
    logic [3:0]  vs, vt, vd;
    logic        a_sc, b_sc;
    logic [31:0] scalar;
    logic [7:0]  vlr;
    logic [4:0]  shamt;
  } instr_t;

  typedef struct packed {
    logic        valid;
    vau_op_e     op;
    logic [3:0]  vd;
    logic [1:0]  row;
    logic [7:0]  mask;
    logic [4:0]  shamt;
    vrow_t       a, b, c;
  } x1_t;

  typedef struct packed {
    logic        valid;
    logic        write;      // updates vd
    logic        cond_we, ovf_we, sat_we;
    logic [3:0]  vd;
    logic [1:0]  row;
    logic [7:0]  mask;
    vrow_t       res;
    logic [7:0]  flag;
  } x2_t;

  instr_t cur, rin;
  logic [2:0] row_q;          // next row to read
  logic [2:0] nrows_q;
  logic       seq_q;          // rows remain after the issue cycle
  logic [2:0] rrow;
  logic       rvalid;
  x1_t        x1;
  x2_t        x2;

  function automatic logic [2:0] rows_of(input logic [7:0] l);
    return (l == 8'd0) ? 3'd0 : 3'(((l > 8'd32 ? 8'd32 : l) + 8'd7) >> 3);
  endfunction

  assign busy    = seq_q;
  assign illegal = issue && !HAS_MUL && op == VOP_FXMUL;

  // instruction in the R stage this cycle
  always_comb begin
    if (seq_q) begin
      rin    = cur;
      rrow   = row_q;
      rvalid = 1'b1;
    end else begin
      rin    = '{op: op, vs: vs, vt: vt, vd: vd, a_sc: a_scalar, b_sc: b_scalar,
                 scalar: scalar, vlr: vlr, shamt: shamt};
      rrow   = 3'd0;
      rvalid = issue && !illegal && rows_of(vlr) != 3'd0;
    end
  end

  assign rd_reg[0] = rin.vs;
  assign rd_reg[1] = rin.vt;
  assign rd_reg[2] = rin.vd;
  assign rd_row[0] = rrow[1:0];
  assign rd_row[1] = rrow[1:0];
  assign rd_row[2] = rrow[1:0];

  // row sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      seq_q <= 1'b0;
    end else if (!stall) begin
      if (seq_q) begin
        row_q <= row_q + 3'd1;
        if (row_q + 3'd1 == nrows_q) seq_q <= 1'b0;
      end else if (rvalid) begin
        cur     <= rin;
        row_q   <= 3'd1;
        nrows_q <= rows_of(vlr);
        seq_q   <= rows_of(vlr) > 3'd1;
      end
    end
  end

  // R -> X1
  always_ff @(posedge clk) begin
    if (rst) begin
      x1.valid <= 1'b0;
    end else if (!stall) begin
      x1.valid <= rvalid;
      x1.op    <= rin.op;
      x1.vd    <= rin.vd;
      x1.row   <= rrow[1:0];
      x1.shamt <= rin.shamt;
      for (int e = 0; e < NLANES; e++) begin
        x1.mask[e] <= (8'(rrow) * 8'd8 + 8'(e)) < rin.vlr;
        x1.a[e]    <= rin.a_sc ? rin.scalar : rd_data[0][e];
        x1.b[e]    <= rin.b_sc ? rin.scalar : rd_data[1][e];
        x1.c[e]    <= rd_data[2][e];
      end
    end
  end

  // X1: lane arithmetic
  vrow_t      res;
  logic [7:0] flag;
  always_comb begin
    for (int e = 0; e < NLANES; e++) begin
      logic [31:0] a, b;
      logic [32:0] s;
      logic signed [31:0] p;
      logic signed [31:0] pr;
      a = x1.a[e];
      b = x1.b[e];
      s = '0;
      p = '0;
      pr = '0;
      res[e]  = '0;
      flag[e] = 1'b0;
      unique case (x1.op)
        VOP_ADD, VOP_ADDU: begin
          res[e]  = a + b;
          flag[e] = (a[31] == b[31]) && (res[e][31] != a[31]);
        end
        VOP_SUB, VOP_SUBU: begin
          res[e]  = a - b;
          flag[e] = (a[31] != b[31]) && (res[e][31] != a[31]);
        end
        VOP_FXADD, VOP_FXSUB: begin
          s = (x1.op == VOP_FXADD) ? ({a[31], a} + {b[31], b}) : ({a[31], a} - {b[31], b});
          if (s[32] != s[31]) begin
            res[e]  = s[32] ? 32'h8000_0000 : 32'h7FFF_FFFF;
            flag[e] = 1'b1;
          end else begin
            res[e]  = s[31:0];
          end
        end
        VOP_FXMUL: begin
          if (HAS_MUL) begin
            p  = $signed(a[15:0]) * $signed(b[15:0]);
            pr = (x1.shamt == 5'd0) ? p : ((p + (32'sd1 <<< (x1.shamt - 5'd1))) >>> x1.shamt);
            if (pr > 32'sd32767) begin
              res[e] = 32'd32767;  flag[e] = 1'b1;
            end else if (pr < -32'sd32768) begin
              res[e] = 32'hFFFF_8000; flag[e] = 1'b1;
            end else begin
              res[e] = pr;
            end
          end
        end
        VOP_AND:   res[e] = a & b;
        VOP_OR:    res[e] = a | b;
        VOP_XOR:   res[e] = a ^ b;
        VOP_NOR:   res[e] = ~(a | b);
        VOP_SLL:   res[e] = a << b[4:0];
        VOP_SRL:   res[e] = a >> b[4:0];
        VOP_SRA:   res[e] = $signed(a) >>> b[4:0];
        VOP_FLT:   flag[e] = $signed(a) < $signed(b);
        VOP_FLTU:  flag[e] = a < b;
        VOP_FEQ:   flag[e] = a == b;
        VOP_CMVZ:  res[e] = (b == 32'd0) ? a : x1.c[e];
        VOP_CMVNZ: res[e] = (b != 32'd0) ? a : x1.c[e];
        default: ;
      endcase
    end
  end

  // X1 -> X2
  always_ff @(posedge clk) begin
    if (rst) begin
      x2.valid <= 1'b0;
    end else if (!stall) begin
      x2.valid   <= x1.valid;
      x2.write   <= !(x1.op inside {VOP_FLT, VOP_FLTU, VOP_FEQ});
      x2.cond_we <= x1.op inside {VOP_FLT, VOP_FLTU, VOP_FEQ};
      x2.ovf_we  <= x1.op inside {VOP_ADD, VOP_SUB};
      x2.sat_we  <= x1.op inside {VOP_FXADD, VOP_FXSUB, VOP_FXMUL};
      x2.vd      <= x1.vd;
      x2.row     <= x1.row;
      x2.mask    <= x1.mask;
      x2.res     <= res;
      x2.flag    <= flag;
    end
  end

  assign active  = x1.valid && !stall;
  assign wr_en   = x2.valid && x2.write && !stall;
  assign wr_reg  = x2.vd;
  assign wr_row  = x2.row;
  assign wr_mask = x2.mask;
  assign wr_data = x2.res;

  // X2 -> W: flags one cycle after the row write
  always_ff @(posedge clk) begin
    if (rst) begin
      fw <= '0;
    end else if (!stall) begin
      fw.cond_we <= x2.valid && x2.cond_we;
      fw.ovf_we  <= x2.valid && x2.ovf_we;
      fw.sat_we  <= x2.valid && x2.sat_we;
      fw.row     <= x2.row;
      fw.mask    <= x2.mask;
      fw.bits    <= x2.flag;
    end else begin
      fw.cond_we <= 1'b0;
      fw.ovf_we  <= 1'b0;
      fw.sat_we  <= 1'b0;
    end
  end
endmodule

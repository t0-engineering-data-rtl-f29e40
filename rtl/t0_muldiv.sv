// t0_muldiv: T0 scalar integer multiplier / divider with the hi and lo registers.
//
// Multiply (32 x 32 -> 64, signed or unsigned) takes 18 cycles and divide
// (32 / 32 -> 32-bit quotient in lo, 32-bit remainder in hi) takes 33 cycles,
// the latencies T0 specifies: a mfhi/mflo may issue 17 cycles after a mult
// and 32 cycles after a div.  Both run in the background; busy tells the
// CPU's interlock that hi/lo are not yet valid.
//
// Multiplier: the issue edge latches the operand magnitudes and the result
// sign; sixteen radix-4 steps each add 0-3 times the shifted multiplicand to
// the accumulator; a last step applies the sign and writes hi/lo.  Result
// valid 18 cycles after the issue cycle.
// Divider: the issue edge latches the magnitudes; 32 restoring steps each
// produce one quotient bit, and the last one also applies the signs (the
// quotient is negative when the operand signs differ, the remainder takes the
// dividend's sign) and writes hi/lo.  Result valid 33 cycles after issue.
// Division by zero gives all-ones quotient magnitude and the dividend as
// remainder; the instruction set leaves that case undefined.
//
// mthi / mtlo write their register at the next edge.  Starting a new operation
// while one is in progress abandons the old one.  The radix-4 and restoring
// algorithms are this implementation's choice; only the cycle counts come from
// the T0 specification.
module t0_muldiv (
  input  logic        clk,
  input  logic        rst,
  input  logic        mul_start,
  input  logic        div_start,
  input  logic        is_signed,
  input  logic [31:0] a,          // rs: multiplicand / dividend
  input  logic [31:0] b,          // rt: multiplier / divisor
  input  logic        mthi,
  input  logic        mtlo,
  input  logic [31:0] wdata,
  output logic [31:0] hi,
  output logic [31:0] lo,
  output logic        busy
);
  typedef enum logic [1:0] {M_IDLE, M_MUL, M_MULFIX, M_DIV} md_state_e;

  md_state_e   st;
  logic [5:0]  cnt;
  logic        neg_q, neg_r;
  logic [63:0] acc, mcand;
  logic [31:0] mplier;
  logic [32:0] rem;
  logic [31:0] quo, dvs;

  logic [31:0] a_mag, b_mag;
  assign a_mag = (is_signed && a[31]) ? -a : a;
  assign b_mag = (is_signed && b[31]) ? -b : b;

  // one restoring step
  logic [32:0] rem_sh, rem_sub;
  logic        q_bit;
  assign rem_sh  = {rem[31:0], quo[31]};
  assign rem_sub = rem_sh - {1'b0, dvs};
  assign q_bit   = !rem_sub[32];

  assign busy = (st != M_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_IDLE;
    end else if (mul_start) begin
      st     <= M_MUL;
      cnt    <= 6'd0;
      acc    <= '0;
      mcand  <= {32'b0, a_mag};
      mplier <= b_mag;
      neg_q  <= is_signed && (a[31] ^ b[31]);
    end else if (div_start) begin
      st    <= M_DIV;
      cnt   <= 6'd0;
      rem   <= '0;
      quo   <= a_mag;
      dvs   <= b_mag;
      neg_q <= is_signed && (a[31] ^ b[31]);
      neg_r <= is_signed && a[31];
    end else begin
      unique case (st)
        M_MUL: begin
          acc    <= acc + mcand * 64'(mplier[1:0]);
          mcand  <= mcand << 2;
          mplier <= mplier >> 2;
          cnt    <= cnt + 6'd1;
          if (cnt == 6'd15) st <= M_MULFIX;
        end
        M_MULFIX: begin
          {hi, lo} <= neg_q ? -acc : acc;
          st       <= M_IDLE;
        end
        M_DIV: begin
          rem <= q_bit ? rem_sub : rem_sh;
          quo <= {quo[30:0], q_bit};
          cnt <= cnt + 6'd1;
          if (cnt == 6'd31) begin
            lo <= neg_q ? -{quo[30:0], q_bit} : {quo[30:0], q_bit};
            hi <= neg_r ? -(q_bit ? rem_sub[31:0] : rem_sh[31:0])
                        :  (q_bit ? rem_sub[31:0] : rem_sh[31:0]);
            st <= M_IDLE;
          end
        end
        default: ;
      endcase
    end
    if (mthi) hi <= wdata;
    if (mtlo) lo <= wdata;
  end
endmodule

// t0_icache: T0 instruction cache and its miss-service engine.
//
// A 1 KB direct-mapped cache of 64 lines, each holding one 16-byte block of
// four instructions.  A fetch address is split into word (bits 3:2), line index
// (bits 9:4) and an 18-bit tag (bits 27:10); the top four address bits are
// ignored for tag matching.  Lookup is combinational: the fetch stage presents
// f_pc with f_valid and gets the instruction and f_ready in the same cycle on a
// hit.
//
// Prefetch and miss service: every cycle the fetch stage is looking up an
// address, the line is also offered to the memory pipeline as a prefetch
// (pf_valid); it is granted only when no SIP, refill or exec access wants the
// port.  On a miss whose prefetch was granted, the line returns two cycles
// later and is written into the cache and forwarded to the decode stage in the
// same cycle: a 2-cycle miss penalty.  If the prefetch was not granted, the
// engine spends one more cycle putting out a refill request (ic_valid, waiting
// for the port if SIP holds it), for the usual 3-cycle penalty.
//
// Test controls from SIP: icfrz freezes the cache (every lookup hits whatever
// the tag, and nothing is refilled) and overrides icinv; icinv clears all valid
// bits every cycle, so every fetch misses and reads external memory.  ICWRITE
// writes a line: line index from address bits 9:4, tag from bits 27:10, address
// and data taken with the request (icw_valid) and written into the array one
// cycle later, as the memory pipeline's data phase would.  The opcode field
// (bits 31:26) of the looked-up instruction and the tag-comparator output are
// provided for the SIP testresult register.
//
// Arrays are plain registers with no reset: lines become valid only through a
// refill or ICWRITE, and valid bits are cleared by icinv or by reset.  Clearing
// the valid bits on reset is this implementation's choice.
module t0_icache
  import t0_pkg::*;
#(
  parameter int unsigned LINES = 64          // 64 lines of 16 bytes = 1 KB
) (
  input  logic         clk,
  input  logic         rst,
  // fetch stage
  input  logic         f_valid,
  input  logic [31:0]  f_pc,
  output logic         f_ready,
  output logic [31:0]  f_instr,
  output logic         miss,          // fetch this cycle did not deliver
  output logic [5:0]   opcode,        // for SIP testresult
  output logic         hit,
  // SIP test controls and ICWRITE
  input  logic         icfrz,
  input  logic         icinv,
  input  logic         icw_valid,
  input  logic [31:0]  icw_addr,
  input  logic [127:0] icw_data,
  // memory pipeline
  output logic         pf_valid,
  output logic [27:0]  pf_addr,
  input  logic         pf_gnt,
  output logic         ic_valid,
  output logic [27:0]  ic_addr,
  input  logic         ic_gnt,
  input  logic         ic_rvalid,
  input  logic [127:0] rdata
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = 28 - 4 - IW;   // 18 for 64 lines

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WDATA, S_FILL} ic_state_e;

  logic [127:0]  data_q  [LINES];
  logic [TW-1:0] tag_q   [LINES];
  logic [LINES-1:0] valid_q;
  ic_state_e     st;
  logic [31:0]   miss_pc;

  logic [IW-1:0] idx;
  logic [TW-1:0] tag;
  logic          tag_hit;
  logic [127:0]  line;

  assign idx     = f_pc[4 +: IW];
  assign tag     = f_pc[4+IW +: TW];
  assign line    = data_q[idx];
  assign tag_hit = icfrz || (valid_q[idx] && tag_q[idx] == tag);

  assign hit    = tag_hit;
  assign opcode = line[32*f_pc[3:2] + 26 +: 6];

  // prefetch of the line being looked up, whenever idle
  assign pf_valid = f_valid && (st == S_IDLE) && !icfrz;
  assign pf_addr  = f_pc[31:4];
  assign ic_valid = (st == S_ISSUE);
  assign ic_addr  = miss_pc[31:4];

  always_comb begin
    f_ready = 1'b0;
    f_instr = line[32*f_pc[3:2] +: 32];
    if (st == S_IDLE) begin
      f_ready = f_valid && tag_hit;
    end else if (st == S_FILL && ic_rvalid) begin
      f_ready = 1'b1;
      f_instr = rdata[32*miss_pc[3:2] +: 32];
    end
  end
  assign miss = f_valid && !f_ready;

  // miss engine
  always_ff @(posedge clk) begin
    if (rst) begin
      st <= S_IDLE;
    end else begin
      unique case (st)
        S_IDLE:  if (f_valid && !tag_hit) begin
                   miss_pc <= f_pc;
                   st      <= pf_gnt ? S_WDATA : S_ISSUE;
                 end
        S_ISSUE: if (ic_gnt) st <= S_WDATA;
        S_WDATA: st <= S_FILL;
        S_FILL:  if (ic_rvalid) st <= S_IDLE;
        default: st <= S_IDLE;
      endcase
    end
  end

  // array writes: refill, and ICWRITE through a one-cycle register
  logic          icw_q;
  logic [31:0]   icw_addr_q;
  logic [127:0]  icw_data_q;
  logic [IW-1:0] fidx, widx;

  assign fidx = miss_pc[4 +: IW];
  assign widx = icw_addr_q[4 +: IW];

  always_ff @(posedge clk) begin
    icw_q      <= icw_valid && !rst;
    icw_addr_q <= icw_addr;
    icw_data_q <= icw_data;

    if (st == S_FILL && ic_rvalid) begin
      data_q[fidx] <= rdata;
      tag_q[fidx]  <= miss_pc[4+IW +: TW];
    end
    if (icw_q) begin
      data_q[widx] <= icw_data_q;
      tag_q[widx]  <= icw_addr_q[4+IW +: TW];
    end
  end

  always_ff @(posedge clk) begin
    if (rst || (icinv && !icfrz)) begin
      valid_q <= '0;
    end else begin
      if (st == S_FILL && ic_rvalid) valid_q[fidx] <= 1'b1;
      if (icw_q)                     valid_q[widx] <= 1'b1;
    end
  end
endmodule

// t0_vregfile: T0 vector register file.
//
// Sixteen vector registers of 32 elements of 32 bits.  Register 0 is hardwired
// to zero: it reads as zeros and writes to it are dropped, so only registers
// 1..15 are stored.  Each register is organised as four rows of eight elements;
// every port moves one row (the eight lanes' worth of elements) per cycle.
//
// The file is fully multi-ported, so that every operand of every functional
// unit has a port of its own and chaining needs no bypass network: NRD read
// ports and NWR write ports, each with a register number and a row number.
// Writes have a per-element mask, used for partial rows (vector length not a
// multiple of eight, word-wide memory transfers of four elements, strided
// transfers of one element).  Reads are combinational (the register read
// half-cycle of the pipelines), writes happen at the clock edge.  When two
// ports write the same element in one cycle the higher-numbered port wins; the
// dispatch rules keep this from happening.
//
// Port allocation in t0_top: ports 0-2 and 3-5 are the a, b and old-destination
// operands of VP0 and VP1, ports 6 and 7 the memory unit (two adjacent rows,
// since one memory block can straddle a row boundary); write ports 0 and 1
// are VP0 and VP1, ports 2 and 3 the memory unit.  The port counts and the write-collision rule
// are this implementation's choices.
module t0_vregfile
  import t0_pkg::*;
#(
  parameter int unsigned NREGS = 16,
  parameter int unsigned NRD   = 8,
  parameter int unsigned NWR   = 4
) (
  input  logic                    clk,
  input  logic [3:0]              rd_reg  [NRD],
  input  logic [1:0]              rd_row  [NRD],
  output vrow_t                   rd_data [NRD],
  input  logic                    wr_en   [NWR],
  input  logic [3:0]              wr_reg  [NWR],
  input  logic [1:0]              wr_row  [NWR],
  input  logic [NLANES-1:0]       wr_mask [NWR],
  input  vrow_t                   wr_data [NWR]
);
  vrow_t regs [1:NREGS-1][4];

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      if (rd_reg[p] == 4'd0 || int'(rd_reg[p]) >= int'(NREGS)) rd_data[p] = '0;
      else                                               rd_data[p] = regs[rd_reg[p]][rd_row[p]];
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++) begin
      if (wr_en[p] && wr_reg[p] != 4'd0 && int'(wr_reg[p]) < int'(NREGS)) begin
        for (int e = 0; e < NLANES; e++)
          if (wr_mask[p][e]) regs[wr_reg[p]][wr_row[p]][e] <= wr_data[p][e];
      end
    end
  end
endmodule

// t0_memif: memory pipeline arbiter and external memory interface of T0.
//
// T0 has one memory pipeline shared by four users.  Each cycle at most one
// access is started, chosen in fixed priority:
//   1. SIP MEMREAD / MEMWRITE / ICWRITE (host port),
//   2. instruction cache refill after a miss,
//   3. scalar or vector memory instruction (the "exec" port),
//   4. instruction prefetch of the line being fetched, only when the port is
//      otherwise idle.
// A loser simply is not granted; the exec port holds its request, which is a
// memory stall for the CPU or vector unit.
//
// Each access is pipelined over two cycles on the pins.  In the first cycle the
// 16-byte block address a[31:4] and the access type are driven: nkrwb (the
// access may be a write), id (instruction fetch) and ku (user mode; undefined
// for refills, driven 0 here).  In the second cycle rw (low only for a write
// that was not killed), the active-low byte write enables bwenb[15:0] and the
// write data are driven.  Each bwenb bit is also gated by the external
// active-low pulse weninb: weninb[0] shapes bytes 7:0, weninb[1] bytes 15:8.
// A write killed by an exception in its second cycle (kill) leaves the data bus
// undriven and rw high.  Read data on d_in in the second cycle is registered
// and handed back one cycle later with a valid flag for the port that asked.
//
// The data bus is split into d_in, d_out and d_oe because the bidirectional
// pads are not modelled.  The access type used on the pins for SIP accesses
// (kernel data access) and for ICWRITE (an instruction-type read cycle, whose
// data is ignored) is this implementation's choice.
//
// Timing: request and grant in cycle t (address phase), data phase t+1, read
// data with *_rvalid in t+2.
module t0_memif
  import t0_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // SIP
  input  logic         sip_valid,
  input  logic         sip_write,
  input  logic         sip_icwrite,
  input  logic [31:0]  sip_addr,
  input  logic [127:0] sip_wdata,
  output logic         sip_rvalid,
  // I-cache refill and prefetch
  input  logic         ic_valid,
  input  logic [27:0]  ic_addr,
  input  logic         pf_valid,
  input  logic [27:0]  pf_addr,
  output logic         ic_gnt,
  output logic         pf_gnt,
  output logic         ic_rvalid,     // data for a refill or prefetch
  // scalar / vector memory instructions
  input  mem_req_t     ex_req,
  input  logic         ex_kill,       // kill the write in its data phase
  output logic         ex_gnt,
  output logic         ex_rvalid,
  output logic [127:0] rdata,
  // external pins
  output logic [27:0]  a,
  output logic         nkrwb,
  output logic         id,
  output logic         ku,
  output logic         rw,
  output logic [15:0]  bwenb,
  input  logic [1:0]   weninb,
  output logic [127:0] d_out,
  output logic         d_oe,
  input  logic [127:0] d_in,
  // status
  output mreq_src_e    src,           // user of the address phase this cycle
  output logic         port_busy      // a SIP, refill or exec access this cycle
);
  logic         sip_go, ic_go, ex_go, pf_go;
  // data-phase registers
  mreq_src_e    dp_src;
  logic         dp_write, dp_rd;
  logic [15:0]  dp_be;
  logic [127:0] dp_wdata;
  // read return
  mreq_src_e    rr_src;
  logic         rr_valid;

  assign sip_go = sip_valid;
  assign ic_go  = ic_valid && !sip_go;
  assign ex_go  = ex_req.valid && !sip_go && !ic_go;
  assign pf_go  = pf_valid && !sip_go && !ic_go && !ex_req.valid;

  assign ic_gnt    = ic_go;
  assign pf_gnt    = pf_go;
  assign ex_gnt    = ex_go;
  assign port_busy = sip_go || ic_go || ex_go;

  always_comb begin
    src   = MREQ_NONE;
    a     = pf_addr;
    nkrwb = 1'b0;
    id    = 1'b1;
    ku    = 1'b0;
    if (sip_go) begin
      src   = MREQ_SIP;
      a     = sip_addr[31:4];
      nkrwb = sip_write;
      id    = sip_icwrite;
    end else if (ic_go) begin
      src   = MREQ_IC;
      a     = ic_addr;
    end else if (ex_go) begin
      src   = MREQ_EXEC;
      a     = ex_req.addr;
      nkrwb = ex_req.write;
      id    = 1'b0;
      ku    = !ex_req.kernel;
    end else if (pf_go) begin
      src   = MREQ_IC;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dp_write <= 1'b0;
      dp_rd    <= 1'b0;
      dp_src   <= MREQ_NONE;
    end else begin
      dp_src   <= src;
      dp_write <= (sip_go && sip_write) || (ex_go && ex_req.write);
      dp_rd    <= (sip_go && !sip_write && !sip_icwrite) || ic_go || pf_go ||
                  (ex_go && !ex_req.write);
    end
    dp_be    <= sip_go ? 16'hFFFF : ex_req.be;
    dp_wdata <= sip_go ? sip_wdata : ex_req.wdata;
  end

  // data phase
  logic wr_live;
  assign wr_live = dp_write && !(ex_kill && dp_src == MREQ_EXEC);
  assign rw      = !wr_live;
  assign d_oe    = wr_live;
  assign d_out   = dp_wdata;
  always_comb begin
    for (int i = 0; i < 16; i++)
      bwenb[i] = !(wr_live && dp_be[i]) || weninb[i/8];
  end

  // read return, one cycle after the data phase
  always_ff @(posedge clk) begin
    if (rst) rr_valid <= 1'b0;
    else     rr_valid <= dp_rd;
    rr_src <= dp_src;
    if (dp_rd) rdata <= d_in;
  end

  assign sip_rvalid = rr_valid && rr_src == MREQ_SIP;
  assign ic_rvalid  = rr_valid && rr_src == MREQ_IC;
  assign ex_rvalid  = rr_valid && rr_src == MREQ_EXEC;
endmodule

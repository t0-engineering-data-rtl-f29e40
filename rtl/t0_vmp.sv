// t0_vmp: vector memory functional unit (VMP) of T0: contiguous, strided and
// indexed vector loads and stores, and vector extract / insert.
//
// Moves vectors between the vector register file and the single 128-bit memory
// pipeline.  Element e of a vector lives at base + e*stride, where the stride
// is the element size for contiguous ("unit-stride") transfers.
//
// Contiguous transfers move, each cycle, all remaining elements that fall in
// one naturally aligned memory block: 8-byte blocks for bytes (limited by the
// eight register-file ports) and 16-byte blocks for halfwords (eight per
// cycle) and words (four per cycle).  The instruction therefore occupies the
// memory pipeline for the number of aligned blocks the vector touches, e.g.
// floor((base+4(vlr-1))/16) - floor(base/16) + 1 cycles for words.  Strided
// transfers move one element per cycle, vlr cycles.  Those are the occupancy
// rules T0 specifies; loads here are never slower than the block count (T0's
// own loads may take one more cycle because of register-row assembly).
//
// Indexed transfers move one element per cycle to base + vindex[e], where the
// index vector (register ireg) holds byte offsets.  As in T0 they start with
// three idle cycles while the first index reaches the address generator, so a
// load occupies the memory pipeline 3 + vlr cycles.  An indexed store shares
// one register-file read port between indices and data: after two start-up
// cycles it spends one cycle reading each group of eight indices, giving
// 2 + ceil(vlr/8) + vlr cycles.  (Indexed loads read the index row through the
// second read port, which contiguous transfers use for the next row.)  The
// idle start-up cycles make no memory request, so they neither stall the
// vector unit nor block other memory users.
//
// Pipeline: a memory request is presented every cycle the unit has work (the
// block address, and for stores the byte enables and data read from the
// register file in the same cycle); when the arbiter does not grant it (SIP or
// I-cache refill), the unit waits.  Load data returns two cycles after the
// grant and is sign- or zero-extended and written to the destination register
// (two write ports, because one block may straddle two register rows).
//
// Address errors: an element address that is not naturally aligned, or a
// user-mode access to the kernel segment (address bit 31 set), stops the
// instruction without touching memory at that address and raises adderr for
// one cycle with the instruction's PC and the faulting address; the CPU side
// records them in vuepc / vubadvaddr and sets cause.ip5.  Taking bit 31 as the
// kernel segment, and the operation encoding of the issue port, are this
// implementation's choices, as is taking indices as signed byte offsets added
// to the base.
//
// Extract and insert (op) move data through the unit's crossbar rather than
// to memory, but still occupy the memory pipeline: each of their cycles asks
// for it with xreq and proceeds on xgnt (no SIP access or cache refill in that
// cycle).  vext.v copies vt[rd+i] to vd[i] for i < vlr: eight elements a cycle
// when rd is a multiple of 8, otherwise four, plus one alignment cycle when rd
// is not a multiple of 4 and the elements cross a 4-element boundary.  vins.s
// writes a scalar into vd[rd] and vext.s returns vt[rd] to the CPU (xs_valid,
// two cycles after the granted cycle, like load data); each takes one cycle
// and ignores vlr.  An index outside the register (rd >= 32, or rd + vlr > 32
// for vext.v) raises xvue at issue and nothing is done.  Register numbers:
// vreg is the destination vd, ireg the source vt.  An extract or insert that
// follows a load waits until the load's last data is written (own choice: the
// two share the write port).  Element-level semantics of these instructions
// and the range rule are this implementation's reading.
module t0_vmp
  import t0_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // issue
  input  logic         issue,
  input  vm_op_e       op,
  input  logic [31:0]  xindex,      // extract / insert index (rd)
  input  logic [31:0]  xscalar,     // value inserted by vins.s
  output logic         xvue,        // extract / insert index out of range
  output logic         xreq,        // extract / insert wants the memory pipeline
  input  logic         xgnt,
  output logic         xs_valid,    // vext.s result
  output logic [31:0]  xs_data,
  input  logic         store,
  input  logic [1:0]   size,        // 0 byte, 1 halfword, 2 word
  input  logic         is_unsigned, // zero-extend loaded bytes / halfwords
  input  logic         strided,
  input  logic         indexed,     // element addresses base + vreg[ireg][e]
  input  logic [3:0]   ireg,        // index vector register of an indexed transfer
  input  logic [31:0]  base,
  input  logic [31:0]  stride,      // bytes between elements when strided
  input  logic [3:0]   vreg,        // load destination / store source
  input  logic [7:0]   vlr,
  input  logic [31:0]  pc,
  input  logic         kernel,
  output logic         busy,
  output logic         active,      // moved data this cycle
  output logic         adderr,
  output logic [31:0]  adderr_pc,
  output logic [31:0]  adderr_addr,
  // memory pipeline (exec port)
  output mem_req_t     req,
  input  logic         gnt,
  input  logic         rvalid,
  input  logic [127:0] rdata,
  // register file: two read ports and two write ports, rows r and r+1
  output logic [3:0]   rd_reg [2],
  output logic [1:0]   rd_row [2],
  input  vrow_t        rd_data [2],
  output logic         wr_en   [2],
  output logic [3:0]   wr_reg  [2],
  output logic [1:0]   wr_row  [2],
  output logic [7:0]   wr_mask [2],
  output vrow_t        wr_data [2]
);
  typedef struct packed {
    vm_op_e      op;
    logic [5:0]  xidx;
    logic [31:0] xsc;
    logic        store, uns, strided, indexed;
    logic [3:0]  ireg;
    logic [1:0]  size;
    logic [31:0] base, stride, pc;
    logic [3:0]  vreg;
    logic [5:0]  vlr;
    logic        kernel;
  } vm_instr_t;

  // a group of elements moved in one memory cycle
  typedef struct packed {
    logic        valid;
    logic [5:0]  e0;        // first element
    logic [5:0]  n;         // number of elements
    logic [3:0]  off;       // byte offset of element e0 in the 16-byte block
    logic [1:0]  size;
    logic        uns;
    logic        strided;
    logic [3:0]  vreg;
  } grp_t;

  vm_instr_t   ins;
  logic        run_q;
  logic [5:0]  e_q;          // next element
  logic [1:0]  su_q;         // indexed start-up cycles still to wait
  logic        ix_ok;        // indexed store: the current index row is in ix_q
  vrow_t       ix_q;         // indexed store: latched index row
  logic        ix_rd;        // indexed store: this cycle reads the index row
  logic        xfer;         // this cycle may make a memory request
  logic [31:0] idx;          // index of element e_q
  logic        isx;          // extract / insert in progress
  logic        xmove;        // extract / insert moves data this cycle
  logic [5:0]  xs0;          // source element of e_q (vext)
  logic [5:0]  xn;           // elements moved by vext.v this cycle
  logic        xbad, start;
  grp_t        g1, g2;
  logic        xs1_v, xs2_v;
  logic [31:0] xs1_d, xs2_d;

  // ---------------------------------------------------------- this group
  logic [31:0] ea, blk_end, esz;
  logic [5:0]  n, rem_e;
  logic        misal, kseg_err, err;

  always_comb begin
    isx      = ins.op != VM_MEM;
    xreq     = run_q && isx && !g1.valid && !g2.valid;
    xmove    = xreq && xgnt && su_q == 2'd0;
    xs0      = ins.xidx + e_q;
    xn       = (ins.xidx[2:0] == 3'd0) ? 6'd8 : 6'd4;
    if (xn > ins.vlr - e_q) xn = ins.vlr - e_q;
    unique case (op)
      VM_INSS, VM_EXTS: xbad = xindex >= 32'd32;
      VM_EXTV:          xbad = vlr > 8'd32 || xindex >= 32'd32 || xindex + 32'(vlr) > 32'd32;
      default:          xbad = 1'b0;
    endcase
    xvue     = issue && xbad;
    start    = issue && !run_q && !xbad &&
               (op == VM_INSS || op == VM_EXTS || (vlr != 8'd0 && vlr <= 8'd32));
    ix_rd    = !isx && ins.indexed && ins.store && su_q == 2'd0 && !ix_ok;
    xfer     = run_q && !isx && su_q == 2'd0 && !ix_rd;
    idx      = ins.store ? ix_q[e_q[2:0]] : rd_data[1][e_q[2:0]];
    esz      = 32'd1 << ins.size;
    ea       = ins.indexed ? ins.base + idx
             : ins.base + 32'(e_q) * (ins.strided ? ins.stride : esz);
    rem_e    = ins.vlr - e_q;
    misal    = (ins.size == 2'd1 && ea[0]) || (ins.size == 2'd2 && ea[1:0] != 2'b00);
    kseg_err = !ins.kernel && ea[31];
    err      = xfer && (misal || kseg_err);
    blk_end  = '0;
    if (ins.strided || ins.indexed) begin
      n = 6'd1;
    end else begin
      // end of the aligned block: 8 bytes for byte transfers, 16 otherwise
      blk_end = (ins.size == 2'd0) ? ({ea[31:3], 3'b000} + 32'd8) : ({ea[31:4], 4'b0000} + 32'd16);
      n = 6'((blk_end - ea) >> ins.size);
      if (n > rem_e) n = rem_e;
    end
  end

  assign busy   = run_q;
  assign active = (xfer && gnt && !err) || xmove;

  // memory request
  always_comb begin
    req        = '0;
    req.valid  = xfer && !err;
    req.write  = ins.store;
    req.kernel = ins.kernel;
    req.addr   = ea[31:4];
    for (int k = 0; k < 8; k++) begin
      logic [5:0] e;
      logic [4:0] bo;
      vrow_t      row;
      e   = e_q + 6'(k);
      bo  = 5'(ea[3:0]) + 5'(k << ins.size);
      row = (e[5:3] == e_q[5:3]) ? rd_data[0] : rd_data[1];
      if (6'(k) < n) begin
        unique case (ins.size)
          2'd0: begin req.be[bo[3:0]] = 1'b1;
                      req.wdata[8*bo[3:0] +: 8] = row[e[2:0]][7:0]; end
          2'd1: begin req.be[bo[3:0]] = 1'b1; req.be[bo[3:0]+4'd1] = 1'b1;
                      req.wdata[8*bo[3:0] +: 16] = row[e[2:0]][15:0]; end
          default: begin req.be[bo[3:0] +: 4] = 4'hF;
                      req.wdata[8*bo[3:0] +: 32] = row[e[2:0]]; end
        endcase
      end
    end
  end

  assign rd_reg[0] = (ix_rd || isx) ? ins.ireg : ins.vreg;
  assign rd_reg[1] = (ins.indexed || isx) ? ins.ireg : ins.vreg;
  assign rd_row[0] = isx ? xs0[4:3] : e_q[4:3];
  assign rd_row[1] = isx ? xs0[4:3] + 2'd1 : ins.indexed ? e_q[4:3] : e_q[4:3] + 2'd1;

  // sequencer
  always_ff @(posedge clk) begin
    if (rst) begin
      run_q  <= 1'b0;
      adderr <= 1'b0;
    end else begin
      adderr <= err;
      if (err) begin
        run_q       <= 1'b0;
        adderr_pc   <= ins.pc;
        adderr_addr <= ea;
      end else if (run_q) begin
        if (su_q != 2'd0 && (!isx || (xreq && xgnt))) su_q <= su_q - 2'd1;
        if (ix_rd) begin
          ix_q  <= rd_data[0];
          ix_ok <= 1'b1;
        end
        if (xfer && gnt) begin
          e_q <= e_q + n;
          if (e_q + n >= ins.vlr) run_q <= 1'b0;
          if (e_q[2:0] + 3'(n) == 3'd0) ix_ok <= 1'b0;   // next index row
        end
        if (xmove) begin
          e_q <= e_q + xn;
          if (e_q + xn >= ins.vlr) run_q <= 1'b0;
        end
      end else if (start) begin
        ins   <= '{op: op, xidx: xindex[5:0], xsc: xscalar,
                   store: store, uns: is_unsigned, strided: strided, indexed: indexed,
                   ireg: ireg, size: size, base: base, stride: stride, pc: pc,
                   vreg: vreg, vlr: (op == VM_MEM || op == VM_EXTV) ? vlr[5:0] : 6'd1,
                   kernel: kernel};
        e_q   <= 6'd0;
        run_q <= 1'b1;
        if (op == VM_EXTV)
          su_q <= (xindex[1:0] != 2'd0 && 32'(xindex[1:0]) + 32'(vlr) > 32'd4) ? 2'd1 : 2'd0;
        else if (op != VM_MEM) su_q <= 2'd0;
        else su_q <= !indexed ? 2'd0 : store ? 2'd2 : 2'd3;
        ix_ok <= 1'b0;
      end
    end
  end

  // vext.s result: read in the granted cycle, returned two cycles later
  always_ff @(posedge clk) begin
    if (rst) begin
      xs1_v <= 1'b0;
      xs2_v <= 1'b0;
    end else begin
      xs1_v <= xmove && ins.op == VM_EXTS;
      xs2_v <= xs1_v;
    end
    xs1_d <= rd_data[0][ins.xidx[2:0]];
    xs2_d <= xs1_d;
  end
  assign xs_valid = xs2_v;
  assign xs_data  = xs2_d;

  // load return pipeline: granted group -> data phase -> rvalid
  always_ff @(posedge clk) begin
    if (rst) begin
      g1.valid <= 1'b0;
      g2.valid <= 1'b0;
    end else begin
      g1 <= '{valid: xfer && gnt && !err && !ins.store, e0: e_q, n: n, off: ea[3:0],
              size: ins.size, uns: ins.uns, strided: ins.strided || ins.indexed,
              vreg: ins.vreg};
      g2 <= g1;
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      wr_en[p]   = g2.valid && rvalid;
      wr_reg[p]  = g2.vreg;
      wr_row[p]  = g2.e0[4:3] + 2'(p);
      wr_mask[p] = '0;
      wr_data[p] = '0;
    end
    for (int k = 0; k < 8; k++) begin
      logic [5:0]  e;
      logic [4:0]  bo;
      logic [31:0] v;
      e  = g2.e0 + 6'(k);
      bo = 5'(g2.off) + 5'(k << g2.size);
      unique case (g2.size)
        2'd0:    v = g2.uns ? {24'b0, rdata[8*bo[3:0] +: 8]}
                            : {{24{rdata[8*bo[3:0]+7]}}, rdata[8*bo[3:0] +: 8]};
        2'd1:    v = g2.uns ? {16'b0, rdata[8*bo[3:0] +: 16]}
                            : {{16{rdata[8*bo[3:0]+15]}}, rdata[8*bo[3:0] +: 16]};
        default: v = rdata[8*bo[3:0] +: 32];
      endcase
      if (6'(k) < g2.n) begin
        if (e[5:3] == g2.e0[5:3]) begin
          wr_mask[0][e[2:0]] = 1'b1;
          wr_data[0][e[2:0]] = v;
        end else begin
          wr_mask[1][e[2:0]] = 1'b1;
          wr_data[1][e[2:0]] = v;
        end
      end
    end
    // extract / insert write (never at the same time as load data)
    if (xmove && ins.op == VM_INSS) begin
      wr_en[0]   = 1'b1;
      wr_reg[0]  = ins.vreg;
      wr_row[0]  = ins.xidx[4:3];
      wr_mask[0] = 8'd1 << ins.xidx[2:0];
      wr_data[0] = {NLANES{ins.xsc}};
    end
    if (xmove && ins.op == VM_EXTV) begin
      wr_en[0]   = 1'b1;
      wr_reg[0]  = ins.vreg;
      wr_row[0]  = e_q[4:3];
      wr_mask[0] = '0;
      wr_data[0] = '0;
      for (int k = 0; k < 8; k++) begin
        logic [5:0] e, s;
        e = e_q + 6'(k);
        s = xs0 + 6'(k);
        if (6'(k) < xn) begin
          wr_mask[0][e[2:0]] = 1'b1;
          wr_data[0][e[2:0]] = (s[5:3] == xs0[5:3]) ? rd_data[0][s[2:0]] : rd_data[1][s[2:0]];
        end
      end
    end
  end
endmodule

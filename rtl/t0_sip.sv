// t0_sip: System Interface Port of T0.
//
// SIP is a JTAG-like test and host port that moves a byte per clock.  A TAP
// controller (t0_sip_tap) steps through the JTAG states under control of tms.
// Two shift registers sit between tdi[7:0] and tdo[7:0]:
//   regio  8 bits: loads the 4-bit instruction register in the IR loop and the
//          control registers (testcntl, int, fromhost) in the DR loop;
//   memio  160 bits (20 bytes): 16 data bytes, lowest address nearest tdo,
//          followed by a 32-bit address field, most significant byte first.
//          Used by MEMREAD, MEMWRITE and ICWRITE.
// Bytes enter memio at the address end and leave at data byte 0, so a scan of
// 16 data bytes then 4 address bytes leaves both fields in place, and a read
// loop of 16 shifts pushes out the data while shifting in the next address.
//
// Instruction register: reset to BYPASS synchronously while the controller is
// in Test-Logic-Reset, loaded from regio[3:0] in Update-IR; regio is preset to
// 0x01 in Capture-IR.  Capture-DR loads regio with testresult (TESTIO), tohost
// (SIPIO) or 0x01 (BYPASS, INTWRITE, RUNCPU).  Update-DR writes testcntl
// (TESTIO), int (INTWRITE) or fromhost (SIPIO), or starts a memory-pipeline
// cycle (MEMREAD, MEMWRITE, ICWRITE).  The request is presented in the cycle
// after Update-DR.  For MEMREAD the block read from memory and the current
// program counter are loaded into memio when the memory interface returns them
// (mem_rvalid), two cycles later.
//
// RUNCPU: every cycle spent in Run-Test-Idle with RUNCPU in the instruction
// register grants the suspended CPU one instruction issue, one cycle later.
// testresult samples the I-cache opcode and hit signals every cycle unless the
// CPU is suspended and RUNCPU is not the current instruction.
//
// The system reset does not reach this block.  Clearing testcntl and int in
// Test-Logic-Reset, driving tdo from the head of the selected shift register
// combinationally, and placing data byte i on bits 8i+7:8i of the 128-bit
// memory word are this implementation's choices; everything else follows the
// T0 SIP description.
module t0_sip
  import t0_pkg::*;
(
  input  logic         clk,
  input  logic         tms,
  input  logic [7:0]   tdi,
  output logic [7:0]   tdo,
  // connections inside T0
  input  logic [7:0]   tohost,        // CP0 tohost register
  output logic         fromhost_we,   // write CP0 fromhost
  output logic [7:0]   fromhost_wdata,
  output logic         intfromhost,   // int register bit 0, mirrored in cause.ip6
  output logic         suspend,       // testcntl bits
  output logic         icfrz,
  output logic         icinv,
  output logic         run_issue,     // RUNCPU: allow one issue this cycle
  input  logic [5:0]   ic_opcode,     // I-cache opcode field of the fetched word
  input  logic         ic_hit,        // I-cache tag comparator output
  input  logic [31:0]  pc,            // program counter for MEMREAD capture
  // memory pipeline request (one cycle, highest priority)
  output logic         req_valid,
  output logic         req_write,     // MEMWRITE
  output logic         req_icwrite,   // ICWRITE
  output logic [31:0]  req_addr,
  output logic [127:0] req_wdata,
  input  logic         mem_rvalid,    // read data for this port's MEMREAD
  input  logic [127:0] mem_rdata,
  output tap_state_e   tap_state
);
  tap_state_e st;
  sip_instr_e ir;
  logic [7:0] regio;
  logic [7:0] memio [20];
  logic [7:0] testcntl, testresult, intreg;
  logic       use_memio;
  logic       runq;

  t0_sip_tap u_tap (.clk(clk), .tms(tms), .state(st));
  assign tap_state = st;

  assign use_memio = (ir == SIP_MEMREAD) || (ir == SIP_MEMWRITE) || (ir == SIP_ICWRITE);

  // ------------------------------------------------ instruction register
  always_ff @(posedge clk) begin
    if (st == TAP_RESET)          ir <= SIP_BYPASS;
    else if (st == TAP_UPDATE_IR) ir <= sip_instr_e'(regio[3:0]);
  end

  // --------------------------------------------------------------- regio
  always_ff @(posedge clk) begin
    unique case (st)
      TAP_CAPTURE_IR: regio <= 8'h01;
      TAP_SHIFT_IR:   regio <= tdi;
      TAP_CAPTURE_DR:
        unique case (ir)
          SIP_TESTIO: regio <= testresult;
          SIP_SIPIO:  regio <= tohost;
          default:    if (!use_memio) regio <= 8'h01;
        endcase
      TAP_SHIFT_DR:   if (!use_memio) regio <= tdi;
      default: ;
    endcase
  end

  // --------------------------------------------------------------- memio
  always_ff @(posedge clk) begin
    if (st == TAP_SHIFT_DR && use_memio) begin
      for (int i = 0; i < 19; i++) memio[i] <= memio[i+1];
      memio[19] <= tdi;
    end else if (mem_rvalid) begin
      for (int i = 0; i < 16; i++) memio[i] <= mem_rdata[8*i +: 8];
      memio[16] <= pc[31:24];
      memio[17] <= pc[23:16];
      memio[18] <= pc[15:8];
      memio[19] <= pc[7:0];
    end
  end

  always_comb begin
    if ((st == TAP_SHIFT_DR) && use_memio) tdo = memio[0];
    else                                   tdo = regio;
  end

  // -------------------------------------------------- control registers
  always_ff @(posedge clk) begin
    if (st == TAP_RESET) begin
      testcntl <= '0;
      intreg   <= '0;
    end else if (st == TAP_UPDATE_DR) begin
      if (ir == SIP_TESTIO)   testcntl <= regio;
      if (ir == SIP_INTWRITE) intreg   <= regio;
    end
  end

  assign fromhost_we    = (st == TAP_UPDATE_DR) && (ir == SIP_SIPIO);
  assign fromhost_wdata = regio;
  assign suspend        = testcntl[0];
  assign icfrz          = testcntl[1];
  assign icinv          = testcntl[2];
  assign intfromhost    = intreg[0];

  // testresult: {0, hit, opcode}
  always_ff @(posedge clk) begin
    if (!suspend || ir == SIP_RUNCPU) testresult <= {1'b0, ic_hit, ic_opcode};
  end

  // RUNCPU single-step issue, one cycle after each Run-Test-Idle cycle
  always_ff @(posedge clk) runq <= (st == TAP_IDLE) && (ir == SIP_RUNCPU);
  assign run_issue = runq;

  // ----------------------------------------------- memory pipeline request
  always_ff @(posedge clk) begin
    req_valid   <= (st == TAP_UPDATE_DR) && use_memio;
    req_write   <= (ir == SIP_MEMWRITE);
    req_icwrite <= (ir == SIP_ICWRITE);
  end

  always_comb begin
    req_addr = {memio[16], memio[17], memio[18], memio[19]};
    for (int i = 0; i < 16; i++) req_wdata[8*i +: 8] = memio[i];
  end
endmodule

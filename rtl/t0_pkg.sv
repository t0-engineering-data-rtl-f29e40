// t0_pkg: types and constants shared by the T0 vector microprocessor blocks.
//
// Holds the architectural numbers of T0: the exception vectors and codes, the
// CP0 and vector-unit control register numbers, the SIP instruction codes, the
// SIP TAP controller states, the memory access kinds and the encoding of the
// vector arithmetic operations.  All values except the vector arithmetic
// operation encoding (vau_op_e) and the TAP state encoding are T0's own; those
// two encodings are this implementation's choice, since the instruction set
// encodings are defined outside this design.
package t0_pkg;

  // ---------------------------------------------------------------- vectors
  localparam logic [31:0] RESET_VECTOR  = 32'h0000_1000;
  localparam logic [31:0] EXC_VECTOR    = 32'h0000_1100;
  localparam logic [31:0] EXT0_VECTOR   = 32'h0000_1200;
  localparam logic [31:0] EXT1_VECTOR   = 32'h0000_1300;

  // ----------------------------------------------------------- exc codes
  typedef enum logic [4:0] {
    EXC_HINT = 5'd0,   // host interrupt over SIP
    EXC_VINT = 5'd1,   // vector unit address error interrupt
    EXC_TINT = 5'd2,   // timer interrupt
    EXC_ADEL = 5'd4,
    EXC_ADES = 5'd5,
    EXC_ADEF = 5'd6,
    EXC_SYS  = 5'd8,
    EXC_BP   = 5'd9,
    EXC_RI   = 5'd10,
    EXC_CPU  = 5'd11,
    EXC_OV   = 5'd12,
    EXC_VUE  = 5'd18
  } exccode_e;

  // Synchronous exception request vector, one bit per kind, as raised by the
  // CPU pipeline for the instruction entering M.
  typedef struct packed {
    logic adef;
    logic cpu;     // coprocessor unusable
    logic ri;
    logic sys;
    logic bp;
    logic ov;
    logic vue;
    logic adel;
    logic ades;
  } sync_exc_t;

  // ------------------------------------------------------ CP0 register map
  localparam logic [4:0] CP0_FROMHOST   = 5'd0;
  localparam logic [4:0] CP0_TOHOST     = 5'd1;
  localparam logic [4:0] CP0_VUEPC      = 5'd2;
  localparam logic [4:0] CP0_VUBADVADDR = 5'd3;
  localparam logic [4:0] CP0_BADVADDR   = 5'd8;
  localparam logic [4:0] CP0_COUNT      = 5'd9;
  localparam logic [4:0] CP0_COMPARE    = 5'd11;
  localparam logic [4:0] CP0_STATUS     = 5'd12;
  localparam logic [4:0] CP0_CAUSE      = 5'd13;
  localparam logic [4:0] CP0_EPC        = 5'd14;
  localparam logic [4:0] CP0_PRID       = 5'd15;

  // ------------------------------------------- vector unit control registers
  localparam logic [4:0] VCR_VREV  = 5'd0;
  localparam logic [4:0] VCR_VCOUNT = 5'd1;
  localparam logic [4:0] VCR_VLR   = 5'd2;
  localparam logic [4:0] VCR_VCOND = 5'd4;
  localparam logic [4:0] VCR_VOVF  = 5'd8;
  localparam logic [4:0] VCR_VSAT  = 5'd12;

  // ------------------------------------------------------ SIP instructions
  typedef enum logic [3:0] {
    SIP_MEMREAD  = 4'b0000,
    SIP_MEMWRITE = 4'b0001,
    SIP_ICWRITE  = 4'b0011,
    SIP_TESTIO   = 4'b1000,
    SIP_INTWRITE = 4'b1001,
    SIP_SIPIO    = 4'b1010,
    SIP_RUNCPU   = 4'b1011,
    SIP_BYPASS   = 4'b1111
  } sip_instr_e;

  // ---------------------------------------------------- TAP controller
  typedef enum logic [3:0] {
    TAP_RESET      = 4'd0,
    TAP_IDLE       = 4'd1,
    TAP_SELECT_DR  = 4'd2,
    TAP_CAPTURE_DR = 4'd3,
    TAP_SHIFT_DR   = 4'd4,
    TAP_EXIT1_DR   = 4'd5,
    TAP_PAUSE_DR   = 4'd6,
    TAP_EXIT2_DR   = 4'd7,
    TAP_UPDATE_DR  = 4'd8,
    TAP_SELECT_IR  = 4'd9,
    TAP_CAPTURE_IR = 4'd10,
    TAP_SHIFT_IR   = 4'd11,
    TAP_EXIT1_IR   = 4'd12,
    TAP_PAUSE_IR   = 4'd13,
    TAP_EXIT2_IR   = 4'd14,
    TAP_UPDATE_IR  = 4'd15
  } tap_state_e;

  // --------------------------------------------------- memory pipeline
  // Requesters of the single memory pipeline, highest priority first.
  typedef enum logic [1:0] {
    MREQ_NONE = 2'd0,
    MREQ_SIP  = 2'd1,
    MREQ_IC   = 2'd2,
    MREQ_EXEC = 2'd3    // scalar or vector memory instruction
  } mreq_src_e;

  // A request presented to the memory pipeline by an execution unit.
  typedef struct packed {
    logic         valid;
    logic         write;
    logic         kernel;     // access made in kernel mode
    logic [27:0]  addr;       // address bits 31:4 (16-byte block)
    logic [15:0]  be;         // byte enables for a write, bit i = byte i
    logic [127:0] wdata;
  } mem_req_t;

  // Instructions handled by the vector memory unit: memory transfers, and
  // the extract / insert instructions that use its crossbar instead of memory.
  typedef enum logic [1:0] {
    VM_MEM  = 2'd0,    // vector load or store (contiguous, strided, indexed)
    VM_EXTV = 2'd1,    // vext.v: vd[i] = vt[rd + i], i < vlr
    VM_INSS = 2'd2,    // vins.s: vd[rd] = scalar
    VM_EXTS = 2'd3     // vext.s: scalar = vt[rd]
  } vm_op_e;

  // ------------------------------------------- vector arithmetic operations
  typedef enum logic [4:0] {
    VOP_ADD    = 5'd0,   // signed add, sets vovf on overflow (wraps)
    VOP_ADDU   = 5'd1,   // unsigned add, no flag
    VOP_SUB    = 5'd2,   // signed subtract, sets vovf on overflow
    VOP_SUBU   = 5'd3,
    VOP_FXADD  = 5'd4,   // add, clip to 32-bit signed range, sets vsat
    VOP_FXSUB  = 5'd5,   // subtract, clip, sets vsat
    VOP_FXMUL  = 5'd6,   // 16x16 signed multiply, shift right, clip; VP0 only
    VOP_AND    = 5'd7,
    VOP_OR     = 5'd8,
    VOP_XOR    = 5'd9,
    VOP_NOR    = 5'd10,
    VOP_SLL    = 5'd11,  // shift left logical by b[4:0]
    VOP_SRL    = 5'd12,  // shift right logical
    VOP_SRA    = 5'd13,  // shift right arithmetic
    VOP_FLT    = 5'd14,  // set vcond bit if a < b (signed)
    VOP_FLTU   = 5'd15,  // set vcond bit if a < b (unsigned)
    VOP_FEQ    = 5'd16,  // set vcond bit if a == b
    VOP_CMVZ   = 5'd17,  // conditional move: result = a where b == 0, else old vd
    VOP_CMVNZ  = 5'd18   // conditional move: result = a where b != 0, else old vd
  } vau_op_e;

  // Flag write from a vector arithmetic unit: one row of 8 elements per cycle.
  typedef struct packed {
    logic       cond_we;   // write vcond bits (compare instructions)
    logic       ovf_we;    // OR into vovf (signed add / subtract)
    logic       sat_we;    // OR into vsat (fixed-point add / subtract / multiply)
    logic [1:0] row;       // elements 8*row .. 8*row+7
    logic [7:0] mask;      // elements of the row inside the vector length
    logic [7:0] bits;      // flag value per element
  } vflag_wr_t;

  localparam int unsigned VLMAX  = 32;   // elements per vector register
  localparam int unsigned NLANES = 8;    // parallel datapaths per vector unit

  // One register-file row: the 8 elements handled by the 8 lanes in a cycle.
  typedef logic [NLANES-1:0][31:0] vrow_t;

endpackage

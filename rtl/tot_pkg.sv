// tot_pkg: types and constants shared by the TOT processor.
//
// Instruction format (32 bits): opCode[31:26], val1[25:21], val2[20:16], val3[15:0].
// The 25 instructions and their operand order follow the instruction table of the
// design; the numeric opcode values below are this implementation's own choice
// (the ISA definition names the instructions but assigns no numbers).
//
// Address map: DRAM 0x0000_0000..0x00FF_FFFF, MMIO 0x0100_0000..0x0FFF_FFFF,
// boot ROM from 0x1000_0000 (fetch only). The four MMIO register addresses are
// this implementation's choice.
package tot_pkg;

  localparam int XLEN = 32;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [5:0] {
    OP_NOP  = 6'h00,
    OP_ST   = 6'h01,
    OP_LD   = 6'h02,
    OP_ADD  = 6'h03,
    OP_SUB  = 6'h04,
    OP_AND  = 6'h05,
    OP_OR   = 6'h06,
    OP_XOR  = 6'h07,
    OP_SRL  = 6'h08,
    OP_SRA  = 6'h09,
    OP_SL   = 6'h0A,
    OP_LUI  = 6'h0B,
    OP_ADDI = 6'h0C,
    OP_SUBI = 6'h0D,
    OP_SRLI = 6'h0E,
    OP_SRAI = 6'h0F,
    OP_SLI  = 6'h10,
    OP_JAL  = 6'h11,
    OP_JALR = 6'h12,
    OP_BGE  = 6'h13,
    OP_BLT  = 6'h14,
    OP_SBGE = 6'h15,
    OP_SBLT = 6'h16,
    OP_BEQ  = 6'h17,
    OP_HLT  = 6'h3F
  } opcode_e;

  typedef struct packed {
    logic [5:0]  opcode;
    logic [4:0]  val1;
    logic [4:0]  val2;
    logic [15:0] val3;
  } inst_t;

  // ---------------------------------------------------------------- ALU ops (aluOp, 5 bits)
  typedef enum logic [4:0] {
    ALU_ADD  = 5'd0,
    ALU_SUB  = 5'd1,
    ALU_AND  = 5'd2,
    ALU_OR   = 5'd3,
    ALU_XOR  = 5'd4,
    ALU_SRL  = 5'd5,
    ALU_SRA  = 5'd6,
    ALU_SL   = 5'd7,
    ALU_PASS = 5'd8,   // aluOut = aluIn2 (LUI)
    ALU_BGE  = 5'd9,   // unsigned >=
    ALU_BLT  = 5'd10,  // unsigned <
    ALU_SBGE = 5'd11,  // signed >=
    ALU_SBLT = 5'd12,  // signed <
    ALU_BEQ  = 5'd13,
    ALU_JAL  = 5'd14,  // branch always true, target pc + imm
    ALU_JALR = 5'd15   // branch always true, target rs1 + imm
  } alu_op_e;

  // ---------------------------------------------------------------- exceptions
  typedef enum logic [2:0] {
    EXC_NONE        = 3'd0,
    EXC_ILLEGAL_OP  = 3'd1,
    EXC_ILLEGAL_MEM = 3'd2,
    EXC_PRIVILEGE   = 3'd3,
    EXC_INTERRUPT   = 3'd4,
    EXC_PAGE_FAULT  = 3'd5
  } exc_e;

  // ---------------------------------------------------------------- address map
  localparam logic [31:0] DRAM_LAST  = 32'h00FF_FFFF;
  localparam logic [31:0] MMIO_BASE  = 32'h0100_0000;
  localparam logic [31:0] ROM_BASE   = 32'h1000_0000;

  localparam logic [31:0] UART_DATA_ADDR    = 32'h0100_0000;
  localparam logic [31:0] UART_FRESH_ADDR   = 32'h0100_0004;
  localparam logic [31:0] BYPASS_ADDR       = 32'h0100_0008;
  localparam logic [31:0] BYPASS_FRESH_ADDR = 32'h0100_000C;

  // ---------------------------------------------------------------- pipeline bundles
  // Decoded instruction (Decode -> Execute): the nine control signals plus the
  // register values read from the register file.
  typedef struct packed {
    logic        valid;
    alu_op_e     aluOp;
    logic [4:0]  rd;
    logic        changePC;
    logic        memAccess;
    logic        memWrite;   // ST (memAccess without wbEnable)
    logic        wbEnable;
    logic        isImm;
    logic [31:0] imm;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [31:0] rs1Val;
    logic [31:0] rs2Val;
  } dinst_t;

  // potentialMemoryReq (Execute -> Memory)
  typedef struct packed {
    logic        valid;
    logic        memAccess;
    logic        memWrite;
    logic [31:0] aluOut;
    logic [31:0] rs2Val;
    logic        wbEnable;
    logic [4:0]  rd;
    logic [31:0] nextPC;
    logic        jump;
  } mem_req_t;

  // wbCommands (Memory -> Writeback)
  typedef struct packed {
    logic        wbEnable;
    logic [4:0]  rd;
    logic [31:0] wbData;
    logic [31:0] nextPC;
    logic        jump;
  } wb_cmd_t;

  // One DRAM request / response as seen by the request handler.
  typedef struct packed {
    logic        isWrite;
    logic [31:0] addr;
    logic [31:0] data;
  } dram_req_t;

  function automatic logic [31:0] encode(opcode_e op, logic [4:0] v1, logic [4:0] v2, logic [15:0] v3);
    return {op, v1, v2, v3};
  endfunction

endpackage

// nmpra_pkg: shared constants and types of the multi-context MIPS32 core.
//
// Holds the MIPS32 opcode/function/field encodings used by the decoder, the
// ALU operation codes, the control-word struct produced by the control unit
// and carried down the pipeline, and the four pipeline-register payload
// structs (IF/ID, ID/EX, EX/MEM, MEM/WB). Every pipeline register exists
// once per hardware thread; the structs here describe one copy.
// The instruction encodings are the MIPS32 Release 1 ones. The ALU code
// values, the COP2 register-selector map and the bit meanings of the
// scheduler registers are this design's own choices (see nhse.sv).
package nmpra_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [5:0] OP_SPECIAL = 6'b000000;
  localparam logic [5:0] OP_REGIMM  = 6'b000001;
  localparam logic [5:0] OP_J       = 6'b000010;
  localparam logic [5:0] OP_JAL     = 6'b000011;
  localparam logic [5:0] OP_BEQ     = 6'b000100;
  localparam logic [5:0] OP_BNE     = 6'b000101;
  localparam logic [5:0] OP_BLEZ    = 6'b000110;
  localparam logic [5:0] OP_BGTZ    = 6'b000111;
  localparam logic [5:0] OP_ADDI    = 6'b001000;
  localparam logic [5:0] OP_ADDIU   = 6'b001001;
  localparam logic [5:0] OP_SLTI    = 6'b001010;
  localparam logic [5:0] OP_SLTIU   = 6'b001011;
  localparam logic [5:0] OP_ANDI    = 6'b001100;
  localparam logic [5:0] OP_ORI     = 6'b001101;
  localparam logic [5:0] OP_XORI    = 6'b001110;
  localparam logic [5:0] OP_LUI     = 6'b001111;
  localparam logic [5:0] OP_COP0    = 6'b010000;
  localparam logic [5:0] OP_COP2    = 6'b010010;
  localparam logic [5:0] OP_LB      = 6'b100000;
  localparam logic [5:0] OP_LH      = 6'b100001;
  localparam logic [5:0] OP_LWL     = 6'b100010;
  localparam logic [5:0] OP_LW      = 6'b100011;
  localparam logic [5:0] OP_LBU     = 6'b100100;
  localparam logic [5:0] OP_LHU     = 6'b100101;
  localparam logic [5:0] OP_LWR     = 6'b100110;
  localparam logic [5:0] OP_SB      = 6'b101000;
  localparam logic [5:0] OP_SH      = 6'b101001;
  localparam logic [5:0] OP_SWL     = 6'b101010;
  localparam logic [5:0] OP_SW      = 6'b101011;
  localparam logic [5:0] OP_SWR     = 6'b101110;
  localparam logic [5:0] OP_LL      = 6'b110000;
  localparam logic [5:0] OP_LWC2    = 6'b110010;
  localparam logic [5:0] OP_SC      = 6'b111000;
  localparam logic [5:0] OP_SWC2    = 6'b111010;

  // SPECIAL function field
  localparam logic [5:0] FN_SLL     = 6'b000000;
  localparam logic [5:0] FN_SRL     = 6'b000010;
  localparam logic [5:0] FN_SRA     = 6'b000011;
  localparam logic [5:0] FN_SLLV    = 6'b000100;
  localparam logic [5:0] FN_SRLV    = 6'b000110;
  localparam logic [5:0] FN_SRAV    = 6'b000111;
  localparam logic [5:0] FN_JR      = 6'b001000;
  localparam logic [5:0] FN_JALR    = 6'b001001;
  localparam logic [5:0] FN_MOVZ    = 6'b001010;
  localparam logic [5:0] FN_MOVN    = 6'b001011;
  localparam logic [5:0] FN_SYSCALL = 6'b001100;
  localparam logic [5:0] FN_BREAK   = 6'b001101;
  localparam logic [5:0] FN_MFHI    = 6'b010000;
  localparam logic [5:0] FN_MTHI    = 6'b010001;
  localparam logic [5:0] FN_MFLO    = 6'b010010;
  localparam logic [5:0] FN_MTLO    = 6'b010011;
  localparam logic [5:0] FN_MULT    = 6'b011000;
  localparam logic [5:0] FN_MULTU   = 6'b011001;
  localparam logic [5:0] FN_DIV     = 6'b011010;
  localparam logic [5:0] FN_DIVU    = 6'b011011;
  localparam logic [5:0] FN_ADD     = 6'b100000;
  localparam logic [5:0] FN_ADDU    = 6'b100001;
  localparam logic [5:0] FN_SUB     = 6'b100010;
  localparam logic [5:0] FN_SUBU    = 6'b100011;
  localparam logic [5:0] FN_AND     = 6'b100100;
  localparam logic [5:0] FN_OR      = 6'b100101;
  localparam logic [5:0] FN_XOR     = 6'b100110;
  localparam logic [5:0] FN_NOR     = 6'b100111;
  localparam logic [5:0] FN_SLT     = 6'b101010;
  localparam logic [5:0] FN_SLTU    = 6'b101011;
  localparam logic [5:0] FN_TGE     = 6'b110000;
  localparam logic [5:0] FN_TGEU    = 6'b110001;
  localparam logic [5:0] FN_TLT     = 6'b110010;
  localparam logic [5:0] FN_TLTU    = 6'b110011;
  localparam logic [5:0] FN_TEQ     = 6'b110100;
  localparam logic [5:0] FN_TNE     = 6'b110110;

  // REGIMM rt field
  localparam logic [4:0] RT_BLTZ    = 5'b00000;
  localparam logic [4:0] RT_BGEZ    = 5'b00001;
  localparam logic [4:0] RT_TGEI    = 5'b01000;
  localparam logic [4:0] RT_TGEIU   = 5'b01001;
  localparam logic [4:0] RT_TLTI    = 5'b01010;
  localparam logic [4:0] RT_TLTIU   = 5'b01011;
  localparam logic [4:0] RT_TEQI    = 5'b01100;
  localparam logic [4:0] RT_TNEI    = 5'b01110;
  localparam logic [4:0] RT_BLTZAL  = 5'b10000;
  localparam logic [4:0] RT_BGEZAL  = 5'b10001;

  // coprocessor rs field
  localparam logic [4:0] RS_MF      = 5'b00000;  // MFC0 / MFC2
  localparam logic [4:0] RS_CF      = 5'b00010;  // CFC2
  localparam logic [4:0] RS_MT      = 5'b00100;  // MTC0 / MTC2
  localparam logic [4:0] RS_CT      = 5'b00110;  // CTC2
  localparam logic [5:0] FN_ERET    = 6'b011000; // COP0 CO function

  // ---------------------------------------------------------------- ALU
  typedef enum logic [4:0] {
    ALU_ADD, ALU_ADDU, ALU_SUB, ALU_SUBU, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLLV, ALU_SRLV,
    ALU_SRAV, ALU_LUI, ALU_PASSB,
    // handled by muldiv (HI/LO), not by the ALU
    ALU_MULT, ALU_MULTU, ALU_DIV, ALU_DIVU, ALU_MTHI, ALU_MTLO, ALU_MFHI, ALU_MFLO
  } alu_op_t;

  // PC source chosen in ID (PCSrcStd_Mux)
  typedef enum logic [1:0] {
    PCSRC_ADD4 = 2'd0, PCSRC_JUMP = 2'd1, PCSRC_BRANCH = 2'd2, PCSRC_REG = 2'd3
  } pcsrc_t;

  // destination register choice (EXRtRdLnk_Mux)
  typedef enum logic [1:0] {
    DST_RT = 2'd0, DST_RD = 2'd1, DST_R31 = 2'd2
  } regdst_t;

  // Control word produced in ID by control_unit.
  typedef struct packed {
    pcsrc_t   pcsrc;
    logic     link;           // write return address
    regdst_t  regdst;
    logic     alu_src_imm;    // operand B is the extended immediate
    logic     imm_zero_ext;   // ANDI/ORI/XORI zero-extend
    alu_op_t  alu_op;
    logic     movn;
    logic     movz;
    logic     mem_read;
    logic     mem_write;
    logic     mem_byte;
    logic     mem_half;
    logic     mem_sign_ext;
    logic     mem_left;       // LWL/SWL: unaligned word, left part
    logic     mem_right;      // LWR/SWR: unaligned word, right part
    logic     reg_write;
    logic     memto_reg;
    logic     trap;
    logic     trap_cond;      // 1: trap when ALU result is zero
    logic     ex_can_err;     // overflow may raise an exception
    logic     want_rs_by_id;  // rs needed by the ID stage (branch, jr)
    logic     want_rt_by_id;  // rt needed by the ID stage (beq/bne, ctc2)
    logic     need_rs_by_ex;  // rs used by the EX stage
    logic     need_rt_by_ex;  // rt used by the EX stage or stored
    logic     cop_read;       // MFC0/MFC2/CFC2: result comes from a coprocessor
    logic     cop2_write;     // CTC2/MTC2
    logic     mtc0;
    logic     mfc0;
    logic     eret;
    logic     syscall;
    logic     brk;
    logic     ll;             // load linked: opens an atomic sequence
    logic     sc;             // store conditional: closes it
    logic     lwc2;           // load word into a scheduler register (selector rt)
    logic     swc2;           // store a scheduler register (selector rt)
    logic     reserved;       // reserved instruction
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

  // ---------------------------------------------------------------- pipe regs
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [31:0] pc;          // restart PC
    logic [31:0] pc_add4;
    logic        is_bds;      // sits in a branch delay slot
    logic        exc_adel;    // fetch address error
  } if_id_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [31:0] rs_data;
    logic [31:0] rt_data;
    logic [31:0] imm_ext;
    logic [31:0] cop_data;    // Write_Data_nHSE / COP0 read value
    logic [31:0] link_addr;
    logic [31:0] pc;
    logic        is_bds;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [4:0]  rt_rd;       // destination register
    logic [4:0]  rt;          // store data source register
    logic [31:0] alu_result;
    logic [31:0] store_data;
    logic [31:0] pc;
    logic        is_bds;
  } ex_mem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        memto_reg;
    logic        lwc2;        // read_data goes to scheduler register rt_rd
    logic [4:0]  rt_rd;
    logic [31:0] alu_result;
    logic [31:0] read_data;
  } mem_wb_t;

endpackage

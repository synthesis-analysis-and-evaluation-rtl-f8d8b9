// nmpra_pkg: types and constants shared by the nMPRA processor and its nHSE
// hardware scheduler.
//
// The opcode and function-field values are the standard MIPS32 encodings of
// the instruction subset the pipeline executes. The seven nHSE event types
// follow the order in which the scheduler's event latches are listed
// (time, watchdog, two deadlines, interrupt, mutex, synchronisation); their
// bit positions in crTRi/crEVi are this design's choice, picked so that the
// validation value 0x11 written by the context-switch example enables the time
// and interrupt events. The COP2 register numbers (the rd field of CTC2/CFC2)
// are also this design's own map: crTRi is register 0, as in the documented
// "wait" instruction 0x48C10000 (CTC2 r1 -> COP2 register 0).
package nmpra_pkg;

  localparam int XLEN      = 32;
  localparam int NR_EVENTS = 7;

  // Event bit positions inside crTRi / crEVi.
  typedef enum logic [2:0] {
    EV_TEV     = 3'd0,  // time event
    EV_WDEV    = 3'd1,  // watchdog event
    EV_D1EV    = 3'd2,  // first deadline event
    EV_D2EV    = 3'd3,  // second deadline event
    EV_INTEV   = 3'd4,  // external interrupt attached to the sCPU
    EV_MUTEXEV = 3'd5,  // mutex event
    EV_SYNEV   = 3'd6   // inter-task synchronisation / message event
  } event_e;

  // COP2 (nHSE) register numbers, selected by the rd field of CTC2/CFC2.
  // "cr" registers belong to the executing sCPU; "mr" registers and the
  // PC_nHSE load name a target sCPU in the low byte of the instruction.
  localparam logic [4:0] C2_CRTR     = 5'd0;  // event validation; a write is "wait Rj"
  localparam logic [4:0] C2_CREV     = 5'd1;  // latched events (write 1 to clear)
  localparam logic [4:0] C2_CREPR    = 5'd2;  // event priorities, 3 bits per event
  localparam logic [4:0] C2_MRPRI    = 5'd3;  // task priority of the target sCPU
  localparam logic [4:0] C2_GRINTID  = 5'd4;  // ID of the highest-priority pending event (read only)
  localparam logic [4:0] C2_CR0MSTOP = 5'd5;  // one stop bit per sCPU
  localparam logic [4:0] C2_CRPM     = 5'd6;  // preemption mode: [15:0] q_i, [16] non-preemptive
  localparam logic [4:0] C2_PCNHSE   = 5'd7;  // load the PC of the target sCPU
  localparam logic [4:0] C2_PP       = 5'd8;  // write: preemption point
  localparam logic [4:0] C2_GRSSF    = 5'd9;  // ready flags of all sCPUs (read only)

  localparam int PM_NP_BIT = 16;

  // Primary opcodes
  localparam logic [5:0] OP_RTYPE  = 6'h00;
  localparam logic [5:0] OP_REGIMM = 6'h01;
  localparam logic [5:0] OP_J      = 6'h02;
  localparam logic [5:0] OP_JAL    = 6'h03;
  localparam logic [5:0] OP_BEQ    = 6'h04;
  localparam logic [5:0] OP_BNE    = 6'h05;
  localparam logic [5:0] OP_BLEZ   = 6'h06;
  localparam logic [5:0] OP_BGTZ   = 6'h07;
  localparam logic [5:0] OP_ADDI   = 6'h08;
  localparam logic [5:0] OP_ADDIU  = 6'h09;
  localparam logic [5:0] OP_SLTI   = 6'h0A;
  localparam logic [5:0] OP_SLTIU  = 6'h0B;
  localparam logic [5:0] OP_ANDI   = 6'h0C;
  localparam logic [5:0] OP_ORI    = 6'h0D;
  localparam logic [5:0] OP_XORI   = 6'h0E;
  localparam logic [5:0] OP_LUI    = 6'h0F;
  localparam logic [5:0] OP_COP2   = 6'h12;
  localparam logic [5:0] OP_LW     = 6'h23;
  localparam logic [5:0] OP_SW     = 6'h2B;

  // Function field of R-type instructions
  localparam logic [5:0] FN_SLL  = 6'h00;
  localparam logic [5:0] FN_SRL  = 6'h02;
  localparam logic [5:0] FN_SRA  = 6'h03;
  localparam logic [5:0] FN_SLLV = 6'h04;
  localparam logic [5:0] FN_SRLV = 6'h06;
  localparam logic [5:0] FN_SRAV = 6'h07;
  localparam logic [5:0] FN_JR   = 6'h08;
  localparam logic [5:0] FN_JALR = 6'h09;
  localparam logic [5:0] FN_MFHI = 6'h10;
  localparam logic [5:0] FN_MFLO = 6'h12;
  localparam logic [5:0] FN_DIV  = 6'h1A;
  localparam logic [5:0] FN_DIVU = 6'h1B;
  localparam logic [5:0] FN_ADD  = 6'h20;
  localparam logic [5:0] FN_ADDU = 6'h21;
  localparam logic [5:0] FN_SUB  = 6'h22;
  localparam logic [5:0] FN_SUBU = 6'h23;
  localparam logic [5:0] FN_AND  = 6'h24;
  localparam logic [5:0] FN_OR   = 6'h25;
  localparam logic [5:0] FN_XOR  = 6'h26;
  localparam logic [5:0] FN_NOR  = 6'h27;
  localparam logic [5:0] FN_SLT  = 6'h2A;
  localparam logic [5:0] FN_SLTU = 6'h2B;

  // rs field of COP2 instructions
  localparam logic [4:0] CO_CFC2 = 5'h02;
  localparam logic [4:0] CO_CTC2 = 5'h06;

  // REGIMM rt field
  localparam logic [4:0] RI_BLTZ = 5'h00;
  localparam logic [4:0] RI_BGEZ = 5'h01;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ
  } branch_e;

  typedef enum logic [1:0] {
    DST_RT, DST_RD, DST_RA
  } dst_e;

  // Result of the condition test unit (ID stage)
  typedef struct packed {
    logic eq;      // A == B
    logic gz;      // A >  0
    logic lz;      // A <  0
    logic gez;     // A >= 0
    logic lez;     // A <= 0
    logic zero_a;  // A == 0
  } cond_t;

  // Control word produced by the control unit for one instruction
  typedef struct packed {
    logic    legal;       // a recognised instruction
    logic    reg_write;   // writes a GPR in WB
    dst_e    dst;         // which field names the destination
    logic    alu_src_imm; // second ALU operand is the immediate
    logic    imm_zext;    // zero-extend the immediate (logical ops)
    alu_op_e alu_op;
    logic    shift_var;   // shift amount from rs instead of shamt
    logic    mem_read;    // lw
    logic    mem_write;   // sw
    branch_e branch;
    logic    jump;        // j / jal
    logic    jump_reg;    // jr / jalr
    logic    link;        // writes the return address
    logic    uses_rs;
    logic    uses_rt;
    logic    div_start;   // div / divu
    logic    div_signed;
    logic    mfhi;
    logic    mflo;
    logic    cop2_write;  // CTC2
    logic    cop2_read;   // CFC2
  } ctrl_t;

  // Pipeline registers. The top keeps one copy of each per semiprocessor.
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [31:0] pc4;      // address of the next sequential instruction
  } ifid_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  dst;
    logic [31:0] rs_val;
    logic [31:0] rt_val;
    logic [31:0] imm;      // extended immediate
    logic [4:0]  shamt;
    logic        use_pre;  // result already known in ID (link, CFC2, mfhi, mflo)
    logic [31:0] pre_val;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic        mem_read;
    logic        mem_write;
    logic [4:0]  dst;
    logic [31:0] alu;
    logic [31:0] store_data;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write;
    logic [4:0]  dst;
    logic [31:0] result;
  } memwb_t;

endpackage

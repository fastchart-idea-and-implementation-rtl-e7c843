// fastchart_pkg: types and constants shared by the FASTCHART CPU and Real Time Unit (RTU).
//
// The machine is a 16-bit load/store CPU whose whole task context (general registers,
// status register SR, program counter PC and instruction latch IL) exists twice, so that the
// RTU can save and load one copy while the CPU runs on the other. This package fixes the data
// width, the layout of a context inside a task control block (TCB), the instruction encoding
// and the request bundle the CPU hands to the RTU for the three real-time calls
// (ACTIVATE, TERMINATE, DELAY).
//
// The FASTCHART description fixes the counts (64 tasks, 8 priorities, ready FIFOs of depth 8, 8
// or 16 general registers, R0 the return stack pointer) and the kinds of instruction; the
// 16-bit width, the bit-level instruction encoding and the flag layout are this design's own
// choice.
package fastchart_pkg;

  localparam int unsigned DATA_W = 16;  // data word, instruction word, address
  localparam int unsigned ADDR_W = 16;
  localparam int unsigned ID_FIELD_W = 6;   // task id field of ACTIVATE (64 tasks)
  localparam int unsigned PRIO_FIELD_W = 3; // priority field of ACTIVATE (8 priorities)

  typedef logic [DATA_W-1:0] word_t;

  // Context word order inside a TCB and on the RTU side of the register files:
  // R0..R(NREGS-1), then SR, PC, IL. Size of one TCB = NREGS + 3 words.
  localparam int unsigned CTX_EXTRA = 3;
  function automatic int unsigned ctx_sr(int unsigned nregs); return nregs;     endfunction
  function automatic int unsigned ctx_pc(int unsigned nregs); return nregs + 1; endfunction
  function automatic int unsigned ctx_il(int unsigned nregs); return nregs + 2; endfunction

  // Status register flags
  localparam int unsigned SR_Z = 0;
  localparam int unsigned SR_C = 1;
  localparam int unsigned SR_N = 2;
  localparam int unsigned SR_V = 3;

  // Instruction encoding: opcode in bits [15:12]
  typedef enum logic [3:0] {
    OP_SYS   = 4'h0,  // [11:8] sys function
    OP_ALU   = 4'h1,  // rd[11:8] rs[7:4] alu_op[3:0] : rd = shift(rd op rs)
    OP_LDI   = 4'h2,  // rd[11:8] imm8 : rd = zero-extended imm8
    OP_LDHI  = 4'h3,  // rd[11:8] imm8 : rd[15:8] = imm8
    OP_ADDI  = 4'h4,  // rd[11:8] simm8 : rd = rd + sign-extended imm8
    OP_LOAD  = 4'h5,  // rd[11:8] ra[7:4] mode[1:0] : rd = mem[ra] with address mode
    OP_STORE = 4'h6,  // rs[11:8] ra[7:4] mode[1:0] : mem[ra] = rs with address mode
    OP_BR    = 4'h7,  // cond[11:8] simm8 : if cond, PC = PC + simm8 (PC already past the branch)
    OP_JMP   = 4'h8,  // abs12 : PC = abs12
    OP_CALL  = 4'h9,  // abs12 : mem[--R0] = PC; PC = abs12
    OP_ACT   = 4'hA,  // id[11:6] prio[5:3], next word = start address : ACTIVATE task
    OP_DELAY = 4'hB   // imm12 : DELAY own task for imm12 time ticks
  } opcode_e;

  typedef enum logic [3:0] {
    SYS_NOP   = 4'h0,
    SYS_RET   = 4'h1,  // PC = mem[R0++]
    SYS_TERM  = 4'h2,  // TERMINATE own task
    SYS_SETNS = 4'h3,  // set NOT-SWITCH flag (no preemption)
    SYS_CLRNS = 4'h4   // reset NOT-SWITCH flag
  } sys_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'h0, ALU_SUB = 4'h1, ALU_AND = 4'h2, ALU_OR  = 4'h3,
    ALU_XOR = 4'h4, ALU_MOV = 4'h5, ALU_NOT = 4'h6, ALU_CMP = 4'h7,
    ALU_SHL = 4'h8, ALU_SHR = 4'h9, ALU_ASR = 4'hA
  } alu_op_e;

  typedef enum logic [1:0] {
    SH_NONE = 2'd0, SH_SHL = 2'd1, SH_SHR = 2'd2, SH_ASR = 2'd3
  } shift_op_e;

  typedef enum logic [1:0] {
    AM_IND = 2'd0,  // (ra)
    AM_INC = 2'd1,  // (ra)+  post-increment
    AM_DEC = 2'd2   // -(ra)  pre-decrement
  } addr_mode_e;

  typedef enum logic [3:0] {
    CC_AL = 4'h0, CC_EQ = 4'h1, CC_NE = 4'h2, CC_CS = 4'h3,
    CC_CC = 4'h4, CC_MI = 4'h5, CC_PL = 4'h6
  } cond_e;

  // Real-time calls, CPU -> RTU
  typedef enum logic [1:0] {
    RT_ACTIVATE  = 2'd0,
    RT_TERMINATE = 2'd1,
    RT_DELAY     = 2'd2
  } rt_op_e;

  typedef struct packed {
    rt_op_e                  op;
    logic [ID_FIELD_W-1:0]   id;    // ACTIVATE: task to activate
    logic [PRIO_FIELD_W-1:0] prio;  // ACTIVATE: its priority
    word_t                   arg;   // ACTIVATE: start address, DELAY: time ticks
  } rt_req_t;

  // One-cycle event flags of the RTU, for observation and statistics
  typedef struct packed {
    logic preempt;       // current task displaced by a higher-priority ready task
    logic voluntary;     // current task left by DELAY or TERMINATE
    logic dispatch;      // idle CPU given a task
    logic to_idle;       // CPU left without a task
    logic refill;        // NEW fetched from the ready queue
    logic new_pushback;  // NEW replaced by a higher-priority task and put back
    logic expire;        // a delay ran out, task moved to ready queue
    logic activate;      // a terminated task was activated
    logic act_ignored;   // ACTIVATE of a task that was not terminated
    logic fifo_full;     // ACTIVATE refused or expiry deferred: ready FIFO full
    logic ns_hold;       // a preemption was held back by the NOT-SWITCH flag
  } rtu_events_t;

endpackage

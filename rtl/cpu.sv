// cpu: the FASTCHART central processing unit.
//
// A 16-bit load/store processor built for fixed instruction timing: no pipeline, no cache,
// no interrupts. Its registers (R0..R(NREGS-1), SR, PC, IL) live in the active bank of the
// register files; R0 is the return stack pointer. The instruction latch IL holds the
// instruction being executed. In each CPU cycle (a clock edge with `ce` high) the CPU
// executes IL and, in the same cycle, fetches the next instruction from mem[PC] into IL and
// increments PC. Instructions that need an extra memory access (LOAD, STORE, CALL, RET,
// ACTIVATE, which reads its start-address word) use that cycle for the access and fetch in a
// second cycle, so every instruction takes one or two CPU cycles. A taken branch or a jump
// fetches from the target in the same cycle (the ADD/SUB unit forms PC + offset), so it
// takes one cycle too. LOAD and STORE accept (ra), (ra)+ and -(ra); a register is written
// through the ALU and the shifter, which set the flags in SR.
//
// Real-time calls: ACTIVATE, DELAY and TERMINATE are handed to the RTU as a request
// (rt_valid/rt with rt_ack); the CPU stalls while a request is open. After DELAY or
// TERMINATE the task may not go on: the CPU waits (BLOCKED) until the RTU exchanges the
// register files (`swap`). A swap happens only at an instruction boundary (`switch_ok`), in a
// CPU cycle in which nothing else is executed; `swap_to_idle` says the new bank holds no task.
// The NOT-SWITCH flag, set and reset by instructions, tells the RTU not to preempt the running
// task; it is cleared on every task switch.
//
// The programming model, the one/two-cycle timing, the post-increment addressing, R0 as return
// stack pointer, the three real-time calls, the decoder outputs SWITCH and DELAY/TERM/ACT and
// the NOT-SWITCH flag follow the FASTCHART architecture and its CPU schematic. The bit encoding
// of instructions, the 16-bit width, the branch conditions, the two-word form of ACTIVATE and
// the stall/handshake rules are this design's own.
module cpu
  import fastchart_pkg::*;
#(
  parameter int unsigned NREGS = 8,
  localparam int unsigned RIDX_W = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  // memory bus
  output word_t             mem_addr,
  output logic              mem_we,
  output word_t             mem_wdata,
  input  word_t             mem_rdata,
  // active register bank
  input  word_t             r_q [NREGS],
  input  word_t             sr_q,
  input  word_t             pc_q,
  input  word_t             il_q,
  output logic              we0,
  output logic [RIDX_W-1:0] wa0,
  output word_t             wd0,
  output logic              we1,
  output logic [RIDX_W-1:0] wa1,
  output word_t             wd1,
  output logic              sr_we,
  output word_t             sr_d,
  output logic              pc_we,
  output word_t             pc_d,
  output logic              il_we,
  output word_t             il_d,
  // RTU
  output logic              rt_valid,
  output rt_req_t           rt,
  input  logic              rt_ack,
  input  logic              swap,
  input  logic              swap_to_idle,
  output logic              switch_ok,
  output logic              not_switch,
  output logic              idle
);

  typedef enum logic [1:0] {S_RUN, S_MEM2, S_BLOCKED, S_IDLE} state_e;

  state_e  state, state_n;
  logic    rt_pending;
  rt_req_t rt_q, rt_n;
  logic    rt_issue;
  logic    ns_q, ns_n;
  logic    exec;

  // decoder fields
  opcode_e           opc;
  logic [RIDX_W-1:0] f_rd, f_rs;
  logic [7:0]        imm8;
  logic [11:0]       imm12;
  word_t             a_rd, a_rs;

  // ALU / shifter
  word_t     alu_a, alu_b, alu_y, sh_y;
  alu_op_e   alu_op;
  shift_op_e sh_op;
  logic      alu_c, alu_v, sh_c;
  logic      cond_true;
  word_t     target;

  alu u_alu (.a(alu_a), .b(alu_b), .op(alu_op), .y(alu_y), .c(alu_c), .v(alu_v));
  shifter u_shifter (.a(alu_y), .op(sh_op), .y(sh_y), .c_out(sh_c));

  assign opc   = opcode_e'(il_q[15:12]);
  assign f_rd  = il_q[8 +: RIDX_W];
  assign f_rs  = il_q[4 +: RIDX_W];
  assign imm8  = il_q[7:0];
  assign imm12 = il_q[11:0];
  assign a_rd  = r_q[f_rd];
  assign a_rs  = r_q[f_rs];

  assign exec       = ce && !swap && !rt_pending && (state == S_RUN || state == S_MEM2);
  assign switch_ok  = !rt_pending && (state == S_RUN || state == S_BLOCKED || state == S_IDLE);
  assign rt_valid   = rt_pending;
  assign rt         = rt_q;
  assign not_switch = ns_q;
  assign idle       = (state == S_IDLE);

  always_comb begin
    unique case (cond_e'(il_q[11:8]))
      CC_AL:   cond_true = 1'b1;
      CC_EQ:   cond_true = sr_q[SR_Z];
      CC_NE:   cond_true = !sr_q[SR_Z];
      CC_CS:   cond_true = sr_q[SR_C];
      CC_CC:   cond_true = !sr_q[SR_C];
      CC_MI:   cond_true = sr_q[SR_N];
      CC_PL:   cond_true = !sr_q[SR_N];
      default: cond_true = 1'b0;
    endcase
  end

  always_comb begin
    // default: fetch the next instruction
    mem_addr  = pc_q;
    mem_we    = 1'b0;
    mem_wdata = '0;
    il_d      = mem_rdata;
    pc_d      = pc_q + 1'b1;
    il_we     = 1'b0;
    pc_we     = 1'b0;
    we0 = 1'b0; wa0 = f_rd; wd0 = sh_y;
    we1 = 1'b0; wa1 = f_rs; wd1 = '0;
    sr_we = 1'b0;
    alu_a  = a_rd;
    alu_b  = a_rs;
    alu_op = alu_op_e'(il_q[3:0]);
    sh_op  = SH_NONE;
    target = pc_q + {{(DATA_W-8){imm8[7]}}, imm8};
    state_n  = state;
    rt_issue = 1'b0;
    rt_n     = rt_q;
    ns_n     = ns_q;

    if (exec && state == S_MEM2) begin
      il_we   = 1'b1;
      pc_we   = 1'b1;
      state_n = S_RUN;
    end else if (exec) begin
      il_we = 1'b1;
      pc_we = 1'b1;
      unique case (opc)
        OP_SYS: begin
          unique case (sys_e'(il_q[11:8]))
            SYS_RET: begin
              mem_addr = r_q[0];
              pc_d     = mem_rdata;
              il_we    = 1'b0;
              we0 = 1'b1; wa0 = '0; wd0 = r_q[0] + 1'b1;
              state_n  = S_MEM2;
            end
            SYS_TERM: begin
              rt_issue = 1'b1;
              rt_n     = '{op: RT_TERMINATE, id: '0, prio: '0, arg: '0};
              state_n  = S_BLOCKED;
            end
            SYS_SETNS: ns_n = 1'b1;
            SYS_CLRNS: ns_n = 1'b0;
            default: ;
          endcase
        end
        OP_ALU: begin
          unique case (alu_op_e'(il_q[3:0]))
            ALU_SHL: begin alu_op = ALU_MOV; sh_op = SH_SHL; end
            ALU_SHR: begin alu_op = ALU_MOV; sh_op = SH_SHR; end
            ALU_ASR: begin alu_op = ALU_MOV; sh_op = SH_ASR; end
            default: ;
          endcase
          we0   = (alu_op_e'(il_q[3:0]) != ALU_CMP);
          sr_we = 1'b1;
        end
        OP_LDI:  begin we0 = 1'b1; wd0 = {8'h00, imm8}; end
        OP_LDHI: begin we0 = 1'b1; wd0 = {imm8, a_rd[7:0]}; end
        OP_ADDI: begin
          alu_op = ALU_ADD;
          alu_b  = {{(DATA_W-8){imm8[7]}}, imm8};
          we0    = 1'b1;
          sr_we  = 1'b1;
        end
        OP_LOAD, OP_STORE: begin
          mem_addr = (addr_mode_e'(il_q[1:0]) == AM_DEC) ? a_rs - 1'b1 : a_rs;
          if (opc == OP_LOAD) begin
            we0 = 1'b1; wd0 = mem_rdata;
          end else begin
            mem_we = 1'b1; mem_wdata = a_rd;
          end
          we1 = (addr_mode_e'(il_q[1:0]) == AM_INC) || (addr_mode_e'(il_q[1:0]) == AM_DEC);
          wd1 = (addr_mode_e'(il_q[1:0]) == AM_DEC) ? a_rs - 1'b1 : a_rs + 1'b1;
          il_we   = 1'b0;
          pc_we   = 1'b0;
          state_n = S_MEM2;
        end
        OP_BR, OP_JMP: begin
          if (opc == OP_JMP) target = {{(DATA_W-12){1'b0}}, imm12};
          if (opc == OP_JMP || cond_true) begin
            mem_addr = target;
            pc_d     = target + 1'b1;
          end
        end
        OP_CALL: begin
          mem_addr  = r_q[0] - 1'b1;
          mem_we    = 1'b1;
          mem_wdata = pc_q;
          we0 = 1'b1; wa0 = '0; wd0 = r_q[0] - 1'b1;
          pc_d    = {{(DATA_W-12){1'b0}}, imm12};
          il_we   = 1'b0;
          state_n = S_MEM2;
        end
        OP_ACT: begin
          // second word of ACTIVATE: the start address
          mem_addr = pc_q;
          il_we    = 1'b0;
          rt_issue = 1'b1;
          rt_n     = '{op: RT_ACTIVATE, id: il_q[11:6], prio: il_q[5:3], arg: mem_rdata};
          state_n  = S_MEM2;
        end
        OP_DELAY: begin
          rt_issue = 1'b1;
          rt_n     = '{op: RT_DELAY, id: '0, prio: '0, arg: {{(DATA_W-12){1'b0}}, imm12}};
          state_n  = S_BLOCKED;
        end
        default: ;  // reserved opcodes execute as NOP
      endcase
    end

    // flags of the ALU/shifter result
    sr_d = sr_q;
    sr_d[SR_Z] = (sh_y == '0);
    sr_d[SR_N] = sh_y[DATA_W-1];
    sr_d[SR_C] = (sh_op == SH_NONE) ? alu_c : sh_c;
    sr_d[SR_V] = (sh_op == SH_NONE) ? alu_v : 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      rt_pending <= 1'b0;
      rt_q       <= '0;
      ns_q       <= 1'b0;
    end else begin
      if (rt_ack) rt_pending <= 1'b0;
      if (ce && swap) begin
        state <= swap_to_idle ? S_IDLE : S_RUN;
        ns_q  <= 1'b0;
      end else if (exec) begin
        state <= state_n;
        ns_q  <= ns_n;
        if (rt_issue) begin
          rt_pending <= 1'b1;
          rt_q       <= rt_n;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) swap |-> (ce && switch_ok))
    else $error("cpu: task switch outside an instruction boundary");

endmodule

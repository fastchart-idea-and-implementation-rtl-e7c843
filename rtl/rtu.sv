// rtu: the FASTCHART Real Time Unit, a real-time kernel in hardware.
//
// The RTU keeps the state of every task (executing, ready, waiting, terminated) and switches
// tasks without any help from the CPU. It holds:
//  - OLD: id and priority of the task the CPU is executing (old_valid low: CPU idle);
//  - NEW: id and priority of the task to run next, whose context has already been loaded
//    into the shadow register file (new_valid low: none);
//  - the ready queue (one FIFO per priority), the wait block (per-task delay counters), the
//    terminate block (per-task INAC flags) and the TCB memory (saved contexts);
//  - the control unit below, which also generates the system time tick.
//
// Control unit, one action per clock in state IDLE, in this order:
//  1. Task switch, at a CPU cycle boundary (cpu_ce high and the CPU's switch_ok):
//     - the current task left by DELAY/TERMINATE: switch to NEW, or to an empty bank (CPU
//       idle) if there is no NEW;
//     - preemption: NEW has a higher priority than OLD and the NOT-SWITCH flag is low: OLD's
//       id goes back into its ready FIFO;
//     - dispatch: the CPU is idle and NEW is valid.
//     The register files are exchanged (`swap`); then, in state SAVE, the old task's context
//     is written from the shadow bank into TCB memory at OLD id * TCB size + register counter,
//     one word per clock; then OLD := NEW and NEW becomes empty.
//  2. Refill: the ready queue holds a task and NEW is empty or of lower priority: the head of
//     the highest non-empty FIFO becomes NEW (a displaced NEW goes back into its FIFO), and
//     in state LOAD its context is read from TCB memory into the shadow bank, one word per
//     clock.
//  3. A real-time call from the CPU (rt_valid): ACTIVATE of a terminated task makes it ready
//     and, in state INIT, writes SR = 0, PC = start address and IL = NOP into its TCB
//     (ACTIVATE of a task that is not terminated, or whose ready FIFO is full, does nothing);
//     DELAY loads the current task's wait counter; TERMINATE sets its INAC flag. DELAY and
//     TERMINATE then hold everything else until the task has been switched out (step 1).
//  4. An expired delay: the task goes into the ready FIFO of its priority.
// An expired delay, a preemption or a NEW push-back that meets a full ready FIFO waits.
// Timing (RTU clocks): a switch is one clock, SAVE takes TCB size clocks, LOAD TCB size + 1,
// INIT 3; a real-time call is acknowledged in the clock it is taken. After reset task INIT_ID
// runs with priority INIT_PRIO in bank 0.
//
// Following the FASTCHART architecture: 64 tasks, 8 priorities, ready FIFOs of depth 8 served
// highest first, per-task down-counters on a time tick, the INAC flags, OLD/NEW registers, the
// TCB address id * TCB size + register counter, the write-back of OLD and the load of the next
// task after an exchange of register files, and OLD going back to the ready queue when
// preempted. This design's own choices: preloading NEW before the switch (so a switch costs one
// CPU cycle), the order of actions above, replacing NEW by a higher-priority arrival, the idle
// CPU state, the TCB initialisation on ACTIVATE, the time tick = TICK_DIV CPU cycles, and the
// one-word-per-clock transfer (the RTU clock is meant to be several times faster than the CPU
// clock).
module rtu
  import fastchart_pkg::*;
#(
  parameter int unsigned NUM_TASKS  = 64,
  parameter int unsigned NUM_PRIO   = 8,
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned NREGS      = 8,
  parameter int unsigned TIMER_W    = 12,
  parameter int unsigned TICK_DIV   = 1,
  parameter int unsigned INIT_ID    = 0,
  parameter int unsigned INIT_PRIO  = NUM_PRIO - 1,
  localparam int unsigned ID_W   = $clog2(NUM_TASKS),
  localparam int unsigned PRIO_W = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1,
  localparam int unsigned TCB_WORDS = NREGS + CTX_EXTRA,
  localparam int unsigned CIDX_W = $clog2(TCB_WORDS),
  localparam int unsigned TAW = $clog2(NUM_TASKS * TCB_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cpu_ce,
  // real-time calls from the CPU
  input  logic              rt_valid,
  input  rt_req_t           rt,
  output logic              rt_ack,
  // task switch
  input  logic              switch_ok,
  input  logic              not_switch,
  output logic              swap,
  output logic              swap_to_idle,
  // shadow register file
  output logic [CIDX_W-1:0] rf_idx,
  output logic              rf_we,
  output word_t             rf_wdata,
  input  word_t             rf_rdata,
  // status
  output logic              time_tick,
  output logic              cur_valid,
  output logic [ID_W-1:0]   cur_id,
  output logic [PRIO_W-1:0] cur_prio,
  output rtu_events_t       events
);

  localparam int unsigned SR_I = NREGS;
  localparam int unsigned PC_I = NREGS + 1;
  localparam int unsigned IL_I = NREGS + 2;
  localparam int unsigned TICK_W = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;

  typedef enum logic [1:0] {ST_IDLE, ST_SAVE, ST_LOAD, ST_INIT} ctl_state_e;

  ctl_state_e        st;
  logic              old_valid, new_valid, leave_pending;
  logic [ID_W-1:0]   old_id, new_id, init_id;
  logic [PRIO_W-1:0] old_prio, new_prio;
  word_t             init_pc;
  logic [CIDX_W:0]   cnt;
  logic [TICK_W-1:0] tick_cnt;

  // ready queue
  logic              rq_push, rq_pop, rq_top_valid;
  logic [PRIO_W-1:0] rq_push_prio, rq_top_prio;
  logic [ID_W-1:0]   rq_push_id, rq_top_id;
  logic [NUM_PRIO-1:0] rq_full;
  // wait queue
  logic              wq_load, wq_exp_valid, wq_take;
  logic [ID_W-1:0]   wq_exp_id;
  logic [PRIO_W-1:0] wq_exp_prio;
  logic [NUM_TASKS-1:0] wq_waiting;
  // terminate block
  logic              tb_term, tb_act_req, tb_act_done, tb_act_new, tb_act_refused, tb_push;
  logic [ID_W-1:0]   tb_push_id;
  logic [PRIO_W-1:0] tb_push_prio;
  logic [NUM_TASKS-1:0] tb_inactive;
  // TCB memory
  logic [TAW-1:0]    tcb_addr;
  logic              tcb_we;
  word_t             tcb_wdata, tcb_rdata;
  logic [ID_W-1:0]   tcb_base;
  logic [CIDX_W:0]   tcb_off;

  // decisions in IDLE
  logic preempt_cond, dispatch_cond, want_swap, do_swap, do_refill, do_rt, do_expire;

  ready_queue #(.NUM_TASKS(NUM_TASKS), .NUM_PRIO(NUM_PRIO), .FIFO_DEPTH(FIFO_DEPTH)) u_ready (
    .clk, .rst_n, .push(rq_push), .push_prio(rq_push_prio), .push_id(rq_push_id),
    .pop(rq_pop), .top_valid(rq_top_valid), .top_prio(rq_top_prio), .top_id(rq_top_id),
    .full(rq_full));

  wait_queue #(.NUM_TASKS(NUM_TASKS), .NUM_PRIO(NUM_PRIO), .TIMER_W(TIMER_W)) u_wait (
    .clk, .rst_n, .tick(time_tick), .load(wq_load), .load_id(old_id),
    .load_time(rt.arg[TIMER_W-1:0]), .load_prio(old_prio), .exp_valid(wq_exp_valid),
    .exp_id(wq_exp_id), .exp_prio(wq_exp_prio), .take(wq_take), .waiting(wq_waiting));

  terminate_block #(.NUM_TASKS(NUM_TASKS), .NUM_PRIO(NUM_PRIO), .INIT_ID(INIT_ID)) u_term (
    .clk, .rst_n, .term(tb_term), .term_id(old_id), .act_req(tb_act_req),
    .act_id(ID_W'(rt.id)), .act_prio(PRIO_W'(rt.prio)), .fifo_full(rq_full),
    .act_done(tb_act_done), .act_new(tb_act_new), .act_refused(tb_act_refused),
    .push(tb_push), .push_id(tb_push_id), .push_prio(tb_push_prio), .inactive(tb_inactive));

  tcb_memory #(.NUM_TASKS(NUM_TASKS), .TCB_WORDS(TCB_WORDS)) u_tcb (
    .clk, .addr(tcb_addr), .we(tcb_we), .wdata(tcb_wdata), .rdata(tcb_rdata));

  // system time tick: every TICK_DIV CPU cycles
  assign time_tick = cpu_ce && (32'(tick_cnt) == TICK_DIV - 1);

  assign cur_valid = old_valid;
  assign cur_id    = old_id;
  assign cur_prio  = old_prio;

  always_comb begin
    preempt_cond  = old_valid && new_valid && (new_prio > old_prio) && !rq_full[old_prio];
    dispatch_cond = !old_valid && new_valid;
    want_swap     = leave_pending || (preempt_cond && !not_switch) || dispatch_cond;
    do_swap       = (st == ST_IDLE) && want_swap && cpu_ce && switch_ok;
    swap          = do_swap;
    swap_to_idle  = !new_valid;

    do_refill = (st == ST_IDLE) && !do_swap && !leave_pending && rq_top_valid &&
                (!new_valid || ((rq_top_prio > new_prio) && !rq_full[new_prio]));
    do_rt     = (st == ST_IDLE) && !do_swap && !leave_pending && !do_refill && rt_valid &&
                old_valid;

    // real-time call
    tb_act_req = do_rt && (rt.op == RT_ACTIVATE);
    tb_term    = do_rt && (rt.op == RT_TERMINATE);
    wq_load    = do_rt && (rt.op == RT_DELAY);
    rt_ack     = do_rt && ((rt.op != RT_ACTIVATE) || tb_act_done);

    // expired delay, if the ready queue's push port is free
    do_expire = (st == ST_IDLE) && !do_swap && !leave_pending && !do_refill && !tb_push &&
                wq_exp_valid && !rq_full[wq_exp_prio];
    wq_take   = do_expire;

    // one push per clock into the ready queue
    rq_push      = 1'b0;
    rq_push_prio = '0;
    rq_push_id   = '0;
    if (do_swap && !leave_pending && old_valid) begin
      rq_push = 1'b1; rq_push_prio = old_prio; rq_push_id = old_id;
    end else if (do_refill && new_valid) begin
      rq_push = 1'b1; rq_push_prio = new_prio; rq_push_id = new_id;
    end else if (tb_push) begin
      rq_push = 1'b1; rq_push_prio = tb_push_prio; rq_push_id = tb_push_id;
    end else if (do_expire) begin
      rq_push = 1'b1; rq_push_prio = wq_exp_prio; rq_push_id = wq_exp_id;
    end
    rq_pop = do_refill;

    // TCB address: task id * TCB size + register counter
    tcb_base  = (st == ST_SAVE) ? old_id : (st == ST_LOAD) ? new_id : init_id;
    tcb_off   = cnt;
    tcb_addr  = TAW'(32'(tcb_base) * TCB_WORDS + 32'(tcb_off));
    tcb_we    = (st == ST_SAVE) || (st == ST_INIT);
    tcb_wdata = (st == ST_SAVE) ? rf_rdata : (32'(cnt) == PC_I) ? init_pc : '0;
    if (st == ST_LOAD && 32'(cnt) >= TCB_WORDS) tcb_addr = '0;

    // shadow register file
    rf_idx   = (st == ST_LOAD) ? CIDX_W'(cnt - 1'b1) : CIDX_W'(cnt);
    rf_we    = (st == ST_LOAD) && (cnt != '0);
    rf_wdata = tcb_rdata;

    events = '0;
    events.preempt      = do_swap && !leave_pending && old_valid;
    events.voluntary    = do_swap && leave_pending;
    events.dispatch     = do_swap && !old_valid;
    events.to_idle      = do_swap && leave_pending && !new_valid;
    events.refill       = do_refill;
    events.new_pushback = do_refill && new_valid;
    events.expire       = do_expire;
    events.activate     = tb_act_new;
    events.act_ignored  = tb_act_req && !tb_act_new && !tb_act_refused;
    events.fifo_full    = tb_act_refused ||
                          ((st == ST_IDLE) && !do_swap && !leave_pending && !do_refill &&
                           !tb_push && wq_exp_valid && rq_full[wq_exp_prio]);
    events.ns_hold      = (st == ST_IDLE) && cpu_ce && preempt_cond && not_switch &&
                          !leave_pending;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= ST_IDLE;
      old_valid     <= 1'b1;
      old_id        <= ID_W'(INIT_ID);
      old_prio      <= PRIO_W'(INIT_PRIO);
      new_valid     <= 1'b0;
      new_id        <= '0;
      new_prio      <= '0;
      leave_pending <= 1'b0;
      init_id       <= '0;
      init_pc       <= '0;
      cnt           <= '0;
      tick_cnt      <= '0;
    end else begin
      if (cpu_ce) tick_cnt <= time_tick ? '0 : tick_cnt + 1'b1;

      unique case (st)
        ST_IDLE: begin
          if (do_swap) begin
            leave_pending <= 1'b0;
            cnt <= '0;
            if (old_valid) begin
              st <= ST_SAVE;
            end else begin
              old_valid <= new_valid;
              old_id    <= new_id;
              old_prio  <= new_prio;
              new_valid <= 1'b0;
            end
          end else if (do_refill) begin
            new_valid <= 1'b1;
            new_id    <= rq_top_id;
            new_prio  <= rq_top_prio;
            cnt       <= '0;
            st        <= ST_LOAD;
          end else if (do_rt) begin
            if (rt.op == RT_ACTIVATE) begin
              if (tb_act_new) begin
                init_id <= ID_W'(rt.id);
                init_pc <= rt.arg;
                cnt     <= (CIDX_W+1)'(SR_I);
                st      <= ST_INIT;
              end
            end else if (rt_ack) begin
              leave_pending <= 1'b1;
            end
          end
        end
        ST_SAVE: begin
          if (32'(cnt) == TCB_WORDS - 1) begin
            old_valid <= new_valid;
            old_id    <= new_id;
            old_prio  <= new_prio;
            new_valid <= 1'b0;
            cnt       <= '0;
            st        <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_LOAD: begin
          if (32'(cnt) == TCB_WORDS) begin
            cnt <= '0;
            st  <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_INIT: begin
          if (32'(cnt) == IL_I) begin
            cnt <= '0;
            st  <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= ST_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) swap |-> (st == ST_IDLE))
    else $error("rtu: register files exchanged while a transfer is running");

endmodule

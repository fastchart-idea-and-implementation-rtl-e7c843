// tb_rtu: the Real Time Unit with the two register files, the CPU played by the testbench
// (CPU clock enable one clock in ten). Walks through the task state diagram:
//  ACTIVATE of a terminated task (and of an active one, ignored); DELAY of the running task,
//  switching within one CPU cycle to the preloaded NEW task whose context starts at its
//  start address; the delay running out on exactly the programmed tick; preemption of the
//  lower-priority task, held back while NOT-SWITCH is set; the preempted task's registers
//  coming back unchanged through TCB memory; TERMINATE; and the CPU going idle when no task
//  is ready.
`timescale 1ns/1ps
module tb_rtu;
  import fastchart_pkg::*;

  logic clk = 0, rst_n = 0, cpu_ce;
  logic rt_valid = 0, rt_ack, switch_ok = 1, not_switch = 0, swap, swap_to_idle;
  rt_req_t rt = '0;
  logic [3:0] rf_idx;
  logic rf_we;
  word_t rf_wdata, rf_rdata;
  logic time_tick, cur_valid;
  logic [5:0] cur_id;
  logic [2:0] cur_prio;
  rtu_events_t events;

  word_t r_q [8];
  word_t sr_q, pc_q, il_q;
  logic we0 = 0, we1 = 0, sr_we = 0, pc_we = 0, il_we = 0, active_bank;
  logic [2:0] wa0 = 0, wa1 = 0;
  word_t wd0 = 0, wd1 = 0, sr_d = 0, pc_d = 0, il_d = 0;

  int div = 0, ticks = 0, clocks = 0;
  int checks = 0, failures = 0, n_ns = 0, n_pre = 0;

  rtu dut (.*);
  register_files #(.NREGS(8)) u_rf (.clk, .rst_n, .swap, .active_bank, .r_q, .sr_q, .pc_q,
    .il_q, .we0, .wa0, .wd0, .we1, .wa1, .wd1, .sr_we, .sr_d, .pc_we, .pc_d, .il_we, .il_d,
    .rtu_idx(rf_idx), .rtu_we(rf_we), .rtu_wdata(rf_wdata), .rtu_rdata(rf_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    div <= rst_n ? (div == 9 ? 0 : div + 1) : 0;
    if (rst_n) clocks++;
    if (time_tick) ticks++;
    n_ns  += int'(events.ns_hold);
    n_pre += int'(events.preempt);
  end
  assign cpu_ce = rst_n && div == 9;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic call_rt(rt_op_e op, int id, int prio, int arg);
    @(negedge clk);
    rt = '{op: op, id: 6'(id), prio: 3'(prio), arg: word_t'(arg)};
    rt_valid = 1;
    #1;
    while (!rt_ack) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 rt_valid = 0;
  endtask

  initial begin
    #200000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, c0;
    #12 rst_n = 1;
    @(negedge clk);
    check(cur_valid && cur_id == 0 && cur_prio == 3'd7, "task 0 runs after reset");
    // task 0 writes R3 and PC in its (active) bank
    we0 = 1; wa0 = 3; wd0 = 16'hABCD; pc_we = 1; pc_d = 16'h0042;
    @(negedge clk); we0 = 0; pc_we = 0;

    call_rt(RT_ACTIVATE, 3, 2, 'h100);
    check(events.activate == 0, "single activate pulse");
    call_rt(RT_ACTIVATE, 3, 5, 'h200);     // task 3 is active now: ignored
    repeat (40) @(negedge clk);            // INIT, refill and LOAD of task 3 as NEW
    check(dut.new_valid && dut.new_id == 3 && dut.new_prio == 3'd2, "task 3 preloaded as NEW");
    check(!swap, "no preemption by a lower priority");

    // DELAY 5 ticks: switch within one CPU cycle
    call_rt(RT_DELAY, 0, 0, 5);
    c0 = clocks; t0 = ticks;
    while (!swap) @(negedge clk);
    check(clocks - c0 <= 10 && !swap_to_idle, $sformatf("voluntary switch after %0d clocks", clocks - c0));
    @(negedge clk);
    check(pc_q == 16'h0100 && il_q == 16'h0000 && sr_q == 16'h0000, "task 3 starts at its start address");
    repeat (12) @(negedge clk);
    check(cur_id == 3 && cur_prio == 3'd2, "OLD = task 3 after the save");

    // task 0 expires after 5 ticks and preempts, but NOT-SWITCH holds it off
    not_switch = 1;
    while (!events.expire) @(negedge clk);
    check(dut.u_wait.exp_id == 0 && ticks - t0 == 5, $sformatf("task 0 expired after %0d ticks", ticks - t0));
    repeat (80) @(negedge clk);
    check(n_ns > 0 && n_pre == 0, "preemption held by NOT-SWITCH");
    not_switch = 0;
    while (!swap) @(negedge clk);
    @(negedge clk);
    check(n_pre == 1, "preemption after NOT-SWITCH released");
    check(r_q[3] == 16'hABCD && pc_q == 16'h0042, "task 0 context restored from TCB memory");
    repeat (30) @(negedge clk);
    check(cur_id == 0 && dut.new_valid && dut.new_id == 3, "task 3 back in ready queue and NEW");

    // task 0 terminates: task 3 resumes; task 3 terminates: CPU idle
    call_rt(RT_TERMINATE, 0, 0, 0);
    while (!swap) @(negedge clk);
    check(!swap_to_idle, "switch to task 3");
    @(negedge clk);
    check(pc_q == 16'h0100, "task 3 context restored");
    repeat (30) @(negedge clk);
    call_rt(RT_TERMINATE, 0, 0, 0);
    while (!swap) @(negedge clk);
    check(swap_to_idle, "no task ready: switch to idle");
    repeat (30) @(negedge clk);
    check(!cur_valid && dut.u_term.inac[0] && dut.u_term.inac[3], "both tasks terminated, CPU idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

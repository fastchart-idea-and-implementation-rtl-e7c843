// tb_fastchart_top: end-to-end test of the FASTCHART machine at its default size
// (64 tasks, 8 priorities, ready FIFOs of depth 8, 8 registers, RTU clock = 10 x CPU clock).
//
// A program of 13 tasks runs for 4000 CPU cycles:
//  - task 0 (INIT, priority 7) activates T1 (prio 2), T2 (prio 4), eight group tasks
//    10..17 (prio 3), a ninth group task 18 that must be refused (its ready FIFO is full)
//    and T1 once more (ignored: T1 is not terminated), then terminates;
//  - T2 counts its iterations in R5, stores them to 0xF2 and delays 25 ticks;
//  - T1 does the same at 0xF1 with a delay of 40 and, from its third iteration on,
//    activates background task B (only the first activation takes effect);
//  - the group tasks increment a shared counter at 0xF0 inside a NOT-SWITCH section that
//    includes a short busy loop, then delay 600 ticks;
//  - B (prio 0) never delays: it counts in R5 through a subroutine (CALL/RET on the R0
//    stack), stores the count to 0xF3 and checks (R4)+ / -(R4) addressing.
// Checks: every counter advances by exactly one per store (so register contents survive
// every task switch and the NOT-SWITCH sections keep the shared counter consistent); T2's
// stores are at least its delay apart; task 18 never runs; B's self-check never fails; each
// task made progress; and each RTU mechanism occurred at least once.
`timescale 1ns/1ps
module tb_fastchart_top;
  import fastchart_pkg::*;
  import fastchart_asm::*;

  localparam int CPU_CYCLES = 4000;
  localparam int DIV = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        ld_we = 1'b0;
  word_t       ld_addr = '0, ld_data = '0;
  word_t       mem_addr, mem_wdata;
  logic        mem_we, cpu_ce, time_tick, cpu_idle, active_bank, cur_valid;
  logic [5:0]  cur_id;
  logic [2:0]  cur_prio;
  rtu_events_t events;

  fastchart_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t img [1024];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- program ----------------
  task automatic build();
    int a;
    foreach (img[i]) img[i] = nop();
    // INIT, task 0
    a = 'h000;
    img[a++] = act(1, 2);  img[a++] = 'h040;
    img[a++] = act(2, 4);  img[a++] = 'h060;
    for (int g = 0; g < 9; g++) begin
      img[a++] = act(10 + g, 3); img[a++] = 'h0A0;
    end
    img[a++] = act(1, 2);  img[a++] = 'h040;   // T1 is active: ignored
    img[a++] = term();
    // T1
    a = 'h040;
    img[a++] = ldi(1, 'hF1);
    img[a++] = ldi(5, 0);
    img[a++] = ldi(6, 3);
    // loop at 0x43
    img[a++] = addi(5, 1);
    img[a++] = store(5, 1, AM_IND);
    img[a++] = alu(5, 6, ALU_CMP);                 // C = (R5 < 3)
    img[a] = br(CC_CS, a, 'h049); a++;             // 0x46
    img[a++] = act(5, 0); img[a++] = 'h0E0;        // 0x47, 0x48
    img[a++] = delay(40);                          // 0x49
    img[a++] = jmp('h043);
    // T2
    a = 'h060;
    img[a++] = ldi(1, 'hF2);
    img[a++] = ldi(5, 0);
    img[a++] = addi(5, 1);                         // 0x62
    img[a++] = store(5, 1, AM_IND);
    img[a++] = delay(25);
    img[a++] = jmp('h062);
    // group tasks
    a = 'h0A0;
    img[a++] = ldi(1, 'hF0);
    img[a++] = setns();                            // 0xA1
    img[a++] = load(2, 1, AM_IND);
    img[a++] = ldi(3, 4);
    img[a++] = addi(3, -1);                        // 0xA4
    img[a] = br(CC_NE, a, 'h0A4); a++;
    img[a++] = addi(2, 1);
    img[a++] = store(2, 1, AM_IND);
    img[a++] = clrns();
    img[a++] = delay(600);
    img[a++] = jmp('h0A1);
    // B
    a = 'h0E0;
    img[a++] = ldi(0, 0);  img[a++] = ldhi(0, 'h03);   // R0 = 0x300 stack
    img[a++] = ldi(4, 'h80); img[a++] = ldhi(4, 'h03); // R4 = 0x380
    img[a++] = ldi(1, 'hF3);
    img[a++] = ldi(5, 0);
    img[a++] = call('h0D0);                        // 0xE6 loop
    img[a++] = store(5, 1, AM_IND);
    img[a++] = store(5, 4, AM_INC);
    img[a++] = load(7, 4, AM_DEC);
    img[a++] = alu(7, 5, ALU_CMP);
    img[a] = br(CC_EQ, a, 'h0E6); a++;             // 0xEB
    img[a++] = ldi(2, 'hF4);
    img[a++] = store(7, 2, AM_IND);
    img[a++] = jmp('h0E6);
    a = 'h0D0;
    img[a++] = addi(5, 1);                         // subroutine
    img[a++] = ret();
    // data
    img['hF0] = 0; img['hF1] = 0; img['hF2] = 0; img['hF3] = 0; img['hF4] = 0;
  endtask

  // ---------------- monitors ----------------
  int last [4];
  int nstore [4];
  int t2_last_clk = -1, t2_min_gap = 1 << 30;
  int bad_b = 0, ran18 = 0, clk_n = 0;
  int ev_preempt, ev_vol, ev_disp, ev_idle, ev_refill, ev_push, ev_exp, ev_act, ev_ign,
      ev_full, ev_ns, n_switch;

  always @(posedge clk) if (rst_n) begin
    clk_n++;
    if (cpu_ce && mem_we) begin
      if (mem_addr >= 'hF0 && mem_addr <= 'hF3) begin
        int k;
        k = int'(mem_addr) - 'hF0;
        check(int'(mem_wdata) == last[k] + 1,
              $sformatf("counter %0d: stored %0d after %0d", k, mem_wdata, last[k]));
        last[k] = int'(mem_wdata);
        nstore[k]++;
        if (k == 2) begin
          if (t2_last_clk >= 0 && clk_n - t2_last_clk < t2_min_gap) t2_min_gap = clk_n - t2_last_clk;
          t2_last_clk = clk_n;
        end
      end
      if (mem_addr == 'hF4) bad_b++;
    end
    if (cur_valid && cur_id == 6'd18) ran18++;
    ev_preempt += int'(events.preempt);
    ev_vol     += int'(events.voluntary);
    ev_disp    += int'(events.dispatch);
    ev_idle    += int'(events.to_idle);
    ev_refill  += int'(events.refill);
    ev_push    += int'(events.new_pushback);
    ev_exp     += int'(events.expire);
    ev_act     += int'(events.activate);
    ev_ign     += int'(events.act_ignored);
    ev_full    += int'(events.fifo_full);
    ev_ns      += int'(events.ns_hold);
    n_switch   += int'(dut.swap);
  end

  // watchdog
  initial begin
    repeat (CPU_CYCLES * DIV + 20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    repeat (3) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      ld_we <= 1'b1; ld_addr <= word_t'(i); ld_data <= img[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    repeat (CPU_CYCLES * DIV) @(posedge clk);

    $display("stores: group=%0d T1=%0d T2=%0d B=%0d, T2 min gap=%0d clocks",
             nstore[0], nstore[1], nstore[2], nstore[3], t2_min_gap);
    $display("events: preempt=%0d voluntary=%0d dispatch=%0d to_idle=%0d refill=%0d pushback=%0d",
             ev_preempt, ev_vol, ev_disp, ev_idle, ev_refill, ev_push);
    $display("        expire=%0d activate=%0d ignored=%0d fifo_full=%0d ns_hold=%0d switches=%0d",
             ev_exp, ev_act, ev_ign, ev_full, ev_ns, n_switch);
    check(nstore[0] >= 16, "group tasks made progress");
    check(nstore[1] >= 4,  "T1 made progress");
    check(nstore[2] >= 10, "T2 made progress");
    check(nstore[3] >= 10, "B made progress");
    check(t2_min_gap >= 25 * DIV, "T2 delay respected");
    check(bad_b == 0, "B (R4)+/-(R4) self-check");
    check(ran18 == 0, "task 18 (refused activation) never ran");
    check(ev_act == 11, $sformatf("activations %0d, expected 11 (T1, T2, 8 group, B)", ev_act));
    check(ev_preempt > 0, "preemption happened");
    check(ev_vol > 0,     "voluntary switch happened");
    check(ev_disp > 0,    "dispatch from idle happened");
    check(ev_idle > 0,    "CPU went idle");
    check(ev_refill > 0,  "NEW refilled");
    check(ev_push > 0,    "NEW pushed back");
    check(ev_exp > 0,     "delay expired");
    check(ev_ign > 0,     "ACTIVATE of an active task ignored");
    check(ev_full > 0,    "full ready FIFO met");
    check(ev_ns > 0,      "NOT-SWITCH held a preemption");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

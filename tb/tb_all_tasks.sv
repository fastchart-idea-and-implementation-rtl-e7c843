// tb_all_tasks: the full task population, 64 tasks over 8 priorities, on the full-size
// machine. Task 0 (priority 7) activates tasks 1..63 with priority id mod 8 and terminates.
// Task k increments its own counter at 300H + k, delays 1000 ticks and repeats.
// Checks: every ACTIVATE takes effect (the ready FIFOs of depth 8 hold all of them); the first
// 63 dispatches come in non-increasing priority and, within a priority, in activation
// order; every task has run at least twice by the end; the counters count correctly.
`timescale 1ns/1ps
module tb_all_tasks;
  import fastchart_pkg::*;
  import fastchart_asm::*;

  localparam int CPU_CYCLES = 3000;
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

  int checks = 0, failures = 0, nact = 0, nfull = 0;
  word_t img [1024];
  int cnt [64];
  int order [$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    nact  += int'(events.activate);
    nfull += int'(events.fifo_full);
    if (dut.swap && !dut.swap_to_idle && order.size() < 63) order.push_back(int'(dut.u_rtu.new_id));
    if (cpu_ce && mem_we && mem_addr >= 'h300 && mem_addr < 'h340) begin
      int k;
      k = int'(mem_addr) - 'h300;
      check(int'(mem_wdata) == cnt[k] + 1, $sformatf("task %0d counter %0d", k, mem_wdata));
      cnt[k] = int'(mem_wdata);
    end
  end

  initial begin
    repeat (CPU_CYCLES * DIV + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    foreach (cnt[i]) cnt[i] = 0;
    foreach (img[i]) img[i] = nop();
    a = 0;
    for (int k = 1; k < 64; k++) begin
      img[a++] = act(k, k % 8); img[a++] = word_t'('h80 + 8 * k);
    end
    img[a++] = term();
    for (int k = 1; k < 64; k++) begin
      a = 'h80 + 8 * k;
      img[a++] = ldi(1, k);
      img[a++] = ldhi(1, 'h03);
      img[a++] = load(2, 1, AM_IND);     // loop
      img[a++] = addi(2, 1);
      img[a++] = store(2, 1, AM_IND);
      img[a++] = delay(1000);
      img[a++] = jmp('h80 + 8 * k + 2);
    end
    for (int k = 0; k < 64; k++) img['h300 + k] = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 1024; i++) begin
      ld_we <= 1'b1; ld_addr <= word_t'(i); ld_data <= img[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    repeat (CPU_CYCLES * DIV) @(posedge clk);

    check(nact == 63 && nfull == 0, $sformatf("%0d activations, %0d refused", nact, nfull));
    check(order.size() == 63, "63 dispatches recorded");
    for (int i = 1; i < order.size(); i++) begin
      int pp, pc;
      pp = order[i-1] % 8; pc = order[i] % 8;
      check(pc < pp || (pc == pp && order[i] > order[i-1]),
            $sformatf("dispatch %0d: task %0d after task %0d", i, order[i], order[i-1]));
    end
    for (int k = 1; k < 64; k++) check(cnt[k] >= 2, $sformatf("task %0d ran %0d times", k, cnt[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

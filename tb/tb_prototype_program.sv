// tb_prototype_program: runs the FASTCHART demonstration program on two machines side by
// side: the full-size one (64 tasks, 8 priorities) and one cut down to the first prototype's
// task set (8 tasks, 2 priorities).
//
// Four tasks: task 0 (INIT, started by reset) activates task 1 at priority 0 (start 20H),
// task 2 at priority 1 (start 40H) and task 3 at priority 0 (start 60H), then terminates.
// Tasks 1-3 each loop on "DELAY 16 clocks; JMP begin". The testbench records every task
// switch and checks: the first dispatch order (2, then 1 and 3 in activation order), that
// task 0 never runs again, that each periodic task is switched in at least every
// 16 + 12 CPU cycles and never sooner than 16 (its delay) with a period that never varies
// (the machine is deterministic), that each ran often, and that the CPU idles in between
// (everything is delayed most of the time).
`timescale 1ns/1ps
module tb_prototype_program;
  import fastchart_pkg::*;
  import fastchart_asm::*;

  localparam int CPU_CYCLES = 3000;
  localparam int DIV = 10;
  localparam int NCFG = 2;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  ld_we = 1'b0;
  word_t ld_addr = '0, ld_data = '0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t img [128];
  int cyc [NCFG];
  int idle_cycles [NCFG];
  int nrun [NCFG][4];
  int last_start [NCFG][4];
  int min_gap [NCFG][4];
  int max_gap [NCFG][4];
  int first3 [NCFG][3];
  int nfirst [NCFG];
  logic task0_cur [NCFG];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int NT = (g == 0) ? 64 : 8;
    localparam int NP = (g == 0) ? 8 : 2;
    localparam int IW = $clog2(NT);
    localparam int PW = $clog2(NP);
    word_t       mem_addr, mem_wdata;
    logic        mem_we, cpu_ce, time_tick, cpu_idle, active_bank, cur_valid;
    logic [IW-1:0] cur_id;
    logic [PW-1:0] cur_prio;
    rtu_events_t events;

    fastchart_top #(.NUM_TASKS(NT), .NUM_PRIO(NP)) dut (
      .clk, .rst_n, .ld_we, .ld_addr, .ld_data, .mem_addr, .mem_we, .mem_wdata, .cpu_ce,
      .time_tick, .cpu_idle, .active_bank, .cur_valid, .cur_id, .cur_prio, .events);

    always @(posedge clk) if (rst_n) begin
      if (cpu_ce) begin
        cyc[g]++;
        idle_cycles[g] += int'(cpu_idle);
      end
      task0_cur[g] = cur_valid && cur_id == '0;
      if (dut.swap && !dut.swap_to_idle) begin
        int id;
        id = int'(dut.u_rtu.new_id);
        if (id < 4) begin
          nrun[g][id]++;
          if (last_start[g][id] >= 0) begin
            if (cyc[g] - last_start[g][id] < min_gap[g][id]) min_gap[g][id] = cyc[g] - last_start[g][id];
            if (cyc[g] - last_start[g][id] > max_gap[g][id]) max_gap[g][id] = cyc[g] - last_start[g][id];
          end
          last_start[g][id] = cyc[g];
        end
        if (nfirst[g] < 3) begin first3[g][nfirst[g]] = id; nfirst[g]++; end
      end
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
    for (int g = 0; g < NCFG; g++) begin
      cyc[g] = 0; idle_cycles[g] = 0; nfirst[g] = 0;
      for (int i = 0; i < 4; i++) begin
        nrun[g][i] = 0; last_start[g][i] = -1; min_gap[g][i] = 1 << 30; max_gap[g][i] = 0;
      end
    end
    foreach (img[i]) img[i] = nop();
    a = 0;
    img[a++] = act(1, 0); img[a++] = 'h20;   // ACTIVATE (TASK_1, PR_0); STARTADDRESS (20H)
    img[a++] = act(2, 1); img[a++] = 'h40;   // ACTIVATE (TASK_2, PR_1); STARTADDRESS (40H)
    img[a++] = act(3, 0); img[a++] = 'h60;   // ACTIVATE (TASK_3, PR_0); STARTADDRESS (60H)
    img[a++] = term();
    for (int t = 1; t <= 3; t++) begin
      img['h20 * t]     = delay(16);
      img['h20 * t + 1] = jmp('h20 * t);
    end
    repeat (3) @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      ld_we <= 1'b1; ld_addr <= word_t'(i); ld_data <= img[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    repeat (CPU_CYCLES * DIV) @(posedge clk);

    for (int g = 0; g < NCFG; g++) begin
      string c;
      c = (g == 0) ? "64 tasks/8 priorities" : "8 tasks/2 priorities";
      for (int t = 1; t <= 3; t++)
        $display("%s: task %0d: %0d runs, period %0d..%0d CPU cycles", c, t, nrun[g][t],
                 min_gap[g][t], max_gap[g][t]);
      $display("%s: CPU idle %0d of %0d cycles", c, idle_cycles[g], cyc[g]);
      check(nfirst[g] == 3 && first3[g][0] == 2 && first3[g][1] == 1 && first3[g][2] == 3,
            {c, ": dispatch order task 2 (priority 1) first, then tasks 1 and 3"});
      check(nrun[g][0] == 0 && !task0_cur[g], {c, ": INIT task terminated for good"});
      for (int t = 1; t <= 3; t++) begin
        check(nrun[g][t] >= 80, $sformatf("%s: task %0d ran %0d times", c, t, nrun[g][t]));
        check(min_gap[g][t] >= 16 && max_gap[g][t] <= 28,
              $sformatf("%s: task %0d period %0d..%0d", c, t, min_gap[g][t], max_gap[g][t]));
        check(min_gap[g][t] == max_gap[g][t], $sformatf("%s: task %0d period constant", c, t));
      end
      check(idle_cycles[g] > cyc[g] / 2, {c, ": CPU idle while all tasks wait"});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

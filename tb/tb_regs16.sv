// tb_regs16: the full machine built with sixteen general registers per context (NREGS = 16),
// the larger of the two register-file sizes of the FASTCHART architecture.
//
// Three tasks keep state only in R11..R15, the registers that exist only in the 16-register
// build: task k holds a constant key in R13, a counter in R15 and counter XOR key in R14, and
// stores R15 and R14 to 0F0H+k and 0F8H+k on every pass, then busy-waits and delays. Tasks 1
// and 2 share priority 1 with long busy loops; task 3 runs at priority 5 with a short delay
// and so preempts them repeatedly. The testbench watches every store: each counter store must
// be the previous one plus one, and each R14 store must equal that counter XOR the task's key.
// A context that lost or mixed any of these registers across a switch (for example if only
// the low eight registers were saved, loaded or swapped) breaks one of these checks.
`timescale 1ns/1ps
module tb_regs16;
  import fastchart_pkg::*;
  import fastchart_asm::*;

  localparam int CPU_CYCLES = 4000;
  localparam int DIV = 10;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  ld_we = 1'b0;
  word_t ld_addr = '0, ld_data = '0;
  word_t mem_addr, mem_wdata;
  logic  mem_we, cpu_ce, time_tick, cpu_idle, active_bank, cur_valid;
  logic [5:0] cur_id;
  logic [2:0] cur_prio;
  rtu_events_t events;
  always #5 clk = ~clk;

  fastchart_top #(.NREGS(16)) dut (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_data, .mem_addr, .mem_we, .mem_wdata, .cpu_ce,
    .time_tick, .cpu_idle, .active_bank, .cur_valid, .cur_id, .cur_prio, .events);

  int checks = 0, failures = 0;
  int cnt [4], nbad [4], preempts = 0, switches = 0;
  word_t last [4];
  word_t key [4];
  word_t img [256];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (cpu_ce && mem_we) begin
      int k;
      if (mem_addr >= 16'h00F1 && mem_addr <= 16'h00F3) begin
        k = int'(mem_addr - 16'h00F0);
        if (mem_wdata != last[k] + 16'd1) begin
          nbad[k]++;
          if (nbad[k] <= 3) $display("task %0d counter %0d after %0d", k, mem_wdata, last[k]);
        end
        last[k] = mem_wdata;
        cnt[k]++;
      end else if (mem_addr >= 16'h00F9 && mem_addr <= 16'h00FB) begin
        k = int'(mem_addr - 16'h00F8);
        if (mem_wdata != (last[k] ^ key[k])) begin
          nbad[k]++;
          if (nbad[k] <= 3) $display("task %0d R14 %h, counter %0d", k, mem_wdata, last[k]);
        end
      end
    end
    preempts += int'(events.preempt);
    switches += int'(dut.swap);
  end

  initial begin
    repeat (CPU_CYCLES * DIV + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, busy, dly;
    foreach (img[i]) img[i] = nop();
    a = 0;
    img[a++] = act(1, 1); img[a++] = 'h20;
    img[a++] = act(2, 1); img[a++] = 'h40;
    img[a++] = act(3, 5); img[a++] = 'h60;
    img[a++] = term();
    for (int k = 1; k <= 3; k++) begin
      cnt[k] = 0; nbad[k] = 0; last[k] = '0;
      key[k] = {8'hA0 + 8'(k), 8'h50 + 8'(k)};
      busy = (k == 1) ? 7 : (k == 2) ? 11 : 1;
      dly  = (k == 3) ? 9 : 3;
      b = 'h20 * k;
      a = b;
      img[a++] = ldi(13, 'h50 + k);
      img[a++] = ldhi(13, 'hA0 + k);
      img[a++] = ldi(15, 0);
      img[a++] = ldi(12, 'hF0 + k);
      img[a++] = ldi(11, 'hF8 + k);
      img[a++] = addi(15, 1);                       // b+5: loop
      img[a++] = alu(14, 15, ALU_MOV);
      img[a++] = alu(14, 13, ALU_XOR);
      img[a++] = store(15, 12, AM_IND);
      img[a++] = store(14, 11, AM_IND);
      img[a++] = ldi(10, busy);
      img[a++] = addi(10, -1);                      // b+11
      img[a] = br(CC_NE, a, b + 11); a++;
      img[a++] = delay(dly);
      img[a++] = jmp(b + 5);
    end
    repeat (3) @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      ld_we <= 1'b1; ld_addr <= word_t'(i); ld_data <= img[i];
      @(posedge clk);
    end
    ld_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    repeat (CPU_CYCLES * DIV) @(posedge clk);

    for (int k = 1; k <= 3; k++) begin
      $display("task %0d: %0d passes, %0d bad stores", k, cnt[k], nbad[k]);
      check(cnt[k] >= 20, $sformatf("task %0d made progress (%0d passes)", k, cnt[k]));
      check(nbad[k] == 0, $sformatf("task %0d R13..R15 intact across switches", k));
    end
    $display("%0d task switches, %0d preemptions", switches, preempts);
    check(preempts >= 20, "priority-5 task preempted the others");
    check(switches >= 100, "many task switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

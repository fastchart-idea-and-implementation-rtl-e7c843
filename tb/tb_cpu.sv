// tb_cpu: runs a short program on the CPU with its register files and a testbench memory,
// the CPU clock enable high on every second clock. Checks every memory write (address,
// value, and the CPU cycle it happens in, which follows from one cycle per plain
// instruction and two per memory instruction), the real-time requests with their fields,
// the stall while a request is not acknowledged, the block after DELAY, and the switch to
// the other register file, preloaded through the RTU port, which then runs its own code.
`timescale 1ns/1ps
module tb_cpu;
  import fastchart_pkg::*;
  import fastchart_asm::*;

  logic clk = 0, rst_n = 0, ce = 0;
  word_t mem_addr, mem_wdata, mem_rdata;
  logic mem_we;
  word_t r_q [8];
  word_t sr_q, pc_q, il_q, wd0, wd1, sr_d, pc_d, il_d, rtu_rdata;
  logic we0, we1, sr_we, pc_we, il_we, active_bank;
  logic [2:0] wa0, wa1;
  logic [3:0] rtu_idx = 0;
  logic rtu_we = 0;
  word_t rtu_wdata = 0;
  logic rt_valid, rt_ack = 0, swap = 0, swap_to_idle = 0, switch_ok, not_switch, idle;
  rt_req_t rt;

  word_t tmem [256];
  int cyc = 0;
  int checks = 0, failures = 0;

  cpu dut (.*);
  register_files #(.NREGS(8)) u_rf (.*);

  assign mem_rdata = tmem[mem_addr[7:0]];
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) ce <= ~ce;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected writes: cycle, address, value
  int exp_cyc [7] = '{5, 9, 12, 19, 21, 27, 0};
  int exp_adr [7] = '{'h40, 'h41, 'h42, 'h42, 'hFF, 'h43, 'h77};
  int exp_val [7] = '{'h3412, 'h000E, 'h3404, 'h0055, 'h0010, 'h0056, 'h0077};
  int nw = 0;

  always @(posedge clk) if (rst_n && ce) begin
    cyc++;
    if (mem_we) begin
      if (nw < 7) begin
        check(mem_addr[7:0] == 8'(exp_adr[nw]) && mem_wdata == word_t'(exp_val[nw]) &&
              (exp_cyc[nw] == 0 || cyc == exp_cyc[nw]),
              $sformatf("write %0d: [%h]=%h at cycle %0d", nw, mem_addr, mem_wdata, cyc));
        tmem[mem_addr[7:0]] <= mem_wdata;
      end else check(0, "unexpected write");
      nw++;
    end
  end

  initial begin
    #100000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, t0;
    foreach (tmem[i]) tmem[i] = nop();
    a = 0;
    tmem[a++] = ldi(1, 'h12);
    tmem[a++] = ldhi(1, 'h34);
    tmem[a++] = ldi(2, 'h40);
    tmem[a++] = store(1, 2, AM_INC);      // cycle 5
    tmem[a++] = ldi(3, 7);
    tmem[a++] = alu(3, 3, ALU_SHL);
    tmem[a++] = store(3, 2, AM_INC);      // cycle 9
    tmem[a++] = alu(1, 3, ALU_SUB);
    tmem[a++] = store(1, 2, AM_INC);      // cycle 12
    tmem[a++] = load(4, 2, AM_DEC);
    tmem[a++] = alu(4, 1, ALU_XOR);
    tmem[a] = br(CC_EQ, a, a + 2); a++;
    tmem[a++] = ldi(5, 'hBB);             // skipped
    tmem[a++] = ldi(5, 'h55);
    tmem[a++] = store(5, 2, AM_IND);      // cycle 19, address 0x42
    tmem[a++] = call('h30);               // cycle 21, return address 0x10 onto R0-1
    tmem[a++] = ldi(6, 'h43);
    tmem[a++] = store(5, 6, AM_IND);      // cycle 27 after return
    tmem[a++] = setns();
    tmem[a++] = act(7, 3); tmem[a++] = 'h0123;
    tmem[a++] = delay(9);
    tmem[a++] = ldi(7, 'hEE);             // must not run before the switch
    tmem[a++] = store(7, 7, AM_IND);
    tmem['h30] = addi(5, 1);
    tmem['h31] = ret();
    tmem['h80] = ldi(6, 'h77);
    tmem['h81] = store(6, 6, AM_IND);
    tmem['h82] = term();
    // R0 = 0 after reset, so CALL pushes to address 0xFFFF (0xFF here)
    #12 rst_n = 1;
    wait (rt_valid);
    check(cyc == 30 && rt.op == RT_ACTIVATE && rt.id == 6'd7 && rt.prio == 3'd3 &&
          rt.arg == 16'h0123, $sformatf("ACTIVATE request at cycle %0d", cyc));
    check(not_switch, "NOT-SWITCH flag set");
    check(!switch_ok, "no switch while a request is open");
    t0 = cyc;
    repeat (10) @(posedge clk);
    check(nw == 6 && pc_q == word_t'(a - 3), "CPU stalls while ACTIVATE is not acknowledged");
    @(negedge clk); rt_ack = 1; @(negedge clk); rt_ack = 0;
    wait (rt_valid);
    check(rt.op == RT_DELAY && rt.arg == 16'd9, "DELAY request");
    @(negedge clk); rt_ack = 1; @(negedge clk); rt_ack = 0;
    // blocked: nothing executes; preload the other bank through the RTU port
    for (int i = 0; i < 11; i++) begin
      @(negedge clk); rtu_we = 1; rtu_idx = 4'(i);
      rtu_wdata = (i == 9) ? 16'h0080 : 16'h0000;
    end
    @(negedge clk); rtu_we = 0;
    repeat (8) @(posedge clk);
    check(nw == 6 && switch_ok && !idle, "blocked after DELAY, switch allowed");
    // switch at the next enabled edge
    @(negedge clk); while (!ce) @(negedge clk);
    swap = 1; @(negedge clk); swap = 0;
    check(active_bank == 1'b1 && !not_switch, "register files exchanged, NOT-SWITCH cleared");
    // shadow bank now holds the old task: PC after DELAY, IL = the next instruction
    rtu_idx = 4'd9; #1;
    check(rtu_rdata == word_t'(a - 1), $sformatf("saved PC %h", rtu_rdata));
    rtu_idx = 4'd10; #1;
    check(rtu_rdata == ldi(7, 'hEE), "saved IL");
    rtu_idx = 4'd5; #1;
    check(rtu_rdata == 16'h0056, "saved R5");
    wait (rt_valid);
    check(rt.op == RT_TERMINATE && nw == 7, "second task stored 0x77 and terminates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

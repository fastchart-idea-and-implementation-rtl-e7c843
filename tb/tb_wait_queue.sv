// tb_wait_queue: loads delays into several task entries, ticks, and checks that each task
// is offered exactly on the tick its delay runs out (counted by the testbench), with its
// priority, lowest id first when several expire together; a zero delay is offered at once.
`timescale 1ns/1ps
module tb_wait_queue;
  logic clk = 0, rst_n = 0, tick = 0, load = 0, take = 0, exp_valid;
  logic [5:0] load_id = 0, exp_id;
  logic [11:0] load_time = 0;
  logic [2:0] load_prio = 0, exp_prio;
  logic [63:0] waiting;
  int remaining [64];
  int prio_m [64];
  int checks = 0, failures = 0, nexp = 0;

  wait_queue dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (remaining[i]) remaining[i] = -1;
    #12 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int lowest;
      @(negedge clk);
      // model: lowest expired entry
      lowest = -1;
      for (int i = 63; i >= 0; i--) if (remaining[i] == 0) lowest = i;
      checks++;
      if (exp_valid !== (lowest >= 0) || (lowest >= 0 && (exp_id !== 6'(lowest) ||
          exp_prio !== 3'(prio_m[lowest])))) begin
        failures++;
        $display("FAIL it=%0d exp %b/%0d/%0d model %0d", it, exp_valid, exp_id, exp_prio, lowest);
      end
      take = exp_valid && ($urandom_range(0, 3) != 0);
      tick = ($urandom_range(0, 2) == 0);
      load = ($urandom_range(0, 5) == 0);
      load_id = 6'($urandom_range(0, 15));
      load_time = 12'($urandom_range(0, 20));
      load_prio = 3'($urandom);
      if (take) begin remaining[lowest] = -1; nexp++; end
      for (int i = 0; i < 64; i++)
        if (!(load && load_id == 6'(i)) && tick && remaining[i] > 0) remaining[i]--;
      if (load) begin remaining[load_id] = load_time; prio_m[load_id] = load_prio; end
      @(posedge clk);
    end
    checks++;
    if (nexp < 50) begin failures++; $display("FAIL: only %0d expiries", nexp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ready_queue: random pushes and pops at the default size (64 tasks, 8 priorities,
// depth 8) against a model of eight queues; after each clock the head must be the oldest
// id of the highest non-empty priority and the full flags must match.
`timescale 1ns/1ps
module tb_ready_queue;
  localparam int NP = 8, D = 8;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, top_valid;
  logic [2:0] push_prio = 0, top_prio;
  logic [5:0] push_id = 0, top_id;
  logic [NP-1:0] full;
  int q [NP][$];
  int checks = 0, failures = 0, nfull = 0;

  ready_queue dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    int hp;
    hp = -1;
    for (int p = 0; p < NP; p++) if (q[p].size() > 0) hp = p;
    checks++;
    if (top_valid !== (hp >= 0)) begin failures++; $display("FAIL valid"); end
    else if (hp >= 0 && (top_prio !== 3'(hp) || top_id !== 6'(q[hp][0]))) begin
      failures++; $display("FAIL top %0d/%0d expected %0d/%0d", top_prio, top_id, hp, q[hp][0]);
    end
    for (int p = 0; p < NP; p++)
      if (full[p] !== (q[p].size() == D)) begin failures++; $display("FAIL full[%0d]", p); end
  endtask

  initial begin
    #2000000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    @(negedge clk); compare();
    for (int it = 0; it < 4000; it++) begin
      int pp;
      @(negedge clk);
      // bias towards filling during the first half
      pp = (it < 2000) ? $urandom_range(0, 2) : $urandom_range(0, NP - 1);
      push_prio = 3'(pp);
      push = ($urandom_range(0, 9) < ((it < 2000) ? 7 : 4)) && !full[pp];
      push_id = 6'($urandom);
      pop = top_valid && ($urandom_range(0, 9) < ((it < 2000) ? 3 : 6));
      if (pop) begin
        int hp; hp = -1;
        for (int p = 0; p < NP; p++) if (q[p].size() > 0) hp = p;
        void'(q[hp].pop_front());
      end
      if (push) q[pp].push_back(push_id);
      @(posedge clk); #1;
      push = 0; pop = 0;
      compare();
      nfull += int'(|full);
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL: no FIFO ever filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

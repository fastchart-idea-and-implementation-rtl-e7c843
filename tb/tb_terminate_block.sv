// tb_terminate_block: after reset only task 0 is active; ACTIVATE of a terminated task
// pushes it with its priority and clears its flag; ACTIVATE of an active task does nothing;
// ACTIVATE into a full ready FIFO is refused; TERMINATE sets the flag again.
`timescale 1ns/1ps
module tb_terminate_block;
  logic clk = 0, rst_n = 0, term = 0, act_req = 0;
  logic [5:0] term_id = 0, act_id = 0, push_id;
  logic [2:0] act_prio = 0, push_prio;
  logic [7:0] fifo_full = 0;
  logic act_done, act_new, act_refused, push;
  logic [63:0] inactive;
  logic inac_m [64];
  int checks = 0, failures = 0, n_new = 0, n_ign = 0, n_ref = 0;

  terminate_block dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (inac_m[i]) inac_m[i] = (i != 0);
    #12 rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      logic en, er;
      @(negedge clk);
      act_req = $urandom_range(0, 1);
      act_id = 6'($urandom_range(0, 11));
      act_prio = 3'($urandom);
      fifo_full = 8'($urandom) & 8'($urandom);
      term = ($urandom_range(0, 2) == 0);
      term_id = 6'($urandom_range(0, 11));
      #1;
      en = act_req && inac_m[act_id] && !fifo_full[act_prio];
      er = act_req && inac_m[act_id] && fifo_full[act_prio];
      checks++;
      if (act_new !== en || act_refused !== er || push !== en || act_done !== act_req ||
          (en && (push_id !== act_id || push_prio !== act_prio))) begin
        failures++; $display("FAIL it=%0d id=%0d new=%b ref=%b", it, act_id, act_new, act_refused);
      end
      n_new += int'(en); n_ref += int'(er); n_ign += int'(act_req && !inac_m[act_id]);
      if (en) inac_m[act_id] = 0;
      if (term) inac_m[term_id] = 1;
      @(posedge clk); #1;
      checks++;
      for (int i = 0; i < 64; i++)
        if (inactive[i] !== inac_m[i]) begin failures++; $display("FAIL inac[%0d]", i); break; end
    end
    checks++;
    if (n_new == 0 || n_ref == 0 || n_ign == 0) begin failures++; $display("FAIL: case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

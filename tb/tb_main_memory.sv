// tb_main_memory: loads words through the load port, writes through the CPU port (only on
// enabled cycles), and reads everything back against a shadow array.
`timescale 1ns/1ps
module tb_main_memory;
  import fastchart_pkg::*;
  localparam int W = 256;
  logic clk = 0, ce = 0, we = 0, ld_we = 0;
  word_t addr = 0, wdata = 0, rdata, ld_addr = 0, ld_data = 0;
  word_t model [W];
  int checks = 0, failures = 0;

  main_memory #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin
      model[i] = word_t'($urandom);
      @(negedge clk); ld_we = 1; ld_addr = word_t'(i); ld_data = model[i];
    end
    @(negedge clk); ld_we = 0;
    for (int i = 0; i < 500; i++) begin
      int k; logic en;
      k = $urandom_range(0, W - 1); en = $urandom_range(0, 1);
      @(negedge clk); addr = word_t'(k); wdata = word_t'($urandom); we = 1; ce = en;
      if (en) model[k] = wdata;
      @(negedge clk); we = 0; ce = 0;
      addr = word_t'($urandom_range(0, W - 1));
      #1; checks++;
      if (rdata !== model[addr]) begin
        failures++; $display("FAIL read %h: %h expected %h", addr, rdata, model[addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tcb_memory: random writes and reads over the whole task control block space at the
// default size (64 tasks x 11 words); every read is checked one clock after its address.
`timescale 1ns/1ps
module tb_tcb_memory;
  import fastchart_pkg::*;
  localparam int DEPTH = 64 * 11;
  logic clk = 0, we = 0;
  logic [9:0] addr = 0;
  word_t wdata = 0, rdata;
  word_t model [DEPTH];
  logic  valid [DEPTH];
  int checks = 0, failures = 0;

  tcb_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (valid[i]) valid[i] = 0;
    for (int i = 0; i < 3000; i++) begin
      int k; logic w;
      k = $urandom_range(0, DEPTH - 1);
      w = (i < 800) || ($urandom_range(0, 2) == 0);
      @(negedge clk); addr = 10'(k); we = w; wdata = word_t'($urandom);
      @(posedge clk);
      if (w) begin model[k] = wdata; valid[k] = 1; end
      #1;
      if (!w && valid[k]) begin
        checks++;
        if (rdata !== model[k]) begin
          failures++; $display("FAIL tcb[%0d]=%h expected %h", k, rdata, model[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

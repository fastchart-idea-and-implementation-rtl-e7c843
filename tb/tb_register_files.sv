// tb_register_files: checks that the CPU side and the RTU side address different banks,
// that `swap` exchanges them at the clock edge, that RTU writes land in the shadow bank only
// and that write port 0 wins over port 1. A model holds both banks.
`timescale 1ns/1ps
module tb_register_files;
  import fastchart_pkg::*;
  localparam int N = 8, C = N + 3;
  logic clk = 0, rst_n = 0, swap = 0, active_bank;
  word_t r_q [N];
  word_t sr_q, pc_q, il_q, rtu_rdata;
  logic we0 = 0, we1 = 0, sr_we = 0, pc_we = 0, il_we = 0, rtu_we = 0;
  logic [2:0] wa0 = 0, wa1 = 0;
  logic [3:0] rtu_idx = 0;
  word_t wd0 = 0, wd1 = 0, sr_d = 0, pc_d = 0, il_d = 0, rtu_wdata = 0;
  word_t model [2][C];
  int sel = 0;
  int checks = 0, failures = 0;

  register_files #(.NREGS(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    for (int i = 0; i < N; i++)
      if (r_q[i] !== model[sel][i]) begin failures++; $display("FAIL R%0d=%h exp %h", i, r_q[i], model[sel][i]); end
    if (sr_q !== model[sel][N] || pc_q !== model[sel][N+1] || il_q !== model[sel][N+2] ||
        active_bank !== 1'(sel)) begin
      failures++; $display("FAIL SR/PC/IL/bank");
    end
    for (int i = 0; i < C; i++) begin
      rtu_idx = 4'(i); #1;
      checks++;
      if (rtu_rdata !== model[1-sel][i]) begin
        failures++; $display("FAIL shadow[%0d]=%h exp %h", i, rtu_rdata, model[1-sel][i]);
      end
    end
  endtask

  initial begin
    #500000 failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[b, i]) model[b][i] = '0;
    #12 rst_n = 1;
    @(negedge clk); compare();
    for (int it = 0; it < 400; it++) begin
      @(negedge clk);
      we0 = $urandom_range(0, 1); wa0 = 3'($urandom); wd0 = word_t'($urandom);
      we1 = $urandom_range(0, 1); wa1 = (it % 7 == 0) ? wa0 : 3'($urandom); wd1 = word_t'($urandom);
      sr_we = $urandom_range(0, 1); sr_d = word_t'($urandom);
      pc_we = $urandom_range(0, 1); pc_d = word_t'($urandom);
      il_we = $urandom_range(0, 1); il_d = word_t'($urandom);
      rtu_we = $urandom_range(0, 1); rtu_idx = 4'($urandom_range(0, C - 1)); rtu_wdata = word_t'($urandom);
      swap = ($urandom_range(0, 3) == 0);
      if (we1) model[sel][wa1] = wd1;
      if (we0) model[sel][wa0] = wd0;
      if (sr_we) model[sel][N] = sr_d;
      if (pc_we) model[sel][N+1] = pc_d;
      if (il_we) model[sel][N+2] = il_d;
      if (rtu_we) model[1-sel][rtu_idx] = rtu_wdata;
      @(posedge clk);
      if (swap) sel = 1 - sel;
      @(negedge clk);
      {we0, we1, sr_we, pc_we, il_we, rtu_we, swap} = '0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

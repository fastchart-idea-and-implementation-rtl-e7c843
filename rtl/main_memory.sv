// main_memory: program and data memory on the FASTCHART CPU bus.
//
// A word-addressed RAM with a combinational read and a write at the clock edge, so that the
// CPU can fetch an instruction or move one data word per CPU cycle with no wait states (the
// CPU has no cache, and its instruction timing must be fixed). Writes from the CPU are taken
// only in cycles where the CPU clock enable `ce` is high. A second write port (`ld_*`) lets a
// host load a program while the machine is held in reset. Addresses beyond WORDS wrap.
//
// The FASTCHART description mentions main memory only as the target of LOAD/STORE and of the return
// stack; its size and this interface are this design's own choices.
module main_memory
  import fastchart_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  clk,
  input  logic  ce,
  input  word_t addr,
  input  logic  we,
  input  word_t wdata,
  output word_t rdata,
  input  logic  ld_we,
  input  word_t ld_addr,
  input  word_t ld_data
);

  localparam int unsigned AW = $clog2(WORDS);

  word_t mem [WORDS];

  assign rdata = mem[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr[AW-1:0]] <= ld_data;
    else if (ce && we) mem[addr[AW-1:0]] <= wdata;
  end

endmodule

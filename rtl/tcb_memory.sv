// tcb_memory: task control block memory of the FASTCHART Real Time Unit.
//
// Holds the saved context of every task: NREGS general registers, SR, PC and IL, TCB_WORDS
// words per task, the task's block starting at task id * TCB_WORDS (the address is formed by
// the RTU control as id * TCB size + register counter). Single port, one word per clock:
// a write takes effect at the clock edge; a read returns the addressed word one clock later
// on rdata. Contents are not reset.
//
// The memory, its contents and its addressing follow the FASTCHART architecture; the single-port,
// one-word-wide organisation is the "one register after the other" option it discusses.
module tcb_memory
  import fastchart_pkg::*;
#(
  parameter int unsigned NUM_TASKS = 64,
  parameter int unsigned TCB_WORDS = 11,
  localparam int unsigned DEPTH = NUM_TASKS * TCB_WORDS,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  word_t         wdata,
  output word_t         rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule

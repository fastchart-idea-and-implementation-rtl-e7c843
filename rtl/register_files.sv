// register_files: the two register files of FASTCHART (the "shadowed" registers).
//
// Every register of the CPU programming model exists twice: general registers R0..R(NREGS-1),
// status register SR, program counter PC and instruction latch IL. One copy (the active bank,
// selected by `active_bank`) is used by the CPU; the other (the shadow bank) is open to the
// Real Time Unit, which saves the context of the task that just left into TCB memory and
// loads the context of the next task from it. A task switch is a pulse on `swap`, which
// exchanges the two banks at the next clock edge, so the CPU continues with the other task in
// the following cycle.
//
// CPU side: all registers of the active bank are visible at once (r_q, sr_q, pc_q, il_q).
// Two general-register write ports (port 0 wins if both address the same register) and
// separate write enables for SR, PC and IL; writes take effect at the clock edge.
// RTU side: one context word at a time, by index in TCB order (R0..Rn-1, SR, PC, IL);
// combinational read, write at the clock edge.
// After reset bank 0 is active and every register is zero (IL = NOP, PC = 0).
//
// The two banks and their exchange on a task switch follow the FASTCHART architecture; the port
// arrangement, reset values and word-serial RTU access are this design's own choices.
module register_files
  import fastchart_pkg::*;
#(
  parameter int unsigned NREGS = 8,
  localparam int unsigned CTX_WORDS = NREGS + CTX_EXTRA,
  localparam int unsigned RIDX_W = $clog2(NREGS),
  localparam int unsigned CIDX_W = $clog2(CTX_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              swap,
  output logic              active_bank,
  // CPU side, active bank
  output word_t             r_q [NREGS],
  output word_t             sr_q,
  output word_t             pc_q,
  output word_t             il_q,
  input  logic              we0,
  input  logic [RIDX_W-1:0] wa0,
  input  word_t             wd0,
  input  logic              we1,
  input  logic [RIDX_W-1:0] wa1,
  input  word_t             wd1,
  input  logic              sr_we,
  input  word_t             sr_d,
  input  logic              pc_we,
  input  word_t             pc_d,
  input  logic              il_we,
  input  word_t             il_d,
  // RTU side, shadow bank
  input  logic [CIDX_W-1:0] rtu_idx,
  input  logic              rtu_we,
  input  word_t             rtu_wdata,
  output word_t             rtu_rdata
);

  localparam int unsigned SR_I = NREGS;
  localparam int unsigned PC_I = NREGS + 1;
  localparam int unsigned IL_I = NREGS + 2;

  word_t ctx [2][CTX_WORDS];
  logic  sel;

  assign active_bank = sel;

  always_comb begin
    for (int i = 0; i < NREGS; i++) r_q[i] = ctx[sel][i];
    sr_q = ctx[sel][SR_I];
    pc_q = ctx[sel][PC_I];
    il_q = ctx[sel][IL_I];
    rtu_rdata = (32'(rtu_idx) < CTX_WORDS) ? ctx[~sel][rtu_idx] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel <= 1'b0;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < CTX_WORDS; i++) ctx[b][i] <= '0;
    end else begin
      // CPU writes, active bank
      if (we1) ctx[sel][wa1] <= wd1;
      if (we0) ctx[sel][wa0] <= wd0;
      if (sr_we) ctx[sel][SR_I] <= sr_d;
      if (pc_we) ctx[sel][PC_I] <= pc_d;
      if (il_we) ctx[sel][IL_I] <= il_d;
      // RTU writes, shadow bank
      if (rtu_we && 32'(rtu_idx) < CTX_WORDS) ctx[~sel][rtu_idx] <= rtu_wdata;
      if (swap) sel <= ~sel;
    end
  end

endmodule

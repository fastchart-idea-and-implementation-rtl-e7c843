// fastchart_top: the FASTCHART real-time machine, CPU and Real Time Unit side by side.
//
// The CPU executes tasks from main memory with a fixed instruction timing; the RTU runs
// concurrently on a clock CPU_CLK_DIV times faster, keeps every task's state, and performs
// task switches by exchanging the two register files (one used by the CPU, the other loaded
// and saved by the RTU through TCB memory). One clock `clk` drives everything; the CPU and
// main memory advance on the clock edges where the internal enable `cpu_ce` is high, one in
// CPU_CLK_DIV; the RTU works on every edge. The system time tick of the RTU is one CPU cycle
// (TICK_DIV = 1), so DELAY n means n CPU cycles.
//
// Interface: clk/rst_n; a program-load port into main memory (ld_*, use while rst_n is low or
// before the first instruction that reads the word); the CPU's memory bus for observation
// (a program's stores show there); the current task, CPU idle, the time tick, the CPU cycle
// enable, which register file the CPU uses, and the RTU's per-clock event flags. After reset
// task 0 runs from address 0 with the highest priority.
//
// The split into CPU and RTU, the shared pair of register files and the RTU clock being ten
// times the CPU clock (as in the original FASTCHART prototype) follow the FASTCHART
// architecture; the single-clock enable scheme and the observation ports are this design's own
// choices.
module fastchart_top
  import fastchart_pkg::*;
#(
  parameter int unsigned NUM_TASKS   = 64,
  parameter int unsigned NUM_PRIO    = 8,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned NREGS       = 8,
  parameter int unsigned MEM_WORDS   = 1024,
  parameter int unsigned CPU_CLK_DIV = 10,
  parameter int unsigned TICK_DIV    = 1,
  localparam int unsigned ID_W   = $clog2(NUM_TASKS),
  localparam int unsigned PRIO_W = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ld_we,
  input  word_t             ld_addr,
  input  word_t             ld_data,
  output word_t             mem_addr,
  output logic              mem_we,
  output word_t             mem_wdata,
  output logic              cpu_ce,
  output logic              time_tick,
  output logic              cpu_idle,
  output logic              active_bank,
  output logic              cur_valid,
  output logic [ID_W-1:0]   cur_id,
  output logic [PRIO_W-1:0] cur_prio,
  output rtu_events_t       events
);

  localparam int unsigned RIDX_W = $clog2(NREGS);
  localparam int unsigned CIDX_W = $clog2(NREGS + CTX_EXTRA);
  localparam int unsigned DIV_W  = (CPU_CLK_DIV > 1) ? $clog2(CPU_CLK_DIV) : 1;

  logic [DIV_W-1:0] div_cnt;
  word_t            mem_rdata;

  word_t             r_q [NREGS];
  word_t             sr_q, pc_q, il_q;
  logic              we0, we1, sr_we, pc_we, il_we;
  logic [RIDX_W-1:0] wa0, wa1;
  word_t             wd0, wd1, sr_d, pc_d, il_d;

  logic              rt_valid, rt_ack, swap, swap_to_idle, switch_ok, not_switch;
  rt_req_t           rt;
  logic [CIDX_W-1:0] rf_idx;
  logic              rf_we;
  word_t             rf_wdata, rf_rdata;

  // CPU clock: one enabled edge in CPU_CLK_DIV
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_cnt <= '0;
    else        div_cnt <= (32'(div_cnt) == CPU_CLK_DIV - 1) ? '0 : div_cnt + 1'b1;
  end
  assign cpu_ce = rst_n && (32'(div_cnt) == CPU_CLK_DIV - 1);

  main_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .ce(cpu_ce), .addr(mem_addr), .we(mem_we), .wdata(mem_wdata), .rdata(mem_rdata),
    .ld_we, .ld_addr, .ld_data);

  register_files #(.NREGS(NREGS)) u_rf (
    .clk, .rst_n, .swap, .active_bank,
    .r_q, .sr_q, .pc_q, .il_q,
    .we0, .wa0, .wd0, .we1, .wa1, .wd1, .sr_we, .sr_d, .pc_we, .pc_d, .il_we, .il_d,
    .rtu_idx(rf_idx), .rtu_we(rf_we), .rtu_wdata(rf_wdata), .rtu_rdata(rf_rdata));

  cpu #(.NREGS(NREGS)) u_cpu (
    .clk, .rst_n, .ce(cpu_ce),
    .mem_addr, .mem_we, .mem_wdata, .mem_rdata,
    .r_q, .sr_q, .pc_q, .il_q,
    .we0, .wa0, .wd0, .we1, .wa1, .wd1, .sr_we, .sr_d, .pc_we, .pc_d, .il_we, .il_d,
    .rt_valid, .rt, .rt_ack, .swap, .swap_to_idle, .switch_ok, .not_switch, .idle(cpu_idle));

  rtu #(.NUM_TASKS(NUM_TASKS), .NUM_PRIO(NUM_PRIO), .FIFO_DEPTH(FIFO_DEPTH), .NREGS(NREGS),
        .TICK_DIV(TICK_DIV)) u_rtu (
    .clk, .rst_n, .cpu_ce,
    .rt_valid, .rt, .rt_ack,
    .switch_ok, .not_switch, .swap, .swap_to_idle,
    .rf_idx, .rf_we, .rf_wdata, .rf_rdata,
    .time_tick, .cur_valid, .cur_id, .cur_prio, .events);

endmodule

// wait_queue: the Wait block of the FASTCHART Real Time Unit.
//
// One entry per task id: an active flag, a down-counter (TIMER) and the task's priority.
// A DELAY loads the entry of the delaying task with the delay time. On every system time tick
// each active counter above zero counts down by one; an active entry whose counter is zero
// has expired and is offered to the control unit (exp_valid, exp_id, exp_prio; the lowest id
// wins if several expired together). `take` removes the offered entry, which the control
// unit then pushes into the ready queue. A delay of N ticks thus expires on the N-th tick
// after the load; a delay of zero expires at once. Expired entries wait while the control
// unit is busy, so no expiry is lost.
//
// The per-task down-counters clocked by the time tick and the hand-over of the id to the ready
// queue follow the FASTCHART architecture; the counter width, the arbitration between entries
// that expire together and the take handshake are this design's own choices.
module wait_queue #(
  parameter int unsigned NUM_TASKS = 64,
  parameter int unsigned NUM_PRIO  = 8,
  parameter int unsigned TIMER_W   = 12,
  localparam int unsigned ID_W = $clog2(NUM_TASKS),
  localparam int unsigned PRIO_W = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic               load,
  input  logic [ID_W-1:0]    load_id,
  input  logic [TIMER_W-1:0] load_time,
  input  logic [PRIO_W-1:0]  load_prio,
  output logic               exp_valid,
  output logic [ID_W-1:0]    exp_id,
  output logic [PRIO_W-1:0]  exp_prio,
  input  logic               take,
  output logic [NUM_TASKS-1:0] waiting
);

  logic [NUM_TASKS-1:0] active;
  logic [TIMER_W-1:0]   timer [NUM_TASKS];
  logic [PRIO_W-1:0]    prio  [NUM_TASKS];

  assign waiting = active;

  always_comb begin
    exp_valid = 1'b0;
    exp_id    = '0;
    for (int i = NUM_TASKS - 1; i >= 0; i--) begin
      if (active[i] && timer[i] == '0) begin
        exp_valid = 1'b1;
        exp_id    = ID_W'(i);
      end
    end
    exp_prio = prio[exp_id];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= '0;
      for (int i = 0; i < NUM_TASKS; i++) begin
        timer[i] <= '0;
        prio[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < NUM_TASKS; i++) begin
        if (load && load_id == ID_W'(i)) begin
          active[i] <= 1'b1;
          timer[i]  <= load_time;
          prio[i]   <= load_prio;
        end else begin
          if (take && exp_valid && exp_id == ID_W'(i)) active[i] <= 1'b0;
          if (tick && active[i] && timer[i] != '0) timer[i] <= timer[i] - 1'b1;
        end
      end
    end
  end

endmodule

// terminate_block: the Terminate block of the FASTCHART Real Time Unit.
//
// One INAC (inactive) flag per task id. TERMINATE sets the flag of the task that ends itself.
// ACTIVATE(id, prio) of a task whose flag is set clears the flag and hands the id with its
// priority to the ready queue (push_*), in the same cycle, provided the ready FIFO of that
// priority has room (`fifo_full` low). ACTIVATE of a task that is not terminated, or whose
// ready FIFO is full, completes without effect (act_new low, act_refused high in the second
// case): waiting for room could deadlock, since the FIFO may only drain once the activating
// task has given up the CPU. act_done is high whenever a request is taken.
// After reset every task is terminated except INIT_ID, the task that runs first.
//
// The INAC flag per task, and that only a terminated task can be activated and only by another
// task, follow the FASTCHART architecture; the handshake and reset state are this design's own.
module terminate_block #(
  parameter int unsigned NUM_TASKS = 64,
  parameter int unsigned NUM_PRIO  = 8,
  parameter int unsigned INIT_ID   = 0,
  localparam int unsigned ID_W = $clog2(NUM_TASKS),
  localparam int unsigned PRIO_W = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                term,
  input  logic [ID_W-1:0]     term_id,
  input  logic                act_req,
  input  logic [ID_W-1:0]     act_id,
  input  logic [PRIO_W-1:0]   act_prio,
  input  logic [NUM_PRIO-1:0] fifo_full,
  output logic                act_done,
  output logic                act_new,
  output logic                act_refused,
  output logic                push,
  output logic [ID_W-1:0]     push_id,
  output logic [PRIO_W-1:0]   push_prio,
  output logic [NUM_TASKS-1:0] inactive
);

  logic [NUM_TASKS-1:0] inac;

  assign inactive  = inac;
  assign push_id   = act_id;
  assign push_prio = act_prio;

  always_comb begin
    act_new  = act_req && inac[act_id] && !fifo_full[act_prio];
    act_done = act_req;
    act_refused = act_req && inac[act_id] && fifo_full[act_prio];
    push     = act_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inac <= '1;
      inac[INIT_ID] <= 1'b0;
    end else begin
      if (act_new) inac[act_id] <= 1'b0;
      if (term) inac[term_id] <= 1'b1;
    end
  end

endmodule

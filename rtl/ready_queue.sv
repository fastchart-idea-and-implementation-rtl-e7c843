// ready_queue: the scheduler of the FASTCHART Real Time Unit.
//
// Static-priority scheduling with one FIFO of task ids per priority level. A task that
// becomes ready is pushed, by id, into the FIFO of its priority; the task to run next is the
// head of the highest non-empty FIFO (priority NUM_PRIO-1 is the highest). One push and one
// pop per clock, which may address the same FIFO. The head (top_valid, top_id, top_prio) is
// combinational; push and pop take effect at the clock edge. `full` tells the control unit
// which FIFOs cannot take a push; a push into a full FIFO is a protocol error (asserted).
//
// The eight FIFOs of depth eight and the search for the highest non-empty one follow the
// FASTCHART architecture; that the numerically largest priority is the highest is this design's
// choice.
module ready_queue #(
  parameter int unsigned NUM_TASKS  = 64,
  parameter int unsigned NUM_PRIO   = 8,
  parameter int unsigned FIFO_DEPTH = 8,
  localparam int unsigned ID_W = $clog2(NUM_TASKS),
  localparam int unsigned PRIO_W = (NUM_PRIO > 1) ? $clog2(NUM_PRIO) : 1,
  localparam int unsigned PTR_W = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic [PRIO_W-1:0] push_prio,
  input  logic [ID_W-1:0]   push_id,
  input  logic              pop,
  output logic              top_valid,
  output logic [PRIO_W-1:0] top_prio,
  output logic [ID_W-1:0]   top_id,
  output logic [NUM_PRIO-1:0] full
);

  logic [ID_W-1:0]  slots [NUM_PRIO][FIFO_DEPTH];
  logic [PTR_W-1:0] rd_ptr [NUM_PRIO];
  logic [PTR_W-1:0] wr_ptr [NUM_PRIO];
  logic [PTR_W:0]   count  [NUM_PRIO];

  // highest non-empty FIFO
  always_comb begin
    top_valid = 1'b0;
    top_prio  = '0;
    for (int p = 0; p < NUM_PRIO; p++) begin
      full[p] = (32'(count[p]) == FIFO_DEPTH);
      if (count[p] != 0) begin
        top_valid = 1'b1;
        top_prio  = PRIO_W'(p);
      end
    end
    top_id = slots[top_prio][rd_ptr[top_prio]];
  end

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (32'(p) == FIFO_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PRIO; p++) begin
        rd_ptr[p] <= '0;
        wr_ptr[p] <= '0;
        count[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < NUM_PRIO; p++) begin
        automatic logic do_push = push && (push_prio == PRIO_W'(p)) && !full[p];
        automatic logic do_pop  = pop && top_valid && (top_prio == PRIO_W'(p));
        if (do_push) begin
          slots[p][wr_ptr[p]] <= push_id;
          wr_ptr[p] <= next_ptr(wr_ptr[p]);
        end
        if (do_pop) rd_ptr[p] <= next_ptr(rd_ptr[p]);
        count[p] <= count[p] + (PTR_W+1)'(do_push) - (PTR_W+1)'(do_pop);
      end
    end
  end

  // A full FIFO cannot take a push unless it is popped in the same cycle; the control unit
  // never relies on that, so any push into a full FIFO is an error.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full[push_prio])
    else $error("ready_queue: push into full FIFO of priority %0d", push_prio);
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> top_valid)
    else $error("ready_queue: pop from empty queue");

endmodule

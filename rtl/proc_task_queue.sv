// proc_task_queue: the task queue of one processor.
//
// A first-in, first-out store of up to DEPTH (50) task entries that the
// processor selection controller has placed on this processor. Whenever the
// processor is free (proc_ready high) and the queue holds a task, the head task
// is handed to the processor (dispatch_valid && proc_ready on a rising edge)
// and removed; deq/deq_type then report its type to the processor status table
// in the same cycle.
//
// For the controller's time slot search the queue also keeps `workload`, the
// sum of the WCETs of the tasks waiting in it, and `full`. The processor is put
// into power saving mode (sleep high) while it is idle and its queue is empty;
// the first task placed on the queue wakes it.
//
// Interface: enq_valid/enq_task write one entry per cycle (never while full;
// an assertion checks this). Enqueue and dispatch may happen in the same
// cycle. Timing: an entry written in cycle n can be dispatched in cycle n+1.
// Depth follows the published scheduler; the handshake, the workload sum used for the
// time slot and the sleep condition are this design's choices.
module proc_task_queue
  import mhs_pkg::*;
#(
  parameter int unsigned DEPTH = QUEUE_DEPTH,
  parameter int unsigned WL_W  = $clog2(DEPTH * ((1 << WCET_W) - 1) + 1)
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the processor selection controller
  input  logic   enq_valid,
  input  task_t  enq_task,
  // state seen by the controller
  output logic   full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [WL_W-1:0] workload,
  // to the processor
  output logic   dispatch_valid,
  output task_t  dispatch_task,
  input  logic   proc_ready,
  output logic   sleep,
  // to the processor status table
  output logic   deq,
  output logic [TYPE_W-1:0] deq_type
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  task_t         mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full           = (count == CW'(DEPTH));
  assign dispatch_valid = (count != '0);
  assign dispatch_task  = mem[rd_ptr];
  assign deq            = dispatch_valid && proc_ready;
  assign deq_type       = dispatch_task.ttype;
  assign sleep          = !dispatch_valid && proc_ready;

  always_ff @(posedge clk) begin
    if (enq_valid) mem[wr_ptr] <= enq_task;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      workload <= '0;
    end else begin
      if (enq_valid) wr_ptr <= next_ptr(wr_ptr);
      if (deq)       rd_ptr <= next_ptr(rd_ptr);
      case ({enq_valid, deq})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      workload <= workload
                + (enq_valid ? WL_W'(enq_task.wcet) : '0)
                - (deq       ? WL_W'(dispatch_task.wcet) : '0);
    end
  end

  a_no_enq_when_full: assert property (@(posedge clk) enq_valid |-> !full);

endmodule

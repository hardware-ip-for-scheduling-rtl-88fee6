// proc_sel_ctrl: the processor selection controller.
//
// Takes the task at the head of the task table and chooses the processor queue
// it goes to, so that tasks of one type cluster on one processor and code
// fetches are few. The processors are ranked by the number of tasks of the
// head task's type already waiting in their queues (read from the processor
// status table), most first. Among processors with equal counts an awake
// processor ranks above one in power saving mode, so a sleeping processor is
// only woken when no awake one can take the task; remaining ties go to the
// lower processor number. The processors are then searched in rank order, one
// per clock cycle, for a time slot: a queue offers one when it is not full and
// the WCETs already waiting in it plus the task's WCET fit within WINDOW
// cycles. The search stops at the first processor that offers a slot; the task
// is written to that queue (enq_valid, enq_proc, enq_task) and removed from the
// task table (pop). If no processor offers a slot, `stall` pulses, the task
// stays at the head of the table and the ranking and search start again.
//
// Timing: one cycle to latch the task and rank the processors (S_RANK), then
// one cycle per processor searched (S_SEARCH): a task placed on the processor
// of rank r (0 = first) leaves the table r+2 cycles after it reached the head.
// The ranking and search follow the published scheduler. The ranking key with awake
// first, the tie order, the one-processor-per-cycle search and the workload
// window standing for the "time slot" are this design's choices.
module proc_sel_ctrl
  import mhs_pkg::*;
#(
  parameter int unsigned NPROC  = NUM_PROC,
  parameter int unsigned NTYPES = NUM_TYPES,
  parameter int unsigned CNT_W  = $clog2(QUEUE_DEPTH + 1),
  parameter int unsigned WL_W   = $clog2(QUEUE_DEPTH * ((1 << WCET_W) - 1) + 1),
  parameter int unsigned WINDOW = SLOT_WINDOW
) (
  input  logic clk,
  input  logic rst_n,
  // task table head
  input  logic                     head_valid,
  input  task_t                    head_task,
  output logic                     pop,
  // processor status table and queue state
  input  logic [CNT_W-1:0]         counts [NPROC][NTYPES],
  input  logic [NPROC-1:0]         sleep,
  input  logic [NPROC-1:0]         full,
  input  logic [WL_W-1:0]          workload [NPROC],
  // placement
  output logic                     enq_valid,
  output logic [$clog2(NPROC)-1:0] enq_proc,
  output task_t                    enq_task,
  // events
  output logic [$clog2(NPROC)-1:0] enq_rank,   // search position of the chosen queue
  output logic                     stall       // no processor had a slot
);

  localparam int unsigned IW = $clog2(NPROC);
  localparam int unsigned KW = 1 + CNT_W + IW;  // ranking key: awake, count, ~index

  typedef enum logic { S_RANK, S_SEARCH } state_e;

  state_e         state;
  task_t          cur;
  logic [IW-1:0]  order     [NPROC];   // order[r] = processor of rank r
  logic [IW-1:0]  order_nxt [NPROC];
  logic [IW-1:0]  k;                    // rank being searched
  logic [IW-1:0]  cand;
  logic           slot_ok;

  // Rank the processors for the task at the head of the table. Keys are
  // distinct (they include the processor number), so rank = number of
  // processors with a larger key.
  always_comb begin
    logic [KW-1:0] key [NPROC];
    for (int p = 0; p < NPROC; p++) begin
      key[p] = {~sleep[p],
                (head_task.ttype < TYPE_W'(NTYPES)) ? counts[p][head_task.ttype] : CNT_W'(0),
                ~p[IW-1:0]};
      order_nxt[p] = '0;
    end
    for (int p = 0; p < NPROC; p++) begin
      logic [IW-1:0] r;
      r = '0;
      for (int q = 0; q < NPROC; q++)
        if (key[q] > key[p]) r = r + 1'b1;
      order_nxt[r] = p[IW-1:0];
    end
  end

  assign cand    = order[k];
  assign slot_ok = !full[cand] &&
                   ({1'b0, workload[cand]} + (WL_W+1)'(cur.wcet) <= (WL_W+1)'(WINDOW));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RANK;
      cur   <= '0;
      k     <= '0;
      for (int r = 0; r < NPROC; r++) order[r] <= '0;
    end else begin
      case (state)
        S_RANK: if (head_valid) begin
          cur   <= head_task;
          order <= order_nxt;
          k     <= '0;
          state <= S_SEARCH;
        end
        S_SEARCH: begin
          if (slot_ok || k == IW'(NPROC - 1)) state <= S_RANK;
          else                                 k     <= k + 1'b1;
        end
        default: state <= S_RANK;
      endcase
    end
  end

  assign enq_valid = (state == S_SEARCH) && slot_ok;
  assign pop       = enq_valid;
  assign enq_proc  = cand;
  assign enq_task  = cur;
  assign enq_rank  = k;
  assign stall     = (state == S_SEARCH) && !slot_ok && (k == IW'(NPROC - 1));

endmodule

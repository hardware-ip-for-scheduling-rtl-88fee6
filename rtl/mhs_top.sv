// mhs_top: multiprocessor hardware scheduler (MHS) for four processors.
//
// Input tasks enter the task table, which keeps them in deadline (arrival)
// order. The processor selection controller takes the task at the head of the
// table, ranks the four processors by how many tasks of the same type wait in
// their queues (from the processor status table), searches them in that order
// for a time slot, and writes the task into the first processor task queue
// that has one; the table entry is then removed. Each queue hands its tasks to
// its processor in first-in, first-out order whenever the processor is free.
// The status table is updated on every enqueue and every hand-over. Idle
// processors with empty queues are held in power saving mode (proc_sleep).
//
// Interface:
//   in_valid/in_ready/in_task   valid-ready input of 32-bit task entries;
//                               in_reject pulses for an entry whose type is
//                               not one of the five task types (dropped).
//   dispatch_valid[p]/dispatch_task[p]/proc_ready[p]
//                               hand-over to processor p: a task moves when
//                               both are high on a rising edge. A processor
//                               holds proc_ready high while it is free.
//   proc_sleep[p]               processor p may enter power saving mode.
//   queue_count[p], type_count[p][t], table_count
//                               occupancy of queue p, of type t in queue p,
//                               of the task table.
//   place_valid/place_proc/place_rank, stall
//                               placement events of the controller, for
//                               observation.
// Timing: a task reaching the head of the table is placed 2 to 5 cycles later
// (one ranking cycle plus one per processor searched) and can be dispatched
// the cycle after placement. The structure follows the published scheduler's block
// diagram; all handshakes and observation outputs are this design's own.
module mhs_top
  import mhs_pkg::*;
#(
  parameter int unsigned NPROC        = NUM_PROC,
  parameter int unsigned TABLE_ENTRIES = TABLE_DEPTH,
  parameter int unsigned QUEUE_ENTRIES = QUEUE_DEPTH,
  parameter int unsigned WINDOW       = SLOT_WINDOW,
  localparam int unsigned CNT_W       = $clog2(QUEUE_ENTRIES + 1),
  localparam int unsigned WL_W        = $clog2(QUEUE_ENTRIES * ((1 << WCET_W) - 1) + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input tasks
  input  logic                     in_valid,
  output logic                     in_ready,
  input  task_t                    in_task,
  output logic                     in_reject,
  // processors
  output logic [NPROC-1:0]         dispatch_valid,
  output task_t                    dispatch_task [NPROC],
  input  logic [NPROC-1:0]         proc_ready,
  output logic [NPROC-1:0]         proc_sleep,
  // observation
  output logic [CNT_W-1:0]         queue_count [NPROC],
  output logic [CNT_W-1:0]         type_count  [NPROC][NUM_TYPES],
  output logic [$clog2(TABLE_ENTRIES+1)-1:0] table_count,
  output logic                     place_valid,
  output logic [$clog2(NPROC)-1:0] place_proc,
  output logic [$clog2(NPROC)-1:0] place_rank,
  output logic                     stall
);

  logic                     head_valid, pop;
  task_t                    head_task;
  logic                     enq_valid;
  logic [$clog2(NPROC)-1:0] enq_proc;
  task_t                    enq_task;
  logic [NPROC-1:0]         q_full, q_deq;
  logic [TYPE_W-1:0]        q_deq_type [NPROC];
  logic [WL_W-1:0]          q_workload [NPROC];

  task_table #(.DEPTH(TABLE_ENTRIES)) u_task_table (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_task, .in_reject,
    .head_valid, .head_task, .pop,
    .count(table_count)
  );

  proc_sel_ctrl #(
    .NPROC(NPROC), .NTYPES(NUM_TYPES), .CNT_W(CNT_W), .WL_W(WL_W), .WINDOW(WINDOW)
  ) u_ctrl (
    .clk, .rst_n,
    .head_valid, .head_task, .pop,
    .counts(type_count), .sleep(proc_sleep), .full(q_full), .workload(q_workload),
    .enq_valid, .enq_proc, .enq_task,
    .enq_rank(place_rank), .stall
  );

  for (genvar p = 0; p < NPROC; p++) begin : g_queue
    proc_task_queue #(.DEPTH(QUEUE_ENTRIES), .WL_W(WL_W)) u_queue (
      .clk, .rst_n,
      .enq_valid(enq_valid && enq_proc == p[$clog2(NPROC)-1:0]),
      .enq_task,
      .full(q_full[p]), .count(queue_count[p]), .workload(q_workload[p]),
      .dispatch_valid(dispatch_valid[p]), .dispatch_task(dispatch_task[p]),
      .proc_ready(proc_ready[p]), .sleep(proc_sleep[p]),
      .deq(q_deq[p]), .deq_type(q_deq_type[p])
    );
  end

  proc_status_table #(.NPROC(NPROC), .NTYPES(NUM_TYPES), .CNT_W(CNT_W)) u_status (
    .clk, .rst_n,
    .inc(enq_valid), .inc_proc(enq_proc), .inc_type(enq_task.ttype),
    .dec(q_deq), .dec_type(q_deq_type),
    .counts(type_count)
  );

  assign place_valid = enq_valid;
  assign place_proc  = enq_proc;

endmodule

// proc_status_table: the processor status table.
//
// One entry per processor, each entry holding one counter per task type
// (Task A count .. Task E count): the number of tasks of that type now waiting
// in that processor's queue. The processor selection controller reads it to
// rank the processors for a task. A counter is incremented when the controller
// places a task of its type on the processor's queue (inc, inc_proc,
// inc_type) and decremented when the queue hands such a task to its processor
// (dec[p], dec_type[p]); both may happen in one cycle, also to the same
// counter. Counters are CNT_W bits wide, enough for a full queue.
// Timing: counts are registered and show an update one cycle after the edge
// that made it. Counters reset to zero.
// The entry format follows the published scheduler; the counter width and update ports
// are this design's choices.
module proc_status_table
  import mhs_pkg::*;
#(
  parameter int unsigned NPROC  = NUM_PROC,
  parameter int unsigned NTYPES = NUM_TYPES,
  parameter int unsigned CNT_W  = $clog2(QUEUE_DEPTH + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                      inc,
  input  logic [$clog2(NPROC)-1:0]  inc_proc,
  input  logic [TYPE_W-1:0]         inc_type,
  input  logic [NPROC-1:0]          dec,
  input  logic [TYPE_W-1:0]         dec_type [NPROC],
  output logic [CNT_W-1:0]          counts [NPROC][NTYPES]
);

  logic up   [NPROC][NTYPES];
  logic down [NPROC][NTYPES];

  always_comb begin
    for (int p = 0; p < NPROC; p++)
      for (int t = 0; t < NTYPES; t++) begin
        up[p][t]   = inc && (inc_proc == p[$clog2(NPROC)-1:0]) && (inc_type == t[TYPE_W-1:0]);
        down[p][t] = dec[p] && (dec_type[p] == t[TYPE_W-1:0]);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPROC; p++)
        for (int t = 0; t < NTYPES; t++)
          counts[p][t] <= '0;
    end else begin
      for (int p = 0; p < NPROC; p++)
        for (int t = 0; t < NTYPES; t++)
          if (up[p][t] && !down[p][t])      counts[p][t] <= counts[p][t] + 1'b1;
          else if (down[p][t] && !up[p][t]) counts[p][t] <= counts[p][t] - 1'b1;
    end
  end

endmodule

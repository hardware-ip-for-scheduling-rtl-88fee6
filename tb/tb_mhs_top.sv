// tb_mhs_top: end-to-end testbench of the multiprocessor hardware scheduler at
// its default sizes (500-entry task table, four 50-entry processor queues).
//
// Four proc_model instances stand in for the processors. A stream of tasks
// is offered in four phases: a burst of mixed tasks at one per cycle (fills
// the task table, so in_ready falls); a burst of 10-cycle tasks (fills whole
// processor queues, then every queue, so the controller stalls); sparse tasks
// after an idle gap (processors sleep and are woken); and unused type codes
// scattered through all of it (rejected). The task types are skewed, as in a
// voice-processing load where some codec tasks dominate.
//
// A monitor keeps a reference model of the task table and of every processor
// queue, built from the input handshake, the placement events and the
// hand-overs, and checks every cycle: table and queue occupancies, per-type
// counts of the status table, the sleep outputs, that each placement went to
// a queue with room in its time window, that the task handed to a processor is
// the next one placed on it, and that every accepted task reaches a processor
// exactly once. It counts how often each mechanism occurred (table full,
// reject, search past the first-ranked processor, clustering with tasks of the
// same type, wake-up, full queue, stall, simultaneous enqueue and hand-over)
// and fails if one never did. Code fetches per processor are reported.
module tb_mhs_top;
  import mhs_pkg::*;

  localparam int unsigned NPROC  = NUM_PROC;
  localparam int unsigned CNT_W  = $clog2(QUEUE_DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, in_reject;
  task_t in_task = '0;
  logic [NPROC-1:0] dispatch_valid, proc_ready, proc_sleep;
  task_t dispatch_task [NPROC];
  logic [CNT_W-1:0] queue_count [NPROC];
  logic [CNT_W-1:0] type_count [NPROC][NUM_TYPES];
  logic [$clog2(TABLE_DEPTH+1)-1:0] table_count;
  logic place_valid, stall;
  logic [1:0] place_proc, place_rank;

  int fetches [NPROC], done [NPROC], sleep_cycles [NPROC];

  mhs_top dut (.*);

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    proc_model u_proc (
      .clk, .rst_n,
      .dispatch_valid(dispatch_valid[p]), .dispatch_task(dispatch_task[p]),
      .proc_ready(proc_ready[p]), .sleep(proc_sleep[p]),
      .fetches(fetches[p]), .done(done[p]), .sleep_cycles(sleep_cycles[p])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task_t inq [$];
  // reference processor queues, as circular buffers
  task_t pq_mem [NPROC][QUEUE_DEPTH];
  int    pq_head [NPROC], pq_size [NPROC];
  int n_sent = 0, n_bad_sent = 0, n_reject = 0, n_dispatched = 0, n_placed = 0;
  int n_table_full = 0, n_skip = 0, n_cluster = 0, n_wake = 0, n_qfull = 0;
  int n_stall = 0, n_enq_deq = 0;
  logic exp_reject = 1'b0;
  bit running = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int wl(int p);
    int s = 0;
    for (int i = 0; i < pq_size[p]; i++) s += int'(pq_mem[p][(pq_head[p] + i) % QUEUE_DEPTH].wcet);
    return s;
  endfunction

  function automatic int tcount(int p, int t);
    int s = 0;
    for (int i = 0; i < pq_size[p]; i++)
      if (int'(pq_mem[p][(pq_head[p] + i) % QUEUE_DEPTH].ttype) == t) s++;
    return s;
  endfunction

  // monitor: sees the values of the cycle that ends at this edge
  always @(posedge clk) if (running) begin
    task_t placed;
    bit    do_push;
    do_push = 1'b0;
    placed  = '0;
    check(int'(table_count) == inq.size(), "table_count");
    check(in_reject == exp_reject, "in_reject");
    if (in_reject) n_reject++;
    if (!in_ready) n_table_full++;
    if (stall) n_stall++;
    for (int p = 0; p < NPROC; p++) begin
      check(int'(queue_count[p]) == pq_size[p], "queue_count");
      check(proc_sleep[p] == (pq_size[p] == 0 && proc_ready[p]), "proc_sleep");
      for (int t = 0; t < NUM_TYPES; t++)
        check(int'(type_count[p][t]) == tcount(p, t), "type_count");
      if (pq_size[p] == QUEUE_DEPTH) n_qfull++;
    end
    // placement: the task at the head of the table goes to place_proc
    if (place_valid) begin
      int p;
      task_t t;
      p = int'(place_proc);
      check(inq.size() != 0, "placement from empty table");
      if (inq.size() != 0) begin
        t = inq.pop_front();
        placed = t;
        do_push = 1'b1;
        check(pq_size[p] < QUEUE_DEPTH, "placed on full queue");
        check(wl(p) + int'(t.wcet) <= SLOT_WINDOW, "placed outside time window");
        if (place_rank != 0) n_skip++;
        if (proc_sleep[p]) n_wake++;
        if (tcount(p, int'(t.ttype)) > 0) n_cluster++;
        if (dispatch_valid[p] && proc_ready[p]) n_enq_deq++;
        n_placed++;
      end
    end
    // hand-over to the processors
    for (int p = 0; p < NPROC; p++)
      if (dispatch_valid[p] && proc_ready[p]) begin
        check(pq_size[p] != 0, "dispatch from empty queue");
        if (pq_size[p] != 0) begin
          check(dispatch_task[p] == pq_mem[p][pq_head[p]], "dispatched task");
          pq_head[p] = (pq_head[p] + 1) % QUEUE_DEPTH;
          pq_size[p]--;
        end
        n_dispatched++;
      end
    // the placed task joins the back of its queue after this cycle's hand-over
    if (do_push) begin
      int p;
      p = int'(place_proc);
      pq_mem[p][(pq_head[p] + pq_size[p]) % QUEUE_DEPTH] = placed;
      pq_size[p]++;
    end
    exp_reject = 1'b0;
    if (in_valid && in_ready) begin
      if (int'(in_task.ttype) < NUM_TYPES) inq.push_back(in_task);
      else exp_reject = 1'b1;
    end
  end

  function automatic task_t make_task(int wcet_lo, int wcet_hi, bit allow_bad);
    task_t t;
    int r = $urandom_range(0, 99);
    // skewed type mix: A 40%, B 25%, C 15%, D 12%, E 8%
    t.ttype = (r < 40) ? TYPE_A : (r < 65) ? TYPE_B : (r < 80) ? TYPE_C : (r < 92) ? TYPE_D : TYPE_E;
    if (allow_bad && $urandom_range(0, 49) == 0) t.ttype = TYPE_W'($urandom_range(5, 7));
    t.mem_addr = ADDR_W'(n_sent);   // unique tag
    t.wcet     = WCET_W'($urandom_range(wcet_lo, wcet_hi));
    return t;
  endfunction

  task automatic send(int n, int gap_max, int wcet_lo, int wcet_hi);
    for (int i = 0; i < n; i++) begin
      in_valid = 1'b1;
      in_task  = make_task(wcet_lo, wcet_hi, 1'b1);
      do @(posedge clk); while (!in_ready);
      #1;
      n_sent++;
      if (int'(in_task.ttype) >= NUM_TYPES) n_bad_sent++;
      in_valid = 1'b0;
      repeat ($urandom_range(0, gap_max)) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total_fetch, total_done;
    total_fetch = 0;
    total_done  = 0;
    foreach (pq_size[p]) begin
      pq_size[p] = 0;
      pq_head[p] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    running = 1'b1;
    @(posedge clk); #1;
    send(1500, 0, 1, 31);     // phase 1: mixed burst, fills the task table
    send(1500, 0, 10, 10);    // phase 2: 10-cycle tasks, fills queues, stalls
    repeat (3000) @(posedge clk);
    #1;
    send(300, 120, 1, 31);    // phase 3: sparse tasks, processors sleep and wake
    // drain
    while (inq.size() != 0 || pq_size.sum() != 0
           || proc_ready != '1)
      @(posedge clk);
    repeat (5) @(posedge clk);
    running = 1'b0;
    for (int p = 0; p < NPROC; p++) begin
      total_fetch += fetches[p];
      total_done  += done[p];
      $display("processor %0d: tasks=%0d code fetches=%0d sleep cycles=%0d",
               p, done[p], fetches[p], sleep_cycles[p]);
    end
    check(n_placed == n_sent - n_bad_sent, "every valid task placed");
    check(n_dispatched == n_placed, "every placed task dispatched");
    check(total_done == n_dispatched, "every dispatched task finished");
    check(n_reject == n_bad_sent, "every unused type code rejected");
    $display("tasks=%0d rejected=%0d placed=%0d code fetches=%0d", n_sent, n_reject, n_placed, total_fetch);
    $display("table full cycles=%0d stalls=%0d searches past rank 0=%0d clustered=%0d wake-ups=%0d full-queue cycles=%0d enq+handover=%0d",
             n_table_full, n_stall, n_skip, n_cluster, n_wake, n_qfull, n_enq_deq);
    check(n_table_full > 0, "task table full seen");
    check(n_reject > 0, "reject seen");
    check(n_stall > 0, "stall seen");
    check(n_skip > 0, "search past first-ranked processor seen");
    check(n_cluster > 0, "clustering seen");
    check(n_wake > 0, "wake-up seen");
    check(n_qfull > 0, "full processor queue seen");
    check(n_enq_deq > 0, "enqueue with hand-over seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

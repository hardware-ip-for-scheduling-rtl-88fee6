// tb_proc_task_queue: self-checking testbench for one processor task queue.
//
// Enqueues random tasks (never into a full queue) while a processor stand-in
// raises proc_ready at random, and checks every cycle against a reference
// queue: the task offered to the processor, count, full, the waiting WCET sum,
// the sleep condition and the dequeue report to the status table. It also
// fills the queue to its 50 entries and checks `full`.
module tb_proc_task_queue;
  import mhs_pkg::*;

  localparam int unsigned DEPTH = QUEUE_DEPTH;
  localparam int unsigned WL_W  = $clog2(DEPTH * 31 + 1);

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  enq_valid = 1'b0, proc_ready = 1'b0;
  task_t enq_task = '0, dispatch_task;
  logic  full, dispatch_valid, sleep, deq;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [WL_W-1:0] workload;
  logic [TYPE_W-1:0] deq_type;

  int checks = 0, failures = 0;
  task_t model [$];
  int    n_full = 0, n_sleep = 0, n_both = 0;

  proc_task_queue dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int model_wl();
    int s = 0;
    foreach (model[i]) s += int'(model[i].wcet);
    return s;
  endfunction

  task automatic step();
    #4;
    check(count == ($clog2(DEPTH+1))'(model.size()), "count");
    check(full == (model.size() == DEPTH), "full");
    check(int'(workload) == model_wl(), "workload");
    check(dispatch_valid == (model.size() != 0), "dispatch_valid");
    check(sleep == (model.size() == 0 && proc_ready), "sleep");
    check(deq == (model.size() != 0 && proc_ready), "deq");
    if (model.size() != 0) begin
      check(dispatch_task == model[0], "dispatch_task");
      check(deq_type == model[0].ttype, "deq_type");
    end
    if (full) n_full++;
    if (sleep) n_sleep++;
    if (enq_valid && deq) n_both++;
    if (deq) void'(model.pop_front());
    if (enq_valid) model.push_back(enq_task);
    @(posedge clk); #1;
  endtask

  function automatic task_t rand_task();
    task_t t;
    t.ttype    = TYPE_W'($urandom_range(0, 4));
    t.mem_addr = ADDR_W'($urandom);
    t.wcet     = WCET_W'($urandom);
    return t;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int phase = 0; phase < 6; phase++) begin
      // alternate phases where the producer or the processor is faster
      for (int i = 0; i < 800; i++) begin
        enq_valid  = (model.size() < DEPTH) && ($urandom_range(0, 9) < (phase[0] ? 8 : 3));
        enq_task   = rand_task();
        proc_ready = ($urandom_range(0, 9) < (phase[0] ? 2 : 7));
        if (model.size() >= DEPTH - 1 && phase[0]) proc_ready = 1'b0;
        step();
      end
    end
    enq_valid = 1'b0;
    proc_ready = 1'b1;
    while (model.size() != 0) step();
    step();
    check(n_full > 0 && n_sleep > 0 && n_both > 0, "full, sleep and simultaneous enq/deq all seen");
    $display("full cycles=%0d sleep cycles=%0d enq+deq cycles=%0d", n_full, n_sleep, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

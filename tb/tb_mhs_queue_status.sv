// tb_mhs_queue_status: steady-load run of the scheduler, watching how many
// tasks wait in each processor queue over time and which types each processor
// runs.
//
// Tasks of five equally likely types with WCETs of 1..31 cycles arrive at
// random at about 0.2 per cycle, close to what four processors can run. Every
// 100 cycles the four queue occupancies are printed, which gives the queue
// status graph of the design. At the end the testbench checks that every
// task was run, that all four processors were given work, and that
// clustering took place: on each processor that ran at least 20 tasks, the
// most frequent type makes up more than the 1/5 share that type-blind
// placement would give, and code fetches (type changes) are fewer than the
// tasks run.
module tb_mhs_queue_status;
  import mhs_pkg::*;

  localparam int unsigned NPROC = NUM_PROC;
  localparam int unsigned CNT_W = $clog2(QUEUE_DEPTH + 1);
  localparam int unsigned NTASK = 3000;

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
  int ran [NPROC][NUM_TYPES];
  int checks = 0, failures = 0, cycle = 0;

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

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    for (int p = 0; p < NPROC; p++)
      if (dispatch_valid[p] && proc_ready[p]) ran[p][dispatch_task[p].ttype]++;
    if (cycle % 100 == 0)
      $display("cycle %5d  queue tasks P0..P3: %2d %2d %2d %2d  table %0d", cycle,
               queue_count[0], queue_count[1], queue_count[2], queue_count[3], table_count);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    total = 0;
    foreach (ran[p, t]) ran[p][t] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NTASK; i++) begin
      repeat ($urandom_range(0, 8)) @(posedge clk);
      #1;
      in_valid         = 1'b1;
      in_task.ttype    = TYPE_W'($urandom_range(0, NUM_TYPES - 1));
      in_task.mem_addr = ADDR_W'(i);
      in_task.wcet     = WCET_W'($urandom_range(1, 31));
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 1'b0;
    end
    while (table_count != 0 || dispatch_valid != '0 || proc_ready != '1) @(posedge clk);
    repeat (2) @(posedge clk);
    for (int p = 0; p < NPROC; p++) begin
      int n, top;
      n = 0;
      top = 0;
      for (int t = 0; t < NUM_TYPES; t++) begin
        n += ran[p][t];
        if (ran[p][t] > top) top = ran[p][t];
      end
      total += done[p];
      $display("processor %0d: tasks=%0d  A..E=%0d %0d %0d %0d %0d  code fetches=%0d", p, n,
               ran[p][0], ran[p][1], ran[p][2], ran[p][3], ran[p][4], fetches[p]);
      check(n > 0, "processor given work");
      if (n >= 20) begin
        check(top * 5 > n, "most frequent type above a 1/5 share");
        check(fetches[p] < n, "fewer code fetches than tasks");
      end
    end
    check(total == NTASK, "every task run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

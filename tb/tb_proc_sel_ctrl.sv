// tb_proc_sel_ctrl: self-checking testbench for the processor selection
// controller.
//
// Each trial presents one task at the head of the table together with a
// random processor state (per-type queue counts, sleeping processors, full
// queues, waiting WCET sums). The testbench sorts the processors itself
// (most tasks of the head task's type first, awake before asleep, then lower
// number) and expects the task on the first processor with a time slot,
// written there on the (rank+2)-th rising edge after the task appears, with
// enq_rank equal to that rank. When no processor
// has a slot it expects a stall pulse in the fourth search cycle and no placement, then
// opens a slot and expects the retried search to place the task.
module tb_proc_sel_ctrl;
  import mhs_pkg::*;

  localparam int unsigned NPROC = NUM_PROC, NTYPES = NUM_TYPES;
  localparam int unsigned CNT_W = $clog2(QUEUE_DEPTH + 1);
  localparam int unsigned WL_W  = $clog2(QUEUE_DEPTH * 31 + 1);
  localparam int unsigned WINDOW = SLOT_WINDOW;

  logic clk = 1'b0, rst_n = 1'b0;
  logic head_valid = 1'b0, pop;
  task_t head_task = '0, enq_task;
  logic [CNT_W-1:0] counts [NPROC][NTYPES];
  logic [NPROC-1:0] sleep = '0, full = '0;
  logic [WL_W-1:0] workload [NPROC];
  logic enq_valid, stall;
  logic [1:0] enq_proc, enq_rank;

  int checks = 0, failures = 0;
  int n_rank [NPROC];
  int n_stall = 0, n_wake = 0;

  proc_sel_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit has_slot(int p);
    return !full[p] && (int'(workload[p]) + int'(head_task.wcet) <= WINDOW);
  endfunction

  // reference ranking: insertion sort on (awake, count, lower index first)
  function automatic void ref_order(output int ord [NPROC]);
    int n = 0;
    for (int p = 0; p < NPROC; p++) begin
      int j = n;
      while (j > 0 && better(p, ord[j-1])) begin
        ord[j] = ord[j-1];
        j--;
      end
      ord[j] = p;
      n++;
    end
  endfunction

  function automatic bit better(int a, int b);
    int ca = int'(counts[a][head_task.ttype]), cb = int'(counts[b][head_task.ttype]);
    if (ca != cb) return ca > cb;
    if (sleep[a] != sleep[b]) return !sleep[a];
    return a < b;
  endfunction

  task automatic random_state(input bit want_slot);
    for (int p = 0; p < NPROC; p++) begin
      sleep[p] = ($urandom_range(0, 3) == 0);
      for (int t = 0; t < NTYPES; t++)
        counts[p][t] = sleep[p] ? '0 : CNT_W'($urandom_range(0, 4) == 0 ? 0 : $urandom_range(0, 12));
      full[p]     = ($urandom_range(0, 5) == 0);
      workload[p] = WL_W'($urandom_range(300, 530));
    end
    if (want_slot) begin
      int p = $urandom_range(0, NPROC - 1);
      full[p] = 1'b0;
      workload[p] = WL_W'(WINDOW - 31);
    end
  endtask

  // run one decision from head_valid to placement or stall; returns placed
  task automatic decide(input int extra, output bit placed);
    int ord [NPROC];
    int exp_rank = -1;
    int cyc = 0;
    ref_order(ord);
    for (int r = 0; r < NPROC; r++)
      if (exp_rank < 0 && has_slot(ord[r])) exp_rank = r;
    head_valid = 1'b1;
    placed = 1'b0;
    forever begin
      @(posedge clk); #1;
      cyc++;
      #2;
      if (enq_valid) begin
        check(exp_rank >= 0, "placed although no slot");
        if (exp_rank >= 0) begin
          check(int'(enq_proc) == ord[exp_rank], "chosen processor");
          check(int'(enq_rank) == exp_rank, "enq_rank");
          check(cyc == exp_rank + 1 + extra, "placement latency");
          n_rank[exp_rank]++;
          if (sleep[ord[exp_rank]]) n_wake++;
        end
        check(pop, "pop with placement");
        check(enq_task == head_task, "enq_task");
        placed = 1'b1;
        @(posedge clk); #1;
        head_valid = 1'b0;
        break;
      end
      check(!pop, "pop without placement");
      if (stall) begin
        check(exp_rank < 0, "stall although a slot exists");
        check(cyc == NPROC, "stall latency");
        n_stall++;
        break;
      end
      if (cyc > 10) begin
        check(1'b0, "no decision");
        break;
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit placed;
    foreach (n_rank[r]) n_rank[r] = 0;
    random_state(1'b0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      head_task.ttype    = TYPE_W'($urandom_range(0, 4));
      head_task.mem_addr = ADDR_W'($urandom);
      head_task.wcet     = WCET_W'($urandom);
      random_state(1'b0);
      decide(0, placed);
      if (!placed) begin
        // the task stays; give one processor room and expect the retry to place it
        random_state(1'b1);
        decide(1, placed);  // one cycle to leave the search
        check(placed, "retry placed the task");
      end
      @(posedge clk); #1;
    end
    for (int r = 0; r < NPROC; r++) begin
      $display("placed at rank %0d: %0d", r, n_rank[r]);
      check(n_rank[r] > 0, "every search depth seen");
    end
    $display("stalls=%0d wake-ups=%0d", n_stall, n_wake);
    check(n_stall > 0 && n_wake > 0, "stall and wake-up seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

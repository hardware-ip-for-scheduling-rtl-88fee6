// tb_task_table: self-checking testbench for the task table.
//
// Writes random task entries (with an occasional unused type code) while the
// consumer pops at random, and compares the head of the table, its count and
// the in_ready/in_reject flags with a reference queue kept in the testbench.
// A second phase fills the table to its 500 entries with no pops, checks that
// in_ready falls exactly then, and drains it in order.
module tb_task_table;
  import mhs_pkg::*;

  localparam int unsigned DEPTH = TABLE_DEPTH;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, in_ready, in_reject, head_valid, pop = 1'b0;
  task_t in_task = '0, head_task;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  task_t model [$];
  logic  exp_reject = 1'b0;

  task_table dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic task_t rand_task(input bit allow_bad);
    task_t t;
    t.ttype    = allow_bad && ($urandom_range(0, 9) == 0) ? TYPE_W'($urandom_range(5, 7))
                                                           : TYPE_W'($urandom_range(0, 4));
    t.mem_addr = ADDR_W'($urandom);
    t.wcet     = WCET_W'($urandom);
    return t;
  endfunction

  // compare outputs with the model just before each rising edge, then update
  task automatic step();
    #4;
    check(in_reject == exp_reject, "in_reject");
    check(count == ($clog2(DEPTH+1))'(model.size()), "count");
    check(head_valid == (model.size() != 0), "head_valid");
    check(in_ready == (model.size() < DEPTH), "in_ready");
    if (model.size() != 0) check(head_task == model[0], "head_task");
    exp_reject = 1'b0;
    if (pop && model.size() != 0) void'(model.pop_front());
    if (in_valid && in_ready) begin
      if (int'(in_task.ttype) < NUM_TYPES) model.push_back(in_task);
      else exp_reject = 1'b1;
    end
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // phase 1: random traffic
    for (int i = 0; i < 3000; i++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      in_task  = rand_task(1'b1);
      pop      = ($urandom_range(0, 2) == 0) && (model.size() != 0);
      step();
    end
    // phase 2: fill to capacity
    pop = 1'b0;
    while (model.size() < DEPTH) begin
      in_valid = 1'b1;
      in_task  = rand_task(1'b0);
      step();
    end
    in_valid = 1'b1;
    in_task  = rand_task(1'b0);
    step();
    step();
    check(!in_ready && count == ($clog2(DEPTH+1))'(DEPTH), "full after DEPTH entries");
    in_valid = 1'b0;
    // drain
    while (model.size() != 0) begin
      pop = 1'b1;
      step();
    end
    pop = 1'b0;
    step();
    check(!head_valid, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_proc_status_table: self-checking testbench for the processor status table.
//
// Drives random increments (one processor and type per cycle) and random
// decrements (any processors at once), including an increment and a decrement
// of the same counter in one cycle, and compares all twenty counters with a
// reference array every cycle. Counters are kept within 0..50 as a real
// queue would.
module tb_proc_status_table;
  import mhs_pkg::*;

  localparam int unsigned NPROC = NUM_PROC, NTYPES = NUM_TYPES;
  localparam int unsigned CNT_W = $clog2(QUEUE_DEPTH + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic inc = 1'b0;
  logic [1:0] inc_proc = '0;
  logic [TYPE_W-1:0] inc_type = '0;
  logic [NPROC-1:0] dec = '0;
  logic [TYPE_W-1:0] dec_type [NPROC];
  logic [CNT_W-1:0] counts [NPROC][NTYPES];

  int checks = 0, failures = 0, n_same = 0;
  int model [NPROC][NTYPES];

  proc_status_table dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (dec_type[p]) dec_type[p] = '0;
    foreach (model[p, t]) model[p][t] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 5000; i++) begin
      inc      = ($urandom_range(0, 3) != 0);
      inc_proc = 2'($urandom_range(0, 3));
      inc_type = TYPE_W'($urandom_range(0, 4));
      if (model[inc_proc][inc_type] >= QUEUE_DEPTH) inc = 1'b0;
      for (int p = 0; p < NPROC; p++) begin
        dec_type[p] = TYPE_W'($urandom_range(0, 4));
        dec[p]      = ($urandom_range(0, 3) == 0) && (model[p][dec_type[p]] > 0);
      end
      // now and then decrement the counter being incremented
      if (inc && $urandom_range(0, 7) == 0 && model[inc_proc][inc_type] > 0) begin
        dec[inc_proc]      = 1'b1;
        dec_type[inc_proc] = inc_type;
      end
      @(posedge clk);
      if (inc && dec[inc_proc] && dec_type[inc_proc] == inc_type) n_same++;
      if (inc) model[inc_proc][inc_type]++;
      for (int p = 0; p < NPROC; p++) if (dec[p]) model[p][dec_type[p]]--;
      #1;
      for (int p = 0; p < NPROC; p++)
        for (int t = 0; t < NTYPES; t++)
          check(int'(counts[p][t]) == model[p][t], $sformatf("count[%0d][%0d]", p, t));
    end
    check(n_same > 0, "simultaneous inc and dec of one counter seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

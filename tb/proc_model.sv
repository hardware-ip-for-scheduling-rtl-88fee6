// proc_model: behavioural stand-in for one processor fed by the scheduler
// (not part of the scheduler; used by testbenches only).
//
// The processor is free (proc_ready high) when it runs nothing. It takes the
// offered task on a rising edge with dispatch_valid high and then runs it for
// max(WCET, 1) clock cycles. A task whose type differs from the previous task
// it ran needs its code fetched; such fetches are counted in `fetches`, and
// every finished task in `done`. Cycles with `sleep` high are counted in
// `sleep_cycles`.
module proc_model
  import mhs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  dispatch_valid,
  input  task_t dispatch_task,
  output logic  proc_ready,
  input  logic  sleep,
  output int    fetches,
  output int    done,
  output int    sleep_cycles
);

  int          remaining;
  logic [2:0]  last_type;
  logic        ran_any;

  assign proc_ready = (remaining == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining    <= 0;
      fetches      <= 0;
      done         <= 0;
      sleep_cycles <= 0;
      last_type    <= '0;
      ran_any      <= 1'b0;
    end else begin
      if (sleep) sleep_cycles <= sleep_cycles + 1;
      if (dispatch_valid && proc_ready) begin
        remaining <= (dispatch_task.wcet == 0) ? 1 : int'(dispatch_task.wcet);
        if (!ran_any || dispatch_task.ttype != last_type) fetches <= fetches + 1;
        last_type <= dispatch_task.ttype;
        ran_any   <= 1'b1;
      end else if (remaining != 0) begin
        remaining <= remaining - 1;
        if (remaining == 1) done <= done + 1;
      end
    end
  end

endmodule

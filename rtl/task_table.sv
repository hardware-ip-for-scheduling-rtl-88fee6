// task_table: the scheduler's input task table.
//
// Holds up to DEPTH (500) 32-bit task entries. Tasks are supplied in order of
// their deadlines, so the table is kept as a first-in, first-out store and the
// entry at its head is always the one with the earliest deadline; it is shown
// to the processor selection controller on head_task/head_valid and removed
// when the controller asserts pop (after it has placed the task on a
// processor queue). A task that cannot be placed simply stays at the head.
//
// Interface: in_valid/in_ready/in_task is a valid-ready handshake; a word is
// taken on a rising clock edge with both high. in_ready is low only when the
// table is full. A word whose type field is not one of the five task types
// is taken but not stored, and in_reject pulses for one cycle.
// Timing: a word written in cycle n is visible at the head in cycle n+1 (if
// the table was empty). Head read is combinational from the storage array.
// Depth and entry width follow the published scheduler; the handshake, the rejection of
// unused type codes and the arrival-order reading of "deadline order" are
// this design's choices.
module task_table
  import mhs_pkg::*;
#(
  parameter int unsigned DEPTH = TABLE_DEPTH
) (
  input  logic   clk,
  input  logic   rst_n,
  // input tasks
  input  logic   in_valid,
  output logic   in_ready,
  input  task_t  in_task,
  output logic   in_reject,
  // head of the table, to the processor selection controller
  output logic   head_valid,
  output task_t  head_task,
  input  logic   pop,
  // occupancy
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);

  task_t         mem [DEPTH];
  logic [PW-1:0] wr_ptr, rd_ptr;

  logic accept, store, do_pop;

  assign in_ready   = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign accept     = in_valid && in_ready;
  assign store      = accept && (in_task.ttype < TYPE_W'(NUM_TYPES));
  assign head_valid = (count != '0);
  assign head_task  = mem[rd_ptr];
  assign do_pop     = pop && head_valid;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (store) mem[wr_ptr] <= in_task;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr    <= '0;
      rd_ptr    <= '0;
      count     <= '0;
      in_reject <= 1'b0;
    end else begin
      in_reject <= accept && !store;
      if (store)  wr_ptr <= next_ptr(wr_ptr);
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      case ({store, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // The controller only removes a task that is there.
  a_pop_nonempty: assert property (@(posedge clk) pop |-> head_valid);

endmodule

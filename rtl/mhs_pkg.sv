// mhs_pkg: types and constants shared by the multiprocessor hardware scheduler.
//
// A task entry is 32 bits: a 3-bit task type, a 24-bit memory location of the
// task's code (all tasks are non-resident, so their code is fetched from there)
// and a 5-bit worst-case execution time in clock cycles. The field widths and
// their left-to-right order follow the scheduler's input task format; placing
// the type in the most significant bits and the WCET in the least significant
// bits is this design's reading of that left-to-right order.
// Five task types (A..E) and four processors are supported; the task table
// holds 500 entries and each processor queue 50.
package mhs_pkg;

  localparam int unsigned TASK_W    = 32;
  localparam int unsigned TYPE_W    = 3;
  localparam int unsigned ADDR_W    = 24;
  localparam int unsigned WCET_W    = 5;

  localparam int unsigned NUM_TYPES = 5;    // task types A, B, C, D, E
  localparam int unsigned NUM_PROC  = 4;    // homogeneous processors
  localparam int unsigned TABLE_DEPTH = 500; // task table entries
  localparam int unsigned QUEUE_DEPTH = 50;  // entries per processor queue

  // Time slot window (clock cycles): a processor queue offers a slot for a
  // task only if the WCETs already waiting in it plus the new task's WCET fit
  // within this many cycles. The value is this design's choice.
  localparam int unsigned SLOT_WINDOW = 512;

  typedef enum logic [TYPE_W-1:0] {
    TYPE_A = 3'd0,
    TYPE_B = 3'd1,
    TYPE_C = 3'd2,
    TYPE_D = 3'd3,
    TYPE_E = 3'd4
  } task_type_e;

  typedef struct packed {
    logic [TYPE_W-1:0] ttype;     // bits 31:29
    logic [ADDR_W-1:0] mem_addr;  // bits 28:5
    logic [WCET_W-1:0] wcet;      // bits 4:0
  } task_t;

endpackage

// contrail_pkg: types shared by the Contrail verification-thread scheduler.
//
// A verification thread is a region of the program that the speculation
// stream skipped with the help of a trace-level value prediction. The
// thread re-executes the region on a slow verification pipeline and checks
// the predicted values. Its descriptor carries a sequence number (program
// order among outstanding threads), the PC where the skipped region starts
// and the PC at which the speculation stream resumed after it. The field
// set and widths are this design's own.
package contrail_pkg;

  localparam int unsigned PC_W  = 32;
  localparam int unsigned SEQ_W = 3;

  typedef struct packed {
    logic [SEQ_W-1:0] seq;
    logic [PC_W-1:0]  start_pc;
    logic [PC_W-1:0]  resume_pc;
  } vthread_t;

endpackage

// scb_pkg: sizes, the operation type and the pointer numbering shared by the
// self-compacting buffer (SCB).
//
// The SCB keeps packets of n priority levels in one shift-register buffer, ordered
// by priority region: 0+, 1, 1+, 2, 2+, ..., (n-1)+, n, then free space. Region 0+
// always starts at row 0, so only the other 2n-1 region starts plus the start of the
// free space are stored: 2n priority pointers, numbered here
//   pointer 2p-2 : start of queue p   (p = 1..n)
//   pointer 2p-1 : start of queue p+  (p = 1..n-1), and pointer 2n-1 is the start of
//                  free space, which is also the number of stored entries.
// A write of priority p is inserted at pointer 2p-1 (the end of queue p).
// The defaults (3 priority levels, 16 rows of 16 bits) are this design's choice:
// three levels follow the worked example of the pointer-controller tables, while
// the buffer depth and word width are not fixed by the original description.
package scb_pkg;

  parameter int unsigned SCB_DEPTH = 16;  // buffer rows
  parameter int unsigned SCB_WIDTH = 16;  // bits per row
  parameter int unsigned SCB_NPRIO = 3;   // priority levels 1..n

  // The operation that reaches the buffer controller in a cycle.
  typedef enum logic [1:0] {
    SCB_IDLE  = 2'b00,
    SCB_WRITE = 2'b01,  // case 1: single write (insertion)
    SCB_READ  = 2'b10,  // case 2: single read (deletion)
    SCB_RDWR  = 2'b11   // case 3: simultaneous read/write
  } scb_case_e;

  // Pointer index of the start of queue p (p = 1..n).
  function automatic int unsigned ptr_of_queue(int unsigned p);
    return 2 * p - 2;
  endfunction

  // Pointer index of the start of queue p+ (p = 1..n-1); p = n gives the free pointer.
  function automatic int unsigned ptr_of_plus(int unsigned p);
    return 2 * p - 1;
  endfunction

endpackage

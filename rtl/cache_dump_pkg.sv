// Shared sizes and types of the updated-line trackers.
//
// The default cache is a 2 MB, 8-way L2 with 128-byte lines, i.e. 16384
// lines, so a line number is 14 bits wide. The Interval Table holds k = 16
// intervals and the Update Buffer 4 entries; these are the sizes of the
// published hardware implementation. The 4-lines/bit default of the bit-vector
// tracker is this design's own pick among the t values that were compared.
// An interval is a pair of inclusive line numbers, start <= end.
package cache_dump_pkg;

  localparam int unsigned NUM_LINES_DEF   = 16384;
  localparam int unsigned NUM_INTERVALS_DEF = 16;
  localparam int unsigned BUF_DEPTH_DEF   = 4;
  localparam int unsigned LINES_PER_BIT_DEF = 4;

  // Source of the interval table's read data, chosen by the controller.
  typedef enum logic [1:0] {
    RD_NONE  = 2'd0,
    RD_SCAN  = 2'd1,   // check interval / min gap units
    RD_MERGE = 2'd2,   // merge logic (merges and shifts)
    RD_DUMP  = 2'd3    // dumping logic
  } rd_sel_e;

endpackage

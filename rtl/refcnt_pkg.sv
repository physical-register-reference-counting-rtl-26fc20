// refcnt_pkg: shared constants and helpers for the physical register
// reference counting blocks.
//
// Default sizes: 64 logical registers, 16 map-table checkpoints, two-way
// rename/commit and 2-bit binary counters come from the design description.
// The physical register count and the ROB/IQ/LSQ depths are not given there;
// the values below are this design's own choice.
package refcnt_pkg;

  localparam int unsigned NPREG_DEF = 128;  // physical registers (own choice)
  localparam int unsigned NLREG_DEF = 64;   // logical registers
  localparam int unsigned NCKPT_DEF = 16;   // map-table checkpoints
  localparam int unsigned W_DEF     = 2;    // rename and commit width
  localparam int unsigned CBITS_DEF = 2;    // binary counter width
  localparam int unsigned ROB_DEF   = 64;   // ROB entries (own choice)
  localparam int unsigned IQ_DEF    = 32;   // issue queue entries (own choice)
  localparam int unsigned LSQ_DEF   = 32;   // load/store entries (own choice)
  localparam int unsigned NSRC_DEF  = 2;    // register sources per instruction

endpackage

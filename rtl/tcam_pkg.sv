// tcam_pkg: constants and types shared by the vertically partitioned
// SRAM-based TCAM.
//
// The default geometry is a 16-entry by 16-bit ternary table split into two
// vertical partitions of 8-bit sub-words, as in the reference design. The
// BPT split of a sub-word into row address and bit position (P low bits) is
// not fixed by the reference design; P = 4 is this design's choice.
package tcam_pkg;

  localparam int unsigned DEF_W = 16;  // TCAM word width
  localparam int unsigned DEF_N = 16;  // number of TCAM entries
  localparam int unsigned DEF_K = 2;   // number of vertical partitions
  localparam int unsigned DEF_P = 4;   // bit-position-indicator width

  // States of the data mapping controller.
  typedef enum logic [1:0] {
    MAP_IDLE,   // tables valid, searches allowed
    MAP_SWEEP   // rewriting BPTs and APTs from the ternary table
  } map_state_e;

endpackage

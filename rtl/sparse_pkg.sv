// Shared types and constants for the sparse tensor processing elements.
//
// All tensor values and matrix entries are IEEE-754 single-precision numbers,
// carried as raw 32-bit words. Indexes and CSF pointers are 32-bit unsigned
// words, as in the compressed sparse fiber (CSF) arrays the host prepares.
// Matrix row indexes stored in the CSF index arrays are 1-based; the
// processing elements subtract one before addressing a matrix row.
package sparse_pkg;

  localparam int unsigned FP_W  = 32;  // single-precision word
  localparam int unsigned IDX_W = 32;  // CSF pointer / index word
  localparam int unsigned ADDR_W = 32; // word address into one global buffer

  typedef logic [FP_W-1:0]   fp32_t;
  typedef logic [IDX_W-1:0]  idx_t;
  typedef logic [ADDR_W-1:0] addr_t;

  localparam fp32_t FP32_ZERO    = 32'h0000_0000;
  localparam fp32_t FP32_QNAN    = 32'h7FC0_0000;


endpackage

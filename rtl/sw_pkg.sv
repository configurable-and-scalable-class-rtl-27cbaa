// Shared types and constants of the Smith-Waterman alignment accelerator.
//
// The accelerator aligns short DNA query sequences against long reference
// sequences with a linear systolic array of processing elements (PEs). Each
// PE computes one cell of the score matrix G per clock and, alongside the
// score, carries the coordinates where the local alignment that reaches the
// cell started (origin tracking), so that software only has to recompute the
// small sub-matrix between the origin and the end of the best alignment.
//
// Widths follow the larger ASIC configuration of the design: 512 PEs that can
// be split into up to 8 equal arrays, 12-bit scores and reference coordinates
// of 28 bits. The 2-bit nucleotide code, the 8-bit substitution-score entries
// and the packing of host words are this design's own choices.
package sw_pkg;

  // Nucleotide code: A=0, C=1, G=2, T=3 (4-letter alphabet)
  localparam int unsigned SYM_W   = 2;
  localparam int unsigned ALPHA   = 4;
  // One substitution-matrix column = ALPHA signed entries of SBC_W bits,
  // exactly one 32-bit host word
  localparam int unsigned SBC_W   = 8;
  localparam int unsigned COL_W   = ALPHA * SBC_W;
  // Host word width of every FIFO
  localparam int unsigned WORD_W  = 32;
  // Reference symbols packed into one host word
  localparam int unsigned SYMS_PER_WORD = WORD_W / SYM_W;

  typedef enum logic [3:0] {
    OP_CONFIG       = 4'h0,
    OP_RSTPROC      = 4'h1,
    OP_RSTQUERY     = 4'h2,
    OP_SHIFTNXTCOST = 4'h3,
    OP_LDCOST       = 4'h4,
    OP_LDREF        = 4'h5,
    OP_ENDREF       = 4'h6,
    OP_GETID        = 4'h7
  } opcode_e;

  // Number of 32-bit words the accelerator writes per array after endref
  localparam int unsigned RESULT_WORDS = 5;

endpackage

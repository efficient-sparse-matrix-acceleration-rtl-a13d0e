// tsb_pkg: constants and types shared by the two-step bitmap (TSB) sparse
// matrix accelerator.
//
// The accelerator multiplies an activation matrix A (M rows of length K) by a
// weight matrix W (K x N).  W is block-pruned into BR x BC blocks and stored
// in the two-step bitmap format: a first-step bitmap with one bit per block
// (1 = block kept) and, for every kept block, a second-step bitmap with one
// bit per element (1 = element nonzero), followed by the nonzero weights.
// Each activation row is stored as a K-bit bitmap followed by its nonzero
// values.
//
// The 8 x 8 matrix with 2 x 2 blocks and the four processing elements follow
// the worked example and dot-product unit of the source design; the 32-bit
// value width follows its storage analysis.  Widths of accumulators and
// addresses, and the DRAM word layout, are this implementation's choices.
package tsb_pkg;

  // Default sizes.
  parameter int unsigned K_DEF      = 8;   // weight rows = activation row length
  parameter int unsigned N_DEF      = 8;   // weight columns = output row length
  parameter int unsigned BR_DEF     = 2;   // block height
  parameter int unsigned BC_DEF     = 2;   // block width
  parameter int unsigned P_DEF      = 4;   // processing elements (multipliers)
  parameter int unsigned DATA_W_DEF = 32;  // activation / weight value width
  parameter int unsigned ACC_W_DEF  = 32;  // product / accumulator width (wraps)
  parameter int unsigned MEM_W_DEF  = 32;  // DRAM word width
  parameter int unsigned ADDR_W_DEF = 32;  // DRAM word address width

  // Sequencer phases of the top level.
  typedef enum logic [2:0] {
    PH_IDLE   = 3'd0,
    PH_LOAD_W = 3'd1,   // load first/second-step bitmaps and nonzero weights
    PH_LOAD_A = 3'd2,   // load one activation row (bitmap + nonzero values)
    PH_GUST   = 3'd3,   // bitmap AND / compaction, fills the index buffer
    PH_CORE   = 3'd4,   // SpGEMM core drains the index buffer
    PH_STORE  = 3'd5    // store unit writes the output row
  } phase_e;

endpackage

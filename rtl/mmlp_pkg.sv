// mmlp_pkg: types and constants shared by the minimal maximum-level
// programming (MMLP) blocks.
//
// MMLP stores four same-size sectors in one wordline of 4-level cells. The
// encoder and decoder work on pairs of adjacent cells, so the basic datapath
// element is a cell pair: two 2-bit cell levels. Reference comparisons are
// named by the level they separate from the one below it: reference k tells
// whether a cell is at level k or above (k = 1, 2, 3). A sense result handed
// to the decoder is a "quantized level": the highest sensed reference the cell
// reaches, or 0 if it reaches none.
package mmlp_pkg;

  // Levels per cell of the configuration the encoder and decoder implement.
  localparam int unsigned LEVELS       = 4;

  // Charge level of one cell, 0 = erased.
  typedef logic [1:0] level_t;

  // Two adjacent cells: cell_a is the lower-numbered cell of the pair and
  // carries the bit of the base-layer sector that owns that cell; cell_b is
  // the next cell.
  typedef struct packed {
    level_t cell_b;
    level_t cell_a;
  } cell_pair_t;

  // Bit k (k = 1..3) set: compare the cells with the reference between
  // levels k-1 and k.
  typedef logic [3:1] ref_mask_t;

  // Host commands.
  typedef enum logic [1:0] {
    HOST_READ    = 2'd0,
    HOST_WRITE   = 2'd1,
    HOST_ERASE   = 2'd2,
    HOST_REWRITE = 2'd3   // replace a written sector's data in place (PCM)
  } host_op_e;

  // Completion codes returned to the host.
  typedef enum logic [1:0] {
    RESP_OK        = 2'd0,
    RESP_ORDER_ERR = 2'd1,  // write would lower or reuse a layer already programmed
    RESP_ADDR_ERR  = 2'd2   // sector address outside 1..4
  } resp_e;

  // Operations issued to the MLC array.
  typedef enum logic [1:0] {
    ARR_SENSE   = 2'd0,  // sense cells into the page buffer with a reference mask
    ARR_PROGRAM = 2'd1,  // raise cells to the levels held in the page buffer
    ARR_ERASE   = 2'd2,  // return every cell of the wordline to level 0
    ARR_REWRITE = 2'd3   // set cells to the page buffer's levels, up or down (PCM)
  } arr_op_e;

  // Number of references in a mask (one reference comparison each).
  function automatic logic [1:0] ref_count(ref_mask_t m);
    return 2'(m[1]) + 2'(m[2]) + 2'(m[3]);
  endfunction

endpackage

// mmlp_atc: address-to-cells (ATC) mapping of MMLP.
//
// Given a sector address within a wordline (1-based), returns the contiguous
// range of cells that hold the sector and its layer, the highest level the
// sector's write may raise a cell to. The mapping follows the recursive
// construction of MMLP: with 2-level cells a wordline holds one sector; going
// from L/2 to L levels doubles the wordline, places two copies of the L/2
// mapping side by side, adds L/2 sectors that each span the whole wordline,
// and renumbers all sectors by ascending span (then by layer, then by
// position). Closed form used here, with P = LEVELS rounded up to a power of
// two and S = SECTOR_BITS:
//   layer k (1..LEVELS-1), j = floor(log2 k): P/2^(j+1) sectors of S*2^j cells
//   each, side by side, numbered after all sectors of lower layers.
// For LEVELS = 4 this gives ATC(1) = cells [0,S), ATC(2) = [S,2S),
// ATC(3) = ATC(4) = [0,2S). For LEVELS = 8 it gives the twelve sectors of the
// 8-level mapping; a level count that is not a power of two drops the top
// layers (6 levels: 10 sectors).
//
// Purely combinational. The layer numbering, the halves layout and the
// renumbering rule follow the document; returning a contiguous cell range
// (rather than interleaving sectors chunk by chunk) is this design's choice.
module mmlp_atc #(
  parameter int unsigned LEVELS      = 4,
  parameter int unsigned SECTOR_BITS = 32768,
  localparam int unsigned BPC        = $clog2(LEVELS),                  // bits per cell
  localparam int unsigned P          = 1 << BPC,                        // levels rounded to 2^n
  localparam int unsigned WL_CELLS   = SECTOR_BITS * P / 2,
  localparam int unsigned NUM_SECTORS = BPC * P / 2 - (P - LEVELS),
  localparam int unsigned AW         = $clog2(NUM_SECTORS + 1),
  localparam int unsigned CW         = $clog2(WL_CELLS + 1)
) (
  input  logic [AW-1:0]  address,     // sector address, 1..NUM_SECTORS
  output logic           valid,       // address maps to a sector
  output logic [CW-1:0]  cell_start,  // first cell of the sector
  output logic [CW-1:0]  cell_count,  // number of cells the sector spans
  output logic [BPC-1:0] layer        // highest level this sector may use
);

  // floor(log2(k)) for k >= 1
  function automatic int unsigned flog2(int unsigned k);
    int unsigned r;
    r = 0;
    while ((k >> (r + 1)) != 0) r++;
    return r;
  endfunction

  always_comb begin
    int unsigned first;   // first address of the current layer
    int unsigned j;
    int unsigned cnt;
    int unsigned span;
    first      = 1;
    valid      = 1'b0;
    cell_start = '0;
    cell_count = '0;
    layer      = '0;
    for (int unsigned k = 1; k < LEVELS; k++) begin
      j    = flog2(k);
      cnt  = P >> (j + 1);
      span = SECTOR_BITS << j;
      if (int'(address) >= int'(first) && int'(address) < int'(first + cnt)) begin
        valid      = 1'b1;
        layer      = BPC'(k);
        cell_count = CW'(span);
        cell_start = CW'((int'(address) - int'(first)) * span);
      end
      first = first + cnt;
    end
  end

endmodule

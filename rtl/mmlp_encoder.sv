// mmlp_encoder: MMLP encoder for 4-level cells, LANES cell pairs wide.
//
// Inputs are the sector's data bits, the layer being written and the current
// levels P of the cell pairs (as sensed before the write); the output E is the
// new target level of every cell. Cell levels only rise or stay.
//   layer 1 (sectors 1 and 2, levels 0..1): not encoded. Lanes 0..LANES/2-1
//     take two data bits each, one per cell: cell_a = data[2i],
//     cell_b = data[2i+1]. The upper half of the lanes is unused.
//   layer 2 (sector 3, levels 0..2): one data bit per pair. Bit 0 keeps the
//     pair; bit 1 maps 00->12, 01->02, 10->20, 11->21 (levels cell_a cell_b).
//   layer 3 (sector 4, levels 0..3): one data bit per pair. Bit 0 keeps the
//     pair; bit 1 maps 00->22, 01->23, 10->32, 11->33, 12->13, 02->03,
//     20->30, 21->31.
// These tables are the sector-3 and sector-4 encoding tables of MMLP. They
// agree with the document's worked example (0111 + data 01 -> 0121, then
// data 10 -> 2321), with the level transitions it lists per page and with its
// per-drift bit-error table. lane_used marks the lanes whose output is valid;
// illegal is set when a used lane's P is not a state the previous layers can
// leave (writing out of ascending order).
// Rewrite (rewrite = 1, for PCM, whose cells can also be lowered): P holds the
// exact levels of already-written pairs. Each pair is decoded to its four bits
// {a, b, s3, s4}, the bits of the sector being rewritten are replaced by the
// new data (a and b for layer 1, using lanes 0..LANES/2-1 as above), and the
// pair is re-encoded from scratch: base bits, then the sector-3 and sector-4
// steps. Rewriting page 4 therefore moves cells only 3<->2, 3<->1, 2<->0;
// rewriting page 3 never needs 0<->3; rewriting page 1 or 2 changes only
// pairs of that sector's half of the wordline. The rewrite flow is the
// document's; doing it as decode-replace-re-encode is this design's choice.
// Combinational.
module mmlp_encoder
  import mmlp_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic [1:0]             layer,
  input  logic [LANES-1:0]       data,
  input  logic                   rewrite,
  input  cell_pair_t [LANES-1:0] p,
  output cell_pair_t [LANES-1:0] e,
  output logic [LANES-1:0]       lane_used,
  output logic                   illegal
);

  // Sector-3 encoding of a pair holding only base-layer data.
  function automatic cell_pair_t enc_layer2(cell_pair_t cur, logic bit_in);
    cell_pair_t n;
    n = cur;
    if (bit_in) begin
      unique case ({cur.cell_a, cur.cell_b})
        {2'd0, 2'd0}: n = '{cell_a: 2'd1, cell_b: 2'd2};
        {2'd0, 2'd1}: n = '{cell_a: 2'd0, cell_b: 2'd2};
        {2'd1, 2'd0}: n = '{cell_a: 2'd2, cell_b: 2'd0};
        {2'd1, 2'd1}: n = '{cell_a: 2'd2, cell_b: 2'd1};
        default:      n = cur;
      endcase
    end
    return n;
  endfunction

  // Sector-4 encoding of a pair holding data of layers 1 and 2.
  function automatic cell_pair_t enc_layer3(cell_pair_t cur, logic bit_in);
    cell_pair_t n;
    n = cur;
    if (bit_in) begin
      unique case ({cur.cell_a, cur.cell_b})
        {2'd0, 2'd0}: n = '{cell_a: 2'd2, cell_b: 2'd2};
        {2'd0, 2'd1}: n = '{cell_a: 2'd2, cell_b: 2'd3};
        {2'd1, 2'd0}: n = '{cell_a: 2'd3, cell_b: 2'd2};
        {2'd1, 2'd1}: n = '{cell_a: 2'd3, cell_b: 2'd3};
        {2'd1, 2'd2}: n = '{cell_a: 2'd1, cell_b: 2'd3};
        {2'd0, 2'd2}: n = '{cell_a: 2'd0, cell_b: 2'd3};
        {2'd2, 2'd0}: n = '{cell_a: 2'd3, cell_b: 2'd0};
        {2'd2, 2'd1}: n = '{cell_a: 2'd3, cell_b: 2'd1};
        default:      n = cur;
      endcase
    end
    return n;
  endfunction

  // States a pair can be in before a layer-2 / layer-3 write.
  function automatic logic legal_before2(cell_pair_t cur);
    return cur.cell_a <= 2'd1 && cur.cell_b <= 2'd1;
  endfunction

  function automatic logic legal_before3(cell_pair_t cur);
    return cur.cell_a != 2'd3 && cur.cell_b != 2'd3 &&
           !(cur.cell_a == 2'd2 && cur.cell_b == 2'd2);
  endfunction

  // Pair state holding the bits {s4, s3, b, a}.
  function automatic cell_pair_t compose(logic [3:0] bits);
    cell_pair_t base;
    base = '{cell_b: {1'b0, bits[1]}, cell_a: {1'b0, bits[0]}};
    return enc_layer3(enc_layer2(base, bits[2]), bits[3]);
  endfunction

  // Bits {s4, s3, b, a} of a pair state: the inverse of compose.
  function automatic logic [3:0] bits_of(cell_pair_t cur);
    logic [3:0] r;
    r = '0;
    for (int k = 0; k < 16; k++)
      if (compose(4'(k)) == cur) r = 4'(k);
    return r;
  endfunction

  always_comb begin
    e         = p;
    lane_used = '0;
    illegal   = 1'b0;
    for (int i = 0; i < LANES; i++) begin
      logic [3:0] cur_bits;
      cur_bits = bits_of(p[i]);
      if (rewrite) begin
        unique case (layer)
          2'd1: if (i < LANES / 2) begin
            e[i]         = compose({cur_bits[3:2], data[2*i+1], data[2*i]});
            lane_used[i] = 1'b1;
          end
          2'd2: begin
            e[i]         = compose({cur_bits[3], data[i], cur_bits[1:0]});
            lane_used[i] = 1'b1;
          end
          2'd3: begin
            e[i]         = compose({data[i], cur_bits[2:0]});
            lane_used[i] = 1'b1;
          end
          default: ;
        endcase
      end else begin
        unique case (layer)
          2'd1: begin
            if (i < LANES / 2) begin
              e[i]         = '{cell_a: {1'b0, data[2*i]}, cell_b: {1'b0, data[2*i+1]}};
              lane_used[i] = 1'b1;
            end
          end
          2'd2: begin
            e[i]         = enc_layer2(p[i], data[i]);
            lane_used[i] = 1'b1;
            if (!legal_before2(p[i])) illegal = 1'b1;
          end
          2'd3: begin
            e[i]         = enc_layer3(p[i], data[i]);
            lane_used[i] = 1'b1;
            if (!legal_before3(p[i])) illegal = 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

endmodule

// mmlp_decoder: MMLP decoder for 4-level cells, LANES cell pairs wide.
//
// Every one of the 16 level combinations of a cell pair stands for exactly
// one value of the four bits the pair holds: the base-layer bit of each of its
// two cells (a, b), the sector-3 bit (s3) and the sector-4 bit (s4):
//   pair  a b s3 s4    pair  a b s3 s4    pair  a b s3 s4    pair  a b s3 s4
//   00    0 0 0  0     12    0 0 1  0     22    0 0 0  1     13    0 0 1  1
//   01    0 1 0  0     02    0 1 1  0     23    0 1 0  1     03    0 1 1  1
//   10    1 0 0  0     20    1 0 1  0     32    1 0 0  1     30    1 0 1  1
//   11    1 1 0  0     21    1 1 1  0     33    1 1 0  1     31    1 1 1  1
// (the inverse of the encoder tables). The decoder looks the pair up and
// returns the bits of the requested layer:
//   layer 1: lane i gives data[2i] = a, data[2i+1] = b (lanes 0..LANES/2-1);
//   layer 2: lane i gives data[i] = s3;   layer 3: lane i gives data[i] = s4.
// The input is the quantized level from a sense with fewer references than a
// full read: a cell below every sensed reference reads 0. The table is laid
// out so that this still decodes correctly for the reduced reference sets of
// the read planner (sector 3 from reference 2 alone; sectors 3 and 4 from
// references 2 and 3), because with levels 0 and 1 merged, s3 = [a>=2]^[b>=2]
// and s4 = [a=3]|[b=3]|([a>=2]&[b>=2]). On a wordline that holds no sector 4
// (max_level = 2) sector 3 is read from reference 2 alone as s3 = [a>=2] |
// [b>=2]: the same on every stored state, and a cell pair that drifted from 12
// or 21 to 22 then keeps its sector-3 bit (an error count of 57 bit errors in
// 52 single-level drifts over all three-sector states). Combinational.
module mmlp_decoder
  import mmlp_pkg::*;
#(
  parameter int unsigned LANES = 8
) (
  input  logic [1:0]             layer,
  input  logic [1:0]             max_level,  // MaxLevel of the wordline read
  input  cell_pair_t [LANES-1:0] q,
  output logic [LANES-1:0]       data
);

  // Returns {s4, s3, b, a} for one pair.
  function automatic logic [3:0] decode_pair(cell_pair_t c);
    logic [3:0] r;
    unique case ({c.cell_a, c.cell_b})
      {2'd0, 2'd0}: r = 4'b0000;
      {2'd0, 2'd1}: r = 4'b0010;
      {2'd1, 2'd0}: r = 4'b0001;
      {2'd1, 2'd1}: r = 4'b0011;
      {2'd1, 2'd2}: r = 4'b0100;
      {2'd0, 2'd2}: r = 4'b0110;
      {2'd2, 2'd0}: r = 4'b0101;
      {2'd2, 2'd1}: r = 4'b0111;
      {2'd2, 2'd2}: r = 4'b1000;
      {2'd2, 2'd3}: r = 4'b1010;
      {2'd3, 2'd2}: r = 4'b1001;
      {2'd3, 2'd3}: r = 4'b1011;
      {2'd1, 2'd3}: r = 4'b1100;
      {2'd0, 2'd3}: r = 4'b1110;
      {2'd3, 2'd0}: r = 4'b1101;
      {2'd3, 2'd1}: r = 4'b1111;
      default:      r = 4'b0000;
    endcase
    return r;
  endfunction

  logic [3:0] bits [LANES];

  always_comb begin
    for (int i = 0; i < LANES; i++) bits[i] = decode_pair(q[i]);
    data = '0;
    unique case (layer)
      2'd1: for (int i = 0; i < LANES / 2; i++) begin
              data[2*i]   = bits[i][0];
              data[2*i+1] = bits[i][1];
            end
      2'd2: for (int i = 0; i < LANES; i++)
              data[i] = (max_level == 2'd2) ? (q[i].cell_a >= 2'd2 || q[i].cell_b >= 2'd2)
                                            : bits[i][2];
      2'd3: for (int i = 0; i < LANES; i++) data[i] = bits[i][3];
      default: ;
    endcase
  end

endmodule

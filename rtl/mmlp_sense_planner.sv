// mmlp_sense_planner: chooses the reference comparisons for an MMLP access
// and checks the write order, from the sector's layer and the wordline's
// MaxLevel (the highest layer written to the wordline so far, 0 = empty).
//
// Read (reduced-sensing scheme of MMLP, 4-level cells):
//   layer > MaxLevel      sector never written: no sensing, data reads 0
//   layer 1, MaxLevel 1   reference 1            (1 comparison)
//   layer 1, MaxLevel 2   references 1, 2        (2)
//   layer 1, MaxLevel 3   references 1, 2, 3     (3)
//   layer 2, MaxLevel 2   reference 2            (1)
//   layer 2 or 3, MaxLevel 3   references 2, 3   (2)
// Before a write of layer 2 or 3 the current levels P must be known exactly,
// so every reference up to MaxLevel is sensed (1 comparison before sector 3
// on a wordline holding sectors 1/2, 2 before sector 4). prewrite_refs gives
// that set for any layer; a layer-1 write ignores it (it needs no sensing),
// a rewrite of a written sector uses it whatever the layer.
// Write order: a sector may be written only if its layer is above MaxLevel,
// or if it is a layer-1 sector and only layer 1 has been used (sectors 1 and 2
// occupy disjoint cells). Combinational.
module mmlp_sense_planner
  import mmlp_pkg::*;
(
  input  logic [1:0] layer,
  input  logic [1:0] max_level,
  output logic       written,         // sector holds data (read path)
  output ref_mask_t  read_refs,
  output ref_mask_t  prewrite_refs,
  output logic       write_allowed
);

  always_comb begin
    written   = (layer != 2'd0) && (layer <= max_level);
    read_refs = '0;
    if (written) begin
      unique case (max_level)
        2'd1:    read_refs = 3'b001;
        2'd2:    read_refs = (layer == 2'd1) ? 3'b011 : 3'b010;
        2'd3:    read_refs = (layer == 2'd1) ? 3'b111 : 3'b110;
        default: read_refs = '0;
      endcase
    end
    // All references up to MaxLevel: {ref3, ref2, ref1}.
    prewrite_refs = '0;
    if (layer != 2'd0) begin
      unique case (max_level)
        2'd1:    prewrite_refs = 3'b001;
        2'd2:    prewrite_refs = 3'b011;
        2'd3:    prewrite_refs = 3'b111;
        default: prewrite_refs = '0;
      endcase
    end
    write_allowed = (layer != 2'd0) &&
                    ((layer > max_level) || (layer == 2'd1 && max_level <= 2'd1));
  end

endmodule

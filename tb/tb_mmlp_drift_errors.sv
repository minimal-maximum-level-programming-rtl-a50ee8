// tb_mmlp_drift_errors: reliability workload for the MMLP 4-level pair code.
// It counts how many page bits a single-level drift of one or both cells of
// a pair corrupts.
//
// Every combination of page bits is written into one cell pair through the
// encoder: layer-1 bits straight into the cells, then the sector-3 bit and,
// for a full wordline, the sector-4 bit. The pair is then moved to every
// neighbouring state in which each cell has gained or lost at most one level
// and at least one cell has changed. Each neighbour is sensed with the
// references the sense planner chooses for the wordline's MaxLevel and
// decoded for every written sector. The bits that differ from the written
// data are summed.
//
//   full wordline (4 sectors):  84 drift cases, 120 cell drifts, 142 bit errors
//   sectors 1-3 only:           37 drift cases,  52 cell drifts,  57 bit errors
//
// That is 1.18 and 1.09 bit errors per drifted cell. These totals are the
// published figures for this code, and the testbench checks them exactly.
// The 3-sector total depends on the decoder's OR read of sector 3 (reference
// 2 alone): a pair that drifts from 12 to 22 keeps its data.
// Every undrifted state must also decode to exactly the data written.
// Purely combinational DUTs, stepped with #1. A free-running clock feeds the
// watchdog.
module tb_mmlp_drift_errors;
  import mmlp_pkg::*;

  localparam int LANES = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  // encoder
  logic [1:0]             enc_layer;
  logic [LANES-1:0]       enc_data;
  cell_pair_t [LANES-1:0] enc_p, enc_e;
  logic [LANES-1:0]       enc_used;
  logic                   enc_illegal;
  // sense planner
  logic [1:0]             pl_layer, pl_max;
  logic                   pl_written, pl_allowed;
  ref_mask_t              pl_read_refs, pl_pre_refs;
  // decoder
  logic [1:0]             dec_layer, dec_max;
  cell_pair_t [LANES-1:0] dec_q;
  logic [LANES-1:0]       dec_data;

  mmlp_encoder #(.LANES(LANES)) u_enc (
    .layer(enc_layer), .data(enc_data), .p(enc_p), .e(enc_e),
    .lane_used(enc_used), .illegal(enc_illegal));
  mmlp_sense_planner u_plan (
    .layer(pl_layer), .max_level(pl_max), .written(pl_written),
    .read_refs(pl_read_refs), .prewrite_refs(pl_pre_refs),
    .write_allowed(pl_allowed));
  mmlp_decoder #(.LANES(LANES)) u_dec (
    .layer(dec_layer), .max_level(dec_max), .q(dec_q), .data(dec_data));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sensing with a reference set: the level is the highest reference passed.
  function automatic level_t quant(level_t l, ref_mask_t refs);
    if (refs[3] && l >= 2'd3) return 2'd3;
    if (refs[2] && l >= 2'd2) return 2'd2;
    if (refs[1] && l >= 2'd1) return 2'd1;
    return 2'd0;
  endfunction

  // Write page bits {s4, s3, b, a} into lane 0 as a wordline with max_lvl
  // sectors' worth of layers, and return the stored pair.
  task automatic write_pair(logic [3:0] bits, int max_lvl, output cell_pair_t st);
    st = '{cell_b: 2'(bits[1]), cell_a: 2'(bits[0])};  // layer 1
    for (int lay = 2; lay <= max_lvl; lay++) begin
      enc_layer = 2'(lay);
      enc_data  = '0;
      enc_data[0] = bits[lay];
      enc_p     = '0;
      enc_p[0]  = st;
      #1;
      check(!enc_illegal && enc_used[0], $sformatf("encode layer %0d of %b", lay, bits));
      st = enc_e[0];
    end
  endtask

  // Read every written sector of a pair in state st; returns {s4, s3, b, a}.
  task automatic read_pair(cell_pair_t st, int max_lvl, output logic [3:0] bits);
    bits = '0;
    for (int lay = 1; lay <= max_lvl; lay++) begin
      pl_layer = 2'(lay);
      pl_max   = 2'(max_lvl);
      #1;
      check(pl_written, $sformatf("planner: layer %0d written at MaxLevel %0d", lay, max_lvl));
      dec_layer = 2'(lay);
      dec_max   = 2'(max_lvl);
      dec_q     = '0;
      dec_q[0]  = '{cell_a: quant(st.cell_a, pl_read_refs),
                    cell_b: quant(st.cell_b, pl_read_refs)};
      #1;
      if (lay == 1) begin
        bits[0] = dec_data[0];
        bits[1] = dec_data[1];
      end else begin
        bits[lay] = dec_data[0];
      end
    end
  endtask

  // All drift cases of a wordline that holds max_lvl layers.
  task automatic run(int max_lvl, int exp_cases, int exp_drifts, int exp_errors);
    int cases = 0, drifts = 0, errors = 0;
    int n_bits = max_lvl + 1;  // pages 1..max_lvl+1 (layer 1 holds two)
    for (int w = 0; w < (1 << n_bits); w++) begin
      logic [3:0] wbits, rbits;
      cell_pair_t st, dr;
      wbits = 4'(w);
      write_pair(wbits, max_lvl, st);
      read_pair(st, max_lvl, rbits);
      check(rbits == wbits, $sformatf("MaxLevel %0d: %b read back as %b", max_lvl, wbits, rbits));
      for (int da = -1; da <= 1; da++) begin
        for (int db = -1; db <= 1; db++) begin
          int na, nb;
          if (da == 0 && db == 0) continue;
          na = int'(st.cell_a) + da;
          nb = int'(st.cell_b) + db;
          if (na < 0 || nb < 0 || na > max_lvl || nb > max_lvl) continue;
          dr = '{cell_b: 2'(nb), cell_a: 2'(na)};
          read_pair(dr, max_lvl, rbits);
          cases++;
          drifts += int'(da != 0) + int'(db != 0);
          errors += $countones(rbits ^ wbits);
        end
      end
    end
    $display("MaxLevel %0d: %0d drift cases, %0d cell drifts, %0d bit errors, %0d.%02d per drift",
             max_lvl, cases, drifts, errors, errors / drifts, (errors * 100 / drifts) % 100);
    check(cases == exp_cases, $sformatf("MaxLevel %0d: %0d drift cases", max_lvl, cases));
    check(drifts == exp_drifts, $sformatf("MaxLevel %0d: %0d cell drifts", max_lvl, drifts));
    check(errors == exp_errors, $sformatf("MaxLevel %0d: %0d bit errors", max_lvl, errors));
  endtask

  initial begin
    enc_layer = '0; enc_data = '0; enc_p = '0;
    pl_layer = '0; pl_max = '0;
    dec_layer = '0; dec_max = '0; dec_q = '0;
    @(posedge clk);
    run(3, 84, 120, 142);  // all four sectors of the wordline written
    run(2, 37, 52, 57);    // sectors 1, 2 and 3 written
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

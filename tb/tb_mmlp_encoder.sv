// tb_mmlp_encoder: self-checking test of the MMLP 4-level encoder.
//
// Reference: a 16-entry list of which four bits (a, b, s3, s4) each pair state
// stands for, written out here independently of the encoder's case tables.
// For every legal previous state and every data bit, the encoder output must
// be the state that keeps the earlier bits and adds the new one, and no cell
// may drop. Also replays the four-write example of a 4-cell wordline
// (0100 -> 0111 -> 0121 -> 2321) and checks the illegal-state flag.
// Rewrite mode: for every pair state, layer and data value, the output must
// be the state that keeps the other sectors' bits and carries the new ones;
// rewriting page 4 may move a cell only 3<->2, 3<->1 or 2<->0, and rewriting
// page 3 never needs a 0<->3 move.
module tb_mmlp_encoder;
  import mmlp_pkg::*;

  localparam int LANES = 8;

  logic [1:0]             layer;
  logic [LANES-1:0]       data;
  logic                   rewrite;
  cell_pair_t [LANES-1:0] p;
  cell_pair_t [LANES-1:0] e;
  logic [LANES-1:0]       lane_used;
  logic                   illegal;

  int checks = 0, failures = 0;

  mmlp_encoder #(.LANES(LANES)) dut (.*);

  // {a, b, s3, s4} for pair state (cell_a, cell_b), indexed by 4*cell_a+cell_b.
  logic [3:0] meaning [16];
  initial begin
    // a b s3 s4
    meaning[4*0+0] = 4'b0000; meaning[4*0+1] = 4'b0100;
    meaning[4*1+0] = 4'b1000; meaning[4*1+1] = 4'b1100;
    meaning[4*1+2] = 4'b0010; meaning[4*0+2] = 4'b0110;
    meaning[4*2+0] = 4'b1010; meaning[4*2+1] = 4'b1110;
    meaning[4*2+2] = 4'b0001; meaning[4*2+3] = 4'b0101;
    meaning[4*3+2] = 4'b1001; meaning[4*3+3] = 4'b1101;
    meaning[4*1+3] = 4'b0011; meaning[4*0+3] = 4'b0111;
    meaning[4*3+0] = 4'b1011; meaning[4*3+1] = 4'b1111;
  end

  function automatic int find_state(logic [3:0] m);
    for (int s = 0; s < 16; s++) if (meaning[s] == m) return s;
    return -1;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit move_ok(int lay, level_t f, level_t t);
    if (f == t) return 1'b1;
    if (lay == 3) return {f, t} inside {4'b1110, 4'b1011, 4'b1101, 4'b0111, 4'b1000, 4'b0010};
    if (lay == 2) return !({f, t} inside {4'b0011, 4'b1100});
    return 1'b1;
  endfunction

  initial begin
    rewrite = 1'b0;
    #1;
    // Layer 1: bits placed as levels 0/1, two per lane, upper lanes untouched.
    for (int t = 0; t < 20; t++) begin
      layer = 2'd1;
      data  = LANES'($urandom);
      for (int i = 0; i < LANES; i++) p[i] = cell_pair_t'($urandom);
      #1;
      for (int i = 0; i < LANES / 2; i++)
        check(e[i].cell_a == {1'b0, data[2*i]} && e[i].cell_b == {1'b0, data[2*i+1]} &&
              lane_used[i], $sformatf("layer1 lane %0d", i));
      for (int i = LANES / 2; i < LANES; i++)
        check(!lane_used[i] && e[i] == p[i], $sformatf("layer1 unused lane %0d", i));
    end

    // Layers 2 and 3: every legal previous state, both data values, every lane.
    for (int lay = 2; lay <= 3; lay++) begin
      for (int s = 0; s < 16; s++) begin
        // legal before layer 2: s3 = s4 = 0; before layer 3: s4 = 0
        if (meaning[s][0] != 1'b0) continue;
        if (lay == 2 && meaning[s][1] != 1'b0) continue;
        for (int v = 0; v < 2; v++) begin
          logic [3:0] want_m;
          int         want;
          layer = 2'(lay);
          for (int i = 0; i < LANES; i++) begin
            p[i]    = '{cell_a: 2'(s / 4), cell_b: 2'(s % 4)};
            data[i] = v[0] ^ i[0];
          end
          #1;
          check(!illegal, $sformatf("layer%0d state %0d flagged illegal", lay, s));
          for (int i = 0; i < LANES; i++) begin
            want_m = meaning[s];
            if (lay == 2) want_m[1] = data[i]; else want_m[0] = data[i];
            want = find_state(want_m);
            check(lane_used[i] && int'({e[i].cell_a, e[i].cell_b}) == 4 * (want / 4) + (want % 4) &&
                  e[i].cell_a >= p[i].cell_a && e[i].cell_b >= p[i].cell_b,
                  $sformatf("layer%0d state %0d bit %0d -> %0d%0d", lay, s, data[i], e[i].cell_a, e[i].cell_b));
          end
        end
      end
    end

    // Illegal previous states are flagged.
    layer = 2'd2; data = '0;
    for (int i = 0; i < LANES; i++) p[i] = '{cell_a: 2'd0, cell_b: 2'd0};
    p[3] = '{cell_a: 2'd2, cell_b: 2'd0};
    #1 check(illegal, "layer2 over a level-2 cell flagged");
    layer = 2'd3;
    p[3] = '{cell_a: 2'd2, cell_b: 2'd2};
    #1 check(illegal, "layer3 over 22 flagged");
    p[3] = '{cell_a: 2'd1, cell_b: 2'd2};
    #1 check(!illegal, "layer3 over 12 legal");

    // Worked example on one 4-cell wordline (pairs c1c2 and c3c4).
    layer = 2'd1; data = 8'b0000_1110; // D1 = 01 (c1=0,c2=1), D2 = 11 (c3=1,c4=1)
    for (int i = 0; i < LANES; i++) p[i] = '0;
    #1 check(e[0] == '{cell_a: 2'd0, cell_b: 2'd1} && e[1] == '{cell_a: 2'd1, cell_b: 2'd1},
             "example: D1=01, D2=11 -> 0111");
    p[0] = e[0]; p[1] = e[1];
    layer = 2'd2; data = 8'b0000_0010;  // D3 = 01: pair c1c2 gets 0, pair c3c4 gets 1
    #1 check(e[0] == '{cell_a: 2'd0, cell_b: 2'd1} && e[1] == '{cell_a: 2'd2, cell_b: 2'd1},
             "example: D3=01 -> 0121");
    p[0] = e[0]; p[1] = e[1];
    layer = 2'd3; data = 8'b0000_0001;  // D4 = 10
    #1 check(e[0] == '{cell_a: 2'd2, cell_b: 2'd3} && e[1] == '{cell_a: 2'd2, cell_b: 2'd1},
             "example: D4=10 -> 2321");

    // Rewrite mode: every state, every layer, both values in alternate lanes.
    rewrite = 1'b1;
    for (int lay = 1; lay <= 3; lay++) begin
      for (int s = 0; s < 16; s++) begin
        for (int v = 0; v < 4; v++) begin
          layer = 2'(lay);
          data  = LANES'($urandom);
          for (int i = 0; i < LANES; i++) p[i] = '{cell_a: 2'(s / 4), cell_b: 2'(s % 4)};
          #1;
          check(!illegal, "rewrite never flagged illegal");
          for (int i = 0; i < LANES; i++) begin
            logic [3:0] want_m;
            int         want;
            want_m = meaning[s];
            if (lay == 1) begin
              if (i >= LANES / 2) begin
                check(!lane_used[i], $sformatf("rewrite layer1 lane %0d unused", i));
                continue;
              end
              want_m[3] = data[2*i]; want_m[2] = data[2*i+1];
            end else if (lay == 2) want_m[1] = data[i];
            else want_m[0] = data[i];
            want = find_state(want_m);
            check(lane_used[i] && int'({e[i].cell_a, e[i].cell_b}) == want,
                  $sformatf("rewrite layer%0d state %0d lane %0d -> %0d%0d", lay, s, i, e[i].cell_a, e[i].cell_b));
            check(move_ok(lay, p[i].cell_a, e[i].cell_a) && move_ok(lay, p[i].cell_b, e[i].cell_b),
                  $sformatf("rewrite layer%0d state %0d: allowed level moves", lay, s));
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

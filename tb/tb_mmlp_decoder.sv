// tb_mmlp_decoder: self-checking test of the MMLP 4-level decoder.
//
// Reference: the same four-bit meaning of each of the 16 pair states, listed
// independently of the decoder. Checks full-resolution decoding of every
// layer, and decoding from the reduced reference sets a read uses:
// reference 2 alone for sector 3 on a 3-sector wordline, references 2 and 3
// for sectors 3 and 4 on a full wordline, reference 1 for sectors 1/2 on a
// 2-sector wordline, references 1 and 2 for sectors 1/2 on a 3-sector one.
module tb_mmlp_decoder;
  import mmlp_pkg::*;

  localparam int LANES = 8;

  logic [1:0]             layer;
  logic [1:0]             max_level;
  cell_pair_t [LANES-1:0] q;
  logic [LANES-1:0]       data;

  int checks = 0, failures = 0;

  mmlp_decoder #(.LANES(LANES)) dut (.*);

  logic [3:0] meaning [16];  // {a, b, s3, s4}
  initial begin
    meaning[4*0+0] = 4'b0000; meaning[4*0+1] = 4'b0100;
    meaning[4*1+0] = 4'b1000; meaning[4*1+1] = 4'b1100;
    meaning[4*1+2] = 4'b0010; meaning[4*0+2] = 4'b0110;
    meaning[4*2+0] = 4'b1010; meaning[4*2+1] = 4'b1110;
    meaning[4*2+2] = 4'b0001; meaning[4*2+3] = 4'b0101;
    meaning[4*3+2] = 4'b1001; meaning[4*3+3] = 4'b1101;
    meaning[4*1+3] = 4'b0011; meaning[4*0+3] = 4'b0111;
    meaning[4*3+0] = 4'b1011; meaning[4*3+1] = 4'b1111;
  end

  function automatic level_t quant(level_t l, logic [3:1] refs);
    if (refs[3] && l >= 3) return 2'd3;
    if (refs[2] && l >= 2) return 2'd2;
    if (refs[1] && l >= 1) return 2'd1;
    return 2'd0;
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

  // Decode state s in every lane (lane i gets state (s+i)%16 restricted to
  // the allowed set) with the given sensed references and compare.
  task automatic run(int lay, logic [3:1] refs, int max_layer);
    int st [LANES];
    int n;
    int allowed [$];
    for (int s = 0; s < 16; s++) begin
      // a state is present only if it uses no layer above max_layer
      if (max_layer < 3 && meaning[s][0]) continue;
      if (max_layer < 2 && meaning[s][1]) continue;
      allowed.push_back(s);
    end
    n = allowed.size();
    for (int r = 0; r < n; r++) begin
      layer = 2'(lay);
      max_level = 2'(max_layer);
      for (int i = 0; i < LANES; i++) begin
        st[i] = allowed[(r + i) % n];
        q[i]  = '{cell_a: quant(2'(st[i] / 4), refs), cell_b: quant(2'(st[i] % 4), refs)};
      end
      #1;
      for (int i = 0; i < LANES; i++) begin
        if (lay == 1) begin
          if (i < LANES / 2)
            check(data[2*i] == meaning[st[i]][3] && data[2*i+1] == meaning[st[i]][2],
                  $sformatf("layer1 refs %b state %0d", refs, st[i]));
        end else if (lay == 2) begin
          check(data[i] == meaning[st[i]][1], $sformatf("layer2 refs %b state %0d", refs, st[i]));
        end else begin
          check(data[i] == meaning[st[i]][0], $sformatf("layer3 refs %b state %0d", refs, st[i]));
        end
      end
    end
  endtask

  initial begin
    #1;
    // full resolution, full wordline
    run(1, 3'b111, 3); run(2, 3'b111, 3); run(3, 3'b111, 3);
    // reduced sensing
    run(1, 3'b001, 1);  // wordline with sectors 1, 2
    run(1, 3'b011, 2);  // wordline with sectors 1..3
    run(2, 3'b010, 2);  // sector 3, one reference between levels 1 and 2
    run(2, 3'b110, 3);  // sector 3 on a full wordline
    run(3, 3'b110, 3);  // sector 4 on a full wordline
    // the example wordline 2321 decodes to D4 = 10 and D3 = 01, D1 = 01, D2 = 11
    layer = 2'd3; max_level = 2'd3; q = '0;
    q[0] = '{cell_a: 2'd2, cell_b: 2'd3}; q[1] = '{cell_a: 2'd2, cell_b: 2'd1};
    #1 check(data[1:0] == 2'b01, "example: 2321 -> D4 = 10");
    layer = 2'd2;
    #1 check(data[1:0] == 2'b10, "example: 2321 -> D3 = 01");
    layer = 2'd1;
    #1 check(data[3:0] == 4'b1110, "example: 2321 -> D1 = 01, D2 = 11");
    // three-sector wordline: a pair that drifted to 22 reads sector 3 as 1
    layer = 2'd2; max_level = 2'd2; q = '0;
    q[0] = '{cell_a: 2'd2, cell_b: 2'd2};
    #1 check(data[0] == 1'b1, "MaxLevel 2: 22 reads sector 3 = 1");
    max_level = 2'd3;
    #1 check(data[0] == 1'b0, "MaxLevel 3: 22 reads sector 3 = 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

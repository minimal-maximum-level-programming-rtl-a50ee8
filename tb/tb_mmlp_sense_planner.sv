// tb_mmlp_sense_planner: exhaustive self-checking test of the reference
// planner over all layers and MaxLevel values. Expected reference sets,
// comparison counts and write permissions are tabulated by hand; the test
// also checks the average comparisons per sector of a full wordline
// ((3+3+2+2)/4 = 2.5) and of a two-sector wordline (1).
module tb_mmlp_sense_planner;
  import mmlp_pkg::*;

  logic [1:0] layer, max_level;
  logic       written, write_allowed;
  ref_mask_t  read_refs, prewrite_refs;

  mmlp_sense_planner dut (.*);

  int checks = 0, failures = 0;

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

  // [layer][max_level] -> read refs {r3 r2 r1}, write allowed, prewrite refs
  logic [2:0] exp_read [4][4];
  logic       exp_wok  [4][4];
  logic [2:0] exp_pre  [4][4];

  initial begin
    for (int l = 0; l < 4; l++) for (int m = 0; m < 4; m++) begin
      exp_read[l][m] = 3'b000; exp_wok[l][m] = 1'b0; exp_pre[l][m] = 3'b000;
    end
    exp_read[1][1] = 3'b001; exp_read[1][2] = 3'b011; exp_read[1][3] = 3'b111;
    exp_read[2][2] = 3'b010; exp_read[2][3] = 3'b110;
    exp_read[3][3] = 3'b110;
    exp_wok[1][0] = 1; exp_wok[1][1] = 1;
    exp_wok[2][0] = 1; exp_wok[2][1] = 1;
    exp_wok[3][0] = 1; exp_wok[3][1] = 1; exp_wok[3][2] = 1;
    exp_pre[1][1] = 3'b001; exp_pre[1][2] = 3'b011; exp_pre[1][3] = 3'b111;
    exp_pre[2][1] = 3'b001; exp_pre[2][2] = 3'b011; exp_pre[2][3] = 3'b111;
    exp_pre[3][1] = 3'b001; exp_pre[3][2] = 3'b011; exp_pre[3][3] = 3'b111;
    #1;
    for (int l = 0; l < 4; l++) for (int m = 0; m < 4; m++) begin
      layer = 2'(l); max_level = 2'(m);
      #1;
      check(read_refs == exp_read[l][m], $sformatf("read refs layer %0d max %0d: %b", l, m, read_refs));
      check(written == (l != 0 && l <= m), $sformatf("written layer %0d max %0d", l, m));
      check(write_allowed == exp_wok[l][m], $sformatf("write allowed layer %0d max %0d", l, m));
      check(prewrite_refs == exp_pre[l][m], $sformatf("prewrite refs layer %0d max %0d: %b", l, m, prewrite_refs));
    end
    begin
      int tot;
      int lay4 [4] = '{1, 1, 2, 3};
      tot = 0;
      max_level = 2'd3;
      foreach (lay4[i]) begin layer = 2'(lay4[i]); #1 tot += int'(ref_count(read_refs)); end
      check(tot == 10, $sformatf("full wordline: %0d comparisons for 4 sectors (2.5 each)", tot));
      tot = 0;
      max_level = 2'd1;
      for (int i = 0; i < 2; i++) begin layer = 2'd1; #1 tot += int'(ref_count(read_refs)); end
      check(tot == 2, "two-sector wordline: 1 comparison each");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

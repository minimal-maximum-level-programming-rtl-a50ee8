// tb_mmlp_atc: self-checking test of the address-to-cells mapping.
//
// Three instances: 4-level cells (the main configuration), 8-level cells and
// 6-level cells, all with a 4-bit sector so the cell numbers stay readable.
// Expected ranges and layers are written out by hand from the recursive
// construction: 4 levels -> ATC(1) = [0,4), ATC(2) = [4,8), ATC(3), ATC(4) =
// [0,8) with layers 1,1,2,3; 8 levels -> ATC(1..4) quarter wordlines (layer 1),
// ATC(5), ATC(6) halves (layer 2), ATC(7), ATC(8) halves (layer 3),
// ATC(9..12) whole wordline (layers 4..7); 6 levels -> as 8 but ATC(11),
// ATC(12) do not exist. Also checks the default 4 KB sector size instance.
module tb_mmlp_atc;
  localparam int S = 4;

  logic [2:0] a4;  logic v4;  logic [3:0] st4, cn4;  logic [1:0] l4;
  logic [3:0] a8;  logic v8;  logic [4:0] st8, cn8;  logic [2:0] l8;
  logic [3:0] a6;  logic v6;  logic [4:0] st6, cn6;  logic [2:0] l6;
  logic [2:0] ad;  logic vd;  logic [16:0] std_, cnd; logic [1:0] ld;

  mmlp_atc #(.LEVELS(4), .SECTOR_BITS(S)) u4 (.address(a4), .valid(v4), .cell_start(st4), .cell_count(cn4), .layer(l4));
  mmlp_atc #(.LEVELS(8), .SECTOR_BITS(S)) u8 (.address(a8), .valid(v8), .cell_start(st8), .cell_count(cn8), .layer(l8));
  mmlp_atc #(.LEVELS(6), .SECTOR_BITS(S)) u6 (.address(a6), .valid(v6), .cell_start(st6), .cell_count(cn6), .layer(l6));
  mmlp_atc ud (.address(ad), .valid(vd), .cell_start(std_), .cell_count(cnd), .layer(ld));

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

  // expected {start, count, layer} per address, 0-terminated lists
  int e4 [5][3] = '{'{0,0,0}, '{0,4,1}, '{4,4,1}, '{0,8,2}, '{0,8,3}};
  int e8 [13][3] = '{'{0,0,0},
                     '{0,4,1}, '{4,4,1}, '{8,4,1}, '{12,4,1},
                     '{0,8,2}, '{8,8,2}, '{0,8,3}, '{8,8,3},
                     '{0,16,4}, '{0,16,5}, '{0,16,6}, '{0,16,7}};

  initial begin
    #1;
    for (int a = 0; a < 8; a++) begin
      a4 = 3'(a);
      #1;
      if (a >= 1 && a <= 4)
        check(v4 && int'(st4) == e4[a][0] && int'(cn4) == e4[a][1] && int'(l4) == e4[a][2],
              $sformatf("4-level ATC(%0d) = [%0d +%0d] layer %0d", a, st4, cn4, l4));
      else
        check(!v4, $sformatf("4-level address %0d invalid", a));
    end
    for (int a = 0; a < 16; a++) begin
      a8 = 4'(a); a6 = 4'(a);
      #1;
      if (a >= 1 && a <= 12)
        check(v8 && int'(st8) == e8[a][0] && int'(cn8) == e8[a][1] && int'(l8) == e8[a][2],
              $sformatf("8-level ATC(%0d) = [%0d +%0d] layer %0d", a, st8, cn8, l8));
      else
        check(!v8, $sformatf("8-level address %0d invalid", a));
      if (a >= 1 && a <= 10)
        check(v6 && int'(st6) == e8[a][0] && int'(cn6) == e8[a][1] && int'(l6) == e8[a][2],
              $sformatf("6-level ATC(%0d)", a));
      else
        check(!v6, $sformatf("6-level address %0d invalid", a));
    end
    // default: 4 KB sectors, 65536-cell wordline
    ad = 3'd2; #1 check(vd && std_ == 17'd32768 && cnd == 17'd32768 && ld == 2'd1, "default ATC(2)");
    ad = 3'd4; #1 check(vd && std_ == 17'd0 && cnd == 17'd65536 && ld == 2'd3, "default ATC(4)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

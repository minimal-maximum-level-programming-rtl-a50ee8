// tb_mmlp_maxlevel_table: self-checking test of the MaxLevel table against a
// scoreboard array: random raises (an entry keeps the maximum), clears, reset
// to zero, and the one-cycle update timing (a write is visible on the next
// cycle, not the same one).
module tb_mmlp_maxlevel_table;
  localparam int NUM_WL = 16;

  logic       clk = 0, rst_n = 0;
  logic [3:0] rd_wl, upd_wl, clr_wl;
  logic [1:0] rd_level, upd_level;
  logic       upd_en, clr_en;

  mmlp_maxlevel_table #(.NUM_WL(NUM_WL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [1:0] model [NUM_WL];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; clr_en = 0; rd_wl = 0; upd_wl = 0; clr_wl = 0; upd_level = 0;
    foreach (model[i]) model[i] = 2'd0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NUM_WL; i++) begin
      rd_wl = 4'(i); #1 check(rd_level == 2'd0, $sformatf("entry %0d zero after reset", i));
    end
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      upd_en    = ($urandom % 3) != 0;
      upd_wl    = 4'($urandom);
      upd_level = 2'($urandom);
      clr_en    = ($urandom % 8) == 0;
      clr_wl    = 4'($urandom);
      rd_wl     = upd_wl;
      #1 check(rd_level == model[upd_wl], "read before update unchanged");
      @(posedge clk);
      if (upd_en && upd_level > model[upd_wl]) model[upd_wl] = upd_level;
      if (clr_en) model[clr_wl] = 2'd0;
      #1;
      for (int i = 0; i < NUM_WL; i++) begin
        rd_wl = 4'(i);
        #0 check(rd_level == model[i], $sformatf("entry %0d = %0d want %0d", i, rd_level, model[i]));
      end
    end
    upd_en = 0; clr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

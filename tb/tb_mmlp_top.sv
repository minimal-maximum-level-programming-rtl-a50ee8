// tb_mmlp_top: end-to-end test of the MMLP front end at its default size
// (4 KB sectors, 65536-cell wordlines, 64 wordlines), against the behavioural
// 4-level flash array model.
//
// Scenario: fill wordline 0 with sectors 1..4 of random data, reading back
// every written sector after each write; the first bits of each sector are
// set so that cells c0, c1 and cS, cS+1 replay the 4-cell example
// (0100 -> 0111 -> 0121 -> 2321). Then: write order errors, a bad address,
// an unwritten-sector read, erase and refill, and a wordline that gets
// sector 3 without sectors 1 and 2. Before the erase, every sector of the
// full wordline is rewritten in place (the phase-change rewrite). Checked:
//   - read data equals written data (scoreboard);
//   - write latency (sense + program, in 1 us cycles) of sectors 1..4 is
//     200, 200, 610, 920 and the mean 482.5, the MMLP write latencies for
//     Np = 10/20/40 pulses and 10 us pulse and verify;
//   - reference comparisons per read follow the reduced-sensing scheme
//     (1 for sectors 1/2 of a half-full wordline; 2/2/1 with three sectors;
//     3/3/2/2 with four, i.e. 2.5 on average);
//   - after four random sectors every level holds about a quarter of the
//     cells;
//   - no cell is ever asked to go down by a write;
//   - a rewrite senses all three references, keeps the other sectors, and
//     moves cells only as the code allows: page 4 only 3<->2, 3<->1, 2<->0;
//     page 3 never 0<->3; page 1 or 2 only cells of its own half, with all
//     six level transitions present.
// Every mechanism (each write layer, pre-write sense, each read reference
// set, zero read, order and address errors, erase, rewrite, rejected rewrite)
// is counted and must occur.
module tb_mmlp_top;
  import mmlp_pkg::*;

  localparam int S      = 32768;
  localparam int NUM_WL = 64;
  localparam int DW     = 8;
  localparam int BEATS  = S / DW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cmd_valid, cmd_ready;
  host_op_e      cmd_op;
  logic [5:0]    cmd_wl;
  logic [2:0]    cmd_addr;
  logic          wr_valid, wr_ready;
  logic [DW-1:0] wr_data;
  logic          rd_valid, rd_ready;
  logic [DW-1:0] rd_data;
  logic          resp_valid;
  resp_e         resp_code;
  logic          arr_valid;
  arr_op_e       arr_op;
  logic [5:0]    arr_wl;
  ref_mask_t     arr_refs;
  logic [16:0]   arr_cell_start, arr_cell_count;
  logic          arr_done;
  logic          pb_rd_en, pb_wr_en;
  logic [15:0]   pb_pair;
  cell_pair_t [DW-1:0] pb_rdata, pb_wdata;
  logic [DW-1:0] pb_wmask;
  int unsigned   last_latency, last_pulses, last_targets, lower_errors;
  logic [15:0]   last_moves;
  int unsigned   last_changed, last_chg_lo, last_chg_hi;

  mmlp_top dut (.*);

  mlc_array_model #(.NUM_WL(NUM_WL), .SECTOR_BITS(S), .LANES(DW)) u_arr (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- array activity monitor: latency and reference count per command ----
  int unsigned op_array_cycles, op_refs, op_senses;
  always @(posedge clk) begin
    if (arr_valid) begin
      if (arr_op == ARR_SENSE) begin
        op_refs   <= op_refs + int'(ref_count(arr_refs));
        op_senses <= op_senses + 1;
      end
    end
    if (arr_done) op_array_cycles <= op_array_cycles + last_latency;
  end

  // ---- host side ----
  logic [S-1:0] sector_data [64][1:4];
  logic         sector_valid [64][1:4];
  logic [S-1:0] rd_buf;

  // Drive on the falling edge, sample there too: a handshake seen at a
  // falling edge completes on the next rising edge.
  task automatic start_cmd(host_op_e op, int wl, int addr);
    @(negedge clk);
    op_array_cycles = 0; op_refs = 0; op_senses = 0;
    cmd_valid = 1; cmd_op = op; cmd_wl = 6'(wl); cmd_addr = 3'(addr);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic wait_resp(output resp_e code);
    while (!resp_valid) @(negedge clk);
    code = resp_code;
  endtask

  task automatic do_write(int wl, int addr, logic [S-1:0] d, output resp_e code);
    do_xfer(HOST_WRITE, wl, addr, d, code);
  endtask

  task automatic do_xfer(host_op_e op, int wl, int addr, logic [S-1:0] d, output resp_e code);
    int b;
    bit hs;
    start_cmd(op, wl, addr);
    b  = 0;
    hs = 0;
    wr_valid = 1;
    wr_data  = d[0 +: DW];
    while (1) begin
      if (hs) begin
        b++;
        if (b == BEATS) wr_valid = 0;
        else wr_data = d[b*DW +: DW];
      end
      if (resp_valid) break;
      hs = wr_valid && wr_ready;
      @(negedge clk);
    end
    wr_valid = 0;
    code = resp_code;
    check(code != RESP_OK || b == BEATS, $sformatf("write %0d: %0d beats", addr, b));
  endtask

  task automatic do_read(int wl, int addr, output resp_e code);
    int b;
    start_cmd(HOST_READ, wl, addr);
    b = 0;
    while (1) begin
      if (resp_valid) break;
      if (rd_valid && rd_ready) begin
        rd_buf[b*DW +: DW] = rd_data;
        b++;
      end
      @(negedge clk);
    end
    code = resp_code;
    check(code != RESP_OK || b == BEATS, $sformatf("read %0d: %0d beats", addr, b));
  endtask

  always @(posedge clk) rd_ready <= ($urandom % 4) != 0;

  // mechanism counters
  int n_write_layer [1:3];
  int n_prewrite_sense, n_read_refs [8], n_zero_read, n_order_err, n_addr_err, n_erase;
  int n_blank_upper_write, n_rewrite, n_rewrite_err;

  // Read back every sector of a wordline and check data and comparison count.
  task automatic verify_wl(int wl, int max_layer);
    resp_e code;
    int    exp_refs;
    for (int a = 1; a <= 4; a++) begin
      int lay;
      lay = (a <= 2) ? 1 : a - 1;
      do_read(wl, a, code);
      check(code == RESP_OK, $sformatf("read wl %0d sector %0d ok", wl, a));
      if (lay > max_layer) exp_refs = 0;
      else if (lay == 1) exp_refs = max_layer;
      else exp_refs = (max_layer == 3) ? 2 : 1;
      check(op_refs == exp_refs, $sformatf("read wl %0d sector %0d MaxLevel %0d: %0d comparisons, want %0d",
                                           wl, a, max_layer, op_refs, exp_refs));
      check(op_array_cycles == 10 * exp_refs, $sformatf("read sector %0d sensing time %0d", a, op_array_cycles));
      if (sector_valid[wl][a]) begin
        check(rd_buf == sector_data[wl][a], $sformatf("read wl %0d sector %0d data", wl, a));
        n_read_refs[{1'b0, 2'(lay == 1 ? 0 : 1)} * 4 + max_layer]++;
      end else begin
        // a sector of a layer above MaxLevel is answered without sensing;
        // an unwritten layer-1 sector next to a written one is sensed as erased
        check(rd_buf == '0, $sformatf("read wl %0d unwritten sector %0d -> zeros", wl, a));
        if (op_senses == 0) n_zero_read++;
      end
    end
  endtask

  function automatic logic [S-1:0] rand_sector();
    logic [S-1:0] d;
    for (int i = 0; i < S / 32; i++) d[i*32 +: 32] = $urandom;
    return d;
  endfunction

  initial begin
    resp_e code;
    int    lat [1:4];
    int    want_lat [1:4] = '{200, 200, 610, 920};
    int    lvl_cnt [4];
    cmd_valid = 0; wr_valid = 0; wr_data = 0; cmd_op = HOST_READ; cmd_wl = 0; cmd_addr = 0;
    op_array_cycles = 0; op_refs = 0; op_senses = 0;
    n_prewrite_sense = 0; n_zero_read = 0; n_order_err = 0; n_addr_err = 0; n_erase = 0;
    n_blank_upper_write = 0; n_rewrite = 0; n_rewrite_err = 0;
    foreach (n_write_layer[i]) n_write_layer[i] = 0;
    foreach (n_read_refs[i]) n_read_refs[i] = 0;
    foreach (sector_valid[w, a]) sector_valid[w][a] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- fill wordline 0, example bits in the first pair of each half ----
    for (int a = 1; a <= 4; a++) begin
      logic [S-1:0] d;
      d = rand_sector();
      unique case (a)
        1: begin d[0] = 1'b0; d[1] = 1'b1; end          // D1 = 01 -> c0 c1 = 0 1
        2: begin d[0] = 1'b1; d[1] = 1'b1; end          // D2 = 11 -> cS cS+1 = 1 1
        3: begin d[0] = 1'b0; d[S/2] = 1'b1; end        // D3 = 01 -> pair 0 gets 0, pair S/2 gets 1
        4: begin d[0] = 1'b1; d[S/2] = 1'b0; end        // D4 = 10
        default: ;
      endcase
      do_write(0, a, d, code);
      check(code == RESP_OK, $sformatf("write sector %0d ok", a));
      sector_data[0][a] = d; sector_valid[0][a] = 1;
      lat[a] = int'(op_array_cycles);
      check(lat[a] == want_lat[a], $sformatf("sector %0d write latency %0d us, want %0d", a, lat[a], want_lat[a]));
      n_write_layer[(a <= 2) ? 1 : a - 1]++;
      if (a > 2) begin
        check(op_refs == a - 2, $sformatf("sector %0d pre-write comparisons %0d", a, op_refs));
        n_prewrite_sense++;
      end
      begin
        int exp [4][4] = '{'{0,1,0,0}, '{0,1,1,1}, '{0,1,2,1}, '{2,3,2,1}};
        check(int'(u_arr.cells[0][0]) == exp[a-1][0] && int'(u_arr.cells[0][1]) == exp[a-1][1] &&
              int'(u_arr.cells[0][S]) == exp[a-1][2] && int'(u_arr.cells[0][S+1]) == exp[a-1][3],
              $sformatf("example cells after sector %0d: %0d%0d%0d%0d", a, u_arr.cells[0][0],
                        u_arr.cells[0][1], u_arr.cells[0][S], u_arr.cells[0][S+1]));
      end
      verify_wl(0, (a <= 2) ? 1 : a - 1);
    end
    check(lat[1] + lat[2] + lat[3] + lat[4] == 4 * 482 + 2, "mean MMLP write latency 482.5 us");

    // level distribution of a full wordline: a quarter each (within 2 %)
    foreach (lvl_cnt[i]) lvl_cnt[i] = 0;
    for (int c = 0; c < 2 * S; c++) lvl_cnt[u_arr.cells[0][c]]++;
    foreach (lvl_cnt[i])
      check(lvl_cnt[i] > (2 * S) * 23 / 100 && lvl_cnt[i] < (2 * S) * 27 / 100,
            $sformatf("level %0d holds %0d of %0d cells", i, lvl_cnt[i], 2 * S));

    // ---- order and address errors ----
    do_write(0, 2, rand_sector(), code);
    check(code == RESP_ORDER_ERR && op_senses == 0, "sector 2 after sector 4 rejected");
    n_order_err++;
    do_write(0, 7, rand_sector(), code);
    check(code == RESP_ADDR_ERR, "address 7 rejected");
    n_addr_err++;
    verify_wl(0, 3);

    // ---- in-place rewrite of every sector of the full wordline ----
    foreach (want_lat[a]) begin
      int           a_r;
      logic [S-1:0] d;
      logic [15:0]  mv;
      int           pairs;
      a_r = 5 - a;  // sectors 4, 3, 2, 1
      d   = rand_sector();
      do_xfer(HOST_REWRITE, 0, a_r, d, code);
      check(code == RESP_OK && op_refs == 3, $sformatf("rewrite sector %0d: ok, %0d comparisons", a_r, op_refs));
      sector_data[0][a_r] = d;
      n_rewrite++;
      mv = last_moves;
      unique case (a_r)
        4: check((mv & ~16'b0110_1001_1000_0100) == 0,  // 3->2 3->1 2->3 2->0 1->3 0->2
                 $sformatf("rewrite sector 4 moves %b", mv));
        3: check(!mv[3] && !mv[12], $sformatf("rewrite sector 3 needs no 0<->3 (%b)", mv));
        default: begin
          check(last_chg_lo >= (a_r - 1) * S && last_chg_hi < a_r * S,
                $sformatf("rewrite sector %0d changed cells %0d..%0d only", a_r, last_chg_lo, last_chg_hi));
          pairs = 0;
          for (int f = 0; f < 4; f++)
            for (int t = f + 1; t < 4; t++)
              if (mv[4*f+t] || mv[4*t+f]) pairs++;
          check(pairs == 6, $sformatf("rewrite sector %0d uses all 6 level transitions (%0d)", a_r, pairs));
        end
      endcase
      verify_wl(0, 3);
    end
    check(lower_errors == 0, "writes never lower a cell");

    // ---- erase and partial refill ----
    start_cmd(HOST_ERASE, 0, 0);
    wait_resp(code);
    check(code == RESP_OK && op_array_cycles == 100, "erase wordline 0");
    n_erase++;
    foreach (sector_valid[0][a]) sector_valid[0][a] = 0;
    verify_wl(0, 0);
    begin
      logic [S-1:0] d;
      d = rand_sector();
      do_write(0, 1, d, code);
      check(code == RESP_OK && op_array_cycles == 200, "rewrite sector 1 after erase");
      sector_data[0][1] = d; sector_valid[0][1] = 1;
      n_write_layer[1]++;
      verify_wl(0, 1);
    end

    // ---- sector 3 on an empty wordline (sectors 1, 2 skipped) ----
    begin
      logic [S-1:0] d;
      d = rand_sector();
      do_write(5, 3, d, code);
      check(code == RESP_OK && op_refs == 0, "sector 3 on an empty wordline: no pre-write comparison");
      check(op_array_cycles == 1 + 20 * 30, "sector 3 on an empty wordline latency");
      sector_data[5][3] = d; sector_valid[5][3] = 1;
      n_write_layer[2]++; n_blank_upper_write++;
      verify_wl(5, 2);
      do_write(5, 1, rand_sector(), code);
      check(code == RESP_ORDER_ERR, "sector 1 after sector 3 rejected");
      n_order_err++;
      do_xfer(HOST_REWRITE, 5, 4, rand_sector(), code);
      check(code == RESP_ORDER_ERR && op_senses == 0, "rewrite of unwritten sector 4 rejected");
      n_rewrite_err++;
      verify_wl(5, 2);
    end

    check(lower_errors == 0, "no cell was asked to go down");

    // ---- every mechanism happened ----
    for (int l = 1; l <= 3; l++) check(n_write_layer[l] > 0, $sformatf("layer %0d writes: %0d", l, n_write_layer[l]));
    check(n_prewrite_sense > 0, $sformatf("pre-write senses: %0d", n_prewrite_sense));
    check(n_read_refs[1] > 0 && n_read_refs[2] > 0 && n_read_refs[3] > 0,
          "base-layer reads with MaxLevel 1, 2, 3");
    check(n_read_refs[6] > 0 && n_read_refs[7] > 0, "upper-layer reads with MaxLevel 2, 3");
    check(n_zero_read > 0, $sformatf("unwritten-sector reads: %0d", n_zero_read));
    check(n_order_err > 0 && n_addr_err > 0 && n_erase > 0 && n_blank_upper_write > 0,
          "order error, address error, erase, upper write on an empty wordline");
    check(n_rewrite > 0 && n_rewrite_err > 0, $sformatf("rewrites %0d, rejected rewrites %0d", n_rewrite, n_rewrite_err));
    $display("mechanisms: writes L1=%0d L2=%0d L3=%0d, pre-write senses=%0d, reads base M1/M2/M3=%0d/%0d/%0d, upper M2/M3=%0d/%0d, zero reads=%0d, order errors=%0d, address errors=%0d, erases=%0d",
             n_write_layer[1], n_write_layer[2], n_write_layer[3], n_prewrite_sense,
             n_read_refs[1], n_read_refs[2], n_read_refs[3], n_read_refs[6], n_read_refs[7],
             n_zero_read, n_order_err, n_addr_err, n_erase);
    $display("rewrites=%0d, rejected rewrites=%0d", n_rewrite, n_rewrite_err);
    $display("write latency per sector: %0d %0d %0d %0d us", lat[1], lat[2], lat[3], lat[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

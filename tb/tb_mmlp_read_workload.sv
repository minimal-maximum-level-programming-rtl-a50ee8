// tb_mmlp_read_workload: capacity-utilization workload for the MMLP front end.
//
// Wordlines are filled to three utilizations with random data: 50 % (sectors
// 1-2), 75 % (sectors 1-3) and 100 % (sectors 1-4), four wordlines each, at a
// reduced sector size of 256 bits. Every stored sector is then read in random
// order, several rounds. Checked per utilization:
//   mean reference comparisons per read: 1, 5/3 ((2+2+1)/3), 2.5 ((3+3+2+2)/4)
//   mean write time per sector (1 us cycles): 200, 336.67 ((200+200+610)/3),
//   482.5 ((200+200+610+920)/4);
//   all data read back equals the data written.
// The write means are printed against 800 us (conventional programming, all
// three levels in sequence) and 705 us (two-page programming).
module tb_mmlp_read_workload;
  import mmlp_pkg::*;

  localparam int S      = 256;
  localparam int NUM_WL = 16;
  localparam int DW     = 8;
  localparam int BEATS  = S / DW;
  localparam int ROUNDS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          cmd_valid, cmd_ready;
  host_op_e      cmd_op;
  logic [3:0]    cmd_wl;
  logic [2:0]    cmd_addr;
  logic          wr_valid, wr_ready;
  logic [DW-1:0] wr_data;
  logic          rd_valid, rd_ready;
  logic [DW-1:0] rd_data;
  logic          resp_valid;
  resp_e         resp_code;
  logic          arr_valid;
  arr_op_e       arr_op;
  logic [3:0]    arr_wl;
  ref_mask_t     arr_refs;
  logic [9:0]    arr_cell_start, arr_cell_count;
  logic          arr_done;
  logic          pb_rd_en, pb_wr_en;
  logic [7:0]    pb_pair;
  cell_pair_t [DW-1:0] pb_rdata, pb_wdata;
  logic [DW-1:0] pb_wmask;
  int unsigned   last_latency, last_pulses, last_targets, lower_errors;
  logic [15:0]   last_moves;
  int unsigned   last_changed, last_chg_lo, last_chg_hi;

  mmlp_top #(.SECTOR_BITS(S), .NUM_WL(NUM_WL), .DATA_W(DW)) dut (.*);
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned op_array_cycles, op_refs;
  always @(posedge clk) begin
    if (arr_valid && arr_op == ARR_SENSE) op_refs <= op_refs + int'(ref_count(arr_refs));
    if (arr_done) op_array_cycles <= op_array_cycles + last_latency;
  end
  always @(posedge clk) rd_ready <= ($urandom % 4) != 0;

  logic [S-1:0] store [NUM_WL][1:4];
  logic [S-1:0] rd_buf;

  task automatic start_cmd(host_op_e op, int wl, int addr);
    @(negedge clk);
    op_array_cycles = 0; op_refs = 0;
    cmd_valid = 1; cmd_op = op; cmd_wl = 4'(wl); cmd_addr = 3'(addr);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic do_write(int wl, int addr, logic [S-1:0] d, output resp_e code);
    int b;
    bit hs;
    start_cmd(HOST_WRITE, wl, addr);
    b = 0; hs = 0;
    wr_valid = 1; wr_data = d[0 +: DW];
    while (1) begin
      if (hs) begin
        b++;
        if (b == BEATS) wr_valid = 0; else wr_data = d[b*DW +: DW];
      end
      if (resp_valid) break;
      hs = wr_valid && wr_ready;
      @(negedge clk);
    end
    wr_valid = 0;
    code = resp_code;
  endtask

  task automatic do_read(int wl, int addr, output resp_e code);
    int b;
    start_cmd(HOST_READ, wl, addr);
    b = 0;
    while (1) begin
      if (resp_valid) break;
      if (rd_valid && rd_ready) begin rd_buf[b*DW +: DW] = rd_data; b++; end
      @(negedge clk);
    end
    code = resp_code;
  endtask

  initial begin
    resp_e code;
    int    fill [3] = '{2, 3, 4};
    int    write_us [3];
    int    nwrites [3];
    int    refs_tot [3];
    int    nreads [3];
    cmd_valid = 0; wr_valid = 0; wr_data = 0; cmd_op = HOST_READ; cmd_wl = 0; cmd_addr = 0;
    op_array_cycles = 0; op_refs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    for (int g = 0; g < 3; g++) begin
      write_us[g] = 0; nwrites[g] = 0; refs_tot[g] = 0; nreads[g] = 0;
      for (int w = 4 * g; w < 4 * g + 4; w++)
        for (int a = 1; a <= fill[g]; a++) begin
          logic [S-1:0] d;
          for (int i = 0; i < S / 32; i++) d[i*32 +: 32] = $urandom;
          do_write(w, a, d, code);
          check(code == RESP_OK, $sformatf("write wl %0d sector %0d", w, a));
          store[w][a] = d;
          write_us[g] += int'(op_array_cycles);
          nwrites[g]++;
        end
    end

    // random read order over every stored sector, ROUNDS times
    for (int r = 0; r < ROUNDS; r++) begin
      int list [$];
      for (int w = 0; w < 12; w++) for (int a = 1; a <= fill[w / 4]; a++) list.push_back(w * 8 + a);
      list.shuffle();
      foreach (list[k]) begin
        int w, a, g;
        w = list[k] / 8; a = list[k] % 8; g = w / 4;
        do_read(w, a, code);
        check(code == RESP_OK && rd_buf == store[w][a], $sformatf("read wl %0d sector %0d", w, a));
        refs_tot[g] += int'(op_refs);
        nreads[g]++;
      end
    end

    // 50 %: 1 per read; 75 %: 5/3; 100 %: 5/2
    check(refs_tot[0] * 1 == nreads[0] * 1, "50 % utilization: 1 comparison per read");
    check(refs_tot[1] * 3 == nreads[1] * 5, "75 % utilization: 5/3 comparisons per read");
    check(refs_tot[2] * 2 == nreads[2] * 5, "100 % utilization: 2.5 comparisons per read");
    check(write_us[0] == nwrites[0] * 200, "50 %: 200 us per sector write");
    check(write_us[1] * 3 == nwrites[1] * 1010, "75 %: 336.7 us per sector write");
    check(write_us[2] * 2 == nwrites[2] * 965, "100 %: 482.5 us per sector write");
    check(lower_errors == 0, "no cell lowered");
    for (int g = 0; g < 3; g++)
      $display("utilization %0d%%: %0d.%02d comparisons per read, %0d us mean write (conventional 800, two-page 705)",
               25 * fill[g], refs_tot[g] / nreads[g], (100 * refs_tot[g] / nreads[g]) % 100,
               write_us[g] / nwrites[g]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

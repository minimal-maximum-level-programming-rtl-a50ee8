// tb_mmlp_controller: self-checking test of the MMLP write/read/erase
// sequencer on its own, with 32-bit sectors (4 beats of 8 bits).
//
// The testbench stands in for the blocks around the controller: it answers
// the ATC and planner inputs from its own small tables, answers array
// operations after a fixed delay, and logs every array request, page buffer
// access and MaxLevel update. Each command's log is compared with the
// expected sequence: which array operations with which references and cell
// range, which page-buffer pairs per beat, the response code, and the beat
// timing (two cycles per write beat when data is always ready). Read data
// backpressure is random. A rewrite must sense every reference up to
// MaxLevel (even for a layer-1 sector), hold the encoder in rewrite mode,
// issue a rewrite instead of a program, leave MaxLevel alone, and be refused
// for a sector never written.
module tb_mmlp_controller;
  import mmlp_pkg::*;

  localparam int S      = 32;
  localparam int NUM_WL = 4;
  localparam int DW     = 8;
  localparam int ARR_LAT = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           cmd_valid, cmd_ready;
  host_op_e       cmd_op;
  logic [1:0]     cmd_wl;
  logic [2:0]     cmd_addr;
  logic           wr_valid, wr_ready, rd_valid, rd_ready, rd_zero, rewrite;
  logic           resp_valid;
  resp_e          resp_code;
  logic [1:0]     cur_wl;
  logic [2:0]     cur_addr;
  logic           atc_valid;
  logic [6:0]     atc_start, atc_count;
  logic [1:0]     atc_layer;
  logic           ml_upd_en, ml_clr_en;
  logic           written, write_allowed;
  ref_mask_t      read_refs, prewrite_refs;
  logic           arr_valid;
  arr_op_e        arr_op;
  ref_mask_t      arr_refs;
  logic [6:0]     arr_cell_start, arr_cell_count;
  logic           arr_done;
  logic           pb_rd_en, pb_wr_en;
  logic [4:0]     pb_pair;

  mmlp_controller #(.SECTOR_BITS(S), .NUM_WL(NUM_WL), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- stand-ins for ATC and planner (4-level, S = 32) ----
  logic [1:0] tb_max;   // MaxLevel the testbench reports for the current wordline
  always_comb begin
    atc_valid = cur_addr >= 1 && cur_addr <= 4;
    unique case (cur_addr)
      3'd1:    begin atc_start = 7'd0;  atc_count = 7'd32; atc_layer = 2'd1; end
      3'd2:    begin atc_start = 7'd32; atc_count = 7'd32; atc_layer = 2'd1; end
      3'd3:    begin atc_start = 7'd0;  atc_count = 7'd64; atc_layer = 2'd2; end
      3'd4:    begin atc_start = 7'd0;  atc_count = 7'd64; atc_layer = 2'd3; end
      default: begin atc_start = 7'd0;  atc_count = 7'd0;  atc_layer = 2'd0; end
    endcase
    written       = atc_layer != 0 && atc_layer <= tb_max;
    write_allowed = atc_layer != 0 && (atc_layer > tb_max || (atc_layer == 1 && tb_max <= 1));
    read_refs     = written ? ((atc_layer == 1) ? ref_mask_t'((1 << tb_max) - 1) : ((tb_max == 3) ? 3'b110 : 3'b010)) : 3'b000;
    prewrite_refs = (atc_layer != 0) ? ref_mask_t'((1 << tb_max) - 1) : 3'b000;
  end

  // ---- array responder and logs ----
  int unsigned arr_busy;
  int          n_arr, n_upd, n_clr, n_rd_beats, n_zero_beats;
  arr_op_e     log_op [$];
  ref_mask_t   log_refs [$];
  int          log_start [$], log_count [$];
  int          log_wpair [$], log_wcycle [$], log_rpair [$];
  int          cyc;
  logic        rd_pending;
  int          n_rw_beats;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    arr_done <= 1'b0;
    if (arr_busy == 1) arr_done <= 1'b1;
    if (arr_busy != 0) arr_busy <= arr_busy - 1;
    if (arr_valid) begin
      check(arr_busy == 0, "array request while busy");
      arr_busy <= ARR_LAT;
      log_op.push_back(arr_op); log_refs.push_back(arr_refs);
      log_start.push_back(int'(arr_cell_start)); log_count.push_back(int'(arr_cell_count));
    end
    if (pb_wr_en) begin
      log_wpair.push_back(int'(pb_pair)); log_wcycle.push_back(cyc);
      if (rewrite) n_rw_beats <= n_rw_beats + 1;
    end
    if (pb_rd_en) begin log_rpair.push_back(int'(pb_pair)); end
    if (ml_upd_en) n_upd <= n_upd + 1;
    if (ml_clr_en) n_clr <= n_clr + 1;
    if (rd_valid && rd_ready) begin
      if (rd_zero) n_zero_beats <= n_zero_beats + 1;
      else begin
        n_rd_beats <= n_rd_beats + 1;
        check(rd_pending, "read beat without a page buffer read before it");
      end
    end
    if (pb_rd_en) rd_pending <= 1'b1;
    else if (rd_valid && rd_ready) rd_pending <= 1'b0;
  end

  initial begin arr_busy = 0; cyc = 0; n_upd = 0; n_clr = 0; n_rd_beats = 0; n_zero_beats = 0;
                rd_pending = 0; arr_done = 0; n_rw_beats = 0; end

  always @(posedge clk) rd_ready <= ($urandom % 3) != 0;

  task automatic clear_logs();
    log_op.delete(); log_refs.delete(); log_start.delete(); log_count.delete();
    log_wpair.delete(); log_wcycle.delete(); log_rpair.delete();
  endtask

  // Issue one command and wait for its response; returns the code.
  task automatic run_cmd(host_op_e op, int wl, int addr, output resp_e code);
    clear_logs();
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_wl = 2'(wl); cmd_addr = 3'(addr);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!resp_valid) @(negedge clk);
    code = resp_code;
    @(negedge clk);
  endtask

  resp_e code;
  int    upd0, beats0, zero0;

  initial begin
    cmd_valid = 0; wr_valid = 0; cmd_op = HOST_READ; cmd_wl = 0; cmd_addr = 0; tb_max = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr_valid = 1;  // write data always ready

    // write sector 2 (layer 1): no sense, pairs 16,20,24,28, program [32,+32]
    upd0 = n_upd;
    run_cmd(HOST_WRITE, 1, 2, code);
    check(code == RESP_OK, "write 2 ok");
    check(log_op.size() == 1 && log_op[0] == ARR_PROGRAM && log_start[0] == 32 && log_count[0] == 32,
          "write 2: only a program of cells [32,64)");
    check(log_wpair.size() == 4 && log_wpair[0] == 16 && log_wpair[1] == 20 && log_wpair[2] == 24 &&
          log_wpair[3] == 28, "write 2: page buffer pairs 16,20,24,28");
    check(log_wcycle.size() == 4 && log_wcycle[3] - log_wcycle[0] == 6, "write 2: two cycles per beat");
    check(n_upd == upd0 + 1, "write 2: MaxLevel updated once");

    // write sector 3 with MaxLevel 1: sense with reference 1, then 4 beats of 8 pairs
    tb_max = 1;
    run_cmd(HOST_WRITE, 1, 3, code);
    check(code == RESP_OK, "write 3 ok");
    check(log_op.size() == 2 && log_op[0] == ARR_SENSE && log_refs[0] == 3'b001 &&
          log_start[0] == 0 && log_count[0] == 64 && log_op[1] == ARR_PROGRAM && log_count[1] == 64,
          "write 3: sense ref 1 then program [0,64)");
    check(log_wpair.size() == 4 && log_wpair[0] == 0 && log_wpair[1] == 8 && log_wpair[3] == 24,
          "write 3: pairs 0,8,16,24");

    // write sector 4 with MaxLevel 2: sense with references 1 and 2
    tb_max = 2;
    run_cmd(HOST_WRITE, 1, 4, code);
    check(code == RESP_OK && log_op.size() == 2 && log_refs[0] == 3'b011, "write 4: sense refs 1,2");

    // out-of-order write and bad address: no array activity
    tb_max = 3;
    run_cmd(HOST_WRITE, 1, 1, code);
    check(code == RESP_ORDER_ERR && log_op.size() == 0, "write 1 after 4 rejected");
    run_cmd(HOST_WRITE, 1, 6, code);
    check(code == RESP_ADDR_ERR && log_op.size() == 0, "address 6 rejected");
    run_cmd(HOST_READ, 1, 0, code);
    check(code == RESP_ADDR_ERR && log_op.size() == 0, "address 0 rejected");

    // read sector 1 on a full wordline: sense refs 1,2,3, 4 beats, pairs 0,4,8,12
    beats0 = n_rd_beats;
    run_cmd(HOST_READ, 1, 1, code);
    check(code == RESP_OK && log_op.size() == 1 && log_op[0] == ARR_SENSE && log_refs[0] == 3'b111 &&
          log_start[0] == 0 && log_count[0] == 32, "read 1: sense refs 1,2,3 on [0,32)");
    check(log_rpair.size() == 4 && log_rpair[1] == 4 && log_rpair[3] == 12, "read 1: pairs 0,4,8,12");
    check(n_rd_beats == beats0 + 4, "read 1: four beats");

    // read sector 4 on a full wordline: refs 2,3
    run_cmd(HOST_READ, 1, 4, code);
    check(code == RESP_OK && log_op.size() == 1 && log_refs[0] == 3'b110, "read 4: refs 2,3");

    // read sector 3 with MaxLevel 2: ref 2 only
    tb_max = 2;
    run_cmd(HOST_READ, 1, 3, code);
    check(code == RESP_OK && log_refs.size() == 1 && log_refs[0] == 3'b010, "read 3: ref 2");

    // unwritten sector: zero beats, no array activity
    zero0 = n_zero_beats;
    run_cmd(HOST_READ, 1, 4, code);
    check(code == RESP_OK && log_op.size() == 0 && n_zero_beats == zero0 + 4, "read unwritten 4: zeros");

    // rewrite sector 1 on a full wordline: sense refs 1,2,3 on [0,32), four
    // beats in rewrite mode, pairs 0,4,8,12, then a rewrite of [0,32)
    tb_max = 3;
    upd0   = n_upd;
    run_cmd(HOST_REWRITE, 1, 1, code);
    check(code == RESP_OK && log_op.size() == 2 && log_op[0] == ARR_SENSE && log_refs[0] == 3'b111 &&
          log_start[0] == 0 && log_count[0] == 32 && log_op[1] == ARR_REWRITE &&
          log_start[1] == 0 && log_count[1] == 32, "rewrite 1: sense refs 1,2,3, then rewrite [0,32)");
    check(log_wpair.size() == 4 && log_wpair[1] == 4 && log_wpair[3] == 12 && n_rw_beats == 4,
          "rewrite 1: four beats in rewrite mode, pairs 0,4,8,12");
    check(n_upd == upd0, "rewrite 1: MaxLevel not updated");
    // rewrite of sector 4 on a wordline that has sectors 1..3: refused
    tb_max = 2;
    run_cmd(HOST_REWRITE, 1, 4, code);
    check(code == RESP_ORDER_ERR && log_op.size() == 0, "rewrite of unwritten sector 4 rejected");
    check(!rewrite || n_rw_beats == 4, "no write beat in rewrite mode after the refusal");

    // erase
    run_cmd(HOST_ERASE, 1, 0, code);
    check(code == RESP_OK && log_op.size() == 1 && log_op[0] == ARR_ERASE && n_clr == 1, "erase");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

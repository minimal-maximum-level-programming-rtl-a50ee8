// mmlp_top: MMLP front end for a 4-level-cell memory array.
//
// Minimal maximum-level programming shares every cell of a wordline among
// four sectors and lets the k-th sector written to a cell use only levels
// 0..k, so early writes need few program pulses and lightly filled wordlines
// need few reference comparisons to read. This module joins the MMLP blocks
// around a controller: address-to-cells mapping (mmlp_atc), encoder
// (mmlp_encoder), decoder (mmlp_decoder), the per-wordline MaxLevel table
// (mmlp_maxlevel_table) and the reference planner (mmlp_sense_planner). The
// MLC array itself, with its page buffer, is outside: its command and page
// buffer signals are ports.
//
// Host side: commands (read, write, erase of a wordline, and in-place rewrite
// of a written sector for arrays that can lower cells, such as PCM; sector
// address 1..4),
// DATA_W-bit write and read beats, SECTOR_BITS/DATA_W beats per sector, and a
// one-cycle response. Array side: one operation at a time (sense with a
// reference mask, program, erase, rewrite) on a cell range of wordline arr_wl,
// answered by a one-cycle arr_done; page buffer reads return LANES cell pairs
// one cycle after pb_rd_en, writes take LANES pairs with a lane mask.
// Wordline = 2*SECTOR_BITS cells: sector 1 in the first half, sector 2 in the
// second, sectors 3 and 4 over the whole wordline, one bit per cell pair.
module mmlp_top
  import mmlp_pkg::*;
#(
  parameter int unsigned SECTOR_BITS = 32768,
  parameter int unsigned NUM_WL      = 64,
  parameter int unsigned DATA_W      = 8,
  localparam int unsigned LANES      = DATA_W,
  localparam int unsigned WL_CELLS   = 2 * SECTOR_BITS,
  localparam int unsigned CW         = $clog2(WL_CELLS + 1),
  localparam int unsigned PW         = $clog2(WL_CELLS / 2),
  localparam int unsigned WLW        = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  host_op_e               cmd_op,
  input  logic [WLW-1:0]         cmd_wl,
  input  logic [2:0]             cmd_addr,
  input  logic                   wr_valid,
  output logic                   wr_ready,
  input  logic [DATA_W-1:0]      wr_data,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output logic [DATA_W-1:0]      rd_data,
  output logic                   resp_valid,
  output resp_e                  resp_code,
  // MLC array
  output logic                   arr_valid,
  output arr_op_e                arr_op,
  output logic [WLW-1:0]         arr_wl,
  output ref_mask_t              arr_refs,
  output logic [CW-1:0]          arr_cell_start,
  output logic [CW-1:0]          arr_cell_count,
  input  logic                   arr_done,
  output logic                   pb_rd_en,
  output logic [PW-1:0]          pb_pair,
  input  cell_pair_t [LANES-1:0] pb_rdata,
  output logic                   pb_wr_en,
  output logic [LANES-1:0]       pb_wmask,
  output cell_pair_t [LANES-1:0] pb_wdata
);

  logic [WLW-1:0] cur_wl;
  logic [2:0]     cur_addr;
  logic           atc_valid;
  logic [CW-1:0]  atc_start;
  logic [CW-1:0]  atc_count;
  logic [1:0]     atc_layer;
  logic [1:0]     ml_level;
  logic           ml_upd_en;
  logic           ml_clr_en;
  logic           written;
  ref_mask_t      read_refs;
  ref_mask_t      prewrite_refs;
  logic           write_allowed;
  logic           enc_illegal;
  logic           rd_zero;
  logic           enc_rewrite;
  logic [DATA_W-1:0] dec_data;

  mmlp_atc #(
    .LEVELS     (LEVELS),
    .SECTOR_BITS(SECTOR_BITS)
  ) u_atc (
    .address   (cur_addr),
    .valid     (atc_valid),
    .cell_start(atc_start),
    .cell_count(atc_count),
    .layer     (atc_layer)
  );

  mmlp_maxlevel_table #(
    .NUM_WL(NUM_WL)
  ) u_maxlevel (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_wl    (cur_wl),
    .rd_level (ml_level),
    .upd_en   (ml_upd_en),
    .upd_wl   (cur_wl),
    .upd_level(atc_layer),
    .clr_en   (ml_clr_en),
    .clr_wl   (cur_wl)
  );

  mmlp_sense_planner u_planner (
    .layer        (atc_layer),
    .max_level    (ml_level),
    .written      (written),
    .read_refs    (read_refs),
    .prewrite_refs(prewrite_refs),
    .write_allowed(write_allowed)
  );

  mmlp_encoder #(
    .LANES(LANES)
  ) u_encoder (
    .layer    (atc_layer),
    .data     (wr_data),
    .rewrite  (enc_rewrite),
    .p        (pb_rdata),
    .e        (pb_wdata),
    .lane_used(pb_wmask),
    .illegal  (enc_illegal)
  );

  mmlp_decoder #(
    .LANES(LANES)
  ) u_decoder (
    .layer    (atc_layer),
    .max_level(ml_level),
    .q        (pb_rdata),
    .data     (dec_data)
  );

  mmlp_controller #(
    .SECTOR_BITS(SECTOR_BITS),
    .NUM_WL     (NUM_WL),
    .DATA_W     (DATA_W)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .cmd_valid     (cmd_valid),
    .cmd_ready     (cmd_ready),
    .cmd_op        (cmd_op),
    .cmd_wl        (cmd_wl),
    .cmd_addr      (cmd_addr),
    .wr_valid      (wr_valid),
    .wr_ready      (wr_ready),
    .rd_valid      (rd_valid),
    .rd_ready      (rd_ready),
    .rd_zero       (rd_zero),
    .rewrite       (enc_rewrite),
    .resp_valid    (resp_valid),
    .resp_code     (resp_code),
    .cur_wl        (cur_wl),
    .cur_addr      (cur_addr),
    .atc_valid     (atc_valid),
    .atc_start     (atc_start),
    .atc_count     (atc_count),
    .atc_layer     (atc_layer),
    .ml_upd_en     (ml_upd_en),
    .ml_clr_en     (ml_clr_en),
    .written       (written),
    .read_refs     (read_refs),
    .prewrite_refs (prewrite_refs),
    .write_allowed (write_allowed),
    .arr_valid     (arr_valid),
    .arr_op        (arr_op),
    .arr_refs      (arr_refs),
    .arr_cell_start(arr_cell_start),
    .arr_cell_count(arr_cell_count),
    .arr_done      (arr_done),
    .pb_rd_en      (pb_rd_en),
    .pb_wr_en      (pb_wr_en),
    .pb_pair       (pb_pair)
  );

  assign arr_wl  = cur_wl;
  assign rd_data = rd_zero ? '0 : dec_data;

  // Levels only rise: a write beat must find the pairs in a state that the
  // layers below it can leave, i.e. sectors are written in ascending layers.
  a_encode_legal: assert property (@(posedge clk) disable iff (!rst_n)
    pb_wr_en |-> !enc_illegal);

endmodule

// mmlp_controller: sequencer of the MMLP write, read and erase flows.
//
// Write (sector address A, data D) on wordline W:
//   1. C <- ATC(A); MaxLevel <- table[W]; reject the write if it breaks the
//      ascending-layer order.
//   2. Layer 2 or 3: sense C with every reference up to MaxLevel, so the page
//      buffer holds the current levels P.
//   3. For each beat of DATA_W data bits: read LANES cell pairs of P from the
//      page buffer, let the encoder form E from P and the beat, write E back
//      (lane mask from the encoder). A layer-1 beat fills LANES/2 pairs, a
//      layer-2/3 beat fills LANES pairs.
//   4. Program C from the page buffer; then raise table[W] to the layer.
// Read (A) on W: C <- ATC(A); if the sector was never written, stream zero
// beats without touching the array; otherwise sense C with the planner's
// reduced reference set, then stream beats: read LANES pairs from the page
// buffer, the decoder turns them into DATA_W bits.
// Erase (W): erase the wordline, clear table[W].
// Rewrite (A, D) on W, for PCM arrays whose cells can be lowered: allowed only
// for a sector already written (else RESP_ORDER_ERR). Sense C with every
// reference up to MaxLevel, run the beats as for a write with the encoder in
// rewrite mode (rewrite = 1), then ask the array to set C to the page buffer
// levels in either direction. MaxLevel is left unchanged.
//
// Handshakes: a command is taken when cmd_valid && cmd_ready; write beats
// when wr_valid && wr_ready; read beats when rd_valid && rd_ready. Every
// command ends with a one-cycle resp_valid carrying resp_code. An array
// operation is started by a one-cycle arr_valid with its fields held until
// the array answers with a one-cycle arr_done. The page buffer answers a read
// (pb_rd_en) on the next cycle and keeps that data until the next read.
// Timing: two cycles per beat, plus the array's sense and program times.
// The flow follows the document's write and read pseudo-code; beat width,
// handshakes, the order check and the zero-read of unwritten sectors are this
// design's choices.
module mmlp_controller
  import mmlp_pkg::*;
#(
  parameter int unsigned SECTOR_BITS = 32768,
  parameter int unsigned NUM_WL      = 64,
  parameter int unsigned DATA_W      = 8,
  localparam int unsigned LANES      = DATA_W,
  localparam int unsigned WL_CELLS   = 2 * SECTOR_BITS,
  localparam int unsigned CW         = $clog2(WL_CELLS + 1),
  localparam int unsigned PW         = $clog2(WL_CELLS / 2),
  localparam int unsigned WLW        = (NUM_WL > 1) ? $clog2(NUM_WL) : 1,
  localparam int unsigned BEATS      = SECTOR_BITS / DATA_W,
  localparam int unsigned BW         = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // host command
  input  logic           cmd_valid,
  output logic           cmd_ready,
  input  host_op_e       cmd_op,
  input  logic [WLW-1:0] cmd_wl,
  input  logic [2:0]     cmd_addr,
  // host data handshakes (the data itself passes through encoder / decoder)
  input  logic           wr_valid,
  output logic           wr_ready,
  output logic           rd_valid,
  input  logic           rd_ready,
  output logic           rd_zero,
  output logic           rewrite,     // encoder in rewrite mode
  output logic           resp_valid,
  output resp_e          resp_code,
  // current command, to ATC, MaxLevel table and planner
  output logic [WLW-1:0] cur_wl,
  output logic [2:0]     cur_addr,
  input  logic           atc_valid,
  input  logic [CW-1:0]  atc_start,
  input  logic [CW-1:0]  atc_count,
  input  logic [1:0]     atc_layer,
  output logic           ml_upd_en,
  output logic           ml_clr_en,
  input  logic           written,
  input  ref_mask_t      read_refs,
  input  ref_mask_t      prewrite_refs,
  input  logic           write_allowed,
  // MLC array operations
  output logic           arr_valid,
  output arr_op_e        arr_op,
  output ref_mask_t      arr_refs,
  output logic [CW-1:0]  arr_cell_start,
  output logic [CW-1:0]  arr_cell_count,
  input  logic           arr_done,
  // page buffer access
  output logic           pb_rd_en,
  output logic           pb_wr_en,
  output logic [PW-1:0]  pb_pair
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_WAIT_SENSE, S_W_LOAD, S_W_BEAT, S_WAIT_PROG,
    S_R_LOAD, S_R_BEAT, S_R_ZERO, S_WAIT_ERASE, S_RESP
  } state_e;

  state_e         state_q;
  host_op_e       op_q;
  logic [WLW-1:0] wl_q;
  logic [2:0]     addr_q;
  logic [BW-1:0]  beat_q;
  resp_e          resp_q;
  logic           arr_valid_q;
  arr_op_e        arr_op_q;
  ref_mask_t      arr_refs_q;
  logic [CW-1:0]  arr_start_q;
  logic [CW-1:0]  arr_count_q;

  wire last_beat = (beat_q == BW'(BEATS - 1));
  wire is_write  = (op_q == HOST_WRITE) || (op_q == HOST_REWRITE);

  assign cur_wl         = wl_q;
  assign cur_addr       = addr_q;
  assign arr_valid      = arr_valid_q;
  assign arr_op         = arr_op_q;
  assign arr_refs       = arr_refs_q;
  assign arr_cell_start = arr_start_q;
  assign arr_cell_count = arr_count_q;
  assign resp_code      = resp_q;
  assign rewrite        = (op_q == HOST_REWRITE);

  // Pair index of the current beat within the wordline.
  logic [PW-1:0] pair_base;
  logic [PW-1:0] pair_step;
  always_comb begin
    pair_base = PW'(atc_start >> 1);
    pair_step = (atc_layer == 2'd1) ? PW'(LANES / 2) : PW'(LANES);
    pb_pair   = pair_base + PW'(beat_q) * pair_step;
  end

  always_comb begin
    cmd_ready  = (state_q == S_IDLE);
    wr_ready   = (state_q == S_W_BEAT);
    rd_valid   = (state_q == S_R_BEAT) || (state_q == S_R_ZERO);
    rd_zero    = (state_q == S_R_ZERO);
    resp_valid = (state_q == S_RESP);
    pb_rd_en   = (state_q == S_W_LOAD) || (state_q == S_R_LOAD);
    pb_wr_en   = (state_q == S_W_BEAT) && wr_valid;
    ml_upd_en  = (state_q == S_WAIT_PROG) && arr_done && (op_q == HOST_WRITE);
    ml_clr_en  = (state_q == S_WAIT_ERASE) && arr_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      op_q        <= HOST_READ;
      wl_q        <= '0;
      addr_q      <= '0;
      beat_q      <= '0;
      resp_q      <= RESP_OK;
      arr_valid_q <= 1'b0;
      arr_op_q    <= ARR_SENSE;
      arr_refs_q  <= '0;
      arr_start_q <= '0;
      arr_count_q <= '0;
    end else begin
      arr_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          op_q    <= cmd_op;
          wl_q    <= cmd_wl;
          addr_q  <= cmd_addr;
          beat_q  <= '0;
          state_q <= S_CHECK;
        end
        S_CHECK: begin
          arr_start_q <= atc_start;
          arr_count_q <= atc_count;
          if (op_q == HOST_ERASE) begin
            arr_valid_q <= 1'b1;
            arr_op_q    <= ARR_ERASE;
            arr_refs_q  <= '0;
            state_q     <= S_WAIT_ERASE;
          end else if (!atc_valid) begin
            resp_q  <= RESP_ADDR_ERR;
            state_q <= S_RESP;
          end else if (op_q == HOST_WRITE) begin
            if (!write_allowed) begin
              resp_q  <= RESP_ORDER_ERR;
              state_q <= S_RESP;
            end else if (atc_layer != 2'd1) begin
              arr_valid_q <= 1'b1;
              arr_op_q    <= ARR_SENSE;
              arr_refs_q  <= prewrite_refs;
              state_q     <= S_WAIT_SENSE;
            end else begin
              state_q <= S_W_LOAD;
            end
          end else if (op_q == HOST_REWRITE) begin
            if (!written) begin
              resp_q  <= RESP_ORDER_ERR;
              state_q <= S_RESP;
            end else begin
              arr_valid_q <= 1'b1;
              arr_op_q    <= ARR_SENSE;
              arr_refs_q  <= prewrite_refs;
              state_q     <= S_WAIT_SENSE;
            end
          end else if (!written) begin
            state_q <= S_R_ZERO;
          end else begin
            arr_valid_q <= 1'b1;
            arr_op_q    <= ARR_SENSE;
            arr_refs_q  <= read_refs;
            state_q     <= S_WAIT_SENSE;
          end
        end
        S_WAIT_SENSE: if (arr_done) state_q <= is_write ? S_W_LOAD : S_R_LOAD;
        S_W_LOAD: state_q <= S_W_BEAT;
        S_W_BEAT: if (wr_valid) begin
          if (last_beat) begin
            arr_valid_q <= 1'b1;
            arr_op_q    <= rewrite ? ARR_REWRITE : ARR_PROGRAM;
            arr_refs_q  <= '0;
            state_q     <= S_WAIT_PROG;
          end else begin
            beat_q  <= beat_q + 1'b1;
            state_q <= S_W_LOAD;
          end
        end
        S_WAIT_PROG: if (arr_done) begin
          resp_q  <= RESP_OK;
          state_q <= S_RESP;
        end
        S_R_LOAD: state_q <= S_R_BEAT;
        S_R_BEAT: if (rd_ready) begin
          if (last_beat) begin
            resp_q  <= RESP_OK;
            state_q <= S_RESP;
          end else begin
            beat_q  <= beat_q + 1'b1;
            state_q <= S_R_LOAD;
          end
        end
        S_R_ZERO: if (rd_ready) begin
          if (last_beat) begin
            resp_q  <= RESP_OK;
            state_q <= S_RESP;
          end else begin
            beat_q <= beat_q + 1'b1;
          end
        end
        S_WAIT_ERASE: if (arr_done) begin
          resp_q  <= RESP_OK;
          state_q <= S_RESP;
        end
        S_RESP: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The array answers only an operation that is outstanding.
  a_done_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    arr_done |-> (state_q inside {S_WAIT_SENSE, S_WAIT_PROG, S_WAIT_ERASE}));
  // An array request is never issued while a write or read beat is in flight.
  a_req_single: assert property (@(posedge clk) disable iff (!rst_n)
    arr_valid |-> (state_q inside {S_WAIT_SENSE, S_WAIT_PROG, S_WAIT_ERASE}));

endmodule

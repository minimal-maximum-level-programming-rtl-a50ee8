// mlc_array_model: behavioural model of a 4-level-cell flash array with a page
// buffer, for simulation only (not synthesizable logic).
//
// It holds NUM_WL wordlines of 2*SECTOR_BITS cells and one page buffer of the
// same width. Operations start on a one-cycle arr_valid and finish with a
// one-cycle arr_done after the modelled latency, in clock cycles of 1 us:
//   sense    load the page buffer over [start, start+count) with each cell's
//            quantized level (highest sensed reference it reaches, else 0);
//            latency = number of references * T_VFY.
//   program  raise each cell in the range to the page buffer's level. Pulses
//            needed = max over raised cells of NP(target) - NP(current), with
//            NP(0..3) = 0, NP1, NP2, NP3 pulses from the erased level; each
//            pulse is followed by one verify per distinct target level, so
//            latency = pulses * (T_PULSE + targets * T_VFY). Lowering a cell
//            is impossible and is counted in lower_errors.
//   erase    every cell of the wordline to level 0, T_ERASE cycles.
//   rewrite  (phase-change array) set each cell of the range to the page
//            buffer's level, lowering cells where needed. A changed cell is
//            reset and then programmed up from level 0, so latency = T_PULSE
//            + pulses * (T_PULSE + targets * T_VFY), with pulses the largest
//            NP(target) of the changed cells. This timing is the model's own
//            choice. last_moves marks which level transitions
//            happened (bit 4*from+to); last_changed counts the changed cells
//            and last_chg_lo/last_chg_hi bound their indices.
// The page buffer is read LANES cell pairs at a time (data on the cycle after
// pb_rd_en, held until the next read) and written with a lane mask.
// last_latency, last_pulses and last_targets describe the last operation.
// Pulse counts and pulse/verify times are those of the document's flash
// timing table; the erase time is this model's own.
module mlc_array_model
  import mmlp_pkg::*;
#(
  parameter int unsigned NUM_WL      = 64,
  parameter int unsigned SECTOR_BITS = 32768,
  parameter int unsigned LANES       = 8,
  parameter int unsigned T_PULSE     = 10,
  parameter int unsigned T_VFY       = 10,
  parameter int unsigned NP1         = 10,
  parameter int unsigned NP2         = 20,
  parameter int unsigned NP3         = 40,
  parameter int unsigned T_ERASE     = 100,
  localparam int unsigned WL_CELLS   = 2 * SECTOR_BITS,
  localparam int unsigned CW         = $clog2(WL_CELLS + 1),
  localparam int unsigned PW         = $clog2(WL_CELLS / 2),
  localparam int unsigned WLW        = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   arr_valid,
  input  arr_op_e                arr_op,
  input  logic [WLW-1:0]         arr_wl,
  input  ref_mask_t              arr_refs,
  input  logic [CW-1:0]          arr_cell_start,
  input  logic [CW-1:0]          arr_cell_count,
  output logic                   arr_done,
  input  logic                   pb_rd_en,
  input  logic [PW-1:0]          pb_pair,
  output cell_pair_t [LANES-1:0] pb_rdata,
  input  logic                   pb_wr_en,
  input  logic [LANES-1:0]       pb_wmask,
  input  cell_pair_t [LANES-1:0] pb_wdata,
  output int unsigned            last_latency,
  output int unsigned            last_pulses,
  output int unsigned            last_targets,
  output int unsigned            lower_errors,
  output logic [15:0]            last_moves,
  output int unsigned            last_changed,
  output int unsigned            last_chg_lo,
  output int unsigned            last_chg_hi
);

  level_t      cells [NUM_WL][WL_CELLS];
  level_t      pbuf  [WL_CELLS];
  int unsigned busy;

  function automatic int unsigned np(level_t l);
    case (l)
      2'd1:    return NP1;
      2'd2:    return NP2;
      2'd3:    return NP3;
      default: return 0;
    endcase
  endfunction

  function automatic level_t quantize(level_t l, ref_mask_t r);
    if (r[3] && l >= 2'd3) return 2'd3;
    if (r[2] && l >= 2'd2) return 2'd2;
    if (r[1] && l >= 2'd1) return 2'd1;
    return 2'd0;
  endfunction

  initial begin
    for (int w = 0; w < NUM_WL; w++)
      for (int c = 0; c < WL_CELLS; c++) cells[w][c] = 2'd0;
    for (int c = 0; c < WL_CELLS; c++) pbuf[c] = 2'd0;
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 0;
      arr_done     <= 1'b0;
      last_latency <= 0;
      last_pulses  <= 0;
      last_targets <= 0;
      lower_errors <= 0;
      last_moves   <= '0;
      last_changed <= 0;
      last_chg_lo  <= 0;
      last_chg_hi  <= 0;
      pb_rdata     <= '0;
    end else begin
      arr_done <= 1'b0;
      if (busy == 1) arr_done <= 1'b1;
      if (busy != 0) busy <= busy - 1;

      if (arr_valid) begin
        int unsigned lat, pulses, ntgt, pl, nchg, lo, hi;
        logic [3:0]  tgt_seen;
        logic [15:0] moves;
        lat = 1; pulses = 0; ntgt = 0; tgt_seen = '0;
        nchg = 0; lo = WL_CELLS; hi = 0; moves = '0;
        unique case (arr_op)
          ARR_SENSE: begin
            for (int unsigned c = arr_cell_start; c < arr_cell_start + arr_cell_count; c++)
              pbuf[c] = quantize(cells[arr_wl][c], arr_refs);
            lat = ref_count(arr_refs) * T_VFY;
          end
          ARR_PROGRAM: begin
            for (int unsigned c = arr_cell_start; c < arr_cell_start + arr_cell_count; c++) begin
              if (pbuf[c] < cells[arr_wl][c]) begin
                lower_errors <= lower_errors + 1;
              end else if (pbuf[c] > cells[arr_wl][c]) begin
                pl = np(pbuf[c]) - np(cells[arr_wl][c]);
                if (pl > pulses) pulses = pl;
                tgt_seen[pbuf[c]] = 1'b1;
                cells[arr_wl][c] = pbuf[c];
              end
            end
            ntgt = $countones(tgt_seen);
            lat  = pulses * (T_PULSE + ntgt * T_VFY);
          end
          ARR_REWRITE: begin
            for (int unsigned c = arr_cell_start; c < arr_cell_start + arr_cell_count; c++) begin
              if (pbuf[c] != cells[arr_wl][c]) begin
                moves[4 * int'(cells[arr_wl][c]) + int'(pbuf[c])] = 1'b1;
                nchg++;
                if (c < lo) lo = c;
                if (c > hi) hi = c;
                if (np(pbuf[c]) > pulses) pulses = np(pbuf[c]);
                tgt_seen[pbuf[c]] = 1'b1;
                cells[arr_wl][c] = pbuf[c];
              end
            end
            ntgt = $countones(tgt_seen);
            lat  = (nchg == 0) ? 1 : T_PULSE + pulses * (T_PULSE + ntgt * T_VFY);
          end
          ARR_ERASE: begin
            for (int c = 0; c < WL_CELLS; c++) cells[arr_wl][c] = 2'd0;
            lat = T_ERASE;
          end
          default: ;
        endcase
        if (lat == 0) lat = 1;
        busy         <= lat;
        last_latency <= lat;
        last_pulses  <= pulses;
        last_targets <= ntgt;
        last_moves   <= moves;
        last_changed <= nchg;
        last_chg_lo  <= lo;
        last_chg_hi  <= hi;
      end

      if (pb_rd_en)
        for (int i = 0; i < LANES; i++)
          pb_rdata[i] <= '{cell_a: pbuf[2*(int'(pb_pair)+i)], cell_b: pbuf[2*(int'(pb_pair)+i)+1]};
      if (pb_wr_en)
        for (int i = 0; i < LANES; i++)
          if (pb_wmask[i]) begin
            pbuf[2*(int'(pb_pair)+i)]   = pb_wdata[i].cell_a;
            pbuf[2*(int'(pb_pair)+i)+1] = pb_wdata[i].cell_b;
          end
    end
  end

endmodule

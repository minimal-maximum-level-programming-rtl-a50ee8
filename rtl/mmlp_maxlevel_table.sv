// mmlp_maxlevel_table: the MaxLevel metadata of MMLP, one entry per wordline.
//
// Each entry holds the highest layer written to the wordline since its last
// erase (0 = empty, 1..3). Reading it before an access lets the controller
// skip reference comparisons above that level. Reads are combinational, the
// update is registered: an update raises the entry to max(entry, level), so
// the table never forgets a higher layer; clear returns an entry to 0 when the
// wordline is erased. Reset clears every entry. Clear wins over update when
// both address the same entry in one cycle.
module mmlp_maxlevel_table #(
  parameter int unsigned NUM_WL = 64,
  localparam int unsigned WLW   = (NUM_WL > 1) ? $clog2(NUM_WL) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [WLW-1:0] rd_wl,
  output logic [1:0]     rd_level,
  input  logic           upd_en,
  input  logic [WLW-1:0] upd_wl,
  input  logic [1:0]     upd_level,
  input  logic           clr_en,
  input  logic [WLW-1:0] clr_wl
);

  logic [1:0] level_q [NUM_WL];

  assign rd_level = level_q[rd_wl];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_WL; i++) level_q[i] <= 2'd0;
    end else begin
      if (upd_en && upd_level > level_q[upd_wl]) level_q[upd_wl] <= upd_level;
      if (clr_en) level_q[clr_wl] <= 2'd0;
    end
  end

endmodule

// rc_tag_array: tag and valid store of the reconfigurable cache in its
// direct-mapped cache mode.
//
// One entry per 128-bit block (LUT_ROWS * LUT_LINES = 512 entries). A lookup
// compares the stored tag of the indexed block with the request's tag; the
// hit output is combinational. An update writes a tag and a valid bit on the
// clock edge. "flush" clears every valid bit in one cycle; the module
// uses it when the data array is turned into a function unit, since the
// LUT contents then no longer hold cached data. Tags live apart from the
// LUT array, as in the design, which leaves them out of the function-unit
// datapath; the entry format and the single-cycle flush are this
// implementation's choices.
//
// rst_n (active low, synchronous) clears all valid bits.
module rc_tag_array
  import rc_pkg::*;
#(
  parameter int unsigned TAG_W = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        flush,
  input  logic [ROW_AW+LINE_AW-1:0]   lk_index,
  input  logic [TAG_W-1:0]            lk_tag,
  output logic                        lk_hit,
  input  logic                        upd_en,
  input  logic [ROW_AW+LINE_AW-1:0]   upd_index,
  input  logic [TAG_W-1:0]            upd_tag,
  input  logic                        upd_valid
);

  localparam int unsigned ENTRIES = LUT_ROWS * LUT_LINES;

  logic [TAG_W-1:0]   tags  [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      valid <= '0;
    end else if (upd_en) begin
      valid[upd_index] <= upd_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en) tags[upd_index] <= upd_tag;
  end

  assign lk_hit = valid[lk_index] && (tags[lk_index] == lk_tag);

endmodule

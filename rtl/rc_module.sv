// rc_module: the reconfigurable cache module (RC): an 8 KB direct-mapped
// cache whose LUT-organised data array can instead run as a convolution
// (FIR) unit or as an 8-point DCT/IDCT unit.
//
// Both functions are wired to the same LUT array with their own fixed
// interconnect (multi-context module); "mode" selects which one drives the
// LUT inputs:
//   MODE_CACHE  the LUT inputs take the block-address bits (memory mode);
//               tags are looked up and c_hit reports a hit.
//   MODE_FIR    eight fir_stage taps on rows 4s..4s+3 (s = 0..7), chained
//               x and y; the chain is a systolic 8-tap filter.
//   MODE_DCT /  dct_unit on rows 0..19; rows 20..31 stay idle.
//   MODE_IDCT
// Leaving cache mode flushes the tags (all valid bits cleared), because the
// array is then overwritten with LUT contents. Write-back of dirty data
// before that is the host's job and not modelled here.
//
// Cache port (one access per cycle, word addressed):
//   c_addr splits into {tag, lut_row, lut_line, word}. Reads are
//   combinational: c_rdata, and c_hit in cache mode.
//   c_we with c_cfg = 0 stores a word and marks its block valid with the
//   address tag (the host fills a whole block on a miss).
//   c_we with c_cfg = 1 writes the raw array (configuration of LUT contents),
//   works in every mode and invalidates the block.
// FIR port: fir_x_in/fir_y_in enter tap 0 when fir_en is high; fir_y_out is
// the registered result of tap 7, 8 enabled cycles after its sample.
// DCT port: see dct_unit.
//
// Lint note: verilator reports the LUT input array (lut_in) as a
// combinational loop (UNOPTFLAT). Within a tap, the output of one LUT row
// forms the input address of the next row, so the array variable appears on
// both sides of the same combinational path, although no single element
// depends on itself. The warning is about simulation speed only and stands.
module rc_module
  import rc_pkg::*;
#(
  parameter int unsigned ADDR_W = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rc_mode_e             mode,
  // cache / configuration port
  input  logic [ADDR_W-1:0]    c_addr,
  input  logic                 c_we,
  input  logic                 c_cfg,
  input  logic [WORD_W-1:0]    c_wdata,
  output logic [WORD_W-1:0]    c_rdata,
  output logic                 c_hit,
  // convolution function port
  input  logic                 fir_en,
  input  logic [FIR_X_W-1:0]   fir_x_in,
  input  logic [FIR_Y_W-1:0]   fir_y_in,
  output logic [FIR_Y_W-1:0]   fir_y_out,
  // DCT/IDCT function port
  input  logic                 dct_in_valid,
  output logic                 dct_in_ready,
  input  logic [DCT_WD-1:0]    dct_in_data,
  output logic                 dct_out_valid,
  output logic [DCT_ACC_W-1:0] dct_out_data,
  output logic                 dct_busy
);

  localparam int unsigned TAG_W = ADDR_W - ARR_AW;

  // ---- data array ---------------------------------------------------------
  lut_addr_t lut_in  [LUT_ROWS][LUTS_PER_ROW];
  lut_word_t lut_out [LUT_ROWS][LUTS_PER_ROW];
  logic      mem_mode;

  assign mem_mode = (mode == MODE_CACHE);

  rc_lut_array u_array (
    .clk(clk), .mem_mode(mem_mode), .lut_in(lut_in), .lut_out(lut_out),
    .c_addr(c_addr[ARR_AW-1:0]), .c_we(c_we), .c_wdata(c_wdata),
    .c_rdata(c_rdata)
  );

  // ---- tags -----------------------------------------------------------------
  logic [ROW_AW+LINE_AW-1:0] blk_index;
  logic [TAG_W-1:0]          a_tag;
  logic                      lk_hit;

  assign blk_index = c_addr[ARR_AW-1:WSEL_AW];
  assign a_tag     = c_addr[ADDR_W-1:ARR_AW];

  rc_tag_array #(.TAG_W(TAG_W)) u_tags (
    .clk(clk), .rst_n(rst_n), .flush(!mem_mode),
    .lk_index(blk_index), .lk_tag(a_tag), .lk_hit(lk_hit),
    .upd_en(c_we), .upd_index(blk_index), .upd_tag(a_tag),
    .upd_valid(!c_cfg && mem_mode)
  );

  assign c_hit = lk_hit && mem_mode;

  // ---- convolution: eight taps ------------------------------------------
  logic [FIR_X_W-1:0] fx [FIR_STAGES+1];
  logic [FIR_Y_W-1:0] fy [FIR_STAGES+1];
  lut_addr_t          fir_addr [LUT_ROWS][LUTS_PER_ROW];
  logic               fir_run;

  assign fir_run = fir_en && (mode == MODE_FIR);
  assign fx[0]   = fir_x_in;
  assign fy[0]   = fir_y_in;

  for (genvar s = 0; s < FIR_STAGES; s++) begin : g_tap
    lut_addr_t st_addr [FIR_ROWS_PER_ST][LUTS_PER_ROW];
    lut_word_t st_data [FIR_ROWS_PER_ST][LUTS_PER_ROW];

    always_comb begin
      for (int r = 0; r < FIR_ROWS_PER_ST; r++)
        for (int j = 0; j < LUTS_PER_ROW; j++) begin
          st_data[r][j] = lut_out[FIR_ROWS_PER_ST*s+r][j];
          fir_addr[FIR_ROWS_PER_ST*s+r][j] = st_addr[r][j];
        end
    end

    fir_stage u_stage (
      .clk(clk), .rst_n(rst_n), .en(fir_run),
      .x_in(fx[s]), .y_in(fy[s]), .x_out(fx[s+1]), .y_out(fy[s+1]),
      .lut_addr(st_addr), .lut_data(st_data)
    );
  end

  assign fir_y_out = fy[FIR_STAGES];

  // ---- DCT / IDCT -----------------------------------------------------------
  lut_addr_t dct_addr [20][LUTS_PER_ROW];
  lut_word_t dct_data [20][LUTS_PER_ROW];
  logic      dct_mode;

  assign dct_mode = (mode == MODE_DCT) || (mode == MODE_IDCT);

  always_comb
    for (int r = 0; r < 20; r++)
      for (int j = 0; j < LUTS_PER_ROW; j++) dct_data[r][j] = lut_out[r][j];

  dct_unit u_dct (
    .clk(clk), .rst_n(rst_n), .idct(mode == MODE_IDCT),
    .in_valid(dct_in_valid && dct_mode), .in_ready(dct_in_ready),
    .in_data(dct_in_data), .out_valid(dct_out_valid),
    .out_data(dct_out_data), .busy(dct_busy),
    .lut_addr(dct_addr), .lut_data(dct_data)
  );

  // ---- function-mode LUT input selection (fixed interconnect per context) --
  always_comb begin
    for (int r = 0; r < LUT_ROWS; r++)
      for (int j = 0; j < LUTS_PER_ROW; j++)
        lut_in[r][j] = (mode == MODE_FIR) ? fir_addr[r][j] : '0;
    if (dct_mode)
      for (int r = 0; r < 20; r++)
        for (int j = 0; j < LUTS_PER_ROW; j++) lut_in[r][j] = dct_addr[r][j];
  end

endmodule

// rc_lut_array: data array of the reconfigurable cache, organised as a
// two-dimensional matrix of multi-bit output 4-LUTs.
//
// There are LUT_ROWS rows of LUTS_PER_ROW LUTs; each LUT is LUT_LINES lines of
// LUT_W bits and has its own 4-to-16 row decoder, so every LUT can be read at
// its own 4-bit address in the same cycle (function-unit mode). In memory
// mode ("mem_mode" high) the 4-bit input of every LUT is taken from the four
// least significant block-address bits instead, so each LUT row puts one
// 128-bit block on its local bit lines; the upper address bits then pick
// which row drives the global bit lines, and the column decoder at the end
// of the global bit lines selects one 16-bit word. This is the decoding
// scheme of the design; the bit-interleaved word placement is described in
// rc_pkg.
//
// Interface and timing:
//   lut_in/lut_out  per-LUT address and local output; reads are
//                   combinational (asynchronous), like an SRAM read within
//                   one pipeline cycle.
//   c_addr          word address {row, line, word}; c_rdata is combinational.
//   c_we/c_wdata    word write on the rising clock edge. Writes go through
//                   the global bit lines and work in every mode, which is how
//                   LUT contents (configuration) are loaded.
// The array has no reset: contents are undefined until written.
module rc_lut_array
  import rc_pkg::*;
(
  input  logic                 clk,
  input  logic                 mem_mode,
  input  lut_addr_t            lut_in  [LUT_ROWS][LUTS_PER_ROW],
  output lut_word_t            lut_out [LUT_ROWS][LUTS_PER_ROW],
  input  logic [ARR_AW-1:0]    c_addr,
  input  logic                 c_we,
  input  logic [WORD_W-1:0]    c_wdata,
  output logic [WORD_W-1:0]    c_rdata
);

  lut_word_t mem [LUT_ROWS][LUTS_PER_ROW][LUT_LINES];

  logic [ROW_AW-1:0]  a_row;
  logic [LINE_AW-1:0] a_line;
  logic [WSEL_AW-1:0] a_word;
  assign {a_row, a_line, a_word} = c_addr;

  // Word write: word a_word contributes bits 2k, 2k+1 to LUT k (entry bits
  // 2*a_word and 2*a_word+1).
  always_ff @(posedge clk) begin
    if (c_we) begin
      for (int k = 0; k < LUTS_PER_ROW; k++) begin
        mem[a_row][k][a_line][2*a_word]   <= c_wdata[2*k];
        mem[a_row][k][a_line][2*a_word+1] <= c_wdata[2*k+1];
      end
    end
  end

  // Per-LUT decoders with the memory-mode input multiplexer.
  always_comb begin
    for (int r = 0; r < LUT_ROWS; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++)
        lut_out[r][k] = mem[r][k][mem_mode ? a_line : lut_in[r][k]];
  end

  // Higher-bit decoder selects the row onto the global bit lines, then the
  // column decoder picks one word out of the interleaved block.
  lut_word_t glob [LUTS_PER_ROW];
  always_comb begin
    for (int k = 0; k < LUTS_PER_ROW; k++) glob[k] = lut_out[a_row][k];
    for (int k = 0; k < LUTS_PER_ROW; k++) begin
      c_rdata[2*k]   = glob[k][2*a_word];
      c_rdata[2*k+1] = glob[k][2*a_word+1];
    end
  end

endmodule

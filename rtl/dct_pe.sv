// dct_pe: one distributed-arithmetic processing element of the DCT/IDCT
// function unit, mapped onto two LUT rows.
//
// A 1-D transform output is an inner product y = sum_i a_i * x_i of four
// inputs with fixed cosine weights. The inputs arrive bit-serially, least
// significant bit first, one bit of each of the four inputs per cycle. Those
// four bits address a 16-entry ROM holding every partial sum of the weights,
// and a shift-accumulator adds the ROM word to half the running sum:
//   acc <= (first ? 0 : acc >>> 1) + ROM[bits]     for the magnitude bits,
//   acc <= (acc >>> 1) - ROM[bits]                 for the sign bit ("sub").
// After the last (sign) bit the accumulator holds sum_i a_i * x_i / 2^(B-1),
// with B the serial word length, in two's complement (the scaling is set by
// the ROM contents).
//
// LUT placement: ROM = LUT 3 of the first row (16 lines x 16 bits, the middle
// of the row as in the design); second row = 16-bit adder/subtracter of
// eight 2-bit adder LUTs with an add context and a subtract context, picked
// by "sub" together with the carry-in. Other LUTs of the first row are unused.
//
// Timing: one bit per clock when "en" is high. rst_n (active low, synchronous)
// clears the accumulator.
module dct_pe
  import rc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 first,
  input  logic                 sub,
  input  logic [3:0]           bits,
  output logic [DCT_ACC_W-1:0] acc,
  output lut_addr_t            lut_addr [2][LUTS_PER_ROW],
  input  lut_word_t            lut_data [2][LUTS_PER_ROW]
);

  logic [DCT_ACC_W-1:0] rom, half, s;
  lut_addr_t            add_addr [LUTS_PER_ROW];
  lut_word_t            add_data [LUTS_PER_ROW];
  logic                 cout;

  assign rom  = lut_data[0][DCT_ROM_LUT];
  assign half = first ? '0 : DCT_ACC_W'($signed(acc) >>> 1);

  lut_cs_adder #(.NLUT(LUTS_PER_ROW)) u_acc_add (
    .a(half), .b(rom), .ctx_sub(sub), .cin(sub),
    .lut_addr(add_addr), .lut_data(add_data), .sum(s), .cout(cout)
  );

  always_comb begin
    for (int k = 0; k < LUTS_PER_ROW; k++) begin
      lut_addr[0][k] = '0;
      lut_addr[1][k] = add_addr[k];
      add_data[k]    = lut_data[1][k];
    end
    lut_addr[0][DCT_ROM_LUT] = bits;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= s;
  end

  // Two's complement accumulation wraps; the carry out is not needed.
  logic unused_cout;
  assign unused_cout = cout;

endmodule

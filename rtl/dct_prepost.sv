// dct_prepost: the pre-adders/subtracters (forward DCT) or post-adders/
// subtracters (inverse DCT) of the DCT/IDCT function unit, on four LUT rows.
//
// The even/odd symmetry of the 8-point cosine transform needs, for i = 0..3,
// both a_i + b_i and a_i - b_i of the same operand pair. Each pair is one
// LUT row of eight 2-bit adder LUTs with 12-bit multi-context entries: a
// single read of a LUT returns the add candidates (bits 5:0) and the
// subtract candidates (bits 11:6), and two carry-select chains, one with
// carry-in 0 on the add context and one with carry-in 1 on the subtract
// context, produce the sum and the difference at the same time.
// Forward DCT: a_i = x_i, b_i = x_(7-i). Inverse DCT: a_i = even-part result
// E_i, b_i = odd-part result O_i; the caller does that routing.
//
// Combinational; 16-bit two's complement, results wrap.
module dct_prepost
  import rc_pkg::*;
(
  input  logic [DCT_ACC_W-1:0] a    [4],
  input  logic [DCT_ACC_W-1:0] b    [4],
  output logic [DCT_ACC_W-1:0] sum  [4],
  output logic [DCT_ACC_W-1:0] diff [4],
  output lut_addr_t            lut_addr [4][LUTS_PER_ROW],
  input  lut_word_t            lut_data [4][LUTS_PER_ROW]
);

  for (genvar r = 0; r < 4; r++) begin : g_row
    lut_addr_t addr_add [LUTS_PER_ROW];
    lut_addr_t addr_sub [LUTS_PER_ROW];
    lut_word_t data     [LUTS_PER_ROW];
    logic      co_add, co_sub;

    always_comb
      for (int k = 0; k < LUTS_PER_ROW; k++) data[k] = lut_data[r][k];

    lut_cs_adder #(.NLUT(LUTS_PER_ROW)) u_add (
      .a(a[r]), .b(b[r]), .ctx_sub(1'b0), .cin(1'b0),
      .lut_addr(addr_add), .lut_data(data), .sum(sum[r]), .cout(co_add)
    );
    lut_cs_adder #(.NLUT(LUTS_PER_ROW)) u_sub (
      .a(a[r]), .b(b[r]), .ctx_sub(1'b1), .cin(1'b1),
      .lut_addr(addr_sub), .lut_data(data), .sum(diff[r]), .cout(co_sub)
    );

    // Both chains address the LUTs with the same {b, a} bits; the add
    // chain's addresses drive the row.
    always_comb
      for (int k = 0; k < LUTS_PER_ROW; k++) lut_addr[r][k] = addr_add[k];

    logic unused;
    assign unused = co_add ^ co_sub ^ (addr_sub[0] != addr_add[0]);
  end

endmodule

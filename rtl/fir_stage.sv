// fir_stage: one tap of the convolution (FIR) function unit, mapped onto four
// LUT rows of the reconfigurable cache.
//
// Datapath (one clock per stage): y_out = y_in + c * x_in, where c is the
// 8-bit tap coefficient held in the LUT contents. The input sample is
// delayed by two registers per stage ("double pipelined"), the partial sum
// by one, which makes a chain of stages a systolic FIR filter:
// y leaving stage S-1 at cycle t is sum_j c_j * x(t - S - j).
//
// LUT placement, row by row (22 of the 32 LUTs are used):
//   row 0: LUT0/LUT1 = c * x[3:0], low/high six product bits (part 1/2);
//          LUT2/LUT3 = c * x[7:4], part 1/2; LUTs 4..7 unused.
//   row 1: LUTs 0..5 = 12-bit carry-select adder that combines the two
//          4x8 products: (c*x[3:0] >> 4) + c*x[7:4].
//   row 2: LUTs 0..5 = bits 11:0 of the 24-bit accumulate adder.
//   row 3: LUTs 0..5 = bits 23:12 of the 24-bit accumulate adder.
// The placement, the 6-bit split of the 4x8 multiplier tables and the adder
// widths follow the design; the unsigned treatment of samples and
// coefficients is this implementation's choice.
//
// Interface: lut_addr/lut_data connect to the stage's four rows (combinational
// reads). "en" advances the pipeline registers; rst_n (active low,
// synchronous) clears them.
module fir_stage
  import rc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [FIR_X_W-1:0] x_in,
  input  logic [FIR_Y_W-1:0] y_in,
  output logic [FIR_X_W-1:0] x_out,
  output logic [FIR_Y_W-1:0] y_out,
  output lut_addr_t          lut_addr [FIR_ROWS_PER_ST][LUTS_PER_ROW],
  input  lut_word_t          lut_data [FIR_ROWS_PER_ST][LUTS_PER_ROW]
);

  // ---- row 0: two 4x8 constant-coefficient multipliers -------------------
  logic [11:0] p_lo, p_hi;
  assign p_lo = {lut_data[0][1][5:0], lut_data[0][0][5:0]};
  assign p_hi = {lut_data[0][3][5:0], lut_data[0][2][5:0]};

  // ---- row 1: 12-bit adder -----------------------------------------------
  lut_addr_t   a12_addr [6];
  lut_word_t   a12_data [6];
  logic [11:0] s12;
  logic        c12;

  lut_cs_adder #(.NLUT(6)) u_add12 (
    .a(12'(p_lo[11:4])), .b(p_hi), .ctx_sub(1'b0), .cin(1'b0),
    .lut_addr(a12_addr), .lut_data(a12_data), .sum(s12), .cout(c12)
  );

  logic [FIR_P_W-1:0] prod;
  assign prod = {s12, p_lo[3:0]};

  // ---- rows 2 and 3: 24-bit accumulate adder -----------------------------
  lut_addr_t          a24_addr [12];
  lut_word_t          a24_data [12];
  logic [FIR_Y_W-1:0] s24;
  logic               c24;

  lut_cs_adder #(.NLUT(12)) u_add24 (
    .a(y_in), .b(FIR_Y_W'(prod)), .ctx_sub(1'b0), .cin(1'b0),
    .lut_addr(a24_addr), .lut_data(a24_data), .sum(s24), .cout(c24)
  );

  // ---- LUT address and data routing --------------------------------------
  always_comb begin
    for (int r = 0; r < FIR_ROWS_PER_ST; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++)
        lut_addr[r][k] = '0;
    lut_addr[0][0] = x_in[3:0];
    lut_addr[0][1] = x_in[3:0];
    lut_addr[0][2] = x_in[7:4];
    lut_addr[0][3] = x_in[7:4];
    for (int k = 0; k < 6; k++) begin
      lut_addr[1][k] = a12_addr[k];
      a12_data[k]    = lut_data[1][k];
      lut_addr[2][k] = a24_addr[k];
      a24_data[k]    = lut_data[2][k];
      lut_addr[3][k] = a24_addr[6+k];
      a24_data[6+k]  = lut_data[3][k];
    end
  end

  // ---- pipeline registers ------------------------------------------------
  logic [FIR_X_W-1:0] x_d1;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_d1  <= '0;
      x_out <= '0;
      y_out <= '0;
    end else if (en) begin
      x_d1  <= x_in;
      x_out <= x_d1;
      y_out <= s24;
    end
  end

  // Carries out of the 12- and 24-bit adders are dropped: 8x8 products fit
  // in 16 bits and 256 taps of 16-bit products fit in 24 bits.
  logic unused_carry;
  assign unused_carry = c12 ^ c24;

endmodule

// dct_unit: 8-point 1-D DCT/IDCT function unit built on 20 LUT rows of the
// reconfigurable cache, using distributed arithmetic.
//
// Forward DCT: a row x_0..x_7 (WD-bit two's complement) is loaded one word
// per cycle. The four pre-adder/subtracter rows form s_i = x_i + x_(7-i) and
// d_i = x_i - x_(7-i) (i = 0..3, WD+1 bits), which go into the input shift
// registers. For WD+1 cycles the shift registers broadcast one bit of each
// value per cycle, least significant first: s_0..s_3 to PEs 0..3 and
// d_0..d_3 to PEs 4..7. Each PE's ROM holds the partial sums of its cosine
// row, so PE j yields X(2j) and PE 4+j yields X(2j+1).
// Inverse DCT: the even inputs X0,X2,X4,X6 go to PEs 0..3 and the odd ones
// to PEs 4..7, no pre-process; the PEs give the even and odd parts E_j, O_j
// and the same four rows, now as post-adders/subtracters, give
// y_j = E_j + O_j and y_(7-j) = E_j - O_j.
//
// Double buffering: while the PEs work on one row (in the shift registers)
// the next row is collected in the load register, and the previous result is
// streamed out of the output register one 16-bit word per cycle. A row thus
// takes WD+1 = 9 cycles once the pipeline is full, as in the design's
// N + Wd*N cycles per 8-row 1-D transform. Bit-serial inputs, ROM-and-
// shift-accumulate PEs, pre/post adders and double input/output registers
// follow the design; the word-serial load/unload ports and the output order
// (X0..X7 or y0..y7) are this implementation's choices.
//
// Rows used: PE k on rows 2k (ROM at LUT 3) and 2k+1 (adder/subtracter),
// pre/post-process on rows 16..19.
//
// Interface:
//   idct             0 = forward DCT, 1 = inverse; hold it while busy.
//   in_valid/in_ready, in_data   word-serial row input, 8 words per row.
//   out_valid, out_data          8 result words per row, one per cycle, no
//                                back-pressure.
//   busy             a row is being loaded, computed or unloaded.
module dct_unit
  import rc_pkg::*;
#(
  parameter int unsigned WD = DCT_WD
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 idct,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [WD-1:0]        in_data,
  output logic                 out_valid,
  output logic [DCT_ACC_W-1:0] out_data,
  output logic                 busy,
  output lut_addr_t            lut_addr [20][LUTS_PER_ROW],
  input  lut_word_t            lut_data [20][LUTS_PER_ROW]
);

  localparam int unsigned B = WD + 1;  // serial word length after pre-add
  localparam int unsigned N = DCT_N;

  // ---- load register ------------------------------------------------------
  logic [WD-1:0] ld_buf [N];
  logic [2:0]    ld_cnt;
  logic          ld_full;

  // ---- compute state ------------------------------------------------------
  logic [B-1:0]         sr [N];
  logic                 running;
  logic [$clog2(B)-1:0] k;
  logic                 last_bit, start_row, done_d;

  assign in_ready  = !ld_full;
  assign last_bit  = running && (k == ($clog2(B))'(B - 1));
  assign start_row = ld_full && (!running || last_bit);

  // ---- pre/post adders ----------------------------------------------------
  logic [DCT_ACC_W-1:0] pp_a [4], pp_b [4], pp_sum [4], pp_diff [4];
  logic [DCT_ACC_W-1:0] acc [N];
  lut_addr_t            pp_addr [4][LUTS_PER_ROW];
  lut_word_t            pp_data [4][LUTS_PER_ROW];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (idct) begin
        pp_a[i] = acc[i];
        pp_b[i] = acc[4+i];
      end else begin
        pp_a[i] = DCT_ACC_W'($signed(ld_buf[i]));
        pp_b[i] = DCT_ACC_W'($signed(ld_buf[N-1-i]));
      end
    end
  end

  dct_prepost u_pp (
    .a(pp_a), .b(pp_b), .sum(pp_sum), .diff(pp_diff),
    .lut_addr(pp_addr), .lut_data(pp_data)
  );

  // Values entering the input shift registers.
  logic [B-1:0] sr_next [N];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      if (idct) begin
        sr_next[i]   = B'($signed(ld_buf[2*i]));
        sr_next[4+i] = B'($signed(ld_buf[2*i+1]));
      end else begin
        sr_next[i]   = pp_sum[i][B-1:0];
        sr_next[4+i] = pp_diff[i][B-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_cnt  <= '0;
      ld_full <= 1'b0;
      running <= 1'b0;
      k       <= '0;
      done_d  <= 1'b0;
      for (int i = 0; i < N; i++) begin
        ld_buf[i] <= '0;
        sr[i]     <= '0;
      end
    end else begin
      done_d <= last_bit;
      if (in_valid && in_ready) begin
        ld_buf[ld_cnt] <= in_data;
        ld_cnt         <= ld_cnt + 3'd1;
        if (ld_cnt == 3'd7) ld_full <= 1'b1;
      end
      if (start_row) begin
        ld_full <= 1'b0;
        running <= 1'b1;
        k       <= '0;
        for (int i = 0; i < N; i++) sr[i] <= sr_next[i];
      end else if (running) begin
        k <= k + 1'b1;
        for (int i = 0; i < N; i++) sr[i] <= sr[i] >> 1;
        if (last_bit) running <= 1'b0;
      end
    end
  end

  // ---- processing elements ------------------------------------------------
  for (genvar p = 0; p < N; p++) begin : g_pe
    localparam int unsigned G = (p < 4) ? 0 : 4;
    lut_addr_t pe_addr [2][LUTS_PER_ROW];
    lut_word_t pe_data [2][LUTS_PER_ROW];

    always_comb begin
      for (int j = 0; j < LUTS_PER_ROW; j++) begin
        pe_data[0][j] = lut_data[2*p][j];
        pe_data[1][j] = lut_data[2*p+1][j];
        lut_addr[2*p][j]   = pe_addr[0][j];
        lut_addr[2*p+1][j] = pe_addr[1][j];
      end
    end

    dct_pe u_pe (
      .clk(clk), .rst_n(rst_n), .en(running),
      .first(k == '0), .sub(last_bit),
      .bits({sr[G+3][0], sr[G+2][0], sr[G+1][0], sr[G][0]}),
      .acc(acc[p]), .lut_addr(pe_addr), .lut_data(pe_data)
    );
  end

  always_comb begin
    for (int r = 0; r < 4; r++)
      for (int j = 0; j < LUTS_PER_ROW; j++) begin
        lut_addr[DCT_PP_ROW0+r][j] = pp_addr[r][j];
        pp_data[r][j]              = lut_data[DCT_PP_ROW0+r][j];
      end
  end

  // ---- output register ----------------------------------------------------
  logic [DCT_ACC_W-1:0] out_sr [N];
  logic [2:0]           out_cnt;
  logic                 out_active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_active <= 1'b0;
      out_cnt    <= '0;
      for (int i = 0; i < N; i++) out_sr[i] <= '0;
    end else if (done_d) begin
      out_active <= 1'b1;
      out_cnt    <= '0;
      for (int i = 0; i < 4; i++) begin
        if (idct) begin
          out_sr[i]       <= pp_sum[i];
          out_sr[N-1-i]   <= pp_diff[i];
        end else begin
          out_sr[2*i]     <= acc[i];
          out_sr[2*i+1]   <= acc[4+i];
        end
      end
    end else if (out_active) begin
      out_cnt <= out_cnt + 3'd1;
      if (out_cnt == 3'd7) out_active <= 1'b0;
    end
  end

  assign out_valid = out_active;
  assign out_data  = out_sr[out_cnt];
  assign busy      = (ld_cnt != '0) || ld_full || running || done_d || out_active;

endmodule

// rc_controller: sequencer and address generator that runs the reconfigurable
// cache as a function unit over data held in two data buffers (A = input,
// B = intermediate), as set up by the host processor.
//
// Convolution (mode FIR). The host stores X samples in A[0..X-1], loads the
// coefficients of taps 0..S-1 (S = 8) into the LUTs and starts a run of
// n_pass = TAP/S passes. Pass p streams x(0..X-1) followed by 2S-1 zeros
// into the tap chain, X + 2S - 1 cycles in all (plus one cycle of read
// latency), and feeds back the partial sums of the earlier passes:
//   y_in(t) = B[t + p*S]  (0 in pass 0, and 0 where no earlier pass wrote),
//   B[n + p*S] <= y_out(n), n = 0 .. X+S-2.
// After each pass but the last the controller raises cfg_req with the next
// pass number and waits for cfg_ack, while the host writes the coefficients
// of taps (p+1)*S .. (p+1)*S+S-1. The full convolution, X + TAP - 1 values,
// ends up in B[0 ..].
//
// 2-D DCT/IDCT (mode DCT or IDCT). For each 8x8 block b (64 words at A[64b]),
// pass 1 streams the 8 rows through the 1-D unit and writes result (row i,
// index j) transposed to B[64b + 8j + i]; pass 2 reads B row by row,
// requantises each word to the unit's WD-bit input (arithmetic shift right
// by inter_shift, then saturation) and writes the result (row v, index u)
// to A[64b + 8u + v], over the consumed input block, so A ends up holding the
// row-major 2-D result. Input A words are taken as WD-bit two's complement.
// The passes of consecutive blocks are interleaved, in the order
//   P1(0), P1(1), P2(0), P1(2), P2(1), ..., P1(n-1), P2(n-2), P2(n-1),
// so the row pipeline of the 1-D unit never drains between passes: a block
// costs 2 x 8 rows x (WD+1) = 144 cycles, plus 19 cycles of pipeline fill
// and drain per job. Pass 2 of a block waits until pass 1 of that block has
// written all its results (this only stalls a one-block job). Both the read
// side and the write side follow the same fixed order, each with its own
// pair of block counters, so no tags travel with the rows.
//
// The split into passes, the role of the two buffers and the sequential
// address generation follow the design; the buffer layout, the
// requantisation between passes and the cfg_req/cfg_ack handshake are this
// implementation's choices.
//
// Host interface: start (one-cycle pulse, in IDLE), busy, done (one-cycle
// pulse), cycles (clock cycles of the last run, for performance checks).
// Reset: rst_n, active low, synchronous.
//
// Lint note: buffer A is as wide as buffer B (24 bits) so the two can swap
// roles, but input samples use only its low 8 bits; verilator reports the
// upper bits of a_rdata as unused, and that stands.
module rc_controller
  import rc_pkg::*;
#(
  parameter int unsigned AW = 14,
  parameter int unsigned W  = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rc_mode_e             mode,
  input  logic                 start,
  input  logic [AW-1:0]        n_elem,
  input  logic [5:0]           n_pass,
  input  logic [AW-7:0]        n_blocks,
  input  logic [3:0]           inter_shift,
  output logic                 busy,
  output logic                 done,
  output logic                 cfg_req,
  output logic [5:0]           cfg_pass,
  input  logic                 cfg_ack,
  output logic [31:0]          cycles,
  // reconfigurable cache, FIR port
  output logic                 fir_en,
  output logic [FIR_X_W-1:0]   fir_x_in,
  output logic [FIR_Y_W-1:0]   fir_y_in,
  input  logic [FIR_Y_W-1:0]   fir_y_out,
  // reconfigurable cache, DCT port
  output logic                 dct_in_valid,
  input  logic                 dct_in_ready,
  output logic [DCT_WD-1:0]    dct_in_data,
  input  logic                 dct_out_valid,
  input  logic [DCT_ACC_W-1:0] dct_out_data,
  // buffer A (input)
  output logic                 a_re,
  output logic [AW-1:0]        a_raddr,
  input  logic [W-1:0]         a_rdata,
  output logic                 a_we,
  output logic [AW-1:0]        a_waddr,
  output logic [W-1:0]         a_wdata,
  // buffer B (intermediate)
  output logic                 b_re,
  output logic [AW-1:0]        b_raddr,
  input  logic [W-1:0]         b_rdata,
  output logic                 b_we,
  output logic [AW-1:0]        b_waddr,
  output logic [W-1:0]         b_wdata
);

  localparam int unsigned S  = FIR_STAGES;
  localparam int unsigned WD = DCT_WD;

  typedef enum logic [2:0] {
    ST_IDLE, ST_FIR_RUN, ST_FIR_CFG, ST_DCT_RUN, ST_DONE
  } state_e;

  state_e            state;
  logic [5:0]        pass;
  logic [AW:0]       c;          // FIR cycle counter (issue side)
  logic [AW:0]       t;          // FIR cycle being executed (= c - 1)
  logic              t_valid;
  logic [AW:0]       t_last;     // X + 2S - 2
  logic [AW:0]       off;        // p * S

  assign t_last = (AW+1)'(n_elem) + (AW+1)'(2*S - 2);
  assign off    = (AW+1)'(pass) * (AW+1)'(S);

  // DCT bookkeeping: read side (i_*) and write side (o_*) each walk the
  // segment order P1(0), P1(1), P2(0), P1(2), ... with their own counters.
  logic [AW-6:0] i_p1, i_p2;     // blocks whose pass 1 / pass 2 rows were issued
  logic [AW-6:0] o_p1, o_p2;     // blocks whose pass 1 / pass 2 results were written
  logic          i_is_p1, o_is_p1;
  logic [AW-6:0] i_blk, o_blk;
  logic          i_left;         // segments remain to be read
  logic          i_ok;           // current segment may be read
  logic [5:0]    rd_idx;         // next word to read in the current segment
  logic          rd_valid;       // buffer output holds an unconsumed word
  logic          rd_src;         // that word came from B (pass 2)
  logic [5:0]    wr_cnt;         // result words written in the current segment
  logic          consume, issue;
  logic [AW-6:0] nb;

  assign nb      = {1'b0, n_blocks};
  // next segment is pass 1 while blocks remain and pass 1 is at most one
  // block ahead of pass 2
  assign i_is_p1 = (i_p1 < nb) && (i_p1 - i_p2 < (AW-5)'(2));
  assign o_is_p1 = (o_p1 < nb) && (o_p1 - o_p2 < (AW-5)'(2));
  assign i_blk   = i_is_p1 ? i_p1 : i_p2;
  assign o_blk   = o_is_p1 ? o_p1 : o_p2;
  assign i_left  = (i_p2 < nb);
  assign i_ok    = i_is_p1 || (o_p1 > i_p2);

  // ---------------------------------------------------------------------
  // Requantisation of an intermediate word to a WD-bit input
  function automatic logic [WD-1:0] requant(input logic [W-1:0] v, input logic [3:0] sh);
    logic signed [W-1:0] s;
    s = $signed(v) >>> sh;
    if (s > $signed(W'(2**(WD-1) - 1)))      return WD'(2**(WD-1) - 1);
    else if (s < -$signed(W'(2**(WD-1))))    return WD'(2**(WD-1));
    else                                     return s[WD-1:0];
  endfunction

  // ---------------------------------------------------------------------
  // FIR datapath connections
  always_comb begin
    fir_en   = (state == ST_FIR_RUN) && t_valid;
    fir_x_in = (t < (AW+1)'(n_elem)) ? a_rdata[FIR_X_W-1:0] : '0;
    fir_y_in = ((pass != '0) && (t + 1 < (AW+1)'(n_elem))) ? b_rdata[FIR_Y_W-1:0] : '0;
  end

  // DCT feeding
  assign consume      = dct_in_valid && dct_in_ready;
  assign issue        = (state == ST_DCT_RUN) && i_left && i_ok && (!rd_valid || consume);
  assign dct_in_valid = (state == ST_DCT_RUN) && rd_valid;
  assign dct_in_data  = rd_src ? requant(b_rdata, inter_shift) : a_rdata[WD-1:0];

  // Buffer ports
  logic [AW-1:0] i_base, o_base;
  logic [2:0]    o_row, o_col;
  assign i_base = {i_blk[AW-7:0], 6'd0};
  assign o_base = {o_blk[AW-7:0], 6'd0};
  assign o_row  = wr_cnt[5:3];
  assign o_col  = wr_cnt[2:0];

  always_comb begin
    a_re = 1'b0; a_raddr = '0; a_we = 1'b0; a_waddr = '0; a_wdata = '0;
    b_re = 1'b0; b_raddr = '0; b_we = 1'b0; b_waddr = '0; b_wdata = '0;
    if (state == ST_FIR_RUN) begin
      a_re    = 1'b1;
      a_raddr = AW'(c);
      b_re    = 1'b1;
      b_raddr = AW'(c + off);
      if (t_valid && t >= (AW+1)'(S)) begin
        b_we    = 1'b1;
        b_waddr = AW'(t - (AW+1)'(S) + off);
        b_wdata = W'(fir_y_out);
      end
    end else if (state == ST_DCT_RUN) begin
      if (i_is_p1) begin
        a_re    = issue;
        a_raddr = i_base | AW'(rd_idx);
      end else begin
        b_re    = issue;
        b_raddr = i_base | AW'(rd_idx);
      end
      if (o_is_p1) begin
        b_we    = dct_out_valid;
        b_waddr = o_base | AW'({o_col, o_row});
        b_wdata = W'($signed(dct_out_data));
      end else begin
        a_we    = dct_out_valid;
        a_waddr = o_base | AW'({o_col, o_row});
        a_wdata = W'($signed(dct_out_data));
      end
    end
  end

  // ---------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      pass     <= '0;
      c        <= '0;
      t        <= '0;
      t_valid  <= 1'b0;
      i_p1     <= '0;
      i_p2     <= '0;
      o_p1     <= '0;
      o_p2     <= '0;
      rd_idx   <= '0;
      rd_valid <= 1'b0;
      rd_src   <= 1'b0;
      wr_cnt   <= '0;
      cycles   <= '0;
    end else begin
      if (state != ST_IDLE && state != ST_DONE) cycles <= cycles + 1;
      unique case (state)
        ST_IDLE: if (start) begin
          cycles <= '0;
          pass   <= '0;
          c      <= '0;
          t_valid <= 1'b0;
          i_p1   <= '0;
          i_p2   <= '0;
          o_p1   <= '0;
          o_p2   <= '0;
          rd_idx <= '0;
          rd_valid <= 1'b0;
          wr_cnt <= '0;
          if (mode == MODE_FIR && n_pass != '0)           state <= ST_FIR_RUN;
          else if ((mode == MODE_DCT || mode == MODE_IDCT) && n_blocks != '0)
                                                          state <= ST_DCT_RUN;
          else                                            state <= ST_DONE;
        end
        ST_FIR_RUN: begin
          c       <= c + 1;
          t       <= c;
          t_valid <= 1'b1;
          if (t_valid && t == t_last) begin
            t_valid <= 1'b0;
            c       <= '0;
            if (pass + 1 >= n_pass) state <= ST_DONE;
            else                    state <= ST_FIR_CFG;
          end
        end
        ST_FIR_CFG: if (cfg_ack) begin
          pass  <= pass + 1;
          state <= ST_FIR_RUN;
        end
        ST_DCT_RUN: begin
          if (issue) begin
            rd_idx <= rd_idx + 1;
            rd_src <= !i_is_p1;
            if (rd_idx == 6'd63) begin
              if (i_is_p1) i_p1 <= i_p1 + 1;
              else         i_p2 <= i_p2 + 1;
            end
          end
          if (issue)        rd_valid <= 1'b1;
          else if (consume) rd_valid <= 1'b0;
          if (dct_out_valid) begin
            wr_cnt <= wr_cnt + 1;
            if (wr_cnt == 6'd63) begin
              if (o_is_p1) o_p1 <= o_p1 + 1;
              else begin
                o_p2 <= o_p2 + 1;
                if (o_p2 + 1 == nb) state <= ST_DONE;
              end
            end
          end
        end
        ST_DONE: state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy     = (state != ST_IDLE);
  assign done     = (state == ST_DONE);
  assign cfg_req  = (state == ST_FIR_CFG);
  assign cfg_pass = pass + 1;

  // The host must not start a run while one is in progress.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> state == ST_IDLE);

endmodule

// rcma_top: one reconfigurable cache module together with the controller and
// the two data buffers it needs to run as a function unit.
//
// The host processor side is brought out as ports:
//   * the cache/configuration port of the reconfigurable cache (normal cache
//     reads and writes in cache mode, LUT configuration writes in any mode);
//   * "mode", which turns the module into a cache, an 8-tap convolution unit
//     or an 8-point DCT/IDCT unit;
//   * the controller's job registers (start, sizes, handshakes);
//   * a word port into the two data buffers (A = input, B = intermediate),
//     usable while the controller is idle, to load operands and read results.
// Module, controller and buffers are wired point to point here; the
// multiple-bus network that would join several such modules, the host and
// main memory is outside this design.
//
// Timing: the buffer port reads synchronously (hb_rdata is valid the cycle
// after hb_re, from the buffer selected by hb_sel at that time). See
// rc_module and rc_controller for the other ports. rst_n is active low and
// synchronous.
module rcma_top
  import rc_pkg::*;
#(
  parameter int unsigned ADDR_W = 20,  // host word address width
  parameter int unsigned BUF_AW = 14,  // data buffer depth 2**BUF_AW words
  parameter int unsigned BUF_W  = 24   // data buffer word width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           mode,
  // cache / configuration port
  input  logic [ADDR_W-1:0]    c_addr,
  input  logic                 c_we,
  input  logic                 c_cfg,
  input  logic [WORD_W-1:0]    c_wdata,
  output logic [WORD_W-1:0]    c_rdata,
  output logic                 c_hit,
  // controller job interface
  input  logic                 start,
  input  logic [BUF_AW-1:0]    n_elem,
  input  logic [5:0]           n_pass,
  input  logic [BUF_AW-7:0]    n_blocks,
  input  logic [3:0]           inter_shift,
  output logic                 busy,
  output logic                 done,
  output logic                 cfg_req,
  output logic [5:0]           cfg_pass,
  input  logic                 cfg_ack,
  output logic [31:0]          cycles,
  // host access to the data buffers
  input  logic                 hb_sel,
  input  logic                 hb_re,
  input  logic                 hb_we,
  input  logic [BUF_AW-1:0]    hb_addr,
  input  logic [BUF_W-1:0]     hb_wdata,
  output logic [BUF_W-1:0]     hb_rdata
);

  rc_mode_e m;
  assign m = rc_mode_e'(mode);

  // ---- reconfigurable cache module ---------------------------------------
  logic                 fir_en;
  logic [FIR_X_W-1:0]   fir_x_in;
  logic [FIR_Y_W-1:0]   fir_y_in, fir_y_out;
  logic                 dct_in_valid, dct_in_ready, dct_out_valid, dct_busy;
  logic [DCT_WD-1:0]    dct_in_data;
  logic [DCT_ACC_W-1:0] dct_out_data;

  rc_module #(.ADDR_W(ADDR_W)) u_rc (
    .clk(clk), .rst_n(rst_n), .mode(m),
    .c_addr(c_addr), .c_we(c_we), .c_cfg(c_cfg), .c_wdata(c_wdata),
    .c_rdata(c_rdata), .c_hit(c_hit),
    .fir_en(fir_en), .fir_x_in(fir_x_in), .fir_y_in(fir_y_in),
    .fir_y_out(fir_y_out),
    .dct_in_valid(dct_in_valid), .dct_in_ready(dct_in_ready),
    .dct_in_data(dct_in_data), .dct_out_valid(dct_out_valid),
    .dct_out_data(dct_out_data), .dct_busy(dct_busy)
  );

  // ---- controller -----------------------------------------------------------
  logic              a_re, a_we, b_re, b_we;
  logic [BUF_AW-1:0] a_raddr, a_waddr, b_raddr, b_waddr;
  logic [BUF_W-1:0]  a_rdata, a_wdata, b_rdata, b_wdata;

  rc_controller #(.AW(BUF_AW), .W(BUF_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .mode(m), .start(start),
    .n_elem(n_elem), .n_pass(n_pass), .n_blocks(n_blocks),
    .inter_shift(inter_shift), .busy(busy), .done(done),
    .cfg_req(cfg_req), .cfg_pass(cfg_pass), .cfg_ack(cfg_ack),
    .cycles(cycles),
    .fir_en(fir_en), .fir_x_in(fir_x_in), .fir_y_in(fir_y_in),
    .fir_y_out(fir_y_out),
    .dct_in_valid(dct_in_valid), .dct_in_ready(dct_in_ready),
    .dct_in_data(dct_in_data), .dct_out_valid(dct_out_valid),
    .dct_out_data(dct_out_data),
    .a_re(a_re), .a_raddr(a_raddr), .a_rdata(a_rdata),
    .a_we(a_we), .a_waddr(a_waddr), .a_wdata(a_wdata),
    .b_re(b_re), .b_raddr(b_raddr), .b_rdata(b_rdata),
    .b_we(b_we), .b_waddr(b_waddr), .b_wdata(b_wdata)
  );

  // ---- data buffers, shared with the host while the controller is idle ----
  logic              host_own;
  logic              ba_re, ba_we, bb_re, bb_we;
  logic [BUF_AW-1:0] ba_raddr, ba_waddr, bb_raddr, bb_waddr;
  logic [BUF_W-1:0]  ba_wdata, bb_wdata;
  logic              hb_sel_q;

  assign host_own = !busy;

  always_comb begin
    if (host_own) begin
      ba_re = hb_re && !hb_sel;  ba_raddr = hb_addr;
      ba_we = hb_we && !hb_sel;  ba_waddr = hb_addr;  ba_wdata = hb_wdata;
      bb_re = hb_re &&  hb_sel;  bb_raddr = hb_addr;
      bb_we = hb_we &&  hb_sel;  bb_waddr = hb_addr;  bb_wdata = hb_wdata;
    end else begin
      ba_re = a_re;  ba_raddr = a_raddr;
      ba_we = a_we;  ba_waddr = a_waddr;  ba_wdata = a_wdata;
      bb_re = b_re;  bb_raddr = b_raddr;
      bb_we = b_we;  bb_waddr = b_waddr;  bb_wdata = b_wdata;
    end
  end

  data_buffer #(.W(BUF_W), .AW(BUF_AW)) u_buf_a (
    .clk(clk), .re(ba_re), .raddr(ba_raddr), .rdata(a_rdata),
    .we(ba_we), .waddr(ba_waddr), .wdata(ba_wdata)
  );

  data_buffer #(.W(BUF_W), .AW(BUF_AW)) u_buf_b (
    .clk(clk), .re(bb_re), .raddr(bb_raddr), .rdata(b_rdata),
    .we(bb_we), .waddr(bb_waddr), .wdata(bb_wdata)
  );

  always_ff @(posedge clk) if (hb_re) hb_sel_q <= hb_sel;
  assign hb_rdata = hb_sel_q ? b_rdata : a_rdata;

  logic unused_dct_busy;
  assign unused_dct_busy = dct_busy;

endmodule

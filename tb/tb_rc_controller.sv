// tb_rc_controller: self-checking test of the controller's sequencing and
// address generation, with the function unit replaced by behavioural models:
//  * FIR: an ideal 8-tap systolic chain (one cycle per tap for y, two for x)
//    whose coefficients the testbench swaps when the controller asks for the
//    next pass's configuration (cfg_req / cfg_ack);
//  * DCT: a row unit that returns each row doubled, WD+1 = 9 cycles per row.
// FIR runs with 1 to 3 passes check the full convolution left in buffer B
// and the run length, n_pass * (X + 2S) cycles plus the configuration waits.
// DCT runs check the transposed write/read pattern of both passes and the
// requantisation (shift and saturation) between them.
module tb_rc_controller;
  import rc_pkg::*;

  localparam int unsigned AW = 10, W = 24, S = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic            rst_n, start, busy, done, cfg_req, cfg_ack;
  rc_mode_e        mode;
  logic [AW-1:0]   n_elem;
  logic [5:0]      n_pass, cfg_pass;
  logic [AW-7:0]   n_blocks;
  logic [3:0]      inter_shift;
  logic [31:0]     cycles;
  logic            fir_en;
  logic [7:0]      fir_x_in;
  logic [23:0]     fir_y_in, fir_y_out;
  logic            dct_in_valid, dct_in_ready, dct_out_valid;
  logic [7:0]      dct_in_data;
  logic [15:0]     dct_out_data;
  logic            a_re, a_we, b_re, b_we;
  logic [AW-1:0]   a_raddr, a_waddr, b_raddr, b_waddr;
  logic [W-1:0]    a_rdata, a_wdata, b_rdata, b_wdata;

  rc_controller #(.AW(AW), .W(W)) dut (.*);

  // buffers, with a testbench back door for loading and checking
  logic          ta_we, tb_we;
  logic [AW-1:0] ta_addr;
  logic [W-1:0]  ta_wdata;
  logic          tb_re;
  data_buffer #(.W(W), .AW(AW)) u_a (.clk, .re(a_re || tb_re), .raddr(tb_re ? ta_addr : a_raddr),
    .rdata(a_rdata), .we(a_we || ta_we), .waddr(ta_we ? ta_addr : a_waddr), .wdata(ta_we ? ta_wdata : a_wdata));
  data_buffer #(.W(W), .AW(AW)) u_b (.clk, .re(b_re || tb_re), .raddr(tb_re ? ta_addr : b_raddr),
    .rdata(b_rdata), .we(b_we || tb_we), .waddr(tb_we ? ta_addr : b_waddr), .wdata(tb_we ? ta_wdata : b_wdata));

  // ---- behavioural FIR chain ----
  int coef [S];
  logic [7:0]  xr [2*S];
  logic [23:0] yr [S];
  always_ff @(posedge clk) if (!rst_n) begin
    for (int s = 0; s < S; s++) yr[s] <= '0;
    for (int s = 0; s < 2*S; s++) xr[s] <= '0;
  end else if (fir_en) begin
    yr[0] <= fir_y_in + 24'(coef[0] * fir_x_in);
    xr[0] <= fir_x_in; xr[1] <= xr[0];
    for (int s = 1; s < S; s++) begin
      yr[s] <= yr[s-1] + 24'(coef[s] * xr[2*s-1]);
      xr[2*s] <= xr[2*s-1]; xr[2*s+1] <= xr[2*s];
    end
  end
  assign fir_y_out = yr[S-1];

  // ---- behavioural row unit: y = 2x, 9 cycles per row ----
  logic [7:0]  ld [8];
  logic [15:0] ob [8];
  int          ld_n = 0, busy_n = 0, out_n = 8;
  logic        full = 0;
  logic [15:0] pend [8];
  assign dct_in_ready  = !full;
  assign dct_out_valid = (out_n < 8);
  assign dct_out_data  = ob[out_n % 8];
  always_ff @(posedge clk) begin
    if (dct_in_valid && dct_in_ready) begin
      ld[ld_n] <= dct_in_data;
      if (ld_n == 7) begin full <= 1; ld_n <= 0; end else ld_n <= ld_n + 1;
    end
    if (out_n < 8) out_n <= out_n + 1;
    if (busy_n > 0) begin
      busy_n <= busy_n - 1;
      if (busy_n == 1) begin ob <= pend; out_n <= 0; end
    end
    if (full && busy_n <= 1) begin
      for (int i = 0; i < 8; i++) pend[i] <= 16'($signed(ld[i])) * 16'sd2;
      busy_n <= 9; full <= 0;
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic put(input bit to_b, input int addr, input int val);
    @(negedge clk);
    ta_addr = AW'(addr); ta_wdata = W'(val); ta_we = !to_b; tb_we = to_b;
    @(negedge clk); ta_we = 0; tb_we = 0;
  endtask

  task automatic get(input bit from_b, input int addr, output int val);
    @(negedge clk); ta_addr = AW'(addr); tb_re = 1;
    @(negedge clk); tb_re = 0;
    val = from_b ? int'(b_rdata) : int'(a_rdata);
  endtask

  int x [600];
  int c_all [64];

  task automatic run_fir(input int X, input int P);
    int waits, nreq, v;
    for (int i = 0; i < X; i++) begin x[i] = $urandom_range(0, 255); put(0, i, x[i]); end
    for (int j = 0; j < S * P; j++) c_all[j] = $urandom_range(0, 255);
    for (int s = 0; s < S; s++) coef[s] = c_all[s];
    // junk in B where pass 0 must not read from
    for (int i = 0; i < X + S * P; i++) put(1, i, 32'h5a5a5a);
    mode = MODE_FIR; n_elem = AW'(X); n_pass = 6'(P);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    waits = 0; nreq = 0;
    while (!done) begin
      if (cfg_req) begin
        waits++;
        if (waits % 3 == 0) begin
          nreq++;
          for (int s = 0; s < S; s++) coef[s] = c_all[int'(cfg_pass) * S + s];
          cfg_ack = 1;
        end
      end
      @(negedge clk); cfg_ack = 0;
    end
    chk(nreq == P - 1, "one configuration request between passes");
    chk(int'(cycles) == P * (X + 2 * S) + waits, $sformatf("run length %0d exp %0d", cycles, P * (X + 2 * S) + waits));
    for (int n = 0; n < X + S * P - 1; n++) begin
      int y;
      y = 0;
      for (int j = 0; j < S * P; j++) if (n - j >= 0 && n - j < X) y += c_all[j] * x[n - j];
      get(1, n, v);
      chk(v == y, $sformatf("X=%0d P=%0d y[%0d] got %0d exp %0d", X, P, n, v, y));
    end
  endtask

  task automatic run_dct(input int nb, input int sh);
    int v, e, t;
    for (int i = 0; i < 64 * nb; i++) begin x[i] = $urandom_range(0, 255) - 128; put(0, i, x[i]); end
    mode = MODE_DCT; n_blocks = (AW-6)'(nb); inter_shift = 4'(sh);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int b = 0; b < nb; b++)
      for (int u = 0; u < 8; u++)
        for (int vv = 0; vv < 8; vv++) begin
          // pass 1: 2*x ; requantise: >>> sh, saturate to 8 bits ; pass 2: *2
          t = (2 * x[64*b + 8*u + vv]) >>> sh;
          if (t > 127) t = 127;
          if (t < -128) t = -128;
          e = 2 * t;
          get(0, 64*b + 8*u + vv, v);
          chk(W'(v) == W'(e), $sformatf("dct blk %0d (%0d,%0d) got %0d exp %0d", b, u, vv, $signed(W'(v)), e));
        end
  endtask

  initial begin
    rst_n = 0; start = 0; cfg_ack = 0; mode = MODE_CACHE; n_elem = '0; n_pass = 6'd1;
    n_blocks = '0; inter_shift = '0; ta_we = 0; tb_we = 0; tb_re = 0; ta_addr = '0; ta_wdata = '0;
    for (int s = 0; s < S; s++) coef[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_fir(20, 1);
    run_fir(37, 2);
    run_fir(100, 3);
    run_dct(1, 0);
    run_dct(3, 1);
    run_dct(6, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

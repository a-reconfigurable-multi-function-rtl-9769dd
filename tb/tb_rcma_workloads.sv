// tb_rcma_workloads: the system run at the largest workload sizes it is
// meant for, with every parameter at its default. The testbench plays the
// host processor:
//  1. a 256-tap convolution over 8192 samples (8-bit samples and
//     coefficients at full range): 32 passes of the 8 physical taps, with the
//     multiplier LUT rows rewritten between passes on each cfg_req; every one
//     of the 8447 outputs is compared with a direct convolution, and the run
//     length with TAP/S * (X + 2S - 1) cycles plus one read-latency cycle per
//     pass, configuration waits excluded;
//  2. a 2-D DCT job of 255 8x8 blocks (the most one job can address) and an
//     IDCT job of 255 blocks, each compared with an integer model of the
//     datapath and, loosely, with a floating-point 2-D transform, plus the
//     cycles per block.
module tb_rcma_workloads;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  localparam int unsigned ADDR_W = 20, BUF_AW = 14, BUF_W = 24, S = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n;
  logic [1:0]          mode;
  logic [ADDR_W-1:0]   c_addr;
  logic                c_we, c_cfg, c_hit;
  logic [15:0]         c_wdata, c_rdata;
  logic                start, busy, done, cfg_req, cfg_ack;
  logic [BUF_AW-1:0]   n_elem;
  logic [5:0]          n_pass, cfg_pass;
  logic [BUF_AW-7:0]   n_blocks;
  logic [3:0]          inter_shift;
  logic [31:0]         cycles;
  logic                hb_sel, hb_re, hb_we;
  logic [BUF_AW-1:0]   hb_addr;
  logic [BUF_W-1:0]    hb_wdata, hb_rdata;

  rcma_top dut (.*);

  int checks = 0, failures = 0;
  int n_reconf = 0, n_cfgreq = 0;
  int n_fir_pass = 0, n_dct_blk = 0, n_idct_blk = 0;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  // ---- host helpers ----
  logic [15:0] cfg [32][8][16];

  task automatic write_cfg_row(input int r);
    logic [15:0] e [8];
    for (int l = 0; l < 16; l++)
      for (int w = 0; w < 8; w++) begin
        for (int k = 0; k < 8; k++) e[k] = cfg[r][k][l];
        @(negedge clk);
        c_we = 1'b1; c_cfg = 1'b1;
        c_addr = ADDR_W'({5'(r), 4'(l), 3'(w)}); c_wdata = pack_word(e, w);
      end
    @(negedge clk); c_we = 1'b0; c_cfg = 1'b0;
  endtask

  task automatic set_mode(input rc_mode_e m);
    @(negedge clk);
    if (mode != 2'(m)) n_reconf++;
    mode = 2'(m);
  endtask

  task automatic buf_put(input bit sel, input int addr, input int val);
    @(negedge clk);
    hb_sel = sel; hb_we = 1'b1; hb_addr = BUF_AW'(addr); hb_wdata = BUF_W'(val);
    @(negedge clk); hb_we = 1'b0;
  endtask

  task automatic buf_get(input bit sel, input int addr, output int val);
    @(negedge clk);
    hb_sel = sel; hb_re = 1'b1; hb_addr = BUF_AW'(addr);
    @(negedge clk); hb_re = 1'b0;
    val = int'($signed(hb_rdata));
  endtask

  task automatic run_job();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  // ---- 2. FIR ----
  localparam int X = 8192, P = 32;
  int xs [X];
  int coef [S * P];

  task automatic fir_mult_rows(input int pass);
    for (int s = 0; s < S; s++) begin
      for (int l = 0; l < 16; l++)
        for (int k = 0; k < 8; k++)
          cfg[4*s][k][l] = (k < 4) ? mult_entry(coef[pass * S + s], l, k % 2) : 16'h0;
      write_cfg_row(4 * s);
    end
  endtask

  int cfg_cycles = 0;
  always_ff @(posedge clk) if (cfg_req) cfg_cycles <= cfg_cycles + 1;

  task automatic fir_phase();
    int waits, v;
    set_mode(MODE_FIR);
    for (int j = 0; j < S * P; j++) coef[j] = $urandom_range(0, 255);
    coef[0] = 255;
    for (int s = 0; s < S; s++)
      for (int r = 1; r < 4; r++) begin
        for (int l = 0; l < 16; l++)
          for (int k = 0; k < 8; k++) cfg[4*s+r][k][l] = adder_entry(l);
        write_cfg_row(4 * s + r);
      end
    fir_mult_rows(0);
    for (int i = 0; i < X; i++) begin
      xs[i] = $urandom_range(0, 255);
      if (i == 5 || (i >= 4000 && i < 4300)) xs[i] = 255;  // a long run of full-scale samples
      buf_put(1'b0, i, xs[i]);
    end
    n_elem = BUF_AW'(X); n_pass = 6'(P);
    waits = cfg_cycles;  // cycles with cfg_req before this run (none after reset)
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) begin
      if (cfg_req) begin
        n_cfgreq++;
        fir_mult_rows(int'(cfg_pass));
        cfg_ack = 1'b1;
        @(negedge clk); cfg_ack = 1'b0;
      end else @(negedge clk);
    end
    waits = cfg_cycles - waits;
    n_fir_pass += P;
    // compute-only length per pass: X + 2S - 1 cycles, plus 1 read latency
    chk(int'(cycles) - waits == P * (X + 2 * S - 1 + 1), $sformatf("FIR cycles %0d (cfg wait %0d)", cycles, waits));
    for (int n = 0; n < X + S * P - 1; n++) begin
      int y;
      y = 0;
      for (int j = 0; j < S * P; j++) if (n - j >= 0 && n - j < X) y += coef[j] * xs[n - j];
      buf_get(1'b1, n, v);
      chk(v == y, $sformatf("FIR y[%0d] got %0d exp %0d", n, v, y));
    end
  endtask

  // ---- 3/4. DCT and IDCT ----
  task automatic dct_config(input bit inv);
    for (int r = 0; r < 20; r++) begin
      for (int l = 0; l < 16; l++)
        for (int k = 0; k < 8; k++)
          if (r < 16 && r % 2 == 0)
            cfg[r][k][l] = (k == 3) ? rom_entry(pe_weight(inv, r/2, 0), pe_weight(inv, r/2, 1),
                                                pe_weight(inv, r/2, 2), pe_weight(inv, r/2, 3), l) : 16'h0;
          else cfg[r][k][l] = adder_entry(l);
      write_cfg_row(r);
    end
  endtask

  function automatic int requant(input int v, input int sh);
    int t;
    t = v >>> sh;
    if (t > 127) t = 127;
    if (t < -128) t = -128;
    return t;
  endfunction

  task automatic dct_phase(input bit inv, input int nb);
    int blk [255][8][8];
    int mid [8][8];
    int row [8], y [8];
    int v, sh, exp_cycles;
    sh = 7;
    set_mode(inv ? MODE_IDCT : MODE_DCT);
    dct_config(inv);
    for (int b = 0; b < nb; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          blk[b][i][j] = inv ? $urandom_range(0, 60) - 30 : $urandom_range(0, 255) - 128;
          if (inv && i == 0 && j == 0) blk[b][i][j] = 120;
          buf_put(1'b0, 64 * b + 8 * i + j, blk[b][i][j]);
        end
    n_blocks = (BUF_AW-6)'(nb); inter_shift = 4'(sh);
    run_job();
    if (inv) n_idct_blk += nb; else n_dct_blk += nb;
    // two 1-D passes of 8 rows at Wd+1 = 9 cycles per row, 144 cycles per
    // block, as the passes of consecutive blocks follow each other without a
    // gap; plus 19 cycles to fill and drain the row pipeline once per job
    // (load 8 words, turn-around, unload 8). A single block waits for its
    // first pass to drain before the second: 2 x 91 cycles.
    exp_cycles = (nb == 1) ? 2 * (8 * 9 + 19) : 2 * 8 * 9 * nb + 19;
    chk(int'(cycles) == exp_cycles, $sformatf("DCT job of %0d blocks: %0d cycles, exp %0d", nb, cycles, exp_cycles));
    for (int b = 0; b < nb; b++) begin
      // pass 1 on rows, store transposed
      for (int i = 0; i < 8; i++) begin
        row_model(inv, blk[b][i], 8, y);
        for (int j = 0; j < 8; j++) mid[j][i] = y[j];
      end
      // pass 2 on requantised rows of the transposed intermediate
      for (int vv = 0; vv < 8; vv++) begin
        for (int i = 0; i < 8; i++) row[i] = requant(mid[vv][i], sh);
        row_model(inv, row, 8, y);
        for (int u = 0; u < 8; u++) begin
          real ideal;
          buf_get(1'b0, 64 * b + 8 * u + vv, v);
          chk(v == y[u], $sformatf("%s blk %0d (%0d,%0d) got %0d exp %0d", inv ? "IDCT" : "DCT", b, u, vv, v, y[u]));
          // floating-point 2-D transform, result scaled by 8 in this setup
          ideal = 0.0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) begin
              real cu, cv, a, bb;
              if (!inv) begin
                cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
                cv = (vv == 0) ? 1.0 / $sqrt(2.0) : 1.0;
                a  = $cos((2.0 * i + 1.0) * u * PI / 16.0);
                bb = $cos((2.0 * j + 1.0) * vv * PI / 16.0);
              end else begin
                cu = (i == 0) ? 1.0 / $sqrt(2.0) : 1.0;
                cv = (j == 0) ? 1.0 / $sqrt(2.0) : 1.0;
                a  = $cos((2.0 * u + 1.0) * i * PI / 16.0);
                bb = $cos((2.0 * vv + 1.0) * j * PI / 16.0);
              end
              ideal += 0.25 * cu * cv * a * bb * blk[b][i][j];
            end
          chk(real'(v) / 8.0 - ideal < 12.0 && ideal - real'(v) / 8.0 < 12.0,
              $sformatf("2-D float check (%0d,%0d) got %f exp %f", u, vv, real'(v) / 8.0, ideal));
        end
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; mode = 2'(MODE_CACHE); c_addr = '0; c_we = 1'b0; c_cfg = 1'b0; c_wdata = '0;
    start = 1'b0; cfg_ack = 1'b0; n_elem = '0; n_pass = 6'd1; n_blocks = '0; inter_shift = '0;
    hb_sel = 1'b0; hb_re = 1'b0; hb_we = 1'b0; hb_addr = '0; hb_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fir_phase();
    dct_phase(1'b0, 255);
    dct_phase(1'b1, 255);
    $display("workloads: fir_taps=%0d fir_samples=%0d cfg_req=%0d dct_blk=%0d idct_blk=%0d",
             S * P, X, n_cfgreq, n_dct_blk, n_idct_blk);
    chk(n_cfgreq == P - 1, "one reconfiguration request between each pair of passes");
    chk(n_fir_pass == P, "all passes ran");
    chk(n_dct_blk == 255 && n_idct_blk == 255, "all blocks transformed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rc_module: self-checking test of the reconfigurable cache module in all
// of its modes, through its own ports only.
//  1. Cache mode: blocks are filled with tagged words; reads of the same
//     address hit and return the data, reads with another tag miss, a
//     configuration write invalidates its block.
//  2. The module is turned into an 8-tap FIR unit: the host writes the LUT
//     contents (random coefficients) with configuration writes; a sample
//     stream is filtered and every output compared with a direct convolution.
//     Returning to cache mode, the earlier blocks must miss (flushed).
//  3. DCT and IDCT modes: ROM/adder contents are written, rows streamed, and
//     outputs compared with an integer model of the datapath.
module tb_rc_module;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  localparam int unsigned ADDR_W = 20;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                 rst_n;
  rc_mode_e             mode;
  logic [ADDR_W-1:0]    c_addr;
  logic                 c_we, c_cfg, c_hit;
  logic [15:0]          c_wdata, c_rdata;
  logic                 fir_en;
  logic [7:0]           fir_x_in;
  logic [23:0]          fir_y_in, fir_y_out;
  logic                 dct_in_valid, dct_in_ready, dct_out_valid, dct_busy;
  logic [7:0]           dct_in_data;
  logic [15:0]          dct_out_data;

  rc_module #(.ADDR_W(ADDR_W)) dut (.*);

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  logic [15:0] cfg [32][8][16];

  task automatic write_cfg(input int r0, input int r1);
    logic [15:0] e [8];
    for (int r = r0; r <= r1; r++)
      for (int l = 0; l < 16; l++)
        for (int w = 0; w < 8; w++) begin
          for (int k = 0; k < 8; k++) e[k] = cfg[r][k][l];
          @(negedge clk);
          c_we = 1'b1; c_cfg = 1'b1;
          c_addr = ADDR_W'({5'(r), 4'(l), 3'(w)}); c_wdata = pack_word(e, w);
        end
    @(negedge clk); c_we = 1'b0; c_cfg = 1'b0;
  endtask

  logic [15:0] cdata [64];
  logic [19:0] caddr [64];

  initial begin
    int coef [8];
    int xs [64];
    rst_n = 1'b0; mode = MODE_CACHE; c_addr = '0; c_we = 1'b0; c_cfg = 1'b0; c_wdata = '0;
    fir_en = 1'b0; fir_x_in = '0; fir_y_in = '0; dct_in_valid = 1'b0; dct_in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- 1. cache mode ----
    for (int n = 0; n < 64; n++) begin
      caddr[n] = {8'($urandom_range(1, 200)), 12'(n * 64 + $urandom_range(0, 63))};
      cdata[n] = 16'($urandom);
      @(negedge clk); c_we = 1'b1; c_addr = caddr[n]; c_wdata = cdata[n];
    end
    @(negedge clk); c_we = 1'b0;
    for (int n = 0; n < 64; n++) begin
      c_addr = caddr[n]; #1;
      chk(c_hit && c_rdata == cdata[n], "hit with data");
      if (c_hit) n_hit++;
      c_addr = {caddr[n][19:12] + 8'd1, caddr[n][11:0]}; #1;
      chk(!c_hit, "miss on other tag");
      if (!c_hit) n_miss++;
      @(negedge clk);
    end
    @(negedge clk); c_we = 1'b1; c_cfg = 1'b1; c_addr = caddr[5]; c_wdata = 16'h1234;
    @(negedge clk); c_we = 1'b0; c_cfg = 1'b0; c_addr = caddr[5]; #1;
    chk(!c_hit && c_rdata == 16'h1234, "config write invalidates, data written");

    // a visit to function mode without any writes must still flush the tags
    @(negedge clk); mode = MODE_FIR;
    @(negedge clk); mode = MODE_CACHE;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); c_addr = caddr[n]; #1;
      chk(!c_hit, "miss after a function-mode visit");
    end

    // ---- 2. FIR ----
    mode = MODE_FIR;
    for (int s = 0; s < 8; s++) coef[s] = $urandom_range(0, 255);
    coef[0] = 255;
    for (int s = 0; s < 8; s++)
      for (int l = 0; l < 16; l++)
        for (int k = 0; k < 8; k++) begin
          cfg[4*s][k][l] = (k < 4) ? mult_entry(coef[s], l, k % 2) : 16'h0;
          cfg[4*s+1][k][l] = adder_entry(l);
          cfg[4*s+2][k][l] = adder_entry(l);
          cfg[4*s+3][k][l] = adder_entry(l);
        end
    write_cfg(0, 31);
    for (int i = 0; i < 64; i++) xs[i] = (i < 48) ? $urandom_range(0, 255) : 0;
    xs[3] = 255;
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      fir_en = 1'b1; fir_x_in = 8'(xs[t]); fir_y_in = '0;
      #1;
      if (t >= 8) begin
        int n, y;
        n = t - 8; y = 0;
        for (int j = 0; j < 8; j++) if (n - j >= 0) y += coef[j] * xs[n - j];
        chk(int'(fir_y_out) == y, $sformatf("fir n=%0d got %0d exp %0d", n, fir_y_out, y));
      end
    end
    @(negedge clk); fir_en = 1'b0;
    mode = MODE_CACHE;
    @(negedge clk);
    for (int n = 0; n < 64; n += 4) begin
      c_addr = caddr[n]; #1;
      chk(!c_hit, "flushed after function mode");
      @(negedge clk);
    end

    // ---- 3. DCT / IDCT ----
    for (int inv = 0; inv < 2; inv++) begin
      int xin [6][8];
      int oc, orow;
      mode = inv ? MODE_IDCT : MODE_DCT;
      for (int r = 0; r < 20; r++)
        for (int l = 0; l < 16; l++)
          for (int k = 0; k < 8; k++)
            if (r < 16 && r % 2 == 0)
              cfg[r][k][l] = (k == 3) ? rom_entry(pe_weight(inv[0], r/2, 0), pe_weight(inv[0], r/2, 1),
                                                  pe_weight(inv[0], r/2, 2), pe_weight(inv[0], r/2, 3), l) : 16'h0;
            else cfg[r][k][l] = adder_entry(l);
      write_cfg(0, 19);
      for (int r = 0; r < 6; r++) for (int i = 0; i < 8; i++) xin[r][i] = $urandom_range(0, 255) - 128;
      oc = 0; orow = 0;
      fork
        for (int r = 0; r < 6; r++)
          for (int i = 0; i < 8; i++) begin
            @(negedge clk); dct_in_valid = 1'b1; dct_in_data = 8'(xin[r][i]);
            @(posedge clk); while (!dct_in_ready) @(posedge clk);
          end
        while (orow < 6) begin
          @(posedge clk);
          if (dct_out_valid) begin
            int y [8];
            row_model(inv[0], xin[orow], 8, y);
            chk(int'($signed(dct_out_data)) == y[oc], $sformatf("dct inv=%0d got %0d exp %0d", inv, $signed(dct_out_data), y[oc]));
            oc++;
            if (oc == 8) begin oc = 0; orow++; end
          end
        end
      join_any
      @(negedge clk); dct_in_valid = 1'b0;
      wait (orow == 6);
    end
    chk(n_hit > 0 && n_miss > 0, "hits and misses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

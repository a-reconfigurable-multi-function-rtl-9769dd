// tb_dct_pe: self-checking test of one distributed-arithmetic PE on a real
// LUT array. Row 0 holds the 16-entry ROM of four random weights at LUT 3,
// row 1 the 2-bit adder tables with add and subtract contexts. Four random
// 9-bit two's complement values are fed bit-serially, LSB first, and the
// accumulator is checked against (a) an integer model of the shift-
// accumulate steps and (b) the exact inner product sum w_i*v_i / 2^8
// within the truncation error. The cycle count per inner product (9) is
// checked as well.
module tb_dct_pe;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                mem_mode, rst_n, en, first, sub;
  lut_addr_t           lut_in  [LUT_ROWS][LUTS_PER_ROW];
  lut_word_t           lut_out [LUT_ROWS][LUTS_PER_ROW];
  logic [ARR_AW-1:0]   c_addr;
  logic                c_we;
  logic [WORD_W-1:0]   c_wdata, c_rdata;

  rc_lut_array u_arr (.*);

  logic [3:0]  bits;
  logic [15:0] acc;
  lut_addr_t   pe_addr [2][LUTS_PER_ROW];
  lut_word_t   pe_data [2][LUTS_PER_ROW];

  dct_pe dut (.clk, .rst_n, .en, .first, .sub, .bits, .acc,
              .lut_addr(pe_addr), .lut_data(pe_data));

  always_comb begin
    for (int r = 0; r < LUT_ROWS; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++)
        lut_in[r][k] = (r < 2) ? pe_addr[r % 2][k] : '0;
    for (int r = 0; r < 2; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++) pe_data[r][k] = lut_out[r][k];
  end

  int checks = 0, failures = 0;
  logic [15:0] cfg [2][8][16];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic write_rows();
    logic [15:0] e [8];
    mem_mode = 1'b1;
    for (int r = 0; r < 2; r++)
      for (int l = 0; l < 16; l++)
        for (int w = 0; w < 8; w++) begin
          for (int k = 0; k < 8; k++) e[k] = cfg[r][k][l];
          @(negedge clk);
          c_we = 1'b1; c_addr = {5'(r), 4'(l), 3'(w)}; c_wdata = pack_word(e, w);
        end
    @(negedge clk); c_we = 1'b0; mem_mode = 1'b0;
  endtask

  initial begin
    int w [4], v [4];
    logic [15:0] exp;
    int t0, t1, cyc;
    rst_n = 1'b0; en = 1'b0; first = 1'b0; sub = 1'b0; bits = '0;
    mem_mode = 1'b1; c_we = 1'b0; c_addr = '0; c_wdata = '0;
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int set = 0; set < 6; set++) begin
      for (int i = 0; i < 4; i++) w[i] = $urandom_range(0, 8000) - 4000;
      for (int l = 0; l < 16; l++)
        for (int k = 0; k < 8; k++) begin
          cfg[0][k][l] = (k == 3) ? rom_entry(w[0], w[1], w[2], w[3], l) : 16'($urandom);
          cfg[1][k][l] = adder_entry(l);
        end
      write_rows();
      for (int n = 0; n < 40; n++) begin
        real ideal, got;
        for (int i = 0; i < 4; i++) v[i] = $urandom_range(0, 511) - 256;
        if (n == 0) for (int i = 0; i < 4; i++) v[i] = -256;
        if (n == 1) for (int i = 0; i < 4; i++) v[i] = 255;
        t0 = cyc;
        for (int k = 0; k < 9; k++) begin
          @(negedge clk);
          en = 1'b1; first = (k == 0); sub = (k == 8);
          for (int i = 0; i < 4; i++) bits[i] = v[i][k];
          @(posedge clk); cyc++;
        end
        t1 = cyc;
        @(negedge clk); en = 1'b0;
        exp = da_model(w, v, 9);
        chk(acc == exp, $sformatf("acc %h exp %h", acc, exp));
        ideal = 0.0;
        for (int i = 0; i < 4; i++) ideal += real'(w[i]) * real'(v[i]) / 256.0;
        got = real'($signed(acc));
        chk(got - ideal < 2.5 && ideal - got < 2.5, $sformatf("ideal %f got %f", ideal, got));
        chk(t1 - t0 == 9, "nine cycles per inner product");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fir_stage: self-checking test of one convolution tap on a real LUT
// array. The testbench writes the tap's four LUT rows through the cache
// port (two 4x8 multiplier tables for coefficient c, 2-bit adder tables),
// then streams random samples and partial sums and checks, every cycle,
// y_out = y_in + c * x_in one cycle later and x_out = x_in two cycles later.
// This is repeated for several coefficients, reloading the multiplier LUTs.
module tb_fir_stage;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                mem_mode, rst_n, en;
  lut_addr_t           lut_in  [LUT_ROWS][LUTS_PER_ROW];
  lut_word_t           lut_out [LUT_ROWS][LUTS_PER_ROW];
  logic [ARR_AW-1:0]   c_addr;
  logic                c_we;
  logic [WORD_W-1:0]   c_wdata, c_rdata;

  rc_lut_array u_arr (.*);

  logic [FIR_X_W-1:0] x_in, x_out;
  logic [FIR_Y_W-1:0] y_in, y_out;
  lut_addr_t          st_addr [FIR_ROWS_PER_ST][LUTS_PER_ROW];
  lut_word_t          st_data [FIR_ROWS_PER_ST][LUTS_PER_ROW];

  fir_stage dut (.clk, .rst_n, .en, .x_in, .y_in, .x_out, .y_out,
                 .lut_addr(st_addr), .lut_data(st_data));

  always_comb begin
    for (int r = 0; r < LUT_ROWS; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++)
        lut_in[r][k] = (r < FIR_ROWS_PER_ST) ? st_addr[r % FIR_ROWS_PER_ST][k] : '0;
    for (int r = 0; r < FIR_ROWS_PER_ST; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++) st_data[r][k] = lut_out[r][k];
  end

  int checks = 0, failures = 0;
  logic [15:0] cfg [4][8][16];

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
    for (int r = 0; r < 4; r++)
      for (int l = 0; l < 16; l++)
        for (int w = 0; w < 8; w++) begin
          for (int k = 0; k < 8; k++) e[k] = cfg[r][k][l];
          @(negedge clk);
          c_we = 1'b1; c_addr = {5'(r), 4'(l), 3'(w)}; c_wdata = pack_word(e, w);
        end
    @(negedge clk); c_we = 1'b0;
  endtask

  task automatic set_coef(input int unsigned c);
    for (int l = 0; l < 16; l++) begin
      for (int k = 0; k < 8; k++) cfg[0][k][l] = 16'($urandom); // unused LUTs: junk
      cfg[0][0][l] = mult_entry(c, l, 0);
      cfg[0][1][l] = mult_entry(c, l, 1);
      cfg[0][2][l] = mult_entry(c, l, 0);
      cfg[0][3][l] = mult_entry(c, l, 1);
      for (int r = 1; r < 4; r++)
        for (int k = 0; k < 8; k++) cfg[r][k][l] = adder_entry(l);
    end
  endtask

  initial begin
    logic [7:0]  xh [3];
    logic [23:0] exp_y;
    int unsigned coefs [5] = '{0, 1, 255, 77, 160};
    rst_n = 1'b0; en = 1'b0; mem_mode = 1'b1; c_we = 1'b0; c_addr = '0; c_wdata = '0;
    x_in = '0; y_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (coefs[ci]) begin
      int unsigned c;
      c = coefs[ci];
      mem_mode = 1'b1;
      set_coef(c);
      write_rows();
      mem_mode = 1'b0;
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        en   = ($urandom_range(0, 3) != 0);
        x_in = 8'($urandom);
        if (n % 17 == 0) x_in = 8'hff;
        y_in = (n % 13 == 0) ? 24'hff0000 : 24'($urandom_range(0, 24'h7fffff));
        exp_y = y_in + 24'(c * x_in);
        if (en) begin
          xh[2] = xh[1]; xh[1] = xh[0]; xh[0] = x_in;
        end
        @(posedge clk); #1;
        if (en) begin
          chk(y_out == exp_y, $sformatf("c=%0d x=%0d y_out=%h exp %h", c, x_in, y_out, exp_y));
          if (n > 2) chk(x_out == xh[1], "x delayed by two");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

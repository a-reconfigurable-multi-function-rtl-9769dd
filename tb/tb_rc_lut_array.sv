// tb_rc_lut_array: self-checking test of the LUT data array.
// Fills the whole array with random words through the cache port, reads
// every word back in memory mode, then drives random per-LUT addresses in
// function mode and checks each LUT's 16-bit output against the entry that
// the bit-interleaved word layout predicts.
module tb_rc_lut_array;
  import rc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                mem_mode;
  lut_addr_t           lut_in  [LUT_ROWS][LUTS_PER_ROW];
  lut_word_t           lut_out [LUT_ROWS][LUTS_PER_ROW];
  logic [ARR_AW-1:0]   c_addr;
  logic                c_we;
  logic [WORD_W-1:0]   c_wdata, c_rdata;

  rc_lut_array dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] model [4096];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    mem_mode = 1'b1; c_we = 1'b0; c_addr = '0; c_wdata = '0;
    for (int r = 0; r < LUT_ROWS; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++) lut_in[r][k] = '0;
    // fill
    for (int a = 0; a < 4096; a++) begin
      model[a] = 16'($urandom);
      @(negedge clk); c_we = 1'b1; c_addr = 12'(a); c_wdata = model[a];
    end
    @(negedge clk); c_we = 1'b0;
    // read back in memory mode
    for (int a = 0; a < 4096; a += 3) begin
      c_addr = 12'(a); #1;
      check(c_rdata == model[a], $sformatf("cache read %0d got %h exp %h", a, c_rdata, model[a]));
    end
    // overwrite a few words and read again
    for (int n = 0; n < 64; n++) begin
      int a;
      a = $urandom_range(0, 4095);
      model[a] = 16'($urandom);
      @(negedge clk); c_we = 1'b1; c_addr = 12'(a); c_wdata = model[a];
      @(negedge clk); c_we = 1'b0; #1;
      check(c_rdata == model[a], "re-read after write");
    end
    // function mode: every LUT at its own address
    mem_mode = 1'b0;
    for (int it = 0; it < 20; it++) begin
      for (int r = 0; r < LUT_ROWS; r++)
        for (int k = 0; k < LUTS_PER_ROW; k++) lut_in[r][k] = 4'($urandom);
      #1;
      for (int r = 0; r < LUT_ROWS; r++)
        for (int k = 0; k < LUTS_PER_ROW; k++) begin
          logic [15:0] exp;
          for (int e = 0; e < 16; e++)
            exp[e] = model[{5'(r), lut_in[r][k], 3'(e / 2)}][2*k + (e % 2)];
          check(lut_out[r][k] == exp, $sformatf("lut r%0d k%0d got %h exp %h", r, k, lut_out[r][k], exp));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

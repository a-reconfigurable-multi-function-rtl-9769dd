// tb_dct_prepost: self-checking test of the four pre/post adder-subtracter
// rows on a real LUT array loaded with 12-bit multi-context adder tables:
// for random 16-bit pairs, sum = a + b and diff = a - b (mod 2^16) in one
// read.
module tb_dct_prepost;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                mem_mode;
  lut_addr_t           lut_in  [LUT_ROWS][LUTS_PER_ROW];
  lut_word_t           lut_out [LUT_ROWS][LUTS_PER_ROW];
  logic [ARR_AW-1:0]   c_addr;
  logic                c_we;
  logic [WORD_W-1:0]   c_wdata, c_rdata;

  rc_lut_array u_arr (.*);

  logic [15:0] a [4], b [4], sum [4], diff [4];
  lut_addr_t   pp_addr [4][LUTS_PER_ROW];
  lut_word_t   pp_data [4][LUTS_PER_ROW];

  dct_prepost dut (.a, .b, .sum, .diff, .lut_addr(pp_addr), .lut_data(pp_data));

  always_comb begin
    for (int r = 0; r < LUT_ROWS; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++)
        lut_in[r][k] = (r < 4) ? pp_addr[r % 4][k] : '0;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++) pp_data[r][k] = lut_out[r][k];
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] e [8];
    mem_mode = 1'b1; c_we = 1'b0; c_addr = '0; c_wdata = '0;
    for (int i = 0; i < 4; i++) begin a[i] = '0; b[i] = '0; end
    for (int r = 0; r < 4; r++)
      for (int l = 0; l < 16; l++)
        for (int w = 0; w < 8; w++) begin
          for (int k = 0; k < 8; k++) e[k] = adder_entry(l);
          @(negedge clk);
          c_we = 1'b1; c_addr = {5'(r), 4'(l), 3'(w)}; c_wdata = pack_word(e, w);
        end
    @(negedge clk); c_we = 1'b0; mem_mode = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < 4; i++) begin a[i] = 16'($urandom); b[i] = 16'($urandom); end
      #1;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (sum[i] != 16'(a[i] + b[i])) begin failures++; $display("FAIL sum"); end
        if (diff[i] != 16'(a[i] - b[i])) begin failures++; $display("FAIL diff"); end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

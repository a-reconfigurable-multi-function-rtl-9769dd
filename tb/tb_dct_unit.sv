// tb_dct_unit: self-checking test of the 8-point 1-D DCT/IDCT unit on a real
// LUT array. The testbench writes the eight PE ROMs (cosine weights scaled
// by 2^13), the PE adder/subtracter rows and the four pre/post rows through
// the cache port, then streams random rows of 8-bit samples back to back in
// forward mode, and random coefficient rows in inverse mode. Every output
// word is compared with an integer model of the distributed-arithmetic
// datapath and, within a small tolerance, with a floating-point transform.
// Once the pipeline is full a new result row must start every 9 cycles
// (Wd + 1 with Wd = 8).
module tb_dct_unit;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                mem_mode, rst_n;
  lut_addr_t           lut_in  [LUT_ROWS][LUTS_PER_ROW];
  lut_word_t           lut_out [LUT_ROWS][LUTS_PER_ROW];
  logic [ARR_AW-1:0]   c_addr;
  logic                c_we;
  logic [WORD_W-1:0]   c_wdata, c_rdata;

  rc_lut_array u_arr (.*);

  logic        idct, in_valid, in_ready, out_valid, busy;
  logic [7:0]  in_data;
  logic [15:0] out_data;
  lut_addr_t   d_addr [20][LUTS_PER_ROW];
  lut_word_t   d_data [20][LUTS_PER_ROW];

  dct_unit dut (.clk, .rst_n, .idct, .in_valid, .in_ready, .in_data,
                .out_valid, .out_data, .busy, .lut_addr(d_addr), .lut_data(d_data));

  always_comb begin
    for (int r = 0; r < LUT_ROWS; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++)
        lut_in[r][k] = (r < 20) ? d_addr[r % 20][k] : '0;
    for (int r = 0; r < 20; r++)
      for (int k = 0; k < LUTS_PER_ROW; k++) d_data[r][k] = lut_out[r][k];
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic configure(input bit inverse);
    logic [15:0] e [8];
    logic [15:0] cfg [8];
    mem_mode = 1'b1;
    for (int r = 0; r < 20; r++)
      for (int l = 0; l < 16; l++) begin
        for (int k = 0; k < 8; k++) cfg[k] = adder_entry(l);
        if (r < 16 && r % 2 == 0) begin
          int p;
          p = r / 2;
          for (int k = 0; k < 8; k++) cfg[k] = '0;
          cfg[3] = rom_entry(pe_weight(inverse, p, 0), pe_weight(inverse, p, 1),
                             pe_weight(inverse, p, 2), pe_weight(inverse, p, 3), l);
        end
        for (int w = 0; w < 8; w++) begin
          for (int k = 0; k < 8; k++) e[k] = cfg[k];
          @(negedge clk);
          c_we = 1'b1; c_addr = {5'(r), 4'(l), 3'(w)}; c_wdata = pack_word(e, w);
        end
      end
    @(negedge clk); c_we = 1'b0; mem_mode = 1'b0;
  endtask

  localparam int ROWS = 24;
  int xin [ROWS][8];
  int row_start [ROWS];

  task automatic run(input bit inverse);
    int out_row, out_col;
    idct = inverse;
    for (int r = 0; r < ROWS; r++)
      for (int i = 0; i < 8; i++) xin[r][i] = $urandom_range(0, 255) - 128;
    xin[0] = '{127, 127, 127, 127, 127, 127, 127, 127};
    xin[1] = '{-128, -128, -128, -128, -128, -128, -128, -128};
    fork
      begin
        for (int r = 0; r < ROWS; r++)
          for (int i = 0; i < 8; i++) begin
            @(negedge clk);
            in_valid = 1'b1; in_data = 8'(xin[r][i]);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
          end
        @(negedge clk); in_valid = 1'b0;
      end
      begin
        out_row = 0; out_col = 0;
        while (out_row < ROWS) begin
          @(posedge clk);
          if (out_valid) begin
            int y [8];
            real ideal, got;
            row_model(inverse, xin[out_row], 8, y);
            if (out_col == 0) row_start[out_row] = cyc;
            chk(int'($signed(out_data)) == y[out_col],
                $sformatf("inv=%0d row %0d col %0d got %0d exp %0d", inverse, out_row, out_col, $signed(out_data), y[out_col]));
            ideal = dct1d_real(inverse, xin[out_row], out_col);
            got = real'($signed(out_data)) / 32.0;
            chk(got - ideal < 1.0 && ideal - got < 1.0, $sformatf("ideal %f got %f", ideal, got));
            out_col++;
            if (out_col == 8) begin out_col = 0; out_row++; end
          end
        end
      end
    join
    for (int r = 2; r < ROWS; r++)
      chk(row_start[r] - row_start[r-1] == 9, $sformatf("row spacing %0d", row_start[r] - row_start[r-1]));
    repeat (3) @(negedge clk);
    chk(!busy, "idle after last row");
  endtask

  initial begin
    rst_n = 1'b0; idct = 1'b0; in_valid = 1'b0; in_data = '0;
    mem_mode = 1'b1; c_we = 1'b0; c_addr = '0; c_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    configure(1'b0);
    run(1'b0);
    configure(1'b1);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

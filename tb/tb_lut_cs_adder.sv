// tb_lut_cs_adder: self-checking test of the LUT carry-select adder.
// The testbench plays the LUTs: each LUT address is answered with a 2-bit
// adder entry (add and subtract contexts). Random operands are added and
// subtracted and compared with plain integer arithmetic.
module tb_lut_cs_adder;
  import rc_pkg::*;
  import tb_rc_pkg::*;

  localparam int unsigned NLUT = 8;

  logic [2*NLUT-1:0] a, b, sum;
  logic              ctx_sub, cin, cout;
  lut_addr_t         lut_addr [NLUT];
  lut_word_t         lut_data [NLUT];

  lut_cs_adder #(.NLUT(NLUT)) dut (.*);

  always_comb
    for (int i = 0; i < NLUT; i++) lut_data[i] = adder_entry(lut_addr[i]);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [16:0] exp;
      a = 16'($urandom); b = 16'($urandom);
      if (n < 4) begin a = 16'hffff; b = 16'(n); end
      ctx_sub = n[0];
      cin     = ctx_sub ? 1'b1 : n[1];
      #1;
      exp = ctx_sub ? {1'b0, a} + {1'b0, ~b} + 17'd1 : {1'b0, a} + {1'b0, b} + 17'(cin);
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sub=%0d cin=%0d got %h exp %h", a, b, ctx_sub, cin, {cout, sum}, exp);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_buffer: self-checking test of the 1R1W data buffer: writes,
// one-cycle read latency, output hold while re is low, and old data on a
// same-address read/write.
module tb_data_buffer;
  localparam int unsigned W = 24, AW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          re, we;
  logic [AW-1:0] raddr, waddr;
  logic [W-1:0]  rdata, wdata;

  data_buffer #(.W(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] model [256];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    re = 0; we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; waddr = 8'(a); wdata = 24'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] exp;
      @(negedge clk);
      re = 1; raddr = 8'($urandom);
      we = ($urandom_range(0, 1) == 1);
      waddr = (n % 5 == 0) ? raddr : 8'($urandom);
      wdata = 24'($urandom);
      exp = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      re = 0; we = 0;
      chk(rdata == exp, $sformatf("read got %h exp %h", rdata, exp));
      @(negedge clk);
      chk(rdata == exp, "hold while re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rc_tag_array: self-checking test of the tag store: misses after reset,
// hits after an update, misses on a different tag, invalidation by an
// update with valid = 0 and by flush.
module tb_rc_tag_array;
  import rc_pkg::*;

  localparam int unsigned TAG_W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                      rst_n, flush, lk_hit, upd_en, upd_valid;
  logic [ROW_AW+LINE_AW-1:0] lk_index, upd_index;
  logic [TAG_W-1:0]          lk_tag, upd_tag;

  rc_tag_array #(.TAG_W(TAG_W)) dut (.*);

  int checks = 0, failures = 0;
  logic [TAG_W-1:0] mtag [512];
  bit               mval [512];

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
    rst_n = 1'b0; flush = 1'b0; upd_en = 1'b0; upd_valid = 1'b0;
    upd_index = '0; upd_tag = '0; lk_index = '0; lk_tag = '0;
    for (int i = 0; i < 512; i++) mval[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 512; i += 7) begin
      lk_index = 9'(i); lk_tag = 8'($urandom); #1;
      chk(!lk_hit, "miss after reset");
    end
    for (int n = 0; n < 3000; n++) begin
      int i;
      i = $urandom_range(0, 511);
      @(negedge clk);
      if ($urandom_range(0, 2) != 0) begin
        upd_en = 1'b1; upd_index = 9'(i); upd_tag = 8'($urandom_range(0, 3));
        upd_valid = ($urandom_range(0, 7) != 0);
        mtag[i] = upd_tag; mval[i] = upd_valid;
      end else upd_en = 1'b0;
      @(negedge clk); upd_en = 1'b0;
      lk_index = 9'($urandom_range(0, 511)); lk_tag = 8'($urandom_range(0, 3)); #1;
      chk(lk_hit == (mval[lk_index] && mtag[lk_index] == lk_tag), "lookup");
    end
    @(negedge clk); flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    for (int i = 0; i < 512; i++) begin
      lk_index = 9'(i); lk_tag = mtag[i]; #1;
      chk(!lk_hit, "miss after flush");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

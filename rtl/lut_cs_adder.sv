// lut_cs_adder: an N-bit adder (or subtracter) built from 2-bit adder 4-LUTs
// and a carry-select multiplexer chain.
//
// Each LUT is addressed by two bits of each operand, {b[2i+1:2i], a[2i+1:2i]},
// and returns both candidate results, {carry, sum[1:0]} for carry-in 0 and
// for carry-in 1, so all LUTs are read in parallel; only the multiplexers
// see the carry ripple. Multi-context LUT entries hold an add context in bits
// [5:0] and a subtract context in [11:6]; "ctx_sub" picks the context. The
// subtract context is loaded with the table of a + ~b, and the caller drives
// cin = 1 for a subtraction, so no extra logic is needed beyond the context
// select. What the LUTs hold is configuration data; this block is only the
// address wiring and the carry-select chain around them.
//
// Interface: lut_addr/lut_data connect to NLUT LUTs of the array (the read is
// combinational, so the whole block is combinational). sum has 2*NLUT bits,
// cout is the carry out of the top LUT.
module lut_cs_adder
  import rc_pkg::*;
#(
  parameter int unsigned NLUT = 8
) (
  input  logic [2*NLUT-1:0] a,
  input  logic [2*NLUT-1:0] b,
  input  logic              ctx_sub,
  input  logic              cin,
  output lut_addr_t         lut_addr [NLUT],
  input  lut_word_t         lut_data [NLUT],
  output logic [2*NLUT-1:0] sum,
  output logic              cout
);

  logic [NLUT:0] c;

  assign c[0] = cin;
  assign cout = c[NLUT];

  for (genvar i = 0; i < NLUT; i++) begin : g_lut
    logic [2:0] pick;
    assign lut_addr[i]       = {b[2*i+1], b[2*i], a[2*i+1], a[2*i]};
    assign pick              = cs_pick(lut_data[i], ctx_sub, c[i]);
    assign sum[2*i+1 -: 2]   = pick[1:0];
    assign c[i+1]            = pick[2];
  end

endmodule

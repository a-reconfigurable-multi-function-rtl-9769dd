// data_buffer: storage for the operands and results of a function-unit run:
// the input data cache and the intermediate-result cache that feed the
// reconfigurable cache when it works as a function unit.
//
// Behaviour: a simple dual-port word memory with one synchronous read port
// and one write port. A read issued with "re" high returns its word on
// rdata after the next rising edge; rdata holds its value while re is low.
// A write with "we" high updates the word on the rising edge. Reading and
// writing the same address in one cycle returns the old word.
//
// The design uses ordinary cache modules for these two stores, addressed
// sequentially by the controller. Here they are reduced to the data array a
// cache module would use for that job: no tags (the controller addresses
// them directly) and one read plus one write per cycle, so that a
// convolution pass can read an intermediate result and store its update in
// the same cycle. Word width and depth are this implementation's choices.
module data_buffer #(
  parameter int unsigned W  = 24,
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule

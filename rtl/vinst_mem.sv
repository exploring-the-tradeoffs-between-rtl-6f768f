// vinst_mem: the vector-thread instruction store read by the vector issue unit.
//
// Holds the microthread code that vector fetches point at: SIZE_BYTES of
// 32-bit instructions (2 KB, the size of the VT instruction cache). The issue
// unit reads one instruction per cycle combinationally at a byte address;
// the write port loads code into it. The size follows the architecture; the
// cache's tags and refill path are not modelled here: the store is filled
// through the write port before use, so it behaves as an always-hitting
// instruction cache.
module vinst_mem #(
  parameter int unsigned SIZE_BYTES = 2048
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(SIZE_BYTES)-1:0] waddr,   // byte address, word aligned
  input  logic [31:0]                   wdata,
  input  logic [$clog2(SIZE_BYTES)-1:0] raddr,   // byte address, word aligned
  output logic [31:0]                   rdata
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(SIZE_BYTES);

  logic [31:0] mem [WORDS];

  assign rdata = mem[raddr[AW-1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:2]] <= wdata;
  end
endmodule

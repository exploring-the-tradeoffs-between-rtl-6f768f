// vrf_bank: one bank of the banked vector register file.
//
// Each lane's register file is split into NUM_BANKS independent banks with two
// read ports and one write port each (2r1w). The registers of one
// microthread (uT) live together in one bank and consecutive uTs of a lane are
// striped across the banks, so a sequencer stepping through the uTs touches a
// new bank every cycle. Reads are combinational (the file is built from
// flip-flops); the write takes effect at the clock edge. The 2r1w organisation
// and the striping follow the architecture; the depth is REGS_PER_LANE /
// NUM_BANKS, 64 entries in the 256-register lane.
module vrf_bank #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] raddr0,
  output logic [WIDTH-1:0]         rdata0,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata
);
  logic [WIDTH-1:0] regs [DEPTH];

  assign rdata0 = regs[raddr0];
  assign rdata1 = regs[raddr1];

  always_ff @(posedge clk) begin
    if (we) regs[waddr] <= wdata;
  end
endmodule

// int_mul: pipelined 32-bit integer multiplier (low 32 bits of the product).
//
// A long-latency functional unit shared by the uTs of a lane. It accepts one
// operation per cycle and delivers its result LATENCY cycles later together
// with the caller's tag (the destination register and uT it belongs to). The
// three-cycle latency is the one given for the integer multiplier; the
// arrangement (product formed in the first stage, then carried through
// registers that a retiming tool would rebalance) is this design's own.
module int_mul #(
  parameter int unsigned LATENCY = 3,
  parameter int unsigned TAG_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       a,
  input  logic [31:0]       b,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [31:0]       result,
  output logic [TAG_W-1:0]  out_tag
);
  logic [31:0]      prod_q [LATENCY];
  logic [TAG_W-1:0] tag_q  [LATENCY];
  logic             vld_q  [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) vld_q[i] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int i = 1; i < LATENCY; i++) vld_q[i] <= vld_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    prod_q[0] <= a * b;
    tag_q[0]  <= in_tag;
    for (int i = 1; i < LATENCY; i++) begin
      prod_q[i] <= prod_q[i-1];
      tag_q[i]  <= tag_q[i-1];
    end
  end

  assign out_valid = vld_q[LATENCY-1];
  assign result    = prod_q[LATENCY-1];
  assign out_tag   = tag_q[LATENCY-1];
endmodule

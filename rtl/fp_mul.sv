// fp_mul: pipelined IEEE-754 single-precision floating-point multiplier.
//
// One multiplication may start every cycle (in_valid, a, b, in_tag); its
// result leaves LATENCY cycles later on out_valid/result/out_tag. The tag is
// carried unchanged so that the lane can tell where the result belongs.
//
// How it works: the 24-bit significands (hidden one restored) are multiplied
// into a 48-bit product, the product is normalised by at most one place, and
// the result is rounded to nearest, ties to even, using a guard bit and a
// sticky bit. Special operands: NaN in, or infinity times zero, gives the
// quiet NaN 0x7fc00000; infinity times a non-zero number gives a signed
// infinity; results above the largest finite number become infinity.
// Subnormal operands are read as zero and results below the smallest normal
// number are flushed to a signed zero.
//
// The three-cycle latency is the one given for the single-precision
// multiplier of the architecture. The whole operation is computed in the
// first stage and then carried through the remaining stages, to be spread by
// register retiming in synthesis. Flushing subnormals to zero, the NaN value
// and the tag are this design's own choices.
module fp_mul #(
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
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic [31:0] r;
  always_comb begin
    logic        sa, sb, sr;
    logic [7:0]  ea, eb;
    logic        za, zb, ia, ib, na, nb;
    logic [47:0] prod;
    logic [23:0] m;        // hidden bit + 23 fraction bits before rounding
    logic        g, st;
    logic [24:0] mr;       // rounded significand with carry
    logic signed [10:0] e;

    r  = QNAN;
    sa = a[31]; sb = b[31]; sr = sa ^ sb;
    ea = a[30:23]; eb = b[30:23];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (a[22:0] == '0); ib = (eb == 8'hff) && (b[22:0] == '0);
    na = (ea == 8'hff) && (a[22:0] != '0); nb = (eb == 8'hff) && (b[22:0] != '0);

    prod = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e    = 11'(ea) + 11'(eb) - 11'sd127;
    if (prod[47]) begin
      m  = prod[47:24];
      g  = prod[23];
      st = |prod[22:0];
      e  = e + 11'sd1;
    end else begin
      m  = prod[46:23];
      g  = prod[22];
      st = |prod[21:0];
    end
    mr = {1'b0, m} + 25'((g && (st || m[0])) ? 1 : 0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end

    if (na || nb || (ia && zb) || (ib && za)) r = QNAN;
    else if (ia || ib)                        r = {sr, 8'hff, 23'd0};
    else if (za || zb)                        r = {sr, 31'd0};
    else if (e >= 11'sd255)                   r = {sr, 8'hff, 23'd0};
    else if (e <= 11'sd0)                     r = {sr, 31'd0};
    else                                      r = {sr, e[7:0], mr[22:0]};
  end

  logic [31:0]      res_q [LATENCY];
  logic [TAG_W-1:0] tag_q [LATENCY];
  logic             vld_q [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) vld_q[i] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int i = 1; i < LATENCY; i++) vld_q[i] <= vld_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    res_q[0] <= r;
    tag_q[0] <= in_tag;
    for (int i = 1; i < LATENCY; i++) begin
      res_q[i] <= res_q[i-1];
      tag_q[i] <= tag_q[i-1];
    end
  end

  assign out_valid = vld_q[LATENCY-1];
  assign result    = res_q[LATENCY-1];
  assign out_tag   = tag_q[LATENCY-1];
endmodule

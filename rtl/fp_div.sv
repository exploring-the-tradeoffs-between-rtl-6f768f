// fp_div: pipelined IEEE-754 single-precision floating-point divider.
//
// One division a / b may start every cycle (in_valid, a, b, in_tag); the
// quotient leaves LATENCY cycles later on out_valid/result/out_tag, with the
// tag carried unchanged.
//
// How it works: the dividend's significand (hidden one restored) is shifted
// left by 26 places and divided by the divisor's 24-bit significand, giving a
// 26- or 27-bit integer quotient, i.e. the 24 result bits plus a guard bit
// (and one more when the dividend's significand is the larger); the remainder
// and any lower quotient bit form the sticky bit. The result is rounded to
// nearest, ties to even. Special operands: NaN, 0/0 and inf/inf give the
// quiet NaN 0x7fc00000; x/0 and inf/x give a signed infinity; 0/x and x/inf
// give a signed zero; results above the largest finite number become
// infinity. Subnormal operands are read as zero and results below the
// smallest normal number are flushed to a signed zero.
//
// The seven-cycle latency is the one given for the single-precision divider
// of the architecture. The whole operation is computed in the first stage
// (an integer divide) and then carried through the remaining stages, to be
// spread by register retiming in synthesis. Flushing subnormals to zero, the
// NaN value and the tag are this design's own choices.
module fp_div #(
  parameter int unsigned LATENCY = 7,
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
    logic        sr;
    logic        za, zb, ia, ib, na, nb;
    logic [49:0] num;
    logic [26:0] q;
    logic [23:0] rem;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] mr;
    logic signed [10:0] e;

    r  = QNAN;
    sr = a[31] ^ b[31];
    za = (a[30:23] == 8'd0); zb = (b[30:23] == 8'd0);
    ia = (a[30:23] == 8'hff) && (a[22:0] == '0); ib = (b[30:23] == 8'hff) && (b[22:0] == '0);
    na = (a[30:23] == 8'hff) && (a[22:0] != '0); nb = (b[30:23] == 8'hff) && (b[22:0] != '0);

    num = {1'b1, a[22:0], 26'd0};
    q   = zb ? '0 : 27'(num / 50'({1'b1, b[22:0]}));
    rem = zb ? '0 : 24'(num % 50'({1'b1, b[22:0]}));
    e   = 11'(a[30:23]) - 11'(b[30:23]) + 11'sd127;
    if (q[26]) begin
      m  = q[26:3];
      g  = q[2];
      st = (|q[1:0]) || (rem != '0);
    end else begin
      m  = q[25:2];
      g  = q[1];
      st = q[0] || (rem != '0);
      e  = e - 11'sd1;
    end
    mr = {1'b0, m} + 25'((g && (st || m[0])) ? 1 : 0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end

    if (na || nb || (za && zb) || (ia && ib)) r = QNAN;
    else if (ia || zb)                       r = {sr, 8'hff, 23'd0};
    else if (za || ib)                       r = {sr, 31'd0};
    else if (e >= 11'sd255)                  r = {sr, 8'hff, 23'd0};
    else if (e <= 11'sd0)                    r = {sr, 31'd0};
    else                                     r = {sr, e[7:0], mr[22:0]};
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

// fp_add: pipelined IEEE-754 single-precision floating-point adder/subtractor.
//
// One operation may start every cycle (in_valid, a, b, sub, in_tag); the
// result a + b (or a - b when sub is set) leaves LATENCY cycles later on
// out_valid/result/out_tag, with the tag carried unchanged.
//
// How it works: the operand with the larger magnitude is taken as x, the other
// as y. Both significands get their hidden one and three extra low bits
// (guard, round, sticky); y is shifted right by the exponent difference, with
// the bits shifted out OR-ed into the sticky bit. The significands are added
// or subtracted, the sum is normalised (one place right after a carry, or
// left by the leading-zero count after a cancellation) and rounded to
// nearest, ties to even. An exact zero from x - x is +0. Special operands: a
// NaN, or infinities of opposite sign, give the quiet NaN 0x7fc00000; one
// infinity gives that infinity; results above the largest finite number give
// a signed infinity. Subnormal operands are read as zero and results below
// the smallest normal number are flushed to a signed zero.
//
// The three-cycle latency is the one given for the single-precision adder of
// the architecture. The whole operation is computed in the first stage and
// then carried through the remaining stages, to be spread by register
// retiming in synthesis. Flushing subnormals to zero, the NaN value and the
// tag are this design's own choices.
module fp_add #(
  parameter int unsigned LATENCY = 3,
  parameter int unsigned TAG_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       a,
  input  logic [31:0]       b,
  input  logic              sub,       // 1: a - b
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [31:0]       result,
  output logic [TAG_W-1:0]  out_tag
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic [31:0] r;
  always_comb begin
    logic [31:0] bb, x, y;
    logic        xz, yz, xi, yi, xn, yn, eff_sub;
    logic [7:0]  d;
    logic [26:0] mx, my;     // hidden one, 23 fraction bits, guard, round, sticky
    logic [27:0] s;          // sum with carry
    logic [26:0] n;          // normalised significand, leading one at bit 26
    logic [4:0]  lz;
    logic        sticky;
    logic [24:0] mr;
    logic signed [10:0] e;

    r  = QNAN;
    lz = '0;
    bb = {b[31] ^ sub, b[30:0]};
    if (a[30:0] >= bb[30:0]) begin x = a; y = bb; end
    else                     begin x = bb; y = a; end
    xz = (x[30:23] == 8'd0); yz = (y[30:23] == 8'd0);
    xi = (x[30:23] == 8'hff) && (x[22:0] == '0);
    yi = (y[30:23] == 8'hff) && (y[22:0] == '0);
    xn = (x[30:23] == 8'hff) && (x[22:0] != '0);
    yn = (y[30:23] == 8'hff) && (y[22:0] != '0);
    eff_sub = x[31] ^ y[31];

    d  = x[30:23] - y[30:23];
    mx = {1'b1, x[22:0], 3'b000};
    my = yz ? '0 : {1'b1, y[22:0], 3'b000};
    if (d >= 8'd27) begin
      sticky = |my;
      my     = 27'(sticky);
    end else begin
      sticky = 1'b0;
      for (int i = 0; i < 27; i++)
        if (i < int'(d) && my[i]) sticky = 1'b1;
      my = (my >> d) | 27'(sticky);
    end

    s = eff_sub ? {1'b0, mx} - {1'b0, my} : {1'b0, mx} + {1'b0, my};
    e = 11'(x[30:23]);
    if (s[27]) begin
      n = s[27:1] | 27'(s[0]);
      e = e + 11'sd1;
    end else begin
      for (int i = 0; i <= 26; i++)
        if (s[i]) lz = 5'(26 - i);
      n = s[26:0] << lz;
      e = e - 11'(lz);
    end
    // round to nearest even on guard (bit 2) with round|sticky (bits 1:0)
    mr = {1'b0, n[26:3]} + 25'((n[2] && ((|n[1:0]) || n[3])) ? 1 : 0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end

    if (xn || yn || (xi && yi && eff_sub)) r = QNAN;
    else if (xi)                          r = x;
    else if (xz)                          r = {x[31] & y[31], 31'd0};   // both zero
    else if (s == '0)                     r = 32'd0;                    // exact cancellation
    else if (e >= 11'sd255)               r = {x[31], 8'hff, 23'd0};
    else if (e <= 11'sd0)                 r = {x[31], 31'd0};
    else                                  r = {x[31], e[7:0], mr[22:0]};
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

// fp_sqrt: pipelined IEEE-754 single-precision floating-point square root.
//
// One square root may start every cycle (in_valid, a, in_tag); the result
// leaves LATENCY cycles later on out_valid/result/out_tag, with the tag
// carried unchanged.
//
// How it works: with a = m * 2**(E-23), m the 24-bit significand with its
// hidden one, m is shifted left by 27 or 28 places so that the remaining
// exponent is even, and the integer square root of that 51- or 52-bit value
// is taken digit by digit (restoring, one result bit per step). The 26-bit
// root holds the 24 result bits, a guard bit and a round bit; the round bit
// and a non-zero remainder form the sticky bit, and the result is rounded to
// nearest, ties to even. Special operands: NaN and negative numbers give the
// quiet NaN 0x7fc00000; +inf gives +inf; +0 and -0 are returned unchanged.
// Subnormal operands are read as zero.
//
// The ten-cycle latency is the one given for the single-precision square-root
// unit of the architecture. The whole operation is computed in the first stage
// and then carried through the remaining stages, to be spread by register
// retiming in synthesis. Treating subnormals as zero, the NaN value and the
// tag are this design's own choices.
module fp_sqrt #(
  parameter int unsigned LATENCY = 10,
  parameter int unsigned TAG_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       a,
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [31:0]       result,
  output logic [TAG_W-1:0]  out_tag
);
  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  logic [31:0] r;
  always_comb begin
    logic [51:0] rad;
    logic [27:0] rem, trial;
    logic [25:0] root;
    logic [24:0] mr;
    logic        odd;
    logic signed [10:0] e;

    r    = QNAN;
    odd  = !a[23];                        // E = exp - 127 is odd when exp is even
    rad  = odd ? {1'b1, a[22:0], 28'd0} : {1'b0, 1'b1, a[22:0], 27'd0};
    rem  = '0;
    root = '0;
    for (int i = 25; i >= 0; i--) begin
      rem   = {rem[25:0], rad[2*i +: 2]};
      trial = {root, 2'b01};
      if (rem >= trial) begin
        rem  = rem - trial;
        root = {root[24:0], 1'b1};
      end else begin
        root = {root[24:0], 1'b0};
      end
    end
    // exponent: 127 + 25 + (E - 23 - k) / 2 with k = 28 (E odd) or 27 (E even)
    e  = 11'sd152 + ((11'(a[30:23]) - 11'sd127 - 11'sd23 - (odd ? 11'sd28 : 11'sd27)) >>> 1);   // even, so exact
    mr = {1'b0, root[25:2]} + 25'((root[1] && (root[0] || (rem != '0) || root[2])) ? 1 : 0);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 11'sd1;
    end

    if (a[30:23] == 8'hff && a[22:0] != '0)  r = QNAN;
    else if (a[30:23] == 8'd0)                r = {a[31], 31'd0};
    else if (a[31])                           r = QNAN;
    else if (a[30:23] == 8'hff)               r = 32'h7f80_0000;
    else                                      r = {1'b0, e[7:0], mr[22:0]};
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

// tb_fp_div: streams multiplications into fp_mul, one per cycle with random
// gaps, and checks every result, its tag and its 3-cycle latency.
//
// The expected value is computed independently in double precision: a single
// converts exactly into a double and the product of two 24-bit significands
// fits the 53 bits of a double, so rounding the double product once to single
// precision (to nearest, ties to even, done bit by bit below) gives the
// correctly rounded result. Special operands (zeros, infinities, NaN) are
// mixed in and exponents span the whole range, so overflow to infinity is
// exercised; results in the lowest two binades, where the unit flushes to
// zero, are only checked for their tag and timing.
module tb_fp_div;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  logic        iv, ov;
  logic [31:0] a, b, r;
  logic [7:0]  it, ot;
  int checks = 0, failures = 0, skipped = 0;
  longint cyc = 0;
  typedef struct { longint t; logic [31:0] p; logic [7:0] tag; logic exact; } exp_t;
  exp_t q[$];

  fp_div #(.LATENCY(7), .TAG_W(8)) dut (
    .clk, .rst_n, .in_valid(iv), .a, .b, .in_tag(it),
    .out_valid(ov), .result(r), .out_tag(ot)
  );

  function automatic logic [63:0] s2d(input logic [31:0] s);
    if (s[30:23] == 8'hff) return {s[31], 11'h7ff, s[22:0], 29'd0};
    if (s[30:23] == 8'h00) return {s[31], 63'd0};
    return {s[31], 11'(int'(s[30:23]) - 127 + 1023), s[22:0], 29'd0};
  endfunction

  // Round a double to single, to nearest even; exact = 0 when the result
  // falls where the unit flushes to zero.
  function automatic logic [31:0] d2s(input logic [63:0] d, output logic exact);
    int          e;
    logic [24:0] m;
    exact = 1'b1;
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {d[63], 8'hff, 23'd0};
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 0) || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e <= 1) begin exact = 1'b0; return 32'd0; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] rnd_operand(input int ex);
    return {1'($urandom), 8'(ex), 23'($urandom)};
  endfunction

  function automatic logic [31:0] special();
    unique case ($urandom % 5)
      0: return 32'h0000_0000;
      1: return 32'h8000_0000;
      2: return 32'h7f80_0000;
      3: return 32'hff80_0000;
      default: return 32'h7fc0_0001;
    endcase
  endfunction

  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] y,
                                        output logic exact);
    return d2s($realtobits($bitstoreal(s2d(x)) / $bitstoreal(s2d(y))), exact);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ov) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        e = q.pop_front();
        if ((e.exact && r !== e.p) || ot !== e.tag || cyc != e.t + 7) begin
          failures++;
          $display("FAIL r=%h exp=%h tag=%h/%h at %0d issued %0d", r, e.p, ot, e.tag, cyc, e.t);
        end
        if (!e.exact) skipped++;
      end
    end
    if (rst_n && iv) begin
      logic ex;
      logic [31:0] p;
      p = model(a, b, ex);
      q.push_back('{cyc, p, it, ex});
    end
  end

  initial begin
    int ea, mode;
    iv = 0; a = 0; b = 0; it = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: 3.75 / 2.5 = 1.5, 0 / 0 = NaN, largest / 0.5 = inf, 1 / 3
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      iv = 1; it = 8'(i);
      unique case (i)
        0: begin a = 32'h4070_0000; b = 32'h4020_0000; end
        1: begin a = 32'h0000_0000; b = 32'h8000_0000; end
        2: begin a = 32'h7f7f_ffff; b = 32'h3f00_0000; end
        default: begin a = 32'h3f80_0000; b = 32'h4040_0000; end
      endcase
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      iv   = ($urandom % 4) != 0;
      it   = 8'(i);
      mode = $urandom % 16;
      ea   = 1 + $urandom % 254;
      a    = rnd_operand(ea);
      if (mode == 0)      b = special();
      else if (mode == 1) a = special();
      else if (mode < 6)  b = rnd_operand(1 + $urandom % 254);
      else                b = rnd_operand(ea + int'($urandom % 3) - 1);           // quotient near 1.0
    end
    @(negedge clk); iv = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("fp_div: %0d results in the flush-to-zero range not compared", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fp_add: streams additions and subtractions into fp_add, one per cycle
// with random gaps, and checks every result, its tag and its 3-cycle latency.
//
// The expected value is computed independently in double precision: a single
// converts exactly into a double, and with exponents at most 28 apart the
// double sum is exact, so rounding it once to single precision (to nearest,
// ties to even, done bit by bit below) gives the correctly rounded result.
// Pairs further apart are checked against the rule that the larger operand
// is returned unchanged. Special operands (zeros, infinities, NaN) are mixed
// in; results in the lowest two binades, where the unit flushes to zero, are
// only checked for their tag and timing.
module tb_fp_add;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  logic        iv, ov, sub;
  logic [31:0] a, b, r;
  logic [7:0]  it, ot;
  int checks = 0, failures = 0, skipped = 0;
  longint cyc = 0;
  typedef struct { longint t; logic [31:0] p; logic [7:0] tag; logic exact; } exp_t;
  exp_t q[$];

  fp_add #(.LATENCY(3), .TAG_W(8)) dut (
    .clk, .rst_n, .in_valid(iv), .a, .b, .sub, .in_tag(it),
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
                                        input logic s, output logic exact);
    logic [31:0] yy;
    int dx;
    yy = {y[31] ^ s, y[30:0]};
    dx = int'(x[30:23]) - int'(y[30:23]);
    exact = 1'b1;
    if (x[30:23] != 8'hff && y[30:23] != 8'hff && x[30:23] != 0 && y[30:23] != 0) begin
      if (dx > 28)  return x;
      if (dx < -28) return yy;
    end
    return d2s($realtobits($bitstoreal(s2d(x)) + $bitstoreal(s2d(yy))), exact);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ov) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        e = q.pop_front();
        if ((e.exact && r !== e.p) || ot !== e.tag || cyc != e.t + 3) begin
          failures++;
          $display("FAIL r=%h exp=%h tag=%h/%h at %0d issued %0d", r, e.p, ot, e.tag, cyc, e.t);
        end
        if (!e.exact) skipped++;
      end
    end
    if (rst_n && iv) begin
      logic ex;
      logic [31:0] p;
      p = model(a, b, sub, ex);
      q.push_back('{cyc, p, it, ex});
    end
  end

  initial begin
    int ea, mode;
    iv = 0; a = 0; b = 0; it = 0; sub = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: 1.5 + 2.5 = 4, 1 - 1 = +0, largest + largest = inf, inf - inf = NaN
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      iv = 1; it = 8'(i);
      unique case (i)
        0: begin a = 32'h3fc0_0000; b = 32'h4020_0000; sub = 0; end
        1: begin a = 32'h3f80_0000; b = 32'h3f80_0000; sub = 1; end
        2: begin a = 32'h7f7f_ffff; b = 32'h7f7f_ffff; sub = 0; end
        default: begin a = 32'h7f80_0000; b = 32'h7f80_0000; sub = 1; end
      endcase
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      iv   = ($urandom % 4) != 0;
      sub  = 1'($urandom);
      it   = 8'(i);
      mode = $urandom % 16;
      ea   = 1 + $urandom % 254;
      a    = rnd_operand(ea);
      if (mode == 0)      b = special();
      else if (mode == 1) a = special();
      else if (mode == 2) b = rnd_operand(1 + $urandom % 254);
      else if (mode == 3) b = {~a[31] ^ sub, a[30:4], 4'($urandom)};   // heavy cancellation
      else begin
        int eb;
        eb = ea + int'($urandom % 57) - 28;
        if (eb < 1) eb = 1;
        if (eb > 254) eb = 254;
        b = rnd_operand(eb);
      end
    end
    @(negedge clk); iv = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("fp_add: %0d results in the flush-to-zero range not compared", skipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

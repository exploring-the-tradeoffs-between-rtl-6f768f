// tb_int_mul: streams one multiplication per cycle (with gaps) into int_mul
// and checks every product, its tag, and that it appears exactly 3 cycles
// after it was issued.
module tb_int_mul;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  logic        iv, ov;
  logic [31:0] a, b, r;
  logic [7:0]  it, ot;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { longint t; logic [31:0] p; logic [7:0] tag; } exp_t;
  exp_t q[$];

  int_mul #(.LATENCY(3), .TAG_W(8)) dut (
    .clk, .rst_n, .in_valid(iv), .a, .b, .in_tag(it),
    .out_valid(ov), .result(r), .out_tag(ot)
  );

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && ov) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
      else begin
        e = q.pop_front();
        if (r !== e.p || ot !== e.tag || cyc != e.t + 3) begin
          failures++;
          $display("FAIL r=%h exp=%h tag=%h/%h at %0d issued %0d", r, e.p, ot, e.tag, cyc, e.t);
        end
      end
    end
    if (rst_n && iv) q.push_back('{cyc, a * b, it});
  end

  initial begin
    iv = 0; a = 0; b = 0; it = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      iv = ($urandom % 4) != 0;
      a  = (i < 4) ? 32'hFFFF_FFFF : $urandom;
      b  = (i < 2) ? 32'd3 : $urandom;
      it = 8'(i);
    end
    @(negedge clk); iv = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

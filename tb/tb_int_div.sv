// tb_int_div: streams one division or remainder per cycle (with gaps) into
// int_div and checks every signed quotient and remainder (division by zero and
// overflow included), its tag, and that it appears exactly 12 cycles after it
// was issued.
module tb_int_div;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  logic        iv, ov, wr;
  logic [31:0] a, b, r;
  logic [7:0]  it, ot;
  int checks = 0, failures = 0;
  longint cyc = 0;
  typedef struct { longint t; logic [31:0] p; logic [7:0] tag; } exp_t;
  exp_t q[$];

  function automatic logic [31:0] ref_div(logic [31:0] x, logic [31:0] y, logic rem);
    if (y == 0) return rem ? x : 32'hFFFF_FFFF;
    if (x == 32'h8000_0000 && y == 32'hFFFF_FFFF) return rem ? 32'd0 : 32'h8000_0000;
    return rem ? 32'($signed(x) % $signed(y)) : 32'($signed(x) / $signed(y));
  endfunction

  int_div #(.LATENCY(12), .TAG_W(8)) dut (
    .clk, .rst_n, .in_valid(iv), .a, .b, .want_rem(wr), .in_tag(it),
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
        if (r !== e.p || ot !== e.tag || cyc != e.t + 12) begin
          failures++;
          $display("FAIL r=%h exp=%h tag=%h/%h at %0d issued %0d", r, e.p, ot, e.tag, cyc, e.t);
        end
      end
    end
    if (rst_n && iv) q.push_back('{cyc, ref_div(a, b, wr), it});
  end

  initial begin
    iv = 0; a = 0; b = 0; it = 0; wr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      iv = ($urandom % 4) != 0;
      wr = i[0];
      case (i)
        0, 1:    begin a = 32'd100;        b = 32'd0;          end
        2, 3:    begin a = 32'h8000_0000;  b = 32'hFFFF_FFFF;  end
        4, 5:    begin a = -32'd7;         b = 32'd2;          end
        6, 7:    begin a = 32'd7;          b = -32'd2;         end
        default: begin a = $urandom;       b = (i % 3 == 0) ? $urandom_range(1, 100) : $urandom; end
      endcase
      it = 8'(i);
    end
    @(negedge clk); iv = 0;
    repeat (15) @(posedge clk);
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

// tb_vrf_bank: writes random values to random entries of a 64-entry 2r1w bank
// and checks both read ports against a shadow copy, including a write that
// must not be visible before its clock edge.
module tb_vrf_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [5:0]  ra0, ra1, wa;
  logic [31:0] rd0, rd1, wd;
  logic        we;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  vrf_bank #(.DEPTH(64), .WIDTH(32)) dut (
    .clk, .raddr0(ra0), .rdata0(rd0), .raddr1(ra1), .rdata1(rd1),
    .we, .waddr(wa), .wdata(wd)
  );

  initial begin
    we = 0; ra0 = 0; ra1 = 0; wa = 0; wd = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; wa = 6'(i); wd = $urandom; shadow[i] = wd;
    end
    @(negedge clk); we = 0;
    repeat (400) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 6'($urandom); wd = $urandom;
      ra0 = 6'($urandom); ra1 = (($urandom % 4) == 0) ? wa : 6'($urandom);
      #1;
      checks++;
      if (rd0 !== shadow[ra0] || rd1 !== shadow[ra1]) begin
        failures++;
        $display("FAIL ra0=%0d rd0=%h exp=%h ra1=%0d rd1=%h exp=%h", ra0, rd0, shadow[ra0], ra1, rd1, shadow[ra1]);
      end
      @(posedge clk);
      if (we) shadow[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_vinst_mem: fills the 2 KB instruction store through its write port and
// reads every word back at its byte address.
module tb_vinst_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        we;
  logic [10:0] wa, ra;
  logic [31:0] wd, rd;
  logic [31:0] shadow [512];
  int checks = 0, failures = 0;

  vinst_mem #(.SIZE_BYTES(2048)) dut (.clk, .we, .waddr(wa), .wdata(wd), .raddr(ra), .rdata(rd));

  initial begin
    we = 0; wa = 0; ra = 0; wd = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; wa = 11'(i * 4); wd = $urandom; shadow[i] = wd;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 512; i++) begin
      ra = 11'(((i * 37) % 512) * 4);
      #1;
      checks++;
      if (rd !== shadow[(i * 37) % 512]) begin
        failures++;
        $display("FAIL addr %h: %h exp %h", ra, rd, shadow[(i * 37) % 512]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

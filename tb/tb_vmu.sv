// tb_vmu: checks the vector memory unit (four lanes, vector length up to 32)
// against a behavioural data memory.
//
// The lanes are modelled here as register arrays: the unit writes them
// through its VLU port and reads them through its VSU port. Strided vector
// loads and stores with random bases, strides (including zero and negative)
// and vector lengths are checked element by element, in phases with and
// without random cache back-pressure. Without back-pressure a unit-stride load
// of 32 elements must stream at one element per cycle: it has to finish within
// vl + memory latency + 4 cycles. A vector length of zero must finish at once.
module tb_vmu;
  import maven_pkg::*;
  localparam int NL = 4, VLEN = 32, UTL = VLEN / NL, LAT = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, is_store, busy, done;
  word_t       base, stride;
  logic [4:0]  vreg;
  logic [5:0]  vl;
  logic [NL-1:0] vlu_we;
  logic [2:0]  lane_ut;
  logic [4:0]  lane_reg;
  word_t       vlu_data;
  word_t       vsu_data [NL];
  logic        req_valid, req_ready, resp_valid, m_ready;
  mem_req_t    req;
  line_t       resp_data;
  bit          stall_mode = 0;
  logic        gate;

  vmu #(.NUM_LANES(NL), .MAX_VLEN(VLEN)) dut (
    .clk, .rst_n, .start, .is_store, .base, .stride, .vreg, .vl, .busy, .done,
    .vlu_we, .lane_ut, .lane_reg, .vlu_data, .vsu_data,
    .req_valid, .req, .req_ready, .resp_valid, .resp_data
  );

  mem_model #(.WORDS(4096), .LATENCY(LAT)) u_mem (
    .clk, .req_valid(req_valid && gate && rst_n), .req, .req_ready(m_ready), .resp_valid, .resp_data
  );
  assign req_ready = m_ready && gate;
  always @(posedge clk) gate <= stall_mode ? ($urandom_range(0, 2) != 0) : 1'b1;

  // lanes
  word_t lreg [NL][UTL][32];
  always @(posedge clk)
    for (int l = 0; l < NL; l++) if (vlu_we[l]) lreg[l][lane_ut][lane_reg] <= vlu_data;
  always_comb for (int l = 0; l < NL; l++) vsu_data[l] = lreg[l][lane_ut][lane_reg];

  task automatic op(bit st, word_t b, word_t s, int r, int n, output int cycles);
    @(negedge clk);
    start = 1; is_store = st; base = b; stride = s; vreg = 5'(r); vl = 6'(n);
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 2000) begin cycles++; @(negedge clk); end
    if (!done) begin failures++; $display("FAIL operation never finished"); end
  endtask

  function automatic int widx(word_t a);
    return int'((a >> 2) % 4096);
  endfunction

  int cyc, n, r;
  word_t b, s;
  initial begin
    start = 0; is_store = 0; base = 0; stride = 0; vreg = 0; vl = 0; gate = 1;
    for (int l = 0; l < NL; l++) for (int u = 0; u < UTL; u++) for (int k = 0; k < 32; k++)
      lreg[l][u][k] = '0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // streaming rate
    op(0, 32'h100, 4, 3, VLEN, cyc);
    for (int i = 0; i < VLEN; i++) begin
      checks++;
      if (lreg[i % NL][i / NL][3] !== u_mem.mem[widx(32'h100 + 4 * i)]) begin
        failures++; $display("FAIL unit-stride load element %0d", i);
      end
    end
    checks++;
    if (cyc > VLEN + LAT + 4) begin
      failures++; $display("FAIL unit-stride load of %0d took %0d cycles", VLEN, cyc);
    end
    op(0, 32'h100, 4, 3, 0, cyc);
    checks++;
    if (cyc > 3) begin failures++; $display("FAIL empty vector took %0d cycles", cyc); end

    for (int t = 0; t < 120; t++) begin
      stall_mode = (t >= 40);
      n = $urandom_range(1, VLEN);
      r = $urandom_range(1, 31);
      case ($urandom_range(0, 3))
        0: s = 4;
        1: s = 0;
        2: s = -32'sd8;
        default: s = 4 * $urandom_range(1, 9);
      endcase
      b = 32'h2000 + 4 * $urandom_range(0, 255);
      if ($urandom_range(0, 1) == 0) begin
        op(0, b, s, r, n, cyc);
        for (int i = 0; i < n; i++) begin
          checks++;
          if (lreg[i % NL][i / NL][r] !== u_mem.mem[widx(b + s * i)]) begin
            failures++; $display("FAIL load t=%0d element %0d", t, i);
          end
        end
      end else begin
        for (int l = 0; l < NL; l++) for (int u = 0; u < UTL; u++) lreg[l][u][r] = $urandom;
        op(1, b, s, r, n, cyc);
        // with stride 0 the last element wins; otherwise every element lands
        for (int i = 0; i < n; i++) begin
          if (s == 0 && i != n - 1) continue;
          checks++;
          if (u_mem.mem[widx(b + s * i)] !== lreg[i % NL][i / NL][r]) begin
            failures++; $display("FAIL store t=%0d element %0d", t, i);
          end
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

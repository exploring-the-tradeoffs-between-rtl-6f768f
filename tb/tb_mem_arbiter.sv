// tb_mem_arbiter: checks the two-requester cache-port arbiter in front of a
// behavioural memory with a long latency and random back-pressure.
//
// Both requesters issue random streams of loads. Each must get
// exactly one response per request, in its own order, carrying the block of
// the address it asked for; when both are valid in the same cycle requester 0
// must win; and no more than DEPTH requests may be in flight at once.
module tb_mem_arbiter;
  import maven_pkg::*;
  localparam int NR = 2, DEPTH = 8, NREQ = 400;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NR-1:0] in_valid, in_ready, out_resp_valid;
  mem_req_t      in_req [NR];
  logic          req_valid, req_ready, resp_valid, m_ready, gate;
  mem_req_t      req;
  line_t         resp_data, out_resp_data;

  mem_arbiter #(.NUM_REQ(NR), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .in_valid, .in_req, .in_ready, .out_resp_valid,
    .req_valid, .req, .req_ready, .resp_valid, .resp_data, .out_resp_data
  );
  mem_model #(.WORDS(1024), .LATENCY(12)) u_mem (
    .clk, .req_valid(req_valid && gate && rst_n), .req, .req_ready(m_ready), .resp_valid, .resp_data
  );
  assign req_ready = m_ready && gate;
  always @(posedge clk) gate <= ($urandom_range(0, 4) != 0);

  mem_req_t stim  [NR][$];
  word_t    exp_a [NR][$];
  int       n_resp [NR];
  int       inflight = 0, max_inflight = 0;

  logic [NR-1:0] en;
  always @(posedge clk) for (int r = 0; r < NR; r++) en[r] <= rst_n && ($urandom_range(0, 3) != 0);
  always_comb
    for (int r = 0; r < NR; r++) begin
      in_valid[r] = en[r] && (stim[r].size() > 0);
      in_req[r]   = (stim[r].size() > 0) ? stim[r][0] : '0;
    end

  always @(posedge clk) begin
    inflight = inflight + ((req_valid && req_ready) ? 1 : 0) - (resp_valid ? 1 : 0);
    if (inflight > max_inflight) max_inflight = inflight;
    if (in_valid == 2'b11) begin
      checks++;
      if (in_ready[1]) begin failures++; $display("FAIL requester 1 won against requester 0"); end
    end
    for (int r = 0; r < NR; r++) begin
      if (in_valid[r] && in_ready[r]) begin
        exp_a[r].push_back(stim[r][0].addr);
        void'(stim[r].pop_front());
      end
      if (out_resp_valid[r]) begin
        n_resp[r]++;
        checks++;
        if (exp_a[r].size() == 0) begin
          failures++; $display("FAIL requester %0d: response without request", r);
        end else begin
          // memory word i holds i * 0x10001 and is never written
          if (out_resp_data[31:0] !== (((exp_a[r][0] >> 2) & ~32'h3) * 32'h10001)) begin
            failures++; $display("FAIL requester %0d: wrong block", r);
          end
          void'(exp_a[r].pop_front());
        end
      end
    end
  end

  mem_req_t q;
  initial begin
    en = '0;
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = 32'(i) * 32'h10001;
    n_resp[0] = 0; n_resp[1] = 0;
    for (int r = 0; r < NR; r++)
      for (int i = 0; i < NREQ; i++) begin
        q.addr  = 4 * $urandom_range(0, 511);
        q.we    = 1'b0;
        q.wdata = '0;
        stim[r].push_back(q);
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (stim[0].size() + stim[1].size() + exp_a[0].size() + exp_a[1].size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int r = 0; r < NR; r++) begin
      checks++;
      if (n_resp[r] != NREQ) begin failures++; $display("FAIL requester %0d: %0d responses", r, n_resp[r]); end
    end
    checks++;
    if (max_inflight > DEPTH) begin failures++; $display("FAIL %0d requests in flight", max_inflight); end
    $display("maximum in flight %0d", max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

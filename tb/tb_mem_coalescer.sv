// tb_mem_coalescer: checks the uT memory coalescer (four lanes) with and
// without coalescing, each instance in front of its own behavioural memory.
//
// Directed case: the four lanes present the addresses 0x1c, 0x14, 0x08 and
// 0x14 together. With coalescing, lanes 0, 1 and 3 share one block request
// (word selects 3, 1, 1) and lane 2 goes out separately: two cache requests,
// one coalesced request. Without coalescing there are four requests. Random
// case: each lane runs a stream of loads (addresses drawn from a small window
// so that blocks are often shared), followed by mixed loads and stores (each
// lane storing to its own region), with random
// cache back-pressure; every load must return the memory word at its address,
// in the lane's own request order, and every store must land.
module tb_mem_coalescer;
  import maven_pkg::*;
  localparam int NL = 4, NREQ = 300;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // per instance g (0 = coalescing, 1 = not) and lane l
  logic [NL-1:0] lrv [2], lrr [2], lsv [2];
  mem_req_t      lrq [2][NL];
  word_t         lsd [2][NL];
  logic          coal [2];
  int            n_coal [2];
  int            n_mem [2];
  word_t         addr_q [2][NL][$];   // stimulus
  bit            we_q   [2][NL][$];
  word_t         exp_q  [2][NL][$];   // expected response data, in order
  bit            exp_ld [2][NL][$];   // response belongs to a load
  int            n_resp [2][NL];

  for (genvar g = 0; g < 2; g++) begin : g_inst
    logic     req_valid, req_ready, resp_valid, m_ready, gate;
    mem_req_t req;
    line_t    resp_data;
    bit       stall;

    mem_coalescer #(.NUM_LANES(NL), .COALESCE(g == 0)) dut (
      .clk, .rst_n,
      .lane_req_valid(lrv[g]), .lane_req(lrq[g]), .lane_req_ready(lrr[g]),
      .lane_resp_valid(lsv[g]), .lane_resp_data(lsd[g]),
      .req_valid, .req, .req_ready, .resp_valid, .resp_data, .coalesced(coal[g])
    );
    mem_model #(.WORDS(1024), .LATENCY(3)) u_mem (
      .clk, .req_valid(req_valid && gate && rst_n), .req, .req_ready(m_ready), .resp_valid, .resp_data
    );
    assign req_ready = m_ready && gate;
    always @(posedge clk) gate <= stall ? ($urandom_range(0, 3) != 0) : 1'b1;

    // lane drivers: present the head request, pop on ready
    always_comb
      for (int l = 0; l < NL; l++) begin
        lrv[g][l]       = (addr_q[g][l].size() > 0);
        lrq[g][l].addr  = lrv[g][l] ? addr_q[g][l][0] : '0;
        lrq[g][l].we    = lrv[g][l] ? we_q[g][l][0] : 1'b0;
        lrq[g][l].wdata = 32'hA000_0000 | (lrq[g][l].addr << 4) | 32'(l);
      end
    always @(posedge clk) begin
      if (coal[g]) n_coal[g]++;
      if (req_valid && req_ready) n_mem[g]++;
      for (int l = 0; l < NL; l++) begin
        if (lrv[g][l] && lrr[g][l]) begin
          exp_q[g][l].push_back(u_mem.mem[(addr_q[g][l][0] >> 2) % 1024]);
          exp_ld[g][l].push_back(!we_q[g][l][0]);
          void'(addr_q[g][l].pop_front());
          void'(we_q[g][l].pop_front());
        end
        if (lsv[g][l]) begin
          n_resp[g][l]++;
          if (exp_q[g][l].size() == 0) begin
            failures++;
            $display("FAIL inst %0d lane %0d: response without a request", g, l);
          end else begin
            checks++;
            if (exp_ld[g][l][0] && lsd[g][l] !== exp_q[g][l][0]) begin
              failures++;
              $display("FAIL inst %0d lane %0d got %h exp %h", g, l, lsd[g][l], exp_q[g][l][0]);
            end
            void'(exp_q[g][l].pop_front());
            void'(exp_ld[g][l].pop_front());
          end
        end
      end
    end
  end

  task automatic wait_idle();
    int guard = 0;
    do begin
      @(negedge clk);
      guard++;
    end while (guard < 5000 &&
               (addr_q[0][0].size() + addr_q[0][1].size() + addr_q[0][2].size() + addr_q[0][3].size() +
                addr_q[1][0].size() + addr_q[1][1].size() + addr_q[1][2].size() + addr_q[1][3].size() +
                exp_q[0][0].size() + exp_q[0][1].size() + exp_q[0][2].size() + exp_q[0][3].size() +
                exp_q[1][0].size() + exp_q[1][1].size() + exp_q[1][2].size() + exp_q[1][3].size()) != 0);
    repeat (10) @(negedge clk);
  endtask

  word_t ex_addr [NL] = '{32'h1c, 32'h14, 32'h08, 32'h14};
  word_t a;
  bit    w;
  initial begin
    for (int g = 0; g < 2; g++) begin
      n_coal[g] = 0; n_mem[g] = 0;
      for (int l = 0; l < NL; l++) n_resp[g][l] = 0;
    end
    g_inst[0].stall = 0; g_inst[1].stall = 0;
    for (int i = 0; i < 1024; i++) begin
      a = $urandom;
      g_inst[0].u_mem.mem[i] = a;
      g_inst[1].u_mem.mem[i] = a;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // the example of the architecture description
    for (int g = 0; g < 2; g++)
      for (int l = 0; l < NL; l++) begin addr_q[g][l].push_back(ex_addr[l]); we_q[g][l].push_back(0); end
    #1;
    checks++;
    if (lrr[0] !== 4'b1011 || g_inst[0].req.addr !== 32'h1c ||
        {g_inst[0].dut.t_in.wsel[3], g_inst[0].dut.t_in.wsel[1], g_inst[0].dut.t_in.wsel[0]} !== {2'd1, 2'd1, 2'd3}) begin
      failures++;
      $display("FAIL first coalesced group: ready=%b addr=%h wsel=%h", lrr[0], g_inst[0].req.addr,
               g_inst[0].dut.t_in.wsel);
    end
    wait_idle();
    checks += 3;
    if (n_mem[0] != 2) begin failures++; $display("FAIL coalescing: %0d cache requests", n_mem[0]); end
    if (n_coal[0] != 1) begin failures++; $display("FAIL coalescing: %0d coalesced", n_coal[0]); end
    if (n_mem[1] != 4 || n_coal[1] != 0) begin
      failures++; $display("FAIL no coalescing: %0d requests %0d coalesced", n_mem[1], n_coal[1]);
    end

    // random streams
    g_inst[0].stall = 1; g_inst[1].stall = 1;
    for (int g = 0; g < 2; g++) begin n_mem[g] = 0; n_coal[g] = 0; end
    for (int i = 0; i < NREQ; i++)
      for (int l = 0; l < NL; l++) begin
        w = (i >= 200) && ($urandom_range(0, 2) == 0);
        a = w ? (32'h800 + 32'(l) * 32'h100 + 4 * $urandom_range(0, 63))
              : 4 * $urandom_range(0, 7);
        for (int g = 0; g < 2; g++) begin addr_q[g][l].push_back(a); we_q[g][l].push_back(w); end
      end
    wait_idle();
    for (int g = 0; g < 2; g++)
      for (int l = 0; l < NL; l++) begin
        checks++;
        if (n_resp[g][l] != NREQ + 1) begin
          failures++; $display("FAIL inst %0d lane %0d: %0d responses", g, l, n_resp[g][l]);
        end
      end
    // the last store of each lane to each word is in memory
    for (int i = 0; i < 256; i++) begin
      checks++;
      if (g_inst[0].u_mem.mem[512 + i] !== g_inst[1].u_mem.mem[512 + i]) begin
        failures++; $display("FAIL store region word %0d differs", i);
      end
    end
    checks += 2;
    if (n_coal[0] == 0 || n_mem[0] >= n_mem[1]) begin
      failures++; $display("FAIL coalescing saved nothing: %0d vs %0d", n_mem[0], n_mem[1]);
    end
    if (n_mem[1] != NREQ * NL) begin failures++; $display("FAIL plain: %0d requests", n_mem[1]); end
    $display("coalescing: %0d cache requests (%0d coalesced), without: %0d", n_mem[0], n_coal[0], n_mem[1]);

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

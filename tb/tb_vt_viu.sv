// tb_vt_viu: checks the vector issue unit with behavioural lanes.
//
// Two issue units run side by side, one with the 2-stack and one with the
// 1-stack fragment buffer. Both execute the same eight-instruction loop with
// one forward branch (0x04 -> 0x0c) and two backward branches (0x0c and 0x14
// -> 0x00) on four uTs, whose branch outcomes are fixed per uT:
//   uT0, uT1: T NT T  then NT NT NT      uT2: NT T  then NT NT NT
//   uT3:      T  T    then NT NT NT
// The lane model returns those outcomes and records the PC and active mask of
// every issued micro-op, which is compared with the expected schedule of each
// scheme (the 2-stack run keeps all uTs on one loop iteration and finishes in
// 13 micro-ops, the 1-stack run in 17). Configuration and set-vector-length
// answers, a scalar-to-vector move, a vector memory command and a vector fetch
// with vl = 0 are checked too.
module tb_vt_viu;
  import maven_pkg::*;
  localparam int NL = 4, VL = 32, UL = VL / NL;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] prog [8];
  // per-uT branch outcome lists, consumed in order
  int outcomes [4][$];

  typedef struct { int pc; int mask; } iss_t;

  // ------------------------------------------------------------- two units
  logic        cmd_valid [2];
  vcmd_t       cmd [2];
  logic        cmd_ready [2], resp_valid [2];
  word_t       resp_data [2];
  logic [10:0] imem_addr [2];
  logic        uop_valid [2];
  lane_uop_t   uop [2];
  logic [NL-1:0][UL-1:0] uop_mask [2], br_bits [2];
  logic [3:0]  nsteps [2];
  logic [2:0]  nregs_log2 [2];
  logic [NL-1:0] lane_busy [2];
  logic        vmu_start [2], vmu_is_store [2], vmu_done [2];
  word_t       vmu_base [2], vmu_stride [2];
  logic [4:0]  vmu_vreg [2];
  logic [5:0]  vl [2];
  logic        ev_div [2], ev_uni [2], ev_mrg [2], ev_swp [2], ev_done [2], busy [2];

  for (genvar u = 0; u < 2; u++) begin : g_u
    vt_viu #(.NUM_LANES(NL), .MAX_VLEN(VL), .REGS_PER_LANE(256), .PC_W(11), .TWO_STACK(u == 0)) dut (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[u]), .cmd(cmd[u]), .cmd_ready(cmd_ready[u]),
      .resp_valid(resp_valid[u]), .resp_data(resp_data[u]),
      .imem_addr(imem_addr[u]), .imem_data(prog[imem_addr[u][4:2]]),
      .uop_valid(uop_valid[u]), .uop(uop[u]), .uop_mask(uop_mask[u]), .nsteps(nsteps[u]),
      .nregs_log2(nregs_log2[u]), .lane_busy(lane_busy[u]), .br_bits(br_bits[u]),
      .vmu_start(vmu_start[u]), .vmu_is_store(vmu_is_store[u]), .vmu_base(vmu_base[u]),
      .vmu_stride(vmu_stride[u]), .vmu_vreg(vmu_vreg[u]), .vl(vl[u]), .vmu_done(vmu_done[u]),
      .ev_diverge(ev_div[u]), .ev_uniform(ev_uni[u]), .ev_merge(ev_mrg[u]), .ev_swap(ev_swp[u]),
      .ev_vfetch_done(ev_done[u]), .busy(busy[u])
    );
  end

  // ------------------------------------------------------------ lane model
  iss_t trace [2][$];
  int   busy_cnt [2];
  int   vmu_cnt [2];
  int   outc [2][4][$];
  int   movsv_seen [2];
  always @(posedge clk) begin
    for (int u = 0; u < 2; u++) begin
      if (busy_cnt[u] > 0) busy_cnt[u]--;
      if (vmu_cnt[u] > 0) vmu_cnt[u]--;
      vmu_done[u] <= (vmu_cnt[u] == 1);
      if (vmu_start[u]) vmu_cnt[u] = 3;
      if (uop_valid[u]) begin
        int m;
        m = 0;
        for (int l = 0; l < NL; l++)
          for (int j = 0; j < UL; j++)
            if (uop_mask[u][l][j]) m |= 1 << (j * NL + l);
        busy_cnt[u] = 2;
        if (uop[u].kind == K_MOVSV) movsv_seen[u] = m;
        else trace[u].push_back('{int'(imem_addr[u]), m});
        if (uop[u].kind == K_BR) begin
          br_bits[u] <= '0;
          for (int i = 0; i < 4; i++)
            if (m[i]) br_bits[u][i % NL][i / NL] <= 1'(outc[u][i].pop_front());
        end
      end
      lane_busy[u] <= {NL{busy_cnt[u] > 0}};
    end
  end

  // -------------------------------------------------------------- helpers
  task automatic send(int u, vcmd_op_e op, word_t data, word_t stride = 0, logic [4:0] vreg = 0);
    @(negedge clk);
    cmd_valid[u] = 1; cmd[u].op = op; cmd[u].data = data; cmd[u].stride = stride; cmd[u].vreg = vreg;
    while (!cmd_ready[u]) @(negedge clk);
    @(negedge clk);
    cmd_valid[u] = 0;
  endtask

  task automatic expect_resp(int u, word_t v, string what);
    int n = 0;
    @(posedge clk); #1;
    while (!resp_valid[u] && n < 20) begin @(posedge clk); #1; n++; end
    checks++;
    if (!resp_valid[u] || resp_data[u] != v) begin
      failures++;
      $display("FAIL %s unit %0d: resp %0d exp %0d", what, u, resp_data[u], v);
    end
  endtask

  task automatic wait_idle(int u);
    int n = 0;
    @(negedge clk);
    while ((busy[u] || cmd_valid[u]) && n < 2000) begin @(negedge clk); n++; end
  endtask

  iss_t exp2 [$] = '{'{'h00,'hF},'{'h04,'hF},'{'h08,'h4},'{'h0c,'hF},'{'h10,'h3},'{'h14,'h3},
                     '{'h00,'hF},'{'h04,'hF},'{'h08,'hF},'{'h0c,'hF},'{'h10,'hF},'{'h14,'hF},'{'h18,'hF}};
  iss_t exp1 [$] = '{'{'h00,'hF},'{'h04,'hF},'{'h08,'h4},'{'h0c,'hF},'{'h00,'hC},'{'h04,'hC},
                     '{'h08,'hC},'{'h0c,'hC},'{'h10,'hF},'{'h14,'hF},'{'h00,'h3},'{'h04,'h3},
                     '{'h08,'h3},'{'h0c,'h3},'{'h10,'h3},'{'h14,'h3},'{'h18,'hF}};
  int swaps [2], merges [2], diverges [2];
  always @(posedge clk) if (rst_n) for (int u = 0; u < 2; u++) begin
    if (ev_swp[u]) swaps[u]++;
    if (ev_mrg[u]) merges[u]++;
    if (ev_div[u]) diverges[u]++;
  end

  initial begin
    // op.N = addi r1,r1,1 ; branches: bne r2,r0,off (outcome from the model)
    prog[0] = {6'(OP_ADDI), 5'd1, 5'd1, 16'd1};
    prog[1] = {6'(OP_BNE), 5'd2, 5'd0, 16'd1};       // 0x04 -> 0x0c
    prog[2] = {6'(OP_ADDI), 5'd1, 5'd1, 16'd1};
    prog[3] = {6'(OP_BNE), 5'd2, 5'd0, -16'sd4};     // 0x0c -> 0x00
    prog[4] = {6'(OP_ADDI), 5'd1, 5'd1, 16'd1};
    prog[5] = {6'(OP_BNE), 5'd2, 5'd0, -16'sd6};     // 0x14 -> 0x00
    prog[6] = {6'(OP_ADDI), 5'd1, 5'd1, 16'd1};
    prog[7] = {6'(OP_STOP), 26'd0};
    for (int u = 0; u < 2; u++) begin
      cmd_valid[u] = 0; cmd[u] = '0; br_bits[u] = '0; lane_busy[u] = '0; vmu_done[u] = 0;
      busy_cnt[u] = 0; vmu_cnt[u] = 0; movsv_seen[u] = 0; swaps[u] = 0; merges[u] = 0; diverges[u] = 0;
      outc[u][0] = '{1, 0, 1, 0, 0, 0};
      outc[u][1] = '{1, 0, 1, 0, 0, 0};
      outc[u][2] = '{0, 1, 0, 0, 0};
      outc[u][3] = '{1, 1, 0, 0, 0};
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int u = 0; u < 2; u++) begin
      fork
        send(u, VC_CONFIG, 32);
        expect_resp(u, 32, "config 32 regs");
      join
      fork
        send(u, VC_SETVL, 100);
        expect_resp(u, 32, "setvl 100");
      join
      fork
        send(u, VC_CONFIG, 7);
        expect_resp(u, 32, "config 7 regs (capped at 32 uTs)");
      join
      checks++; if (nregs_log2[u] != 3) begin failures++; $display("FAIL nregs rounding"); end
      fork
        send(u, VC_SETVL, 0);
        expect_resp(u, 0, "setvl 0");
      join
      send(u, VC_VFETCH, 0);     // vl = 0: nothing may be issued
      wait_idle(u);
      checks++; if (trace[u].size() != 0) begin failures++; $display("FAIL issue with vl=0"); end
      fork
        send(u, VC_SETVL, 4);
        expect_resp(u, 4, "setvl 4");
      join
      send(u, VC_MOVSV, 32'h55, 0, 5'd3);
      wait_idle(u);
      checks++; if (movsv_seen[u] != 'hF) begin failures++; $display("FAIL movsv mask %h", movsv_seen[u]); end
      send(u, VC_LOADV, 32'h100, 4, 5'd2);
      wait_idle(u);
      checks++; if (busy[u]) begin failures++; $display("FAIL vector memory command did not finish"); end
      send(u, VC_VFETCH, 0);
      wait_idle(u);
      fork
        send(u, VC_SYNC, 0);
        expect_resp(u, 0, "sync");
      join
    end

    for (int u = 0; u < 2; u++) begin
      iss_t e [$];
      e = (u == 0) ? exp2 : exp1;
      checks++;
      if (trace[u].size() != e.size()) begin
        failures++;
        $display("FAIL unit %0d issued %0d micro-ops, expected %0d", u, trace[u].size(), e.size());
      end
      for (int i = 0; i < e.size() && i < trace[u].size(); i++) begin
        checks++;
        if (trace[u][i].pc != e[i].pc || trace[u][i].mask != e[i].mask) begin
          failures++;
          $display("FAIL unit %0d op %0d: {%h,%b} exp {%h,%b}", u, i, trace[u][i].pc, 4'(trace[u][i].mask),
                   e[i].pc, 4'(e[i].mask));
        end
      end
    end
    checks++; if (swaps[0] != 1) begin failures++; $display("FAIL 2-stack swaps %0d", swaps[0]); end
    checks++; if (merges[0] != 2 || merges[1] != 3) begin
      failures++; $display("FAIL merges %0d/%0d", merges[0], merges[1]); end
    checks++; if (diverges[0] != 2 || diverges[1] != 3) begin
      failures++; $display("FAIL divergences %0d/%0d", diverges[0], diverges[1]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

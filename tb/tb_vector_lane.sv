// tb_vector_lane: checks one vector lane (lane 1 of 4, eight uTs, 256
// registers in four banks) driven directly with micro-ops.
//
// Registers are loaded through the vector-load write port and read back
// through the vector-store read port. Then integer, immediate, shift,
// uT-index, scalar-move, multiply, divide/remainder, floating-point add,
// subtract and multiply (on small whole numbers, whose results are exact),
// floating-point divide and square root (on products and squares, so that
// they are exact too),
// branch-compare, uT store
// and uT load micro-ops run under random active masks; every register of
// every uT is compared with values computed here, inactive uTs must keep
// their old values, and register 0 must stay zero. An integer micro-op over
// eight uTs must take eight cycles (one uT, and one bank, per cycle). The uT
// memory port is served by a small memory model with random back-pressure.
module tb_vector_lane;
  import maven_pkg::*;
  localparam int UT = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]   nregs_log2;
  logic         uop_valid;
  lane_uop_t    uop;
  logic [UT-1:0] uop_mask, br_bits;
  logic [3:0]   nsteps;
  logic         busy;
  logic         ut_req_valid, ut_req_ready, ut_resp_valid;
  mem_req_t     ut_req;
  word_t        ut_resp_data;
  logic         vlu_we;
  logic [2:0]   vlu_ut, vsu_ut;
  logic [4:0]   vlu_reg, vsu_reg;
  word_t        vlu_data, vsu_data;

  vector_lane #(.LANE_ID(1), .NUM_LANES(4), .NUM_BANKS(4), .REGS(256), .MAX_UT(UT)) dut (
    .clk, .rst_n, .nregs_log2, .uop_valid, .uop, .uop_mask, .nsteps, .busy, .br_bits,
    .ut_req_valid, .ut_req, .ut_req_ready, .ut_resp_valid, .ut_resp_data,
    .vlu_we, .vlu_ut, .vlu_reg, .vlu_data, .vsu_ut, .vsu_reg, .vsu_data
  );

  // ------------------------------------------------------ uT memory model
  word_t dmem [256];
  int    resp_delay;
  word_t resp_val;
  int    mem_reqs = 0;
  always @(posedge clk) begin
    ut_resp_valid <= 1'b0;
    if (resp_delay > 0) begin
      resp_delay--;
      if (resp_delay == 0) begin ut_resp_valid <= 1'b1; ut_resp_data <= resp_val; end
    end
    if (ut_req_valid && ut_req_ready) begin
      mem_reqs++;
      if (ut_req.we) dmem[(ut_req.addr >> 2) % 256] = ut_req.wdata;
      resp_val   = dmem[(ut_req.addr >> 2) % 256];
      resp_delay = 2;
    end
    ut_req_ready <= ($urandom_range(0, 2) != 0);
  end

  // ------------------------------------------------------- shadow registers
  word_t sh [UT][32];

  task automatic vlu_write(int j, int r, word_t v);
    @(negedge clk);
    vlu_we = 1; vlu_ut = 3'(j); vlu_reg = 5'(r); vlu_data = v;
    @(negedge clk);
    vlu_we = 0;
    if (r != 0) sh[j][r] = v;
  endtask

  task automatic check_all(string what, int nregs);
    for (int j = 0; j < UT; j++)
      for (int r = 0; r < nregs; r++) begin
        vsu_ut = 3'(j); vsu_reg = 5'(r);
        #1;
        checks++;
        if (vsu_data !== ((r == 0) ? 32'd0 : sh[j][r])) begin
          failures++;
          $display("FAIL %s: uT %0d r%0d = %h exp %h", what, j, r, vsu_data, sh[j][r]);
        end
      end
  endtask

  // issue a micro-op, return the number of busy cycles
  task automatic run(lane_uop_t u, logic [UT-1:0] m, output int cycles);
    @(negedge clk);
    uop = u; uop_mask = m; nsteps = 4'(UT); uop_valid = 1;
    @(negedge clk);
    uop_valid = 0;
    cycles = 0;
    while (busy && cycles < 1000) begin cycles++; @(negedge clk); end
  endtask

  function automatic lane_uop_t mk(lane_kind_e k, alu_fn_e f, int rd, int rs, int rt,
                                   bit ui = 0, word_t imm = 0);
    lane_uop_t u = '0;
    u.kind = k; u.alu_fn = f; u.rd = 5'(rd); u.rs = 5'(rs); u.rt = 5'(rt);
    u.use_imm = ui; u.imm = imm;
    return u;
  endfunction

  // single-precision encoding of a whole number below 2**24 in magnitude
  function automatic word_t i2f(int v);
    int mag, msb;
    if (v == 0) return 0;
    mag = (v < 0) ? -v : v;
    msb = 0;
    for (int i = 0; i < 24; i++) if (mag >> i != 0) msb = i;
    return {(v < 0), 8'(127 + msb), 23'(mag << (23 - msb))};
  endfunction

  function automatic word_t rdv(int j, int r);
    return (r == 0) ? 0 : sh[j][r];
  endfunction

  int cyc;
  logic [UT-1:0] m;
  lane_uop_t u;
  initial begin
    uop_valid = 0; uop = '0; uop_mask = '0; nsteps = 0; vlu_we = 0; vlu_ut = 0; vlu_reg = 0;
    vlu_data = 0; vsu_ut = 0; vsu_reg = 0; nregs_log2 = 3'd5; resp_delay = 0;
    for (int i = 0; i < 256; i++) dmem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int j = 0; j < UT; j++)
      for (int r = 1; r < 32; r++) vlu_write(j, r, $urandom);
    for (int j = 0; j < UT; j++) begin
      vlu_write(j, 2, (j % 3 == 0) ? 32'd0 : $urandom);        // some zero divisors
      vlu_write(j, 10, 32'h40 + 32'(j) * 8);                    // uT memory base
    end
    vlu_write(0, 0, 32'hDEAD);                                  // r0 must stay zero
    check_all("vector load writeback", 32);

    // ADD: one uT per cycle
    m = 8'b1011_0110;
    run(mk(K_ALU, ALU_ADD, 3, 1, 2), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][3] = sh[j][1] + sh[j][2];
    checks++;
    if (cyc != UT) begin failures++; $display("FAIL add took %0d cycles, expected %0d", cyc, UT); end
    check_all("add", 32);

    m = $urandom; run(mk(K_ALU, ALU_SUB, 4, 3, 1), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][4] = sh[j][3] - sh[j][1];
    m = $urandom; run(mk(K_ALU, ALU_ADD, 5, 4, 0, 1, -32'sd77), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][5] = sh[j][4] - 77;
    m = $urandom; run(mk(K_ALU, ALU_SRA, 6, 1, 0, 1, 32'd5), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][6] = word_t'($signed(sh[j][1]) >>> 5);
    m = $urandom; run(mk(K_ALU, ALU_SLT, 7, 1, 2), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][7] = ($signed(sh[j][1]) < $signed(sh[j][2])) ? 1 : 0;
    m = $urandom; run(mk(K_ALU, ALU_ADD, 0, 1, 2), m, cyc);          // write to r0 dropped
    check_all("integer ops", 32);

    m = $urandom; run(mk(K_UTIDX, ALU_ADD, 8, 0, 0), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][8] = j * 4 + 1;
    run(mk(K_MOVSV, ALU_PASSB, 9, 0, 0, 1, 32'h1234_5678), '1, cyc);
    for (int j = 0; j < UT; j++) sh[j][9] = 32'h1234_5678;
    check_all("uT index and scalar move", 32);

    m = $urandom | 8'h80; run(mk(K_MUL, ALU_ADD, 11, 1, 2), m, cyc);   // last uT active
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][11] = sh[j][1] * sh[j][2];
    checks++;
    if (cyc < UT + 2) begin failures++; $display("FAIL multiply finished after %0d cycles", cyc); end
    u = mk(K_DIV, ALU_ADD, 12, 1, 2);
    m = $urandom; run(u, m, cyc);
    for (int j = 0; j < UT; j++) if (m[j])
      sh[j][12] = (sh[j][2] == 0) ? 32'hFFFF_FFFF : 32'($signed(sh[j][1]) / $signed(sh[j][2]));
    u.div_rem = 1; u.rd = 13;
    m = $urandom; run(u, m, cyc);
    for (int j = 0; j < UT; j++) if (m[j])
      sh[j][13] = (sh[j][2] == 0) ? sh[j][1] : 32'($signed(sh[j][1]) % $signed(sh[j][2]));
    check_all("multiply and divide", 32);

    // floating point: r17 = r15 + r16, r18 = r15 - r16, r19 = r15 * r16
    begin
      int fa [UT], fb [UT];
      for (int j = 0; j < UT; j++) begin
        fa[j] = int'($urandom_range(0, 2000)) - 1000;
        fb[j] = int'($urandom_range(0, 2000)) - 1000;
        vlu_write(j, 15, i2f(fa[j]));
        vlu_write(j, 16, i2f(fb[j]));
      end
      m = $urandom | 8'h80; run(mk(K_FADD, ALU_ADD, 17, 15, 16), m, cyc);
      for (int j = 0; j < UT; j++) if (m[j]) sh[j][17] = i2f(fa[j] + fb[j]);
      checks++;
      if (cyc < UT + 2) begin failures++; $display("FAIL fp add finished after %0d cycles", cyc); end
      u = mk(K_FADD, ALU_ADD, 18, 15, 16); u.div_rem = 1;
      m = $urandom; run(u, m, cyc);
      for (int j = 0; j < UT; j++) if (m[j]) sh[j][18] = i2f(fa[j] - fb[j]);
      m = $urandom; run(mk(K_FMUL, ALU_ADD, 19, 15, 16), m, cyc);
      for (int j = 0; j < UT; j++) if (m[j])
        sh[j][19] = (fa[j] * fb[j] == 0) ? {((fa[j] < 0) ^ (fb[j] < 0)), 31'd0} : i2f(fa[j] * fb[j]);
      // r20 = r19 / r16 (= r15 where r16 != 0), r22 = sqrt(r21) with r21 = r15 squared
      for (int j = 0; j < UT; j++) begin
        if (fa[j] == 0) fa[j] = 3;
        if (fb[j] == 0) fb[j] = 7;
        vlu_write(j, 15, i2f(fa[j]));
        vlu_write(j, 16, i2f(fb[j]));
        vlu_write(j, 19, i2f(fa[j] * fb[j]));
        vlu_write(j, 21, i2f(fa[j] * fa[j]));
      end
      m = $urandom | 8'h80; run(mk(K_FDIV, ALU_ADD, 20, 19, 16), m, cyc);
      for (int j = 0; j < UT; j++) if (m[j]) sh[j][20] = i2f(fa[j]);
      checks++;
      if (cyc < UT + 6) begin failures++; $display("FAIL fp divide finished after %0d cycles", cyc); end
      m = $urandom | 8'h80; run(mk(K_FSQRT, ALU_ADD, 22, 21, 0), m, cyc);
      for (int j = 0; j < UT; j++) if (m[j]) sh[j][22] = i2f((fa[j] < 0) ? -fa[j] : fa[j]);
      checks++;
      if (cyc < UT + 9) begin failures++; $display("FAIL fp square root finished after %0d cycles", cyc); end
      check_all("floating point", 32);
    end

    // branch compare
    u = mk(K_BR, ALU_ADD, 0, 1, 2); u.cmp_fn = CMP_LT;
    m = $urandom; run(u, m, cyc);
    for (int j = 0; j < UT; j++) begin
      checks++;
      if (br_bits[j] !== (m[j] && ($signed(sh[j][1]) < $signed(sh[j][2])))) begin
        failures++; $display("FAIL branch bit uT %0d", j);
      end
    end

    // uT store r3 -> mem[r10 + 4], then uT load r14 <- mem[r10 + 4]
    mem_reqs = 0;
    m = 8'b1110_0111;
    u = mk(K_ST, ALU_ADD, 0, 10, 3, 1, 32'd4);
    run(u, m, cyc);
    for (int j = 0; j < UT; j++) begin
      checks++;
      if (m[j] && dmem[((sh[j][10] + 4) >> 2) % 256] !== sh[j][3]) begin
        failures++; $display("FAIL uT store uT %0d", j);
      end
    end
    u = mk(K_LD, ALU_ADD, 14, 10, 0, 1, 32'd4);
    run(u, '1, cyc);
    for (int j = 0; j < UT; j++) sh[j][14] = dmem[((sh[j][10] + 4) >> 2) % 256];
    check_all("uT load", 32);
    checks++;
    if (mem_reqs != 6 + 8) begin failures++; $display("FAIL %0d uT memory requests", mem_reqs); end

    // eight registers per uT: a different bank layout
    nregs_log2 = 3'd3;
    for (int j = 0; j < UT; j++) for (int r = 1; r < 8; r++) vlu_write(j, r, $urandom);
    m = $urandom; run(mk(K_ALU, ALU_XOR, 7, 5, 6), m, cyc);
    for (int j = 0; j < UT; j++) if (m[j]) sh[j][7] = sh[j][5] ^ sh[j][6];
    check_all("eight registers per uT", 8);

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

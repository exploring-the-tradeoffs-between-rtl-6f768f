// tb_maven_vt_core: end-to-end test of the four-lane vector-thread unit at
// its default size (4 lanes, 256 registers per lane, vector length up to 32,
// 2-stack fragment buffer), in front of a behavioural data memory with
// latency and random back-pressure.
//
// The test plays the control processor: it loads uT code into the VT
// instruction store and sends vector commands. Every command is also applied
// to a reference model kept here (a register file per uT, an interpreter that
// runs each uT's code on its own, and a copy of memory), and at the end the
// unit's memory and every uT register are compared with the model. Workloads:
//   1. irregular loop, stripmined over 70 elements (tail vl = 6):
//        if (A[i] > 0) C[i] = x * A[i] + B[i]
//      with unit-stride vector loads, a scalar-to-vector move, a
//      data-dependent forward branch and uT stores; the code also holds one
//      always-taken and one never-taken branch (uniform branches);
//   2. data-dependent inner loop per uT (sums the odd numbers below A[i])
//      whose backward branch leaves uTs on different iterations, followed by
//      a divide and a remainder, and strided vector stores of the results;
//   3. indirect gather through uT loads;
//   4. a burst of commands that fills the command queue;
//   5. single-precision arithmetic on whole numbers stored as floats:
//      C[i] = (A[i] * x + B[i]) - A[i], D[i] = C[i] / A[i] and
//      E[i] = sqrt(A[i] * x + B[i]) (the model computes in double precision
//      and rounds to single, which gives the correctly rounded result);
//   6. complex multiplication C[i] = A[i] * B[i] over 40 elements stored as
//      {re, im} pairs, with stride-8 vector loads and stores (stripmined
//      32 + 8);
//   7. binary search: each uT looks its key up in a sorted 64-entry table
//      with uT loads in a while loop whose trip count and exit differ per uT.
// Counted mechanisms, each of which must occur at least once: divergent
// branch, uniform branch, fragment merge, stack swap, end of vector fetch,
// command-queue back-pressure, cache back-pressure, uT load, uT store,
// strided vector access, vector-length tail, multiply, divide and
// floating-point add, multiply, divide and square root. The
// straight-line part of workload 1 is timed: a register-register micro-op
// over eight uTs per lane must take at most 8 cycles plus a small issue cost.
module tb_maven_vt_core;
  import maven_pkg::*;
  localparam int VLMAX = 32, MEMW = 8192;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        cmd_valid, cmd_ready, resp_valid;
  vcmd_t       cmd;
  word_t       resp_data;
  logic        vinst_we;
  logic [10:0] vinst_addr;
  logic [31:0] vinst_wdata;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t    mem_req;
  line_t       mem_resp_data;
  logic        busy, ev_diverge, ev_uniform, ev_merge, ev_swap, ev_coalesce, ev_vfetch_done;

  maven_vt_core dut (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .resp_valid, .resp_data,
    .vinst_we, .vinst_addr, .vinst_wdata,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_resp_valid, .mem_resp_data,
    .busy, .ev_diverge, .ev_uniform, .ev_merge, .ev_swap, .ev_coalesce, .ev_vfetch_done
  );

  mem_model #(.WORDS(MEMW), .LATENCY(4), .STALLS(1'b1)) u_mem (
    .clk, .req_valid(mem_req_valid && rst_n), .req(mem_req), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data)
  );

  // ------------------------------------------------------- mechanism counts
  typedef enum int {
    M_DIVERGE, M_UNIFORM, M_MERGE, M_SWAP, M_VFETCH, M_CMDQ_FULL, M_MEM_STALL,
    M_UT_LOAD, M_UT_STORE, M_STRIDED, M_TAIL, M_MUL, M_DIV, M_FADD, M_FMUL, M_FDIV, M_FSQRT, M_NUM
  } mech_e;
  string mech_name [M_NUM] = '{"divergent branch", "uniform branch", "fragment merge",
    "stack swap", "vector fetch done", "command queue full", "cache back-pressure",
    "uT load", "uT store", "strided vector access", "vector-length tail", "multiply", "divide",
    "floating-point add", "floating-point multiply",
    "floating-point divide", "floating-point square root"};
  int mech [M_NUM];

  always @(posedge clk) if (rst_n) begin
    if (ev_diverge)     mech[M_DIVERGE]++;
    if (ev_uniform)     mech[M_UNIFORM]++;
    if (ev_merge)       mech[M_MERGE]++;
    if (ev_swap)        mech[M_SWAP]++;
    if (ev_vfetch_done) mech[M_VFETCH]++;
    if (cmd_valid && !cmd_ready)         mech[M_CMDQ_FULL]++;
    if (mem_req_valid && !mem_req_ready) mech[M_MEM_STALL]++;
    for (int l = 0; l < 4; l++) begin
      if (dut.ut_req_valid[l] && dut.ut_req_ready[l]) begin
        if (dut.ut_req[l].we) mech[M_UT_STORE]++;
        else                    mech[M_UT_LOAD]++;
      end
    end
    if (dut.g_lane[0].u_lane.u_mul.in_valid) mech[M_MUL]++;
    if (dut.g_lane[0].u_lane.u_div.in_valid) mech[M_DIV]++;
    if (dut.g_lane[0].u_lane.u_fadd.in_valid) mech[M_FADD]++;
    if (dut.g_lane[0].u_lane.u_fmul.in_valid) mech[M_FMUL]++;
    if (dut.g_lane[0].u_lane.u_fdiv.in_valid) mech[M_FDIV]++;
    if (dut.g_lane[0].u_lane.u_fsqrt.in_valid) mech[M_FSQRT]++;
  end

  // ------------------------------------------------------ reference model
  word_t rmem [MEMW];
  word_t rreg [VLMAX][32];
  int    vl_ref;
  logic [31:0] code [512];

  function automatic int widx(word_t a);
    return int'((a >> 2) % MEMW);
  endfunction

  function automatic word_t sx(logic [15:0] v);
    return {{16{v[15]}}, v};
  endfunction

  // single <-> double; rounding to single is to nearest even, and results
  // below the smallest normal single are flushed to zero like the unit does
  function automatic real s2r(word_t s);
    if (s[30:23] == 8'hff) return $bitstoreal({s[31], 11'h7ff, s[22:0], 29'd0});
    if (s[30:23] == 8'h00) return $bitstoreal({s[31], 63'd0});
    return $bitstoreal({s[31], 11'(int'(s[30:23]) - 127 + 1023), s[22:0], 29'd0});
  endfunction
  function automatic word_t r2s(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    if (d[62:52] == 11'h7ff) return (d[51:0] != 0) ? 32'h7fc0_0000 : {d[63], 8'hff, 23'd0};
    if (d[62:0] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((d[27:0] != 0) || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e++; end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic void ref_run(int u, int pc0);
    int pc = pc0;
    for (int steps = 0; steps < 20000; steps++) begin
      logic [31:0] ins = code[pc / 4];
      int op = int'(ins[31:26]);
      int ra = int'(ins[25:21]), rb = int'(ins[20:16]), rc = int'(ins[15:11]);
      word_t a, b, c, res;
      bit wr = 1;
      a = rreg[u][ra]; b = rreg[u][rb]; c = rreg[u][rc];
      pc += 4;
      case (ut_op_e'(op))
        OP_ADD:  res = b + c;
        OP_SUB:  res = b - c;
        OP_AND:  res = b & c;
        OP_OR:   res = b | c;
        OP_XOR:  res = b ^ c;
        OP_SLT:  res = ($signed(b) < $signed(c)) ? 1 : 0;
        OP_SLTU: res = (b < c) ? 1 : 0;
        OP_SLL:  res = b << c[4:0];
        OP_SRL:  res = b >> c[4:0];
        OP_SRA:  res = word_t'($signed(b) >>> c[4:0]);
        OP_ADDI: res = b + sx(ins[15:0]);
        OP_SLTI: res = ($signed(b) < $signed(sx(ins[15:0]))) ? 1 : 0;
        OP_ANDI: res = b & {16'd0, ins[15:0]};
        OP_ORI:  res = b | {16'd0, ins[15:0]};
        OP_XORI: res = b ^ {16'd0, ins[15:0]};
        OP_LUI:  res = {ins[15:0], 16'd0};
        OP_MUL:  res = b * c;
        OP_DIV:  res = (c == 0) ? '1 : word_t'($signed(b) / $signed(c));
        OP_REM:  res = (c == 0) ? b : word_t'($signed(b) % $signed(c));
        OP_FADD: res = r2s(s2r(b) + s2r(c));
        OP_FSUB: res = r2s(s2r(b) - s2r(c));
        OP_FMUL: res = r2s(s2r(b) * s2r(c));
        OP_FDIV: res = r2s(s2r(b) / s2r(c));
        OP_FSQRT: res = (b[31] && b[30:0] != 0) ? 32'h7fc0_0000 : r2s($sqrt(s2r(b)));
        OP_LW:   res = rmem[widx(b + sx(ins[15:0]))];
        OP_SW:   begin rmem[widx(b + sx(ins[15:0]))] = a; wr = 0; end
        OP_UTIDX: res = word_t'(u);
        OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
          bit t;
          wr = 0;
          case (ut_op_e'(op))
            OP_BEQ:  t = (a == b);
            OP_BNE:  t = (a != b);
            OP_BLT:  t = ($signed(a) < $signed(b));
            default: t = ($signed(a) >= $signed(b));
          endcase
          if (t) pc = pc + 4 * int'($signed(ins[15:0]));
        end
        OP_STOP: return;
        default: wr = 0;
      endcase
      if (wr && ra != 0) rreg[u][ra] = res;
    end
    $display("FAIL reference: uT %0d did not stop", u);
    failures++;
  endfunction

  // --------------------------------------------------------- assembler
  function automatic logic [31:0] R(ut_op_e op, int ra, int rb, int rc);
    return {op, 5'(ra), 5'(rb), 5'(rc), 11'd0};
  endfunction
  function automatic logic [31:0] I(ut_op_e op, int ra, int rb, int imm);
    return {op, 5'(ra), 5'(rb), 16'(imm)};
  endfunction
  // branch at byte address 'at' to byte address 'to'
  function automatic logic [31:0] B(ut_op_e op, int ra, int rb, int at, int to);
    return {op, 5'(ra), 5'(rb), 16'((to - at - 4) / 4)};
  endfunction

  task automatic put(int at, logic [31:0] ins);
    code[at / 4] = ins;
    @(negedge clk);
    vinst_we = 1; vinst_addr = 11'(at); vinst_wdata = ins;
    @(negedge clk);
    vinst_we = 0;
  endtask

  // ------------------------------------------------ control processor side
  task automatic send(vcmd_op_e op, word_t data, word_t stride = 0, int vreg = 0);
    @(negedge clk);
    cmd_valid = 1; cmd.op = op; cmd.data = data; cmd.stride = stride; cmd.vreg = 5'(vreg);
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    // reference
    case (op)
      VC_CONFIG: vl_ref = 0;
      VC_SETVL:  vl_ref = (data > VLMAX) ? VLMAX : int'(data);
      VC_MOVSV:  for (int u = 0; u < vl_ref; u++) if (vreg != 0) rreg[u][vreg] = data;
      VC_LOADV:  for (int u = 0; u < vl_ref; u++) if (vreg != 0) rreg[u][vreg] = rmem[widx(data + stride * u)];
      VC_STOREV: for (int u = 0; u < vl_ref; u++) rmem[widx(data + stride * u)] = rreg[u][vreg];
      VC_VFETCH: for (int u = 0; u < vl_ref; u++) ref_run(u, int'(data));
      default: ;
    endcase
  endtask

  int resp_seen [$];
  always @(posedge clk) if (rst_n && resp_valid) resp_seen.push_back(int'(resp_data));

  task automatic expect_resp(int v, string what);
    int n = 0;
    while (resp_seen.size() == 0 && n < 5000) begin @(negedge clk); n++; end
    checks++;
    if (resp_seen.size() == 0) begin
      failures++; $display("FAIL %s: no answer", what);
    end else begin
      if (resp_seen[0] != v) begin failures++; $display("FAIL %s: %0d, expected %0d", what, resp_seen[0], v); end
      void'(resp_seen.pop_front());
    end
  endtask

  task automatic sync();
    send(VC_SYNC, 0);
    expect_resp(0, "sync");
  endtask

  // ------------------------------------------------------------ workloads
  localparam word_t A_B = 32'h1000, B_B = 32'h1400, C_B = 32'h1800,
                    D_B = 32'h2000, E_B = 32'h2400, G_B = 32'h3000, IX_B = 32'h3800,
                    F_B = 32'h2800, CA_B = 32'h3a00, CB_B = 32'h3c00, CC_B = 32'h3e00,
                    S_B = 32'h3400, K_B = 32'h3500, R_B = 32'h3600;
  localparam int N1 = 70, N2 = 32;

  int t0, t1, strip;
  int cycle = 0;
  always @(posedge clk) cycle++;
  initial begin
    cmd_valid = 0; cmd = '0; vinst_we = 0; vinst_addr = 0; vinst_wdata = 0;
    for (int i = 0; i < M_NUM; i++) mech[i] = 0;
    for (int i = 0; i < 512; i++) code[i] = {OP_STOP, 26'd0};
    for (int u = 0; u < VLMAX; u++) for (int r = 0; r < 32; r++) rreg[u][r] = 0;
    for (int i = 0; i < MEMW; i++) begin
      word_t v;
      v = $urandom_range(0, 200) - 100;
      if (i >= widx(D_B) && i < widx(D_B) + 64) v = $urandom_range(0, 12);   // loop counts
      if (i >= widx(IX_B) && i < widx(IX_B) + 64) v = $urandom_range(0, 255); // gather indices
      if (i >= widx(F_B) && i < widx(F_B) + 64)                               // floats
        v = r2s(real'(int'($urandom_range(0, 200)) - 100));
      if (i >= widx(S_B) && i < widx(S_B) + 64)                               // sorted table
        v = 3 * (i - widx(S_B)) + ((i % 5 == 0) ? 1 : 0);
      if (i >= widx(K_B) && i < widx(K_B) + 32) v = $urandom_range(0, 200);    // search keys
      if (i >= widx(CA_B) && i < widx(CA_B) + 256)                            // complex arrays
        v = r2s(real'(int'($urandom_range(0, 20000)) - 10000) / 64.0);
      u_mem.mem[i] = v;
      rmem[i] = v;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // The unit's registers start at unknown values; clear every uT register
    // so that model and unit agree.
    send(VC_CONFIG, 32);
    expect_resp(VLMAX, "configure 32 registers");
    send(VC_SETVL, 100);
    expect_resp(VLMAX, "set vector length");
    for (int r = 1; r < 32; r++) send(VC_MOVSV, 0, 0, r);

    // ---- workload 1: if (A[i] > 0) C[i] = x * A[i] + B[i]
    //  r1 = A[i], r2 = B[i], r3 = x, r6 = &C[strip]
    put('h00, B(OP_BEQ, 0, 0, 'h00, 'h08));      // uniform, always taken
    put('h04, I(OP_ADDI, 9, 9, 1000));           // skipped
    put('h08, B(OP_BNE, 0, 0, 'h08, 'h00));      // uniform, never taken
    put('h0c, B(OP_BGE, 0, 1, 'h0c, 'h30));      // 0 >= A[i]: skip (divergent)
    put('h10, R(OP_MUL, 4, 3, 1));
    put('h14, R(OP_ADD, 4, 4, 2));
    put('h18, I(OP_UTIDX, 5, 0, 0));
    put('h1c, R(OP_ADD, 5, 5, 5));
    put('h20, R(OP_ADD, 5, 5, 5));
    put('h24, R(OP_ADD, 5, 5, 6));
    put('h28, I(OP_SW, 4, 5, 0));
    put('h2c, I(OP_ADDI, 8, 8, 1));
    put('h30, {OP_STOP, 26'd0});
    strip = 0;
    while (strip < N1) begin
      int vl;
      send(VC_SETVL, N1 - strip);
      vl = (N1 - strip > VLMAX) ? VLMAX : N1 - strip;
      expect_resp(vl, "stripmine vector length");
      if (vl < VLMAX) mech[M_TAIL]++;
      send(VC_LOADV, A_B + 4 * strip, 4, 1);
      send(VC_LOADV, B_B + 4 * strip, 4, 2);
      send(VC_MOVSV, 7, 0, 3);
      send(VC_MOVSV, C_B + 4 * strip, 0, 6);
      send(VC_VFETCH, 'h00);
      strip += vl;
    end
    sync();

    // straight-line timing: eight register-register micro-ops, vl = 32
    put('h40, R(OP_ADD, 10, 1, 2));
    put('h44, R(OP_SUB, 11, 1, 2));
    put('h48, R(OP_XOR, 12, 10, 11));
    put('h4c, R(OP_SLT, 13, 1, 2));
    put('h50, R(OP_AND, 14, 12, 1));
    put('h54, R(OP_OR, 15, 14, 2));
    put('h58, R(OP_SLTU, 16, 15, 1));
    put('h5c, R(OP_ADD, 17, 16, 15));
    put('h60, {OP_STOP, 26'd0});
    send(VC_SETVL, 32);
    expect_resp(32, "vector length 32");
    sync();
    t0 = cycle;
    send(VC_VFETCH, 'h40);
    sync();
    t1 = cycle;
    checks++;
    $display("eight ALU micro-ops over 32 uTs: %0d cycles (including command handshakes)", t1 - t0);
    if (t1 - t0 > 8 * (8 + 3) + 20) begin
      failures++; $display("FAIL straight-line code too slow: %0d cycles", t1 - t0);
    end

    // ---- workload 2: per-uT loop, odd-sum below A[i], then div/rem
    //  r1 = n, r2 = sum, r5 = 3 (divisor)
    put('h80, I(OP_ADDI, 2, 0, 0));
    put('h84, B(OP_BEQ, 1, 0, 'h84, 'h9c));
    put('h88, I(OP_ANDI, 3, 1, 1));              // loop:
    put('h8c, B(OP_BEQ, 3, 0, 'h8c, 'h94));
    put('h90, R(OP_ADD, 2, 2, 1));
    put('h94, I(OP_ADDI, 1, 1, -1));             // even:
    put('h98, B(OP_BNE, 1, 0, 'h98, 'h88));      // backward
    put('h9c, R(OP_DIV, 4, 2, 5));               // done:
    put('ha0, R(OP_REM, 7, 2, 5));
    put('ha4, {OP_STOP, 26'd0});
    send(VC_SETVL, N2);
    expect_resp(N2, "vector length for the loop");
    send(VC_LOADV, D_B, 4, 1);
    send(VC_MOVSV, 3, 0, 5);
    send(VC_VFETCH, 'h80);
    send(VC_STOREV, E_B, 12, 2);                 // strided stores
    send(VC_STOREV, E_B + 4, 12, 4);
    send(VC_STOREV, E_B + 8, 12, 7);
    mech[M_STRIDED]++;
    sync();

    // ---- workload 3: gather G[idx[i]] through uT loads, strided index load
    put('hc0, R(OP_ADD, 1, 1, 1));
    put('hc4, R(OP_ADD, 1, 1, 1));
    put('hc8, I(OP_LW, 2, 1, int'(G_B)));
    put('hcc, I(OP_UTIDX, 3, 0, 0));
    put('hd0, R(OP_ADD, 2, 2, 3));
    put('hd4, {OP_STOP, 26'd0});
    send(VC_SETVL, 27);
    expect_resp(27, "vector length 27");
    send(VC_LOADV, IX_B, 8, 1);
    mech[M_STRIDED]++;
    send(VC_VFETCH, 'hc0);
    send(VC_STOREV, C_B + 'h200, 4, 2);
    sync();

    // ---- workload 4: command burst behind a long vector fetch
    send(VC_SETVL, 32);
    expect_resp(32, "vector length 32 again");
    send(VC_VFETCH, 'h80);
    for (int k = 0; k < 12; k++) send(VC_MOVSV, 100 + k, 0, 20 + (k % 4));
    sync();

    // ---- workload 5: C[i] = (A[i] * x + B[i]) - A[i] in single precision
    put('he0, R(OP_FMUL, 4, 1, 3));
    put('he4, R(OP_FADD, 5, 4, 2));
    put('he8, R(OP_FSUB, 6, 5, 1));
    put('hec, R(OP_FDIV, 7, 6, 1));
    put('hf0, R(OP_FSQRT, 8, 5, 0));
    put('hf4, {OP_STOP, 26'd0});
    send(VC_SETVL, 32);
    expect_resp(32, "vector length for floating point");
    send(VC_LOADV, F_B, 4, 1);
    send(VC_LOADV, F_B + 128, 4, 2);
    send(VC_MOVSV, r2s(2.5), 0, 3);
    send(VC_VFETCH, 'he0);
    send(VC_STOREV, F_B + 'h400, 4, 6);
    send(VC_STOREV, F_B + 'h480, 4, 7);
    send(VC_STOREV, F_B + 'h500, 4, 8);
    sync();

    // ---- workload 6: complex multiply, strided {re, im} accesses
    //  r1 = ar, r2 = ai, r3 = br, r4 = bi; r5 = ar*br - ai*bi, r6 = ar*bi + ai*br
    put('h100, R(OP_FMUL, 5, 1, 3));
    put('h104, R(OP_FMUL, 7, 2, 4));
    put('h108, R(OP_FSUB, 5, 5, 7));
    put('h10c, R(OP_FMUL, 6, 1, 4));
    put('h110, R(OP_FMUL, 7, 2, 3));
    put('h114, R(OP_FADD, 6, 6, 7));
    put('h118, {OP_STOP, 26'd0});
    strip = 0;
    while (strip < 40) begin
      int vl;
      send(VC_SETVL, 40 - strip);
      vl = (40 - strip > VLMAX) ? VLMAX : 40 - strip;
      expect_resp(vl, "complex multiply vector length");
      send(VC_LOADV, CA_B + 8 * strip,     8, 1);
      send(VC_LOADV, CA_B + 8 * strip + 4, 8, 2);
      send(VC_LOADV, CB_B + 8 * strip,     8, 3);
      send(VC_LOADV, CB_B + 8 * strip + 4, 8, 4);
      send(VC_VFETCH, 'h100);
      send(VC_STOREV, CC_B + 8 * strip,     8, 5);
      send(VC_STOREV, CC_B + 8 * strip + 4, 8, 6);
      strip += vl;
    end
    mech[M_STRIDED]++;
    sync();

    // ---- workload 7: binary search of key r1 in S_B[0..63]; r5 = index or -1
    put('h140, I(OP_ADDI, 2, 0, 0));             // lo
    put('h144, I(OP_ADDI, 3, 0, 63));            // hi
    put('h148, I(OP_ADDI, 5, 0, -1));
    put('h14c, I(OP_ADDI, 10, 0, 1));
    put('h150, B(OP_BLT, 3, 2, 'h150, 'h188));    // loop: hi < lo -> done
    put('h154, R(OP_ADD, 4, 2, 3));
    put('h158, R(OP_SRL, 4, 4, 10));             // mid
    put('h15c, R(OP_ADD, 6, 4, 4));
    put('h160, R(OP_ADD, 6, 6, 6));
    put('h164, R(OP_ADD, 6, 6, 9));
    put('h168, I(OP_LW, 7, 6, 0));
    put('h16c, B(OP_BEQ, 7, 1, 'h16c, 'h184));    // found
    put('h170, B(OP_BLT, 7, 1, 'h170, 'h17c));    // go right
    put('h174, I(OP_ADDI, 3, 4, -1));
    put('h178, B(OP_BEQ, 0, 0, 'h178, 'h150));
    put('h17c, I(OP_ADDI, 2, 4, 1));
    put('h180, B(OP_BEQ, 0, 0, 'h180, 'h150));
    put('h184, R(OP_ADD, 5, 4, 0));              // found:
    put('h188, {OP_STOP, 26'd0});                 // done:
    send(VC_SETVL, 32);
    expect_resp(32, "vector length for the search");
    send(VC_LOADV, K_B, 4, 1);
    send(VC_MOVSV, S_B, 0, 9);
    send(VC_VFETCH, 'h140);
    send(VC_STOREV, R_B, 4, 5);
    sync();
    begin
      int found = 0;
      for (int u = 0; u < 32; u++) if (rmem[widx(R_B) + u] != '1) found++;
      $display("binary search: %0d of 32 keys found", found);
    end

    // ---- compare: memory, then every register of every uT
    for (int r = 1; r < 32; r++) send(VC_STOREV, 32'h4000 + 128 * r, 4, r);
    sync();
    for (int i = 0; i < MEMW; i++) begin
      checks++;
      if (u_mem.mem[i] !== rmem[i]) begin
        failures++;
        if (failures < 20) $display("FAIL memory word %h: %h, expected %h", 4 * i, u_mem.mem[i], rmem[i]);
      end
    end

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("%-24s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never happened: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

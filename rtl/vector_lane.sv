// vector_lane: one lane of the vector unit, with a banked register file and
// per-bank integer ALUs.
//
// The lane holds the registers of the microthreads (uTs) LANE_ID,
// LANE_ID + NUM_LANES, LANE_ID + 2*NUM_LANES, ...; local uT j is global uT
// j*NUM_LANES + LANE_ID. Its REGS physical registers are split into NUM_BANKS
// 2r1w banks (vrf_bank). The registers of one uT stay in one bank and
// consecutive local uTs are striped across the banks: local uT j uses bank
// j % NUM_BANKS at entry ((j / NUM_BANKS) << nregs_log2) | r, where
// 2**nregs_log2 is the number of registers each uT was configured with.
//
// The issue unit broadcasts one micro-op (uop_valid, uop, uop_mask, nsteps) to
// all lanes at once. The lane's sequencer then steps through local uTs
// 0 .. nsteps-1, one per cycle, so that it reads a new bank every cycle; uTs
// whose mask bit is clear take their cycle but write nothing. Depending on the
// micro-op kind:
//   K_ALU/K_MOVSV/K_UTIDX  the bank's own integer ALU computes and the result
//                          is written back in the same cycle;
//   K_BR                   the bank ALU compares and the uT's branch-resolution
//                          bit is collected in br_bits;
//   K_MUL/K_DIV/K_FADD/K_FMUL/K_FDIV/K_FSQRT
//                          operands go to the pipelined integer multiplier or
//                          divider (3 and 12 cycles) or to the single-precision
//                          floating-point adder, multiplier, divider or square
//                          root (3, 3, 7 and 10 cycles);
//                          results are written back as they leave the
//                          pipeline, then the lane drains;
//   K_LD/K_ST              the address (rs + imm) is sent on the uT memory port
//                          and the lane waits for the response before moving
//                          on to the next uT.
// busy is high from the cycle after uop_valid until the micro-op has finished.
// Vector loads write through the VLU port (vlu_*) and vector stores read
// through the VSU port (vsu_*, combinational) while the sequencer is idle.
//
// The banking, the uT striping, the per-bank ALUs and the unit latencies follow
// the architecture. Executing one micro-op at a time per lane, with no
// overlap between functional units, no chaining and blocking uT memory
// accesses, is this design's simplification.
module vector_lane
  import maven_pkg::*;
#(
  parameter int unsigned LANE_ID   = 0,
  parameter int unsigned NUM_LANES = 4,
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned REGS      = 256,
  parameter int unsigned MAX_UT    = 8,    // uTs per lane at the maximum vector length
  parameter int unsigned MUL_LAT   = 3,
  parameter int unsigned DIV_LAT   = 12,
  parameter int unsigned FADD_LAT  = 3,
  parameter int unsigned FMUL_LAT  = 3,
  parameter int unsigned FDIV_LAT  = 7,
  parameter int unsigned FSQRT_LAT = 10
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [2:0]                  nregs_log2,
  // micro-op from the vector issue unit
  input  logic                        uop_valid,
  input  lane_uop_t                   uop,
  input  logic [MAX_UT-1:0]           uop_mask,
  input  logic [$clog2(MAX_UT+1)-1:0] nsteps,
  output logic                        busy,
  output logic [MAX_UT-1:0]           br_bits,
  // uT memory port (uT address / store-data / load-data queues of the VMU)
  output logic                        ut_req_valid,
  output mem_req_t                    ut_req,
  input  logic                        ut_req_ready,
  input  logic                        ut_resp_valid,
  input  word_t                       ut_resp_data,
  // vector load writeback (VLU)
  input  logic                        vlu_we,
  input  logic [$clog2(MAX_UT)-1:0]   vlu_ut,
  input  logic [REG_IDX_W-1:0]        vlu_reg,
  input  word_t                       vlu_data,
  // vector store read (VSU)
  input  logic [$clog2(MAX_UT)-1:0]   vsu_ut,
  input  logic [REG_IDX_W-1:0]        vsu_reg,
  output word_t                       vsu_data
);
  localparam int unsigned DEPTH = REGS / NUM_BANKS;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned UW    = (MAX_UT > 1) ? $clog2(MAX_UT) : 1;
  localparam int unsigned BW    = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1;
  localparam int unsigned TAG_W = UW + REG_IDX_W;
  localparam int unsigned SW    = $clog2(MAX_UT+1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN, S_MEMWAIT} state_e;
  state_e state;

  lane_uop_t         cur;
  logic [MAX_UT-1:0] mask_q;
  logic [SW-1:0]     nsteps_q;
  logic [UW-1:0]     j;
  logic [5:0]        outstanding;

  function automatic logic [AW-1:0] entry(input logic [UW-1:0] ut, input logic [REG_IDX_W-1:0] r,
                                          input logic [2:0] nl);
    int unsigned slot;
    slot = int'(ut) / NUM_BANKS;
    return AW'((slot << nl) | int'(r));
  endfunction

  function automatic logic [BW-1:0] bank_of(input logic [UW-1:0] ut);
    return BW'(int'(ut) % NUM_BANKS);
  endfunction

  // ------------------------------------------------------------ banks + ALUs
  logic [AW-1:0] raddr0, raddr1;
  word_t         rdata0 [NUM_BANKS];
  word_t         rdata1 [NUM_BANKS];
  word_t         alu_res [NUM_BANKS];
  logic          alu_cmp [NUM_BANKS];
  word_t         opa [NUM_BANKS];
  word_t         opb [NUM_BANKS];

  logic          wr_en;
  logic [BW-1:0] wr_bank;
  logic [AW-1:0] wr_addr;
  word_t         wr_data;

  wire seq_active = (state != S_IDLE);

  always_comb begin
    if (seq_active) begin
      raddr0 = entry(j, cur.rs, nregs_log2);
      raddr1 = entry(j, cur.rt, nregs_log2);
    end else begin
      raddr0 = entry(vsu_ut, vsu_reg, nregs_log2);
      raddr1 = raddr0;
    end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    vrf_bank #(.DEPTH(DEPTH), .WIDTH(XLEN)) u_bank (
      .clk    (clk),
      .raddr0 (raddr0),
      .rdata0 (rdata0[b]),
      .raddr1 (raddr1),
      .rdata1 (rdata1[b]),
      .we     (wr_en && (wr_bank == BW'(b))),
      .waddr  (wr_addr),
      .wdata  (wr_data)
    );

    always_comb begin
      opa[b] = (cur.rs == '0) ? '0 : rdata0[b];
      if (cur.use_imm)        opb[b] = cur.imm;
      else if (cur.rt == '0)  opb[b] = '0;
      else                    opb[b] = rdata1[b];
    end

    bank_alu u_alu (
      .fn     (cur.alu_fn),
      .cmp_fn (cur.cmp_fn),
      .a      (opa[b]),
      .b      (opb[b]),
      .result (alu_res[b]),
      .cmp    (alu_cmp[b])
    );
  end

  wire [BW-1:0] cb       = bank_of(j);
  wire          el_act   = mask_q[j];
  wire          last     = (SW'(j) == nsteps_q - 1'b1);
  word_t reg_b;                                                // store data
  assign reg_b = (cur.rt == '0) ? '0 : rdata1[cb];
  assign vsu_data = (vsu_reg == '0) ? '0 : rdata0[bank_of(vsu_ut)];

  // ------------------------------------------------------ long-latency units
  logic             mul_ov, div_ov, fadd_ov, fmul_ov, fdiv_ov, fsqrt_ov;
  word_t            mul_res, div_res, fadd_res, fmul_res, fdiv_res, fsqrt_res;
  logic [TAG_W-1:0] mul_tag, div_tag, fadd_tag, fmul_tag, fdiv_tag, fsqrt_tag;
  wire              issue_ll = (state == S_RUN) && el_act;
  wire              ll_kind  = (cur.kind == K_MUL) || (cur.kind == K_DIV) ||
                               (cur.kind == K_FADD) || (cur.kind == K_FMUL) ||
                               (cur.kind == K_FDIV) || (cur.kind == K_FSQRT);
  // Only one micro-op runs at a time, so at most one unit returns per cycle.
  wire              ll_ov    = mul_ov || div_ov || fadd_ov || fmul_ov || fdiv_ov || fsqrt_ov;
  logic [TAG_W-1:0] ll_tag;
  word_t            ll_res;
  always_comb begin
    ll_tag = fsqrt_tag;
    ll_res = fsqrt_res;
    if (mul_ov)       begin ll_tag = mul_tag;  ll_res = mul_res;  end
    else if (div_ov)  begin ll_tag = div_tag;  ll_res = div_res;  end
    else if (fadd_ov) begin ll_tag = fadd_tag; ll_res = fadd_res; end
    else if (fmul_ov) begin ll_tag = fmul_tag; ll_res = fmul_res; end
    else if (fdiv_ov) begin ll_tag = fdiv_tag; ll_res = fdiv_res; end
  end

  int_mul #(.LATENCY(MUL_LAT), .TAG_W(TAG_W)) u_mul (
    .clk, .rst_n,
    .in_valid  (issue_ll && cur.kind == K_MUL),
    .a         (opa[cb]),
    .b         (opb[cb]),
    .in_tag    ({j, cur.rd}),
    .out_valid (mul_ov),
    .result    (mul_res),
    .out_tag   (mul_tag)
  );

  int_div #(.LATENCY(DIV_LAT), .TAG_W(TAG_W)) u_div (
    .clk, .rst_n,
    .in_valid  (issue_ll && cur.kind == K_DIV),
    .a         (opa[cb]),
    .b         (opb[cb]),
    .want_rem  (cur.div_rem),
    .in_tag    ({j, cur.rd}),
    .out_valid (div_ov),
    .result    (div_res),
    .out_tag   (div_tag)
  );

  fp_add #(.LATENCY(FADD_LAT), .TAG_W(TAG_W)) u_fadd (
    .clk, .rst_n,
    .in_valid  (issue_ll && cur.kind == K_FADD),
    .a         (opa[cb]),
    .b         (opb[cb]),
    .sub       (cur.div_rem),
    .in_tag    ({j, cur.rd}),
    .out_valid (fadd_ov),
    .result    (fadd_res),
    .out_tag   (fadd_tag)
  );

  fp_mul #(.LATENCY(FMUL_LAT), .TAG_W(TAG_W)) u_fmul (
    .clk, .rst_n,
    .in_valid  (issue_ll && cur.kind == K_FMUL),
    .a         (opa[cb]),
    .b         (opb[cb]),
    .in_tag    ({j, cur.rd}),
    .out_valid (fmul_ov),
    .result    (fmul_res),
    .out_tag   (fmul_tag)
  );

  fp_div #(.LATENCY(FDIV_LAT), .TAG_W(TAG_W)) u_fdiv (
    .clk, .rst_n,
    .in_valid  (issue_ll && cur.kind == K_FDIV),
    .a         (opa[cb]),
    .b         (opb[cb]),
    .in_tag    ({j, cur.rd}),
    .out_valid (fdiv_ov),
    .result    (fdiv_res),
    .out_tag   (fdiv_tag)
  );

  fp_sqrt #(.LATENCY(FSQRT_LAT), .TAG_W(TAG_W)) u_fsqrt (
    .clk, .rst_n,
    .in_valid  (issue_ll && cur.kind == K_FSQRT),
    .a         (opa[cb]),
    .in_tag    ({j, cur.rd}),
    .out_valid (fsqrt_ov),
    .result    (fsqrt_res),
    .out_tag   (fsqrt_tag)
  );

  // --------------------------------------------------------- uT memory port
  assign ut_req_valid = (state == S_RUN) && el_act && (cur.kind == K_LD || cur.kind == K_ST);
  assign ut_req.addr  = alu_res[cb];
  assign ut_req.we    = (cur.kind == K_ST);
  assign ut_req.wdata = reg_b;

  // ------------------------------------------------------------- write port
  always_comb begin
    wr_en   = 1'b0;
    wr_bank = cb;
    wr_addr = entry(j, cur.rd, nregs_log2);
    wr_data = alu_res[cb];
    if (vlu_we) begin
      wr_en   = (vlu_reg != '0);
      wr_bank = bank_of(vlu_ut);
      wr_addr = entry(vlu_ut, vlu_reg, nregs_log2);
      wr_data = vlu_data;
    end else if (ll_ov) begin
      logic [TAG_W-1:0] t;
      t       = ll_tag;
      wr_en   = (t[REG_IDX_W-1:0] != '0);
      wr_bank = bank_of(t[TAG_W-1:REG_IDX_W]);
      wr_addr = entry(t[TAG_W-1:REG_IDX_W], t[REG_IDX_W-1:0], nregs_log2);
      wr_data = ll_res;
    end else if (state == S_MEMWAIT) begin
      wr_en   = ut_resp_valid && (cur.kind == K_LD) && (cur.rd != '0);
      wr_data = ut_resp_data;
    end else if (state == S_RUN && el_act) begin
      unique case (cur.kind)
        K_ALU, K_MOVSV: wr_en = (cur.rd != '0);
        K_UTIDX: begin
          wr_en   = (cur.rd != '0);
          wr_data = word_t'(int'(j) * NUM_LANES + LANE_ID);
        end
        default: wr_en = 1'b0;
      endcase
    end
  end

  // -------------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cur         <= '0;
      mask_q      <= '0;
      nsteps_q    <= '0;
      j           <= '0;
      br_bits     <= '0;
      outstanding <= '0;
    end else begin
      outstanding <= outstanding
                   + 6'((issue_ll && ll_kind) ? 1 : 0)
                   - 6'(ll_ov ? 1 : 0);
      unique case (state)
        S_IDLE: if (uop_valid && nsteps != '0) begin
          cur      <= uop;
          mask_q   <= uop_mask;
          nsteps_q <= nsteps;
          j        <= '0;
          state    <= S_RUN;
          if (uop.kind == K_BR) br_bits <= '0;
        end
        S_RUN: begin
          if (cur.kind == K_BR) br_bits[j] <= el_act && alu_cmp[cb];
          if ((cur.kind == K_LD || cur.kind == K_ST) && el_act) begin
            if (ut_req_ready) state <= S_MEMWAIT;
          end else if (last) begin
            state <= ll_kind ? S_DRAIN : S_IDLE;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_MEMWAIT: if (ut_resp_valid) begin
          if (last) state <= S_IDLE;
          else begin
            j     <= j + 1'b1;
            state <= S_RUN;
          end
        end
        S_DRAIN: if (outstanding == 6'd0 || (outstanding == 6'd1 && ll_ov))
          state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The vector load path may only write while the sequencer is idle.
  assert property (@(posedge clk) disable iff (!rst_n) vlu_we |-> (state == S_IDLE))
    else $error("vector_lane: VLU write while a micro-op is running");
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({mul_ov, div_ov, fadd_ov, fmul_ov, fdiv_ov, fsqrt_ov}))
    else $error("vector_lane: two long-latency results in one cycle");
endmodule

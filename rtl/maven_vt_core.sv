// maven_vt_core: single-core, four-lane vector-thread (VT) vector unit.
//
// This is the vector side of a Maven-style VT core in its multi-lane
// configuration: one control processor drives a four-lane vector unit whose
// lanes hold 256 physical registers each in four 2r1w banks with per-bank
// integer ALUs, and whose vector issue unit uses the 2-stack pending vector
// fragment buffer. The control processor itself is outside this module:
// its side of the vector command queue is the cmd_* port and the answers to
// configure / set-vector-length / sync commands come back on resp_*.
//
//   cmd queue (fifo) -> vt_viu -> 4 x vector_lane
//                         |  \-> vinst_mem (2 KB uT code, written via vinst_*)
//                         \-> vmu (vector loads/stores) --\
//        lanes' uT loads/stores -> mem_coalescer ----------> mem_arbiter -> mem_*
//
// The mem_* port is the data-cache port: valid/ready word requests and one
// in-order response per request carrying the aligned 16-byte block that holds
// the word (writes are acknowledged the same way). busy is high while any
// command is queued or in progress. The ev_* outputs pulse on the
// microarchitectural events: a divergent branch, a uniform branch, a fragment
// merge, a stack swap, a coalesced uT request and the end of a vector fetch.
//
// Lane count, registers, banking, maximum vector length 32, 2 KB VT
// instruction store, 2-stack convergence, the 3/12-cycle integer multiplier
// and divider and the 3/3/7/10-cycle single-precision adder, multiplier,
// divider and square root in every lane follow the architecture's main
// multi-lane VT configuration. The
// memory coalescer is an option of that configuration (USE_COALESCER, off by
// default, which makes it a plain in-order arbiter). The command-queue depth,
// the command and instruction encodings and the memory protocol are this
// design's own.
module maven_vt_core
  import maven_pkg::*;
#(
  parameter int unsigned NUM_LANES     = 4,
  parameter int unsigned NUM_BANKS     = 4,
  parameter int unsigned REGS_PER_LANE = 256,
  parameter int unsigned MAX_VLEN      = 32,
  parameter int unsigned VINST_BYTES   = 2048,
  parameter int unsigned CMDQ_DEPTH    = 8,
  parameter bit          TWO_STACK     = 1'b1,
  parameter bit          USE_COALESCER = 1'b0,
  parameter int unsigned MUL_LAT       = 3,
  parameter int unsigned DIV_LAT       = 12,
  parameter int unsigned FADD_LAT      = 3,
  parameter int unsigned FMUL_LAT      = 3,
  parameter int unsigned FDIV_LAT      = 7,
  parameter int unsigned FSQRT_LAT     = 10
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // control processor side
  input  logic                           cmd_valid,
  input  vcmd_t                          cmd,
  output logic                           cmd_ready,
  output logic                           resp_valid,
  output word_t                          resp_data,
  // VT instruction store fill
  input  logic                           vinst_we,
  input  logic [$clog2(VINST_BYTES)-1:0] vinst_addr,
  input  logic [31:0]                    vinst_wdata,
  // data cache port
  output logic                           mem_req_valid,
  output mem_req_t                       mem_req,
  input  logic                           mem_req_ready,
  input  logic                           mem_resp_valid,
  input  line_t                          mem_resp_data,
  // status and events
  output logic                           busy,
  output logic                           ev_diverge,
  output logic                           ev_uniform,
  output logic                           ev_merge,
  output logic                           ev_swap,
  output logic                           ev_coalesce,
  output logic                           ev_vfetch_done
);
  localparam int unsigned UT_LANE = MAX_VLEN / NUM_LANES;
  localparam int unsigned PC_W    = $clog2(VINST_BYTES);
  localparam int unsigned VW      = $clog2(MAX_VLEN + 1);
  localparam int unsigned UW      = (UT_LANE > 1) ? $clog2(UT_LANE) : 1;

  // --------------------------------------------------- vector command queue
  vcmd_t q_head;
  logic  q_full, q_empty, q_pop;
  logic [$clog2(CMDQ_DEPTH+1)-1:0] q_count;
  fifo #(.T(vcmd_t), .DEPTH(CMDQ_DEPTH)) u_cmdq (
    .clk, .rst_n, .push(cmd_valid), .din(cmd), .pop(q_pop),
    .head(q_head), .full(q_full), .empty(q_empty), .count(q_count)
  );
  assign cmd_ready = !q_full;

  // ------------------------------------------------------- vector issue unit
  logic [PC_W-1:0]                    imem_addr;
  logic [31:0]                        imem_data;
  logic                               uop_valid;
  lane_uop_t                          uop;
  logic [NUM_LANES-1:0][UT_LANE-1:0]  uop_mask;
  logic [$clog2(UT_LANE+1)-1:0]       nsteps;
  logic [2:0]                         nregs_log2;
  logic [NUM_LANES-1:0]               lane_busy;
  logic [NUM_LANES-1:0][UT_LANE-1:0]  br_bits;
  logic                               vmu_start, vmu_is_store, vmu_done, vmu_busy;
  word_t                              vmu_base, vmu_stride;
  logic [REG_IDX_W-1:0]               vmu_vreg;
  logic [VW-1:0]                      vl;
  logic                               viu_busy;

  vt_viu #(
    .NUM_LANES(NUM_LANES), .MAX_VLEN(MAX_VLEN), .REGS_PER_LANE(REGS_PER_LANE),
    .PC_W(PC_W), .TWO_STACK(TWO_STACK)
  ) u_viu (
    .clk, .rst_n,
    .cmd_valid (!q_empty), .cmd(q_head), .cmd_ready(q_pop),
    .resp_valid, .resp_data,
    .imem_addr, .imem_data,
    .uop_valid, .uop, .uop_mask, .nsteps, .nregs_log2,
    .lane_busy, .br_bits,
    .vmu_start, .vmu_is_store, .vmu_base, .vmu_stride, .vmu_vreg, .vl, .vmu_done,
    .ev_diverge, .ev_uniform, .ev_merge, .ev_swap, .ev_vfetch_done,
    .busy (viu_busy)
  );

  vinst_mem #(.SIZE_BYTES(VINST_BYTES)) u_vinst (
    .clk, .we(vinst_we), .waddr(vinst_addr), .wdata(vinst_wdata),
    .raddr(imem_addr), .rdata(imem_data)
  );

  // ------------------------------------------------------------------ lanes
  logic [NUM_LANES-1:0] vlu_we;
  logic [UW-1:0]        lane_ut;
  logic [REG_IDX_W-1:0] lane_reg;
  word_t                vlu_data;
  word_t                vsu_data [NUM_LANES];
  logic [NUM_LANES-1:0] ut_req_valid, ut_req_ready, ut_resp_valid;
  mem_req_t             ut_req  [NUM_LANES];
  word_t                ut_resp [NUM_LANES];

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    vector_lane #(
      .LANE_ID(l), .NUM_LANES(NUM_LANES), .NUM_BANKS(NUM_BANKS), .REGS(REGS_PER_LANE),
      .MAX_UT(UT_LANE), .MUL_LAT(MUL_LAT), .DIV_LAT(DIV_LAT),
      .FADD_LAT(FADD_LAT), .FMUL_LAT(FMUL_LAT), .FDIV_LAT(FDIV_LAT), .FSQRT_LAT(FSQRT_LAT)
    ) u_lane (
      .clk, .rst_n, .nregs_log2,
      .uop_valid, .uop, .uop_mask(uop_mask[l]), .nsteps,
      .busy(lane_busy[l]), .br_bits(br_bits[l]),
      .ut_req_valid(ut_req_valid[l]), .ut_req(ut_req[l]), .ut_req_ready(ut_req_ready[l]),
      .ut_resp_valid(ut_resp_valid[l]), .ut_resp_data(ut_resp[l]),
      .vlu_we(vlu_we[l]), .vlu_ut(lane_ut), .vlu_reg(lane_reg), .vlu_data,
      .vsu_ut(lane_ut), .vsu_reg(lane_reg), .vsu_data(vsu_data[l])
    );
  end

  // ----------------------------------------------------- vector memory unit
  logic     vmu_req_valid, vmu_req_ready, vmu_resp_valid;
  mem_req_t vmu_req;
  line_t    resp_line;

  vmu #(.NUM_LANES(NUM_LANES), .MAX_VLEN(MAX_VLEN)) u_vmu (
    .clk, .rst_n,
    .start(vmu_start), .is_store(vmu_is_store), .base(vmu_base), .stride(vmu_stride),
    .vreg(vmu_vreg), .vl, .busy(vmu_busy), .done(vmu_done),
    .vlu_we, .lane_ut, .lane_reg, .vlu_data, .vsu_data,
    .req_valid(vmu_req_valid), .req(vmu_req), .req_ready(vmu_req_ready),
    .resp_valid(vmu_resp_valid), .resp_data(resp_line)
  );

  // ----------------------------------------- uT memory path and coalescer
  logic     co_req_valid, co_req_ready, co_resp_valid;
  mem_req_t co_req;

  mem_coalescer #(.NUM_LANES(NUM_LANES), .COALESCE(USE_COALESCER)) u_coal (
    .clk, .rst_n,
    .lane_req_valid(ut_req_valid), .lane_req(ut_req), .lane_req_ready(ut_req_ready),
    .lane_resp_valid(ut_resp_valid), .lane_resp_data(ut_resp),
    .req_valid(co_req_valid), .req(co_req), .req_ready(co_req_ready),
    .resp_valid(co_resp_valid), .resp_data(resp_line), .coalesced(ev_coalesce)
  );

  // ---------------------------------------------------- data cache arbiter
  mem_req_t             arb_in [2];
  logic [1:0]           arb_ready, arb_resp;
  assign arb_in[0] = vmu_req;
  assign arb_in[1] = co_req;
  assign vmu_req_ready  = arb_ready[0];
  assign co_req_ready   = arb_ready[1];
  assign vmu_resp_valid = arb_resp[0];
  assign co_resp_valid  = arb_resp[1];

  mem_arbiter #(.NUM_REQ(2)) u_arb (
    .clk, .rst_n,
    .in_valid({co_req_valid, vmu_req_valid}), .in_req(arb_in), .in_ready(arb_ready),
    .out_resp_valid(arb_resp),
    .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data), .out_resp_data(resp_line)
  );

  assign busy = !q_empty || viu_busy || vmu_busy || (lane_busy != '0);
endmodule

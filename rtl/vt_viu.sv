// vt_viu: vector issue unit of the vector-thread (VT) vector unit.
//
// It takes vector commands from the control processor's command queue, one at
// a time and in order:
//   VC_CONFIG  sets the registers per microthread (uT), rounded up to a power of
//              two between 4 and 32, and answers with the maximum vector length
//              min(MAX_VLEN, NUM_LANES*REGS_PER_LANE / registers-per-uT);
//   VC_SETVL   sets the active vector length vl = min(n, maximum) and answers vl;
//   VC_MOVSV   copies a scalar into one register of every uT below vl;
//   VC_LOADV / VC_STOREV  start the vector memory unit and wait for it;
//   VC_SYNC    answers once everything before it has finished;
//   VC_VFETCH  runs uT code from the given address on all uTs below vl.
//
// A vector fetch creates a vector fragment: a PC and an active-uT mask with
// every uT below vl set. The unit fetches the instruction at the fragment's PC,
// decodes it into a lane micro-op and broadcasts it to all lanes with the
// mask; the lanes step through their uTs and the unit waits for them. For a
// branch the lanes return one resolution bit per uT. If the active uTs all
// agree, the fragment simply continues at the target or the fall-through.
// Otherwise the fragment splits in two and one half is parked in the pending
// vector fragment buffer (pvfb). A STOP ends the current fragment; the next
// one is popped from the pvfb, and when it is empty the vector fetch is done.
//
// Fragment scheduling (dynamic fragment convergence): each candidate fragment
// has a key {future, PC}, where future is set (2-stack scheme only) for a
// fragment produced by a backward branch. After a divergent branch the
// candidate with the smaller key runs and the other is pushed. The fragment
// that is about to run is then compared with the pvfb's top: if its key is
// smaller it runs; if equal the two merge (masks OR-ed) and run together; if
// larger it is pushed and the top is popped instead, so the trailing fragment
// always runs first. Popping a future fragment swaps the two virtual stacks.
//
// Timing: a non-branch instruction costs one fetch/issue cycle plus the lane
// time (ceil(vl/NUM_LANES) cycles for integer operations, longer for
// long-latency units and uT memory accesses) plus one wait cycle; a branch
// adds one resolve cycle, and a push or pop of the pvfb one cycle each.
//
// The fragment mechanism, the branch-resolution mask, the PVFB with its
// 1-stack and 2-stack orderings and the merge on equal PCs follow the
// architecture. Comparing a running fragment with the stack top after every
// instruction (so a fragment that jumps past a parked one yields to it), the
// command set and encodings, and the cycle costs above are this design's own.
module vt_viu
  import maven_pkg::*;
#(
  parameter int unsigned NUM_LANES     = 4,
  parameter int unsigned MAX_VLEN      = 32,
  parameter int unsigned REGS_PER_LANE = 256,
  parameter int unsigned PC_W          = 11,
  parameter bit          TWO_STACK     = 1'b1,
  localparam int unsigned UT_LANE      = MAX_VLEN / NUM_LANES,
  localparam int unsigned VW           = $clog2(MAX_VLEN + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // command queue
  input  logic                          cmd_valid,
  input  vcmd_t                         cmd,
  output logic                          cmd_ready,
  output logic                          resp_valid,
  output word_t                         resp_data,
  // VT instruction store
  output logic [PC_W-1:0]               imem_addr,
  input  logic [31:0]                   imem_data,
  // lanes
  output logic                          uop_valid,
  output lane_uop_t                     uop,
  output logic [NUM_LANES-1:0][UT_LANE-1:0] uop_mask,
  output logic [$clog2(UT_LANE+1)-1:0]  nsteps,
  output logic [2:0]                    nregs_log2,
  input  logic [NUM_LANES-1:0]          lane_busy,
  input  logic [NUM_LANES-1:0][UT_LANE-1:0] br_bits,
  // vector memory unit
  output logic                          vmu_start,
  output logic                          vmu_is_store,
  output word_t                         vmu_base,
  output word_t                         vmu_stride,
  output logic [REG_IDX_W-1:0]          vmu_vreg,
  output logic [VW-1:0]                 vl,
  input  logic                          vmu_done,
  // events, one-cycle pulses
  output logic                          ev_diverge,
  output logic                          ev_uniform,
  output logic                          ev_merge,
  output logic                          ev_swap,
  output logic                          ev_vfetch_done,
  output logic                          busy
);
  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_LWAIT, S_RESOLVE, S_CAND, S_POPNEXT, S_VMU
  } state_e;
  state_e state;

  logic [PC_W-1:0]     pc;
  logic [MAX_VLEN-1:0] mask;
  logic                is_br;
  logic [PC_W-1:0]     br_target;
  logic [MAX_VLEN-1:0] taken;
  // candidate fragment
  logic [PC_W-1:0]     c_pc;
  logic [MAX_VLEN-1:0] c_mask;
  logic                c_fut;

  // ---------------------------------------------------------------- config
  logic [VW-1:0] vlmax;
  always_comb begin
    int unsigned m;
    m = (NUM_LANES * REGS_PER_LANE) >> nregs_log2;
    vlmax = (m > MAX_VLEN) ? VW'(MAX_VLEN) : VW'(m);
  end

  function automatic logic [2:0] nregs_code(input word_t n);
    if (n <= 4)       return 3'd2;
    else if (n <= 8)  return 3'd3;
    else if (n <= 16) return 3'd4;
    else              return 3'd5;
  endfunction

  logic [MAX_VLEN-1:0] vl_mask;
  always_comb
    for (int i = 0; i < MAX_VLEN; i++) vl_mask[i] = (i < int'(vl));

  assign nsteps = ($bits(nsteps))'((int'(vl) + NUM_LANES - 1) / NUM_LANES);

  // ------------------------------------------------------------------ pvfb
  logic                push, pop, pv_empty, pv_top_future, pv_swapped, pv_merged;
  logic [PC_W-1:0]     push_pc, pv_top_pc;
  logic                push_fut;
  logic [MAX_VLEN-1:0] push_mask, pv_top_mask;
  logic                pv_clear;

  pvfb #(.NUM_UT(MAX_VLEN), .PC_W(PC_W), .TWO_STACK(TWO_STACK)) u_pvfb (
    .clk, .rst_n,
    .clear       (pv_clear),
    .push        (push),
    .push_pc     (push_pc),
    .push_future (push_fut),
    .push_mask   (push_mask),
    .pop         (pop),
    .empty       (pv_empty),
    .top_pc      (pv_top_pc),
    .top_mask    (pv_top_mask),
    .top_future  (pv_top_future),
    .swapped     (pv_swapped),
    .merged      (pv_merged)
  );

  // ---------------------------------------------------------------- decode
  logic [5:0]  opc;
  ut_op_e      op;
  lane_uop_t   dec;
  word_t       sext, zext;
  assign imem_addr = pc;
  assign opc  = imem_data[31:26];
  assign op   = ut_op_e'(opc);
  assign sext = {{16{imem_data[15]}}, imem_data[15:0]};
  assign zext = {16'd0, imem_data[15:0]};

  always_comb begin
    dec         = '0;
    dec.kind    = K_ALU;
    dec.alu_fn  = ALU_ADD;
    dec.cmp_fn  = CMP_EQ;
    dec.rd      = imem_data[25:21];
    dec.rs      = imem_data[20:16];
    dec.rt      = imem_data[15:11];
    dec.imm     = sext;
    case (op)
      OP_ADD:  dec.alu_fn = ALU_ADD;
      OP_SUB:  dec.alu_fn = ALU_SUB;
      OP_AND:  dec.alu_fn = ALU_AND;
      OP_OR:   dec.alu_fn = ALU_OR;
      OP_XOR:  dec.alu_fn = ALU_XOR;
      OP_SLT:  dec.alu_fn = ALU_SLT;
      OP_SLTU: dec.alu_fn = ALU_SLTU;
      OP_SLL:  dec.alu_fn = ALU_SLL;
      OP_SRL:  dec.alu_fn = ALU_SRL;
      OP_SRA:  dec.alu_fn = ALU_SRA;
      OP_ADDI: begin dec.alu_fn = ALU_ADD; dec.use_imm = 1'b1; end
      OP_SLTI: begin dec.alu_fn = ALU_SLT; dec.use_imm = 1'b1; end
      OP_ANDI: begin dec.alu_fn = ALU_AND; dec.use_imm = 1'b1; dec.imm = zext; end
      OP_ORI:  begin dec.alu_fn = ALU_OR;  dec.use_imm = 1'b1; dec.imm = zext; end
      OP_XORI: begin dec.alu_fn = ALU_XOR; dec.use_imm = 1'b1; dec.imm = zext; end
      OP_LUI:  begin dec.alu_fn = ALU_PASSB; dec.use_imm = 1'b1; dec.imm = {imem_data[15:0], 16'd0}; end
      OP_MUL:  dec.kind = K_MUL;
      OP_DIV:  dec.kind = K_DIV;
      OP_REM:  begin dec.kind = K_DIV; dec.div_rem = 1'b1; end
      OP_FADD: dec.kind = K_FADD;
      OP_FSUB: begin dec.kind = K_FADD; dec.div_rem = 1'b1; end
      OP_FMUL: dec.kind = K_FMUL;
      OP_FDIV: dec.kind = K_FDIV;
      OP_FSQRT: dec.kind = K_FSQRT;
      OP_LW:   begin dec.kind = K_LD; dec.use_imm = 1'b1; end
      OP_SW:   begin
        dec.kind    = K_ST;
        dec.use_imm = 1'b1;
        dec.rt      = imem_data[25:21];   // store data
        dec.rd      = '0;
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        dec.kind = K_BR;
        dec.rs   = imem_data[25:21];
        dec.rt   = imem_data[20:16];
        dec.rd   = '0;
        dec.cmp_fn = (op == OP_BEQ) ? CMP_EQ :
                     (op == OP_BNE) ? CMP_NE :
                     (op == OP_BLT) ? CMP_LT : CMP_GE;
      end
      OP_UTIDX: dec.kind = K_UTIDX;
      default:  dec.rd = '0;   // unknown opcodes do nothing
    endcase
  end

  wire              is_stop   = (op == OP_STOP);
  wire [PC_W-1:0]   pc_next   = pc + PC_W'(4);
  wire [PC_W-1:0]   tgt       = pc_next + PC_W'({imem_data[15:0], 2'b00});

  // lane mask distribution: global uT i = j*NUM_LANES + L
  logic [MAX_VLEN-1:0] br_global;
  always_comb begin
    for (int l = 0; l < NUM_LANES; l++)
      for (int j = 0; j < UT_LANE; j++) begin
        br_global[j*NUM_LANES + l] = br_bits[l][j];
      end
  end

  // ---------------------------------------------------------- command side
  logic   cmd_take;
  vcmd_t  cmd_q;
  assign cmd_ready = (state == S_IDLE);
  assign cmd_take  = cmd_valid && cmd_ready;

  // candidate vs. top-of-stack
  wire [PC_W:0] c_key   = {c_fut, c_pc};
  wire [PC_W:0] top_key = {pv_top_future, pv_top_pc};

  always_comb begin
    push      = 1'b0;
    push_pc   = c_pc;
    push_fut  = c_fut;
    push_mask = c_mask;
    pop       = 1'b0;
    pv_clear  = 1'b0;
    uop_valid = 1'b0;
    uop       = dec;
    ev_diverge = 1'b0;
    ev_uniform = 1'b0;
    ev_merge   = pv_merged;
    ev_swap    = pv_swapped;
    for (int l = 0; l < NUM_LANES; l++)
      for (int j = 0; j < UT_LANE; j++)
        uop_mask[l][j] = mask[j*NUM_LANES + l];
    unique case (state)
      S_IDLE: begin
        if (cmd_take && cmd.op == VC_VFETCH) pv_clear = 1'b1;
        if (cmd_take && cmd.op == VC_MOVSV && vl != '0) begin
          uop_valid   = 1'b1;
          uop         = '0;
          uop.kind    = K_MOVSV;
          uop.alu_fn  = ALU_PASSB;
          uop.use_imm = 1'b1;
          uop.rd      = cmd.vreg;
          uop.imm     = cmd.data;
          for (int l = 0; l < NUM_LANES; l++)
            for (int j = 0; j < UT_LANE; j++)
              uop_mask[l][j] = vl_mask[j*NUM_LANES + l];
        end
      end
      S_FETCH: begin
        if (is_stop) pop = !pv_empty;
        else         uop_valid = 1'b1;
      end
      S_RESOLVE: begin
        // taken is the resolved mask restricted to the active uTs
        if (taken == '0 || taken == mask) ev_uniform = 1'b1;
        else begin
          ev_diverge = 1'b1;
          push = 1'b1;
          if ({TWO_STACK && (br_target <= pc), br_target} < {1'b0, pc_next}) begin
            push_pc = pc_next; push_fut = 1'b0; push_mask = mask & ~taken;
          end else begin
            push_pc = br_target; push_fut = TWO_STACK && (br_target <= pc); push_mask = taken;
          end
        end
      end
      S_CAND: begin
        if (!pv_empty) begin
          if (c_key == top_key) begin
            pop = 1'b1;
            ev_merge = 1'b1;
          end else if (c_key > top_key) begin
            push = 1'b1;
          end
        end else if (c_fut) begin
          ev_swap = 1'b1;   // nothing left on the current stack: stacks swap
        end
      end
      S_POPNEXT: pop = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      pc             <= '0;
      mask           <= '0;
      is_br          <= 1'b0;
      br_target      <= '0;
      taken          <= '0;
      c_pc           <= '0;
      c_mask         <= '0;
      c_fut          <= 1'b0;
      cmd_q          <= '0;
      vl             <= '0;
      nregs_log2     <= 3'd5;
      resp_valid     <= 1'b0;
      resp_data      <= '0;
      vmu_start      <= 1'b0;
      ev_vfetch_done <= 1'b0;
    end else begin
      resp_valid     <= 1'b0;
      vmu_start      <= 1'b0;
      ev_vfetch_done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_take) begin
          cmd_q <= cmd;
          unique case (cmd.op)
            VC_CONFIG: begin
              nregs_log2 <= nregs_code(cmd.data);
              vl         <= '0;
              resp_valid <= 1'b1;
              resp_data  <= word_t'(((NUM_LANES * REGS_PER_LANE) >> nregs_code(cmd.data)) > MAX_VLEN
                                    ? MAX_VLEN
                                    : ((NUM_LANES * REGS_PER_LANE) >> nregs_code(cmd.data)));
            end
            VC_SETVL: begin
              vl         <= (cmd.data > word_t'(vlmax)) ? vlmax : VW'(cmd.data);
              resp_valid <= 1'b1;
              resp_data  <= (cmd.data > word_t'(vlmax)) ? word_t'(vlmax) : cmd.data;
            end
            VC_SYNC: begin
              resp_valid <= 1'b1;
              resp_data  <= '0;
            end
            VC_MOVSV: if (vl != '0) state <= S_LWAIT;
            VC_LOADV, VC_STOREV: begin
              vmu_start <= 1'b1;
              state     <= S_VMU;
            end
            VC_VFETCH: if (vl != '0) begin
              pc    <= PC_W'(cmd.data);
              mask  <= vl_mask;
              is_br <= 1'b0;
              state <= S_FETCH;
            end else begin
              ev_vfetch_done <= 1'b1;
            end
            default: ;
          endcase
        end
        S_VMU: if (vmu_done) state <= S_IDLE;
        S_FETCH: begin
          if (is_stop) begin
            if (pv_empty) begin
              state          <= S_IDLE;
              ev_vfetch_done <= 1'b1;
            end else begin
              pc   <= pv_top_pc;
              mask <= pv_top_mask;
            end
          end else begin
            is_br     <= (dec.kind == K_BR);
            br_target <= tgt;
            state     <= S_LWAIT;
          end
        end
        S_LWAIT: if (lane_busy == '0) begin
          if (cmd_q.op == VC_MOVSV) state <= S_IDLE;
          else if (is_br) begin
            taken <= br_global & mask;
            state <= S_RESOLVE;
          end else begin
            c_pc   <= pc_next;
            c_mask <= mask;
            c_fut  <= 1'b0;
            state  <= S_CAND;
          end
        end
        S_RESOLVE: begin
          state <= S_CAND;
          if (taken == '0) begin
            c_pc <= pc_next; c_mask <= mask; c_fut <= 1'b0;
          end else if (taken == mask) begin
            c_pc <= br_target; c_mask <= mask; c_fut <= TWO_STACK && (br_target <= pc);
          end else if ({TWO_STACK && (br_target <= pc), br_target} < {1'b0, pc_next}) begin
            c_pc <= br_target; c_mask <= taken; c_fut <= 1'b0;   // a future key never wins
          end else begin
            c_pc <= pc_next; c_mask <= mask & ~taken; c_fut <= 1'b0;
          end
        end
        S_CAND: begin
          if (pv_empty || c_key < top_key) begin
            pc    <= c_pc;
            mask  <= c_mask;
            state <= S_FETCH;
          end else if (c_key == top_key) begin
            pc    <= c_pc;
            mask  <= c_mask | pv_top_mask;
            state <= S_FETCH;
          end else begin
            state <= S_POPNEXT;
          end
        end
        S_POPNEXT: begin
          pc    <= pv_top_pc;
          mask  <= pv_top_mask;
          state <= S_FETCH;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign vmu_is_store = (cmd_q.op == VC_STOREV);
  assign vmu_base     = cmd_q.data;
  assign vmu_stride   = cmd_q.stride;
  assign vmu_vreg     = cmd_q.vreg;
  assign busy         = (state != S_IDLE);

  // A running fragment always has at least one active uT.
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_FETCH) |-> (mask != '0))
    else $error("vt_viu: empty fragment");
endmodule

// vmu: vector memory unit, the vector load and store path between the data
// cache and the lanes.
//
// The control processor splits a vector memory instruction into a memory part
// for this unit and a register part for the lanes; here both are driven from
// one start pulse (start, is_store, base, stride, vreg, vl).
//
// Vector load: the load address generator (VLAGU) issues one word request per
// element, address base + i*stride, as long as the vector load-data queue
// (VLDQ) has room for every request in flight. Responses arrive in order; the
// addressed word is picked out of the returned block and pushed into the VLDQ.
// The load writeback unit (VLU) pops one element per cycle and writes element
// i into lane i % NUM_LANES, local uT i / NUM_LANES, register vreg.
//
// Vector store: the store-data read unit (VSU) reads one element per cycle
// from its lane into the vector store-data queue (VSDQ); the store address
// generator (VSAGU) pairs each queued element with its address and issues the
// write. The operation ends when every write has been acknowledged.
//
// done pulses for one cycle when the operation has finished; busy is high
// from the cycle after start until then. Decoupling the address side from the
// data side through the VLDQ/VSDQ follows the architecture; one word per
// request and the queue depths are this design's choices.
module vmu
  import maven_pkg::*;
#(
  parameter int unsigned NUM_LANES  = 4,
  parameter int unsigned MAX_VLEN   = 32,
  parameter int unsigned VLDQ_DEPTH = 8,
  parameter int unsigned VSDQ_DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          is_store,
  input  word_t                         base,
  input  word_t                         stride,
  input  logic [REG_IDX_W-1:0]          vreg,
  input  logic [$clog2(MAX_VLEN+1)-1:0] vl,
  output logic                          busy,
  output logic                          done,
  // lanes
  output logic [NUM_LANES-1:0]          vlu_we,
  output logic [$clog2(MAX_VLEN/NUM_LANES)-1:0] lane_ut,
  output logic [REG_IDX_W-1:0]          lane_reg,
  output word_t                         vlu_data,
  input  word_t                         vsu_data [NUM_LANES],
  // data cache port
  output logic                          req_valid,
  output mem_req_t                      req,
  input  logic                          req_ready,
  input  logic                          resp_valid,
  input  line_t                         resp_data
);
  localparam int unsigned VW = $clog2(MAX_VLEN+1);
  localparam int unsigned LW = (NUM_LANES > 1) ? $clog2(NUM_LANES) : 1;
  localparam int unsigned OW = $clog2(LINE_BYTES) - 2;   // word-select bits
  localparam int unsigned CW = $clog2(VLDQ_DEPTH+1);

  logic              st_q;
  word_t             base_q, stride_q;
  logic [REG_IDX_W-1:0] vreg_q;
  logic [VW-1:0]     vl_q;
  logic [VW-1:0]     n_addr;   // requests issued
  logic [VW-1:0]     n_data;   // elements written to lanes (load) / read from lanes (store)
  logic [VW-1:0]     n_resp;   // responses received
  logic [CW-1:0]     inflight;

  // ----------------------------------------------------------------- queues
  logic          ldq_push, ldq_pop, ldq_full, ldq_empty;
  word_t         ldq_head, ldq_din;
  logic [CW-1:0] ldq_cnt;
  fifo #(.T(word_t), .DEPTH(VLDQ_DEPTH)) u_vldq (
    .clk, .rst_n, .push(ldq_push), .din(ldq_din), .pop(ldq_pop),
    .head(ldq_head), .full(ldq_full), .empty(ldq_empty), .count(ldq_cnt)
  );

  logic [OW-1:0] wsel_head;
  logic          wsel_full, wsel_empty;
  logic [CW-1:0] wsel_cnt;
  fifo #(.T(logic [OW-1:0]), .DEPTH(VLDQ_DEPTH)) u_wsel (
    .clk, .rst_n, .push(req_valid && req_ready && !st_q), .din(req.addr[OW+1:2]),
    .pop(resp_valid && !st_q), .head(wsel_head), .full(wsel_full), .empty(wsel_empty),
    .count(wsel_cnt)
  );

  logic          sdq_push, sdq_pop, sdq_full, sdq_empty;
  word_t         sdq_head;
  logic [$clog2(VSDQ_DEPTH+1)-1:0] sdq_cnt;
  fifo #(.T(word_t), .DEPTH(VSDQ_DEPTH)) u_vsdq (
    .clk, .rst_n, .push(sdq_push), .din(vsu_data[LW'(n_data % VW'(NUM_LANES))]), .pop(sdq_pop),
    .head(sdq_head), .full(sdq_full), .empty(sdq_empty), .count(sdq_cnt)
  );

  // ---------------------------------------------------- address generators
  wire addr_left = busy && (n_addr != vl_q);
  assign req.addr  = base_q + stride_q * word_t'(n_addr);
  assign req.we    = st_q;
  assign req.wdata = sdq_head;
  assign req_valid = addr_left &&
                     (st_q ? !sdq_empty
                           : (32'(inflight) + 32'(ldq_cnt) < VLDQ_DEPTH));
  assign sdq_pop   = st_q && req_valid && req_ready;

  // ----------------------------------------------------- load data return
  assign ldq_din  = resp_data[32*int'(wsel_head) +: 32];
  assign ldq_push = resp_valid && !st_q;

  // ---------------------------------------------------- VLU / VSU stepping
  wire data_left = busy && (n_data != vl_q);
  assign ldq_pop  = !st_q && data_left && !ldq_empty;
  assign sdq_push = st_q && data_left && !sdq_full;
  assign lane_ut  = $bits(lane_ut)'(n_data / VW'(NUM_LANES));
  assign lane_reg = vreg_q;
  assign vlu_data = ldq_head;
  always_comb begin
    vlu_we = '0;
    if (ldq_pop) vlu_we[LW'(n_data % VW'(NUM_LANES))] = 1'b1;
  end

  wire finished = busy && (n_resp == vl_q) && (n_data == vl_q) && ldq_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      st_q     <= 1'b0;
      base_q   <= '0;
      stride_q <= '0;
      vreg_q   <= '0;
      vl_q     <= '0;
      n_addr   <= '0;
      n_data   <= '0;
      n_resp   <= '0;
      inflight <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        st_q     <= is_store;
        base_q   <= base;
        stride_q <= stride;
        vreg_q   <= vreg;
        vl_q     <= vl;
        n_addr   <= '0;
        n_data   <= '0;
        n_resp   <= '0;
        inflight <= '0;
      end else if (busy) begin
        if (req_valid && req_ready) n_addr <= n_addr + 1'b1;
        if (ldq_pop || sdq_push)    n_data <= n_data + 1'b1;
        if (resp_valid)             n_resp <= n_resp + 1'b1;
        inflight <= inflight + CW'((req_valid && req_ready && !st_q) ? 1 : 0)
                             - CW'((resp_valid && !st_q) ? 1 : 0);
        if (finished) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> busy)
    else $error("vmu: response while idle");
endmodule

// mem_arbiter: request arbiter and response router in front of the data cache.
//
// NUM_REQ requesters (the vector memory path and the uT memory path of the
// vector memory unit) share one data-cache port. Each cycle the lowest-numbered
// requester that is valid wins; its request goes out and its index is queued so
// that the in-order responses can be steered back to it. Up to DEPTH requests
// may be in flight; beyond that no requester is granted. The existence of
// request/response arbiters in front of the cache follows the architecture;
// fixed priority, in-order responses and a single cache port are this
// design's choices. The response block itself needs no steering: it is
// passed to every requester on out_resp_data, and only out_resp_valid says
// whose it is, so those 128 output bits are a plain copy of resp_data.
module mem_arbiter
  import maven_pkg::*;
#(
  parameter int unsigned NUM_REQ = 2,
  parameter int unsigned DEPTH   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_REQ-1:0] in_valid,
  input  mem_req_t           in_req [NUM_REQ],
  output logic [NUM_REQ-1:0] in_ready,
  output logic [NUM_REQ-1:0] out_resp_valid,
  // data cache
  output logic               req_valid,
  output mem_req_t           req,
  input  logic               req_ready,
  input  logic               resp_valid,
  input  line_t              resp_data,
  output line_t              out_resp_data
);
  localparam int unsigned IW = (NUM_REQ > 1) ? $clog2(NUM_REQ) : 1;

  logic [IW-1:0] win;
  always_comb begin
    win = '0;
    for (int i = NUM_REQ - 1; i >= 0; i--)
      if (in_valid[i]) win = IW'(i);
  end

  logic [IW-1:0] own_head;
  logic          own_full, own_empty;
  logic [$clog2(DEPTH+1)-1:0] own_count;
  wire           fire = (|in_valid) && req_ready && !own_full;

  fifo #(.T(logic [IW-1:0]), .DEPTH(DEPTH)) u_owner (
    .clk, .rst_n, .push(fire), .din(win), .pop(resp_valid),
    .head(own_head), .full(own_full), .empty(own_empty), .count(own_count)
  );

  assign req_valid = (|in_valid) && !own_full;
  assign req       = in_req[win];
  always_comb begin
    in_ready       = '0;
    out_resp_valid = '0;
    if (fire) in_ready[win] = 1'b1;
    if (resp_valid) out_resp_valid[own_head] = 1'b1;
  end
  assign out_resp_data = resp_data;

  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> !own_empty)
    else $error("mem_arbiter: response with no request in flight");
  assert property (@(posedge clk) disable iff (!rst_n) int'(own_count) <= DEPTH)
    else $error("mem_arbiter: more than DEPTH requests in flight");
endmodule

// mem_coalescer: dynamic memory coalescer for microthread (uT) memory requests
// from the lanes.
//
// Every lane may present one uT request per cycle (its uT address queue head).
// The coalescer takes the lowest-numbered requesting lane as the leader and
// compares the high-order address bits (all bits above the LINE_BYTES block
// offset) of every other requesting lane against it. Loads that fall into the
// leader's block are combined into the leader's request: the other lanes are
// kept off the cache port and their word-select bits (address bits within the
// block, the word/byte select buffer "WBS") are recorded next to the request.
// When the block returns, each lane named in the recorded mask receives the
// word its select bits pick out. Lanes that do not match wait for a later
// cycle. Addresses need not be in order and may be equal.
//
// With COALESCE = 0 every request goes out alone, which makes this block a
// plain in-order arbiter for the lanes' uT requests; the vector unit uses it
// that way unless its coalescer option is enabled. Stores are never combined.
//
// Interface: per-lane valid/ready request handshake; per-lane response valid
// pulse with the selected word; a valid/ready request port and an in-order
// response port (one LINE_BYTES block per request) towards the data cache.
// Up to TRACK_DEPTH requests may be in flight. coalesced pulses when one
// issued request serves more than one lane.
//
// The comparison of high-order bits, the word-select buffers and the fan-out of
// one response to several lanes follow the architecture. Issuing one request
// per cycle to a single cache port (instead of sending non-matching requests
// to other cache banks in the same cycle), selecting whole words only, and
// delivering responses straight to the lanes without separate load-data
// buffers are this design's simplifications.
module mem_coalescer
  import maven_pkg::*;
#(
  parameter int unsigned NUM_LANES   = 4,
  parameter bit          COALESCE    = 1'b1,
  parameter int unsigned TRACK_DEPTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lanes
  input  logic [NUM_LANES-1:0] lane_req_valid,
  input  mem_req_t             lane_req [NUM_LANES],
  output logic [NUM_LANES-1:0] lane_req_ready,
  output logic [NUM_LANES-1:0] lane_resp_valid,
  output word_t                lane_resp_data [NUM_LANES],
  // data cache side
  output logic                 req_valid,
  output mem_req_t             req,
  input  logic                 req_ready,
  input  logic                 resp_valid,
  input  line_t                resp_data,
  output logic                 coalesced
);
  localparam int unsigned OFF = $clog2(LINE_BYTES);
  localparam int unsigned OW  = OFF - 2;

  typedef struct packed {
    logic [NUM_LANES-1:0]         mask;
    logic [NUM_LANES-1:0][OW-1:0] wsel;
  } track_t;

  // -------------------------------------------------------- address compare
  int unsigned          leader;
  logic [NUM_LANES-1:0] group;
  always_comb begin
    leader = 0;
    for (int i = NUM_LANES - 1; i >= 0; i--)
      if (lane_req_valid[i]) leader = i;
    for (int i = 0; i < NUM_LANES; i++) begin
      group[i] = lane_req_valid[i] &&
                 ((i == leader) ||
                  (COALESCE && !lane_req[i].we && !lane_req[leader].we &&
                   lane_req[i].addr[XLEN-1:OFF] == lane_req[leader].addr[XLEN-1:OFF]));
    end
  end

  track_t t_in, t_head;
  logic   t_full, t_empty;
  logic [$clog2(TRACK_DEPTH+1)-1:0] t_count;
  always_comb begin
    t_in.mask = group;
    for (int i = 0; i < NUM_LANES; i++) t_in.wsel[i] = lane_req[i].addr[OFF-1:2];
  end

  wire fire = (|lane_req_valid) && req_ready && !t_full;

  fifo #(.T(track_t), .DEPTH(TRACK_DEPTH)) u_track (
    .clk, .rst_n, .push(fire), .din(t_in), .pop(resp_valid),
    .head(t_head), .full(t_full), .empty(t_empty), .count(t_count)
  );

  assign req_valid      = (|lane_req_valid) && !t_full;
  assign req            = lane_req[leader];
  assign lane_req_ready = fire ? group : '0;
  assign coalesced      = fire && ($countones(group) > 1);

  // ------------------------------------------------------ writeback control
  always_comb begin
    for (int i = 0; i < NUM_LANES; i++) begin
      lane_resp_valid[i] = resp_valid && t_head.mask[i];
      lane_resp_data[i]  = resp_data[32*int'(t_head.wsel[i]) +: 32];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) resp_valid |-> !t_empty)
    else $error("mem_coalescer: response with no request in flight");
  assert property (@(posedge clk) disable iff (!rst_n) int'(t_count) <= TRACK_DEPTH)
    else $error("mem_coalescer: tracking queue overflow");
endmodule

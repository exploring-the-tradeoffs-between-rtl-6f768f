// mem_model: behavioural stand-in for the shared data cache, for testbenches.
//
// Word-addressed storage of WORDS 32-bit words. Accepts one request per cycle
// when ready (ready drops pseudo-randomly when STALLS is set), and answers
// every request, in order, LATENCY cycles after it was accepted with the
// aligned 16-byte block holding the addressed word. A write updates the
// storage when it is accepted. Addresses wrap modulo the storage size.
module mem_model
  import maven_pkg::*;
#(
  parameter int unsigned WORDS   = 4096,
  parameter int unsigned LATENCY = 4,
  parameter bit          STALLS  = 1'b0
) (
  input  logic     clk,
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     resp_valid,
  output line_t    resp_data
);
  word_t mem [WORDS];

  typedef struct {
    longint due;
    line_t  data;
  } pend_t;
  pend_t  pend[$];
  longint now = 0;
  int     accepted = 0;

  function automatic line_t block_at(input word_t addr);
    line_t l;
    int unsigned base = (addr >> 2) & ~32'h3;
    for (int w = 0; w < 4; w++) l[32*w +: 32] = mem[(base + w) % WORDS];
    return l;
  endfunction

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    req_ready  = 1'b1;
    resp_valid = 1'b0;
    resp_data  = '0;
  end

  always @(posedge clk) begin
    now <= now + 1;
    if (req_valid && req_ready) begin
      pend_t p;
      accepted++;
      if (req.we) mem[(req.addr >> 2) % WORDS] = req.wdata;
      p.due  = now + longint'(LATENCY);
      p.data = block_at(req.addr);
      pend.push_back(p);
    end
    if (pend.size() > 0 && pend[0].due <= now) begin
      resp_valid <= 1'b1;
      resp_data  <= pend[0].data;
      void'(pend.pop_front());
    end else begin
      resp_valid <= 1'b0;
    end
    req_ready <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
endmodule

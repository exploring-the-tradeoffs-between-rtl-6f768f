// int_div: pipelined 32-bit signed integer divider with quotient or remainder.
//
// A long-latency functional unit: one operation may enter every cycle and its
// result leaves LATENCY cycles later with the caller's tag. Operands are
// converted to magnitudes, a restoring division retires ceil(32/LATENCY)
// quotient bits per pipeline stage, and the signs are applied at the output.
// The twelve-cycle latency is the one given for the integer divider; the
// restoring algorithm and the divide-by-zero result (quotient all ones,
// remainder equal to the dividend) are this design's choices.
module int_div #(
  parameter int unsigned LATENCY = 12,
  parameter int unsigned TAG_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [31:0]       a,        // dividend
  input  logic [31:0]       b,        // divisor
  input  logic              want_rem, // 1: remainder, 0: quotient
  input  logic [TAG_W-1:0]  in_tag,
  output logic              out_valid,
  output logic [31:0]       result,
  output logic [TAG_W-1:0]  out_tag
);
  localparam int unsigned BPS = (32 + LATENCY - 1) / LATENCY;  // bits per stage

  typedef struct packed {
    logic [32:0] rem;
    logic [31:0] quo;
    logic [31:0] dvs;
    logic        negq;
    logic        negr;
    logic        dzero;
    logic [31:0] dividend;
    logic        want_rem;
  } div_st_t;

  function automatic div_st_t run_bits(input div_st_t s, input int unsigned first);
    div_st_t t = s;
    for (int unsigned k = 0; k < BPS; k++) begin
      if (first + k < 32) begin
        t.rem = {t.rem[31:0], t.quo[31]};
        t.quo = {t.quo[30:0], 1'b0};
        if (t.rem >= {1'b0, t.dvs}) begin
          t.rem    = t.rem - {1'b0, t.dvs};
          t.quo[0] = 1'b1;
        end
      end
    end
    return t;
  endfunction

  div_st_t          st_q  [LATENCY];
  logic             vld_q [LATENCY];
  logic [TAG_W-1:0] tag_q [LATENCY];

  div_st_t init;
  always_comb begin
    init.rem      = '0;
    init.quo      = a[31] ? (~a + 32'd1) : a;
    init.dvs      = b[31] ? (~b + 32'd1) : b;
    init.negq     = a[31] ^ b[31];
    init.negr     = a[31];
    init.dzero    = (b == '0);
    init.dividend = a;
    init.want_rem = want_rem;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) vld_q[i] <= 1'b0;
    end else begin
      vld_q[0] <= in_valid;
      for (int i = 1; i < LATENCY; i++) vld_q[i] <= vld_q[i-1];
    end
  end

  always_ff @(posedge clk) begin
    st_q[0]  <= run_bits(init, 0);
    tag_q[0] <= in_tag;
    for (int i = 1; i < LATENCY; i++) begin
      st_q[i]  <= run_bits(st_q[i-1], i * BPS);
      tag_q[i] <= tag_q[i-1];
    end
  end

  div_st_t fin;
  always_comb begin
    fin = st_q[LATENCY-1];
    if (fin.dzero)
      result = fin.want_rem ? fin.dividend : 32'hFFFF_FFFF;
    else if (fin.want_rem)
      result = fin.negr ? (~fin.rem[31:0] + 32'd1) : fin.rem[31:0];
    else
      result = fin.negq ? (~fin.quo + 32'd1) : fin.quo;
  end

  assign out_valid = vld_q[LATENCY-1];
  assign out_tag   = tag_q[LATENCY-1];
endmodule

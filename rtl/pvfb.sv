// pvfb: pending vector fragment buffer with dynamic fragment convergence.
//
// A vector fragment is a program counter plus a mask of the microthreads (uTs)
// that execute from it. When the uTs of a fragment diverge at a branch, the
// issue unit keeps one side running and parks the other here. The buffer is a
// stack kept sorted by a key, entry 0 being the top (smallest key):
//
//   * 1-stack (TWO_STACK = 0): key = PC. Fragments that trail behind are
//     picked first so that faster ones can wait for them at a meeting point.
//   * 2-stack (TWO_STACK = 1): key = {future, PC}. A fragment created by a
//     backward branch belongs to the next loop iteration and is marked future
//     so that it is not picked while any fragment of the current iteration
//     remains. Each entry stores an epoch bit; an entry is future when its
//     epoch differs from the current epoch. Popping a future entry means the
//     current stack is empty, so the current epoch toggles: the two virtual
//     stacks swap and the next iteration's fragments become current. Both
//     virtual stacks share one physical stack of NUM_UT entries, which is
//     enough because each uT sits in at most one fragment.
//
// A pushed fragment whose key equals an entry's key is merged into it (masks
// OR-ed); otherwise it is inserted in key order. One operation per cycle:
// push or pop (push has priority; a pop in the same cycle is ignored and
// flagged by an assertion). top_* always show entry 0, top_future says whether
// it belongs to the future stack. The sorted stack, the merging, the extra key
// bit and the single physical stack follow the architecture; doing the
// insertion in one cycle with parallel comparators (rather than a systolic
// shift over several cycles) is this design's choice.
module pvfb #(
  parameter int unsigned NUM_UT    = 32,
  parameter int unsigned PC_W      = 11,
  parameter bit          TWO_STACK = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,        // drop everything (new vector fetch)
  input  logic              push,
  input  logic [PC_W-1:0]   push_pc,
  input  logic              push_future,  // fragment came from a backward branch
  input  logic [NUM_UT-1:0] push_mask,
  input  logic              pop,
  output logic              empty,
  output logic [PC_W-1:0]   top_pc,
  output logic [NUM_UT-1:0] top_mask,
  output logic              top_future,
  output logic              swapped,      // pulses when the stacks were swapped
  output logic              merged        // pulses when a push merged
);
  typedef struct packed {
    logic              valid;
    logic              epoch;
    logic [PC_W-1:0]   pc;
    logic [NUM_UT-1:0] mask;
  } frag_t;

  frag_t ent   [NUM_UT];
  frag_t ent_n [NUM_UT];
  logic  cur_epoch, cur_epoch_n;

  function automatic logic [PC_W:0] key_of(input frag_t f, input logic epoch);
    return {TWO_STACK && (f.epoch != epoch), f.pc};
  endfunction

  wire              new_future = TWO_STACK && push_future;
  wire [PC_W:0]     new_key    = {new_future, push_pc};

  logic [NUM_UT-1:0] match, less;
  int unsigned       ins_pos;
  always_comb begin
    ins_pos = 0;
    for (int i = 0; i < NUM_UT; i++) begin
      match[i] = ent[i].valid && (key_of(ent[i], cur_epoch) == new_key);
      less[i]  = ent[i].valid && (key_of(ent[i], cur_epoch) <  new_key);
      if (less[i]) ins_pos++;
    end
  end

  assign empty      = !ent[0].valid;
  assign top_pc     = ent[0].pc;
  assign top_mask   = ent[0].mask;
  assign top_future = TWO_STACK && ent[0].valid && (ent[0].epoch != cur_epoch);

  always_comb begin
    for (int i = 0; i < NUM_UT; i++) ent_n[i] = ent[i];
    cur_epoch_n = cur_epoch;
    swapped     = 1'b0;
    merged      = 1'b0;
    if (clear) begin
      for (int i = 0; i < NUM_UT; i++) ent_n[i].valid = 1'b0;
    end else if (push) begin
      if (|match) begin
        merged = 1'b1;
        for (int i = 0; i < NUM_UT; i++)
          if (match[i]) ent_n[i].mask = ent[i].mask | push_mask;
      end else begin
        for (int i = 1; i < NUM_UT; i++)
          if (i > ins_pos) ent_n[i] = ent[i-1];
        for (int i = 0; i < NUM_UT; i++)
          if (i == ins_pos) begin
            ent_n[i].valid = 1'b1;
            ent_n[i].epoch = cur_epoch ^ new_future;
            ent_n[i].pc    = push_pc;
            ent_n[i].mask  = push_mask;
          end
      end
    end else if (pop && ent[0].valid) begin
      if (top_future) begin
        cur_epoch_n = ~cur_epoch;
        swapped     = 1'b1;
      end
      for (int i = 0; i < NUM_UT - 1; i++) ent_n[i] = ent[i+1];
      ent_n[NUM_UT-1].valid = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_epoch <= 1'b0;
      for (int i = 0; i < NUM_UT; i++) ent[i] <= '0;
    end else begin
      cur_epoch <= cur_epoch_n;
      for (int i = 0; i < NUM_UT; i++) ent[i] <= ent_n[i];
    end
  end

  // A non-merging push into a full buffer would lose a fragment; it cannot
  // happen while every uT belongs to at most one fragment.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (push && !clear && !(|match)) |-> !ent[NUM_UT-1].valid)
    else $error("pvfb: push into full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(push && pop))
    else $error("pvfb: push and pop in the same cycle");
endmodule

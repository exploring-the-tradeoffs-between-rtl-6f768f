// tb_pvfb: checks the pending vector fragment buffer.
//  * Directed 2-stack sequence of a loop with a forward and two backward
//    branches: a forward-branch fragment is parked and popped, two
//    backward-branch fragments with the same PC merge on the future stack
//    ({0x00,1100} + {0x00,0011} = {0x00,1111}), and popping it swaps stacks.
//  * Directed 1-stack sequence: fragments come out in PC order, equal PCs
//    merge, and backward branches get no special treatment.
//  * Random push/pop traffic on both variants against a queue-based model
//    of a stack sorted by {future, PC} with merging and epoch swapping.
module tb_pvfb;
  localparam int N = 8;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // asynchronous reset from the start
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         clear [2];
  logic         push  [2];
  logic [10:0]  ppc   [2];
  logic         pfut  [2];
  logic [N-1:0] pmask [2];
  logic         pop   [2];
  logic         empty [2];
  logic [10:0]  tpc   [2];
  logic [N-1:0] tmask [2];
  logic         tfut  [2], swp [2], mrg [2];

  pvfb #(.NUM_UT(N), .PC_W(11), .TWO_STACK(1'b0)) dut1 (
    .clk, .rst_n, .clear(clear[0]), .push(push[0]), .push_pc(ppc[0]), .push_future(pfut[0]),
    .push_mask(pmask[0]), .pop(pop[0]), .empty(empty[0]), .top_pc(tpc[0]), .top_mask(tmask[0]),
    .top_future(tfut[0]), .swapped(swp[0]), .merged(mrg[0]));
  pvfb #(.NUM_UT(N), .PC_W(11), .TWO_STACK(1'b1)) dut2 (
    .clk, .rst_n, .clear(clear[1]), .push(push[1]), .push_pc(ppc[1]), .push_future(pfut[1]),
    .push_mask(pmask[1]), .pop(pop[1]), .empty(empty[1]), .top_pc(tpc[1]), .top_mask(tmask[1]),
    .top_future(tfut[1]), .swapped(swp[1]), .merged(mrg[1]));

  // ------------------------------------------------------ reference model
  typedef struct { int pc; bit fut; int mask; } ent_t;
  ent_t model [2][$];

  function automatic int mkey(int d, ent_t e);
    return (d == 1 && e.fut) ? (e.pc + 4096) : e.pc;
  endfunction

  task automatic m_push(int d, int pc, bit fut, int mask);
    ent_t e = '{pc, (d == 1) ? fut : 1'b0, mask};
    int k = mkey(d, e);
    int pos = 0;
    foreach (model[d][i]) begin
      if (mkey(d, model[d][i]) == k) begin model[d][i].mask |= mask; return; end
      if (mkey(d, model[d][i]) < k) pos = i + 1;
    end
    model[d].insert(pos, e);
  endtask

  task automatic m_pop(int d);
    ent_t e = model[d].pop_front();
    if (d == 1 && e.fut) foreach (model[d][i]) model[d][i].fut = 1'b0;
  endtask

  task automatic compare(int d, string what);
    checks++;
    if (model[d].size() == 0) begin
      if (!empty[d]) begin failures++; $display("FAIL %s dut%0d: not empty", what, d); end
    end else if (empty[d] || tpc[d] != 11'(model[d][0].pc) || tmask[d] != N'(model[d][0].mask)
                 || tfut[d] != model[d][0].fut) begin
      failures++;
      $display("FAIL %s dut%0d: top {%h,%b,f%0d} exp {%h,%b,f%0d}", what, d, tpc[d], tmask[d], tfut[d],
               model[d][0].pc, N'(model[d][0].mask), model[d][0].fut);
    end
  endtask

  task automatic op_push(int d, int pc, bit fut, int mask);
    @(negedge clk);
    push[d] = 1; ppc[d] = 11'(pc); pfut[d] = fut; pmask[d] = N'(mask);
    @(negedge clk);
    push[d] = 0;
    m_push(d, pc, fut, mask);
    compare(d, "push");
  endtask

  task automatic op_pop(int d, output bit swapped);
    @(negedge clk);
    pop[d] = 1;
    #1 swapped = swp[d];
    @(negedge clk);
    pop[d] = 0;
    m_pop(d);
    compare(d, "pop");
  endtask

  bit s;
  int swaps_seen;
  initial begin
    for (int d = 0; d < 2; d++) begin
      clear[d] = 0; push[d] = 0; pop[d] = 0; ppc[d] = 0; pfut[d] = 0; pmask[d] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // 2-stack directed sequence
    op_push(1, 'h0c, 0, 'b1011);
    op_pop(1, s);
    checks++; if (s) begin failures++; $display("FAIL unexpected swap"); end
    op_push(1, 'h00, 1, 'b1100);
    checks++; if (!tfut[1]) begin failures++; $display("FAIL backward fragment not on future stack"); end
    op_push(1, 'h00, 1, 'b0011);
    checks++; if (tmask[1] != 8'b1111 || tpc[1] != 0) begin failures++; $display("FAIL future merge"); end
    op_pop(1, s);
    checks++; if (!s) begin failures++; $display("FAIL stacks did not swap"); end
    // a current-iteration fragment is picked ahead of a future one with a smaller PC
    op_push(1, 'h04, 1, 'b0001);
    op_push(1, 'h18, 0, 'b0010);
    checks++; if (tpc[1] != 'h18) begin failures++; $display("FAIL current before future"); end
    op_pop(1, s);
    op_pop(1, s);
    checks++; if (!s || !empty[1]) begin failures++; $display("FAIL final swap"); end

    // 1-stack directed sequence
    op_push(0, 'h20, 0, 'b1000);
    op_push(0, 'h1c, 0, 'b0100);
    checks++; if (tpc[0] != 'h1c) begin failures++; $display("FAIL PC order"); end
    op_push(0, 'h20, 0, 'b0010);
    op_pop(0, s);
    checks++; if (tpc[0] != 'h20 || tmask[0] != 8'b1010) begin failures++; $display("FAIL 1-stack merge"); end
    op_push(0, 'h00, 1, 'b0001);   // future flag has no effect with one stack
    checks++; if (tpc[0] != 'h00 || tfut[0]) begin failures++; $display("FAIL 1-stack ignores future"); end
    op_pop(0, s);
    op_pop(0, s);

    // random traffic
    swaps_seen = 0;
    for (int it = 0; it < 600; it++) begin
      int d, pc;
      bit can_push;
      d = it % 2;
      pc = 4 * $urandom_range(0, 7);
      can_push = model[d].size() < N;
      if (model[d].size() > 0 && ($urandom_range(0, 1) == 0 || !can_push)) begin
        op_pop(d, s);
        if (s) swaps_seen++;
      end else begin
        op_push(d, pc, $urandom_range(0, 1), $urandom_range(1, 255));
      end
      if (it % 97 == 0) begin
        @(negedge clk); clear[d] = 1; @(negedge clk); clear[d] = 0;
        model[d].delete();
        compare(d, "clear");
      end
    end
    checks++;
    if (swaps_seen == 0) begin failures++; $display("FAIL no swap in random traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

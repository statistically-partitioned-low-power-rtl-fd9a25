// match_decision: final result logic of a partitioned TCAM.
//
// Partition p delivers a registered result (searched, hit, global address, tag)
// p+1 cycles after its search word entered the engine. A lookup ends at the first
// partition that hits, or with a miss at the last active partition
// (num_active-1); a miss in an earlier partition is not a result, because the
// word has moved on to the next partition.
//
// Two output modes:
//  * in_order = 0: every partition has its own result port res[p]. A lookup that
//    hits in partition 1 leaves after 1 cycle, a later one after 2 (or 3), so
//    several results (for different words) can leave in the same cycle. The
//    average latency is then below the number of partitions.
//  * in_order = 1: for a consumer that takes one result per cycle. Every result
//    is held back until num_active cycles after its word entered and leaves on
//    res[0], in the order of the searches. This is the added stall stage: the
//    latency is always num_active cycles.
// The delay line is indexed by cycles-to-go; since at most one word enters per
// cycle, no two results are ever due in the same cycle (asserted).
//
// Result ports are combinational from st[] and the delay line.
//
// The source design has a match decision block and names both the two-results-
// per-cycle consumer and the stall-stage alternative; the per-partition ports,
// the tag and the delay line are this design's own construction.
module match_decision
  import tcam_pkg::*;
#(
  parameter int unsigned NP = 3   // partitions built
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_order,
  input  logic [1:0]          num_active,  // active partitions, 1..NP
  input  result_t             st  [NP],    // registered partition results
  output result_t             res [NP]
);

  localparam int unsigned DL = (NP > 1) ? NP - 1 : 1;

  result_t fin [NP];        // final results this cycle, per partition
  result_t dly_q [DL];      // dly_q[i] leaves in i+1 cycles
  result_t dly_d [DL];
  result_t now_res;         // in-order result with no delay left

  always_comb begin
    for (int unsigned p = 0; p < NP; p++) begin
      fin[p]       = st[p];
      fin[p].valid = st[p].valid & (st[p].hit | (p == 32'(num_active) - 1))
                   & (p < 32'(num_active));
    end
  end

  // In-order delay line.
  always_comb begin
    now_res = '0;
    for (int unsigned i = 0; i < DL; i++) dly_d[i] = (i + 1 < DL) ? dly_q[i+1] : '0;
    for (int unsigned p = 0; p < NP; p++) begin
      if (fin[p].valid) begin
        if (p + 1 == 32'(num_active)) now_res = fin[p];
        else dly_d[32'(num_active) - p - 2] = fin[p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < DL; i++) dly_q[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < DL; i++) dly_q[i] <= in_order ? dly_d[i] : '0;
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NP; p++) res[p] = '0;
    if (in_order) begin
      res[0] = now_res.valid ? now_res : dly_q[0];
    end else begin
      for (int unsigned p = 0; p < NP; p++) res[p] = fin[p];
    end
  end

  // Two results can never fall due in the same cycle.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    in_order |-> !(now_res.valid && dly_q[0].valid));

endmodule

// reconfig_tcam: TCAM whose partitioning is set by software.
//
// The table is a chain of NSEG = K+2 segments, stored longest prefix first:
//   segment 0      TCAM1_ini  fixed first part, always in partition 1
//   segments 1..K  sp_0..sp_{K-1}, configurable sub-partitions
//   segment K+1    TCAML_fin  fixed last part, always in the last partition
// Each configurable segment (and TCAML_fin) has an input multiplexer that takes
// the word of the segment above, Buffer-1 or Buffer-2. The partition_controller
// sets these multiplexers so that the segments form two or three partitions of
// consecutive segments. A partition searches its word only if the partitions
// above missed it; that is what saves the match-line power of the lower parts.
//
// Each segment passes on a cumulative match (its own hit, or the one from the
// segment above when both are in the same partition, the upper one winning).
// The buffer-input multiplexer picks that output at the last segment of a
// partition: on a miss there, Buffer-1 (after partition 1) or Buffer-2 (after
// partition 2) captures the word for the next partition, searched next cycle.
//
// Timing: one word accepted per cycle. The result of partition p is registered
// and presented to the match decision p+1 cycles after the word entered, so
// lookups take 1, 2 or 3 cycles; res[p] carries the lookups that ended in
// partition p (in_order = 0) or res[0] carries all of them after num_parts
// cycles (in_order = 1).
//
// TCAML_fin only holds short prefixes, so it stores and compares just the upper
// FIN_W bits; entries written there must have their lower bits as don't care.
// Global address map: TCAM1_ini at 0, sp_i at INI_DEPTH + i*SP_DEPTH, TCAML_fin
// after the last sub-partition. Segment sizes, K and FIN_W are this design's
// choice (sub-partitions meant for prefix lengths 25..20, the fin part for 19
// and shorter); the segment chain, muxes and buffers follow the source design.
module reconfig_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned K         = 6,
  parameter int unsigned INI_DEPTH = 128,
  parameter int unsigned SP_DEPTH  = 64,
  parameter int unsigned FIN_DEPTH = 256,
  parameter int unsigned FIN_W     = 19,
  localparam int unsigned SW   = $clog2(K + 1),
  localparam int unsigned NSEG = K + 2,
  localparam int unsigned EW   = $clog2(NSEG)
) (
  input  logic             clk,
  input  logic             rst_n,
  // search request
  input  logic             search_valid,
  input  logic [KEY_W-1:0] search_key,
  input  logic [TAG_W-1:0] search_tag,
  // entry write
  input  tcam_wr_t         wr,
  // partitioning control signal
  input  logic             cfg_we,
  input  logic             cfg_three,
  input  logic [SW-1:0]    cfg_split1,
  input  logic [SW-1:0]    cfg_split2,
  output logic             cfg_err,
  // output mode
  input  logic             in_order,
  // results
  output result_t          res [3]
);

  localparam int unsigned TOTAL = INI_DEPTH + K * SP_DEPTH + FIN_DEPTH;

  function automatic int unsigned seg_base(int unsigned s);
    if (s == 0)      return 0;
    else if (s <= K) return INI_DEPTH + (s - 1) * SP_DEPTH;
    else             return INI_DEPTH + K * SP_DEPTH;
  endfunction

  function automatic int unsigned seg_depth(int unsigned s);
    if (s == 0)      return INI_DEPTH;
    else if (s <= K) return SP_DEPTH;
    else             return FIN_DEPTH;
  endfunction

  // ---------------- partitioning controller ----------------
  src_sel_e      sel      [NSEG];
  logic [EW-1:0] part_end [3];
  logic [1:0]    num_parts;

  partition_controller #(.K(K)) u_ctrl (
    .clk, .rst_n,
    .cfg_we, .cfg_three, .cfg_split1, .cfg_split2, .cfg_err,
    .sel, .part_end, .num_parts
  );

  // ---------------- segment inputs (sub-partition multiplexers) ----------------
  search_t buf1, buf2;
  search_t seg_in [NSEG];

  always_comb begin
    seg_in[0] = '{valid: search_valid, key: search_key, tag: search_tag};
    for (int unsigned s = 1; s < NSEG; s++) begin
      unique case (sel[s])
        SRC_BUF1: seg_in[s] = buf1;
        SRC_BUF2: seg_in[s] = buf2;
        default:  seg_in[s] = seg_in[s-1];
      endcase
    end
  end

  // ---------------- segments ----------------
  logic [31:0]       wr_addr;
  logic [NSEG-1:0]   seg_hit;
  logic [ADDR_W-1:0] seg_addr [NSEG];

  assign wr_addr = 32'(wr.addr);

  for (genvar s = 0; s < NSEG; s++) begin : g_seg
    localparam int unsigned BASE  = seg_base(s);
    localparam int unsigned DEPTH = seg_depth(s);
    localparam int unsigned W     = (s == NSEG - 1) ? FIN_W : KEY_W;
    localparam int unsigned IW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

    logic             we;
    logic [DEPTH-1:0] ml;
    logic             hit;
    logic [IW-1:0]    idx;

    assign we = wr.we && ((wr_addr - BASE) < DEPTH);  // wraps when below BASE

    tcam_array #(.WIDTH(W), .DEPTH(DEPTH)) u_tcam (
      .clk, .rst_n,
      .wr_en     (we),
      .wr_idx    (IW'(wr_addr - BASE)),
      .wr_value  (wr.value[KEY_W-1 -: W]),
      .wr_care   (wr.care[KEY_W-1 -: W]),
      .wr_valid  (wr.valid),
      .search_en (seg_in[s].valid),
      .search_key(seg_in[s].key[KEY_W-1 -: W]),
      .match     (ml)
    );

    priority_encoder #(.N(DEPTH)) u_pe (.req(ml), .hit(hit), .addr(idx));

    assign seg_hit[s]  = hit;
    assign seg_addr[s] = ADDR_W'(32'(idx) + BASE);
  end

  // ---------------- cumulative match chain ----------------
  logic [NSEG-1:0]   chain_hit;
  logic [ADDR_W-1:0] chain_addr [NSEG];

  assign chain_hit[0]  = seg_hit[0];
  assign chain_addr[0] = seg_addr[0];

  for (genvar s = 1; s < NSEG; s++) begin : g_chain
    logic cont;  // same partition as the segment above and it already hit
    assign cont          = (sel[s] == SRC_PREV) && chain_hit[s-1];
    assign chain_hit[s]  = cont | seg_hit[s];
    assign chain_addr[s] = cont ? chain_addr[s-1] : seg_addr[s];
  end

  // ---------------- buffer-input multiplexer and buffers ----------------
  search_t end1, end2;   // word and match at the end of partitions 1 and 2
  logic    end1_hit, end2_hit;

  assign end1     = seg_in[part_end[0]];
  assign end1_hit = chain_hit[part_end[0]];
  assign end2     = seg_in[part_end[1]];
  assign end2_hit = chain_hit[part_end[1]];

  logic [KEY_W+TAG_W-1:0] buf1_q, buf2_q;
  logic                   buf1_v, buf2_v;

  search_buffer #(.WIDTH(KEY_W + TAG_W)) u_buffer1 (
    .clk, .rst_n,
    .load (end1.valid & ~end1_hit),
    .din  ({end1.key, end1.tag}),
    .valid(buf1_v),
    .dout (buf1_q)
  );

  search_buffer #(.WIDTH(KEY_W + TAG_W)) u_buffer2 (
    .clk, .rst_n,
    .load ((num_parts == 2'd3) & end2.valid & ~end2_hit),
    .din  ({end2.key, end2.tag}),
    .valid(buf2_v),
    .dout (buf2_q)
  );

  assign buf1 = '{valid: buf1_v, key: buf1_q[TAG_W +: KEY_W], tag: buf1_q[TAG_W-1:0]};
  assign buf2 = '{valid: buf2_v, key: buf2_q[TAG_W +: KEY_W], tag: buf2_q[TAG_W-1:0]};

  // ---------------- registered partition results ----------------
  result_t st [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < 3; p++) st[p] <= '0;
    end else begin
      for (int unsigned p = 0; p < 3; p++) begin
        st[p].valid <= seg_in[part_end[p]].valid && (p < 32'(num_parts));
        st[p].hit   <= chain_hit[part_end[p]];
        st[p].addr  <= chain_hit[part_end[p]] ? chain_addr[part_end[p]] : '0;
        st[p].tag   <= seg_in[part_end[p]].tag;
      end
    end
  end

  match_decision #(.NP(3)) u_match (
    .clk, .rst_n,
    .in_order  (in_order),
    .num_active(num_parts),
    .st        (st),
    .res       (res)
  );

  // The global address space must fit the result address.
  if (TOTAL > (1 << ADDR_W)) begin : g_size_check
    $error("reconfig_tcam: table larger than the ADDR_W address space");
  end

endmodule

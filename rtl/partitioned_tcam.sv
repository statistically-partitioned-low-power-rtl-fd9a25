// partitioned_tcam: two-partition pipelined TCAM for longest-prefix match.
//
// The routing table is split by prefix length: TCAM1 holds the long prefixes
// (by default the prefix sets 24..32, which catch most lookups), TCAM2 all the
// shorter ones. Each lookup first searches TCAM1 only. If TCAM1 hits, its
// longest match is the answer and TCAM2 is never precharged for that word. If
// TCAM1 misses, the word is stored in the buffer and TCAM2 searches it in the
// next cycle, while TCAM1 already takes the next word. TCAM2's power is thus
// only spent on the fraction of lookups that miss TCAM1.
//
//   cycle t   : TCAM1 searches the input word; on a miss the buffer loads it
//   cycle t+1 : TCAM1 result on res[0] if it hit; TCAM2 searches the buffer
//   cycle t+2 : TCAM2 result (hit or final miss) on res[1]
//
// One word is accepted every cycle. Latency is 1 cycle on a TCAM1 hit and 2
// otherwise (mean 2 - P(hit in TCAM1)). With in_order = 1 all results leave on
// res[0] after 2 cycles, in order. res[2] exists to match the three-partition
// engine and never becomes valid.
//
// Entries: global address a < DEPTH1 is word a of TCAM1, otherwise word
// a-DEPTH1 of TCAM2. Software stores entries longest prefix first (lowest
// address = highest priority); the result address is the global address.
// By default both partitions are KEY_W bits wide, so any split point can be
// used by changing where software writes the prefix sets. TCAM2 holds only
// shorter prefixes, so WIDTH2 may be set below KEY_W (23 for a split at prefix
// 24): TCAM2 then stores and compares only the upper WIDTH2 bits, and the split
// point can no longer move below WIDTH2+1.
//
// The scheme (TCAM1, buffer, match-occurs test, TCAM2, match decision) follows
// the source design; the depths, tag, write port and output modes are this
// design's own choices.
module partitioned_tcam
  import tcam_pkg::*;
#(
  parameter int unsigned DEPTH1 = 512,
  parameter int unsigned DEPTH2 = 512,
  parameter int unsigned WIDTH2 = KEY_W   // bits stored and compared in TCAM2
) (
  input  logic             clk,
  input  logic             rst_n,
  // search request
  input  logic             search_valid,
  input  logic [KEY_W-1:0] search_key,
  input  logic [TAG_W-1:0] search_tag,
  // entry write
  input  tcam_wr_t         wr,
  // output mode
  input  logic             in_order,
  // results
  output result_t          res [3]
);

  localparam int unsigned IW1 = (DEPTH1 > 1) ? $clog2(DEPTH1) : 1;
  localparam int unsigned IW2 = (DEPTH2 > 1) ? $clog2(DEPTH2) : 1;

  // ---------------- entry writes ----------------
  logic          wr1, wr2;
  logic [31:0]   wr_addr;
  assign wr_addr = 32'(wr.addr);
  assign wr1 = wr.we && (wr_addr < DEPTH1);
  assign wr2 = wr.we && (wr_addr >= DEPTH1) && (wr_addr < DEPTH1 + DEPTH2);

  logic [IW1-1:0] wr_idx1;
  logic [IW2-1:0] wr_idx2;
  assign wr_idx1 = IW1'(wr_addr);
  assign wr_idx2 = IW2'(wr_addr - DEPTH1);

  // ---------------- partition 1 ----------------
  logic [DEPTH1-1:0] ml1;
  logic              hit1;
  logic [IW1-1:0]    idx1;

  tcam_array #(.WIDTH(KEY_W), .DEPTH(DEPTH1)) u_tcam1 (
    .clk, .rst_n,
    .wr_en(wr1), .wr_idx(wr_idx1), .wr_value(wr.value), .wr_care(wr.care), .wr_valid(wr.valid),
    .search_en(search_valid), .search_key(search_key), .match(ml1)
  );

  priority_encoder #(.N(DEPTH1)) u_pe1 (.req(ml1), .hit(hit1), .addr(idx1));

  // Match occurs? -- no: hand the word to TCAM2 through the buffer.
  logic                   buf_valid;
  logic [KEY_W+TAG_W-1:0] buf_word;
  logic [KEY_W-1:0]       buf_key;
  logic [TAG_W-1:0]       buf_tag;

  search_buffer #(.WIDTH(KEY_W + TAG_W)) u_buffer (
    .clk, .rst_n,
    .load (search_valid & ~hit1),
    .din  ({search_key, search_tag}),
    .valid(buf_valid),
    .dout (buf_word)
  );
  assign {buf_key, buf_tag} = buf_word;

  // ---------------- partition 2 ----------------
  logic [DEPTH2-1:0] ml2;
  logic              hit2;
  logic [IW2-1:0]    idx2;

  tcam_array #(.WIDTH(WIDTH2), .DEPTH(DEPTH2)) u_tcam2 (
    .clk, .rst_n,
    .wr_en(wr2), .wr_idx(wr_idx2),
    .wr_value(wr.value[KEY_W-1 -: WIDTH2]), .wr_care(wr.care[KEY_W-1 -: WIDTH2]), .wr_valid(wr.valid),
    .search_en(buf_valid), .search_key(buf_key[KEY_W-1 -: WIDTH2]), .match(ml2)
  );

  priority_encoder #(.N(DEPTH2)) u_pe2 (.req(ml2), .hit(hit2), .addr(idx2));

  // ---------------- registered partition results ----------------
  result_t st [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
      st[1] <= '0;
    end else begin
      st[0] <= '{valid: search_valid, hit: hit1, addr: ADDR_W'(idx1), tag: search_tag};
      st[1] <= '{valid: buf_valid, hit: hit2,
                 addr: hit2 ? ADDR_W'(32'(idx2) + DEPTH1) : '0, tag: buf_tag};
    end
  end

  result_t res2 [2];

  match_decision #(.NP(2)) u_match (
    .clk, .rst_n,
    .in_order  (in_order),
    .num_active(2'd2),
    .st        (st),
    .res       (res2)
  );

  assign res[0] = res2[0];
  assign res[1] = res2[1];
  assign res[2] = '0;

endmodule

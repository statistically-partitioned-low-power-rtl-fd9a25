// tcam_top: statistically partitioned, low-power IPv4 lookup TCAM.
//
// Longest-prefix-match engine in which the routing table is split by prefix
// length into partitions searched one after another, so that the large, rarely
// needed short-prefix part is only precharged for lookups that the long-prefix
// part missed. Lookups are pipelined: one search word per cycle, results after
// 1 cycle when the first partition hits, later otherwise.
//
// ARCH selects the engine:
//   0 (default) partitioned_tcam: fixed two partitions, TCAM1 then TCAM2 through
//     a buffer; the split point is where software puts the prefix sets (the
//     intended one is prefix 24: lengths 24..32 in TCAM1).
//   1 reconfig_tcam: fixed first and last parts plus K sub-partitions whose
//     input multiplexers a partitioning controller sets for two or three
//     partitions at run time.
// Ports: search request (valid, 32-bit key, tag), one entry write per cycle
// (global address, value, care mask, valid), output mode in_order, the
// partitioning control write (used by ARCH=1 only; cfg_err stays 0 with ARCH=0),
// and result ports res[0..2]: res[p] carries lookups that ended in partition
// p+1 in the cycle they end, or with in_order=1 every lookup on res[0] at the
// fixed latency of the last partition.
module tcam_top
  import tcam_pkg::*;
#(
  parameter int unsigned ARCH      = 0,
  // ARCH = 0 sizes
  parameter int unsigned DEPTH1    = 512,
  parameter int unsigned DEPTH2    = 512,
  parameter int unsigned WIDTH2    = KEY_W,
  // ARCH = 1 sizes
  parameter int unsigned K         = 6,
  parameter int unsigned INI_DEPTH = 128,
  parameter int unsigned SP_DEPTH  = 64,
  parameter int unsigned FIN_DEPTH = 256,
  parameter int unsigned FIN_W     = 19,
  localparam int unsigned SW = $clog2(K + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             search_valid,
  input  logic [KEY_W-1:0] search_key,
  input  logic [TAG_W-1:0] search_tag,
  input  tcam_wr_t         wr,
  input  logic             in_order,
  input  logic             cfg_we,
  input  logic             cfg_three,
  input  logic [SW-1:0]    cfg_split1,
  input  logic [SW-1:0]    cfg_split2,
  output logic             cfg_err,
  output result_t          res [3]
);

  if (ARCH == 0) begin : g_fixed
    partitioned_tcam #(.DEPTH1(DEPTH1), .DEPTH2(DEPTH2), .WIDTH2(WIDTH2)) u_engine (
      .clk, .rst_n, .search_valid, .search_key, .search_tag, .wr, .in_order, .res
    );
    assign cfg_err = 1'b0;
  end else begin : g_reconfig
    reconfig_tcam #(
      .K(K), .INI_DEPTH(INI_DEPTH), .SP_DEPTH(SP_DEPTH), .FIN_DEPTH(FIN_DEPTH), .FIN_W(FIN_W)
    ) u_engine (
      .clk, .rst_n, .search_valid, .search_key, .search_tag, .wr,
      .cfg_we, .cfg_three, .cfg_split1, .cfg_split2, .cfg_err, .in_order, .res
    );
  end

endmodule

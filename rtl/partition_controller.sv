// partition_controller: configuration of the software-partitioned TCAM.
//
// The engine is a chain of segments: segment 0 is the fixed first part
// (TCAM1_ini), segments 1..K are the configurable sub-partitions sp_0..sp_{K-1},
// and segment K+1 is the fixed last part (TCAML_fin). Software chooses two or
// three partitions and the split points: split1 = i means sub-partition sp_i
// takes its input from Buffer-1, so partition 1 is TCAM1_ini and sp_0..sp_{i-1};
// split2 = j (three partitions) means sp_j takes Buffer-2. A split value of K
// stands for TCAML_fin itself.
//
// From the stored configuration the controller drives
//  * sel[s]: the input multiplexer of each segment (previous segment's word,
//    Buffer-1 or Buffer-2),
//  * part_end[p]: the last segment of partition p, i.e. the selection of the
//    buffer-input multiplexer (split at sp_i -> output of sp_{i-1}),
//  * num_parts for the match decision.
// A write (cfg_we) takes effect at the next edge; an invalid configuration is
// ignored and flags cfg_err for one cycle. Reset gives two partitions split at
// sp_2 (partition 1 = prefixes 24 and longer when sp_i holds prefix 25-i).
// Changing the configuration while lookups are in flight is not supported.
// The mux structure follows the source design; the register interface, the
// reset value and the error flag are this design's own.
module partition_controller
  import tcam_pkg::*;
#(
  parameter int unsigned K = 6,
  localparam int unsigned SW = $clog2(K + 1),
  localparam int unsigned NSEG = K + 2,
  localparam int unsigned EW = $clog2(NSEG)
) (
  input  logic           clk,
  input  logic           rst_n,
  // partitioning control signal
  input  logic           cfg_we,
  input  logic           cfg_three,   // 1 = three partitions, 0 = two
  input  logic [SW-1:0]  cfg_split1,
  input  logic [SW-1:0]  cfg_split2,
  output logic           cfg_err,
  // mux controls
  output src_sel_e       sel      [NSEG],
  output logic [EW-1:0]  part_end [3],
  output logic [1:0]     num_parts
);

  localparam logic [SW-1:0] RESET_SPLIT1 = SW'((K >= 2) ? 2 : 0);

  logic          three_q;
  logic [SW-1:0] split1_q, split2_q;
  logic          cfg_ok;

  assign cfg_ok = cfg_three ? (cfg_split1 < cfg_split2) && (32'(cfg_split2) <= K)
                            : (32'(cfg_split1) <= K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      three_q  <= 1'b0;
      split1_q <= RESET_SPLIT1;
      split2_q <= SW'(K);
      cfg_err  <= 1'b0;
    end else begin
      cfg_err <= cfg_we & ~cfg_ok;
      if (cfg_we && cfg_ok) begin
        three_q  <= cfg_three;
        split1_q <= cfg_split1;
        split2_q <= cfg_three ? cfg_split2 : SW'(K);
      end
    end
  end

  always_comb begin
    sel[0] = SRC_PREV;
    for (int unsigned s = 1; s < NSEG; s++) begin
      if (32'(split1_q) == s - 1)                sel[s] = SRC_BUF1;
      else if (three_q && 32'(split2_q) == s - 1) sel[s] = SRC_BUF2;
      else                                       sel[s] = SRC_PREV;
    end
    part_end[0] = EW'(split1_q);
    part_end[1] = three_q ? EW'(split2_q) : EW'(NSEG - 1);
    part_end[2] = EW'(NSEG - 1);
    num_parts   = three_q ? 2'd3 : 2'd2;
  end

endmodule

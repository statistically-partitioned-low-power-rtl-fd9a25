// priority_encoder: match-line priority encoder of a TCAM.
//
// Reports whether any of the N match lines is high (hit) and the index of the
// lowest-numbered one (addr). Entries are stored longest prefix first, so the
// lowest address is the longest matching prefix. Built as a binary tree of
// two-input "lower index wins" nodes, log2(N) levels deep. Purely
// combinational; addr is 0 when there is no hit.
//
// Lowest address = highest priority follows the source design; the tree
// structure is this design's choice.
module priority_encoder #(
  parameter int unsigned N = 512,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  req,
  output logic          hit,
  output logic [AW-1:0] addr
);

  localparam int unsigned LEAVES = 1 << AW;

  // Level l of the tree has LEAVES >> l nodes; level AW is the root.
  for (genvar l = 0; l <= AW; l++) begin : g_lv
    localparam int unsigned NN = LEAVES >> l;
    logic [NN-1:0]         h;
    logic [NN-1:0][AW-1:0] ix;

    for (genvar i = 0; i < NN; i++) begin : g_node
      if (l == 0) begin : g_leaf
        if (i < N) begin : g_req
          assign h[i] = req[i];
        end else begin : g_pad
          assign h[i] = 1'b0;
        end
        assign ix[i] = AW'(i);
      end else begin : g_join
        // the lower-index child wins when it hits
        assign h[i]  = g_lv[l-1].h[2*i] | g_lv[l-1].h[2*i+1];
        assign ix[i] = g_lv[l-1].h[2*i] ? g_lv[l-1].ix[2*i] : g_lv[l-1].ix[2*i+1];
      end
    end
  end

  assign hit  = g_lv[AW].h[0];
  assign addr = hit ? g_lv[AW].ix[0] : '0;

endmodule

// tcam_array: a DEPTH-word by WIDTH-bit ternary CAM array.
//
// A grid of tcam_cell instances. One word is written per cycle through its word
// line (wr_en with wr_idx); each word also has a valid bit so that empty or
// deleted words never match. A search applies search_key to the search lines of
// every word in parallel; match[i] is high when word i is valid and none of its
// cells pulls the match line down. The match lines feed a priority encoder
// outside this module.
//
// search_en models precharging the match lines and driving the search lines:
// when it is low no word is compared and every match line reads 0. The
// partitioned engines use it to keep a partition idle unless a word reaches it.
//
// Timing: writes take effect at the next rising edge; match is combinational
// from search_key. Reset clears the valid bits only.
//
// The cell grid, word lines and match lines follow the source design; the valid
// bits and the single-word write port are this design's own choices.
module tcam_array #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // word-line write port
  input  logic             wr_en,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic [WIDTH-1:0] wr_value,
  input  logic [WIDTH-1:0] wr_care,
  input  logic             wr_valid,
  // search
  input  logic             search_en,
  input  logic [WIDTH-1:0] search_key,
  output logic [DEPTH-1:0] match
);

  logic [DEPTH-1:0] valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (wr_en && (32'(wr_idx) < DEPTH)) begin
      valid_q[wr_idx] <= wr_valid;
    end
  end

  for (genvar w = 0; w < DEPTH; w++) begin : g_word
    logic             wl;
    logic [WIDTH-1:0] mis;

    assign wl = wr_en && (32'(wr_idx) == w);

    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      tcam_cell u_cell (
        .clk     (clk),
        .wl      (wl),
        .wr_value(wr_value[b]),
        .wr_care (wr_care[b]),
        .sl_en   (search_en),
        .sl      (search_key[b]),
        .mismatch(mis[b])
      );
    end

    // Wired-AND match line: high unless some cell pulls it down.
    assign match[w] = search_en & valid_q[w] & ~(|mis);
  end

endmodule

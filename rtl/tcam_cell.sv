// tcam_cell: one ternary CAM cell.
//
// The cell stores a value bit and a care bit, i.e. two binary CAM cells that
// together encode 0, 1 and don't care (x). The word line writes both bits at the
// clock edge. During a search the cell compares its value with the search line
// and raises `mismatch` when it holds a cared-for bit that differs; that is the
// pull-down of the word's precharged match line, so the match line is the
// wired-AND of all cells of a word. A don't-care cell never pulls down. When the
// search lines are not driven (sl_en low) the cell draws no comparison and
// reports no mismatch.
//
// Timing: write takes effect at the next rising edge; `mismatch` is
// combinational from the stored bits and the search line. The contents are not
// reset: the word valid bit in tcam_array hides unwritten cells.
//
// The two-bit encoding and the wired-AND match line follow the source design;
// the sl_en gating input is this design's way of showing an idle search.
module tcam_cell (
  input  logic clk,
  input  logic wl,        // word line: write this cell
  input  logic wr_value,  // bit to store
  input  logic wr_care,   // 1 = stored bit is compared, 0 = don't care
  input  logic sl_en,     // search lines driven this cycle
  input  logic sl,        // search line (search word bit)
  output logic mismatch   // pulls the match line low
);

  logic value_q;
  logic care_q;

  always_ff @(posedge clk) begin
    if (wl) begin
      value_q <= wr_value;
      care_q  <= wr_care;
    end
  end

  assign mismatch = sl_en & care_q & (value_q ^ sl);

endmodule

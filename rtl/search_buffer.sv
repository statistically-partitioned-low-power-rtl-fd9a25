// search_buffer: the word buffer between two TCAM partitions.
//
// When a search word misses a partition, the buffer captures it (with its tag)
// at the clock edge so that the next partition can search it in the following
// cycle, while the earlier partition already accepts a new word. This is what
// lets the partitioned lookup keep one new search per cycle.
//
// The next partition always searches the buffered word in the cycle after it
// was loaded, so the buffer holds a word for exactly one cycle: `valid` follows
// `load` by one cycle, and the data register is only clocked on a load (no
// toggling when the earlier partition hits). Reset empties it.
//
// The buffer and its purpose follow the source design; loading only on a miss
// and the one-cycle valid are this design's reading of how it is used.
module search_buffer #(
  parameter int unsigned WIDTH = 40
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,   // word missed the earlier partition
  input  logic [WIDTH-1:0] din,
  output logic             valid,  // dout must be searched this cycle
  output logic [WIDTH-1:0] dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      dout  <= '0;
    end else begin
      valid <= load;
      if (load) dout <= din;
    end
  end

endmodule

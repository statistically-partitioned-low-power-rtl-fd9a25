// tb_partition_controller: every two- and three-partition configuration of a
// K=6 controller (and invalid ones) is written. After each write the segment
// multiplexer selects, the partition ends and the partition count are compared
// with values worked out from the split points; invalid writes must raise
// cfg_err and leave the configuration unchanged. Reset must give two partitions
// split at sp_2.
module tb_partition_controller;
  import tcam_pkg::*;
  localparam int K = 6;
  localparam int NSEG = K + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we, cfg_three, cfg_err;
  logic [2:0] cfg_split1, cfg_split2;
  src_sel_e sel [NSEG];
  logic [2:0] part_end [3];
  logic [1:0] num_parts;
  int checks = 0, failures = 0;
  int c_three, c_s1, c_s2;

  partition_controller #(.K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(string what);
    for (int s = 0; s < NSEG; s++) begin
      src_sel_e e = SRC_PREV;
      if (s >= 1 && s - 1 == c_s1) e = SRC_BUF1;
      else if (s >= 1 && c_three && s - 1 == c_s2) e = SRC_BUF2;
      checks++;
      if (sel[s] !== e) begin failures++; $display("%s: sel[%0d]=%0d expected %0d", what, s, sel[s], e); end
    end
    checks++;
    if (int'(part_end[0]) != c_s1 || int'(part_end[1]) != (c_three ? c_s2 : NSEG - 1)
        || int'(part_end[2]) != NSEG - 1 || int'(num_parts) != (c_three ? 3 : 2)) begin
      failures++;
      $display("%s: ends %0d %0d %0d parts %0d", what, part_end[0], part_end[1], part_end[2], num_parts);
    end
  endtask

  task automatic cfg(bit three, int s1, int s2);
    bit ok = three ? (s1 < s2 && s2 <= K) : (s1 <= K);
    @(negedge clk);
    cfg_we = 1; cfg_three = three; cfg_split1 = 3'(s1); cfg_split2 = 3'(s2);
    @(negedge clk);
    cfg_we = 0;
    checks++;
    if (cfg_err !== !ok) begin failures++; $display("cfg %0d %0d %0d: err=%0d", three, s1, s2, cfg_err); end
    if (ok) begin c_three = three; c_s1 = s1; c_s2 = three ? s2 : K; end
    check_state($sformatf("cfg %0d %0d %0d", three, s1, s2));
  endtask

  initial begin
    cfg_we = 0; cfg_three = 0; cfg_split1 = '0; cfg_split2 = '0;
    c_three = 0; c_s1 = 2; c_s2 = K;
    #12 rst_n = 1;
    check_state("reset");
    for (int a = 0; a <= 7; a++) cfg(0, a, 0);
    for (int a = 0; a <= 7; a++)
      for (int b = 0; b <= 7; b++) cfg(1, a, b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

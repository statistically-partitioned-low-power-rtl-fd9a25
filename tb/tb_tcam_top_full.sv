// tb_tcam_top_full: the lookup engine at its default configuration (two
// partitions of 512 x 32-bit entries). The whole table is written, longest
// prefixes first (TCAM1: lengths 32..24, TCAM2: 23..8, one entry in eight left
// empty), then a stream of lookups is run and every result is checked against
// a linear longest-prefix-match model for value, port and cycle, in both output
// modes. Counts first-partition hits, second-partition hits, misses and cycles
// with two results, and fails if one of them never happened.
module tb_tcam_top_full;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int D1 = 512, D2 = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  logic search_valid, in_order;
  logic [KEY_W-1:0] search_key;
  logic [TAG_W-1:0] search_tag;
  tcam_wr_t wr;
  logic cfg_err;
  result_t res [3];
  longint cyc = 0;
  int tag = 0;
  int n_hit1 = 0, n_hit2 = 0, n_miss = 0, n_dual = 0;
  tcam_ref   ref_m;
  scoreboard sb;

  tcam_top dut (
    .clk, .rst_n, .search_valid, .search_key, .search_tag, .wr, .in_order,
    .cfg_we(1'b0), .cfg_three(1'b0), .cfg_split1('0), .cfg_split2('0), .cfg_err, .res
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #10000000;
    sb.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  task automatic write(int a, int len, bit vld);
    logic [KEY_W-1:0] c = prefix_mask(len);
    logic [KEY_W-1:0] v = $urandom() & c;
    @(negedge clk);
    wr = '{we: 1'b1, addr: ADDR_W'(a), value: v, care: c, valid: vld};
    ref_m.write(a, v, c, vld);
  endtask

  task automatic stream(bit mode, int words);
    in_order = mode;
    for (int n = 0; n < words + 4; n++) begin
      int nres = 0;
      @(negedge clk);
      for (int p = 0; p < 3; p++)
        if (res[p].valid) begin sb.got(p, res[p], cyc); nres++; end
      if (nres > 1) n_dual++;
      search_valid = 1'b0;
      if (n < words && $urandom_range(5) != 0) begin
        logic [KEY_W-1:0] k;
        int a, part;
        if ($urandom_range(3) != 0) begin
          int e = $urandom_range(D1 + D2 - 1);
          k = ref_m.value[e] | ($urandom() & ~ref_m.care[e]);
        end else begin
          k = $urandom();
        end
        a = ref_m.lookup(k);
        part = (a >= 0 && a < D1) ? 0 : 1;
        if (part == 0) n_hit1++; else if (a >= 0) n_hit2++; else n_miss++;
        search_valid = 1'b1; search_key = k; search_tag = TAG_W'(tag);
        sb.expect_result(tag, a, mode ? cyc + 2 : cyc + part + 1, mode ? 0 : part);
        tag = (tag + 1) % 256;
      end
    end
  endtask

  initial begin
    ref_m = new(D1 + D2);
    sb = new("tcam_top");
    search_valid = 0; search_key = '0; search_tag = '0; in_order = 0;
    wr = '0;
    #12 rst_n = 1;
    for (int i = 0; i < D1; i++) write(i, 32 - (i * 9) / D1, (i % 8) != 7);
    for (int i = 0; i < D2; i++) write(D1 + i, 23 - (i * 16) / D2, (i % 8) != 7);
    @(negedge clk);
    wr.we = 1'b0;
    stream(0, 1500);
    stream(1, 500);
    sb.final_check();
    sb.checks++;
    if (cfg_err !== 1'b0 || n_hit1 == 0 || n_hit2 == 0 || n_miss == 0 || n_dual == 0) begin
      sb.failures++;
      $display("a case never happened or cfg_err set");
    end
    $display("TCAM1 hits %0d, TCAM2 hits %0d, misses %0d, two-result cycles %0d", n_hit1, n_hit2, n_miss, n_dual);
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end
endmodule

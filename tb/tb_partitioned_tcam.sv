// tb_partitioned_tcam: the two-partition engine at 16+16 entries.
// TCAM1 is filled with prefixes of length 24..32 and TCAM2 with 8..23, longest
// first, as a routing table would be split at prefix 24. A stream of lookups
// (one per cycle with random gaps; keys taken from stored prefixes or random)
// is checked against a linear longest-prefix-match model: result, port and
// cycle. A TCAM1 hit must come out on res[0] after 1 cycle, anything else on
// res[1] after 2 cycles; with in_order set, every result on res[0] after 2
// cycles. TCAM2 must search exactly the words that missed TCAM1. Entries are
// then deleted and rewritten while idle and the stream repeated.
module tb_partitioned_tcam;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int D1 = 16;
  localparam int D2 = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic search_valid, in_order;
  logic [KEY_W-1:0] search_key;
  logic [TAG_W-1:0] search_tag;
  tcam_wr_t wr;
  result_t res [3];
  longint cyc = 0;
  int tag = 0;
  int n_hit1 = 0, n_hit2 = 0, n_miss = 0, n_dual = 0, n_t2 = 0, n_exp_t2 = 0;
  tcam_ref   ref_m;
  scoreboard sb;

  partitioned_tcam #(.DEPTH1(D1), .DEPTH2(D2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.u_buffer.valid) n_t2++;
  end

  initial begin
    #2000000;
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
    @(negedge clk);
    wr.we = 1'b0;
  endtask

  task automatic fill();
    for (int i = 0; i < D1; i++) write(i, 32 - (i * 9) / D1, ($urandom_range(7) != 0));
    for (int i = 0; i < D2; i++) write(D1 + i, 23 - (i * 16) / D2, ($urandom_range(7) != 0));
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
        if (part == 0) n_hit1++; else begin n_exp_t2++; if (a >= 0) n_hit2++; else n_miss++; end
        search_valid = 1'b1; search_key = k; search_tag = TAG_W'(tag);
        sb.expect_result(tag, a, mode ? cyc + 2 : cyc + part + 1, mode ? 0 : part);
        tag = (tag + 1) % 256;
      end
    end
  endtask

  initial begin
    ref_m = new(D1 + D2);
    sb = new("partitioned_tcam");
    search_valid = 0; search_key = '0; search_tag = '0; in_order = 0;
    wr = '0;
    #12 rst_n = 1;
    fill();
    stream(0, 400);
    stream(1, 200);
    fill();
    stream(0, 300);
    sb.final_check();
    sb.checks++;
    if (n_t2 != n_exp_t2) begin
      sb.failures++;
      $display("TCAM2 searched %0d times, expected %0d", n_t2, n_exp_t2);
    end
    sb.checks++;
    if (n_hit1 == 0 || n_hit2 == 0 || n_miss == 0 || n_dual == 0) begin
      sb.failures++;
      $display("a case never happened: hit1=%0d hit2=%0d miss=%0d dual=%0d", n_hit1, n_hit2, n_miss, n_dual);
    end
    $display("TCAM1 hits %0d, TCAM2 hits %0d, misses %0d, two-result cycles %0d, TCAM2 searches %0d",
             n_hit1, n_hit2, n_miss, n_dual, n_t2);
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end
endmodule

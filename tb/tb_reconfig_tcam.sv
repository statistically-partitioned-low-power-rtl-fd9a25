// tb_reconfig_tcam: the software-partitioned engine with K=3 sub-partitions of
// 4 entries, an 8-entry TCAM1_ini (prefixes 26..32), sub-partition sp_i holding
// prefix 25-i, and an 8-entry TCAML_fin (prefixes 8..19, 19 bits compared).
// For a range of two- and three-partition configurations, a lookup stream is
// checked against a linear longest-prefix-match model: the answer must not
// depend on the configuration, while port and latency must equal the index of
// the partition holding the matching entry (a miss ends in the last partition).
// Also run with in_order set. Each later partition must search exactly the
// words that missed the partitions above it.
module tb_reconfig_tcam;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int K = 3, INI = 8, SP = 4, FIN = 8, FW = 19;
  localparam int TOTAL = INI + K * SP + FIN;
  logic clk = 1'b0, rst_n = 1'b0;
  logic search_valid, in_order;
  logic [KEY_W-1:0] search_key;
  logic [TAG_W-1:0] search_tag;
  tcam_wr_t wr;
  logic cfg_we, cfg_three, cfg_err;
  logic [1:0] cfg_split1, cfg_split2;
  result_t res [3];
  longint cyc = 0;
  int tag = 0;
  int c_three, c_s1, c_s2;
  int n_part [3];
  int n_b1 = 0, n_b2 = 0, n_exp_b1 = 0, n_exp_b2 = 0, n_multi = 0;
  tcam_ref   ref_m;
  scoreboard sb;

  reconfig_tcam #(.K(K), .INI_DEPTH(INI), .SP_DEPTH(SP), .FIN_DEPTH(FIN), .FIN_W(FW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && dut.u_buffer1.valid) n_b1++;
    if (rst_n && dut.u_buffer2.valid) n_b2++;
  end

  initial begin
    #5000000;
    sb.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  function automatic int seg_of(int a);
    if (a < INI) return 0;
    if (a < INI + K * SP) return 1 + (a - INI) / SP;
    return K + 1;
  endfunction

  function automatic int part_of(int a);
    int j;
    if (a < 0) return c_three ? 2 : 1;
    if (seg_of(a) == 0) return 0;
    j = seg_of(a) - 1;
    if (j < c_s1) return 0;
    if (c_three && j >= c_s2) return 2;
    return 1;
  endfunction

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
    for (int i = 0; i < INI; i++) write(i, 32 - (i * 7) / INI, ($urandom_range(7) != 0));
    for (int s = 0; s < K; s++)
      for (int i = 0; i < SP; i++) write(INI + s * SP + i, 25 - s, ($urandom_range(7) != 0));
    for (int i = 0; i < FIN; i++) write(INI + K * SP + i, 19 - (i * 12) / FIN, ($urandom_range(7) != 0));
  endtask

  task automatic configure(bit three, int s1, int s2);
    @(negedge clk);
    cfg_we = 1; cfg_three = three; cfg_split1 = 2'(s1); cfg_split2 = 2'(s2);
    @(negedge clk);
    cfg_we = 0;
    sb.checks++;
    if (cfg_err) begin sb.failures++; $display("configuration %0d %0d %0d refused", three, s1, s2); end
    c_three = three; c_s1 = s1; c_s2 = three ? s2 : K;
  endtask

  task automatic stream(bit mode, int words);
    int np = c_three ? 3 : 2;
    in_order = mode;
    for (int n = 0; n < words + 5; n++) begin
      int nres = 0;
      @(negedge clk);
      for (int p = 0; p < 3; p++)
        if (res[p].valid) begin sb.got(p, res[p], cyc); nres++; end
      if (nres > 1) n_multi++;
      search_valid = 1'b0;
      if (n < words && $urandom_range(5) != 0) begin
        logic [KEY_W-1:0] k;
        int a, part;
        if ($urandom_range(3) != 0) begin
          int e = $urandom_range(TOTAL - 1);
          k = ref_m.value[e] | ($urandom() & ~ref_m.care[e]);
        end else begin
          k = $urandom();
        end
        a = ref_m.lookup(k);
        part = part_of(a);
        n_part[part]++;
        if (part >= 1) n_exp_b1++;
        if (part >= 2) n_exp_b2++;
        search_valid = 1'b1; search_key = k; search_tag = TAG_W'(tag);
        sb.expect_result(tag, a, mode ? cyc + np : cyc + part + 1, mode ? 0 : part);
        tag = (tag + 1) % 256;
      end
    end
  endtask

  initial begin
    ref_m = new(TOTAL);
    sb = new("reconfig_tcam");
    for (int p = 0; p < 3; p++) n_part[p] = 0;
    search_valid = 0; search_key = '0; search_tag = '0; in_order = 0;
    wr = '0; cfg_we = 0; cfg_three = 0; cfg_split1 = '0; cfg_split2 = '0;
    c_three = 0; c_s1 = 2; c_s2 = K;
    #12 rst_n = 1;
    fill();
    stream(0, 200);                 // reset configuration: two partitions at sp_2
    for (int s1 = 0; s1 <= K; s1++) begin
      configure(0, s1, 0);
      stream(0, 150);
    end
    for (int s1 = 0; s1 < K; s1++)
      for (int s2 = s1 + 1; s2 <= K; s2++) begin
        configure(1, s1, s2);
        stream(0, 150);
      end
    configure(1, 1, 2);
    stream(1, 200);
    configure(0, 1, 0);
    stream(1, 200);
    sb.final_check();
    sb.checks += 2;
    if (n_b1 != n_exp_b1 || n_b2 != n_exp_b2) begin
      sb.failures++;
      $display("buffer loads %0d/%0d, expected %0d/%0d", n_b1, n_b2, n_exp_b1, n_exp_b2);
    end
    if (n_part[0] == 0 || n_part[1] == 0 || n_part[2] == 0 || n_multi == 0) begin
      sb.failures++;
      $display("a case never happened: %0d %0d %0d multi %0d", n_part[0], n_part[1], n_part[2], n_multi);
    end
    $display("results per partition %0d %0d %0d, multi-result cycles %0d", n_part[0], n_part[1], n_part[2], n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end
endmodule

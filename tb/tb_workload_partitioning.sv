// tb_workload_partitioning: the software-partitioned engine (ARCH=1) at its
// default sizes, run with the partitionings studied for core-router tables:
// two partitions split at prefix 24, and three partitions split at 25/24 and at
// 24/21. The table is synthetic: TCAM1_ini holds 128 prefixes of length 26..32,
// sub-partition sp_i 64 prefixes of length 25-i, TCAML_fin 256 prefixes of
// length 8..19. Lookups use keys taken from stored prefixes (with random host
// bits) and some random keys.
// For each partitioning the test checks every result (value, port, cycle)
// against a longest-prefix-match model and measures the mean latency. It also
// measures the number of TCAM cells compared per lookup, the activity that
// the partitioning is meant to reduce, and compares it with a search of the
// whole table. The test fails if the partitioned search compares as many cells
// as the unpartitioned one, or if a measured latency differs from the one the
// model predicts.
module tb_workload_partitioning;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int K = 6, INI = 128, SP = 64, FIN = 256, FW = 19;
  localparam int TOTAL = INI + K * SP + FIN;
  localparam int SEG_N = K + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic search_valid, in_order;
  logic [KEY_W-1:0] search_key;
  logic [TAG_W-1:0] search_tag;
  tcam_wr_t wr;
  logic cfg_we, cfg_three, cfg_err;
  logic [2:0] cfg_split1, cfg_split2;
  result_t res [3];
  longint cyc = 0;
  int tag = 0;
  int c_three, c_s1, c_s2;
  longint cells, lookups, lat_sum, lat_model;
  tcam_ref   ref_m;
  scoreboard sb;

  tcam_top #(.ARCH(1)) dut (
    .clk, .rst_n, .search_valid, .search_key, .search_tag, .wr, .in_order,
    .cfg_we, .cfg_three, .cfg_split1, .cfg_split2, .cfg_err, .res
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50000000;
    sb.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  function automatic int seg_size(int s);
    return (s == 0) ? INI * KEY_W : (s <= K) ? SP * KEY_W : FIN * FW;
  endfunction

  function automatic int part_of_seg(int s);
    if (s == 0 || s - 1 < c_s1) return 0;
    if (c_three && s - 1 >= c_s2) return 2;
    return 1;
  endfunction

  function automatic int part_of(int a);
    if (a < 0) return c_three ? 2 : 1;
    if (a < INI) return 0;
    return part_of_seg((a < INI + K * SP) ? 1 + (a - INI) / SP : K + 1);
  endfunction

  task automatic write(int a, int len);
    logic [KEY_W-1:0] c = prefix_mask(len);
    logic [KEY_W-1:0] v = $urandom() & c;
    @(negedge clk);
    wr = '{we: 1'b1, addr: ADDR_W'(a), value: v, care: c, valid: 1'b1};
    ref_m.write(a, v, c, 1'b1);
  endtask

  task automatic configure(bit three, int s1, int s2);
    @(negedge clk);
    cfg_we = 1; cfg_three = three; cfg_split1 = 3'(s1); cfg_split2 = 3'(s2);
    @(negedge clk);
    cfg_we = 0;
    sb.checks++;
    if (cfg_err) begin sb.failures++; $display("configuration refused"); end
    c_three = three; c_s1 = s1; c_s2 = three ? s2 : K;
  endtask

  task automatic run(string name, int words);
    cells = 0; lookups = 0; lat_sum = 0; lat_model = 0;
    in_order = 1'b0;
    for (int n = 0; n < words + 5; n++) begin
      @(negedge clk);
      for (int p = 0; p < 3; p++)
        if (res[p].valid) begin
          sb.got(p, res[p], cyc);
          lat_sum += p + 1;   // result port p+1 = cycles taken
        end
      search_valid = 1'b0;
      if (n < words) begin
        logic [KEY_W-1:0] k;
        int a, part;
        if ($urandom_range(9) != 0) begin
          int e = $urandom_range(TOTAL - 1);
          k = ref_m.value[e] | ($urandom() & ~ref_m.care[e]);
        end else k = $urandom();
        a = ref_m.lookup(k);
        part = part_of(a);
        // cells compared: every segment of every partition the word reaches
        for (int s = 0; s < SEG_N; s++) if (part_of_seg(s) <= part) cells += seg_size(s);
        lookups++;
        lat_model += part + 1;
        search_valid = 1'b1; search_key = k; search_tag = TAG_W'(tag);
        sb.expect_result(tag, a, cyc + part + 1, part);
        tag = (tag + 1) % 256;
      end
    end
    begin
      longint full = lookups * (INI * KEY_W + K * SP * KEY_W + FIN * FW);
      $display("%s: mean latency %0d.%03d cycles, cells compared %0d.%01d%% of an unpartitioned search",
               name, lat_sum / lookups, (lat_sum * 1000 / lookups) % 1000,
               cells * 100 / full, (cells * 1000 / full) % 10);
      sb.checks += 2;
      if (lat_sum != lat_model) begin sb.failures++; $display("%s: latency sum %0d, model %0d", name, lat_sum, lat_model); end
      if (cells >= full) begin sb.failures++; $display("%s: no saving", name); end
    end
  endtask

  initial begin
    ref_m = new(TOTAL);
    sb = new("workload");
    search_valid = 0; search_key = '0; search_tag = '0; in_order = 0;
    wr = '0; cfg_we = 0; cfg_three = 0; cfg_split1 = '0; cfg_split2 = '0;
    c_three = 0; c_s1 = 2; c_s2 = K;
    #12 rst_n = 1;
    for (int i = 0; i < INI; i++) write(i, 32 - (i * 7) / INI);
    for (int s = 0; s < K; s++)
      for (int i = 0; i < SP; i++) write(INI + s * SP + i, 25 - s);
    for (int i = 0; i < FIN; i++) write(INI + K * SP + i, 19 - (i * 12) / FIN);
    @(negedge clk);
    wr.we = 1'b0;
    run("two partitions at 24 (reset configuration)", 800);
    configure(1, 1, 2);
    run("three partitions at 25/24", 800);
    configure(1, 2, 5);
    run("three partitions at 24/21", 800);
    configure(0, 2, 0);
    run("two partitions at 24", 800);
    sb.final_check();
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end
endmodule

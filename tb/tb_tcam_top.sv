// tb_tcam_top: end-to-end test of the lookup engine in both architectures at
// reduced sizes, driven by the same lookup stream.
//   u_fix (ARCH=0): TCAM1 16 entries (prefixes 24..32), TCAM2 16 (8..23),
//                   TCAM2 narrowed to 23 bits.
//   u_cfg (ARCH=1): K=3, TCAM1_ini 8 (26..32), sp_i 4 each (prefix 25-i),
//                   TCAML_fin 8 (8..19, 19 bits).
// Every result is checked by tag against a longest-prefix-match model, for
// value, port and cycle. The test counts each mechanism and fails if one never
// occurred: first-partition hit, buffered second-partition search and hit,
// final miss, two results in one cycle, third-partition result, in-order
// (stall-stage) mode, run-time repartitioning, a refused configuration and
// entry deletion.
module tb_tcam_top;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int D1 = 16, D2 = 16;
  localparam int K = 3, INI = 8, SP = 4, FIN = 8;
  localparam int TOT1 = INI + K * SP + FIN;
  logic clk = 1'b0, rst_n = 1'b0;
  logic search_valid, in_order;
  logic [KEY_W-1:0] key_f, key_c;
  logic [TAG_W-1:0] search_tag;
  tcam_wr_t wr_f, wr_c;
  logic cfg_we, cfg_three, err_f, err_c;
  logic [1:0] cfg_split1, cfg_split2;
  result_t res_f [3];
  result_t res_c [3];
  longint cyc = 0;
  int tag = 0;
  int c_three, c_s1, c_s2;
  // mechanism counters
  int n_hit1 = 0, n_hit2 = 0, n_miss = 0, n_dual = 0, n_part3 = 0, n_inorder = 0;
  int n_reconf = 0, n_refused = 0, n_deleted = 0;
  tcam_ref   ref_f, ref_c;
  scoreboard sb_f, sb_c;

  tcam_top #(.ARCH(0), .DEPTH1(D1), .DEPTH2(D2), .WIDTH2(23)) u_fix (
    .clk, .rst_n, .search_valid, .search_key(key_f), .search_tag, .wr(wr_f), .in_order,
    .cfg_we(1'b0), .cfg_three(1'b0), .cfg_split1(3'd0), .cfg_split2(3'd0), .cfg_err(err_f), .res(res_f)
  );

  tcam_top #(.ARCH(1), .K(K), .INI_DEPTH(INI), .SP_DEPTH(SP), .FIN_DEPTH(FIN), .FIN_W(19)) u_cfg (
    .clk, .rst_n, .search_valid, .search_key(key_c), .search_tag, .wr(wr_c), .in_order,
    .cfg_we, .cfg_three, .cfg_split1, .cfg_split2, .cfg_err(err_c), .res(res_c)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5000000;
    sb_f.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sb_f.checks + sb_c.checks, sb_f.failures + sb_c.failures);
    $finish;
  end

  function automatic int part_c(int a);
    int j;
    if (a < 0) return c_three ? 2 : 1;
    if (a < INI) return 0;
    j = (a < INI + K * SP) ? (a - INI) / SP : K;
    if (j < c_s1) return 0;
    if (c_three && j >= c_s2) return 2;
    return 1;
  endfunction

  task automatic write_f(int a, int len, bit vld);
    logic [KEY_W-1:0] c = prefix_mask(len);
    logic [KEY_W-1:0] v = $urandom() & c;
    @(negedge clk);
    wr_f = '{we: 1'b1, addr: ADDR_W'(a), value: v, care: c, valid: vld};
    ref_f.write(a, v, c, vld);
    @(negedge clk);
    wr_f.we = 1'b0;
  endtask

  task automatic write_c(int a, int len, bit vld);
    logic [KEY_W-1:0] c = prefix_mask(len);
    logic [KEY_W-1:0] v = $urandom() & c;
    @(negedge clk);
    wr_c = '{we: 1'b1, addr: ADDR_W'(a), value: v, care: c, valid: vld};
    ref_c.write(a, v, c, vld);
    @(negedge clk);
    wr_c.we = 1'b0;
  endtask

  task automatic fill();
    for (int i = 0; i < D1; i++) write_f(i, 32 - (i * 9) / D1, 1'b1);
    for (int i = 0; i < D2; i++) write_f(D1 + i, 23 - (i * 16) / D2, 1'b1);
    for (int i = 0; i < INI; i++) write_c(i, 32 - (i * 7) / INI, 1'b1);
    for (int s = 0; s < K; s++)
      for (int i = 0; i < SP; i++) write_c(INI + s * SP + i, 25 - s, 1'b1);
    for (int i = 0; i < FIN; i++) write_c(INI + K * SP + i, 19 - (i * 12) / FIN, 1'b1);
  endtask

  task automatic configure(bit three, int s1, int s2, bit expect_ok);
    @(negedge clk);
    cfg_we = 1; cfg_three = three; cfg_split1 = 2'(s1); cfg_split2 = 2'(s2);
    @(negedge clk);
    cfg_we = 0;
    sb_c.checks++;
    if (err_c !== !expect_ok) begin sb_c.failures++; $display("cfg %0d %0d %0d: err=%0d", three, s1, s2, err_c); end
    if (expect_ok) begin c_three = three; c_s1 = s1; c_s2 = three ? s2 : K; n_reconf++; end
    else n_refused++;
  endtask

  function automatic logic [KEY_W-1:0] pick_key(tcam_ref r, int n);
    if ($urandom_range(3) != 0) begin
      int e = $urandom_range(n - 1);
      return r.value[e] | ($urandom() & ~r.care[e]);
    end
    return $urandom();
  endfunction

  task automatic stream(bit mode, int words);
    int np = c_three ? 3 : 2;
    in_order = mode;
    for (int n = 0; n < words + 5; n++) begin
      int nf = 0;
      @(negedge clk);
      for (int p = 0; p < 3; p++) begin
        if (res_f[p].valid) begin sb_f.got(p, res_f[p], cyc); nf++; end
        if (res_c[p].valid) begin sb_c.got(p, res_c[p], cyc); if (p == 2) n_part3++; end
      end
      if (nf > 1) n_dual++;
      if (mode && (res_f[0].valid || res_c[0].valid)) n_inorder++;
      search_valid = 1'b0;
      if (n < words && $urandom_range(5) != 0) begin
        int af, ac, pf;
        key_f = pick_key(ref_f, D1 + D2);
        key_c = pick_key(ref_c, TOT1);
        af = ref_f.lookup(key_f);
        ac = ref_c.lookup(key_c);
        pf = (af >= 0 && af < D1) ? 0 : 1;
        if (pf == 0) n_hit1++; else if (af >= 0) n_hit2++; else n_miss++;
        search_valid = 1'b1; search_tag = TAG_W'(tag);
        sb_f.expect_result(tag, af, mode ? cyc + 2 : cyc + pf + 1, mode ? 0 : pf);
        sb_c.expect_result(tag, ac, mode ? cyc + np : cyc + part_c(ac) + 1, mode ? 0 : part_c(ac));
        tag = (tag + 1) % 256;
      end
    end
  endtask

  initial begin
    ref_f = new(D1 + D2);
    ref_c = new(TOT1);
    sb_f = new("ARCH0");
    sb_c = new("ARCH1");
    search_valid = 0; key_f = '0; key_c = '0; search_tag = '0; in_order = 0;
    wr_f = '0; wr_c = '0; cfg_we = 0; cfg_three = 0; cfg_split1 = '0; cfg_split2 = '0;
    c_three = 0; c_s1 = 2; c_s2 = K;
    #12 rst_n = 1;
    fill();
    stream(0, 300);
    configure(1, 1, 3, 1'b1);   // three partitions: {ini, sp_0} {sp_1, sp_2} {fin}
    stream(0, 300);
    stream(1, 200);
    configure(1, 2, 1, 1'b0);   // refused: split2 not below split1
    configure(0, 3, 0, 1'b1);   // two partitions, TCAML_fin alone in the second
    stream(0, 200);
    // delete a few entries in both engines
    for (int i = 0; i < 4; i++) begin
      write_f($urandom_range(D1 + D2 - 1), 8, 1'b0);
      write_c($urandom_range(TOT1 - 1), 8, 1'b0);
      n_deleted++;
    end
    stream(0, 200);
    sb_f.final_check();
    sb_c.final_check();
    sb_c.checks++;
    if (err_f !== 1'b0) begin sb_c.failures++; $display("ARCH0 cfg_err set"); end
    $display("hit1 %0d hit2 %0d miss %0d dual %0d part3 %0d in-order %0d reconf %0d refused %0d deleted %0d",
             n_hit1, n_hit2, n_miss, n_dual, n_part3, n_inorder, n_reconf, n_refused, n_deleted);
    sb_c.checks++;
    if (n_hit1 == 0 || n_hit2 == 0 || n_miss == 0 || n_dual == 0 || n_part3 == 0 || n_inorder == 0
        || n_reconf == 0 || n_refused == 0 || n_deleted == 0) begin
      sb_c.failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", sb_f.checks + sb_c.checks, sb_f.failures + sb_c.failures);
    $finish;
  end
endmodule

// tb_match_decision: feeds the match decision with the partition results a
// three-stage pipeline would produce: one word per cycle (with random gaps),
// each ending with a hit in a random partition or a miss in the last active
// one, earlier partitions having missed it. The expected port and cycle of each
// final result are worked out per word (dual mode: port p one cycle after the
// word reaches partition p; in-order mode: port 0, num_active cycles after
// entry) and checked by tag. Runs with three and two active partitions in both
// modes.
module tb_match_decision;
  import tcam_pkg::*;
  import tcam_ref_pkg::*;
  localparam int NP = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_order;
  logic [1:0] num_active;
  result_t st [NP];
  result_t res [NP];
  result_t plan [8][NP];
  longint cyc = 0;
  scoreboard sb;

  match_decision #(.NP(NP)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #1000000;
    sb.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end

  task automatic run(bit mode, int na, int words);
    int tag = 0;
    in_order = mode; num_active = 2'(na);
    for (int n = 0; n < words + 4; n++) begin
      @(negedge clk);
      // present the partition results planned for this cycle
      for (int p = 0; p < NP; p++) begin
        st[p] = plan[cyc % 8][p];
        plan[cyc % 8][p] = '0;
      end
      #1;
      for (int p = 0; p < NP; p++) if (res[p].valid) sb.got(p, res[p], cyc);
      // issue a new word entering in this cycle
      if (n < words && $urandom_range(4) != 0) begin
        int f = $urandom_range(na - 1);
        bit hit = (f < na - 1) ? 1'b1 : 1'($urandom_range(1));
        int addr = hit ? $urandom_range(1000) : -1;
        for (int p = 0; p <= f; p++) begin
          result_t r;
          r.valid = 1'b1;
          r.hit   = (p == f) && hit;
          r.addr  = (p == f && hit) ? ADDR_W'(addr) : ADDR_W'($urandom_range(1000));
          r.tag   = TAG_W'(tag);
          plan[(cyc + p + 1) % 8][p] = r;
        end
        // misses in partitions beyond the active ones are never presented
        sb.expect_result(tag, addr, mode ? cyc + na : cyc + f + 1, mode ? 0 : f);
        tag = (tag + 1) % 256;
      end
    end
  endtask

  initial begin
    sb = new("match_decision");
    in_order = 0; num_active = 2'd3;
    for (int p = 0; p < NP; p++) st[p] = '0;
    for (int c = 0; c < 8; c++) for (int p = 0; p < NP; p++) plan[c][p] = '0;
    #12 rst_n = 1;
    run(0, 3, 300);
    run(1, 3, 300);
    run(0, 2, 300);
    run(1, 2, 300);
    sb.final_check();
    $display("TB_RESULT checks=%0d failures=%0d", sb.checks, sb.failures);
    $finish;
  end
endmodule

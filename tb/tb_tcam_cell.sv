// tb_tcam_cell: exhaustive test of the ternary cell. Every stored state
// (0, 1, don't care) is written through the word line and compared against both
// search-line values with the search lines driven and idle. A write with the
// word line low must leave the cell unchanged.
module tb_tcam_cell;
  logic clk = 1'b0;
  logic wl, wr_value, wr_care, sl_en, sl, mismatch;
  int checks = 0, failures = 0;

  tcam_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit exp, string what);
    checks++;
    if (mismatch !== exp) begin
      failures++;
      $display("%s: mismatch=%0d expected %0d", what, mismatch, exp);
    end
  endtask

  initial begin
    wl = 0; wr_value = 0; wr_care = 0; sl_en = 0; sl = 0;
    for (int st = 0; st < 3; st++) begin
      // st 0: stores 0, 1: stores 1, 2: don't care
      @(negedge clk);
      wl = 1; wr_value = (st == 1); wr_care = (st != 2);
      @(negedge clk);
      wl = 0;
      // a write with the word line low must not disturb the cell
      wr_value = ~wr_value; wr_care = ~wr_care;
      @(negedge clk);
      for (int e = 0; e < 2; e++) begin
        for (int b = 0; b < 2; b++) begin
          sl_en = e[0]; sl = b[0];
          #1;
          check(e == 1 && st != 2 && (b != (st == 1 ? 1 : 0)), $sformatf("state %0d en %0d sl %0d", st, e, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

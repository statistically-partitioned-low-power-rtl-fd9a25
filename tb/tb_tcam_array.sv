// tb_tcam_array: a 16-word by 8-bit array is filled with random ternary words
// (some left invalid), then searched with random keys and keys derived from the
// stored words. Every match line is compared with a software model; with the
// search disabled every match line must be low. Entries are later deleted and
// overwritten to check the word-line writes and the valid bits.
module tb_tcam_array;
  localparam int W = 8;
  localparam int D = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en, wr_valid, search_en;
  logic [3:0] wr_idx;
  logic [W-1:0] wr_value, wr_care, search_key;
  logic [D-1:0] match;
  logic [W-1:0] m_value [D];
  logic [W-1:0] m_care  [D];
  bit           m_valid [D];
  int checks = 0, failures = 0;

  tcam_array #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(int idx, logic [W-1:0] v, logic [W-1:0] c, bit vld);
    @(negedge clk);
    wr_en = 1; wr_idx = 4'(idx); wr_value = v; wr_care = c; wr_valid = vld;
    @(negedge clk);
    wr_en = 0;
    m_value[idx] = v; m_care[idx] = c; m_valid[idx] = vld;
  endtask

  task automatic search(logic [W-1:0] key, bit en);
    logic [D-1:0] exp;
    @(negedge clk);
    search_key = key; search_en = en;
    #1;
    for (int i = 0; i < D; i++)
      exp[i] = en && m_valid[i] && (((key ^ m_value[i]) & m_care[i]) == '0);
    checks++;
    if (match !== exp) begin
      failures++;
      $display("key %h en %0d: match %b expected %b", key, en, match, exp);
    end
  endtask

  initial begin
    wr_en = 0; wr_idx = '0; wr_value = '0; wr_care = '0; wr_valid = 0;
    search_en = 0; search_key = '0;
    for (int i = 0; i < D; i++) begin m_value[i] = '0; m_care[i] = '0; m_valid[i] = 0; end
    #12 rst_n = 1;
    // nothing is valid after reset
    search(8'h00, 1);
    for (int i = 0; i < D; i++) begin
      int len = $urandom_range(W);
      logic [W-1:0] c = ~({W{1'b1}} >> len);
      write(i, 8'($urandom()) & c, c, (i % 5) != 3);
    end
    for (int n = 0; n < 400; n++) begin
      logic [W-1:0] k = (n % 2) ? m_value[$urandom_range(D-1)] ^ 8'($urandom_range(3)) : 8'($urandom());
      search(k, (n % 7) != 0);
    end
    // delete and overwrite
    for (int i = 0; i < D; i += 3) write(i, 8'($urandom()), 8'hFF, (i % 2) == 0);
    for (int n = 0; n < 200; n++) begin
      logic [W-1:0] k = (n % 2) ? m_value[$urandom_range(D-1)] : 8'($urandom());
      search(k, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_search_buffer: random load pattern. After each edge the buffer must be
// valid exactly when it was loaded, and hold the last word loaded (it must not
// change when not loaded).
module tb_search_buffer;
  localparam int W = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, valid;
  logic [W-1:0] din, dout, last;
  bit   last_load;
  int checks = 0, failures = 0;

  search_buffer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; din = '0; last = '0; last_load = 0;
    #12 rst_n = 1;
    checks++;
    if (valid !== 1'b0 || dout !== '0) begin failures++; $display("not empty after reset"); end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load = ($urandom_range(2) == 0);
      din  = {$urandom(), 8'($urandom())};
      @(posedge clk);
      if (load) last = din;
      last_load = load;
      #1;
      checks++;
      if (valid !== last_load || dout !== last) begin
        failures++;
        $display("cycle %0d: valid=%0d dout=%h expected %0d %h", n, valid, dout, last_load, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

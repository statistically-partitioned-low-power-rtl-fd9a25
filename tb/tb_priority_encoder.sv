// tb_priority_encoder: the encoder must report the lowest active request.
// Two instances, a power-of-two size (the default, 512) and an odd size (37),
// get directed patterns (none, single bits, top bit) and random sparse vectors;
// the expected index comes from a linear scan.
module tb_priority_encoder;
  localparam int N1 = 512;
  localparam int N2 = 37;
  logic [N1-1:0] req1;
  logic [N2-1:0] req2;
  logic hit1, hit2;
  logic [$clog2(N1)-1:0] addr1;
  logic [$clog2(N2)-1:0] addr2;
  int checks = 0, failures = 0;

  priority_encoder            u1 (.req(req1), .hit(hit1), .addr(addr1));
  priority_encoder #(.N(N2))  u2 (.req(req2), .hit(hit2), .addr(addr2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int first1(logic [N1-1:0] r);
    for (int i = 0; i < N1; i++) if (r[i]) return i;
    return -1;
  endfunction
  function automatic int first2(logic [N2-1:0] r);
    for (int i = 0; i < N2; i++) if (r[i]) return i;
    return -1;
  endfunction

  task automatic check;
    int e1, e2;
    #1;
    e1 = first1(req1);
    e2 = first2(req2);
    checks += 2;
    if (hit1 !== (e1 >= 0) || (e1 >= 0 && int'(addr1) != e1)) begin
      failures++;
      $display("N=512: hit=%0d addr=%0d expected %0d", hit1, addr1, e1);
    end
    if (hit2 !== (e2 >= 0) || (e2 >= 0 && int'(addr2) != e2)) begin
      failures++;
      $display("N=37: hit=%0d addr=%0d expected %0d", hit2, addr2, e2);
    end
  endtask

  initial begin
    req1 = '0; req2 = '0;
    check();
    for (int i = 0; i < N1; i++) begin
      req1 = '0; req1[i] = 1'b1;
      req2 = '0; req2[i % N2] = 1'b1;
      check();
    end
    for (int n = 0; n < 2000; n++) begin
      req1 = '0; req2 = '0;
      for (int k = 0; k < (n % 6); k++) begin
        req1[$urandom_range(N1-1)] = 1'b1;
        req2[$urandom_range(N2-1)] = 1'b1;
      end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tcam_ref_pkg: reference model and scoreboard for the TCAM testbenches.
//
// tcam_ref keeps the table as plain arrays (value, care mask, valid) and finds
// the longest-prefix match the slow way: the lowest valid address whose cared
// bits equal the key. scoreboard records, per request tag, the result, the port
// and the cycle at which the result is due, and checks every result the design
// produces against it.
package tcam_ref_pkg;
  import tcam_pkg::*;

  // Care mask of an IPv4 prefix of length len (0..32): len ones from the top.
  function automatic logic [KEY_W-1:0] prefix_mask(int unsigned len);
    return ~({KEY_W{1'b1}} >> len);
  endfunction

  class tcam_ref;
    int unsigned      size;
    logic [KEY_W-1:0] value [];
    logic [KEY_W-1:0] care  [];
    bit               valid [];

    function new(int unsigned n);
      size  = n;
      value = new[n];
      care  = new[n];
      valid = new[n];
      for (int unsigned i = 0; i < n; i++) begin
        value[i] = '0;
        care[i]  = '0;
        valid[i] = 1'b0;
      end
    endfunction

    function void write(int unsigned a, logic [KEY_W-1:0] v, logic [KEY_W-1:0] c, bit vld);
      value[a] = v;
      care[a]  = c;
      valid[a] = vld;
    endfunction

    // Lowest matching address, or -1.
    function int lookup(logic [KEY_W-1:0] key);
      for (int unsigned i = 0; i < size; i++)
        if (valid[i] && (((key ^ value[i]) & care[i]) == '0)) return int'(i);
      return -1;
    endfunction
  endclass

  class scoreboard;
    string  name;
    int     checks;
    int     failures;
    int     outstanding;
    bit     used  [256];
    bit     e_hit [256];
    int     e_addr[256];
    longint e_due [256];
    int     e_port[256];

    function new(string n);
      name        = n;
      checks      = 0;
      failures    = 0;
      outstanding = 0;
      for (int i = 0; i < 256; i++) used[i] = 1'b0;
    endfunction

    function void expect_result(int tag, int addr, longint due, int port);
      if (used[tag]) begin
        failures++;
        $display("%s: tag %0d issued twice", name, tag);
      end
      used[tag]   = 1'b1;
      e_hit[tag]  = (addr >= 0);
      e_addr[tag] = addr;
      e_due[tag]  = due;
      e_port[tag] = port;
      outstanding++;
    endfunction

    function void got(int port, result_t r, longint now);
      int t = int'(r.tag);
      checks++;
      if (!used[t]) begin
        failures++;
        $display("%s: unexpected result tag %0d on port %0d at %0d", name, t, port, now);
        return;
      end
      if (r.hit !== e_hit[t] || (e_hit[t] && int'(r.addr) != e_addr[t])
          || now != e_due[t] || port != e_port[t]) begin
        failures++;
        $display("%s: tag %0d got hit=%0d addr=%0d port=%0d cycle=%0d, expected hit=%0d addr=%0d port=%0d cycle=%0d",
                 name, t, r.hit, r.addr, port, now, e_hit[t], e_addr[t], e_port[t], e_due[t]);
      end
      used[t] = 1'b0;
      outstanding--;
    endfunction

    function void final_check();
      checks++;
      if (outstanding != 0) begin
        failures++;
        $display("%s: %0d lookups never returned a result", name, outstanding);
      end
    endfunction
  endclass

endpackage

// tb_plru: random touches on a 16-way tree pseudo-LRU, compared with a
// reference that indexes the tree level by level; also checks that the
// victim is never the way touched last and that touching ways 0..15 in order
// leaves way 0 as the victim.
module tb_plru;
  localparam int WAYS = 16, L = 4;
  logic [WAYS-2:0] bits, nbits, rbits;
  logic touch;
  logic [L-1:0] way, victim;
  int checks = 0, failures = 0;

  plru #(.WAYS(WAYS)) dut (.bits_i(bits), .touch_i(touch), .way_i(way),
                           .bits_o(nbits), .victim_o(victim));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [WAYS-2:0] ref_touch(logic [WAYS-2:0] b, int w);
    for (int l = 0; l < L; l++) begin
      int node = (1 << l) - 1 + (w >> (L - l));
      b[node] = ((w >> (L - 1 - l)) & 1) == 0;
    end
    return b;
  endfunction

  function automatic int ref_victim(logic [WAYS-2:0] b);
    int w = 0;
    for (int l = 0; l < L; l++) begin
      int node = (1 << l) - 1 + w;
      w = 2 * w + int'(b[node]);
    end
    return w;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bits = '0; touch = 1;
    for (int k = 0; k < 2000; k++) begin
      way = L'($urandom_range(0, WAYS - 1));
      #1;
      rbits = ref_touch(bits, int'(way));
      check(nbits == rbits, $sformatf("touch %0d: %h vs %h", way, nbits, rbits));
      bits = nbits; #1;
      check(int'(victim) == ref_victim(bits), "victim differs from reference");
      check(victim != way, "victim is the way touched last");
    end
    for (int w = 0; w < WAYS; w++) begin way = L'(w); #1; bits = nbits; end
    #1;
    check(victim == 0, "after touching 0..15 in order the victim is 0");
    touch = 0; way = 5; #1;
    check(nbits == bits, "no touch leaves the bits alone");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

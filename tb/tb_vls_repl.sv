// tb_vls_repl: random LRU states, valid bits and partition masks; checks the
// victim against a reference (first invalid allowed way, else oldest
// allowed way), that it is never a VLS way, and the LRU update.
module tb_vls_repl;
  import vls_pkg::*;
  logic [WAYS-1:0][WAY_W-1:0] age, age_next; logic [WAYS-1:0] valid, allowed;
  logic [WAY_W-1:0] victim, touch_way; logic victim_ok;
  vls_repl dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int perm [4];
    for (int k = 0; k < 3000; k++) begin
      int pw, ev; logic [WAY_W-1:0] best;
      // a random permutation of ages 0..3
      perm = '{0, 1, 2, 3};
      for (int i = 3; i > 0; i--) begin int j, t; j = $urandom_range(0, i); t = perm[i]; perm[i] = perm[j]; perm[j] = t; end
      for (int w = 0; w < 4; w++) age[w] = WAY_W'(perm[w]);
      pw = $urandom_range(0, 3);
      for (int w = 0; w < 4; w++) allowed[w] = w >= pw;
      valid = ($urandom % 3 == 0) ? 4'($urandom) : 4'hF;
      touch_way = WAY_W'($urandom);
      #1;
      ev = -1;
      for (int w = 0; w < 4; w++) if (allowed[w] && !valid[w] && ev < 0) ev = w;
      if (ev < 0) begin
        best = 0;
        for (int w = 0; w < 4; w++) if (allowed[w] && (ev < 0 || age[w] > best)) begin ev = w; best = age[w]; end
      end
      check(victim_ok, "a cache way is always left");
      check(int'(victim) == ev, $sformatf("victim %0d want %0d", victim, ev));
      check(int'(victim) >= pw, "victim outside the VLS partition");
      for (int w = 0; w < 4; w++) begin
        int e;
        e = (w == int'(touch_way)) ? 0 : (age[w] < age[touch_way]) ? int'(age[w]) + 1 : int'(age[w]);
        check(int'(age_next[w]) == e, "LRU update");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// vls_repl: partition-aware victim selection and LRU update for one set.
//
// A miss on regular cached data may only evict ways outside the VLS
// partition (allowed mask); the controller bypasses this block for a VLS
// miss, which always evicts its direct-mapped way whatever it holds. Among
// the allowed ways the first invalid one is taken, otherwise the least
// recently used one (largest age). Ages are a full LRU order: the touched way
// gets age 0 and every way that was younger than it ages by one.
// Purely combinational; the controller stores the ages per set. The
// partitioning rule follows the design description; the description only
// says the cache keeps its conventional replacement policy, and true LRU is
// this design's choice.
module vls_repl
  import vls_pkg::*;
(
  input  logic [WAYS-1:0][WAY_W-1:0] age,
  input  logic [WAYS-1:0]            valid,
  input  logic [WAYS-1:0]            allowed,
  output logic [WAY_W-1:0]           victim,
  output logic                       victim_ok,
  input  logic [WAY_W-1:0]           touch_way,
  output logic [WAYS-1:0][WAY_W-1:0] age_next
);

  always_comb begin
    logic found_inv;
    logic first;
    logic [WAY_W-1:0] best_age;
    victim    = '0;
    victim_ok = |allowed;
    found_inv = 1'b0;
    best_age  = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (allowed[w] && !valid[w] && !found_inv) begin
        found_inv = 1'b1;
        victim    = WAY_W'(w);
      end
    end
    first     = 1'b1;
    if (!found_inv) begin
      for (int w = 0; w < WAYS; w++) begin
        if (allowed[w] && (first || age[w] > best_age)) begin
          first    = 1'b0;
          best_age = age[w];
          victim   = WAY_W'(w);
        end
      end
    end
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) == touch_way)        age_next[w] = '0;
      else if (age[w] < age[touch_way])  age_next[w] = age[w] + 1'b1;
      else                               age_next[w] = age[w];
    end
  end

endmodule

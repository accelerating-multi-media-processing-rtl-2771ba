// tb_memo_table: self-checking testbench for the MEMO-TABLE.
//
// Two tables are driven cycle by cycle with random lookups and writes drawn
// from a small operand pool, so that sets fill up and entries are evicted:
// a commutative 32-entry 4-way table hashed as floating point, and a
// non-commutative 16-entry 2-way table hashed as integer. A reference model
// keeps each set as a list in most-recently-used order (least recently used
// evicted when a set is full) and predicts hit/miss and the returned value
// every cycle, including a lookup that matches the entry being written in
// the same cycle. The test counts hits, swapped-order hits, same-cycle
// bypass hits and evictions, and fails if any of them never happened.
module tb_memo_table;
  import memo_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- the two tables ----------------
  logic        lk_valid [2];
  logic [63:0] lk_a [2], lk_b [2], wr_a [2], wr_b [2], wr_res [2];
  logic        wr_en [2];
  logic        lk_hit [2];
  logic [63:0] lk_res [2];

  memo_table #(.ENTRIES(32), .WAYS(4), .OP(OP_FMUL), .COMMUTATIVE(1'b1)) u_t0 (
    .clk, .rst_n, .lk_valid(lk_valid[0]), .lk_a(lk_a[0]), .lk_b(lk_b[0]),
    .lk_hit(lk_hit[0]), .lk_result(lk_res[0]), .wr_en(wr_en[0]), .wr_a(wr_a[0]),
    .wr_b(wr_b[0]), .wr_result(wr_res[0]));

  memo_table #(.ENTRIES(16), .WAYS(2), .OP(OP_IMUL), .COMMUTATIVE(1'b0)) u_t1 (
    .clk, .rst_n, .lk_valid(lk_valid[1]), .lk_a(lk_a[1]), .lk_b(lk_b[1]),
    .lk_hit(lk_hit[1]), .lk_result(lk_res[1]), .wr_en(wr_en[1]), .wr_a(wr_a[1]),
    .wr_b(wr_b[1]), .wr_result(wr_res[1]));

  // ---------------- reference model ----------------
  typedef struct { logic [63:0] a, b, r; } ent_t;
  ent_t model [2][8][$];          // [table][set], index 0 = most recently used
  int   ways_of [2] = '{4, 2};
  int   sets_of [2] = '{8, 8};
  bit   comm_of [2] = '{1, 0};
  int   n_hit = 0, n_swap = 0, n_bypass = 0, n_evict = 0, n_miss = 0;

  function automatic int set_idx(int t, logic [63:0] a, logic [63:0] b);
    if (t == 0) return int'(a[51:49] ^ b[51:49]);
    else        return int'(a[2:0] ^ b[2:0]);
  endfunction

  function automatic bit same(int t, ent_t e, logic [63:0] a, logic [63:0] b);
    return (e.a == a && e.b == b) || (comm_of[t] && e.a == b && e.b == a);
  endfunction

  function automatic int find(int t, logic [63:0] a, logic [63:0] b);
    int s;
    s = set_idx(t, a, b);
    foreach (model[t][s][i]) if (same(t, model[t][s][i], a, b)) return i;
    return -1;
  endfunction

  function automatic logic [63:0] res_of(logic [63:0] a, logic [63:0] b);
    return (a ^ b) + (a & b) * 64'd3 + 64'h1234;   // symmetric in a and b
  endfunction

  logic [63:0] pool [12];

  initial begin
    foreach (pool[i]) pool[i] = {$urandom, $urandom};
    for (int t = 0; t < 2; t++) begin
      lk_valid[t] = 0; wr_en[t] = 0;
      lk_a[t] = 0; lk_b[t] = 0; wr_a[t] = 0; wr_b[t] = 0; wr_res[t] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int  pos [2], wset [2], lset [2];
      bit  exp_hit [2], stored_hit [2];
      logic [63:0] exp_r [2];
      @(negedge clk);
      for (int t = 0; t < 2; t++) begin
        lk_valid[t] = ($urandom % 8) != 0;
        lk_a[t] = pool[$urandom % 12];
        lk_b[t] = pool[$urandom % 12];
        wr_en[t] = 0;
        if ($urandom % 2) begin
          // write an operation that is not yet stored; sometimes the very
          // operands being looked up, to exercise the same-cycle bypass
          if ($urandom % 3 == 0) begin wr_a[t] = lk_a[t]; wr_b[t] = lk_b[t]; end
          else begin wr_a[t] = pool[$urandom % 12]; wr_b[t] = pool[$urandom % 12]; end
          wr_res[t] = res_of(wr_a[t], wr_b[t]);
          wr_en[t]  = find(t, wr_a[t], wr_b[t]) < 0;
        end
        // expected lookup outcome
        pos[t]        = find(t, lk_a[t], lk_b[t]);
        stored_hit[t] = lk_valid[t] && pos[t] >= 0;
        exp_hit[t]    = lk_valid[t] && (pos[t] >= 0 || (wr_en[t] && (
                          (wr_a[t] == lk_a[t] && wr_b[t] == lk_b[t]) ||
                          (comm_of[t] && wr_a[t] == lk_b[t] && wr_b[t] == lk_a[t]))));
        exp_r[t]      = res_of(lk_a[t], lk_b[t]);
      end
      #1;
      for (int t = 0; t < 2; t++) begin
        checks++;
        if (lk_hit[t] !== exp_hit[t]) begin
          failures++;
          $display("FAIL t%0d cyc %0d: hit %b expected %b", t, cyc, lk_hit[t], exp_hit[t]);
        end else if (exp_hit[t]) begin
          checks++;
          if (lk_res[t] !== exp_r[t]) begin
            failures++;
            $display("FAIL t%0d cyc %0d: result %h expected %h", t, cyc, lk_res[t], exp_r[t]);
          end
        end
        if (exp_hit[t]) begin
          n_hit++;
          if (!stored_hit[t]) n_bypass++;
          if (comm_of[t] && lk_a[t] != lk_b[t] && stored_hit[t] &&
              model[t][set_idx(t, lk_a[t], lk_b[t])][pos[t]].a == lk_b[t]) n_swap++;
        end else if (lk_valid[t]) n_miss++;
      end
      // update the model as the clock edge updates the table
      for (int t = 0; t < 2; t++) begin
        lset[t] = set_idx(t, lk_a[t], lk_b[t]);
        wset[t] = set_idx(t, wr_a[t], wr_b[t]);
        if (stored_hit[t] && !(wr_en[t] && wset[t] == lset[t])) begin
          ent_t e;
          e = model[t][lset[t]][pos[t]];
          model[t][lset[t]].delete(pos[t]);
          model[t][lset[t]].push_front(e);
        end
        if (wr_en[t]) begin
          model[t][wset[t]].push_front('{wr_a[t], wr_b[t], wr_res[t]});
          if (model[t][wset[t]].size() > ways_of[t]) begin
            void'(model[t][wset[t]].pop_back());
            n_evict++;
          end
        end
      end
    end
    $display("hits %0d (swapped %0d, bypass %0d) misses %0d evictions %0d",
             n_hit, n_swap, n_bypass, n_miss, n_evict);
    checks++;
    if (n_hit == 0 || n_swap == 0 || n_bypass == 0 || n_evict == 0 || n_miss == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

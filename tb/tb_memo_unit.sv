// tb_memo_unit: self-checking testbench for a computation unit with its
// MEMO-TABLE.
//
// Two units run side by side: a divider (non-commutative, 39-cycle latency)
// and a floating-point multiplier (commutative, 5-cycle latency), both with
// 32-entry 4-way tables. Each is fed operations drawn from a small pool of
// values, as in low-entropy image data, plus some trivial operations. A
// reference model of the table (each set a list in most-recently-used
// order) predicts for every operation whether it is trivial, a hit or a
// miss; the testbench checks the result value against reference arithmetic,
// the reported source, the latency (1 cycle for hit or trivial, LAT for a
// miss), that the unit is free again right after a hit (the computation
// was aborted) and busy during a miss. It counts hits, misses, trivial
// operations, reuse of a result in the cycle right after it was computed,
// swapped-operand hits and evictions, and fails if one never happened.
module tb_memo_unit;
  import memo_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned LAT_DIV = 39;
  localparam int unsigned LAT_MUL = 5;
  localparam int unsigned NOPS    = 3000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        in_valid [2];
  logic        in_ready [2];
  logic [63:0] in_a [2], in_b [2];
  wb_t         out [2];

  memo_unit #(.OP(OP_FDIV), .LAT(LAT_DIV)) u_div (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_a(in_a[0]), .in_b(in_b[0]), .out(out[0]));

  memo_unit #(.OP(OP_FMUL), .LAT(LAT_MUL)) u_mul (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_a(in_a[1]), .in_b(in_b[1]), .out(out[1]));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference table model ----------------
  typedef struct { logic [63:0] a, b; } ops_t;
  ops_t model [2][8][$];
  int   n_hit [2], n_miss [2], n_triv [2], n_next [2], n_swap [2], n_evict [2], n_stall [2];

  function automatic int set_idx(logic [63:0] a, logic [63:0] b);
    return int'(a[51:49] ^ b[51:49]);
  endfunction

  function automatic int find(int u, logic [63:0] a, logic [63:0] b);
    int s;
    s = set_idx(a, b);
    foreach (model[u][s][i])
      if ((model[u][s][i].a == a && model[u][s][i].b == b) ||
          (u == 1 && model[u][s][i].a == b && model[u][s][i].b == a)) return i;
    return -1;
  endfunction

  function automatic void insert(int u, logic [63:0] a, logic [63:0] b);
    int s;
    s = set_idx(a, b);
    model[u][s].push_front('{a, b});
    if (model[u][s].size() > 4) begin
      void'(model[u][s].pop_back());
      n_evict[u]++;
    end
  endfunction

  task automatic drive(input int u);
    logic [63:0] pool [10];
    logic [63:0] x, y, exp_r;
    src_e        exp_src;
    int          lat, pos, exp_lat, s;
    bit          pending, bypass;
    logic [63:0] pend_a, pend_b;
    foreach (pool[i]) pool[i] = rand_norm(8);
    pending = 0;
    pend_a  = 0;
    pend_b  = 0;
    for (int n = 0; n < NOPS; n++) begin
      // operands: mostly from the pool, sometimes a trivial value
      x = pool[$urandom % 10];
      y = pool[$urandom % 10];
      case ($urandom % 16)
        0: y = ONE;
        1: x = 64'h0;
        default: ;
      endcase
      // expected outcome, evaluated at issue against the model
      exp_r = (u == 0) ? ref_fdiv(x, y) : ref_fmul(x, y);
      pos   = -1;
      s     = set_idx(x, y);
      if (ref_trivial(u + 1, x, y)) begin
        exp_src = SRC_TRIVIAL; exp_lat = 1; n_triv[u]++;
        if (pending) insert(u, pend_a, pend_b);
      end else begin
        // the lookup sees the table as it was before this cycle's write,
        // plus the result being written (bypass)
        pos    = find(u, x, y);
        bypass = pending && ((pend_a == x && pend_b == y) ||
                             (u == 1 && pend_a == y && pend_b == x));
        if (pending) insert(u, pend_a, pend_b);
        if (pos >= 0 || bypass) begin
          exp_src = SRC_MEMO; exp_lat = 1; n_hit[u]++;
          if (bypass) n_next[u]++;
          // a hit makes its entry most recent unless this cycle's write
          // went to the same set
          if (pos >= 0 && !(pending && set_idx(pend_a, pend_b) == s)) begin
            ops_t e;
            pos = find(u, x, y);
            e   = model[u][s][pos];
            if (e.a != x) n_swap[u]++;
            model[u][s].delete(pos);
            model[u][s].push_front(e);
          end
        end else begin
          exp_src = SRC_CU; exp_lat = (u == 0) ? LAT_DIV : LAT_MUL; n_miss[u]++;
        end
      end
      pending = 0;
      in_valid[u] = 1; in_a[u] = x; in_b[u] = y;
      checks++;
      if (!in_ready[u]) begin failures++; $display("FAIL u%0d not ready", u); end
      @(negedge clk);
      in_valid[u] = 0;
      lat = 1;
      if (exp_src != SRC_CU) begin
        checks++;
        if (!in_ready[u]) begin failures++; $display("FAIL u%0d busy after hit", u); end
      end
      while (!out[u].valid && lat < 100) begin
        if (!in_ready[u]) n_stall[u]++;
        @(negedge clk);
        lat++;
      end
      checks += 3;
      if (out[u].result !== exp_r) begin
        failures++;
        $display("FAIL u%0d op %0d: %h,%h -> %h expected %h", u, n, x, y, out[u].result, exp_r);
      end
      if (out[u].src !== exp_src) begin
        failures++;
        $display("FAIL u%0d op %0d: source %s expected %s", u, n, out[u].src.name(), exp_src.name());
      end
      if (lat != exp_lat) begin
        failures++;
        $display("FAIL u%0d op %0d: latency %0d expected %0d", u, n, lat, exp_lat);
      end
      if (exp_src == SRC_CU) begin
        pending = 1; pend_a = x; pend_b = y;
      end
      // sometimes leave the unit idle for a cycle
      if ($urandom % 4 == 0) begin
        @(negedge clk);
        if (pending) insert(u, pend_a, pend_b);
        pending = 0;
      end
    end
  endtask

  initial begin
    for (int u = 0; u < 2; u++) begin
      in_valid[u] = 0; in_a[u] = 0; in_b[u] = 0;
      n_hit[u] = 0; n_miss[u] = 0; n_triv[u] = 0; n_next[u] = 0;
      n_swap[u] = 0; n_evict[u] = 0; n_stall[u] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      drive(0);
      drive(1);
    join
    for (int u = 0; u < 2; u++) begin
      $display("unit %0d: hits %0d misses %0d trivial %0d reuse-next-cycle %0d swapped %0d evictions %0d stall cycles %0d",
               u, n_hit[u], n_miss[u], n_triv[u], n_next[u], n_swap[u], n_evict[u], n_stall[u]);
      checks++;
      if (n_hit[u] == 0 || n_miss[u] == 0 || n_triv[u] == 0 || n_next[u] == 0 ||
          n_evict[u] == 0 || n_stall[u] == 0 || (u == 1 && n_swap[u] == 0)) begin
        failures++;
        $display("FAIL unit %0d: a mechanism never happened", u);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

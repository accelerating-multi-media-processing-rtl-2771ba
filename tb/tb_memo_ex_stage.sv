// tb_memo_ex_stage: end-to-end testbench of the memoing execution stage at
// its default parameters (32-entry 4-way tables; integer multiply 3, fp
// multiply 5, fp divide 39 cycles).
//
// A random stream of integer multiplies, fp multiplies and fp divides is
// issued through the single decode port. Operands come from small pools per
// operation (about a dozen values, as in a low-entropy image region) mixed
// with zeros and ones. Every result is checked against reference
// arithmetic; its source must agree with the operation: trivial exactly
// when the operation is trivial, a table hit only for operands the unit has
// computed before, with a latency of 1 for hits and trivial operations and
// the unit's full latency otherwise. The test counts, per unit, hits,
// misses, trivial operations, re-computation of evicted operations, reuse
// of a result in the cycle it was produced, issue stalls on a busy unit,
// and results that overtake an older division, and fails if one of these
// never happened. It prints the hit ratio of each table.
module tb_memo_ex_stage;
  import memo_pkg::*;
  import tb_ref_pkg::*;

  localparam int NOPS = 20000;
  localparam int LATS [3] = '{3, 5, 39};

  logic        clk = 0, rst_n = 0;
  logic        id_valid, id_ready;
  op_e         id_op;
  logic [63:0] id_a, id_b;
  wb_t         wb [NUM_OPS];

  memo_ex_stage dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- per-unit bookkeeping ----------------
  typedef struct {
    bit          busy;
    logic [63:0] a, b, r;
    longint      cyc;
    bit          triv;
    bit          seen;     // operands computed by this unit before
  } fl_t;

  fl_t         infl [3];
  bit          seen [3][logic [127:0]];
  int          n_hit [3], n_miss [3], n_triv [3], n_recomp [3], n_next [3];
  int          n_stall = 0, n_ooo = 0, n_done = 0;
  logic [63:0] pool [3][12];
  logic [127:0] just_done [3];
  bit          just_done_v [3];

  function automatic logic [63:0] ref_op(int u, logic [63:0] a, logic [63:0] b);
    case (u)
      0:       return ref_imul(a, b);
      1:       return ref_fmul(a, b);
      default: return ref_fdiv(a, b);
    endcase
  endfunction

  function automatic logic [127:0] key(int u, logic [63:0] a, logic [63:0] b);
    // multiplications are commutative: store one canonical order
    if (u != 2 && a > b) return {b, a};
    return {a, b};
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    int   u, lat;
    bit   holding;
    id_valid = 0; id_op = OP_IMUL; id_a = 0; id_b = 0;
    holding  = 0;
    for (int i = 0; i < 3; i++) begin
      infl[i].busy = 0;
      n_hit[i] = 0; n_miss[i] = 0; n_triv[i] = 0; n_recomp[i] = 0; n_next[i] = 0;
      just_done_v[i] = 0;
      for (int j = 0; j < 12; j++)
        pool[i][j] = (i == 0) ? 64'($urandom % 256) : rand_norm(6);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (n_done < NOPS) begin
      @(negedge clk);
      // ---- results ----
      for (int k = 0; k < 3; k++) begin
        just_done_v[k] = 0;
        if (wb[k].valid) begin
          checks++;
          if (!infl[k].busy) begin
            failures++; $display("FAIL unit %0d: result with nothing in flight", k);
            continue;
          end
          lat = int'(cyc - infl[k].cyc);
          checks += 3;
          if (wb[k].result !== infl[k].r) begin
            failures++;
            $display("FAIL unit %0d: %h,%h -> %h expected %h", k, infl[k].a, infl[k].b,
                     wb[k].result, infl[k].r);
          end
          if ((wb[k].src == SRC_TRIVIAL) != infl[k].triv ||
              (wb[k].src == SRC_MEMO && !infl[k].seen)) begin
            failures++;
            $display("FAIL unit %0d: source %s (trivial %b, seen %b)", k, wb[k].src.name(),
                     infl[k].triv, infl[k].seen);
          end
          if (lat != ((wb[k].src == SRC_CU) ? LATS[k] : 1)) begin
            failures++;
            $display("FAIL unit %0d: latency %0d for source %s", k, lat, wb[k].src.name());
          end
          case (wb[k].src)
            SRC_TRIVIAL: n_triv[k]++;
            SRC_MEMO:    n_hit[k]++;
            default: begin
              n_miss[k]++;
              if (infl[k].seen) n_recomp[k]++;
              just_done[k]   = key(k, infl[k].a, infl[k].b);
              just_done_v[k] = 1;
            end
          endcase
          if (!infl[k].triv) seen[k][key(k, infl[k].a, infl[k].b)] = 1;
          // an older division still running: this result overtook it
          if (k != 2 && infl[2].busy && infl[2].cyc < infl[k].cyc) n_ooo++;
          infl[k].busy = 0;
          n_done++;
        end
      end
      // ---- issue ----
      if (!holding) begin
        if ($urandom % 8 != 0) begin
          logic [63:0] x, y;
          u = $urandom % 3;
          x = pool[u][$urandom % 12];
          y = pool[u][$urandom % 12];
          case ($urandom % 20)
            0: x = 0;
            1: y = (u == 0) ? 64'd1 : ONE;
            default: ;
          endcase
          // now and then repeat the operation that has just completed
          if (just_done_v[u] && $urandom % 2 == 0) begin
            x = just_done[u][127:64]; y = just_done[u][63:0];
          end
          id_valid = 1; id_op = op_e'(u); id_a = x; id_b = y;
          holding  = 1;
        end else begin
          id_valid = 0;
        end
      end
      #1;
      if (id_valid) begin
        if (!id_ready) n_stall++;
        else begin
          u = int'(id_op);
          checks++;
          if (infl[u].busy) begin failures++; $display("FAIL unit %0d accepted while busy", u); end
          infl[u].busy = 1;
          infl[u].a    = id_a;
          infl[u].b    = id_b;
          infl[u].r    = ref_op(u, id_a, id_b);
          infl[u].cyc  = cyc;       // the accepting edge is cycle cyc+1
          infl[u].triv = ref_trivial(u, id_a, id_b);
          infl[u].seen = seen[u].exists(key(u, id_a, id_b));
          if (just_done_v[u] && key(u, id_a, id_b) == just_done[u]) n_next[u]++;
          holding = 0;
        end
      end
    end
    for (int k = 0; k < 3; k++) begin
      $display("unit %0d: hits %0d misses %0d trivial %0d hit ratio (non-trivial) %0.2f recomputed %0d reuse-next-cycle %0d",
               k, n_hit[k], n_miss[k], n_triv[k],
               real'(n_hit[k]) / real'(n_hit[k] + n_miss[k]), n_recomp[k], n_next[k]);
      checks++;
      if (n_hit[k] == 0 || n_miss[k] == 0 || n_triv[k] == 0 || n_recomp[k] == 0 || n_next[k] == 0) begin
        failures++; $display("FAIL unit %0d: a mechanism never happened", k);
      end
    end
    $display("issue stalls %0d, results overtaking a division %0d", n_stall, n_ooo);
    checks++;
    if (n_stall == 0 || n_ooo == 0) begin failures++; $display("FAIL stall or overtaking never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

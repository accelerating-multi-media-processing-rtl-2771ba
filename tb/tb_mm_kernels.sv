// tb_mm_kernels: image-processing style workloads on the memoing execution
// stage, on the two machines the technique is evaluated for.
//
// The operation stream of tb_mm_pkg (Sobel-type edge sums, local contrast,
// neighbour ratios over a generated low-entropy 32x32 image) is issued one
// operation at a time, as an in-order processor without overlap would, to
// three copies of the stage: the default one (fp multiply 5, fp divide 39
// cycles), a faster one (3 and 13 cycles), and the default one with the
// trivial-operation detector switched off (TRIVIAL_EN = 0), which then
// computes and stores trivial operations too. Every result is checked
// against reference arithmetic and its latency against its source (1 cycle
// for hit or trivial, else the unit latency). Per machine and unit the
// testbench reports the share of trivial operations, the hit ratio over
// non-trivial operations, the hit ratio counting trivial operations as hits
// (for the machine without detector: over all operations, trivial ones
// stored in the table like any other) and the speedup of the arithmetic
// itself (cycles
// without memoing over cycles with it, which is the speedup-enhanced term
// dc/((1-hr)dc+hr) when trivial operations count as hits). It fails if a
// unit never hits.
module tb_mm_kernels;
  import memo_pkg::*;
  import tb_ref_pkg::*;
  import tb_mm_pkg::*;

  localparam int M = 3;
  localparam int LATS [M][3] = '{'{3, 5, 39}, '{3, 3, 13}, '{3, 5, 39}};

  logic        clk = 0, rst_n = 0;
  logic        id_valid = 0;
  logic        id_ready [M];
  op_e         id_op = OP_IMUL;
  logic [63:0] id_a = 0, id_b = 0;
  wb_t         wb [M][NUM_OPS];

  memo_ex_stage dut (
    .clk, .rst_n, .id_valid, .id_ready(id_ready[0]), .id_op, .id_a, .id_b, .wb(wb[0]));

  memo_ex_stage #(.FMUL_LAT(3), .FDIV_LAT(13)) dut_fast (
    .clk, .rst_n, .id_valid, .id_ready(id_ready[1]), .id_op, .id_a, .id_b, .wb(wb[1]));

  memo_ex_stage #(.TRIVIAL_EN(1'b0)) dut_notriv (
    .clk, .rst_n, .id_valid, .id_ready(id_ready[2]), .id_op, .id_a, .id_b, .wb(wb[2]));

  always #5 clk = ~clk;

  int     checks = 0, failures = 0;
  int     n_ops [3], n_hit [M][3], n_triv [M][3];
  longint cyc_memo [M][3], cyc_base [M][3];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // issue one operation to all machines, wait for all results, check them
  task automatic issue(input int u, input logic [63:0] a, input logic [63:0] b);
    bit got [M];
    int left;
    logic [63:0] exp;
    exp = (u == 0) ? ref_imul(a, b) : (u == 1) ? ref_fmul(a, b) : ref_fdiv(a, b);
    @(negedge clk);
    id_valid = 1; id_op = op_e'(u); id_a = a; id_b = b;
    #1;
    checks++;
    if (!id_ready[0] || !id_ready[1] || !id_ready[2]) begin
      failures++;
      $display("FAIL unit %0d not ready", u);
    end
    @(negedge clk);
    id_valid = 0;
    got = '{0, 0, 0};
    left = M;
    for (int t = 1; t < 100 && left > 0; t++) begin
      for (int m = 0; m < M; m++) begin
        if (!got[m] && wb[m][u].valid) begin
          got[m] = 1;
          left--;
          checks += 2;
          if (wb[m][u].result !== exp) begin
            failures++;
            $display("FAIL machine %0d unit %0d: %h,%h -> %h expected %h", m, u, a, b,
                     wb[m][u].result, exp);
          end
          if (t != ((wb[m][u].src == SRC_CU) ? LATS[m][u] : 1)) begin
            failures++;
            $display("FAIL machine %0d unit %0d: latency %0d source %s", m, u, t,
                     wb[m][u].src.name());
          end
          if (wb[m][u].src == SRC_MEMO)    n_hit[m][u]++;
          if (wb[m][u].src == SRC_TRIVIAL) n_triv[m][u]++;
          cyc_memo[m][u] += t;
          cyc_base[m][u] += LATS[m][u];
        end
      end
      if (left > 0) @(negedge clk);
    end
    checks++;
    if (left > 0) begin failures++; $display("FAIL unit %0d: no result", u); end
    n_ops[u]++;
  endtask

  mm_op_t ops [$];

  initial begin
    for (int u = 0; u < 3; u++) begin
      n_ops[u] = 0;
      for (int m = 0; m < M; m++) begin
        n_hit[m][u] = 0; n_triv[m][u] = 0; cyc_memo[m][u] = 0; cyc_base[m][u] = 0;
      end
    end
    make_ops(make_image(), ops);
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (ops[i]) issue(ops[i].u, ops[i].a, ops[i].b);
    for (int m = 0; m < M; m++) begin
      $display("machine %0d (latencies %0d/%0d/%0d, trivial-operation detector %s):", m,
               LATS[m][0], LATS[m][1], LATS[m][2], (m == 2) ? "off" : "on ");
      for (int u = 0; u < 3; u++) begin
        if (m == 2)
          $display("  unit %0d: operations %0d, hit ratio (all stored) %0.2f, arithmetic cycles %0d -> %0d, speedup %0.2f",
                   u, n_ops[u], real'(n_hit[m][u]) / real'(n_ops[u]),
                   cyc_base[m][u], cyc_memo[m][u], real'(cyc_base[m][u]) / real'(cyc_memo[m][u]));
        else
          $display("  unit %0d: operations %0d, trivial %0.2f, hit ratio %0.2f (non-trivial) %0.2f (trivial as hits), arithmetic cycles %0d -> %0d, speedup %0.2f",
                   u, n_ops[u], real'(n_triv[m][u]) / real'(n_ops[u]),
                   real'(n_hit[m][u]) / real'(n_ops[u] - n_triv[m][u]),
                   real'(n_hit[m][u] + n_triv[m][u]) / real'(n_ops[u]),
                   cyc_base[m][u], cyc_memo[m][u], real'(cyc_base[m][u]) / real'(cyc_memo[m][u]));
        checks += 2;
        if (n_hit[m][u] == 0) begin failures++; $display("FAIL unit %0d never hit", u); end
        if ((m == 2) != (n_triv[m][u] == 0)) begin
          failures++;
          $display("FAIL machine %0d unit %0d: %0d trivial results", m, u, n_triv[m][u]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

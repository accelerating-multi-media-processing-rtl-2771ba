// tb_lut_sweep: MEMO-TABLE size and associativity sweep on an image
// workload.
//
// The kernel operation stream of tb_mm_pkg, on a generated image with 24
// grey levels, is fed to fp-multiply and fp-divide memoing units with
// different tables: 8, 16, 32, 64 and 256 entries at 4 ways, and 1, 2, 4
// and 8 ways at 32 entries. Every operation goes to all units of its kind
// at once; each result is checked against reference arithmetic and its
// latency against its source. The testbench prints the hit ratio (over
// non-trivial operations) of every table size and associativity, and fails
// if a table never hits.
module tb_lut_sweep;
  import memo_pkg::*;
  import tb_ref_pkg::*;
  import tb_mm_pkg::*;

  localparam int NC = 8;
  localparam int ENT  [NC] = '{8, 16, 32, 64, 256, 32, 32, 32};
  localparam int WAY  [NC] = '{4, 4, 4, 4, 4, 1, 2, 8};
  localparam int LATS [2]  = '{5, 39};

  logic        clk = 0, rst_n = 0;
  logic        in_valid [2];
  logic [63:0] in_a = 0, in_b = 0;
  logic        in_ready [2][NC];
  wb_t         out [2][NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    memo_unit #(.OP(OP_FMUL), .LAT(LATS[0]), .ENTRIES(ENT[c]), .WAYS(WAY[c])) u_mul (
      .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0][c]),
      .in_a, .in_b, .out(out[0][c]));
    memo_unit #(.OP(OP_FDIV), .LAT(LATS[1]), .ENTRIES(ENT[c]), .WAYS(WAY[c])) u_div (
      .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1][c]),
      .in_a, .in_b, .out(out[1][c]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ops [2], n_hit [2][NC], n_triv [2];

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input int k, input logic [63:0] a, input logic [63:0] b);
    bit          got [NC];
    int          left;
    logic [63:0] exp;
    exp = (k == 0) ? ref_fmul(a, b) : ref_fdiv(a, b);
    @(negedge clk);
    in_valid[k] = 1; in_a = a; in_b = b;
    @(negedge clk);
    in_valid[k] = 0;
    foreach (got[c]) got[c] = 0;
    left = NC;
    for (int t = 1; t < 100 && left > 0; t++) begin
      for (int c = 0; c < NC; c++) begin
        if (!got[c] && out[k][c].valid) begin
          got[c] = 1;
          left--;
          checks += 2;
          if (out[k][c].result !== exp) begin
            failures++;
            $display("FAIL %0d/%0d unit %0d: %h,%h -> %h expected %h", ENT[c], WAY[c], k, a, b,
                     out[k][c].result, exp);
          end
          if (t != ((out[k][c].src == SRC_CU) ? LATS[k] : 1)) begin
            failures++;
            $display("FAIL %0d/%0d unit %0d: latency %0d", ENT[c], WAY[c], k, t);
          end
          if (out[k][c].src == SRC_MEMO) n_hit[k][c]++;
          if (c == 0 && out[k][c].src == SRC_TRIVIAL) n_triv[k]++;
        end
      end
      if (left > 0) @(negedge clk);
    end
    checks++;
    if (left != 0) begin failures++; $display("FAIL unit %0d: missing results", k); end
    n_ops[k]++;
  endtask

  mm_op_t ops [$];

  initial begin
    in_valid = '{0, 0};
    n_ops = '{0, 0};
    n_triv = '{0, 0};
    for (int k = 0; k < 2; k++) for (int c = 0; c < NC; c++) n_hit[k][c] = 0;
    make_ops(make_image(24), ops);
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (ops[i]) if (ops[i].u != 0) issue(ops[i].u - 1, ops[i].a, ops[i].b);
    for (int k = 0; k < 2; k++) begin
      $display("%s: %0d operations, %0d trivial", (k == 0) ? "fp multiply" : "fp divide",
               n_ops[k], n_triv[k]);
      for (int c = 0; c < NC; c++) begin
        $display("  %0d entries, %0d-way: hit ratio %0.3f", ENT[c], WAY[c],
                 real'(n_hit[k][c]) / real'(n_ops[k] - n_triv[k]));
        checks++;
        if (n_hit[k][c] == 0) begin failures++; $display("FAIL table %0d/%0d never hit", ENT[c], WAY[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

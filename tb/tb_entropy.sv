// tb_entropy: hit ratio against image entropy.
//
// One fp-multiply and one fp-divide memoing unit, both with the default
// 32-entry 4-way table and the default latencies (5 and 39 cycles), run the
// kernel operation stream of tb_mm_pkg over a series of generated images
// whose pixel noise, and so whose entropy, grows from one image to the
// next. The units are reset before each image. Every result is checked
// against reference arithmetic and its latency against its source. For each
// image the testbench prints the entropy of the whole image, the mean
// entropy of its 8x8 windows and the hit ratio (over non-trivial
// operations) of each unit; it fails if the lowest-entropy image does not
// hit more often than the highest-entropy one.
module tb_entropy;
  import memo_pkg::*;
  import tb_ref_pkg::*;
  import tb_mm_pkg::*;

  localparam int NI = 6;
  localparam int NOISE [NI] = '{0, 1, 3, 7, 15, 63};
  localparam int LATS  [2]  = '{5, 39};

  logic        clk = 0, rst_n = 0;
  logic        in_valid [2];
  logic [63:0] in_a = 0, in_b = 0;
  logic        in_ready [2];
  wb_t         out [2];

  memo_unit #(.OP(OP_FMUL), .LAT(LATS[0])) u_mul (
    .clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_a, .in_b, .out(out[0]));
  memo_unit #(.OP(OP_FDIV), .LAT(LATS[1])) u_div (
    .clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_a, .in_b, .out(out[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_ops [2], n_hit [2], n_triv [2];
  real ratio [NI][2];

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(input int k, input logic [63:0] a, input logic [63:0] b);
    int          t;
    logic [63:0] exp;
    exp = (k == 0) ? ref_fmul(a, b) : ref_fdiv(a, b);
    @(negedge clk);
    checks++;
    if (!in_ready[k]) begin failures++; $display("FAIL unit %0d not ready", k); end
    in_valid[k] = 1; in_a = a; in_b = b;
    @(negedge clk);
    in_valid[k] = 0;
    t = 1;
    while (!out[k].valid && t < 100) begin
      @(negedge clk);
      t++;
    end
    checks += 2;
    if (out[k].result !== exp) begin
      failures++;
      $display("FAIL unit %0d: %h,%h -> %h expected %h", k, a, b, out[k].result, exp);
    end
    if (t != ((out[k].src == SRC_CU) ? LATS[k] : 1)) begin
      failures++;
      $display("FAIL unit %0d: latency %0d", k, t);
    end
    n_ops[k]++;
    if (out[k].src == SRC_MEMO)    n_hit[k]++;
    if (out[k].src == SRC_TRIVIAL) n_triv[k]++;
  endtask

  mm_op_t ops [$];
  image_t img;

  initial begin
    in_valid = '{0, 0};
    for (int n = 0; n < NI; n++) begin
      img = make_image(6, NOISE[n]);
      make_ops(img, ops);
      n_ops = '{0, 0}; n_hit = '{0, 0}; n_triv = '{0, 0};
      rst_n = 0;
      repeat (3) @(negedge clk);
      rst_n = 1;
      foreach (ops[i]) if (ops[i].u != 0) issue(ops[i].u - 1, ops[i].a, ops[i].b);
      for (int k = 0; k < 2; k++) ratio[n][k] = real'(n_hit[k]) / real'(n_ops[k] - n_triv[k]);
      $display("noise 0..%0d: entropy %0.2f bits (image), %0.2f bits (8x8 windows); hit ratio fp multiply %0.3f, fp divide %0.3f",
               NOISE[n], image_entropy(img), window_entropy(img), ratio[n][0], ratio[n][1]);
    end
    for (int k = 0; k < 2; k++) begin
      checks++;
      if (!(ratio[0][k] > ratio[NI-1][k])) begin
        failures++;
        $display("FAIL unit %0d: hit ratio does not fall with entropy", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

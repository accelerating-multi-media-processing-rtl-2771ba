// tb_trivial_detect: self-checking testbench for the trivial-operation
// detector of all three operations. Pairs drawn from zeros, ones, infinities,
// NaNs, subnormals and random values are classified against a restated rule
// set, and every value the detector returns is compared with what the full
// operation (reference arithmetic) gives for the same operands.
module tb_trivial_detect;
  import memo_pkg::*;
  import tb_ref_pkg::*;

  logic [63:0] a, b;
  logic        triv [3];
  logic [63:0] res  [3];
  int          checks = 0, failures = 0;
  int          n_triv [3] = '{0, 0, 0};

  trivial_detect #(.OP(OP_IMUL)) u_imul (.a(a), .b(b), .triv(triv[0]), .result(res[0]));
  trivial_detect #(.OP(OP_FMUL)) u_fmul (.a(a), .b(b), .triv(triv[1]), .result(res[1]));
  trivial_detect #(.OP(OP_FDIV)) u_fdiv (.a(a), .b(b), .triv(triv[2]), .result(res[2]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] vals [14] = '{64'h0, 64'h8000_0000_0000_0000, 64'h3FF0_0000_0000_0000,
                             64'hBFF0_0000_0000_0000, 64'h1, 64'h7FF0_0000_0000_0000,
                             64'hFFF0_0000_0000_0000, 64'h7FF8_0000_0000_0000,
                             64'h0008_0000_0000_0000, 64'h4000_0000_0000_0000,
                             64'hC059_0000_0000_0000, 64'h3FE0_0000_0000_0000,
                             64'h2, 64'hFFFF_FFFF_FFFF_FFFF};

  task automatic check_pair(input logic [63:0] x, input logic [63:0] y);
    logic [63:0] full;
    a = x; b = y;
    #1;
    for (int op = 0; op < 3; op++) begin
      checks++;
      if (triv[op] !== ref_trivial(op, x, y)) begin
        failures++;
        $display("FAIL op%0d %h,%h: triv=%b expected %b", op, x, y, triv[op], ref_trivial(op, x, y));
      end
      if (triv[op]) begin
        n_triv[op]++;
        full = (op == 0) ? ref_imul(x, y) : (op == 1) ? ref_fmul(x, y) : ref_fdiv(x, y);
        checks++;
        if (res[op] !== full) begin
          failures++;
          $display("FAIL op%0d %h,%h: result %h, full operation gives %h", op, x, y, res[op], full);
        end
      end
    end
  endtask

  initial begin
    foreach (vals[i]) foreach (vals[j]) check_pair(vals[i], vals[j]);
    for (int i = 0; i < 2000; i++) begin
      logic [63:0] x, y;
      x = ($urandom % 4 == 0) ? vals[$urandom % 14] : rand_norm(20);
      y = ($urandom % 4 == 0) ? vals[$urandom % 14] : rand_norm(20);
      check_pair(x, y);
    end
    for (int op = 0; op < 3; op++) begin
      checks++;
      if (n_triv[op] == 0) begin
        failures++;
        $display("FAIL op%0d never trivial", op);
      end
    end
    $display("trivial counts: imul %0d fmul %0d fdiv %0d", n_triv[0], n_triv[1], n_triv[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

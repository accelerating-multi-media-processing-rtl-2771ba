// tb_fp_div: self-checking testbench for the multi-cycle double-precision
// divider. Random normal operands, overflow and underflow cases and all
// combinations of zero, infinity, NaN and normal operands are compared with
// the simulator's own double arithmetic (subnormals read and produced as
// zero, NaN canonical). The start-to-done latency must be LAT cycles, and
// an aborted operation must produce no done pulse.
module tb_fp_div;
  import tb_ref_pkg::*;

  localparam int unsigned LAT = 39;

  logic        clk = 0, rst_n = 0;
  logic        start = 0, abort_op = 0;
  logic [63:0] a = 0, b = 0;
  logic        busy, done;
  logic [63:0] result;
  int          checks = 0, failures = 0;

  fp_div #(.LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] x, input logic [63:0] y);
    int lat;
    logic [63:0] exp;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    exp = ref_fdiv(x, y);
    checks++;
    if (result !== exp) begin
      failures++;
      $display("FAIL %h / %h = %h, expected %h", x, y, result, exp);
    end
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, LAT);
    end
  endtask

  logic [63:0] sp [8] = '{64'h0, 64'h8000_0000_0000_0000, 64'h7FF0_0000_0000_0000,
                          64'hFFF0_0000_0000_0000, 64'h7FF8_0000_0000_0001,
                          64'h3FF0_0000_0000_0000, 64'hC008_0000_0000_0000,
                          64'h0000_0000_0000_0123};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run($realtobits(1.5), $realtobits(2.0));
    run($realtobits(-3.25), $realtobits(0.1));
    run($realtobits(1.0/3.0), $realtobits(3.0));
    foreach (sp[i]) foreach (sp[j]) run(sp[i], sp[j]);
    run($realtobits(1.0e300), $realtobits(1.0e-10));   // overflow
    run($realtobits(1.0e-300), $realtobits(1.0e10)); // underflow
    for (int i = 0; i < 2000; i++) run(rand_norm(300), rand_norm(300));
    // significands near one, where rounding carries into the exponent
    for (int i = 0; i < 300; i++)
      run({1'b0, 11'd1023, 32'hFFFF_FFFF, 20'hFFFFF - 20'($urandom % 64)},
          {1'b0, 11'd1023, 20'h0, $urandom});
    // abort in flight: no done may follow
    @(negedge clk);
    a = $realtobits(2.5); b = $realtobits(7.5); start = 1;
    @(negedge clk);
    start = 0; abort_op = 1;
    @(negedge clk);
    abort_op = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after abort"); end
    for (int i = 0; i < LAT + 2; i++) begin
      @(negedge clk);
      if (done) begin failures++; $display("FAIL done after abort"); end
    end
    run($realtobits(2.5), $realtobits(7.5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

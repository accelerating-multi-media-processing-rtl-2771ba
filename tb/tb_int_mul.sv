// tb_int_mul: self-checking testbench for the multi-cycle integer
// multiplier. Two instances run on the same operands: the default 3-cycle
// one (a single 64-bit iteration) and a 7-cycle one (five iterations of 13
// bits), so the shift-and-add sequencing is exercised too. Random and
// corner-case operands are compared with a 128-bit reference product; the
// start-to-done latency of each must be its LAT for every operation, and an
// operation aborted in flight must produce no done pulse.
module tb_int_mul;
  import tb_ref_pkg::*;

  localparam int unsigned LAT  = 3;
  localparam int unsigned LAT2 = 7;

  logic        clk = 0, rst_n = 0;
  logic        start = 0, abort_op = 0;
  logic [63:0] a = 0, b = 0;
  logic        busy, done;
  logic [63:0] result;
  int          checks = 0, failures = 0;

  int_mul #(.LAT(LAT)) dut (.*);

  logic        busy2, done2;
  logic [63:0] result2;
  int_mul #(.LAT(LAT2)) dut2 (.clk, .rst_n, .start, .abort_op, .a, .b,
                              .busy(busy2), .done(done2), .result(result2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] x, input logic [63:0] y);
    int lat, lat1, lat2;
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat  = 1;
    lat1 = 0;
    lat2 = 0;
    while ((lat1 == 0 || lat2 == 0) && lat < 50) begin
      if (done) begin
        lat1 = lat;
        checks++;
        if (result !== ref_imul(x, y)) begin
          failures++;
          $display("FAIL %h * %h = %h, expected %h", x, y, result, ref_imul(x, y));
        end
      end
      if (done2) begin
        lat2 = lat;
        checks++;
        if (result2 !== ref_imul(x, y)) begin
          failures++;
          $display("FAIL (LAT %0d) %h * %h = %h, expected %h", LAT2, x, y, result2, ref_imul(x, y));
        end
      end
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (lat1 != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat1, LAT);
    end
    if (lat2 != LAT2) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat2, LAT2);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(64'd3, 64'd7);
    run('1, '1);
    run(64'h8000_0000_0000_0000, 64'd2);
    run(64'hFFFF_FFFF, 64'hFFFF_FFFF);
    for (int i = 0; i < 500; i++) run({$urandom, $urandom}, {$urandom, $urandom});
    // abort in flight: no done may follow
    @(negedge clk);
    a = 64'd5; b = 64'd9; start = 1;
    @(negedge clk);
    start = 0; abort_op = 1;
    @(negedge clk);
    abort_op = 0;
    checks++;
    if (busy || busy2) begin failures++; $display("FAIL busy after abort"); end
    for (int i = 0; i < LAT2 + 2; i++) begin
      @(negedge clk);
      if (done || done2) begin failures++; $display("FAIL done after abort"); end
    end
    // abort together with start: nothing starts
    a = 64'd5; b = 64'd9; start = 1; abort_op = 1;
    @(negedge clk);
    start = 0; abort_op = 0;
    checks++;
    if (busy || busy2) begin failures++; $display("FAIL started despite abort"); end
    run(64'd11, 64'd13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fp_div: multi-cycle IEEE-754 double-precision divider, the DIVISION UNIT
// next to the floating-point-divide MEMO-TABLE.
//
// At start the operands are unpacked. NaN, 0/0 and inf/inf give NaN;
// infinity divided by anything finite, or a non-zero value divided by zero,
// gives signed infinity; zero divided by anything non-zero, or a finite
// value divided by infinity, gives signed zero. Otherwise the significands
// (both in [1,2)) are divided by restoring division: each step compares the
// partial remainder with the divisor, emits one quotient bit and shifts.
// 56 quotient bits (weights 2^0 .. 2^-55) are produced, SPC = ceil(56/(LAT-2))
// per cycle over LAT-2 iteration cycles; a final cycle normalises the
// quotient (in (0.5,2)), rounds to nearest even using the last bits and the
// remainder as sticky, and packs the result.
//
// Interface: start loads a (dividend) and b (divisor) when busy is low;
// abort_op cancels the division in progress or, with start, keeps it from
// starting; done pulses for one cycle with result valid.
// Timing: start in cycle 0 gives done in cycle LAT; the next start can come
// in the cycle of done.
//
// The document names the unit and evaluates latencies of 13 and 39 cycles;
// the default of 39 is the slower of the two processors it models. The
// radix-2 restoring algorithm with several steps per cycle, the
// non-pipelined operation, subnormals read and produced as zero, the
// canonical NaN and the abort_op port are this design's choices.
module fp_div
  import memo_pkg::*;
#(
  parameter int unsigned LAT = 39
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            abort_op,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            busy,
  output logic            done,
  output logic [XLEN-1:0] result
);

  localparam int unsigned QBITS  = 56;
  localparam int unsigned N_ITER = LAT - 2;
  localparam int unsigned SPC    = (QBITS + N_ITER - 1) / N_ITER;
  localparam int unsigned CNT_W  = $clog2(LAT);

  initial assert (LAT >= 3) else $error("fp_div: LAT must be at least 3");

  logic               sgn;
  logic signed [13:0] exp_diff;
  logic [54:0]        rem;      // partial remainder, < 2*divisor
  logic [52:0]        dvs;      // divisor significand
  logic [QBITS-1:0]   quo;
  logic               special;
  logic [63:0]        special_res;
  logic [CNT_W-1:0]   cnt;

  fclass_e            ca, cb;
  logic [63:0]        sp_res;
  logic               sp;
  always_comb begin
    ca     = fp_class(a);
    cb     = fp_class(b);
    sp     = 1'b1;
    sp_res = '0;
    if (ca == FC_NAN || cb == FC_NAN ||
        (ca == FC_ZERO && cb == FC_ZERO) || (ca == FC_INF && cb == FC_INF))
      sp_res = FP_QNAN;
    else if (ca == FC_INF || cb == FC_ZERO)
      sp_res = fp_inf(a[63] ^ b[63]);
    else if (ca == FC_ZERO || cb == FC_INF)
      sp_res = fp_zero(a[63] ^ b[63]);
    else
      sp = 1'b0;
  end

  // SPC restoring-division steps, starting at quotient bit index base
  logic [54:0]      rem_n;
  logic [QBITS-1:0] quo_n;
  always_comb begin
    rem_n = rem;
    quo_n = quo;
    for (int unsigned k = 0; k < SPC; k++) begin
      if (int'(cnt) * int'(SPC) + int'(k) < int'(QBITS)) begin
        quo_n = quo_n << 1;
        if (rem_n >= {2'b0, dvs}) begin
          rem_n    = rem_n - {2'b0, dvs};
          quo_n[0] = 1'b1;
        end
        rem_n = rem_n << 1;
      end
    end
  end

  logic [63:0] fin;
  always_comb begin
    if (special)
      fin = special_res;
    else if (quo[55])
      fin = fp_round_pack(sgn, exp_diff, quo[55:3], quo[2], |quo[1:0] || rem != '0);
    else
      fin = fp_round_pack(sgn, exp_diff - 14'sd1, quo[54:2], quo[1], quo[0] || rem != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      cnt         <= '0;
      sgn         <= 1'b0;
      exp_diff    <= '0;
      rem         <= '0;
      dvs         <= '0;
      quo         <= '0;
      special     <= 1'b0;
      special_res <= '0;
      result      <= '0;
    end else begin
      done <= 1'b0;
      if (abort_op) begin
        busy <= 1'b0;
      end else if (start && !busy) begin
        busy        <= 1'b1;
        cnt         <= '0;
        sgn         <= a[63] ^ b[63];
        exp_diff    <= $signed({3'b0, a[62:52]}) - $signed({3'b0, b[62:52]}) + 14'sd1023;
        rem         <= {2'b0, 1'b1, a[51:0]};
        dvs         <= {1'b1, b[51:0]};
        quo         <= '0;
        special     <= sp;
        special_res <= sp_res;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == CNT_W'(LAT - 2)) begin
          result <= fin;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          rem <= rem_n;
          quo <= quo_n;
        end
      end
    end
  end

endmodule

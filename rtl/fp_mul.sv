// fp_mul: multi-cycle IEEE-754 double-precision multiplier, the computation
// unit next to the floating-point-multiply MEMO-TABLE.
//
// At start the operands are unpacked: sign, biased exponents and 53-bit
// significands with the hidden bit. Zero, infinity and NaN operands decide
// the result at once (NaN for NaN or infinity times zero, else infinity,
// else signed zero). Otherwise the 106-bit significand product is built by
// shift-and-add over LAT-2 iteration cycles, BPC = ceil(53/(LAT-2)) bits of
// the second significand per cycle, and a final cycle normalises, rounds to
// nearest even and packs the result.
//
// Interface: start loads a and b when busy is low; abort_op cancels the
// operation in progress or, with start, keeps it from starting; done pulses
// for one cycle with result valid.
// Timing: start in cycle 0 gives done in cycle LAT; the next start can come
// in the cycle of done.
//
// The document names this unit and evaluates latencies of 3 and 5 cycles;
// the default of 5 is the slower of the two processors it models. The
// algorithm, the non-pipelined operation, subnormals read and produced as
// zero, the canonical NaN and the abort_op port are this design's choices.
module fp_mul
  import memo_pkg::*;
#(
  parameter int unsigned LAT = 5
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

  localparam int unsigned N_ITER = LAT - 2;
  localparam int unsigned BPC    = (53 + N_ITER - 1) / N_ITER;
  localparam int unsigned CNT_W  = $clog2(LAT);

  initial assert (LAT >= 3) else $error("fp_mul: LAT must be at least 3");

  logic               sgn;
  logic signed [13:0] exp_sum;
  logic [105:0]       ma_sh, acc;
  logic [52:0]        mb_sh;
  logic               special;
  logic [63:0]        special_res;
  logic [CNT_W-1:0]   cnt;

  // special-case decision at start
  fclass_e            ca, cb;
  logic [63:0]        sp_res;
  logic               sp;
  always_comb begin
    ca     = fp_class(a);
    cb     = fp_class(b);
    sp     = 1'b1;
    sp_res = '0;
    if (ca == FC_NAN || cb == FC_NAN ||
        (ca == FC_INF && cb == FC_ZERO) || (ca == FC_ZERO && cb == FC_INF))
      sp_res = FP_QNAN;
    else if (ca == FC_INF || cb == FC_INF)
      sp_res = fp_inf(a[63] ^ b[63]);
    else if (ca == FC_ZERO || cb == FC_ZERO)
      sp_res = fp_zero(a[63] ^ b[63]);
    else
      sp = 1'b0;
  end

  // normalise, round and pack the finished product
  logic [63:0] fin;
  always_comb begin
    if (special)
      fin = special_res;
    else if (acc[105])
      fin = fp_round_pack(sgn, exp_sum + 14'sd1, acc[105:53], acc[52], |acc[51:0]);
    else
      fin = fp_round_pack(sgn, exp_sum, acc[104:52], acc[51], |acc[50:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      cnt         <= '0;
      sgn         <= 1'b0;
      exp_sum     <= '0;
      ma_sh       <= '0;
      mb_sh       <= '0;
      acc         <= '0;
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
        exp_sum     <= $signed({3'b0, a[62:52]}) + $signed({3'b0, b[62:52]}) - 14'sd1023;
        ma_sh       <= {53'd0, 1'b1, a[51:0]};
        mb_sh       <= {1'b1, b[51:0]};
        acc         <= '0;
        special     <= sp;
        special_res <= sp_res;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == CNT_W'(LAT - 2)) begin
          result <= fin;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          acc   <= acc + ma_sh * 106'(mb_sh[BPC-1:0]);
          ma_sh <= ma_sh << BPC;
          mb_sh <= mb_sh >> BPC;
        end
      end
    end
  end

endmodule

// int_mul: multi-cycle 64-bit integer multiplier, the computation unit
// that sits next to the integer-multiply MEMO-TABLE.
//
// It returns the low 64 bits of a*b (the same for signed and unsigned
// operands). The product is built by shift-and-add: in each of the LAT-2
// iteration cycles BPC = ceil(64/(LAT-2)) bits of b are multiplied by a and
// added into an accumulator; one more cycle registers the result.
//
// Interface: start loads a and b when the unit is idle (busy low). abort_op
// cancels the operation in progress, or, together with start, keeps the
// operation from starting; the MEMO-TABLE uses it on a hit. done pulses
// for one cycle with result valid.
// Timing: start in cycle 0 gives done in cycle LAT; busy is high in cycles
// 1 .. LAT-1, so the next start can come in the cycle of done.
//
// The document gives only that such a unit exists and takes several cycles;
// the shift-and-add structure, the non-pipelined one-at-a-time operation,
// the abort_op port and the default latency of 3 cycles are this design's.
module int_mul
  import memo_pkg::*;
#(
  parameter int unsigned LAT = 3
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
  localparam int unsigned BPC    = (XLEN + N_ITER - 1) / N_ITER;
  localparam int unsigned CNT_W  = $clog2(LAT);

  initial assert (LAT >= 3) else $error("int_mul: LAT must be at least 3");

  logic [XLEN-1:0]  a_sh, b_sh, acc;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      cnt    <= '0;
      a_sh   <= '0;
      b_sh   <= '0;
      acc    <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (abort_op) begin
        busy <= 1'b0;
      end else if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= '0;
        a_sh <= a;
        b_sh <= b;
        acc  <= '0;
      end else if (busy) begin
        cnt <= cnt + 1'b1;
        if (cnt == CNT_W'(LAT - 2)) begin
          result <= acc;
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          acc  <= acc + a_sh * XLEN'(b_sh[BPC-1:0]);
          a_sh <= a_sh << BPC;
          b_sh <= b_sh >> BPC;
        end
      end
    end
  end

endmodule

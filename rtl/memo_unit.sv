// memo_unit: a multi-cycle computation unit (CU) with its MEMO-TABLE.
//
// The operands of an issued operation go at the same time to the CU, to the
// MEMO-TABLE and to the trivial-operation detector. In the issue cycle:
//   - a trivial operation (multiply by 0 or 1, divide by 1, divide 0) is
//     answered by the detector; the CU is aborted and the table untouched;
//   - a MEMO-TABLE hit returns the stored result; the CU is aborted;
//   - on a miss the CU runs to completion. When it signals completion its
//     result goes to the output and, in the same cycle, into the table.
// A multiplexer picks the output: the registered table or detector value
// after a hit or trivial operation, the CU result when it completes.
//
// Interface: in_valid/in_ready issue handshake (an operation is accepted
// when both are high); in_ready is low while the CU is busy with a miss.
// out is one result toward write-back: valid for one cycle, the value and
// where it came from (table, detector or CU).
// Timing: hit or trivial: result one cycle after issue, and the unit is
// ready again at once. Miss: result LAT cycles after issue; the next
// operation can issue in the cycle the result appears, and it already sees
// the new table entry.
//
// From the method: the parallel lookup and computation, abort on hit, no
// penalty on a miss, the table update in parallel with forwarding the
// result, comparing both operand orders for commutative operations, and
// answering trivial operations without storing them. Choices of this
// design: the valid/ready issue handshake, the one-cycle registered result
// on a hit, the non-pipelined CU and the TRIVIAL_EN switch.
module memo_unit
  import memo_pkg::*;
#(
  parameter op_e         OP         = OP_FDIV,
  parameter int unsigned LAT        = 39,
  parameter int unsigned ENTRIES    = 32,
  parameter int unsigned WAYS       = 4,
  parameter bit          TRIVIAL_EN = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  logic [XLEN-1:0] in_a,
  input  logic [XLEN-1:0] in_b,
  output wb_t             out
);

  localparam bit COMMUTATIVE = (OP != OP_FDIV);

  logic            fire;
  logic            triv;
  logic [XLEN-1:0] triv_res;
  logic            lk_hit;
  logic [XLEN-1:0] lk_res;
  logic            cu_busy, cu_done, cu_abort;
  logic [XLEN-1:0] cu_res;

  // operands of the operation the CU is working on, for the table update
  logic [XLEN-1:0] op_a_q, op_b_q;

  // registered single-cycle result (table hit or trivial)
  logic            fast_valid_q;
  logic [XLEN-1:0] fast_res_q;
  src_e            fast_src_q;

  assign in_ready = !cu_busy;
  assign fire     = in_valid && in_ready;

  // ---------------- trivial operation detector ----------------
  logic            triv_raw;
  trivial_detect #(.OP(OP)) u_triv (
    .a      (in_a),
    .b      (in_b),
    .triv   (triv_raw),
    .result (triv_res)
  );
  assign triv = TRIVIAL_EN && triv_raw;

  // ---------------- MEMO-TABLE ----------------
  memo_table #(
    .ENTRIES     (ENTRIES),
    .WAYS        (WAYS),
    .OP          (OP),
    .COMMUTATIVE (COMMUTATIVE)
  ) u_table (
    .clk       (clk),
    .rst_n     (rst_n),
    .lk_valid  (fire && !triv),
    .lk_a      (in_a),
    .lk_b      (in_b),
    .lk_hit    (lk_hit),
    .lk_result (lk_res),
    .wr_en     (cu_done),
    .wr_a      (op_a_q),
    .wr_b      (op_b_q),
    .wr_result (cu_res)
  );

  // ---------------- computation unit ----------------
  assign cu_abort = fire && (triv || lk_hit);

  if (OP == OP_IMUL) begin : g_cu
    int_mul #(.LAT(LAT)) u_cu (
      .clk(clk), .rst_n(rst_n), .start(fire), .abort_op(cu_abort),
      .a(in_a), .b(in_b), .busy(cu_busy), .done(cu_done), .result(cu_res));
  end else if (OP == OP_FMUL) begin : g_cu
    fp_mul #(.LAT(LAT)) u_cu (
      .clk(clk), .rst_n(rst_n), .start(fire), .abort_op(cu_abort),
      .a(in_a), .b(in_b), .busy(cu_busy), .done(cu_done), .result(cu_res));
  end else begin : g_cu
    fp_div #(.LAT(LAT)) u_cu (
      .clk(clk), .rst_n(rst_n), .start(fire), .abort_op(cu_abort),
      .a(in_a), .b(in_b), .busy(cu_busy), .done(cu_done), .result(cu_res));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_a_q       <= '0;
      op_b_q       <= '0;
      fast_valid_q <= 1'b0;
      fast_res_q   <= '0;
      fast_src_q   <= SRC_CU;
    end else begin
      fast_valid_q <= fire && (triv || lk_hit);
      if (fire) begin
        op_a_q     <= in_a;
        op_b_q     <= in_b;
        fast_res_q <= triv ? triv_res : lk_res;
        fast_src_q <= triv ? SRC_TRIVIAL : SRC_MEMO;
      end
    end
  end

  // ---------------- result multiplexer ----------------
  always_comb begin
    out.valid  = fast_valid_q || cu_done;
    out.result = fast_valid_q ? fast_res_q : cu_res;
    out.src    = fast_valid_q ? fast_src_q : SRC_CU;
  end

  // The table/detector path and the CU never complete in the same cycle.
  a_one_source: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(fast_valid_q && cu_done));

endmodule

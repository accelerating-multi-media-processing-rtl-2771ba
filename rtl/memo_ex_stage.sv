// memo_ex_stage: the multi-cycle part of a processor's execution stage with
// memoing: an integer multiplier, a floating-point multiplier and a
// floating-point divider, each paired with its own MEMO-TABLE.
//
// The decode stage issues one operation at a time: an opcode and two 64-bit
// operands. The opcode selects the unit; the operation is accepted when
// that unit is ready (its computation unit is not busy with a miss). Each
// unit returns its results on its own write-back port, so a result from
// the table (one cycle) can overtake a long division still in progress in
// another unit, which is the out-of-order completion the surrounding
// pipeline must already handle for multi-cycle units.
//
// Interface: id_valid/id_ready handshake with id_op, id_a, id_b; wb[op] is
// the result port of the unit for operation op (valid for one cycle, value,
// and whether it came from the table, the trivial-operation detector or the
// computation unit).
// Timing: a hit or trivial operation returns in one cycle; a miss in
// IMUL_LAT, FMUL_LAT or FDIV_LAT cycles.
//
// From the method: a MEMO-TABLE of 32 entries, 4-way set associative, next
// to each of the integer multiplier, fp multiplier and fp divider, with
// trivial operations answered directly and not stored; fp latencies of 5
// and 39 cycles (the slower processor evaluated). Choices of this design:
// the single issue port with a handshake, the separate write-back ports,
// and the integer multiply latency of 3.
module memo_ex_stage
  import memo_pkg::*;
#(
  parameter int unsigned ENTRIES    = 32,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned IMUL_LAT   = 3,
  parameter int unsigned FMUL_LAT   = 5,
  parameter int unsigned FDIV_LAT   = 39,
  parameter bit          TRIVIAL_EN = 1'b1
) (
  input  logic            clk,
  input  logic            rst_n,
  // from instruction decode
  input  logic            id_valid,
  output logic            id_ready,
  input  op_e             id_op,
  input  logic [XLEN-1:0] id_a,
  input  logic [XLEN-1:0] id_b,
  // toward write-back, one port per unit, indexed by op_e
  output wb_t             wb [NUM_OPS]
);

  logic [NUM_OPS-1:0] unit_ready;
  logic [NUM_OPS-1:0] unit_valid;

  always_comb begin
    for (int unsigned i = 0; i < NUM_OPS; i++)
      unit_valid[i] = id_valid && (id_op == op_e'(i));
    id_ready = (id_op inside {OP_IMUL, OP_FMUL, OP_FDIV}) ? unit_ready[id_op] : 1'b0;
  end

  memo_unit #(
    .OP(OP_IMUL), .LAT(IMUL_LAT), .ENTRIES(ENTRIES), .WAYS(WAYS), .TRIVIAL_EN(TRIVIAL_EN)
  ) u_imul (
    .clk(clk), .rst_n(rst_n),
    .in_valid(unit_valid[OP_IMUL]), .in_ready(unit_ready[OP_IMUL]),
    .in_a(id_a), .in_b(id_b), .out(wb[OP_IMUL]));

  memo_unit #(
    .OP(OP_FMUL), .LAT(FMUL_LAT), .ENTRIES(ENTRIES), .WAYS(WAYS), .TRIVIAL_EN(TRIVIAL_EN)
  ) u_fmul (
    .clk(clk), .rst_n(rst_n),
    .in_valid(unit_valid[OP_FMUL]), .in_ready(unit_ready[OP_FMUL]),
    .in_a(id_a), .in_b(id_b), .out(wb[OP_FMUL]));

  memo_unit #(
    .OP(OP_FDIV), .LAT(FDIV_LAT), .ENTRIES(ENTRIES), .WAYS(WAYS), .TRIVIAL_EN(TRIVIAL_EN)
  ) u_fdiv (
    .clk(clk), .rst_n(rst_n),
    .in_valid(unit_valid[OP_FDIV]), .in_ready(unit_ready[OP_FDIV]),
    .in_a(id_a), .in_b(id_b), .out(wb[OP_FDIV]));

  // An operation waiting for a busy unit keeps its opcode and operands.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           id_valid && !id_ready |=> id_valid && $stable(id_op) &&
                                                     $stable(id_a) && $stable(id_b));

endmodule

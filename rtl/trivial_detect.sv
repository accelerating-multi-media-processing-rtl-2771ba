// trivial_detect: recognises operations whose result needs no computation
// and produces that result directly.
//
// Multiplying by 0 or 1, dividing by 1 and dividing 0 are answered without
// the computation unit and are never entered into the MEMO-TABLE, so the
// table keeps its entries for operations that are worth remembering. The
// returned value is exactly what the computation unit would return:
//   integer multiply: a*0 = 0*b = 0, a*1 = a, 1*b = b
//   fp multiply:      x*(+1.0) = x for x zero or normal; x*(+-0) = signed
//                     zero for x zero or normal
//   fp divide:        x/(+1.0) = x for x zero or normal; (+-0)/y = signed
//                     zero for y normal or infinite
// Cases that involve NaN, infinity times zero, or a zero divisor are left
// to the computation unit. Subnormal operands count as zero, as they do in
// the floating-point units.
//
// Interface and timing: purely combinational; triv is high when the
// operation is trivial and result then holds its value.
//
// From the method: which operations are trivial (multiply by 1 or 0,
// divide by 1, divide 0) and that they are detected before the table and
// answered at once. Choices of this design: only +1.0 counts as one, and
// the exact handling of signs and special values listed above.
module trivial_detect
  import memo_pkg::*;
#(
  parameter op_e OP = OP_FDIV
) (
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            triv,
  output logic [XLEN-1:0] result
);

  fclass_e ca, cb;
  logic    sgn;

  always_comb begin
    ca     = fp_class(a);
    cb     = fp_class(b);
    sgn    = a[63] ^ b[63];
    triv   = 1'b0;
    result = '0;
    unique case (OP)
      OP_IMUL: begin
        if (a == '0 || b == '0) begin
          triv = 1'b1; result = '0;
        end else if (a == XLEN'(1)) begin
          triv = 1'b1; result = b;
        end else if (b == XLEN'(1)) begin
          triv = 1'b1; result = a;
        end
      end
      OP_FMUL: begin
        if ((ca == FC_ZERO && cb inside {FC_ZERO, FC_NORM}) ||
            (cb == FC_ZERO && ca == FC_NORM)) begin
          triv = 1'b1; result = fp_zero(sgn);
        end else if (b == FP_ONE && ca == FC_NORM) begin
          triv = 1'b1; result = a;
        end else if (a == FP_ONE && cb == FC_NORM) begin
          triv = 1'b1; result = b;
        end
      end
      default: begin // OP_FDIV
        if (ca == FC_ZERO && cb inside {FC_NORM, FC_INF}) begin
          triv = 1'b1; result = fp_zero(sgn);
        end else if (b == FP_ONE && ca == FC_NORM) begin
          triv = 1'b1; result = a;
        end
      end
    endcase
  end

endmodule

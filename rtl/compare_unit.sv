// compare_unit - the compare logic of a filtering stage.
//
// Decides whether one tuple field satisfies a predicate "field <op> value".
// The operator set is the standard one of the document: not equal, equal,
// greater, greater or equal, less, less or equal, and nop (always true).
// The 3-bit operator encoding is this design's choice (see ndp_pkg::cmp_op_e);
// codes 7 and above behave like nop. The field type selects how the two
// W-bit words are ordered (W is the padded field width, ELEM_W by default):
//   FT_UINT   unsigned integers
//   FT_SINT   two's-complement integers (the tuple buffer sign-extends them)
//   FT_FLOAT  IEEE 754 numbers of W bits (binary32 for W = 32, binary64
//             for 64). The sign-magnitude code is mapped onto an
//             unsigned key that sorts like the numbers (negative: invert all
//             bits; positive: invert the sign bit); +0 and -0 are equal. A NaN
//             operand is unordered: only != holds (and nop).
//
// Interface: purely combinational, result valid in the cycle the inputs are.
module compare_unit
  import ndp_pkg::*;
#(
  parameter int unsigned W = ELEM_W
) (
  input  logic [W-1:0] a,          // selected tuple field
  input  logic [W-1:0] b,          // compare_value
  input  logic [2:0]   op,         // operator_select
  input  ftype_e       ftype,      // type of the selected field
  output logic         match
);
  localparam int unsigned EXP_W = (W == 64) ? 11 : (W == 16) ? 5 : 8;
  localparam int unsigned MAN_W = W - 1 - EXP_W;

  typedef logic [W-1:0] val_t;

  logic  eq, lt, a_nan, b_nan, both_zero;
  val_t ka, kb;

  function automatic val_t fkey(val_t x);
    return x[W-1] ? ~x : (x ^ {1'b1, {(W-1){1'b0}}});
  endfunction

  function automatic logic is_nan(val_t x);
    return (&x[W-2 -: EXP_W]) && (|x[MAN_W-1:0]);
  endfunction

  always_comb begin
    ka        = fkey(a);
    kb        = fkey(b);
    a_nan     = is_nan(a);
    b_nan     = is_nan(b);
    both_zero = (a[W-2:0] == '0) && (b[W-2:0] == '0);
    unique case (ftype)
      FT_SINT: begin
        eq = (a == b);
        lt = $signed(a) < $signed(b);
      end
      FT_FLOAT: begin
        eq = !a_nan && !b_nan && ((a == b) || both_zero);
        lt = !a_nan && !b_nan && !both_zero && (ka < kb);
      end
      default: begin
        eq = (a == b);
        lt = a < b;
      end
    endcase
    unique case (op)
      OP_EQ:   match = eq;
      OP_NE:   match = !eq;
      OP_GT:   match = !lt && !eq && !(ftype == FT_FLOAT && (a_nan || b_nan));
      OP_GE:   match = (!lt || eq) && !(ftype == FT_FLOAT && (a_nan || b_nan));
      OP_LT:   match = lt;
      OP_LE:   match = lt || eq;
      default: match = 1'b1;       // OP_NOP and unused codes
    endcase
  end
endmodule

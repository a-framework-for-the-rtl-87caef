// data_transform - maps each tuple of the input struct onto the output struct.
//
// Output field j takes input field FMT.out_src[j], cut to its output width
// FMT.out_w[j]; the string postfix is carried over unchanged. This one table
// covers the three cases of the document: identical structs (identity table),
// a mapping derived by matching field names, and a mapping the user gives
// explicitly. The table itself is produced when the PE is specialised.
// Block-end markers ('last', 'empty') pass through untouched.
//
// Interface: in_* valid/ready from the last filter stage, out_* the head of
// the transform's output tuple FIFO. ITEM_T and OITEM_T are the input and
// output stream item types built from FMT (see ndp_pe); the defaults are the
// package format.
// Timing: one tuple per cycle, one cycle from input to out_*.
module data_transform
  import ndp_pkg::*;
#(
  parameter fmt_t        FMT       = FMT_DEFAULT,
  parameter type         ITEM_T    = titem_t,
  parameter type         OITEM_T   = oitem_t,
  parameter int unsigned OUT_DEPTH = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  logic   in_valid,
  output logic   in_ready,
  input  ITEM_T  in_item,
  output logic   out_valid,
  input  logic   out_ready,
  output OITEM_T out_item
);
  OITEM_T mapped;

  always_comb begin
    mapped.last      = in_item.last;
    mapped.empty     = in_item.empty;
    mapped.t.postfix = in_item.t.postfix;
    for (int j = 0; j < FMT.n_out; j++) begin
      mapped.t.elem[j] = '0;
      for (int b = 0; b < FMT.elem_w; b++)
        if (b < FMT.out_w[j]) mapped.t.elem[j][b] = in_item.t.elem[FMT.out_src[j]][b];
    end
  end

  sync_fifo #(.T(OITEM_T), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .clr,
    .in_valid, .in_ready, .in_data(mapped),
    .out_valid, .out_ready, .out_data(out_item), .count()
  );
endmodule

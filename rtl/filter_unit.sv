// filter_unit - one chainable filtering stage.
//
// Each cycle the tuple at the head of the upstream FIFO is dequeued, the field
// chosen by col_sel is routed through a multiplexer into the compare unit,
// which tests it against cmp_val with operator op_sel. A tuple that matches is
// enqueued into this stage's output FIFO, one that does not is dropped. The
// output FIFO is the input FIFO of the next stage, so stages chain directly
// and a chain evaluates a conjunction of predicates at one tuple per cycle.
//
// Block ends travel with the stream: an item carrying 'last' is never
// dropped. If its tuple fails the predicate it is forwarded marked 'empty',
// so the units behind still see where the block ends. Empty items are not
// compared.
//
// Interface: in_* is the upstream FIFO's head (valid/ready), out_* the head
// of this stage's output FIFO. col_sel, cmp_val, op_sel come from the control
// registers and must be stable while a block is processed. FMT describes the
// tuple (field count, padded width, field types); ITEM_T must be the stream
// item type built from it (see ndp_pe). The defaults are the package format.
// Timing: one item per cycle; a tuple reaches out_* one cycle after it is
// dequeued. Datapath structure follows the document's figure of the unit; the
// 'last'/'empty' marking and the FIFO depth are this design's choice.
module filter_unit
  import ndp_pkg::*;
#(
  parameter fmt_t        FMT       = FMT_DEFAULT,
  parameter type         ITEM_T    = titem_t,
  parameter int unsigned OUT_DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             in_valid,
  output logic             in_ready,
  input  ITEM_T            in_item,
  output logic             out_valid,
  input  logic             out_ready,
  output ITEM_T            out_item,
  input  logic [col_bits(FMT)-1:0] col_sel,
  input  logic [FMT.elem_w-1:0]    cmp_val,
  input  logic [2:0]       op_sel,
  output logic             dropped   // pulse: a tuple was filtered out
);
  localparam int unsigned CB = col_bits(FMT);

  logic [FMT.elem_w-1:0] field;
  ftype_e field_type;
  logic   match;
  logic   enq_valid, enq_ready;
  ITEM_T  enq_item;

  // column multiplexer
  always_comb begin
    field        = in_item.t.elem[0];
    field_type   = FMT.in_type[0];
    for (int i = 0; i < FMT.n_in; i++) begin
      if (col_sel == CB'(i)) begin
        field        = in_item.t.elem[i];
        field_type   = FMT.in_type[i];
      end
    end
  end

  compare_unit #(.W(FMT.elem_w)) u_cmp (
    .a(field), .b(cmp_val), .op(op_sel), .ftype(field_type), .match(match)
  );

  // enqueue logic
  logic keep;
  assign keep      = in_item.empty || match;
  assign enq_valid = in_valid && (keep || in_item.last);
  assign in_ready  = enq_ready || !(keep || in_item.last);
  always_comb begin
    enq_item       = in_item;
    enq_item.empty = in_item.empty || !match;
  end
  assign dropped = in_valid && in_ready && !in_item.empty && !match;

  sync_fifo #(.T(ITEM_T), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst_n, .clr,
    .in_valid(enq_valid), .in_ready(enq_ready), .in_data(enq_item),
    .out_valid, .out_ready, .out_data(out_item), .count()
  );
endmodule

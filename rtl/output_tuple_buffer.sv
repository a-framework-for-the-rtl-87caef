// output_tuple_buffer - packs output tuples back into 64-bit words.
//
// The reverse of the input tuple buffer. Each output tuple is reassembled
// into its memory layout (field j at bit out_ofs[j], out_w[j] bits wide; the
// postfix at out_pf_ofs if the output struct keeps it) and appended to an
// accumulator directly after the previous tuple, so tuples are stored densely
// without gaps. Every full 64-bit word goes to the store unit. Items marked
// 'empty' only carry the end of a block. When the item marked 'last' has been
// taken, the remaining bits are sent as one final word padded with zeros and
// 'done' is raised until the next start.
//
// Interface: start (pulse) clears the buffer and the counter. in_* is the
// tuple stream from the data transform (valid/ready), out_* the word stream
// to the store unit. tuples_out counts non-empty tuples since start. FMT is
// the record format and OITEM_T the output item type built from it (see
// ndp_pe); the defaults are the package format.
// Timing: a tuple is taken in the same cycle as a word leaves when that makes
// room, so tuples of up to 64 bits flow at one per cycle.
// The packing follows the document; the dense layout and zero padding of the
// final word are this design's choice.
module output_tuple_buffer
  import ndp_pkg::*;
#(
  parameter fmt_t FMT     = FMT_DEFAULT,
  parameter type  OITEM_T = oitem_t
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  output logic        in_ready,
  input  OITEM_T      in_item,
  output logic        out_valid,
  input  logic        out_ready,
  output word_t       out_data,
  output logic        done,
  output logic [31:0] tuples_out
);
  localparam int unsigned REC_BITS = FMT.out_bits;
  localparam int unsigned ACC_W    = REC_BITS + BUS_W;
  localparam int unsigned CNT_W = $clog2(ACC_W + 1);

  logic [ACC_W-1:0]    acc;
  logic [CNT_W-1:0]    cnt;
  logic                flush;
  logic [REC_BITS-1:0] raw;
  logic                out_fire, in_fire;
  logic [CNT_W-1:0]    cnt_after;

  // memory layout of the output struct
  always_comb begin
    raw = '0;
    for (int j = 0; j < FMT.n_out; j++)
      for (int b = 0; b < FMT.elem_w; b++)
        if (b < FMT.out_w[j]) raw[32'(FMT.out_ofs[j]) + b] = in_item.t.elem[j][b];
    if (FMT.out_has_pf)
      for (int b = 0; b < pf_bits(FMT); b++) raw[FMT.out_pf_ofs + b] = in_item.t.postfix[b];
  end

  assign out_valid = (cnt >= CNT_W'(BUS_W)) || (flush && cnt != '0);
  assign out_data  = acc[BUS_W-1:0];
  assign out_fire  = out_valid && out_ready;
  assign cnt_after = out_fire ? ((cnt >= CNT_W'(BUS_W)) ? cnt - CNT_W'(BUS_W) : '0) : cnt;
  assign in_ready  = !flush && !done && (32'(cnt_after) + REC_BITS <= ACC_W);
  assign in_fire   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      acc        <= '0;
      cnt        <= '0;
      flush      <= 1'b0;
      done       <= 1'b0;
      tuples_out <= '0;
    end else begin
      logic [ACC_W-1:0] a;
      logic [CNT_W-1:0] c;
      a = out_fire ? acc >> BUS_W : acc;
      c = cnt_after;
      if (in_fire) begin
        if (!in_item.empty) begin
          a = a | (ACC_W'(raw) << c);
          c = c + CNT_W'(REC_BITS);
          tuples_out <= tuples_out + 1'b1;
        end
        if (in_item.last) flush <= 1'b1;
      end
      acc <= a;
      cnt <= c;
      if (flush && c == '0) begin
        flush <= 1'b0;
        done  <= 1'b1;
      end
    end
  end
endmodule

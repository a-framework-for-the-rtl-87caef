// input_tuple_buffer - turns the 64-bit word stream of a block into tuples.
//
// Words from the load unit are appended above the bits already held in an
// accumulator (ACC_W = REC_BITS + 64 bits, REC_BITS = FMT.in_bits). As soon as REC_BITS bits are
// present, the lowest REC_BITS form one tuple: every relevant field is cut out
// at its offset and padded to elem_w bits (sign-extended for signed fields),
// and the string postfix, if the format has one, is cut out as a separate
// vector. The tuple goes into the tuple FIFO that feeds the first filter
// stage. Several tuples may come from one word and one tuple from several
// words.
//
// A block holds floor(64*n_words / REC_BITS) tuples; the last one is marked
// 'last'. Bits after it (a partial tuple at the end of the block) are
// consumed and discarded. A block too short for one tuple produces a single
// 'last'+'empty' marker so that the rest of the PE still sees its end.
//
// Interface: start (one-cycle pulse) clears the buffer and sets the number of
// words that will arrive, n_words. in_* is the word stream (valid/ready),
// out_* the head of the tuple FIFO. tuples_in counts emitted tuples since
// start. FMT is the record format and ITEM_T the stream item type built from
// it (see ndp_pe); the defaults are the package format.
// Timing: one tuple or one word per cycle; a tuple appears at out_* one cycle
// after its last word was accepted. The splitting follows the document; the
// accumulator structure and end-of-block handling are this design's choice.
module input_tuple_buffer
  import ndp_pkg::*;
#(
  parameter fmt_t        FMT       = FMT_DEFAULT,
  parameter type         ITEM_T    = titem_t,
  parameter int unsigned OUT_DEPTH = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] n_words,
  input  logic        in_valid,
  output logic        in_ready,
  input  word_t       in_data,
  output logic        out_valid,
  input  logic        out_ready,
  output ITEM_T       out_item,
  output logic [31:0] tuples_in
);
  localparam int unsigned REC_BITS = FMT.in_bits;
  localparam int unsigned ACC_W   = REC_BITS + BUS_W;
  localparam int unsigned CNT_W = $clog2(ACC_W + 1);

  logic [ACC_W-1:0] acc;
  logic [CNT_W-1:0] cnt;
  logic [31:0]      words_left, tuples_left;
  logic             marker_pending;

  logic             emit_valid, emit_ready, emit_fire, word_fire;
  ITEM_T            emit_item;
  logic [CNT_W-1:0] cnt_after;
  logic [31:0]      tuples_after;

  // field extraction and padding
  always_comb begin
    emit_item = '0;
    for (int i = 0; i < FMT.n_in; i++) begin
      for (int b = 0; b < FMT.elem_w; b++) begin
        if (b < FMT.in_w[i])
          emit_item.t.elem[i][b] = acc[32'(FMT.in_ofs[i]) + b];
        else if (FMT.in_type[i] == FT_SINT)
          emit_item.t.elem[i][b] = acc[32'(FMT.in_ofs[i]) + 32'(FMT.in_w[i]) - 1];
        else
          emit_item.t.elem[i][b] = 1'b0;
      end
    end
    if (FMT.pf_w > 0) emit_item.t.postfix = acc[FMT.pf_ofs +: pf_bits(FMT)];
    emit_item.last  = (tuples_left == 32'd1) || marker_pending;
    emit_item.empty = marker_pending;
  end

  assign emit_valid = marker_pending ||
                      ((tuples_left != '0) && (cnt >= CNT_W'(REC_BITS)));
  assign emit_fire  = emit_valid && emit_ready;
  assign cnt_after  = (emit_fire && !marker_pending) ? cnt - CNT_W'(REC_BITS) : cnt;
  assign tuples_after = (emit_fire && !marker_pending) ? tuples_left - 1'b1 : tuples_left;

  // A word is taken if it is still needed and fits, or if it is surplus.
  assign in_ready  = (words_left != '0) &&
                     ((tuples_after == '0) ||
                      (32'(cnt_after) + BUS_W <= ACC_W));
  assign word_fire = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc            <= '0;
      cnt            <= '0;
      words_left     <= '0;
      tuples_left    <= '0;
      marker_pending <= 1'b0;
      tuples_in      <= '0;
    end else if (start) begin
      acc            <= '0;
      cnt            <= '0;
      words_left     <= n_words;
      tuples_left    <= (n_words * BUS_W) / REC_BITS;
      marker_pending <= ((n_words * BUS_W) / REC_BITS) == 0;
      tuples_in      <= '0;
    end else begin
      logic [ACC_W-1:0] a;
      logic [CNT_W-1:0] c;
      a = acc;
      c = cnt_after;
      if (emit_fire && !marker_pending) a = a >> REC_BITS;
      if (word_fire) begin
        words_left <= words_left - 1'b1;
        if (tuples_after != '0) begin
          a = a | (ACC_W'(in_data) << c);
          c = c + CNT_W'(BUS_W);
        end
      end
      acc         <= a;
      cnt         <= c;
      tuples_left <= tuples_after;
      if (emit_fire) begin
        if (marker_pending) marker_pending <= 1'b0;
        else                tuples_in <= tuples_in + 1'b1;
      end
    end
  end

  sync_fifo #(.T(ITEM_T), .DEPTH(OUT_DEPTH)) u_tuple_fifo (
    .clk, .rst_n, .clr(start),
    .in_valid(emit_valid), .in_ready(emit_ready), .in_data(emit_item),
    .out_valid, .out_ready, .out_data(out_item), .count()
  );
endmodule

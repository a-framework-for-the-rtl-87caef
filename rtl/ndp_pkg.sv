// ndp_pkg - shared constants and types of the near-data processing (NDP) PE.
//
// The PE template is specialised for one pair of record formats, the input
// struct stored in the key-value store and the output struct written back.
// This package is that specialisation: it holds the layout of both structs,
// the field mapping of the data transform and the control register map.
//
// Configured format (the example PE "Point3DTo2D"):
//   input  Point3D { uint32_t x, y, z; }   96 bits, fields at bits 0, 32, 64
//   output Point2D { uint32_t x, y; }      64 bits
//   mapping output.x = input.y, output.y = input.z
// Fields are little-endian: the first byte of a tuple is the lowest byte of
// the 64-bit memory word it starts in, and the first struct member occupies
// the lowest bits of the tuple.
//
// Every "relevant" field (one a predicate may test) is padded to ELEM_W bits,
// the width of the largest relevant field, so that a single comparator width
// serves them all. The rest of an annotated string (its postfix) is carried
// along unchanged in a separate vector. This format has no string, so
// PF_W = 0; the vector then keeps one unused bit.
//
// Register map (byte addresses, 32-bit registers, 4-byte stride). START,
// BUSY, FILTER_OP_0 = 60 and CYCLE_COUNTER = 64 follow the published software
// header for a one-stage PE; all other addresses are this design's choice.
// Filter stage i owns FILTER_COL_i, FILTER_VAL_i, FILTER_OP_i at
// 52 + 12*i, 56 + 12*i, 60 + 12*i; CYCLE_COUNTER follows the last stage.
// Formats with fields wider than 32 bits use a 16-byte stride with an extra
// FILTER_VAL_HI register (filter_stride below).
//
// The constants below describe the default format; the same description as
// one value, FMT_DEFAULT of type fmt_t, is what the modules take as their FMT
// parameter, so a PE for another format only needs another fmt_t value.
package ndp_pkg;

  // ---------------------------------------------------------------- memory
  localparam int unsigned BUS_W       = 64;     // Zynq-7000 HP port width
  localparam int unsigned BUS_BYTES   = BUS_W / 8;
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned BLOCK_BYTES = 32768;  // processing granularity
  localparam int unsigned MAX_BURST   = 16;     // beats per AXI burst

  // Field types a predicate can compare. Floating-point fields must be
  // ELEM_W bits wide (single precision with 32-bit elements, double with 64).
  typedef enum logic [1:0] {
    FT_UINT  = 2'd0,   // unsigned integer, zero-extended
    FT_SINT  = 2'd1,   // two's-complement integer, sign-extended
    FT_FLOAT = 2'd2    // IEEE 754 binary floating point
  } ftype_e;

  // ---------------------------------------------------------------- input struct
  localparam int unsigned ELEM_W   = 32;        // padded width of a relevant field
  localparam int unsigned IN_BITS  = 96;
  localparam int unsigned N_IN     = 3;
  localparam int unsigned IN_OFS    [N_IN] = '{0, 32, 64};
  localparam int unsigned IN_W      [N_IN] = '{32, 32, 32};
  localparam ftype_e      IN_TYPE   [N_IN] = '{FT_UINT, FT_UINT, FT_UINT};
  localparam int unsigned PF_OFS   = 0;         // string postfix inside the input tuple
  localparam int unsigned PF_W     = 0;         // 0: the format has no string postfix

  // ---------------------------------------------------------------- output struct
  localparam int unsigned OUT_BITS = 64;
  localparam int unsigned N_OUT    = 2;
  localparam int unsigned OUT_OFS [N_OUT] = '{0, 32};
  localparam int unsigned OUT_W   [N_OUT] = '{32, 32};
  localparam int unsigned OUT_SRC [N_OUT] = '{1, 2};   // input field feeding each output field
  localparam bit          OUT_HAS_PF = 1'b0;           // output keeps the postfix
  localparam int unsigned OUT_PF_OFS = 0;

  // ---------------------------------------------------------------- types
  localparam int unsigned PF_VW  = (PF_W > 0) ? PF_W : 1;
  localparam int unsigned COL_W  = (N_IN > 1) ? $clog2(N_IN) : 1;

  typedef logic [ELEM_W-1:0] elem_t;
  typedef logic [BUS_W-1:0]  word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // A tuple as the compute units see it: padded fields plus postfix.
  typedef struct packed {
    logic [PF_VW-1:0]     postfix;
    elem_t [N_IN-1:0]     elem;
  } tuple_t;

  typedef struct packed {
    logic [PF_VW-1:0]     postfix;
    elem_t [N_OUT-1:0]    elem;
  } otuple_t;

  // Stream item. 'last' marks the end of a block; 'empty' marks an item that
  // carries no tuple (the last tuple was filtered out, or the block held none).
  typedef struct packed {
    logic   last;
    logic   empty;
    tuple_t t;
  } titem_t;

  typedef struct packed {
    logic    last;
    logic    empty;
    otuple_t t;
  } oitem_t;

  // ---------------------------------------------------------------- format descriptor
  // The same layout as one value, so that a PE can be built for another pair
  // of structs by overriding a single parameter (FMT) instead of editing this
  // package. Field i of the input is described by in_ofs[i], in_w[i] and
  // in_type[i]; output field j by out_ofs[j], out_w[j] and out_src[j]. Widths
  // and offsets are in bits. FMT_DEFAULT is the format configured above; the
  // types tuple_t, otuple_t, titem_t and oitem_t belong to it.
  localparam int unsigned MAX_FIELDS = 64;

  typedef struct packed {
    int unsigned                 elem_w;
    int unsigned                 in_bits;
    int unsigned                 n_in;
    logic [MAX_FIELDS-1:0][15:0] in_ofs;
    logic [MAX_FIELDS-1:0][15:0] in_w;
    ftype_e [MAX_FIELDS-1:0]     in_type;
    int unsigned                 pf_ofs;
    int unsigned                 pf_w;
    int unsigned                 out_bits;
    int unsigned                 n_out;
    logic [MAX_FIELDS-1:0][15:0] out_ofs;
    logic [MAX_FIELDS-1:0][15:0] out_w;
    logic [MAX_FIELDS-1:0][15:0] out_src;
    logic                        out_has_pf;
    int unsigned                 out_pf_ofs;
  } fmt_t;

  function automatic fmt_t default_fmt();
    fmt_t f = '0;
    f.elem_w  = ELEM_W;
    f.in_bits = IN_BITS;
    f.n_in    = N_IN;
    for (int i = 0; i < N_IN; i++) begin
      f.in_ofs[i]  = 16'(IN_OFS[i]);
      f.in_w[i]    = 16'(IN_W[i]);
      f.in_type[i] = IN_TYPE[i];
    end
    f.pf_ofs   = PF_OFS;
    f.pf_w     = PF_W;
    f.out_bits = OUT_BITS;
    f.n_out    = N_OUT;
    for (int j = 0; j < N_OUT; j++) begin
      f.out_ofs[j] = 16'(OUT_OFS[j]);
      f.out_w[j]   = 16'(OUT_W[j]);
      f.out_src[j] = 16'(OUT_SRC[j]);
    end
    f.out_has_pf = OUT_HAS_PF;
    f.out_pf_ofs = OUT_PF_OFS;
    return f;
  endfunction

  localparam fmt_t FMT_DEFAULT = default_fmt();

  // derived widths
  function automatic int unsigned pf_bits(fmt_t f);    // postfix vector (at least 1 bit)
    return (f.pf_w > 0) ? f.pf_w : 1;
  endfunction
  function automatic int unsigned col_bits(fmt_t f);   // column select
    return (f.n_in > 1) ? $clog2(f.n_in) : 1;
  endfunction

  // Compare operators of the standard set.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,   // every tuple passes
    OP_EQ  = 3'd1,
    OP_NE  = 3'd2,
    OP_GT  = 3'd3,
    OP_GE  = 3'd4,
    OP_LT  = 3'd5,
    OP_LE  = 3'd6
  } cmp_op_e;

  // ---------------------------------------------------------------- registers
  localparam int unsigned REG_START        = 0;   // W: bit 0 = 1 starts the PE
  localparam int unsigned REG_BUSY         = 4;   // R: 1 while a block is processed
  localparam int unsigned REG_LOAD_ADDR    = 8;   // RW: DRAM byte address of the input
  localparam int unsigned REG_LOAD_BYTES   = 12;  // RW: bytes to load (<= BLOCK_BYTES)
  localparam int unsigned REG_STORE_ADDR   = 16;  // RW: DRAM byte address of the result
  localparam int unsigned REG_RESULT_BYTES = 20;  // R: payload bytes of the result
  localparam int unsigned REG_TUPLES_IN    = 24;  // R: tuples read from the block
  localparam int unsigned REG_TUPLES_OUT   = 28;  // R: tuples written back
  localparam int unsigned REG_FILTER_BASE  = 52;  // FILTER_COL_0
  localparam int unsigned REG_FILTER_STRIDE = 12;

  // Compare values wider than 32 bits (64-bit fields, e.g. doubles) take a
  // fourth register per stage: FILTER_COL_i +0, FILTER_VAL_i +4 (low word),
  // FILTER_VAL_HI_i +8, FILTER_OP_i +12, stride 16.
  function automatic int unsigned filter_stride(int unsigned val_bits);
    return (val_bits > 32) ? 16 : REG_FILTER_STRIDE;
  endfunction
  function automatic int unsigned filter_op_ofs(int unsigned val_bits);
    return (val_bits > 32) ? 12 : 8;
  endfunction

  // AXI burst type and responses used here
  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

endpackage

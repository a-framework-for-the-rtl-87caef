// tb_ndp_pe_formats - PEs built for record formats other than the default.
//
// Three PEs run side by side, each in its own environment (ndp_fmt_env):
//
//   half256: a 256-bit record {uint32_t a, b, c, d; char s[16]} whose string
//            s carries a 4-byte prefix. The relevant fields are a, b, c, d and
//            the prefix; the 12-byte postfix is only carried along. Output and
//            input formats are identical, so the postfix must come back
//            unchanged. Five filter stages.
//   mixed160: a 160-bit record {int32_t a; uint8_t b; int8_t c; uint16_t d;
//            float e; uint32_t f; int32_t g} with narrow, signed and float
//            fields, all padded to 32 bits for the compare unit. The output
//            is a 48-bit projection {e, c, b}, so output records straddle
//            word boundaries. Three filter stages.
//   wide192: a 192-bit record {double d; int64_t i; uint32_t u; int16_t s;
//            16 spare bits} with 64-bit padded fields, so each stage has a
//            FILTER_VAL_HI register. Output {u, d}, 96 bits. Two stages.
//
// The testbench reports the sum of the environments' checks and failures.
module tb_ndp_pe_formats;
  import ndp_pkg::*;

  function automatic fmt_t half256();
    fmt_t f = '0;
    f.elem_w = 32; f.in_bits = 256; f.n_in = 5;
    for (int i = 0; i < 5; i++) begin
      f.in_ofs[i] = 16'(32 * i); f.in_w[i] = 16'd32; f.in_type[i] = FT_UINT;
    end
    f.pf_ofs = 160; f.pf_w = 96;
    f.out_bits = 256; f.n_out = 5;
    for (int j = 0; j < 5; j++) begin
      f.out_ofs[j] = 16'(32 * j); f.out_w[j] = 16'd32; f.out_src[j] = 16'(j);
    end
    f.out_has_pf = 1'b1; f.out_pf_ofs = 160;
    return f;
  endfunction

  function automatic fmt_t mixed160();
    fmt_t f = '0;
    f.elem_w = 32; f.in_bits = 160; f.n_in = 7;
    f.in_ofs[0] = 0;   f.in_w[0] = 32; f.in_type[0] = FT_SINT;
    f.in_ofs[1] = 32;  f.in_w[1] = 8;  f.in_type[1] = FT_UINT;
    f.in_ofs[2] = 40;  f.in_w[2] = 8;  f.in_type[2] = FT_SINT;
    f.in_ofs[3] = 48;  f.in_w[3] = 16; f.in_type[3] = FT_UINT;
    f.in_ofs[4] = 64;  f.in_w[4] = 32; f.in_type[4] = FT_FLOAT;
    f.in_ofs[5] = 96;  f.in_w[5] = 32; f.in_type[5] = FT_UINT;
    f.in_ofs[6] = 128; f.in_w[6] = 32; f.in_type[6] = FT_SINT;
    f.pf_w = 0;
    f.out_bits = 48; f.n_out = 3;
    f.out_ofs[0] = 0;  f.out_w[0] = 32; f.out_src[0] = 4;
    f.out_ofs[1] = 32; f.out_w[1] = 8;  f.out_src[1] = 2;
    f.out_ofs[2] = 40; f.out_w[2] = 8;  f.out_src[2] = 1;
    f.out_has_pf = 1'b0;
    return f;
  endfunction

  function automatic fmt_t wide192();
    fmt_t f = '0;
    f.elem_w = 64; f.in_bits = 192; f.n_in = 4;
    f.in_ofs[0] = 0;   f.in_w[0] = 64; f.in_type[0] = FT_FLOAT;
    f.in_ofs[1] = 64;  f.in_w[1] = 64; f.in_type[1] = FT_SINT;
    f.in_ofs[2] = 128; f.in_w[2] = 32; f.in_type[2] = FT_UINT;
    f.in_ofs[3] = 160; f.in_w[3] = 16; f.in_type[3] = FT_SINT;
    f.out_bits = 96; f.n_out = 2;
    f.out_ofs[0] = 0;  f.out_w[0] = 32; f.out_src[0] = 2;
    f.out_ofs[1] = 32; f.out_w[1] = 64; f.out_src[1] = 0;
    return f;
  endfunction

  localparam fmt_t F_WIDE  = wide192();
  localparam fmt_t F_HALF  = half256();
  localparam fmt_t F_MIXED = mixed160();

  ndp_fmt_env #(.F(F_HALF),  .NS(5)) env_half ();
  ndp_fmt_env #(.F(F_MIXED), .NS(3)) env_mixed ();
  ndp_fmt_env #(.F(F_WIDE),  .NS(2)) env_wide ();

  initial begin
    wait (env_half.finished && env_mixed.finished && env_wide.finished);
    $display("TB_RESULT checks=%0d failures=%0d",
             env_half.checks + env_mixed.checks + env_wide.checks,
             env_half.failures + env_mixed.failures + env_wide.failures);
    $finish;
  end
endmodule

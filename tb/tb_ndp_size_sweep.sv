// tb_ndp_size_sweep - PEs for records of 64 to 1024 bits, with and without a
// string prefix.
//
// For each size S in {64, 128, 256, 512, 1024} two PEs are built and run in
// their own environment (ndp_fmt_env), with input and output formats
// identical (the transform passes records through):
//
//   Full S: (S/32 - 1) uint32_t fields followed by four uint8_t fields; every
//           field can be tested.
//   Half S: the first S/2 bits as above ((S/64 - 1) uint32_t and four
//           uint8_t), the second half a char[S/16] string with a 4-byte
//           prefix. The prefix is a testable field; the rest of the string
//           is a postfix that is only carried to the output.
//
// All fields are padded to 32 bits. Each PE has two filter stages (a range).
// The testbench reports the sum of all environments' checks and failures.
module tb_ndp_size_sweep;
  import ndp_pkg::*;

  function automatic fmt_t sweep_fmt(int unsigned s, bit half);
    fmt_t        f = '0;
    int unsigned part = half ? s / 2 : s;
    int unsigned n = 0;
    f.elem_w = 32;
    f.in_bits = s;
    for (int i = 0; i < int'(part / 32) - 1; i++) begin
      f.in_ofs[n] = 16'(32 * i); f.in_w[n] = 16'd32; f.in_type[n] = FT_UINT; n++;
    end
    for (int i = 0; i < 4; i++) begin
      f.in_ofs[n] = 16'(part - 32 + 8 * i); f.in_w[n] = 16'd8; f.in_type[n] = FT_UINT; n++;
    end
    if (half) begin
      f.in_ofs[n] = 16'(part); f.in_w[n] = 16'd32; f.in_type[n] = FT_UINT; n++;
      f.pf_ofs = part + 32;
      f.pf_w   = s - part - 32;
    end
    f.n_in     = n;
    f.out_bits = s;
    f.n_out    = n;
    for (int j = 0; j < int'(n); j++) begin
      f.out_ofs[j] = f.in_ofs[j]; f.out_w[j] = f.in_w[j]; f.out_src[j] = 16'(j);
    end
    f.out_has_pf = f.pf_w > 0;
    f.out_pf_ofs = f.pf_ofs;
    return f;
  endfunction

  localparam int unsigned NSIZE = 5;
  localparam int unsigned SIZES [NSIZE] = '{64, 128, 256, 512, 1024};

  int  checks [2*NSIZE];
  int  failures [2*NSIZE];
  bit  done [2*NSIZE];

  for (genvar k = 0; k < NSIZE; k++) begin : g_size
    ndp_fmt_env #(.F(sweep_fmt(SIZES[k], 1'b0)), .NS(2)) env_full ();
    ndp_fmt_env #(.F(sweep_fmt(SIZES[k], 1'b1)), .NS(2)) env_half ();
    always_comb begin
      checks[2*k]     = env_full.checks;   failures[2*k]     = env_full.failures;
      done[2*k]       = env_full.finished;
      checks[2*k+1]   = env_half.checks;   failures[2*k+1]   = env_half.failures;
      done[2*k+1]     = env_half.finished;
    end
  end

  initial begin
    int c, f;
    wait (done.and());
    c = 0; f = 0;
    foreach (checks[i]) begin c += checks[i]; f += failures[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule

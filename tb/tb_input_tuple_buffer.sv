// tb_input_tuple_buffer - checks the word-to-tuple conversion.
//
// Blocks of random length (including blocks shorter than one tuple and one
// full 32 KB block) are fed as 64-bit words with random gaps while the
// consumer stalls at random. The reference cuts the same bit stream into
// 96-bit Point3D tuples; expected are the three 32-bit fields of each, the
// 'last' flag on the final tuple, a single empty end marker for a block with
// no whole tuple, every word consumed, and TUPLES_IN equal to the tuple count.
module tb_input_tuple_buffer;
  import ndp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, in_valid, in_ready, out_valid, out_ready;
  logic [31:0] n_words, tuples_in;
  word_t       in_data;
  titem_t      out_item;

  input_tuple_buffer dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(int unsigned nw, int in_pct, int out_pct);
    word_t  words [$];
    titem_t exp [$];
    int unsigned nt, got, sent, cyc;
    for (int w = 0; w < nw; w++) words.push_back({$urandom, $urandom});
    nt = nw * 64 / 96;
    for (int t = 0; t < nt; t++) begin
      titem_t it;
      it = '0;
      for (int i = 0; i < 3; i++)
        for (int b = 0; b < 32; b++) begin
          int unsigned bit_pos;
          bit_pos = 96 * t + 32 * i + b;
          it.t.elem[i][b] = words[bit_pos / 64][bit_pos % 64];
        end
      it.last = (t == nt - 1);
      exp.push_back(it);
    end
    if (nt == 0) begin
      titem_t it;
      it = '0; it.last = 1; it.empty = 1;
      exp.push_back(it);
    end
    @(negedge clk);
    start = 1; n_words = nw;
    @(negedge clk);
    start = 0;
    got = 0; sent = 0; cyc = 0;
    while ((got < exp.size() || sent < nw) && cyc < 20 * nw + 100) begin
      in_valid  = (sent < nw) && ($urandom_range(99) < in_pct);
      in_data   = (sent < nw) ? words[sent] : '0;
      out_ready = ($urandom_range(99) < out_pct);
      @(posedge clk);
      cyc++;
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        if (got < exp.size())
          check(out_item == exp[got], $sformatf("nw %0d tuple %0d: got %h expected %h", nw, got, out_item, exp[got]));
        else check(0, "extra tuple");
        got++;
      end
      @(negedge clk);
    end
    in_valid = 0; out_ready = 0;
    check(got == exp.size() && sent == nw, $sformatf("nw %0d: %0d of %0d tuples, %0d of %0d words", nw, got, exp.size(), sent, nw));
    check(tuples_in == nt, $sformatf("nw %0d: tuples_in %0d expected %0d", nw, tuples_in, nt));
  endtask

  initial begin
    start = 0; in_valid = 0; out_ready = 0; n_words = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 80, 80);
    run(1, 80, 80);
    run(2, 50, 50);
    run(3, 80, 30);
    for (int k = 0; k < 30; k++) run($urandom_range(60), 20 + $urandom_range(80), 20 + $urandom_range(80));
    run(BLOCK_BYTES / 8, 90, 90);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

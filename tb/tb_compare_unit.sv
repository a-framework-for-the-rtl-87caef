// tb_compare_unit - checks every operator of compare_unit for unsigned,
// signed and single-precision floating-point fields, on edge cases and random
// operands, against an independent model. The floating-point model decodes
// both words into real numbers (infinities as +-1e300) and compares those;
// a NaN operand makes every operator false except != and nop.
module tb_compare_unit;
  import ndp_pkg::*;
  elem_t      a, b;
  logic [2:0] op;
  ftype_e     ftype;
  logic       match;

  compare_unit dut (.*);

  int checks = 0, failures = 0;

  function automatic real f32(logic [31:0] x);
    real m;
    int  e;
    e = int'(x[30:23]);
    if (e == 255) return x[31] ? -1.0e300 : 1.0e300;
    m = (e == 0) ? real'(x[22:0]) / 8388608.0 : 1.0 + real'(x[22:0]) / 8388608.0;
    if (e == 0) e = 1;
    m = m * (2.0 ** (e - 127));
    return x[31] ? -m : m;
  endfunction

  function automatic bit nan32(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction

  function automatic bit model(logic [31:0] x, logic [31:0] y, int o, int t);
    real xs, ys;
    if (t == 2 && (nan32(x) || nan32(y))) return (o == 2) || (o == 0) || (o == 7);
    case (t)
      1:       begin xs = real'($signed(x)); ys = real'($signed(y)); end
      2:       begin xs = f32(x); ys = f32(y); end
      default: begin xs = real'(x); ys = real'(y); end
    endcase
    case (o)
      1: return xs == ys;
      2: return xs != ys;
      3: return xs >  ys;
      4: return xs >= ys;
      5: return xs <  ys;
      6: return xs <= ys;
      default: return 1;
    endcase
  endfunction

  initial begin
    automatic logic [31:0] edges [10] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF,
                                          32'd42, 32'h3F80_0000, 32'hBF80_0000, 32'h7F80_0000, 32'h7FC0_0000};
    for (int n = 0; n < 4000; n++) begin
      if (n < 100) begin a = edges[n % 10]; b = edges[n / 10]; end
      else begin
        a = $urandom;
        case (n % 4)
          0: b = a;
          1: b = a ^ 32'h8000_0000;         // same magnitude, other sign
          2: b = a + 32'($urandom_range(3)); // neighbours
          default: b = $urandom;
        endcase
      end
      for (int o = 0; o < 8; o++) begin
        for (int t = 0; t < 3; t++) begin
          op = 3'(o); ftype = ftype_e'(t);
          #1;
          checks++;
          if (match !== model(a, b, o, t)) begin
            failures++;
            $display("FAIL: a=%h b=%h op=%0d type=%0d match=%b", a, b, o, t, match);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

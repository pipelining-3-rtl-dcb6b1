// tb_alu: random and corner operands for add, sub, and, xor. The result is
// checked against b OP a, ZF/SF against the result, and OF against a signed
// 65-bit computation (the true result does not fit in 64 signed bits).
`timescale 1ns/1ps
module tb_alu;
  import y86_pkg::*;
  word_t      a, b, result;
  logic [3:0] fun;
  cc_t        cc_new;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .fun, .result, .cc_new);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t corners [6] = '{64'h0, 64'h1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF,
                         64'h8000_0000_0000_0000, 64'h0000_0000_0000_0320};

  initial begin
    for (int i = 0; i < 20000; i++) begin
      word_t r;
      logic signed [64:0] wide;
      logic of;
      a = ($urandom_range(3) == 0) ? corners[$urandom_range(5)] : {$urandom, $urandom};
      b = ($urandom_range(3) == 0) ? corners[$urandom_range(5)] : {$urandom, $urandom};
      fun = 4'($urandom_range(3));
      #1;
      case (fun)
        4'h0: begin r = b + a; wide = $signed({b[63], b}) + $signed({a[63], a}); end
        4'h1: begin r = b - a; wide = $signed({b[63], b}) - $signed({a[63], a}); end
        4'h2: begin r = b & a; wide = '0; end
        default: begin r = b ^ a; wide = '0; end
      endcase
      of = (fun <= 4'h1) ? (wide[64] != wide[63]) : 1'b0;
      checks++;
      if (result !== r || cc_new.zf !== (r == 0) || cc_new.sf !== r[63] || cc_new.of !== of) begin
        failures++;
        $display("FAIL fun=%0d a=%h b=%h result=%h cc=%b", fun, a, b, result, cc_new);
      end
    end
    // The worked example: 800 + 900 = 1700.
    a = 64'd800; b = 64'd900; fun = 4'h0;
    #1;
    checks++;
    if (result != 64'd1700) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

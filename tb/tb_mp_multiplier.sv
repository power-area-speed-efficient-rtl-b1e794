// Testbench for mp_multiplier: all three precision modes with random and
// corner operands, compared lane by lane with the integer product. It also
// checks the 32x32 example 0x55555555 * 0x55555555 = 0x1C71C71C38E38E39,
// that the reserved mode code behaves as 32x32, that result bits outside
// the active lanes are 0, and counts 32x32 cases where the 17th bit of
// UH+UL and of VH+VL is set (the correction path), failing if none occur.
module tb_mp_multiplier;
  import mp_pkg::*;
  typedef longint unsigned u64_t;
  int checks = 0, failures = 0, carry_cases = 0;
  precision_e   alg;
  logic [71:0]  a, b;
  logic [143:0] p;

  mp_multiplier dut (.algorithm(alg), .a(a), .b(b), .p(p));

  task automatic check(string tag, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h: got %h expected %h", tag, a, b, got, exp);
    end
  endtask

  function automatic logic [71:0] rnd72();
    return {8'($urandom), $urandom, $urandom};
  endfunction

  function automatic logic [31:0] pick32(int t);
    case (t % 5)
      0: return 32'hFFFF_FFFF;
      1: return {16'hFFFF, 16'($urandom)};
      2: return 32'h8000_8000;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Example product of the reference simulation.
    alg = PREC_32X32;
    a = 72'h5555_5555;
    b = 72'h5555_5555;
    #1;
    check("example", p[63:0], 64'h1C71_C71C_38E3_8E39);
    check("example upper", p[127:64], 64'h0);

    for (int t = 0; t < 20000; t++) begin
      // 32x32
      alg = (t % 7 == 0) ? PREC_RSVD : PREC_32X32;
      a = rnd72(); b = rnd72();
      if (t % 3 == 0) begin
        a[31:0] = pick32(t);
        b[31:0] = pick32(t / 3);
      end
      #1;
      check("32x32", p[63:0], 64'(u64_t'(a[31:0]) * u64_t'(b[31:0])));
      check("32x32 unused", p[127:64], 64'h0);
      check("32x32 unused hi", 64'(p[143:128]), 64'h0);
      if (({1'b0, a[31:16]} + {1'b0, a[15:0]}) >= 17'h10000 &&
          ({1'b0, b[31:16]} + {1'b0, b[15:0]}) >= 17'h10000) carry_cases++;

      // 16x16
      alg = PREC_16X16;
      #1;
      for (int k = 0; k < 3; k++)
        check("16x16", 64'(p[32*k +: 32]), 64'(longint'(a[16*k +: 16]) * longint'(b[16*k +: 16])));
      check("16x16 unused", 64'(p[143:96]), 64'h0);

      // 8x8
      alg = PREC_8X8;
      #1;
      for (int j = 0; j < 9; j++)
        check("8x8", 64'(p[16*j +: 16]), 64'(longint'(a[8*j +: 8]) * longint'(b[8*j +: 8])));
    end
    checks++;
    if (carry_cases == 0) begin
      failures++;
      $display("FAIL no 32x32 case exercised both 17th bits");
    end
    $display("32x32 cases with both 17th bits set: %0d", carry_cases);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

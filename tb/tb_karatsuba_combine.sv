// Testbench for karatsuba_combine: random 16-bit (N = 8, default) and
// 32-bit (N = 16) operand pairs. The three sub-products are formed here
// with the * operator and the recombined result is compared with U*V.
module tb_karatsuba_combine;
  typedef longint unsigned u64_t;
  int checks = 0, failures = 0;

  logic [15:0] ph8, pl8;   logic [17:0] pm8;  logic [31:0] p8;
  logic [31:0] ph16, pl16; logic [33:0] pm16; logic [63:0] p16;

  karatsuba_combine                       dut8  (.ph(ph8),  .pl(pl8),  .pm(pm8),  .p(p8));
  karatsuba_combine #(.N(16), .WA(19))    dut16 (.ph(ph16), .pl(pl16), .pm(pm16), .p(p16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned uh, ul, vh, vl;
    logic [31:0] u, v;
    for (int t = 0; t < 20000; t++) begin
      u = (t == 0) ? 32'hFFFF_FFFF : (t == 1) ? 32'h0 : $urandom;
      v = (t == 0) ? 32'hFFFF_FFFF : (t == 1) ? 32'hFFFF_FFFF : $urandom;
      // 16-bit operands
      uh = u[15:8]; ul = u[7:0]; vh = v[15:8]; vl = v[7:0];
      ph8 = 16'(uh * vh); pl8 = 16'(ul * vl); pm8 = 18'((uh + ul) * (vh + vl));
      // 32-bit operands
      ph16 = 32'(longint'(u[31:16]) * longint'(v[31:16]));
      pl16 = 32'(longint'(u[15:0]) * longint'(v[15:0]));
      pm16 = 34'((longint'(u[31:16]) + longint'(u[15:0])) * (longint'(v[31:16]) + longint'(v[15:0])));
      #1;
      checks++;
      if (p8 != 32'(longint'(u[15:0]) * longint'(v[15:0]))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %h*%h -> %h", u[15:0], v[15:0], p8);
      end
      checks++;
      if (p16 != 64'(u64_t'(u) * u64_t'(v))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %h*%h -> %h", u, v, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

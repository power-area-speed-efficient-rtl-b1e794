// Testbench for pe_booth_wallace: exhaustive 8x8 (default) and 9x9
// products, and random 16x16 ones, against the integer product.
module tb_pe_booth_wallace;
  int checks = 0, failures = 0;

  logic [7:0]  x8, y8;   logic [15:0] p8;
  logic [8:0]  x9, y9;   logic [17:0] p9;
  logic [15:0] x16, y16; logic [31:0] p16;

  pe_booth_wallace                dut8  (.x(x8),  .y(y8),  .p(p8));
  pe_booth_wallace #(.N(9))       dut9  (.x(x9),  .y(y9),  .p(p9));
  pe_booth_wallace #(.N(16))      dut16 (.x(x16), .y(y16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        x9 = 9'(i); y9 = 9'(j);
        x8 = 8'(i); y8 = 8'(j);
        #1;
        checks++;
        if (p9 != 18'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 9x9 %0d*%0d -> %0d", i, j, p9);
        end
        if (i < 256 && j < 256) begin
          checks++;
          if (p8 != 16'(i * j)) begin
            failures++;
            if (failures < 10) $display("FAIL 8x8 %0d*%0d -> %0d", i, j, p8);
          end
        end
      end
    end
    for (int t = 0; t < 20000; t++) begin
      x16 = (t == 0) ? 16'hFFFF : 16'($urandom);
      y16 = (t == 0) ? 16'hFFFF : 16'($urandom);
      #1;
      checks++;
      if (p16 != 32'(longint'(x16) * longint'(y16))) begin
        failures++;
        if (failures < 10) $display("FAIL 16x16 %h*%h -> %h", x16, y16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

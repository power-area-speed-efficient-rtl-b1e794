// Testbench for compressor42: all 32 input combinations. Checks the weight
// invariant x1+x2+x3+x4+cin == sum + 2*(carry+cout) and that cout does not
// depend on cin.
module tb_compressor42;
  logic [3:0] x;
  logic cin, s, c, co, co0;
  int checks = 0, failures = 0;

  compressor42 dut (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .cin(cin),
                    .sum(s), .carry(c), .cout(co));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      for (int k = 0; k < 2; k++) begin
        cin = 1'(k);
        #1;
        checks++;
        if ($countones(x) + k != int'(s) + 2 * (int'(c) + int'(co))) begin
          failures++;
          $display("FAIL x=%b cin=%0b -> sum=%0b carry=%0b cout=%0b", x, cin, s, c, co);
        end
        if (k == 0) co0 = co;
        else begin
          checks++;
          if (co != co0) begin
            failures++;
            $display("FAIL cout depends on cin for x=%b", x);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

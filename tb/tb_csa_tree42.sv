// Testbench for csa_tree42: random rows into trees of 6 rows x 16 bits
// (default), 5 x 16, 9 x 24 and 2 x 8. The two output rows must add up,
// modulo 2^W, to the sum of the input rows.
module tb_csa_tree42;
  int checks = 0, failures = 0;

  logic [15:0] r6 [6];  logic [15:0] s6, c6;
  logic [15:0] r5 [5];  logic [15:0] s5, c5;
  logic [23:0] r9 [9];  logic [23:0] s9, c9;
  logic [7:0]  r2 [2];  logic [7:0]  s2, c2;

  csa_tree42                      dut6 (.rows_in(r6), .sum_o(s6), .carry_o(c6));
  csa_tree42 #(.ROWS(5), .W(16))  dut5 (.rows_in(r5), .sum_o(s5), .carry_o(c5));
  csa_tree42 #(.ROWS(9), .W(24))  dut9 (.rows_in(r9), .sum_o(s9), .carry_o(c9));
  csa_tree42 #(.ROWS(2), .W(8))   dut2 (.rows_in(r2), .sum_o(s2), .carry_o(c2));

  task automatic check(string tag, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", tag, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e6, e5, e9, e2;
    for (int t = 0; t < 3000; t++) begin
      e6 = 0; e5 = 0; e9 = 0; e2 = 0;
      for (int k = 0; k < 6; k++) begin
        r6[k] = (t < 2) ? {16{t[0]}} : 16'($urandom);
        e6 += r6[k];
      end
      for (int k = 0; k < 5; k++) begin
        r5[k] = (t < 2) ? {16{t[0]}} : 16'($urandom);
        e5 += r5[k];
      end
      for (int k = 0; k < 9; k++) begin
        r9[k] = (t < 2) ? {24{t[0]}} : 24'($urandom);
        e9 += r9[k];
      end
      for (int k = 0; k < 2; k++) begin
        r2[k] = 8'($urandom);
        e2 += r2[k];
      end
      #1;
      check("6x16", 16'(s6 + c6), e6 & 64'hFFFF);
      check("5x16", 16'(s5 + c5), e5 & 64'hFFFF);
      check("9x24", 24'(s9 + c9), e9 & 64'hFF_FFFF);
      check("2x8",  8'(s2 + c2),  e2 & 64'hFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

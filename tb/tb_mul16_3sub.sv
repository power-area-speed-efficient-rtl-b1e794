// Testbench for mul16_3sub: 16x16 products (exhaustive over the corner
// bytes 00, 01, 7F, 80, FE, FF in every byte position, then random) and, in
// split mode, three independent random 8x8 products; the unused upper
// result lane must read 0 in whole mode.
module tb_mul16_3sub;
  int checks = 0, failures = 0;
  logic        split;
  logic [23:0] a, b;
  logic [47:0] p;

  mul16_3sub dut (.split(split), .a(a), .b(b), .p(p));

  task automatic check(string tag, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h: got %h expected %h", tag, a, b, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] corner [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    split = 1'b0;
    for (int i = 0; i < 1296; i++) begin
      a = {8'($urandom), corner[i % 6], corner[(i / 6) % 6]};
      b = {8'($urandom), corner[(i / 36) % 6], corner[(i / 216) % 6]};
      #1;
      check("16x16", p, longint'(a[15:0]) * longint'(b[15:0]));
    end
    for (int t = 0; t < 20000; t++) begin
      a = 24'($urandom);
      b = 24'($urandom);
      split = 1'b0;
      #1;
      check("16x16", p, longint'(a[15:0]) * longint'(b[15:0]));
      split = 1'b1;
      #1;
      check("8x8 lane0", p[15:0],  longint'(a[7:0])   * longint'(b[7:0]));
      check("8x8 lane1", p[31:16], longint'(a[15:8])  * longint'(b[15:8]));
      check("8x8 lane2", p[47:32], longint'(a[23:16]) * longint'(b[23:16]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

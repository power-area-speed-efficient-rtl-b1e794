// Testbench for vsu_dither (5 rails, 1 fractional bit, dither period 4):
// reset selects the top rail; an even code holds rail code/2; an odd code
// alternates between rails code/2 and code/2+1 with equal time on each;
// rail_sel is always one-hot and changes about once per dither period
// while dithering.
module tb_vsu_dither;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] code;
  logic [4:0] rail_sel;

  vsu_dither dut (.clk(clk), .rst_n(rst_n), .vol_code(code), .rail_sel(rail_sel));

  always #5 clk = ~clk;

  function automatic int rail_of(logic [4:0] s);
    for (int i = 0; i < 5; i++) if (s == 5'(1 << i)) return i;
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt [5];
    int changes;
    logic [4:0] prev;
    code = 3'd0;
    @(posedge clk);
    #1;
    checks++;
    if (rail_sel != 5'b10000) begin
      failures++;
      $display("FAIL reset rail_sel=%b", rail_sel);
    end
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < 8; c++) begin
      code = 3'(c);
      repeat (8) @(posedge clk);        // settle
      foreach (cnt[i]) cnt[i] = 0;
      changes = 0;
      prev = rail_sel;
      for (int n = 0; n < 400; n++) begin
        @(posedge clk);
        #1;
        checks++;
        if (rail_of(rail_sel) < 0) begin
          failures++;
          $display("FAIL rail_sel not one-hot: %b", rail_sel);
        end else cnt[rail_of(rail_sel)]++;
        if (rail_sel != prev) changes++;
        prev = rail_sel;
      end
      checks++;
      if (c % 2 == 0) begin
        if (cnt[c / 2] != 400) begin
          failures++;
          $display("FAIL code %0d should hold rail %0d", c, c / 2);
        end
      end else begin
        if (cnt[c / 2] != 200 || cnt[c / 2 + 1] != 200) begin
          failures++;
          $display("FAIL code %0d: %0d cycles on rail %0d, %0d on rail %0d",
                   c, cnt[c / 2], c / 2, cnt[c / 2 + 1], c / 2 + 1);
        end
        checks++;
        if (changes < 99 || changes > 101) begin
          failures++;
          $display("FAIL code %0d: %0d rail changes in 400 cycles, expected about 100", c, changes);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

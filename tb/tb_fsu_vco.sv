// Testbench for the fsu_vco oscillator model (10 MHz per code step):
// measures the period for several codes, checks that code 0 runs at the
// lowest frequency and that the clock stops while en is low.
module tb_fsu_vco;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic en;
  logic [5:0] code;
  logic clk;

  fsu_vco dut (.en(en), .code(code), .clk_out(clk));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1, expect_ns;
    int codes [5] = '{0, 1, 5, 14, 63};
    int edges;
    en = 1'b1;
    code = 6'd1;
    #10;
    foreach (codes[i]) begin
      code = 6'(codes[i]);
      repeat (3) @(posedge clk);        // let the new code take effect
      t0 = $realtime;
      repeat (10) @(posedge clk);
      t1 = $realtime;
      expect_ns = 1000.0 / (10.0 * ((codes[i] == 0) ? 1.0 : real'(codes[i])));
      checks++;
      if ((t1 - t0) / 10.0 > expect_ns * 1.01 || (t1 - t0) / 10.0 < expect_ns * 0.99) begin
        failures++;
        $display("FAIL code %0d: period %f ns, expected %f ns", codes[i], (t1 - t0) / 10.0, expect_ns);
      end
    end
    en = 1'b0;
    code = 6'd10;
    #300ns;
    edges = 0;
    fork
      begin : count
        forever begin
          @(posedge clk);
          edges++;
        end
      end
      #1us;
    join_any
    disable count;
    checks++;
    if (edges != 0 || clk != 1'b0) begin
      failures++;
      $display("FAIL clock ran while disabled (%0d edges)", edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

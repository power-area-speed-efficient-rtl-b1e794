// Testbench for booth_encoder: every 3-bit group against the radix-4 Booth
// table (000:0, 001:+1, 010:+1, 011:+2, 100:-2, 101:-1, 110:-1, 111:0),
// and that a zero digit never asks for negation.
module tb_booth_encoder;
  import mp_pkg::*;
  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;
  int digit;
  int table_val [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_encoder dut (.grp(grp), .sel(sel));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      grp = 3'(i);
      #1;
      digit = (sel.one ? 1 : 0) + (sel.two ? 2 : 0);
      if (sel.neg) digit = -digit;
      checks++;
      if (digit != table_val[i] || (sel.one && sel.two)) begin
        failures++;
        $display("FAIL grp=%b -> neg=%0b one=%0b two=%0b", grp, sel.neg, sel.one, sel.two);
      end
      checks++;
      if (table_val[i] == 0 && sel.neg) begin
        failures++;
        $display("FAIL grp=%b zero digit with neg set", grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// Testbench for vfmu: every performance request in every mode. The
// expected frequency code is ceil(request / lanes) with 9, 3 and 1 lanes,
// and the expected voltage code the lowest level v with 8v+7 >= frequency
// code (the default table). Also checks the reset values and the
// one-cycle latency.
module tb_vfmu;
  import mp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] perf_req;
  precision_e alg;
  logic [5:0] fre;
  logic [2:0] vol;

  vfmu dut (.clk(clk), .rst_n(rst_n), .perf_req(perf_req), .algorithm(alg),
            .fre_out(fre), .vol_out(vol));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lanes, ef, ev;
    precision_e modes [4] = '{PREC_8X8, PREC_16X16, PREC_32X32, PREC_RSVD};
    perf_req = '0;
    alg = PREC_32X32;
    @(posedge clk);
    #1;
    checks++;
    if (fre != 6'h3F || vol != 3'h7) begin
      failures++;
      $display("FAIL reset values fre=%0d vol=%0d", fre, vol);
    end
    @(negedge clk) rst_n = 1'b1;
    foreach (modes[m]) begin
      for (int r = 0; r < 64; r++) begin
        @(negedge clk);
        alg = modes[m];
        perf_req = 6'(r);
        lanes = (alg == PREC_8X8) ? 9 : (alg == PREC_16X16) ? 3 : 1;
        ef = (r + lanes - 1) / lanes;
        ev = ef / 8;
        #1;
        checks++;
        if (r > 0 && fre == 6'(ef) && ef != ((r - 1 + lanes - 1) / lanes)) begin
          failures++;
          $display("FAIL output changed before the clock edge (r=%0d)", r);
        end
        @(posedge clk);
        #1;
        checks++;
        if (fre != 6'(ef) || vol != 3'(ev)) begin
          failures++;
          $display("FAIL mode=%s req=%0d: fre=%0d vol=%0d expected %0d %0d",
                   alg.name(), r, fre, vol, ef, ev);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

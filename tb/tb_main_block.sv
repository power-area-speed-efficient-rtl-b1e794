// End-to-end testbench for main_block at its default parameters.
//
// The system clock comes from the fsu_vco oscillator model driven by the
// top's own frequency code fre_out, so the voltage/frequency loop is closed
// as in the real system. The test runs phases; each phase picks a precision
// mode and a performance request and issues operations with random valid
// gaps. Every result is compared one clock after issue with the integer
// products worked out here. At the end of each phase the frequency and
// voltage codes are compared with ceil(request/lanes) and the default
// voltage table, the measured clock period with the oscillator law, and the
// rail selection with the dithering rule. Mechanisms counted (each must
// occur at least once): 8x8, 16x16 and 32x32 operations, mode switches,
// 32x32 operations whose U1 and V1 both carry into bit 16, idle cycles,
// requests lowered by parallel processing, clock-frequency changes and
// voltage dithering between two rails. The 32x32 example
// 0x55555555 * 0x55555555 = 0x1C71C71C38E38E39 is checked first.
module tb_main_block;
  timeunit 1ns;
  timeprecision 1ps;
  import mp_pkg::*;

  typedef longint unsigned u64_t;
  int checks = 0, failures = 0;
  int n_mode [3];
  int n_switch = 0, n_carry17 = 0, n_idle = 0, n_pp_lower = 0, n_fchange = 0, n_dither = 0;

  logic         clk, rst_n;
  precision_e   alg;
  logic         in_valid;
  logic [71:0]  in1, in2;
  logic [5:0]   perf_req;
  logic         out_valid;
  logic [143:0] result;
  logic [5:0]   fre_out;
  logic [2:0]   vol_out;
  logic [4:0]   rail_sel;

  main_block dut (
    .clk(clk), .rst_n(rst_n), .algorithm(alg), .in_valid(in_valid),
    .input1(in1), .input2(in2), .perf_req(perf_req),
    .out_valid(out_valid), .result(result), .fre_out(fre_out),
    .vol_out(vol_out), .rail_sel(rail_sel)
  );

  fsu_vco u_vco (.en(1'b1), .code(fre_out), .clk_out(clk));

  function automatic logic [143:0] ref_product(precision_e m, logic [71:0] a, logic [71:0] b);
    logic [143:0] r = '0;
    case (m)
      PREC_8X8:
        for (int j = 0; j < 9; j++) r[16*j +: 16] = 16'(longint'(a[8*j +: 8]) * longint'(b[8*j +: 8]));
      PREC_16X16:
        for (int k = 0; k < 3; k++) r[32*k +: 32] = 32'(longint'(a[16*k +: 16]) * longint'(b[16*k +: 16]));
      default:
        r[63:0] = u64_t'(a[31:0]) * u64_t'(b[31:0]);
    endcase
    return r;
  endfunction

  function automatic int lanes(precision_e m);
    return (m == PREC_8X8) ? 9 : (m == PREC_16X16) ? 3 : 1;
  endfunction

  task automatic check(string tag, logic [143:0] got, logic [143:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", tag, got, exp);
    end
  endtask

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    precision_e  prev_mode;
    logic [143:0] exp;
    int          prev_fre;
    realtime     t0, t1, per, exp_per;
    int          rail_hits [5];
    int          ef, ev;

    rst_n = 1'b0; alg = PREC_32X32; in_valid = 1'b0; in1 = '0; in2 = '0; perf_req = 6'd20;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Example of the reference simulation.
    @(negedge clk);
    alg = PREC_32X32; in_valid = 1'b1;
    in1 = 72'h5555_5555; in2 = 72'h5555_5555;
    @(posedge clk); #0.01;
    check("example", result, 144'h1C71_C71C_38E3_8E39);
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid not set one clock after in_valid");
    end

    prev_mode = alg;
    prev_fre  = -1;
    for (int ph = 0; ph < 24; ph++) begin
      @(negedge clk);
      alg      = precision_e'(ph % 4 == 2 ? PREC_8X8 : ph % 4);
      if (alg == PREC_RSVD) alg = PREC_32X32;
      perf_req = 6'(ph % 3 == 0 ? 8 + 8 * (ph % 6) + 1 : $urandom_range(63, 1));
      if (alg != prev_mode) n_switch++;
      prev_mode = alg;
      foreach (rail_hits[i]) rail_hits[i] = 0;
      for (int op = 0; op < 40; op++) begin
        in_valid = ($urandom_range(9, 0) < 8);
        in1 = {8'($urandom), $urandom, $urandom};
        in2 = {8'($urandom), $urandom, $urandom};
        if (op % 4 == 0) begin
          in1[31:0] = {16'hFFFF, 16'($urandom)};
          in2[31:0] = {16'($urandom), 16'hFFFF};
        end
        exp = ref_product(alg, in1, in2);
        @(posedge clk); #0.01;
        checks++;
        if (out_valid !== in_valid) begin
          failures++;
          $display("FAIL out_valid=%0b for in_valid=%0b", out_valid, in_valid);
        end
        if (in_valid) begin
          check($sformatf("result mode %s", alg.name()), result, exp);
          n_mode[(alg == PREC_8X8) ? 0 : (alg == PREC_16X16) ? 1 : 2]++;
          if (alg == PREC_32X32 && ({1'b0, in1[31:16]} + {1'b0, in1[15:0]}) > 17'hFFFF &&
              ({1'b0, in2[31:16]} + {1'b0, in2[15:0]}) > 17'hFFFF) n_carry17++;
        end else n_idle++;
        if ($onehot(rail_sel)) begin
          for (int i = 0; i < 5; i++) if (rail_sel[i]) rail_hits[i]++;
        end else begin
          failures++;
          $display("FAIL rail_sel not one-hot: %b", rail_sel);
        end
        @(negedge clk);
      end
      // Codes after the phase.
      ef = (int'(perf_req) + lanes(alg) - 1) / lanes(alg);
      ev = ef / 8;
      checks++;
      if (fre_out != 6'(ef) || vol_out != 3'(ev)) begin
        failures++;
        $display("FAIL phase %0d: fre=%0d vol=%0d expected %0d %0d", ph, fre_out, vol_out, ef, ev);
      end
      if (ef < perf_req) n_pp_lower++;
      // Clock period against the oscillator law.
      @(posedge clk); t0 = $realtime;
      repeat (4) @(posedge clk); t1 = $realtime;
      per = (t1 - t0) / 4.0;
      exp_per = 100.0 / ((ef == 0) ? 1.0 : real'(ef));
      checks++;
      if (per > exp_per * 1.01 || per < exp_per * 0.99) begin
        failures++;
        $display("FAIL phase %0d: clock period %f ns, expected %f ns", ph, per, exp_per);
      end
      if (prev_fre >= 0 && prev_fre != ef) n_fchange++;
      prev_fre = ef;
      // Rails used in the second half of the phase follow the voltage code.
      checks++;
      if (ev % 2 == 1 && ev / 2 + 1 < 5) begin
        if (rail_hits[ev / 2] > 0 && rail_hits[ev / 2 + 1] > 0) n_dither++;
        else begin
          failures++;
          $display("FAIL phase %0d: odd code %0d but rails used %p", ph, ev, rail_hits);
        end
      end else if (rail_hits[(ev / 2 < 4) ? ev / 2 : 4] == 0) begin
        failures++;
        $display("FAIL phase %0d: code %0d but rails used %p", ph, ev, rail_hits);
      end
    end

    $display("ops 8x8=%0d 16x16=%0d 32x32=%0d switches=%0d carry17=%0d idle=%0d pp_lower=%0d fchange=%0d dither=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_switch, n_carry17, n_idle, n_pp_lower, n_fchange, n_dither);
    foreach (n_mode[i]) begin
      checks++;
      if (n_mode[i] == 0) begin failures++; $display("FAIL mode %0d never used", i); end
    end
    checks += 6;
    if (n_switch == 0)   begin failures++; $display("FAIL no mode switch"); end
    if (n_carry17 == 0)  begin failures++; $display("FAIL no 17-bit U1/V1 case"); end
    if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    if (n_pp_lower == 0) begin failures++; $display("FAIL parallel processing never lowered the clock"); end
    if (n_fchange == 0)  begin failures++; $display("FAIL clock frequency never changed"); end
    if (n_dither == 0)   begin failures++; $display("FAIL no voltage dithering"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

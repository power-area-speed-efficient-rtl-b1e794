// vfmu: voltage/frequency management unit.
//
// Turns the user's performance request into a clock-frequency code for the
// frequency scaling unit and a supply-voltage code for the voltage scaling
// unit. perf_req is the required throughput in products per unit time,
// counted in steps of the oscillator's frequency step. Parallel processing
// lowers the clock needed for it: in 8x8 mode nine products finish per
// cycle and in 16x16 mode three, so
//   fre_out = ceil(perf_req / lanes(algorithm)).
// The voltage code is the lowest level whose maximum safe frequency,
// FMAX[level], is at least fre_out; the code counts half steps between
// supply rails (see vsu_dither). The FMAX table is a parameter; its
// default (a linear table) is this design's choice, as is the whole
// encoding of both codes. Outputs are registered: they follow the inputs
// one clock later. Reset gives the highest voltage and frequency codes.
module vfmu
  import mp_pkg::*;
#(
  parameter int unsigned FW = 6,                 // frequency code width
  parameter int unsigned VW = 3,                 // voltage code width
  parameter logic [5:0] FMAX [8] = '{6'd7, 6'd15, 6'd23, 6'd31, 6'd39, 6'd47, 6'd55, 6'd63}
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [FW-1:0] perf_req,
  input  precision_e    algorithm,
  output logic [FW-1:0] fre_out,
  output logic [VW-1:0] vol_out
);
  logic [FW-1:0] fre_next;
  logic [VW-1:0] vol_next;

  always_comb begin
    case (algorithm)
      PREC_8X8:   fre_next = FW'((int'(perf_req) + 8) / 9);
      PREC_16X16: fre_next = FW'((int'(perf_req) + 2) / 3);
      default:    fre_next = perf_req;
    endcase
    vol_next = VW'((1 << VW) - 1);
    for (int v = (1 << VW) - 1; v >= 0; v--) begin
      if (FW'(FMAX[v]) >= fre_next) vol_next = VW'(v);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fre_out <= '1;
      vol_out <= '1;
    end else begin
      fre_out <= fre_next;
      vol_out <= vol_next;
    end
  end

  initial begin
    assert (VW <= 3) else $error("vfmu: FMAX holds 8 levels, VW must be at most 3");
  end

endmodule

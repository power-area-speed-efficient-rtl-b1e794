// main_block: multiprecision multiplier system with voltage and frequency
// management.
//
// The user gives a precision mode (algorithm), operand buses input1/input2
// and a performance request. The multiprecision multiplier (mp_multiplier)
// forms one 32x32, three 16x16 or nine 8x8 products in one pass; the
// results are registered, so result and out_valid follow in_valid by one
// clock. The voltage/frequency management unit (vfmu) derives from the
// request and the mode a clock-frequency code fre_out, meant for the
// external oscillator that produces clk, and a voltage code vol_out, which
// the voltage scaling unit (vsu_dither) turns into the one-hot rail_sel of
// the supply switches. The oscillator and the supply rails are analog and
// sit outside this module.
//
// Operand and result lanes (see mp_multiplier):
//   32x32: input1[31:0]*input2[31:0]      -> result[63:0]
//   16x16: input1[16k+15:16k]*input2[...] -> result[32k+31:32k], k = 0..2
//   8x8  : input1[8j+7:8j]*input2[...]    -> result[16j+15:16j], j = 0..8
// The output register, the one-cycle latency, the single clock and the
// lane layout are this design's choices.
module main_block
  import mp_pkg::*;
#(
  parameter int unsigned NRAILS = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  precision_e        algorithm,
  input  logic              in_valid,
  input  logic [71:0]       input1,
  input  logic [71:0]       input2,
  input  logic [5:0]        perf_req,
  output logic              out_valid,
  output logic [143:0]      result,
  output logic [5:0]        fre_out,
  output logic [2:0]        vol_out,
  output logic [NRAILS-1:0] rail_sel
);
  logic [143:0] p;

  mp_multiplier u_mp (.algorithm(algorithm), .a(input1), .b(input2), .p(p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) result <= p;
    end
  end

  vfmu u_vfmu (
    .clk(clk), .rst_n(rst_n), .perf_req(perf_req), .algorithm(algorithm),
    .fre_out(fre_out), .vol_out(vol_out)
  );

  vsu_dither #(.NRAILS(NRAILS), .CW(3), .FRAC_W(1)) u_vsu (
    .clk(clk), .rst_n(rst_n), .vol_code(vol_out), .rail_sel(rail_sel)
  );

endmodule

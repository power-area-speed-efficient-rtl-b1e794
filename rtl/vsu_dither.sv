// vsu_dither: controller of the voltage scaling unit (voltage dithering).
//
// The supply is taken from one of NRAILS fixed rails through power
// switches; rail_sel is the one-hot enable of those switches. A voltage
// between two rails is obtained by dithering: switching between the rail
// below and the rail above so that the time-average supply is the wanted
// value. vol_code counts in 1/2^FRAC_W of a rail step: its upper bits give
// the lower rail and its FRAC_W lower bits the fraction of time spent on the
// next rail up. Every DIV clock cycles a first-order accumulator adds the
// fraction; when it overflows, the next rail up is used for that period,
// otherwise the lower rail. With FRAC_W = 1 an odd code alternates between
// two rails every DIV cycles. Codes above the top rail select the top rail.
// Reset selects the top rail. The rail count, the code format, DIV and the
// accumulator are this design's choices; the rails and switches themselves
// are analog and outside this module.
module vsu_dither #(
  parameter int unsigned NRAILS = 5,
  parameter int unsigned CW     = 3,   // vol_code width
  parameter int unsigned FRAC_W = 1,   // fractional bits of vol_code
  parameter int unsigned DIV    = 4    // dither period in clock cycles
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CW-1:0]     vol_code,
  output logic [NRAILS-1:0] rail_sel
);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [DW-1:0]     div_cnt;
  logic [FRAC_W-1:0] acc;
  logic [FRAC_W:0]   acc_sum;
  logic              tick;
  int unsigned       base, rail;

  assign tick    = (div_cnt == DW'(DIV - 1));
  assign acc_sum = {1'b0, acc} + {1'b0, vol_code[FRAC_W-1:0]};

  always_comb begin
    base = int'(vol_code[CW-1:FRAC_W]);
    rail = base + int'(acc_sum[FRAC_W]);
    if (rail > NRAILS - 1) rail = NRAILS - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt  <= '0;
      acc      <= '0;
      rail_sel <= NRAILS'(1) << (NRAILS - 1);
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (tick) begin
        acc      <= acc_sum[FRAC_W-1:0];
        rail_sel <= NRAILS'(1) << rail;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(rail_sel))
    else $error("vsu_dither: rail_sel must be one-hot");

endmodule

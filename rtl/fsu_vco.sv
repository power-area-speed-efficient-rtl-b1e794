// fsu_vco: behavioural model of the frequency scaling unit, a voltage
// controlled oscillator. Not synthesizable: it stands for an analog
// oscillator and exists for simulation.
//
// The oscillator runs at max(code, 1) * STEP_MHZ MHz with a 50 % duty cycle
// while en is high and holds clk_out low while en is low. A new code takes
// effect at the next half period. The linear code-to-frequency law and
// STEP_MHZ are this model's choices.
module fsu_vco #(
  parameter int unsigned CW       = 6,
  parameter real         STEP_MHZ = 10.0
) (
  input  logic          en,
  input  logic [CW-1:0] code,
  output logic          clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  realtime     half_period;
  int unsigned steps;

  initial clk_out = 1'b0;

  always begin
    steps       = (code == '0) ? 1 : int'(code);
    half_period = 500.0 / (STEP_MHZ * real'(steps));
    #(half_period);
    clk_out = en ? ~clk_out : 1'b0;
  end

endmodule

// rc_filter2_model: behavioural model of the external second-order RC
// low-pass filter that turns a modulator pin into an analog voltage.
// Simulation only; it is not synthesizable and not part of the FPGA logic.
//
// Circuit: vin -- R1 -- node1 (C1 to ground) -- R2 -- vout (C2 to ground),
// with R2 = 2*R1 and C2 = C1/2 so that the second stage barely loads the
// first. Defaults are R1 = 5 kOhm, C1 = 1 nF, R2 = 10 kOhm, C2 = 0.5 nF, a
// corner of roughly 0.1575 / (R1*C1) = 31.5 kHz. The node equations
//   C1 dv1/dt = (vin - v1)/R1 - (v1 - vout)/R2
//   C2 dvout/dt = (v1 - vout)/R2
// are integrated with SUBSTEPS forward-Euler steps per rising edge of clk,
// one clock period DT_S long in total; `vin` is the pin voltage held over
// that period. Both capacitors start discharged.
module rc_filter2_model #(
  parameter real R1_OHM   = 5.0e3,
  parameter real C1_F     = 1.0e-9,
  parameter real R2_OHM   = 10.0e3,
  parameter real C2_F     = 0.5e-9,
  parameter real DT_S     = 20.0e-9,
  parameter int  SUBSTEPS = 4
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);

  real v1 = 0.0;
  real v2 = 0.0;

  always @(posedge clk) begin
    real h, i1, i2;
    h = DT_S / SUBSTEPS;
    for (int k = 0; k < SUBSTEPS; k++) begin
      i1 = (vin - v1) / R1_OHM;
      i2 = (v1 - v2) / R2_OHM;
      v1 = v1 + h * (i1 - i2) / C1_F;
      v2 = v2 + h * i2 / C2_F;
    end
  end

  assign vout = v2;

endmodule

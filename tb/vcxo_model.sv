// vcxo_model - behavioural model (not synthesizable) of the RDS's voltage
// controlled crystal oscillator together with the D/A converter that sets
// its control voltage. The 12-bit OUTPUT FREQUENCY CONTROL CODE moves the
// frequency linearly around the nominal value: code 2048 gives NOMINAL_MHZ,
// each step away from it PPM_PER_LSB parts per million. The real part is
// nonlinear and is calibrated by the control computer; a linear law is
// enough for simulation. Testbenches exaggerate PPM_PER_LSB to make the
// delay drift visible in short runs.
module vcxo_model #(
  parameter real NOMINAL_MHZ = 221.184,
  parameter real PPM_PER_LSB = 0.00055
) (
  input  logic [11:0] code,
  output logic        clk
);
  real half_ns;
  initial clk = 1'b0;
  always begin
    half_ns = 500.0 / (NOMINAL_MHZ * (1.0 + (real'(code) - 2048.0) * PPM_PER_LSB * 1.0e-6));
    #(half_ns) clk = ~clk;
  end
endmodule

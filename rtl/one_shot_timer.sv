// one_shot_timer: behavioural model of the analog-to-time converter, a
// one-shot timer whose R-C timing cell is biased by the sampled voltage.
// This is a simulation model of a mixed-signal part (two NOR gates around
// an external R-C network), not synthesizable logic.
//
// A rising edge on trigger starts a pulse on pulse_out. Its length is
//     T_pulse = R * C * ln( VDD / (v_sample - VTH) )
// so a higher sampled voltage gives a shorter pulse; the characteristic is
// logarithmic, not linear. A v_sample at or below VTH would never end the
// pulse; the model then clips the pulse at MAX_TAU time constants. A new
// trigger during a pulse is ignored.
//
// Parameters: R_OHM, C_PF (default 1 kOhm and 500 pF, tau = 500 ns, as in
// the FPGA set-up), VDD and VTH (3.3 V and 1.6 V). v_sample is in volts.
`timescale 1ps/1ps
module one_shot_timer #(
  parameter real R_OHM   = 1000.0,
  parameter real C_PF    = 500.0,
  parameter real VDD     = 3.3,
  parameter real VTH     = 1.6,
  parameter real MAX_TAU = 10.0
) (
  input  logic trigger,
  input  real  v_sample,
  output logic pulse_out
);
  localparam real TAU_PS = R_OHM * C_PF;   // ohm * pF = ps

  realtime t_pulse;

  // Retriggering during a pulse is impossible by construction: the next
  // trigger edge is only waited for once the pulse has ended.
  initial begin
    pulse_out = 1'b0;
    forever begin
      @(posedge trigger);
      if (v_sample - VTH <= VDD * $exp(-MAX_TAU)) t_pulse = TAU_PS * MAX_TAU;
      else t_pulse = TAU_PS * $ln(VDD / (v_sample - VTH));
      if (t_pulse < 0.0) t_pulse = 0.0;
      pulse_out = 1'b1;
      #(t_pulse);
      pulse_out = 1'b0;
    end
  end
endmodule

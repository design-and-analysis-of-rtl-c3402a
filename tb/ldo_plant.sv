`timescale 1ns / 1ps
// ldo_plant: behavioural model of the regulator's output node for
// simulation: the output capacitor and a resistive load, fed from VSUP
// through the conductance of the enabled tri-state buffers.
//
// Each STEP_NS the node is advanced with the exact solution of
//   C dV/dt = g (VSUP - V) - V / R_load
// for g held constant over the step:
//   v_inf = VSUP g / (g + 1/R),  tau = C / (g + 1/R),
//   V <- v_inf + (V - v_inf) exp(-STEP/tau)
// which is stable for any step. The load is set as a current at the nominal
// output level (i_load_a at v_nom), i.e. R = v_nom / i_load_a. The 50 pF
// default capacitance is the published load capacitor.
module ldo_plant #(
  parameter real C_F     = 50.0e-12,
  parameter real STEP_NS = 1.0
) (
  input  real g_on,
  input  real vsup,
  input  real i_load_a,
  input  real v_nom,
  output real vout
);

  real g_load, v_inf, tau_ns;

  initial begin
    vout = 0.0;
    forever begin
      #(STEP_NS);
      g_load = i_load_a / v_nom;
      v_inf  = vsup * g_on / (g_on + g_load);
      tau_ns = 1.0e9 * C_F / (g_on + g_load);
      vout   = v_inf + (vout - v_inf) * $exp(-STEP_NS / tau_ns);
    end
  end

endmodule

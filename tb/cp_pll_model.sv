// cp_pll_model: behavioural model of a charge-pump PLL, for simulation only.
//
// Not synthesizable. It stands in for the analog PLL that the self-test is
// attached to: a phase-frequency detector, a charge pump with loop filter and
// a VCO, with the PLL's own ports (reference in, feedback in, VCO out). There
// is no divider inside: the feedback input is driven from outside, by the
// self-test's multiplexer, so the loop locks Ffb to Fref.
//
//   PFD      ideal three-state detector: a reference edge raises UP unless DN
//            is pending (then it clears DN), a feedback edge the other way.
//   pump/LF  time-stepped every 1 ns. The integrating capacitor is a
//            frequency state f_int that moves by KI MHz per ns of UP (or DN);
//            the series resistor adds a proportional term KP x (UP - DN),
//            smoothed with a TAU_NS time constant by the second capacitor.
//   VCO      output frequency f_int + proportional term, limited to
//            F_MIN_MHZ..F_MAX_MHZ, generated as a square wave.
//
// Faults for exercising the self-test: `fault_weak_up` scales the UP current
// by UP_FAULT_SCALE (the charging path is slowed, as an open transistor in
// the UP path would do); `fault_dead_vco` stops the VCO output.
// The loop constants are this model's own, chosen so that the loop settles
// within about two microseconds at a 25 MHz reference.
`timescale 1ns / 1ps
module cp_pll_model #(
  parameter real F_INIT_MHZ     = 20.0,
  parameter real F_MIN_MHZ      = 10.0,
  parameter real F_MAX_MHZ      = 160.0,
  parameter real KI             = 0.2,   // MHz per ns of pump current
  parameter real KP             = 20.0,  // MHz while the pump is on
  parameter real TAU_NS         = 4.0,
  parameter real UP_FAULT_SCALE = 0.1
) (
  input  logic fref,
  input  logic ffb,
  input  logic fault_weak_up,
  input  logic fault_dead_vco,
  output logic fvco
);

  logic up = 1'b0;
  logic dn = 1'b0;
  real  f_int  = F_INIT_MHZ;
  real  f_prop = 0.0;
  real  f_mhz  = F_INIT_MHZ;

  always @(posedge fref) begin
    if (dn) dn = 1'b0;
    else    up = 1'b1;
  end

  always @(posedge ffb) begin
    if (up) up = 1'b0;
    else    dn = 1'b1;
  end

  initial begin
    real i_pump;
    forever begin
      #1.0;
      i_pump = 0.0;
      if (up) i_pump = fault_weak_up ? UP_FAULT_SCALE : 1.0;
      if (dn) i_pump = -1.0;
      f_int  = f_int + KI * i_pump;
      if (f_int < F_MIN_MHZ) f_int = F_MIN_MHZ;
      if (f_int > F_MAX_MHZ) f_int = F_MAX_MHZ;
      f_prop = f_prop + (KP * i_pump - f_prop) / TAU_NS;
      f_mhz  = f_int + f_prop;
      if (f_mhz < F_MIN_MHZ) f_mhz = F_MIN_MHZ;
      if (f_mhz > F_MAX_MHZ) f_mhz = F_MAX_MHZ;
    end
  end

  initial begin
    fvco = 1'b0;
    forever begin
      #(500.0 / f_mhz);
      if (!fault_dead_vco) fvco = ~fvco;
    end
  end

endmodule

// fb_mux: 2:1 multiplexer that chooses the PLL feedback signal.
//
// sel = 0 passes the VCO output itself (normal operation and the discharge
// test), sel = 1 passes the VCO output divided by N (charge test). sel is
// the strobe C_clk from the control block. It is a plain combinational
// multiplexer, as in the design; the phase step at a switch is what the
// test relies on, so no glitch-free clock switching is added. A short pulse
// at the switching instant only adds to that phase step.
module fb_mux (
  input  logic fvco,
  input  logic fvco_div,
  input  logic sel,
  output logic ffb
);

  always_comb begin
    if (sel) ffb = fvco_div;
    else     ffb = fvco;
  end

endmodule

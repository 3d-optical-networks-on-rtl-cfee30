// Behavioural model of a 1x2 microresonator (MR) switching element, the basic
// cell of the Cygnus optical switching fabric. It is not synthesizable logic:
// the real part is a silicon microring next to two waveguides, and this model
// only reproduces what light does at the ring's on-state wavelength.
//
// Both element shapes (parallel: two parallel waveguides; crossing: two
// crossing waveguides) switch the same way and share this model:
//   * ring powered off: light on "in" continues to "through", and light on
//     "add" continues along its own waveguide to "drop";
//   * ring powered on: light on "in" is coupled into the ring and leaves on
//     "drop"; "through" goes dark.
// Light entering "add" while the ring is on is not modelled (taken as
// absorbed): the fabric never powers a ring whose add waveguide carries light.
//
// Interface: power_on (electrical, from the control unit through a TSV),
// optical ports in/add (entering) and through/drop (leaving), each an opt_t
// word per control-clock cycle. Zero delay, no state.
module mr_switch
  import onoc_pkg::*;
(
  input  logic power_on,
  input  opt_t in_light,
  input  opt_t add_light,
  output opt_t through_light,
  output opt_t drop_light
);

  always_comb begin
    if (power_on) begin
      through_light = OPT_DARK;
      drop_light    = in_light;
    end else begin
      through_light = in_light;
      drop_light    = add_light;
    end
  end

endmodule

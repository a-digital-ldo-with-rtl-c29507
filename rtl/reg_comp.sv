// reg_comp: regulation compensation between the fine and the coarse shift
// register.
//
// In steady state only the fine register is clocked (at the 50 MHz sampling
// strobe). When the load current moves out of the range the fine array can
// cover, the fine word runs into one of its ends while the comparator keeps
// asking for the same direction. Rather than waiting for the window detector
// to fire a burst, this block then steps the coarse register once, in the
// direction the comparator asks for (COMP = step request, UP = direction).
// In the same cycle the fine word is reloaded to its middle (16 of 32 off).
// A coarse unit is worth 16 fine units, so with CMB = 16 * CRS + FINE the
// pair (CRS + 1, FINE = 16) gives exactly the CMB of (CRS, FINE = 32), and
// (CRS - 1, 16) that of (CRS, 0): the handover does not disturb V_OUT, and
// the fine word then has room on either side.
//
// The names COMP and UP and the purpose follow the reference design; the
// exact trigger rule (an end reached and the comparator pushing further, at
// a fine sampling instant) and the re-centring of the fine word are this
// design's own, derived from the 2:1 ratio of the fine range to a coarse
// unit.
//
// Interface: fine_tick = the fine register samples in this cycle; cmp_out =
// CMP_OUT (1 = V_OUT above V_REF, i.e. turn more PMOS off). comp is a
// one-cycle request, combinational from the inputs, taken by the coarse
// register (one step) and the fine register (reload) at the next clock edge.
module reg_comp (
  input  logic fine_tick,   // fine S/R clock enable of this cycle
  input  logic cmp_out,     // CMP_OUT
  input  logic fine_full,   // fine word all ones (all fine PMOS off)
  input  logic fine_empty,  // fine word all zeros (all fine PMOS on)
  output logic comp,        // step the coarse S/R once
  output logic up           // direction of that step: 1 = one more coarse PMOS off
);

  always_comb begin
    up   = cmp_out;
    comp = fine_tick && ((cmp_out && fine_full) || (!cmp_out && fine_empty));
  end

endmodule

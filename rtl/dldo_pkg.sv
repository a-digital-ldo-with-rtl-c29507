// dldo_pkg: constants and types shared by the coarse-fine-tuning digital LDO
// controller.
//
// The sizes are the ones of the reference design: a coarse power array of 64
// units at x16 strength, a fine array of 32 units at x1, an auxiliary
// feed-forward section of x2 strength (beta = 2), a 500 MHz fast clock, a
// 50 MHz slow clock (ratio 10) and a burst of 128 fast cycles (256 ns).
// The guard period after a burst has no published length; 128 fast cycles is
// this design's choice.
package dldo_pkg;

  localparam int unsigned CFG_COARSE_UNITS    = 64;   // coarse PMOS units (CRS<0:63>)
  localparam int unsigned CFG_FINE_UNITS      = 32;   // fine PMOS units (FINE<0:31>)
  localparam int unsigned CFG_COARSE_STRENGTH = 16;   // N: coarse unit = 16 fine units
  localparam int unsigned CFG_AUX_BETA        = 2;    // Aux PMOS strength in fine units
  localparam int unsigned CFG_SLOW_DIV        = 10;   // CLK_FAST / CLK_SLOW = 500 / 50
  localparam int unsigned CFG_BURST_CYCLES    = 128;  // dT1 in CLK_FAST cycles
  localparam int unsigned CFG_GUARD_CYCLES    = 128;  // dT2 in CLK_FAST cycles (own choice)
  localparam int unsigned CFG_SYNC_STAGES     = 2;    // synchroniser depth of the peak detector

  // Operating phase of the burst-mode control logic.
  typedef enum logic [1:0] {
    PH_FINE  = 2'd0,   // steady state: fine tuning at CLK_SLOW
    PH_BURST = 2'd1,   // coarse tuning at CLK_FAST, MOD = 1, for dT1
    PH_GUARD = 2'd2    // fine tuning, burst re-entry blocked, for dT2
  } phase_e;

endpackage

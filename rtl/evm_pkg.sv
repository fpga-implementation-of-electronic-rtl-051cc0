// evm_pkg: constants and types shared by the electronic voting machine (EVM).
//
// The machine offers five options on a 5-bit switch input: four parties and
// "None of the Above" (NOTA). Each option is selected by one switch, so a
// valid selection is a one-hot code. Vote counts are 8-bit registers. These
// three numbers follow the published design; the option enum, the
// LED hold time and the display refresh period are this design's own choices.
package evm_pkg;

  // Number of selectable options: Party1..Party4 and NOTA.
  localparam int unsigned N_OPT   = 5;
  // Number of contesting parties (options that can win).
  localparam int unsigned N_PARTY = 4;
  // Width of one vote-count register.
  localparam int unsigned CNT_W   = 8;
  // Width of an option index.
  localparam int unsigned OPT_W   = $clog2(N_OPT);

  // Option index; bit i of the switch input and of the LED output
  // belongs to option i.
  typedef enum logic [OPT_W-1:0] {
    OPT_PARTY1 = 3'd0,
    OPT_PARTY2 = 3'd1,
    OPT_PARTY3 = 3'd2,
    OPT_PARTY4 = 3'd3,
    OPT_NOTA   = 3'd4
  } opt_e;

  // Cycles the party LED stays lit after an accepted vote: one second at
  // a 100 MHz board clock.
  localparam int unsigned LED_TIMER_MAX_DEFAULT = 100_000_000;

  // Cycles each seven-segment digit is driven before the next one:
  // 1 ms at 100 MHz, so the three digits refresh at about 333 Hz.
  localparam int unsigned REFRESH_CYCLES_DEFAULT = 100_000;

  // Number of seven-segment digits (anodes An0, An1, An2).
  localparam int unsigned N_DIGITS = 3;

endpackage

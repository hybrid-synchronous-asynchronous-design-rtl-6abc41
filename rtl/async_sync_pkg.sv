`timescale 1ps / 1ps
// Shared constants of the asynchronous-to-synchronous interface.
//
// N_DATA is the width of the payload released to the synchronous side and
// T_BITS the width of the Data Release Time Value (DRTV) that travels with
// every token and of the global synchronous timer. T_BITS = 5 follows the
// 5-bit comparator example of the design; N_DATA = 8 is this implementation's
// own choice (the design leaves N open). All multi-rail channels are
// dual-rail: each bit has a true rail and a false rail, both low when neutral.
package async_sync_pkg;
  localparam int unsigned N_DATA        = 8;
  localparam int unsigned T_BITS        = 5;
  localparam int unsigned SYNC_STAGES   = 2;   // D-FF 1 plus the optional D-FF 2
  localparam int unsigned INV_PAIRS     = 9;   // delay line length, inverter pairs
  localparam int unsigned PAIR_DELAY_PS = 44;  // about 400 ps in total

  // Dual-rail encoding of a single-rail word.
  function automatic logic [1:0] dual_rail(input logic b);
    return {b, ~b};  // {true rail, false rail}
  endfunction
endpackage

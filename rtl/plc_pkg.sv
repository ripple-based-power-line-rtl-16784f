// plc_pkg: shared constants of the ripple-based power-line link.
//
// The numbers are the operating point of the receiver: a 50 MHz sampling
// clock, reference square waves at f_ck/56 (symbol 0) and f_ck/44
// (symbol 1), and a symbol of N = 616 clock cycles (T_s = 12.32 us,
// about 81 kbit/s). 616 is the smallest length that holds a whole number
// of periods of both references (11 and 14), which makes them orthogonal.
// Counts up to N need 10 bits.
package plc_pkg;
  localparam int unsigned F_CK_HZ = 50_000_000;
  localparam int unsigned N_SYM   = 616;    // clock cycles per symbol
  localparam int unsigned DIV_F0  = 56;     // f0 = f_ck / 56 ~ 0.893 MHz
  localparam int unsigned DIV_F1  = 44;     // f1 = f_ck / 44 ~ 1.136 MHz
  localparam int unsigned CNT_W   = 10;     // width of counts and metrics
endpackage

// bsu_pkg: constants and types shared by the Beam Steering Unit (BSU) RTL.
//
// The BSU drives a four-element phased array through four integer-N PLLs.
// Each PLL reference is a delayed copy of one common reference square wave;
// the delay, in periods of the fast flip-flop clock, is the 8-bit Phase
// Tuning Word (PTW) of that channel. The numbers below are those of the
// prototype: 4 channels, 8-bit phase resolution (1.40625 degrees),
// f_CLK = 256 MHz, f_REF = 1 MHz, 2.453 GHz carrier, so the PLL feedback
// divider is M = 2453, 16-PSK at 8 kbaud.
package bsu_pkg;

  // Number of delay channels (one per PLL / antenna).
  localparam int unsigned N_CH      = 4;
  // Phase resolution in bits: T_CLK = T_REF / 2**PTW_W.
  localparam int unsigned PTW_W     = 8;
  // PLL feedback division ratio (2.453 GHz output / 1 MHz PFD frequency).
  localparam int unsigned PLL_M     = 2453;
  // Fast clock cycles per symbol: 256 MHz / 8 kbaud.
  localparam int unsigned SYM_CYC   = 32000;
  // Bits per PSK symbol (16-PSK).
  localparam int unsigned PSK_BITS  = 4;

  typedef logic [PTW_W-1:0] ptw_t;

  // Modular inverse of an odd number modulo 2**w (eq. n_hat * n mod 2^k = 1).
  // Computed by Newton iteration x <- x*(2 - n*x), which doubles the number of
  // correct low bits at every step; five steps cover 32 bits.
  function automatic int unsigned mod_inv_pow2(input int unsigned n, input int unsigned w);
    logic [31:0] x;
    logic [31:0] mask;
    x = n;  // correct to 3 bits for any odd n
    for (int i = 0; i < 5; i++) x = x * (32'd2 - n * x);
    mask = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 32'd1);
    return x & mask;
  endfunction

endpackage

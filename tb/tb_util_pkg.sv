// tb_util_pkg: reference timing model shared by the testbenches.
//
// The testbenches run ref_clk with period CLK_PS = 2400 ps, starting low and
// rising first at RISE0 = 1200 ps. CK<0> equals ref_clk, so the fine bin of
// an instant t is floor(((t - RISE0) mod CLK_PS) / 75). The coarse count of
// a conversion is the number of ref_clk rising edges strictly between the
// START and the STOP instants, saturated at 127.
`timescale 1ps/1ps
package tb_util_pkg;
  localparam longint CLK_PS = 2400;
  localparam longint HALF_PS = 1200;
  localparam longint RISE0  = 1200;
  localparam longint BIN    = 75;

  function automatic int exp_bin(longint t);
    longint ph = (t - RISE0) % CLK_PS;
    if (ph < 0) ph += CLK_PS;
    return int'(ph / BIN);
  endfunction

  // Rising edges r = RISE0 + n*CLK_PS with t0 < r < t1.
  function automatic int exp_coarse(longint t0, longint t1);
    longint n = 0;
    for (longint r = RISE0; r < t1; r += CLK_PS) if (r > t0) n++;
    return (n > 127) ? 127 : int'(n);
  endfunction

  // A time in the middle of a fine bin: clock period p, bin b.
  function automatic longint mid_bin(longint p, int b);
    return RISE0 + p*CLK_PS + longint'(b)*BIN + 37;
  endfunction
endpackage

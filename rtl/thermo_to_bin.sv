// thermo_to_bin: fine-code encoder of the TDC interpolator.
//
// The 16 column clock lines CK<k> are copies of the reference clock delayed
// by k*75 ps with 50% duty cycle, so their rising edges mark bins 0..15 and
// their falling edges bins 16..31 of one period. Latched at an instant in
// bin b, the lines form a 32-state Johnson code:
//   b <  16 : CK<0..b> high, the rest low         (CK<0> = 1)
//   b >= 16 : CK<0..b-16> low, the rest high      (CK<0> = 0)
// so b = CK<0> ? popcount-1 : 31-popcount. Purely combinational.
// The encoder itself is named in the source material; this encoding rule is
// derived here from the dual-edge phase scheme.
`timescale 1ps/1ps
module thermo_to_bin #(
  parameter int N_PHASE = 16,
  parameter int BIN_W   = $clog2(2*N_PHASE)
) (
  input  logic [N_PHASE-1:0] therm,
  output logic [BIN_W-1:0]   bin
);
  logic [BIN_W:0] ones;

  always_comb begin
    ones = '0;
    for (int k = 0; k < N_PHASE; k++) ones += (BIN_W+1)'(therm[k]);
    if (therm[0]) bin = BIN_W'(ones - 1'b1);
    else          bin = BIN_W'((2*N_PHASE - 1) - int'(ones));
  end
endmodule

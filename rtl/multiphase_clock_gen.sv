// multiphase_clock_gen: behavioural model (not synthesizable) of the global
// multiphase clock generator that feeds the dual-edge TDC interpolators.
//
// The model keeps the chain of the original generator, stage by stage:
//   1. 16-tap DLL: tap i is the reference clock delayed by i*150 ps, so the
//      16 taps span exactly one period.
//   2. 16-to-32 edge interpolator: every tap gives two outputs, itself and
//      an edge halfway to the next tap, i.e. 32 clocks 75 ps apart.
//   3. Phase calibration: each of the 32 clocks gets an adjustable delay of
//      cal_trim[j]*TRIM_PS.
//   4. 32-to-16 edge combiner: line k rises on the rising edge of clock k
//      and falls on the rising edge of clock k+16, so the falling edge of a
//      line is a calibrated edge of its own and the 50% duty cycle can be
//      trimmed.
//   5. Adjustable clock tree: each line gets a further delay of
//      tree_trim[k]*TRIM_PS before it reaches the columns.
// With every trim at mid-scale (2**(TRIM_W-1)) the fixed DLL latency makes
// CK<k> exactly ref_clk delayed by k*BIN_PS (modulo one period): a rising
// edge at k*75 ps and a falling edge at k*75 ps + half a period. A trim
// step moves an edge by TRIM_PS; trims must be held stable.
//
// ref_clk must have a 50% duty cycle and a period of 2*N_PHASE*BIN_PS
// (2400 ps; the source quotes 415 MHz and 75 ps). Outputs are valid two
// periods after ref_clk starts.
//
// Follows the source: the stage order, 16 taps of 150 ps, 32 edges of
// 75 ps, 16 output lines, and CONFIG driving the phase calibration and the
// clock tree. This design's choices: the trim width and step (the source
// gives neither), the combiner rule (rise on clock k, fall on clock k+16),
// and ideal stages (no mismatch, no jitter). The frequency multiplier and
// the two dummy guard lines have no logic function and are not modelled.
`timescale 1ps/1ps
module multiphase_clock_gen #(
  parameter int N_PHASE = 16,
  parameter int BIN_PS  = 75,
  parameter int TRIM_W  = 3,
  parameter int TRIM_PS = 5
) (
  input  logic                               ref_clk,
  input  logic [2*N_PHASE-1:0][TRIM_W-1:0]   cal_trim,   // per interpolated edge
  input  logic [N_PHASE-1:0][TRIM_W-1:0]     tree_trim,  // per output line
  output logic [N_PHASE-1:0]                 ck_phase
);
  localparam int CLK_PS  = 2 * N_PHASE * BIN_PS;
  localparam int MID     = 2 ** (TRIM_W - 1);
  // DLL latency: one period less the delay of two mid-scale trims.
  localparam int DLL_LAT = CLK_PS - 2 * MID * TRIM_PS;

  logic [N_PHASE-1:0]   tap, comb;
  logic [2*N_PHASE-1:0] interp, cal;

  // Every delay below is a transport delay: each edge is scheduled in a
  // process of its own, so delays longer than half a period keep all edges.
  for (genvar i = 0; i < N_PHASE; i++) begin : g_dll
    always @(ref_clk) fork
      automatic logic v = ref_clk;
      #(DLL_LAT + i * 2 * BIN_PS) tap[i] = v;
    join_none
    always @(tap[i]) begin
      interp[2*i] = tap[i];
      fork
        automatic logic v = tap[i];
        #(BIN_PS) interp[2*i+1] = v;
      join_none
    end
  end

  for (genvar j = 0; j < 2 * N_PHASE; j++) begin : g_cal
    always @(interp[j]) fork
      automatic logic v = interp[j];
      #(int'(cal_trim[j]) * TRIM_PS) cal[j] = v;
    join_none
  end

  for (genvar k = 0; k < N_PHASE; k++) begin : g_line
    always begin
      @(posedge cal[k]);
      comb[k] = 1'b1;
      @(posedge cal[k + N_PHASE]);
      comb[k] = 1'b0;
    end
    always @(comb[k]) fork
      automatic logic v = comb[k];
      #(int'(tree_trim[k]) * TRIM_PS) ck_phase[k] = v;
    join_none
  end
endmodule

// pixel_tdc: the time-to-digital converter shared by the four SPADs of a
// macropixel.
//
// A STOP latch is set by the first rising edge of `stop` after the TDC reset
// is released. While the global START latch (`start_q`) is set and the STOP
// latch is not, the 7-bit COARSE counter counts reference clock periods. On
// the rising edge of the STOP latch the FINE interpolator latches the 16
// column clock phases, and the thermometric-to-binary encoder turns them into
// a 5-bit bin of 75 ps. The GATE counter tags the result with the index of
// the current gate window; it advances on `gate_inc` (end of each gate) and
// is cleared by `frame_rst`.
//
// Off chip, the interval START->STOP is coarse*32 + fine - start_fine
// (in 75 ps bins), start_fine coming from the global START interpolator.
//
// The latch / counter / interpolator / gate-counter structure follows the
// source architecture. Design choices here: the counter clock qualification
// is a synchronous count enable (not a gated clock), the coarse counter
// saturates at full scale, the fine latch is edge-triggered.
// Timing: all asynchronous inputs must be stable again one reference clock
// before `tdc` is sampled; stop is only accepted while tdc_rst is low.
// tdc_rst and frame_rst are ORed into one asynchronous clear for the STOP
// latch, the coarse counter and the fine latch.
`timescale 1ps/1ps
module pixel_tdc
  import spad_pkg::*;
#(
  parameter int N_PH = N_PHASE
) (
  input  logic              ref_clk,
  input  logic              tdc_rst,    // async, active high
  input  logic              frame_rst,  // async, clears everything
  input  logic              start_q,    // global START latch output
  input  logic              stop,       // STOP from the discriminator
  input  logic [N_PH-1:0]   ck_phase,   // multiphase clock CK<0..15>
  input  logic              gate_inc,   // advance gate counter (sync)
  output logic              stopped,    // STOP latch output
  output tdc_word_t         tdc
);
  logic [COARSE_W-1:0] coarse;
  logic [N_PH-1:0]     fine_therm;
  logic [FINE_W-1:0]   fine;
  logic [GATE_W-1:0]   gate_id;

  // One clear net: the per-gate TDC reset or the frame reset.
  logic clr;
  assign clr = tdc_rst | frame_rst;

  // STOP latch (set by STOP, reset by RST).
  always_ff @(posedge stop or posedge clr)
    if (clr) stopped <= 1'b0;
    else     stopped <= 1'b1;

  // COARSE counter: counts while started and not yet stopped.
  always_ff @(posedge ref_clk or posedge clr)
    if (clr)
      coarse <= '0;
    else if (start_q && !stopped && coarse != '1)
      coarse <= coarse + 1'b1;

  // FINE interpolator: latch the phases when the STOP latch sets.
  always_ff @(posedge stopped or posedge clr)
    if (clr) fine_therm <= '0;
    else     fine_therm <= ck_phase;

  thermo_to_bin #(.N_PHASE(N_PH), .BIN_W(FINE_W)) u_enc (
    .therm(fine_therm), .bin(fine));

  // GATE counter.
  always_ff @(posedge ref_clk or posedge frame_rst)
    if (frame_rst)     gate_id <= '0;
    else if (gate_inc) gate_id <= gate_id + 1'b1;

  assign tdc = '{gate_id: gate_id, coarse: coarse, fine: fine};
endmodule

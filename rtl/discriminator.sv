// discriminator: front logic of a macropixel that decides what stops the
// shared TDC.
//
// Soft gating: the four event lines from the quenching circuits pass only
// while GATE is high. Single-photon detection: STOP follows the OR of the
// gated events, and the WHO register records (once per gate) which SPAD
// fired first. Double-photon detection ("AND >= 2"): STOP while at least two
// gated event pulses are high together, so the coincidence window equals the
// event pulse width. The SINGLE/DOUBLE multiplexer picks which detection
// drives the TDC; a second multiplexer feeds counter A with either Event_A
// or the coincidence events, while counters B..D see Event_B..D ungated.
//
// Structure and the two multiplexers follow the source discriminator
// diagram; the AND-with-GATE soft gating, lowest-index priority on exactly
// simultaneous first events and WHO re-arming on tdc_rst are design choices.
// Purely asynchronous: outputs follow the inputs combinationally, WHO is
// captured on the rising edge of the single-photon STOP.
`timescale 1ps/1ps
module discriminator
  import spad_pkg::*;
(
  input  logic [N_SPAD-1:0] event_in,     // Event_A..D
  input  logic              gate,
  input  logic              double_mode,  // SINGLE/DOUBLE
  input  logic              tdc_rst,      // async, re-arms WHO
  input  logic              frame_rst,    // async, clears WHO
  output logic              stop,         // to the TDC
  output logic [1:0]        who,          // WHO register
  output logic              who_valid,
  output logic              dbl_event,    // coincidence detected
  output logic [N_SPAD-1:0] cnt_in        // event counter inputs
);
  logic [N_SPAD-1:0] gated;
  logic              sp_stop, clr;
  logic [2:0]        n_hi;
  logic [1:0]        first_idx;

  assign gated   = event_in & {N_SPAD{gate}};
  assign sp_stop = |gated;

  always_comb begin
    n_hi = '0;
    for (int i = 0; i < N_SPAD; i++) n_hi += 3'(gated[i]);
    first_idx = '0;
    for (int i = N_SPAD-1; i >= 0; i--) if (gated[i]) first_idx = 2'(i);
  end

  assign dbl_event = (n_hi >= 3'd2);
  assign stop      = double_mode ? dbl_event : sp_stop;

  // WHO register: index of the first gated event of the gate window.
  assign clr = tdc_rst | frame_rst;
  always_ff @(posedge sp_stop or posedge clr)
    if (clr) begin
      who       <= '0;
      who_valid <= 1'b0;
    end else if (!who_valid) begin
      who       <= first_idx;
      who_valid <= 1'b1;
    end

  assign cnt_in = {event_in[N_SPAD-1:1], double_mode ? dbl_event : event_in[0]};
endmodule

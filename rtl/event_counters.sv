// event_counters: the four 5-bit photon counters of a macropixel.
//
// Each counter is clocked by its own event line (ripple-style, as an event
// counter beside each SPAD) and cleared asynchronously by the frame reset.
// In double-photon mode counter 0 receives coincidence events instead of
// Event_A (selected in the discriminator). Counters saturate at 31; the
// saturation is this design's choice, the 5-bit width is the source's.
// Timing: values are read after the frame, when the event lines are quiet.
`timescale 1ps/1ps
module event_counters
  import spad_pkg::*;
(
  input  logic                         frame_rst,  // async
  input  logic [N_SPAD-1:0]            cnt_in,
  output logic [N_SPAD-1:0][CNT_W-1:0] count
);
  for (genvar i = 0; i < N_SPAD; i++) begin : g_cnt
    logic [CNT_W-1:0] q;
    always_ff @(posedge cnt_in[i] or posedge frame_rst)
      if (frame_rst)    q <= '0;
      else if (q != '1) q <= q + 1'b1;
    assign count[i] = q;
  end
endmodule

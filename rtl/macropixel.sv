// macropixel: 2x2 SPAD macropixel with one shared TDC.
//
// The four quenching-circuit event lines enter the discriminator, which
// applies soft gating and, according to SINGLE/DOUBLE, stops the TDC on the
// first photon (recording WHO) or on two coincident photons. The pixel TDC
// measures the STOP against the global START with a coarse counter and a
// fine phase latch and tags it with the gate index. The control logic stores
// one conversion per gate window into the storage registers (one per SPAD,
// or the first four coincidences) and resets the TDC between gates. Four
// 5-bit event counters count photons (or coincidences on counter A). After
// the frame, the in-pixel readout logic puts 1, 2 or 4 words on the 23-bit
// row bus when the readout token passes.
//
// The block composition follows the source macropixel and discriminator
// diagrams. Timing: ref_clk domain for acquisition, rd_clk for readout; the
// frame must be finished before readout starts.
`timescale 1ps/1ps
module macropixel
  import spad_pkg::*;
(
  input  logic                ref_clk,
  input  logic                frame_rst,
  input  logic                gate,
  input  logic                start_q,
  input  logic [N_PHASE-1:0]  ck_phase,
  input  logic [N_SPAD-1:0]   spad_event,
  input  pix_cfg_t            cfg,
  input  logic                rd_clk,
  input  logic                rd_rst,
  input  logic                shift,
  input  logic                token_in,
  output logic                token_out,
  output logic [BUS_W-1:0]    bus_word
);
  logic                         stop, stopped;
  logic                         store, gate_inc, tdc_rst;
  logic [1:0]                   who, first_who;
  logic [N_SPAD-1:0]            cnt_in;
  logic [N_SPAD-1:0][CNT_W-1:0] count;
  tdc_word_t                    tdc;
  tdc_word_t [N_SPAD-1:0]       bank;

  discriminator u_disc (
    .event_in(spad_event), .gate, .double_mode(cfg.double_mode), .tdc_rst, .frame_rst,
    .stop, .who, .who_valid(), .dbl_event(), .cnt_in);

  event_counters u_cnt (.frame_rst, .cnt_in, .count);

  pixel_tdc u_tdc (
    .ref_clk, .tdc_rst, .frame_rst, .start_q, .stop, .ck_phase, .gate_inc,
    .stopped, .tdc);

  pixel_control u_ctl (
    .ref_clk, .frame_rst, .gate, .stopped, .store, .gate_inc, .tdc_rst);

  storage_logic u_sto (
    .ref_clk, .frame_rst, .store, .double_mode(cfg.double_mode), .tdc, .who,
    .bank, .filled(), .first_who, .first_valid());

  pixel_readout u_rd (
    .rd_clk, .rd_rst, .shift, .token_in, .token_out, .cfg, .bank, .first_who,
    .count, .bus_word);
endmodule

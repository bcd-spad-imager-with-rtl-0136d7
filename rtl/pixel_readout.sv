// pixel_readout: in-pixel readout logic of a macropixel.
//
// Every macropixel holds a section of a one-hot shift register that runs
// along its row (token_in from the previous macropixel, token_out to the
// following one). The section has four stages; the static control lines
// FAST, COUNT, FIRST_ONLY (with SINGLE/DOUBLE) leave k = 4, 2 or 1 of them
// in the chain and bypass the rest, so the token spends k shifts in the
// macropixel and the macropixel puts k words on the 23-bit row bus:
//
//   mode                       k  word i
//   single/double normal       4  {STORE_i, counter_i}
//   single fast                2  {first ts, WHO, 000}, {000, cnt3..cnt0}
//   single first only          1  {first ts, WHO, 000}
//   counting only              1  {000, cnt3..cnt0}
//   double first only          1  {first ts, double counter}
//
// The row bus is precharged and shared; it is modelled as a wired OR, so a
// macropixel whose section holds no token drives zeros.
// The distributed shift register, the three control lines and the cycle
// counts come from the source; the bit layout of the words is this design's.
// Timing: the stages advance on rd_clk edges where `shift` is high.
`timescale 1ps/1ps
module pixel_readout
  import spad_pkg::*;
(
  input  logic                         rd_clk,
  input  logic                         rd_rst,     // async
  input  logic                         shift,
  input  logic                         token_in,
  output logic                         token_out,
  input  pix_cfg_t                     cfg,
  input  tdc_word_t [N_SPAD-1:0]       bank,
  input  logic [1:0]                   first_who,
  input  logic [N_SPAD-1:0][CNT_W-1:0] count,
  output logic [BUS_W-1:0]             bus_word
);
  logic [3:0]  stage;
  logic [2:0]  k;
  rd_mode_t    mode;
  tdc_word_t   first_ts;
  logic [1:0]  widx;

  logic [3:0]  keep;   // stages left in the chain for this mode

  assign mode = decode_mode(cfg);
  always_comb
    for (int i = 0; i < 4; i++) keep[i] = (i < int'(k));
  assign k    = 3'(words_per_pixel(cfg));

  always_ff @(posedge rd_clk or posedge rd_rst)
    if (rd_rst) stage <= '0;
    else if (shift)
      stage <= {stage[2:0], token_in} & keep;

  assign token_out = stage[k-1];
  assign first_ts  = cfg.double_mode ? bank[0] : bank[first_who];

  always_comb begin
    widx = '0;
    for (int i = 3; i >= 0; i--) if (stage[i]) widx = 2'(i);
  end

  always_comb begin
    bus_word = '0;
    if (|stage) begin
      case (mode)
        RD_NORMAL:    bus_word = {bank[widx], count[widx]};
        RD_FAST:      bus_word = (widx == 2'd0) ? {first_ts, first_who, 3'b000}
                                                : {3'b000, count[3], count[2], count[1], count[0]};
        RD_FIRST:     bus_word = {first_ts, first_who, 3'b000};
        RD_COUNT:     bus_word = {3'b000, count[3], count[2], count[1], count[0]};
        RD_DBL_FIRST: bus_word = {first_ts, count[0]};
        default:      bus_word = '0;
      endcase
    end
  end
endmodule

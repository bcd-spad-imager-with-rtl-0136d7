// spad_imager_top: 32x32 SPAD imager built from 16x16 reconfigurable
// macropixels, each sharing one 12-bit TDC among 2x2 SPADs.
//
// Acquisition (ref_clk, 415 MHz nominal, 2400 ps here): a frame starts with
// frame_rst and holds up to 64 gate windows. In each window the global START
// pulse starts every pixel's coarse counter; each macropixel stops its TDC on
// its first photon (single-photon mode) or on two coincident photons
// (double-photon mode), and stores one timestamp per gate. Event counters
// count photons throughout. The global START unit keeps the START phase of
// every gate for the off-chip correction
//   t(STOP) - t(START) = (coarse*32 + fine - start_fine[gate_id]) * 75 ps.
// Readout (rd_clk): rd_start scans the array column by column through the
// row selector, 1, 2 or 4 words of 23 bits per macropixel depending on cfg.
//
// Ports: spad_event[r][c][s] is the quenching-circuit event line of SPAD s
// (A..D) of macropixel (r, c); the SPADs and quenching circuits themselves
// are analog and outside this logic. The multiphase clock generator inside
// is a behavioural model (delays), the rest is synthesizable. cal_trim and
// tree_trim are its calibration settings; mid-scale (4) gives the nominal
// 75 ps phases.
// The array organisation follows the source; the frame/gate protocol
// details are this design's choices (see the README).
`timescale 1ps/1ps
module spad_imager_top
  import spad_pkg::*;
#(
  parameter int ROWS = 16,
  parameter int COLS = 16
) (
  input  logic                                 ref_clk,
  input  logic                                 frame_rst,
  input  logic                                 gate,
  input  logic                                 start,
  input  logic [2*N_PHASE-1:0][TRIM_W-1:0]     cal_trim,   // clock CONFIG
  input  logic [N_PHASE-1:0][TRIM_W-1:0]       tree_trim,  // clock CONFIG
  input  logic [ROWS-1:0][COLS-1:0][N_SPAD-1:0] spad_event,
  input  pix_cfg_t                             cfg,
  input  logic                                 rd_clk,
  input  logic                                 rd_rst,
  input  logic                                 rd_start,
  output logic [BUS_W-1:0]                     rd_data,
  output logic                                 rd_valid,
  output logic [$clog2(ROWS+1)-1:0]            rd_row,
  output logic [$clog2(COLS+1)-1:0]            rd_col,
  output logic [1:0]                           rd_word,
  output logic                                 rd_busy,
  output logic                                 rd_done,
  output logic [GATE_W-1:0]                    gate_cnt,
  input  logic [GATE_W-1:0]                    start_mem_addr,
  output logic [FINE_W-1:0]                    start_mem_data
);
  logic [N_PHASE-1:0]             ck_phase;
  logic                           start_q;
  logic                           shift, token;
  logic [ROWS-1:0][COLS:0]        tok;
  logic [ROWS-1:0][COLS-1:0][BUS_W-1:0] word;
  logic [ROWS-1:0][BUS_W-1:0]     row_bus;

  multiphase_clock_gen #(.N_PHASE(N_PHASE), .BIN_PS(BIN_PS),
                        .TRIM_W(TRIM_W), .TRIM_PS(TRIM_PS)) u_clkgen (
    .ref_clk, .cal_trim, .tree_trim, .ck_phase);

  tdc_start_unit u_start (
    .ref_clk, .frame_rst, .gate, .start, .ck_phase, .start_q, .start_fine(),
    .gate_cnt, .mem_addr(start_mem_addr), .mem_data(start_mem_data));

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign tok[r][0] = token;
    for (genvar c = 0; c < COLS; c++) begin : g_col
      macropixel u_mp (
        .ref_clk, .frame_rst, .gate, .start_q, .ck_phase,
        .spad_event(spad_event[r][c]), .cfg, .rd_clk, .rd_rst, .shift,
        .token_in(tok[r][c]), .token_out(tok[r][c+1]), .bus_word(word[r][c]));
    end
    // Shared precharged row bus: wired OR of the macropixel drivers.
    always_comb begin
      row_bus[r] = '0;
      for (int c = 0; c < COLS; c++) row_bus[r] |= word[r][c];
    end
  end

  array_readout #(.ROWS(ROWS), .COLS(COLS)) u_ro (
    .rd_clk, .rd_rst, .rd_start, .cfg, .row_bus, .shift, .token, .rd_data,
    .rd_valid, .rd_row, .rd_col, .rd_word, .rd_busy, .rd_done);
endmodule

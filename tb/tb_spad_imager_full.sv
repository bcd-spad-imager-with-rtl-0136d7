// tb_spad_imager_full: the imager at its default 16x16 macropixel (32x32
// SPAD) size, six frames, one per readout mode; the checks are described in
// tb_imager_body.svh.
`timescale 1ps/1ps
module tb_spad_imager_full;
  import spad_pkg::*;
  import tb_util_pkg::*;
  import tb_mp_model_pkg::*;
  localparam int ROWS = 16, COLS = 16, NFRAMES = 6;

  spad_imager_top dut (
    .ref_clk, .frame_rst, .gate, .start, .cal_trim, .tree_trim, .spad_event, .cfg,
    .rd_clk, .rd_rst,
    .rd_start, .rd_data, .rd_valid, .rd_row, .rd_col, .rd_word, .rd_busy,
    .rd_done, .gate_cnt, .start_mem_addr, .start_mem_data);

`include "tb_imager_body.svh"
endmodule

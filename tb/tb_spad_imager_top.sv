// tb_spad_imager_top: end-to-end test of the imager at a reduced 3x3
// macropixel array, twelve frames covering every mode twice; the checks are
// described in tb_imager_body.svh.
`timescale 1ps/1ps
module tb_spad_imager_top;
  import spad_pkg::*;
  import tb_util_pkg::*;
  import tb_mp_model_pkg::*;
  localparam int ROWS = 3, COLS = 3, NFRAMES = 12;

  spad_imager_top #(.ROWS(ROWS), .COLS(COLS)) dut (
    .ref_clk, .frame_rst, .gate, .start, .cal_trim, .tree_trim, .spad_event, .cfg,
    .rd_clk, .rd_rst,
    .rd_start, .rd_data, .rd_valid, .rd_row, .rd_col, .rd_word, .rd_busy,
    .rd_done, .gate_cnt, .start_mem_addr, .start_mem_data);

`include "tb_imager_body.svh"
endmodule

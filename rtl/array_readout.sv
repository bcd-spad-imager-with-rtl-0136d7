// array_readout: global readout electronics (column token control and row
// selector).
//
// After `rd_start`, the controller injects a one-hot token into the first
// macropixel of every row and then repeatedly scans the row selector over
// all ROWS row buses, one row per rd_clk cycle, registering the selected
// 23-bit word on rd_data with rd_valid. After the last row it advances the
// shift registers of all rows together (on the same edge that samples that
// last row), so every macropixel of the selected column keeps driving and
// precharging its row bus for a whole row scan. The scan ends after
// COLS * k shifts, k = 1, 2 or 4 words per macropixel for the current mode.
//
// Output order: column-major, then word, then row. rd_row / rd_col / rd_word
// give the position of each word. A frame of k words per macropixel takes
// ROWS*COLS*k + 1 rd_clk cycles from rd_start to rd_done.
// Single-column select, the row selector and the mode-dependent cycle counts
// follow the source; the scan order and registering are design choices.
`timescale 1ps/1ps
module array_readout
  import spad_pkg::*;
#(
  parameter int ROWS = 16,
  parameter int COLS = 16
) (
  input  logic                           rd_clk,
  input  logic                           rd_rst,    // async
  input  logic                           rd_start,
  input  pix_cfg_t                       cfg,
  input  logic [ROWS-1:0][BUS_W-1:0]     row_bus,
  output logic                           shift,
  output logic                           token,
  output logic [BUS_W-1:0]               rd_data,
  output logic                           rd_valid,
  output logic [$clog2(ROWS+1)-1:0]      rd_row,
  output logic [$clog2(COLS+1)-1:0]      rd_col,
  output logic [1:0]                     rd_word,
  output logic                           rd_busy,
  output logic                           rd_done
);
  typedef enum logic [1:0] {IDLE, INJECT, SCAN} state_t;
  state_t state;

  localparam int RW = $clog2(ROWS+1);
  localparam int CW = $clog2(COLS+1);

  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [1:0]    word;
  logic [2:0]    k;
  logic          last_row, last_slot;

  assign k         = 3'(words_per_pixel(cfg));
  assign last_row  = (row == RW'(ROWS-1));
  assign last_slot = (col == CW'(COLS-1)) && (word == 2'(k-1));

  assign shift   = (state == INJECT) || (state == SCAN && last_row);
  assign token   = (state == INJECT);
  assign rd_busy = (state != IDLE);

  always_ff @(posedge rd_clk or posedge rd_rst)
    if (rd_rst) begin
      state    <= IDLE;
      row      <= '0;
      col      <= '0;
      word     <= '0;
      rd_data  <= '0;
      rd_valid <= 1'b0;
      rd_row   <= '0;
      rd_col   <= '0;
      rd_word  <= '0;
      rd_done  <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      rd_done  <= 1'b0;
      case (state)
        IDLE: if (rd_start) begin
          state <= INJECT;
          row   <= '0;
          col   <= '0;
          word  <= '0;
        end
        INJECT: state <= SCAN;
        SCAN: begin
          // Row selector.
          rd_data  <= row_bus[row[$clog2(ROWS)-1:0]];
          rd_valid <= 1'b1;
          rd_row   <= row;
          rd_col   <= col;
          rd_word  <= word;
          if (!last_row) row <= row + 1'b1;
          else begin
            row <= '0;
            if (last_slot) begin
              state   <= IDLE;
              rd_done <= 1'b1;
            end else if (word == 2'(k-1)) begin
              word <= '0;
              col  <= col + 1'b1;
            end else
              word <= word + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
endmodule

// tb_array_readout: global readout controller with a 3-row, 2-column array
// modelled in the testbench (each row bus shows {row, slot} while the token
// sits in that slot). For every readout mode it checks the word order
// (column, then word, then row), rd_row/rd_col/rd_word, and that a scan
// takes ROWS*COLS*k + 1 readout clocks from rd_start to rd_done.
`timescale 1ps/1ps
module tb_array_readout;
  import spad_pkg::*;
  localparam int ROWS = 3, COLS = 2;
  logic rd_clk = 1'b0, rd_rst = 1'b0, rd_start = 1'b0;
  pix_cfg_t cfg = '0;
  logic [ROWS-1:0][22:0] row_bus;
  logic shift, token, rd_valid, rd_busy, rd_done;
  logic [22:0] rd_data;
  logic [1:0] rd_row, rd_col, rd_word;
  int checks = 0, failures = 0;

  array_readout #(.ROWS(ROWS), .COLS(COLS)) dut (
    .rd_clk, .rd_rst, .rd_start, .cfg, .row_bus, .shift, .token, .rd_data,
    .rd_valid, .rd_row, .rd_col, .rd_word, .rd_busy, .rd_done);

  always #5000 rd_clk = ~rd_clk;

  // Array model: token slot position shared by all rows.
  int  pos = 0;
  bit  held = 0;
  int  kk;
  always @(posedge rd_clk)
    if (shift) begin
      if (token) begin pos <= 0; held <= 1; end
      else pos <= pos + 1;
    end
  always_comb
    for (int r = 0; r < ROWS; r++)
      row_bus[r] = (held && pos < COLS*kk) ? {8'(r + 1), 15'(pos)} : '0;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int n, cyc;
    pix_cfg_t modes [4] = '{4'b0000, 4'b0100, 4'b0001, 4'b0010};
    #1 rd_rst = 1'b1; #10 rd_rst = 1'b0;
    foreach (modes[m]) begin
      cfg = modes[m];
      kk  = (m == 0) ? 4 : (m == 1) ? 2 : 1;
      held = 0;
      @(negedge rd_clk) rd_start = 1'b1;
      @(negedge rd_clk) rd_start = 1'b0;
      n = 0; cyc = 0;  // edges after the one that sampled rd_start
      while (!rd_done && cyc < 1000) begin
        if (rd_valid) begin
          int slot, row;
          slot = n / ROWS;
          row  = n % ROWS;
          check("data", int'(rd_data), int'({8'(row + 1), 15'(slot)}));
          check("row", int'(rd_row), row);
          check("col", int'(rd_col), slot / kk);
          check("word", int'(rd_word), slot % kk);
          n++;
        end
        @(negedge rd_clk); cyc++;
      end
      if (rd_valid) begin
        check("last data", int'(rd_data), int'({8'(ROWS), 15'(COLS*kk-1)}));
        n++;
      end
      check("words", n, ROWS*COLS*kk);
      check("cycles", cyc, ROWS*COLS*kk + 1);
      check("idle", int'(rd_busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pixel_readout: for each combination of FAST, COUNT, FIRST_ONLY and
// SINGLE/DOUBLE, fills the registers and counters with random values,
// passes the token through the macropixel and checks the number of words
// (4, 2 or 1), each word on the bus, token_out timing, and that the bus is
// zero when the macropixel does not hold the token.
`timescale 1ps/1ps
module tb_pixel_readout;
  import spad_pkg::*;
  logic                rd_clk = 1'b0, rd_rst = 1'b0, shift = 1'b0, token_in = 1'b0;
  logic                token_out;
  pix_cfg_t            cfg = '0;
  tdc_word_t [3:0]     bank;
  logic [1:0]          first_who;
  logic [3:0][4:0]     count;
  logic [22:0]         bus_word;
  int checks = 0, failures = 0;

  pixel_readout dut (.rd_clk, .rd_rst, .shift, .token_in, .token_out, .cfg,
                     .bank, .first_who, .count, .bus_word);

  always #5000 rd_clk = ~rd_clk;

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
    logic [22:0] exp_w [4];
    logic [19:0] cnts;
    logic [17:0] fts;
    int          k;
    #1 rd_rst = 1'b1; #10 rd_rst = 1'b0;
    for (int rep = 0; rep < 3; rep++)
    for (int c = 0; c < 16; c++) begin
      cfg = pix_cfg_t'(c);
      for (int i = 0; i < 4; i++) begin
        bank[i]  = tdc_word_t'($urandom);
        count[i] = 5'($urandom);
      end
      first_who = 2'($urandom);
      cnts = {count[3], count[2], count[1], count[0]};
      fts  = cfg.double_mode ? bank[0] : bank[first_who];
      if (cfg.count) begin
        k = 1; exp_w[0] = {3'b000, cnts};
      end else if (cfg.first_only) begin
        k = 1;
        exp_w[0] = cfg.double_mode ? {fts, count[0]} : {fts, first_who, 3'b000};
      end else if (cfg.fast && !cfg.double_mode) begin
        k = 2; exp_w[0] = {fts, first_who, 3'b000}; exp_w[1] = {3'b000, cnts};
      end else begin
        k = 4;
        for (int i = 0; i < 4; i++) exp_w[i] = {bank[i], count[i]};
      end
      @(negedge rd_clk);
      check("idle bus", int'(bus_word), 0);
      shift = 1'b1; token_in = 1'b1;
      @(negedge rd_clk) token_in = 1'b0;
      for (int w = 0; w <= k; w++) begin
        if (w < k) check($sformatf("cfg %0h word %0d", c, w), int'(bus_word), int'(exp_w[w]));
        else       check("bus after token", int'(bus_word), 0);
        check("token_out", int'(token_out), int'(w == k-1));
        @(negedge rd_clk);
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

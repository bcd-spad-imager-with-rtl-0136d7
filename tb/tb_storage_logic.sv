// tb_storage_logic: random store sequences in both modes, compared with a
// reference model of the registers. Single mode: the register of the SPAD
// named by WHO takes the word only if still empty this frame. Double mode:
// registers fill in order A..D and further stores are dropped. Also checks
// first_who and the all-ones value of empty registers.
`timescale 1ps/1ps
module tb_storage_logic;
  import spad_pkg::*;
  logic      ref_clk = 1'b0, frame_rst = 1'b0, store = 1'b0, double_mode = 1'b0;
  tdc_word_t tdc = '0;
  logic [1:0] who = '0, first_who;
  tdc_word_t [3:0] bank;
  logic [3:0] filled;
  logic       first_valid;
  int checks = 0, failures = 0;

  storage_logic dut (.ref_clk, .frame_rst, .store, .double_mode, .tdc, .who,
                     .bank, .filled, .first_who, .first_valid);

  always #1200 ref_clk = ~ref_clk;

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
    tdc_word_t m [4];
    bit        mf [4];
    int        nxt, fw;
    bit        fv;
    for (int f = 0; f < 12; f++) begin
      double_mode = f[0];
      @(negedge ref_clk) frame_rst = 1'b1;
      @(negedge ref_clk) frame_rst = 1'b0;
      for (int i = 0; i < 4; i++) begin m[i] = '1; mf[i] = 0; end
      nxt = 0; fv = 0; fw = 0;
      for (int s = 0; s < 10; s++) begin
        @(negedge ref_clk);
        store = ($urandom_range(2) != 0);
        who   = 2'($urandom_range(3));
        tdc   = tdc_word_t'($urandom);
        @(posedge ref_clk);
        if (store) begin
          int sel;
          sel = double_mode ? nxt : int'(who);
          if (!(double_mode ? (nxt >= 4) : mf[who])) begin
            m[sel] = tdc; mf[sel] = 1; nxt++;
            if (!fv) begin fv = 1; fw = sel; end
          end
        end
        #10 store = 1'b0;
        for (int i = 0; i < 4; i++) check($sformatf("bank %0d", i), int'(bank[i]), int'(m[i]));
        if (fv) check("first_who", int'(first_who), fw);
        check("first_valid", int'(first_valid), int'(fv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_discriminator: drives random event-line patterns and checks soft
// gating, the single-photon STOP (any gated event), the double-photon STOP
// (two or more gated events at once), the SINGLE/DOUBLE selection, the
// counter inputs, and the WHO register across sequences of event pulses:
// WHO must name the first gated event and ignore later ones until re-armed.
`timescale 1ps/1ps
module tb_discriminator;
  logic [3:0] event_in = '0;
  logic       gate = 1'b0, double_mode = 1'b0, tdc_rst = 1'b0, frame_rst = 1'b0;
  logic       stop, who_valid, dbl_event;
  logic [1:0] who;
  logic [3:0] cnt_in;
  int checks = 0, failures = 0;

  discriminator dut (.event_in, .gate, .double_mode, .tdc_rst, .frame_rst, .stop, .who,
                     .who_valid, .dbl_event, .cnt_in);

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
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [3:0] g;
    int n, first, order[4];
    // Combinational behaviour over all inputs.
    for (int m = 0; m < 2; m++)
      for (int gt = 0; gt < 2; gt++)
        for (int e = 0; e < 16; e++) begin
          double_mode = m[0]; gate = gt[0]; event_in = 4'(e);
          #10;
          g = event_in & {4{gate}};
          n = $countones(g);
          check("dbl", int'(dbl_event), int'(n >= 2));
          check("stop", int'(stop), m ? int'(n >= 2) : int'(n >= 1));
          check("cnt_in", int'(cnt_in), int'({event_in[3:1], m ? (n >= 2) : event_in[0]}));
        end
    event_in = '0; gate = 1'b1; double_mode = 1'b0;
    // WHO: sequences of non-overlapping pulses in random order.
    for (int t = 0; t < 40; t++) begin
      tdc_rst = 1'b1; #10 tdc_rst = 1'b0; #10;
      check("who cleared", int'(who_valid), 0);
      for (int i = 0; i < 4; i++) order[i] = i;
      order.shuffle();
      first = order[0];
      for (int i = 0; i < 4; i++) begin
        event_in[order[i]] = 1'b1; #50 event_in[order[i]] = 1'b0; #50;
      end
      check("who", int'(who), first);
      check("who valid", int'(who_valid), 1);
    end
    // Events outside the gate do not set WHO.
    tdc_rst = 1'b1; #10 tdc_rst = 1'b0; gate = 1'b0;
    event_in = 4'b0100; #50 event_in = '0; #10;
    check("gated out", int'(who_valid), 0);
    gate = 1'b1; event_in = 4'b0010; #50 event_in = '0; #10;
    check("who after gate", int'(who), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_event_counters: sends random numbers of pulses (0..40) to each of the
// four counters and expects min(pulses, 31); repeats over several frames
// separated by the frame reset.
`timescale 1ps/1ps
module tb_event_counters;
  logic            frame_rst = 1'b0;
  logic [3:0]      cnt_in = '0;
  logic [3:0][4:0] count;
  int checks = 0, failures = 0;

  event_counters dut (.frame_rst, .cnt_in, .count);

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n[4];
    for (int f = 0; f < 10; f++) begin
      #5 frame_rst = 1'b1; #5 frame_rst = 1'b0;
      for (int i = 0; i < 4; i++) n[i] = (f == 0) ? 31 + i : int'($urandom_range(40));
      for (int p = 0; p < 40; p++) begin
        for (int i = 0; i < 4; i++) cnt_in[i] = (p < n[i]);
        #10 cnt_in = '0;
        #10;
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(count[i]) != ((n[i] > 31) ? 31 : n[i])) begin
          failures++;
          $display("FAIL frame %0d counter %0d: %0d for %0d pulses", f, i, count[i], n[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

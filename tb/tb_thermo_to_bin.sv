// tb_thermo_to_bin: exhaustive check of the Johnson-code fine encoder.
// For every bin b in 0..31 the testbench builds the phase pattern that the
// dual-edge clock lines show in that bin and expects b back.
`timescale 1ps/1ps
module tb_thermo_to_bin;
  logic [15:0] therm;
  logic [4:0]  bin;
  int checks = 0, failures = 0;

  thermo_to_bin dut (.therm, .bin);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 32; b++) begin
      // Line k is high in bin b when b lies in [k, k+16) modulo 32.
      for (int k = 0; k < 16; k++) therm[k] = (((b - k + 32) % 32) < 16);
      #10;
      checks++;
      if (bin !== 5'(b)) begin
        failures++;
        $display("FAIL bin %0d: pattern %b gave %0d", b, therm, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

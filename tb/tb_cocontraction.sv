// Testbench for cocontraction: all 256 trigger patterns against the
// agonist-antagonist pairing (gastrocnemius/tibialis, rectus/biceps femoris
// of each leg).
module tb_cocontraction;
  logic [7:0] emg_trigger;
  logic [3:0] cocon, expv;
  int checks = 0, failures = 0;

  cocontraction dut (.emg_trigger, .cocon);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      emg_trigger = 8'(v);
      #1;
      expv = {emg_trigger[6] & emg_trigger[7], emg_trigger[4] & emg_trigger[5],
              emg_trigger[2] & emg_trigger[3], emg_trigger[0] & emg_trigger[1]};
      checks++;
      if (cocon !== expv) begin
        failures++;
        $display("triggers %b: cocon %b expected %b", emg_trigger, cocon, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

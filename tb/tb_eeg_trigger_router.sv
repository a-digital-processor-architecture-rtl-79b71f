// Testbench for eeg_trigger_router: all 256 EMG trigger patterns. Right
// gastrocnemius (EMG 0) must start T3, C3, P3 and Cz; left gastrocnemius
// (EMG 4) T4, C4, P4 and Cz; no other muscle starts anything.
module tb_eeg_trigger_router;
  logic [7:0] emg_trigger;
  logic [6:0] eeg_trigger, expv;
  int checks = 0, failures = 0;

  eeg_trigger_router dut (.emg_trigger, .eeg_trigger);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic r, l;
      emg_trigger = 8'(v);
      #1;
      r = emg_trigger[0];
      l = emg_trigger[4];
      // order: T3, T4, C3, C4, Cz, P3, P4
      expv = {l, r, r | l, l, r, l, r};
      checks++;
      if (eeg_trigger !== expv) begin
        failures++;
        $display("triggers %b: eeg %b expected %b", emg_trigger, eeg_trigger, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_restart_nor: exhaustive test of the restart NOR at its default width
// (9 inputs): the output must be '1' exactly when no input is '1', counted
// bit by bit in the testbench.
module tb_restart_nor;
  logic [8:0] to_nor;
  logic restart;
  int checks = 0, failures = 0;

  restart_nor dut (.to_nor(to_nor), .restart(restart));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    int ones;
    for (int i = 0; i < 512; i++) begin
      to_nor = 9'(i);
      ones = 0;
      for (int b = 0; b < 9; b++) if (to_nor[b]) ones++;
      #1;
      checks++;
      if (restart !== (ones == 0)) begin
        failures++;
        $display("FAIL inputs %b: restart=%0b", to_nor, restart);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dyn_stage: self-checking test of the two-phase dynamic storage stage.
//
// Drives non-overlapping clk1/clk2 pulses (period 20 ns: clk1 high 2..8 ns,
// clk2 high 12..18 ns) and a random d that changes only while both clocks are
// low. Checks, against a model kept in the testbench:
//  - q after each clk2 pulse equals the d presented during the preceding clk1
//    pulse (one clk1/clk2 sequence of delay),
//  - q does not move during clk1 (SWITCH2 open) nor while both clocks are low,
//  - Reset, applied at random moments, forces q to '0' at once and keeps it
//    there through clock pulses.
module tb_dyn_stage;
  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1, d = 1'b0;
  logic q;
  int checks = 0, failures = 0;

  dyn_stage dut (.clk1(clk1), .clk2(clk2), .rst(rst), .d(d), .q(q));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic sampled;
    logic expq;
    expq = 1'b0;
    #5;
    check(q, 1'b0, "q under reset");
    rst = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // both clocks low at t=0 of the cycle
      d = 1'($urandom);
      #2 clk1 = 1'b1;
      #3 check(q, expq, "q held during clk1");
      sampled = d;
      #3 clk1 = 1'b0;
      #1 d = ~d;  // changes after SWITCH1 opened: must not be stored
      #1 check(q, expq, "q held between pulses");
      #2 clk2 = 1'b1;
      expq = sampled;
      #1 check(q, expq, "q after clk2");
      #5 clk2 = 1'b0;
      #1 check(q, expq, "q held after clk2");
      if ($urandom_range(9) == 0) begin
        #0.5 rst = 1'b1;
        #0.5 check(q, 1'b0, "q reset");
        expq = 1'b0;
        // clock pulses during reset store nothing
        clk1 = 1'b1; d = 1'b1; #0.2 clk1 = 1'b0;
        #0.2 clk2 = 1'b1; #0.2 clk2 = 1'b0;
        #0.2 check(q, 1'b0, "q held in reset");
        rst = 1'b0;
        #0.7;
      end else begin
        #2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

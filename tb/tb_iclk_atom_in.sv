// tb_iclk_atom_in: self-checking test of the input block of the phase chain.
//
// Random clk1st_in and CLK_FILL values, changed only while both clocks are
// low. Checks that Nclk = CLK_FILL & clk1st_in and Pclk is its complement at
// once, that clk1st_out shows clk1st_in exactly one clk1/clk2 sequence later
// (unchanged after clk1 alone), and that Reset clears it at any time.
module tb_iclk_atom_in;
  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1, clk_fill = 1'b0, din = 1'b0;
  logic dout, nclk, pclk;
  int checks = 0, failures = 0;

  iclk_atom_in dut (
    .clk1(clk1), .clk2(clk2), .rst(rst), .clk_fill(clk_fill),
    .clk1st_in(din), .clk1st_out(dout), .nclk(nclk), .pclk(pclk)
  );

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
    logic prev;
    prev = 1'b0;
    #5 check(dout, 1'b0, "reset");
    rst = 1'b0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      din = 1'($urandom);
      clk_fill = 1'($urandom);
      #1 check(nclk, din & clk_fill, "Nclk");
      check(pclk, ~(din & clk_fill), "Pclk");
      #1 clk1 = 1'b1; #5 clk1 = 1'b0;
      #1 check(dout, prev, "held after clk1");
      #1 clk2 = 1'b1; #5 clk2 = 1'b0;
      prev = din;
      #1 check(dout, prev, "after clk1/clk2");
      if ($urandom_range(15) == 0) begin
        rst = 1'b1; #1 check(dout, 1'b0, "reset mid-run"); rst = 1'b0;
        prev = 1'b0;
      end
      #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

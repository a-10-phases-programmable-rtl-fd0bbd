// tb_iclk_atom: self-checking test of one section of the phase chain.
//
// For every combination of the six data inputs (Bprog1, Bprog2, BlockIn,
// clk1st_in1, clk1st_in2, CLK_FILL), applied in random order, the testbench
// works out from the section's rules whether the section holds the token:
// it takes the token from the preceding section, or from the input block
// when it is the programmed first section (its bit is '0' and BlockIn is
// still '1'). It checks BlockOut, the clock phase Nclk/Pclk (token gated by
// CLK_FILL), the report to the restart NOR (token and Bprog2), and that the
// token appears on clk1st_out after exactly one clk1/clk2 sequence (not
// after clk1 alone), only when Bprog2 is '1', and is gone one sequence
// after the input drops. Reset is applied at random points.
module tb_iclk_atom;
  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1;
  logic clk_fill = 1'b0, bprog1 = 1'b0, bprog2 = 1'b0, block_in = 1'b0;
  logic in1 = 1'b0, in2 = 1'b0;
  logic block_out, clk1st_out, to_nor, nclk, pclk;
  int checks = 0, failures = 0;

  iclk_atom dut (
    .clk1(clk1), .clk2(clk2), .rst(rst), .clk_fill(clk_fill),
    .bprog1(bprog1), .bprog2(bprog2), .block_in(block_in),
    .clk1st_in1(in1), .clk1st_in2(in2),
    .block_out(block_out), .clk1st_out(clk1st_out), .to_nor(to_nor),
    .nclk(nclk), .pclk(pclk)
  );

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  task automatic pulse1();
    #2 clk1 = 1'b1; #5 clk1 = 1'b0; #2;
  endtask
  task automatic pulse2();
    #2 clk2 = 1'b1; #5 clk2 = 1'b0; #2;
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stim
    logic [5:0] v;
    logic first, token, stored;
    #5 rst = 1'b0;
    stored = 1'b0;
    for (int rep = 0; rep < 8; rep++) begin
      for (int i = 0; i < 64; i++) begin
        v = 6'($urandom);
        {clk_fill, bprog1, bprog2, block_in, in1, in2} = v;
        #1;
        first = block_in && !bprog1;
        token = in2 || (in1 && first);
        check(block_out, block_in && bprog1, "BlockOut");
        check(nclk, token && clk_fill, "Nclk");
        check(pclk, !(token && clk_fill), "Pclk");
        check(to_nor, token && bprog2, "to NOR");
        check(clk1st_out, stored && bprog2, "clk1st_out before clocks");
        pulse1();
        check(clk1st_out, stored && bprog2, "clk1st_out after clk1 only");
        pulse2();
        stored = token;
        check(clk1st_out, token && bprog2, "clk1st_out after clk1/clk2");
        // the stored token is gated by Bprog2 after the storage
        bprog2 = 1'b1; #1 check(clk1st_out, token, "AND2 open");
        bprog2 = 1'b0; #1 check(clk1st_out, 1'b0, "AND2 closed");
        bprog2 = 1'b1;
        // drop the inputs: the token leaves after one more sequence
        in1 = 1'b0; in2 = 1'b0;
        #1 check(nclk, 1'b0, "Nclk after token left");
        pulse1(); pulse2();
        stored = 1'b0;
        check(clk1st_out, 1'b0, "clk1st_out cleared");
        // occasionally store a token and reset it away
        if ($urandom_range(3) == 0) begin
          in2 = 1'b1; pulse1(); pulse2(); in2 = 1'b0;
          check(clk1st_out, 1'b1, "token before reset");
          #1 rst = 1'b1; #1 check(clk1st_out, 1'b0, "token reset"); rst = 1'b0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

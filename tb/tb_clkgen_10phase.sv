// tb_clkgen_10phase: end-to-end test of the ten-phase clock generator at its
// default size (no parameter is overridden).
//
// Clocking. Time is cut into 20 ns frames that start on the rising edge of
// clk2: clk2 is high 0..6 ns, clk1 high 10..16 ns, so the clocks never
// overlap. CLK_FILL is low for the first A ns and the last B ns of a frame and
// high in between; three (A, B) shapes are used, from wide to narrow phases.
//
// Reference. For each programming word the testbench lists the active phases
// from the rule "start at the first '0' from the top bit, stop at the section
// above the second '0'; with no second '0' phase 0 follows section 1", and
// expects them to repeat in that order, one per frame, starting two frames
// after Reset is released. In every frame it checks, in the middle of the
// CLK_FILL pulse, that exactly the expected Nclk is high and Pclk is its
// complement, and near both frame ends (CLK_FILL low) that the shaped phases
// 9..1 are low while the unshaped phase 0 keeps its level. It also checks
// the input block's phase output, which is high in the frame before each new
// round.
//
// Mechanisms counted (each must occur): token hand-over between sections,
// restart of a round by the NOR, end of a round at a second '0', phase 0
// active, phase 0 switched off by bsi[0], CLK_FILL shapes, Reset in the
// middle of a round, change of the programming word.
module tb_clkgen_10phase;
  localparam int NP = 10;

  logic clk1 = 1'b0, clk2 = 1'b0, rst = 1'b1, clk_fill = 1'b0;
  logic [NP-1:0] bsi = '1;
  logic [NP-1:0] nclk, pclk;
  logic nclk_x, pclk_x;

  int checks = 0, failures = 0;
  int n_handover = 0, n_restart = 0, n_second_zero = 0, n_phase0 = 0;
  int n_phase0_off = 0, n_midrun_reset = 0, n_reprogram = 0;
  int n_shape[3] = '{0, 0, 0};

  clkgen_10phase dut (
    .clk1(clk1), .clk2(clk2), .rst(rst), .clk_fill(clk_fill), .bsi(bsi),
    .nclk(nclk), .pclk(pclk), .nclk_x(nclk_x), .pclk_x(pclk_x)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: bsi=%b nclk=%b pclk=%b nclk_x=%b",
               what, $time, bsi, nclk, pclk, nclk_x);
    end
  endtask

  // Active phases, in order, for a programming word.
  function automatic void phases(input logic [NP-1:0] w, output int q[$]);
    int s;
    q = {};
    s = -1;
    for (int k = NP-1; k >= 1; k--) if (!w[k]) begin s = k; break; end
    if (s < 0) return;
    for (int k = s; k >= 1; k--) begin
      q.push_back(k);
      if (!w[k-1]) return;   // second '0': the round ends here
    end
    q.push_back(0);          // no second '0': phase 0 follows section 1
  endfunction

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One frame; sa/sb: CLK_FILL low time at the start/end of the frame.
  // Returns at 19.5 ns into the frame, after the last sample.
  task automatic frame(input real sa, input real sb, input int expect_ph,
                       input logic expect_x);
    logic [NP-1:0] onehot;
    onehot = '0;
    if (expect_ph >= 0) onehot[expect_ph] = 1'b1;
    fork
      begin clk2 = 1'b1; #6.0 clk2 = 1'b0; end
      begin #10.0 clk1 = 1'b1; #6.0 clk1 = 1'b0; end
      begin #(sa) clk_fill = 1'b1; #(20.0 - sb - sa) clk_fill = 1'b0; end
      begin
        #(sa / 2.0);
        check(nclk[NP-1:1] == '0 && nclk[0] == onehot[0], "phases low at frame start");
        check(nclk_x == 1'b0, "input block phase low at frame start");
      end
      begin
        #((sa + 20.0 - sb) / 2.0);
        check(nclk == onehot, "active phase mid frame");
        check(pclk == ~nclk, "Pclk complement");
        check(nclk_x == expect_x && pclk_x == ~nclk_x, "input block phase");
      end
      begin
        #(20.0 - sb / 2.0);
        check(nclk[NP-1:1] == '0 && nclk[0] == onehot[0], "phases low at frame end");
      end
      begin #19.5; end
    join
  endtask

  // Run one programming word for nframes frames, with Reset released at the
  // start and, if midreset_at >= 0, Reset pulsed once more that many frames
  // into the run.
  task automatic run_mode(input logic [NP-1:0] w, input int shape,
                          input int nframes, input int midreset_at);
    real sa, sb;
    int q[$];
    int f, rc, p, prev;
    int midreset;
    case (shape)
      0: begin sa = 2.0; sb = 2.0; end
      1: begin sa = 4.0; sb = 5.0; end
      default: begin sa = 8.0; sb = 9.0; end
    endcase
    n_shape[shape]++;
    midreset = midreset_at;
    // reprogram under Reset (time 19.5 of a frame)
    rst = 1'b1;
    if (bsi != w) n_reprogram++;
    bsi = w;
    phases(w, q);
    #0.5 frame(sa, sb, -1, 1'b1);     // a frame held in Reset
    rst = 1'b0;                        // released at 19.5
    rc = 1;
    prev = -1;
    f = 0;
    while (f < nframes) begin
      if (f == 0 || f < rc || q.size() == 0) begin
        #0.5 frame(sa, sb, -1, 1'b1);
      end else begin
        p = (f - rc) % q.size();
        #0.5 frame(sa, sb, q[p], p == q.size() - 1);
        if (q[p] == 0) n_phase0++;
        if (prev >= 0 && q[p] == prev - 1) n_handover++;
        if (p == 0 && f > rc) n_restart++;
        if (p == q.size() - 1 && q[p] != 0) n_second_zero++;
        if (!w[0] && q[p] == 1) n_phase0_off++;
        prev = q[p];
      end
      if (midreset >= 0 && f == rc + midreset) begin
        // Reset in the middle of a round: pulse it for one frame
        rst = 1'b1;
        #0.5 frame(sa, sb, -1, 1'b1);
        rst = 1'b0;
        n_midrun_reset++;
        midreset = -1;  // only once per run
        f += 1;
        rc = f + 2;
        prev = -1;
      end
      f++;
    end
  endtask

  initial begin : stim
    logic [NP-1:0] w;
    #19.5;
    run_mode(10'b0111111111, 0, 30, 4);   // all ten phases
    run_mode(10'b0111111111, 1, 25, -1);
    run_mode(10'b0111111111, 2, 25, -1);
    run_mode(10'b1111011110, 0, 25, 7);   // phases 5..1
    run_mode(10'b1111011110, 1, 20, -1);
    run_mode(10'b1011111011, 2, 25, 3);   // phases 8..3
    run_mode(10'b1111111111, 0, 8, -1);   // no '0': no phase
    run_mode(10'b1110111111, 1, 15, -1);  // phases 6..0
    run_mode(10'b1111111001, 0, 10, -1);  // single phase 2
    for (int i = 0; i < 30; i++) begin
      w = NP'($urandom);
      run_mode(w, $urandom_range(2), 6 + $urandom_range(20),
               ($urandom_range(1) == 0) ? -1 : int'($urandom_range(8)));
    end
    $display("mechanisms: handover=%0d restart=%0d second_zero_end=%0d phase0=%0d",
             n_handover, n_restart, n_second_zero, n_phase0);
    $display("            phase0_off=%0d midrun_reset=%0d reprogram=%0d fill_shapes=%0d/%0d/%0d",
             n_phase0_off, n_midrun_reset, n_reprogram, n_shape[0], n_shape[1], n_shape[2]);
    check(n_handover > 0, "mechanism: hand-over seen");
    check(n_restart > 0, "mechanism: restart seen");
    check(n_second_zero > 0, "mechanism: end at second zero seen");
    check(n_phase0 > 0, "mechanism: phase 0 seen");
    check(n_phase0_off > 0, "mechanism: phase 0 off seen");
    check(n_midrun_reset > 0, "mechanism: mid-run reset seen");
    check(n_reprogram > 0, "mechanism: reprogramming seen");
    check(n_shape[0] > 0 && n_shape[1] > 0 && n_shape[2] > 0, "mechanism: fill shapes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

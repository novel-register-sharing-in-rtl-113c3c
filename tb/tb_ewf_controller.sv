// tb_ewf_controller: checks the step sequencer and its control words for
// the SRV assignments (type II default, type I, and the 11-register one
// with MDC adders) over many iterations with
// random stalls:
//  - the step counter runs 0..15, advancing only while run is high;
//  - in_ready only in step 15 with run high, out_valid only in step 14;
//  - the number of additions and multiplications per step matches the
//    published schedule (typed in here by hand), 26 + 8 per iteration;
//  - the registers named by the words stay below the register count of the
//    assignment (12 / 14 / 11) and every register is used;
//  - nothing is enabled while stalled.
module tb_ewf_controller;
  import ewf_pkg::*;
  // Additions per step and multiplier use per step, as in the schedule.
  localparam int N_ADD [16] = '{1, 2, 1, 1, 0, 1, 2, 1, 2, 3, 3, 2, 2, 2, 3, 0};
  localparam bit MUL_AT [16] = '{0, 0, 0, 0, 1, 1, 0, 1, 1, 0, 1, 1, 1, 1, 0, 0};

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  ctl_t ctl2, ctl1, ctl0;
  step_t step2, step1, step0;
  logic ir2, ir1, ov2, ov1, ir0, ov0;
  bit used0 [16];
  int checks = 0, failures = 0, n_stall = 0, n_iter = 0, adds = 0, muls = 0;
  bit used2 [16], used1 [16];

  ewf_controller dut2 (.clk, .rst_n, .run, .ctl(ctl2), .step(step2), .in_ready(ir2), .out_valid(ov2));
  ewf_controller #(.SRV_TYPE(1)) dut1 (.clk, .rst_n, .run, .ctl(ctl1), .step(step1), .in_ready(ir1), .out_valid(ov1));
  ewf_controller #(.SRV_TYPE(0)) dut0 (.clk, .rst_n, .run, .ctl(ctl0), .step(step0), .in_ready(ir0), .out_valid(ov0));
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (step %0d)", what, step2); end
  endtask

  task automatic mark(ctl_t c, ref bit used [16], input int nreg);
    for (int f = 0; f < int'(N_FUS); f++) if (c.fu[f].en) begin
      check(int'(c.fu[f].src0) < nreg && int'(c.fu[f].dst) < nreg, "register index in range");
      if (f != int'(MUL_FU)) check(int'(c.fu[f].src1) < nreg, "register index in range");
      used[c.fu[f].src0] = 1'b1; used[c.fu[f].dst] = 1'b1;
      if (f != int'(MUL_FU)) used[c.fu[f].src1] = 1'b1;
    end
    if (c.load_inp) used[c.inp_dst] = 1'b1;
  endtask

  initial begin
    step_t prev;
    #12 rst_n = 1'b1;
    @(negedge clk);
    check(step2 == 15, "reset to step 15");
    prev = step2;
    for (int cyc = 0; cyc < 16 * 60; cyc++) begin
      int na, nm;
      run = ($urandom_range(0, 7) != 0);
      #1;
      check(step1 == step2, "both controllers in step");
      na = 0;
      for (int f = 0; f < int'(N_ADDERS); f++) na += int'(ctl2.fu[f].en);
      nm = int'(ctl2.fu[MUL_FU].en);
      if (run) begin
        check(na == N_ADD[step2], "additions in this step");
        check(nm == int'(MUL_AT[step2]), "multiplication in this step");
        check(ctl1.fu[0].en == ctl2.fu[0].en && ctl1.fu[3].en == ctl2.fu[3].en, "same schedule for both types");
        check(ir2 == (step2 == 15), "in_ready in step 15");
        adds += na; muls += nm;
        mark(ctl2, used2, 12);
        mark(ctl1, used1, 14);
        mark(ctl0, used0, 11);
        if (step2 == 15) begin
          if (n_iter > 0) check(adds == 26 && muls == 8, "26 additions and 8 multiplications per iteration");
          adds = 0; muls = 0;
          n_iter++;
        end
      end else begin
        n_stall++;
        check(na == 0 && nm == 0 && !ir2 && !ctl2.load_inp, "nothing enabled while stalled");
      end
      check(ov2 == (step2 == 14), "out_valid in step 14");
      @(negedge clk);
      check(step2 == (run ? step_t'(prev + 1) : prev), "step advances only with run");
      prev = step2;
    end
    check(n_stall > 0, "a stall happened");
    check(n_iter > 2, "several iterations ran");
    for (int r = 0; r < 12; r++) check(used2[r], "every type II register used");
    for (int r = 0; r < 14; r++) check(used1[r], "every type I register used");
    for (int r = 0; r < 11; r++) check(used0[r], "every MDC-variant register used");
    check(!used2[12] && !used1[14] && !used0[11], "no register beyond the assignment used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ewf_srv_datapath: end-to-end test of the SRV datapath.
//
// Runs the default (SRV-type II, 12 registers), an SRV-type I (14
// registers) and a minimum-register datapath with MDC adders (11 registers)
// side by side on the same random input stream, with
// random stalls (run low). Every output is compared with the behavioural
// filter model ewf_ref_model, and the test checks the timing: one sample
// every 16 active clocks and the output 15 active clocks after its sample.
// It also counts the mechanisms the design has and fails if one never
// happened: stalls, type II in-place overwrites, steps that rely on MDC
// adders in the 11-register datapath (only there, and only on adders 0 and
// 1), and SRV rule violations (which must never happen).
module tb_ewf_srv_datapath;


  localparam int W = 16, FRAC = 14, N_ITER = 200;
  localparam int COEFS [8] = '{8192, 12288, -6144, 10240, -4096, 14336, 2048, 5120};

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [W-1:0] in_data;
  logic in_ready2, in_ready1, out_valid2, out_valid1, viol2, viol1;
  logic [W-1:0] out2, out1;
  ewf_pkg::step_t step2, step1;
  logic [3:0] inpl2, inpl1, inpl0, mdc2, mdc1, mdc0;
  logic in_ready0, out_valid0, viol0;
  logic [W-1:0] out0;
  ewf_pkg::step_t step0;

  ewf_srv_datapath dut2 (
    .clk, .rst_n, .run, .in_data, .in_ready(in_ready2), .out_data(out2),
    .out_valid(out_valid2), .step(step2), .srv_violation(viol2), .srv_in_place(inpl2), .srv_mdc_hold(mdc2));

  ewf_srv_datapath #(.SRV_TYPE(1)) dut1 (
    .clk, .rst_n, .run, .in_data, .in_ready(in_ready1), .out_data(out1),
    .out_valid(out_valid1), .step(step1), .srv_violation(viol1), .srv_in_place(inpl1), .srv_mdc_hold(mdc1));

  ewf_srv_datapath #(.SRV_TYPE(0)) dut0 (
    .clk, .rst_n, .run, .in_data, .in_ready(in_ready0), .out_data(out0),
    .out_valid(out_valid0), .step(step0), .srv_violation(viol0), .srv_in_place(inpl0), .srv_mdc_hold(mdc0));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mdc = 0, n_mdc_other = 0;
  int n_stall = 0, n_inplace2 = 0, n_inplace1 = 0, n_viol = 0, n_in = 0, n_out = 0;
  int active = 0, last_in_active = -1;
  int exp_q [$];
  int exp_lat [$];
  ewf_ref_model #(.W(W), .FRAC(FRAC), .COEFS(COEFS)) u_ref ();
  bit consumed = 1'b0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    in_data = W'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (n_out < N_ITER) begin
      @(negedge clk);
      if (consumed) in_data = W'($urandom);
      consumed = 1'b0;
      run = ($urandom_range(0, 9) != 0);
      #1;
      if (!run) n_stall++;
      if (viol2 || viol1 || viol0) n_viol++;
      if (run && mdc0 != 0) n_mdc++;
      if ((mdc0 & 4'b1100) != 0 || mdc1 != 0 || mdc2 != 0) n_mdc_other++;
      if (run && inpl2 != 0) n_inplace2++;
      if (run && inpl1 != 0) n_inplace1++;
      check(step1 == step2 && step0 == step2, "all datapaths in the same step");
      if (run) begin
        active++;
        if (in_ready2) begin
          check(in_ready1 && in_ready0, "all datapaths take the sample");
          if (last_in_active >= 0)
            check(active - last_in_active == 16, "one sample every 16 active clocks");
          last_in_active = active;
          exp_q.push_back(u_ref.iterate(int'($signed(in_data))));
          exp_lat.push_back(active);
          n_in++;
          consumed = 1'b1;
        end
        if (out_valid2) begin
          int e, t0;
          check(exp_q.size() > 0, "output has a sample behind it");
          if (exp_q.size() > 0) begin
            e = exp_q.pop_front();
            t0 = exp_lat.pop_front();
            check(int'($signed(out2)) == e, $sformatf("type II output %0d expected %0d", $signed(out2), e));
            check(int'($signed(out1)) == e, $sformatf("type I output %0d expected %0d", $signed(out1), e));
            check(active - t0 == 15, "output 15 active clocks after its sample");
            check(int'($signed(out0)) == e, $sformatf("MDC output %0d expected %0d", $signed(out0), e));
            check(out_valid1 && out_valid0, "all outputs valid in the same step");
          end
          n_out++;
        end
      end
    end
    check(n_stall > 0, "a stall happened");
    check(n_inplace2 > 0, "type II used in-place overwrite");
    check(n_inplace1 == 0, "type I never overwrites in place");
    check(n_viol == 0, "no SRV rule violation");
    check(n_mdc > 0, "the 11-register datapath relied on its MDC adders");
    check(n_mdc_other == 0, "MDC only on adders 0 and 1 of the 11-register datapath");
    $display("samples=%0d outputs=%0d stalls=%0d inplace_typeII_steps=%0d mdc_steps=%0d violations=%0d",
             n_in, n_out, n_stall, n_inplace2, n_mdc, n_viol);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ewf_full: the datapath exactly as delivered (all parameters at their
// defaults) filtering 20 random samples with run held high. Each output is
// compared with the behavioural filter model, and the test checks that
// samples are taken every 16 clocks and outputs appear 15 clocks after
// their sample.
module tb_ewf_full;

  localparam int W = 16, FRAC = 14, N_ITER = 20;
  localparam int COEFS [8] = '{8192, 12288, -6144, 10240, -4096, 14336, 2048, 5120};

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [W-1:0] in_data, out_data;
  logic in_ready, out_valid, srv_violation;
  ewf_pkg::step_t step;
  logic [3:0] srv_in_place, srv_mdc_hold;
  int checks = 0, failures = 0, n_out = 0, cyc = 0, t_in = -1;
  int exp_q [$], t_q [$];
  ewf_ref_model #(.W(W), .FRAC(FRAC), .COEFS(COEFS)) u_ref ();
  bit consumed = 1'b0;

  ewf_srv_datapath dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_data = W'($urandom);
    #12 rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    while (n_out < N_ITER) begin
      #1;
      cyc++;
      check(!srv_violation && srv_mdc_hold == '0, "no SRV violation, no MDC needed");
      if (in_ready) begin
        if (t_in >= 0) check(cyc - t_in == 16, "sample every 16 clocks");
        t_in = cyc;
        exp_q.push_back(u_ref.iterate(int'($signed(in_data))));
        t_q.push_back(cyc);
        consumed = 1'b1;
      end
      if (out_valid) begin
        check(exp_q.size() > 0, "output has a sample");
        if (exp_q.size() > 0) begin
          int e;
          e = exp_q.pop_front();
          check(int'($signed(out_data)) == e, $sformatf("output %0d expected %0d", $signed(out_data), e));
          check(cyc - t_q.pop_front() == 15, "latency 15 clocks");
        end
        n_out++;
      end
      @(negedge clk);
      if (consumed) in_data = W'($urandom);
      consumed = 1'b0;
    end
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

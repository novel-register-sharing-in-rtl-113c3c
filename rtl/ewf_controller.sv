// ewf_controller: the control-step sequencer of the EWF datapath.
//
// A modulo-16 step counter drives a control word per step: for each of the
// three adders and the multiplier whether it works, which registers it reads
// and which it writes, the multiplier coefficient, the input-load strobe and
// the register that holds the output. The words are derived at elaboration
// from the schedule and from the register assignment chosen by SRV_TYPE
// (1 = SRV-type I, 2 = SRV-type II, 0 = minimum registers with MDC), so the
// same controller serves every assignment.
//
// Interface and timing: while run is high the counter advances one step per
// clock. In step 15 no operation runs and in_ready is high: the input sample
// is written at the edge that ends step 15 and step 0 of the next iteration
// starts. out_valid is high in step 14, when the output is in its register.
// With run low the counter and every register write freeze (a stall), and
// resume where they stopped. After reset the counter sits at step 15 so the
// first sample is taken at the first enabled edge. The stall and the reset
// state are this design's choices; the 16-step iteration is the schedule's.
module ewf_controller #(
  parameter int unsigned SRV_TYPE = 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  output ewf_pkg::ctl_t   ctl,
  output ewf_pkg::step_t  step,
  output logic            in_ready,
  output logic            out_valid
);
  import ewf_pkg::*;

  ctl_t table_q [N_STEPS];

  always_comb
    for (int s = 0; s < int'(N_STEPS); s++)
      table_q[s] = build_ctl(SRV_TYPE, step_t'(s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   step <= step_t'(N_STEPS - 1);
    else if (run) step <= step + 1'b1;
  end

  always_comb begin
    ctl = table_q[step];
    if (!run) begin
      for (int f = 0; f < int'(N_FUS); f++) ctl.fu[f].en = 1'b0;
      ctl.load_inp = 1'b0;
    end
  end

  assign in_ready  = run && ctl.load_inp;
  assign out_valid = ctl.out_en;

  initial begin
    assert (SRV_TYPE <= 2)
      else $error("ewf_controller: SRV_TYPE must be 0, 1 or 2");
  end
endmodule

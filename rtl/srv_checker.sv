// srv_checker: run-time check of the SRV hold rule on the control word.
//
// A datapath has structural robustness against delay variation (SRV) when,
// for every operation, the registers it reads are not overwritten at the
// clock edge that latches its result; then any bounded skew or path-delay
// variation can be absorbed by lengthening the clock period. For single-cycle
// operations this becomes a rule on each control word:
//   SRV_TYPE 1: no register read by an enabled unit in this step may be
//               written at the edge that ends the step;
//   SRV_TYPE 2: the same, except that a unit may overwrite a register it
//               reads itself with its own result (in-place reuse).
//   SRV_TYPE 0: the type II rule, except that units set in MDC_MASK may
//               break it: their minimum path delay is assumed padded by
//               minimum-delay compensation (MDC) so that their hold
//               constraint is met by delay rather than by structure.
// violation is high in a step that breaks the rule for SRV_TYPE. in_place
// flags the steps that use the type II exception and mdc_hold the steps in
// which a unit relies on its MDC, one bit per unit each. The module is
// combinational; mdc_hold stays zero for the units outside MDC_MASK and for
// types 1 and 2. Type III, which needs a guaranteed order of clock arrival
// between registers, is not checked.
module srv_checker #(
  parameter int unsigned SRV_TYPE = 2,
  parameter logic [ewf_pkg::N_FUS-1:0] MDC_MASK = '0
) (
  input  ewf_pkg::ctl_t               ctl,
  output logic                        violation,
  output logic [ewf_pkg::N_FUS-1:0]   in_place,
  output logic [ewf_pkg::N_FUS-1:0]   mdc_hold
);
  import ewf_pkg::*;

  always_comb begin
    violation = 1'b0;
    in_place  = '0;
    mdc_hold  = '0;
    for (int r = 0; r < int'(N_FUS); r++) begin       // reader unit
      if (ctl.fu[r].en) begin
        for (int w = 0; w < int'(N_FUS); w++) begin   // writer unit
          if (ctl.fu[w].en &&
              (ctl.fu[w].dst == ctl.fu[r].src0 ||
               (r != int'(MUL_FU) && ctl.fu[w].dst == ctl.fu[r].src1))) begin
            if (w == r && SRV_TYPE != 1)             in_place[r] = 1'b1;
            else if (SRV_TYPE == 0 && MDC_MASK[r])   mdc_hold[r] = 1'b1;
            else                                     violation   = 1'b1;
          end
        end
        if (ctl.load_inp &&
            (ctl.inp_dst == ctl.fu[r].src0 ||
             (r != int'(MUL_FU) && ctl.inp_dst == ctl.fu[r].src1))) begin
          if (SRV_TYPE == 0 && MDC_MASK[r]) mdc_hold[r] = 1'b1;
          else                              violation   = 1'b1;
        end
      end
    end
  end
endmodule

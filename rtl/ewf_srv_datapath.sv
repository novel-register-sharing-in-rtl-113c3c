// ewf_srv_datapath: fifth-order wave digital elliptic filter on a datapath
// whose register sharing is structurally robust against delay variation.
//
// Three adders (ewf_adder), one coefficient multiplier (ewf_coef_mult) and a
// shared register file (ewf_regfile) execute the 34 operations of one filter
// iteration in 15 control steps, sequenced by ewf_controller; a new sample
// is taken every 16 steps. The seven filter state values (dat1..dat7) stay
// in their registers from one iteration to the next. Which datum lives in
// which register is fixed by SRV_TYPE:
//   1: SRV-type I assignment, 14 registers: no register is ever overwritten
//      at the edge that ends a step in which it is read, so every hold
//      constraint has a margin of at least one clock period;
//   2: SRV-type II assignment, 12 registers (default): as type I, except
//      that an operation may write its result over an operand it is the
//      last reader of;
//   0: the minimum of 11 registers, sharing as in type II wherever it can;
//      three additions (ops 23, 25, 27) then still see an operand
//      overwritten at the edge that latches their result. They run on
//      adders 0 and 1, which must be built with minimum-delay compensation
//      (MDC, padded short paths); the RTL cannot express that padding and
//      only reports, on srv_mdc_hold, the steps that rely on it.
// srv_checker watches every control word and raises srv_violation if the
// rule of the selected type is broken; an assertion reports it too.
// srv_mdc_hold is constant zero unless SRV_TYPE is 0, and even then only its
// two adder bits can be set.
//
// Interface: run enables the datapath (low = stall, all state held).
// in_ready is high in the step in which in_data is sampled; the sample is
// written at that clock edge. out_valid is high in step 14 of the same
// iteration, i.e. 15 clocks later, with the filter output on out_data.
// The schedule, operand arcs and register counts follow the published
// design; word width, number format, coefficients, adder binding, reset
// and the run/stall handshake are this design's choices.
module ewf_srv_datapath #(
  parameter int unsigned W        = 16,
  parameter int unsigned FRAC     = 14,
  parameter int unsigned SRV_TYPE = 2,
  parameter int          COEFS [ewf_pkg::N_COEFS] = '{8192, 12288, -6144, 10240, -4096, 14336, 2048, 5120}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  run,
  input  logic [W-1:0]          in_data,
  output logic                  in_ready,
  output logic [W-1:0]          out_data,
  output logic                  out_valid,
  output ewf_pkg::step_t        step,
  output logic                  srv_violation,
  output logic [ewf_pkg::N_FUS-1:0] srv_in_place,
  output logic [ewf_pkg::N_FUS-1:0] srv_mdc_hold
);
  import ewf_pkg::*;

  localparam int unsigned NREG = nreg_of(SRV_TYPE);
  localparam int unsigned NWR  = N_FUS + 1;        // FUs + input sample
  localparam int unsigned NRD  = 2 * N_FUS + 1;    // two operands per FU + output

  ctl_t                  ctl;
  logic [NWR-1:0]        we;
  reg_idx_t [NWR-1:0]    waddr;
  logic [NWR-1:0][W-1:0] wdata;
  reg_idx_t [NRD-1:0]    raddr;
  logic [NRD-1:0][W-1:0] rdata;
  logic [N_FUS-1:0][W-1:0] fu_y;

  ewf_controller #(.SRV_TYPE(SRV_TYPE)) u_ctrl (
    .clk, .rst_n, .run, .ctl, .step, .in_ready, .out_valid
  );

  always_comb begin
    for (int f = 0; f < int'(N_FUS); f++) begin
      raddr[2*f]   = ctl.fu[f].src0;
      raddr[2*f+1] = ctl.fu[f].src1;
      we[f]        = ctl.fu[f].en;
      waddr[f]     = ctl.fu[f].dst;
      wdata[f]     = fu_y[f];
    end
    raddr[NRD-1]  = ctl.out_src;
    we[NWR-1]     = ctl.load_inp;
    waddr[NWR-1]  = ctl.inp_dst;
    wdata[NWR-1]  = in_data;
  end

  ewf_regfile #(.W(W), .NREG(NREG), .NWR(NWR), .NRD(NRD)) u_regs (
    .clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata
  );

  for (genvar f = 0; f < int'(N_ADDERS); f++) begin : g_add
    ewf_adder #(.W(W)) u_add (.a(rdata[2*f]), .b(rdata[2*f+1]), .y(fu_y[f]));
  end

  ewf_coef_mult #(.W(W), .FRAC(FRAC), .COEFS(COEFS)) u_mul (
    .x(rdata[2*MUL_FU]), .sel(ctl.coef), .y(fu_y[MUL_FU])
  );

  srv_checker #(.SRV_TYPE(SRV_TYPE), .MDC_MASK(MDC_FU_MASK)) u_srv (
    .ctl, .violation(srv_violation), .in_place(srv_in_place), .mdc_hold(srv_mdc_hold)
  );

  assign out_data = rdata[NRD-1];

  a_srv_hold: assert property (@(posedge clk) disable iff (!rst_n) !srv_violation)
    else $error("SRV hold rule broken in step %0d", step);
endmodule

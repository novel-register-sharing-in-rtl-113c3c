// ewf_regfile: the shared registers of the EWF datapath.
//
// NREG registers of W bits. Every register can be loaded from any of NWR
// write ports (the four functional units and the input sample); each port
// carries an enable, a register index and data, and the write happens at the
// rising clock edge. NRD read ports return a register's contents
// combinationally. The register assignment guarantees that no two ports
// write the same register at the same edge; should it happen the highest
// numbered port wins. A register read and written in the same step returns
// the old value during the step, which is exactly the in-place overwrite
// that SRV-type II allows. Registers reset to zero so that the filter state
// starts from rest; the reset value is this design's choice.
module ewf_regfile #(
  parameter int unsigned W    = 16,
  parameter int unsigned NREG = 12,
  parameter int unsigned NWR  = 5,
  parameter int unsigned NRD  = 9
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NWR-1:0]                we,
  input  ewf_pkg::reg_idx_t [NWR-1:0]   waddr,
  input  logic [NWR-1:0][W-1:0]         wdata,
  input  ewf_pkg::reg_idx_t [NRD-1:0]   raddr,
  output logic [NRD-1:0][W-1:0]         rdata
);
  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NREG); r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (we[p] && int'(waddr[p]) < int'(NREG)) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < int'(NRD); p++)
      rdata[p] = (int'(raddr[p]) < int'(NREG)) ? regs[raddr[p]] : '0;
endmodule

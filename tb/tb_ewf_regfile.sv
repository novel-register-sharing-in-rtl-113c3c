// tb_ewf_regfile: drives random writes (at most one per register per clock,
// as the register assignment guarantees) and random reads on every port of a
// 12-register file and compares each read with a model array. Also checks
// reset to zero, that a register written at an edge still reads its old
// value before that edge, and that disabled ports write nothing.
module tb_ewf_regfile;
  import ewf_pkg::*;
  localparam int W = 16, NREG = 12, NWR = 5, NRD = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NWR-1:0] we;
  reg_idx_t [NWR-1:0] waddr;
  logic [NWR-1:0][W-1:0] wdata;
  reg_idx_t [NRD-1:0] raddr;
  logic [NRD-1:0][W-1:0] rdata;
  logic [W-1:0] model [NREG];
  int checks = 0, failures = 0;

  ewf_regfile #(.W(W), .NREG(NREG), .NWR(NWR), .NRD(NRD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_reads();
    for (int p = 0; p < NRD; p++) begin
      checks++;
      if (rdata[p] != model[raddr[p]]) begin
        failures++;
        $display("FAIL port %0d reg %0d: got %h expected %h", p, raddr[p], rdata[p], model[raddr[p]]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < NREG; r++) model[r] = '0;
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    #12 rst_n = 1'b1;
    for (int r = 0; r < NREG; r++) begin
      @(negedge clk);
      for (int p = 0; p < NRD; p++) raddr[p] = reg_idx_t'(r);
      #1 check_reads();
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit used [NREG];
      @(negedge clk);
      for (int r = 0; r < NREG; r++) used[r] = 1'b0;
      for (int p = 0; p < NWR; p++) begin
        int r;
        r = $urandom_range(0, NREG - 1);
        waddr[p] = reg_idx_t'(r);
        wdata[p] = W'($urandom);
        we[p] = ($urandom_range(0, 2) == 0) && !used[r];
        if (we[p]) used[r] = 1'b1;
      end
      for (int p = 0; p < NRD; p++) raddr[p] = reg_idx_t'($urandom_range(0, NREG - 1));
      #1 check_reads();              // old values before the edge
      @(posedge clk);
      for (int p = 0; p < NWR; p++) if (we[p]) model[waddr[p]] = wdata[p];
      #1 check_reads();              // new values after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

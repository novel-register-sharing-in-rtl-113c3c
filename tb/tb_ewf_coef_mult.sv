// tb_ewf_coef_mult: checks the coefficient multiplier for every coefficient
// on corner and random operands. The expected value is computed in 64-bit
// integer arithmetic: floor(x * c / 2^FRAC), reduced to W bits.
module tb_ewf_coef_mult;
  localparam int W = 16, FRAC = 14;
  localparam int COEFS [8] = '{8192, 12288, -6144, 10240, -4096, 14336, 2048, 5120};
  logic [W-1:0] x, y;
  logic [2:0] sel;
  int checks = 0, failures = 0;
  ewf_coef_mult #(.W(W), .FRAC(FRAC), .COEFS(COEFS)) dut (.x, .sel, .y);

  task automatic try(logic [W-1:0] xv, int s);
    longint p, q;
    x = xv; sel = 3'(s); #1;
    p = longint'($signed(xv)) * longint'(COEFS[s]);
    // floor division by 2^FRAC
    q = (p >= 0) ? p / (longint'(1) << FRAC) : -((-p + (longint'(1) << FRAC) - 1) / (longint'(1) << FRAC));
    checks++;
    if (y != W'(q)) begin
      failures++;
      $display("FAIL x=%0d coef%0d: got %0d expected %0d", $signed(xv), s, $signed(y), q);
    end
  endtask

  initial begin
    for (int s = 0; s < 8; s++) begin
      try(16'h0000, s); try(16'h0001, s); try(16'hffff, s); try(16'h7fff, s); try(16'h8000, s);
      try(16'd16384, s);
      for (int k = 0; k < 300; k++) try(W'($urandom), s);
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

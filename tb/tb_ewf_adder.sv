// tb_ewf_adder: checks the adder on corner cases and random operands against
// a sum computed in 64-bit arithmetic and reduced modulo 2^W.
module tb_ewf_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;
  ewf_adder #(.W(W)) dut (.a, .b, .y);

  task automatic try(logic [W-1:0] x0, logic [W-1:0] x1);
    longint e;
    a = x0; b = x1; #1;
    e = (longint'(x0) + longint'(x1)) % (longint'(1) << W);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", x0, x1, y, e);
    end
  endtask

  initial begin
    try('0, '0); try('1, 1); try(16'h7fff, 1); try(16'h8000, 16'h8000); try(16'hffff, 16'hffff);
    for (int k = 0; k < 2000; k++) try(W'($urandom), W'($urandom));
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

// tb_srv_checker: drives random control words into a type I and a type II
// checker and compares both outputs with a reference written here from the
// rule itself: in a step, a register read by an enabled unit (operand 0, and
// operand 1 for the adders) must not be written at the end of the step by
// another unit or by the input load; type I also forbids a unit writing a
// register it reads itself, which type II allows and reports as in_place.
// A third checker (type 0, MDC on units 0 and 1) must report the breaks on
// those two units as mdc_hold instead of as violations.
// Directed cases cover each situation; register indices are drawn from a
// small range so that collisions are frequent.
module tb_srv_checker;
  import ewf_pkg::*;
  ctl_t ctl;
  logic v1, v2, v0;
  logic [N_FUS-1:0] ip1, ip2, ip0, mh1, mh2, mh0;
  int n_mh = 0;
  int checks = 0, failures = 0, n_v = 0, n_ip = 0;

  srv_checker #(.SRV_TYPE(1)) dut1 (.ctl, .violation(v1), .in_place(ip1), .mdc_hold(mh1));
  srv_checker #(.SRV_TYPE(2)) dut2 (.ctl, .violation(v2), .in_place(ip2), .mdc_hold(mh2));
  srv_checker #(.SRV_TYPE(0), .MDC_MASK(4'b0011)) dut0 (.ctl, .violation(v0), .in_place(ip0), .mdc_hold(mh0));

  function automatic bit reads(ctl_t c, int f, reg_idx_t r);
    return c.fu[f].en && (c.fu[f].src0 == r || (f != 3 && c.fu[f].src1 == r));
  endfunction

  task automatic try(ctl_t c);
    bit ev1, ev2, ev0;
    logic [N_FUS-1:0] eip, emh;
    ctl = c; #1;
    ev1 = 0; ev2 = 0; ev0 = 0; eip = '0; emh = '0;
    for (int w = 0; w < 4; w++) if (c.fu[w].en)
      for (int r = 0; r < 4; r++) if (reads(c, r, c.fu[w].dst)) begin
        ev1 = 1;
        if (r == w) eip[r] = 1;
        else begin
          ev2 = 1;
          if (r < 2) emh[r] = 1; else ev0 = 1;
        end
      end
    for (int r = 0; r < 4; r++) if (c.load_inp && reads(c, r, c.inp_dst)) begin
      ev1 = 1; ev2 = 1;
      if (r < 2) emh[r] = 1; else ev0 = 1;
    end
    checks += 6;
    if (v1 != ev1 || v2 != ev2 || ip2 != eip || ip1 != '0 || mh1 != '0 || mh2 != '0) begin
      failures++;
      $display("FAIL %p: v1=%b/%b v2=%b/%b ip2=%b/%b ip1=%b", c, v1, ev1, v2, ev2, ip2, eip, ip1);
    end
    if (v0 != ev0 || ip0 != eip || mh0 != emh) begin
      failures++;
      $display("FAIL type 0 %p: v0=%b/%b mdc=%b/%b", c, v0, ev0, mh0, emh);
    end
    n_v += int'(ev2); n_ip += int'(eip != 0); n_mh += int'(emh != 0);
  endtask

  initial begin
    ctl_t c;
    // legal word: disjoint registers
    c = '0; c.fu[0] = '{1'b1, 4'd1, 4'd2, 4'd3}; try(c);
    // adder 0 overwrites its own operand: type II legal, type I not
    c = '0; c.fu[0] = '{1'b1, 4'd1, 4'd2, 4'd1}; try(c);
    // adder 1 overwrites adder 0's operand: illegal for both
    c = '0; c.fu[0] = '{1'b1, 4'd1, 4'd2, 4'd3}; c.fu[1] = '{1'b1, 4'd5, 4'd6, 4'd2}; try(c);
    // two last readers of one register, one writes it: illegal (Fig. 3(b))
    c = '0; c.fu[0] = '{1'b1, 4'd1, 4'd2, 4'd1}; c.fu[1] = '{1'b1, 4'd1, 4'd6, 4'd7}; try(c);
    // multiplier's unused second operand does not count
    c = '0; c.fu[3] = '{1'b1, 4'd4, 4'd9, 4'd5}; c.fu[0] = '{1'b1, 4'd1, 4'd2, 4'd9}; try(c);
    // input load onto a register being read
    c = '0; c.fu[2] = '{1'b1, 4'd8, 4'd2, 4'd3}; c.load_inp = 1; c.inp_dst = 4'd8; try(c);
    // disabled unit neither reads nor writes
    c = '0; c.fu[0] = '{1'b0, 4'd1, 4'd2, 4'd3}; c.fu[1] = '{1'b1, 4'd3, 4'd4, 4'd1}; try(c);
    for (int k = 0; k < 5000; k++) begin
      c = '0;
      for (int f = 0; f < 4; f++) begin
        c.fu[f].en   = ($urandom_range(0, 1) == 1);
        c.fu[f].src0 = reg_idx_t'($urandom_range(0, 6));
        c.fu[f].src1 = reg_idx_t'($urandom_range(0, 6));
        c.fu[f].dst  = reg_idx_t'($urandom_range(0, 6));
      end
      c.load_inp = ($urandom_range(0, 3) == 0);
      c.inp_dst  = reg_idx_t'($urandom_range(0, 6));
      c.coef     = 3'($urandom);
      try(c);
    end
    checks++;
    if (n_v == 0 || n_ip == 0 || n_mh == 0) begin failures++; $display("FAIL coverage"); end
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

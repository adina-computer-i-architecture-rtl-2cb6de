// tb_control_lines: self-checking test of the PORT 0 network between the MU and the AUs.
//
// Exhaustive over the MU's P0 command byte, with random end and interrupt flags from the AUs:
// start (P0[6]) and stop (P0[4]) reach only the AU numbered on P0[3:0] unless broadcast (P0[5])
// is set, when they reach every AU; the MU's P0[7] shows the end flag of the addressed AU; every
// AU's interrupt request is seen by the MU. Purely combinational, so each case is checked one
// time step after it is applied.
module tb_control_lines;
  localparam int unsigned N = 16;

  logic [7:0]   mu_p0_out;
  logic         mu_p0_end, mu_irq;
  logic [N-1:0] au_p0_end, au_p0_irq, au_p0_start, au_p0_stop, au_irq;
  int checks = 0, failures = 0;

  control_lines #(.N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (p0=%02h)", what, mu_p0_out);
    end
  endtask

  initial begin
    for (int cmd = 0; cmd < 256; cmd++) begin
      repeat (4) begin
        logic [N-1:0] exp_start, exp_stop;
        int j;
        mu_p0_out = 8'(cmd);
        au_p0_end = N'($urandom);
        au_p0_irq = N'($urandom);
        #1;
        j = cmd & 15;
        for (int k = 0; k < N; k++) begin
          bit hit;
          hit = cmd[5] || (k == j);
          exp_start[k] = hit && cmd[6];
          exp_stop[k]  = hit && cmd[4];
        end
        check(au_p0_start == exp_start, "start lines");
        check(au_p0_stop == exp_stop, "stop lines");
        check(mu_p0_end == au_p0_end[j], "end flag of the addressed AU");
        check(au_irq == au_p0_irq && mu_irq == (au_p0_irq != 0), "interrupt requests");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

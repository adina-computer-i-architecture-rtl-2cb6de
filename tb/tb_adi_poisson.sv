// tb_adi_poisson: the ADI (alternating direction) iteration for the Poisson equation
// Delta psi = -zeta, run on the ADINA-I interconnect at full size with 14 AUs on a 16 x 16
// mesh (J = 15, mesh width h = 1/15, interior 1..14, psi = 0 on the boundary), P = 5 iterations.
//
//   row step:    psi(r+1/2) - c Delta1 psi(r+1/2) = B,  B = psi(r) + c Delta2 psi(r) + sigma zeta
//   column step: psi(r+1)   - c Delta2 psi(r+1)   = 2 psi(r+1/2) - B + sigma zeta
// with c = sigma / h^2 and Delta1, Delta2 the second differences along i and along j. The source
// term enters both half steps (Peaceman-Rachford form), so the fixed point solves the equation.
//
// AU-j solves the tri-diagonal system of mesh row j in the row step, and that of mesh column j
// in the column step, by forward elimination and back substitution. Data move as in the
// original's program:
//   * before a row step, column owner AU-i has put the pair {Delta2 psi[i][j], psi[i][j]} into
//     FIFO-(i,j) from its column side; AU-j reads it on its row side;
//   * after the row step AU-j puts {B[i][j], psi(r+1/2)[i][j]} back into the same FIFO-(i,j)
//     from its row side; AU-i reads it on its column side.
// So every FIFO carries data one way in one half step and back in the next. A half step starts
// only when the previous one has ended everywhere: the AUs raise end, the MU polls them, then
// sends a broadcast stop and a broadcast start. At the end the MU reads psi[i][k] out of
// FIFO-(i,k).
//
// Numbers are 64-bit reals sent as two 32-bit words (8 bytes): two numbers per FIFO per half step.
// The result must equal the same computation done serially, bit for bit, and the residual of
// the difference equation must fall.
module tb_adi_poisson;
  import adina_pkg::*;
  localparam int WATCHDOG = 400000;
  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] mu_p1 = '0, mu_p0_out = '0;
  port_req_t  mu_req = PORT_REQ_IDLE;
  port_rsp_t  mu_rsp;
  logic       mu_p0_end, mu_irq;
  logic [N-1:0] mu_pio_irq;
  logic [7:0] au_p1 [N], au_p0_out [N], au_p0_in [N];
  port_req_t  au_req [N];
  port_rsp_t  au_rsp [N];
  logic [N*N-1:0] node_not_empty, node_not_full;

  adina_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  function automatic port_rsp_t rsp_of(input int p);
    return (p < 0) ? mu_rsp : au_rsp[p];
  endfunction

  task automatic set_req(input int p, input port_req_t r);
    if (p < 0) mu_req = r; else au_req[p] = r;
  endtask

  task automatic put_word(input int p, input logic [7:0] p1, input logic [31:0] w);
    port_req_t r;
    int k = 0;
    @(negedge clk);
    if (p < 0) mu_p1 = p1; else au_p1[p] = p1;
    r = PORT_REQ_IDLE; r.en = 1'b1; r.wr = 1'b1;
    while (k < 4) begin
      automatic port_rsp_t s;
      r.stb = 1'b1; r.wdata = w[8 * k +: 8];
      set_req(p, r);
      #4;
      s = rsp_of(p);
      if (s.gnt && s.rdy) k++;
      @(negedge clk);
    end
    set_req(p, PORT_REQ_IDLE);
  endtask

  task automatic get_word(input int p, input logic [7:0] p1, output logic [31:0] w);
    port_req_t r;
    int k = 0;
    @(negedge clk);
    if (p < 0) mu_p1 = p1; else au_p1[p] = p1;
    r = PORT_REQ_IDLE; r.en = 1'b1; r.wr = 1'b0;
    while (k < 4) begin
      automatic port_rsp_t s;
      r.stb = 1'b1;
      set_req(p, r);
      #4;
      s = rsp_of(p);
      if (s.gnt && s.rdy) begin w[8 * k +: 8] = s.rdata; k++; end
      @(negedge clk);
    end
    set_req(p, PORT_REQ_IDLE);
  endtask

  function automatic logic [7:0] au_row(input int i);   // FIFO-(i, self)
    return {4'b0000, 4'(i)};
  endfunction
  function automatic logic [7:0] au_col(input int k);   // FIFO-(self, k)
    return {4'b0001, 4'(k)};
  endfunction

  localparam int J = 15;
  localparam int P = 5;
  localparam real C = 2.405;           // sigma / h^2, near the best single ADI parameter for J = 15
  localparam real SG = C / (J * J);    // sigma

  typedef real vec_t [J+1];

  real zeta [J+1][J+1], ref_psi [J+1][J+1];

  // second difference along one line
  function automatic real d2(input real lo, input real mid, input real hi);
    return hi - 2.0 * mid + lo;
  endfunction

  // solve (1 + 2C) x[n] - C x[n-1] - C x[n+1] = d[n], n = 1..J-1, x[0] = x[J] = 0
  // (forward elimination, then back substitution)
  function automatic vec_t line_solve(input vec_t d);
    vec_t x, cp, dp;
    x[0] = 0.0; x[J] = 0.0;
    cp[1] = -C / (1.0 + 2.0 * C);
    dp[1] = d[1] / (1.0 + 2.0 * C);
    for (int n = 2; n < J; n++) begin
      automatic real m = (1.0 + 2.0 * C) + C * cp[n-1];
      cp[n] = -C / m;
      dp[n] = (d[n] + C * dp[n-1]) / m;
    end
    x[J-1] = dp[J-1];
    for (int n = J - 2; n >= 1; n--) x[n] = dp[n] - cp[n] * x[n+1];
    return x;
  endfunction

  function automatic real residual(input real p [J+1][J+1]);
    real m = 0.0;
    for (int i = 1; i < J; i++)
      for (int j = 1; j < J; j++) begin
        automatic real e = p[i+1][j] + p[i-1][j] + p[i][j+1] + p[i][j-1] - 4.0 * p[i][j]
                           + zeta[i][j] / (J * J);
        if (e < 0.0) e = -e;
        if (e > m) m = e;
      end
    return m;
  endfunction

  task automatic put_real(input int p, input logic [7:0] p1, input real v);
    logic [63:0] b = $realtobits(v);
    put_word(p, p1, b[31:0]);
    put_word(p, p1, b[63:32]);
  endtask

  task automatic get_real(input int p, input logic [7:0] p1, output real v);
    logic [31:0] lo, hi;
    get_word(p, p1, lo);
    get_word(p, p1, hi);
    v = $bitstoreal({hi, lo});
  endtask

  // AU side of the end/stop/start handshake between half steps
  task automatic au_half_step_end(input int me);
    @(negedge clk);
    au_p0_out[me][AU_P0_END] = 1'b1;
    while (!au_p0_in[me][AU_P0_STOP]) @(negedge clk);
    au_p0_out[me][AU_P0_END] = 1'b0;
    while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
  endtask

  initial begin
    real zero [J+1][J+1];
    real res0;
    for (int i = 0; i <= J; i++)
      for (int j = 0; j <= J; j++) begin
        zero[i][j] = 0.0;
        zeta[i][j] = (i == 0 || j == 0 || i == J || j == J) ? 0.0 :
                     real'(int'($urandom_range(0, 2000)) - 1000) / 100.0;
      end
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0; end
    // serial reference, the same operations in the same order
    ref_psi = zero;
    res0 = residual(ref_psi);
    for (int r = 0; r < P; r++) begin
      real half [J+1][J+1], bb [J+1][J+1];
      half = zero; bb = zero;
      for (int j = 1; j < J; j++) begin
        automatic vec_t d, x;
        d[0] = 0.0; d[J] = 0.0;
        for (int i = 1; i < J; i++)
          d[i] = ref_psi[i][j] + C * d2(ref_psi[i][j-1], ref_psi[i][j], ref_psi[i][j+1]) + SG * zeta[i][j];
        x = line_solve(d);
        for (int i = 1; i < J; i++) begin half[i][j] = x[i]; bb[i][j] = d[i]; end
      end
      for (int i = 1; i < J; i++) begin
        automatic vec_t d, y;
        d[0] = 0.0; d[J] = 0.0;
        for (int k = 1; k < J; k++) d[k] = 2.0 * half[i][k] - bb[i][k] + SG * zeta[i][k];
        y = line_solve(d);
        for (int k = 1; k < J; k++) ref_psi[i][k] = y[k];
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int k0 = 1; k0 < J; k0++) begin
      fork
        automatic int me = k0;
        begin
          automatic vec_t col;         // psi[me][k], k = 0..J, held by AU-me as column owner
          foreach (col[k]) col[k] = 0.0;
          while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
          // column owners start the first row step: {d2 psi, psi} into FIFO-(me,k)
          for (int k = 1; k < J; k++) begin
            put_real(me, au_col(k), d2(col[k-1], col[k], col[k+1]));
            put_real(me, au_col(k), col[k]);
          end
          for (int r = 0; r < P; r++) begin
            automatic vec_t d, x, y;
            au_half_step_end(me);
            // row step: AU-me solves along i for row j = me
            d[0] = 0.0; d[J] = 0.0;
            for (int i = 1; i < J; i++) begin
              automatic real dd, pv;
              get_real(me, au_row(i), dd);
              get_real(me, au_row(i), pv);
              d[i] = pv + C * dd + SG * zeta[i][me];
            end
            x = line_solve(d);
            for (int i = 1; i < J; i++) begin
              put_real(me, au_row(i), d[i]);       // B
              put_real(me, au_row(i), x[i]);       // psi(r+1/2)
            end
            au_half_step_end(me);
            // column step: AU-me solves along k for column i = me
            d[0] = 0.0; d[J] = 0.0;
            for (int k = 1; k < J; k++) begin
              automatic real bv, hv;
              get_real(me, au_col(k), bv);
              get_real(me, au_col(k), hv);
              d[k] = 2.0 * hv - bv + SG * zeta[me][k];
            end
            y = line_solve(d);
            col = y;
            for (int k = 1; k < J; k++) begin
              if (r < P - 1) put_real(me, au_col(k), d2(col[k-1], col[k], col[k+1]));
              put_real(me, au_col(k), col[k]);
            end
          end
          @(negedge clk);
          au_p0_out[me][AU_P0_END] = 1'b1;
        end
      join_none
    end

    // MU: start, run the 2P half-step barriers, wait for the last end, collect
    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int h = 0; h <= 2 * P; h++) begin
      for (int k = 1; k < J; k++) begin
        @(negedge clk);
        mu_p0_out = 8'(k);
        #4;
        while (!mu_p0_end) begin @(negedge clk); #4; end
      end
      if (h < 2 * P) begin
        @(negedge clk);
        mu_p0_out = 8'h30;               // broadcast stop: clear end flags
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h00;
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h60;               // broadcast start: next half step
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h00;
      end
    end
    begin
      real got [J+1][J+1];
      got = zero;
      for (int i = 1; i < J; i++)
        for (int k = 1; k < J; k++) begin
          get_real(-1, {4'(i), 4'(k)}, got[i][k]);
          check($realtobits(got[i][k]) == $realtobits(ref_psi[i][k]), $sformatf("psi[%0d][%0d]", i, k));
        end
      $display("residual %g before, %g after %0d iterations", res0, residual(got), P);
      check(residual(got) < 0.25 * res0, "ADI iterations reduce the residual");
    end
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

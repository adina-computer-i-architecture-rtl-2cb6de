// tb_navier_stokes: two time steps of the ADI scheme for the Navier-Stokes equation of a
// lid-driven cavity (vorticity zeta, stream function psi, Delta psi = -zeta), run on the ADINA-I
// interconnect at full size with 14 AUs on a 16 x 16 mesh (J = 15, h = 1/15), P = 5 inner
// iterations for psi per time step.
//
// Per time step, with a = tau/(2 R h^2), b = tau/(8 h^2), c = sigma/h^2:
//   (1) row j:    zeta' - a Delta1 zeta' + b delta2 psi delta1 zeta' = A,
//                 A = zeta + a Delta2 zeta + b delta1 psi delta2 zeta
//   (2) column j: zeta'' - a Delta2 zeta'' - b delta1 psi delta2 zeta'' = 2 zeta' - A
//   (3) row j:    psi' - c Delta1 psi' = B,  B = psi + c Delta2 psi + sigma zeta''
//   (4) column j: psi'' - c Delta2 psi'' = 2 psi' - B + sigma zeta''
// with the wall vorticity -2 psi(next to the wall) / h^2 (and -2U/h more on the moving lid).
// The source term of (4) follows the Peaceman-Rachford form, so that the inner iteration
// solves the Poisson equation.
//
// AU-j owns mesh row j and mesh column j and solves each tri-diagonal system by forward
// elimination and back substitution. The data flow is the original program's:
//   i, ii)  AU-j reads {zeta, Delta2 zeta, delta2 zeta, delta2 psi, psi} from FIFO-(i,j) on
//           its row side, solves (1) and puts {zeta', b delta1 psi, A} back into FIFO-(i,j);
//   iii)    AU-j reads those triples from FIFO-(j,k) on its column side, solves (2) and puts
//           {zeta'', Delta2 psi} into FIFO-(j,k);
//   iv)     AU-j reads them on its row side, solves (3), puts {B, psi'} into FIFO-(i,j);
//   v)      AU-j reads them on its column side, solves (4) and puts {Delta2 psi, psi} into
//           FIFO-(j,k), or after the last inner iteration the five-number set for the next time
//           step;
//   vi)     as iv) with {Delta2 psi, psi}; v) and vi) alternate P times.
// At most 5 numbers sit in one FIFO at a time. A half step starts only when the previous one
// has ended everywhere (AU end flags polled by the MU, then broadcast stop and start). At the
// end the MU reads the five-number sets out of every FIFO.
//
// Numbers are 64-bit reals sent as two 32-bit words (5 numbers = 40 bytes). Both zeta and psi
// must equal the same computation done serially, bit for bit; the lid must drive a flow, and
// the inner iteration must reduce the Poisson residual.
module tb_navier_stokes;
  import adina_pkg::*;
  localparam int WATCHDOG = 2000000;
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
  localparam int T = 2;                // time steps
  localparam int P = 5;                // inner psi iterations per time step
  localparam real H = 1.0 / J;
  localparam real TAU = 0.01;
  localparam real RE = 100.0;
  localparam real U = 1.0;
  localparam real A2 = TAU / (2.0 * RE * H * H);   // tau / (2 R h^2)
  localparam real B8 = TAU / (8.0 * H * H);        // tau / (8 h^2)
  localparam real C = 2.405;                       // sigma / h^2
  localparam real SG = C * H * H;                  // sigma

  typedef real vec_t [J+1];
  typedef real grid_t [J+1][J+1];

  // ---- line operations; the AUs and the serial reference both use exactly these ----
  function automatic vec_t sdiff2(input vec_t v);  // second difference, 0 at the ends
    vec_t r;
    r[0] = 0.0; r[J] = 0.0;
    for (int n = 1; n < J; n++) r[n] = v[n+1] - 2.0 * v[n] + v[n-1];
    return r;
  endfunction
  function automatic vec_t cdiff(input vec_t v);   // central difference, 0 at the ends
    vec_t r;
    r[0] = 0.0; r[J] = 0.0;
    for (int n = 1; n < J; n++) r[n] = v[n+1] - v[n-1];
    return r;
  endfunction

  // lo x[n-1] + di x[n] + up x[n+1] = d[n], n = 1..J-1, x[0] and x[J] given
  function automatic vec_t tri_solve(input vec_t lo, input vec_t di, input vec_t up, input vec_t d,
                                     input real x0, input real xj);
    vec_t x, cp, dp;
    x[0] = x0; x[J] = xj;
    for (int n = 1; n < J; n++) begin
      automatic real rhs = d[n];
      automatic real m = di[n];
      if (n == 1) rhs = rhs - lo[n] * x0;
      if (n == J - 1) rhs = rhs - up[n] * xj;
      if (n > 1) begin
        m = m - lo[n] * cp[n-1];
        rhs = rhs - lo[n] * dp[n-1];
      end
      cp[n] = up[n] / m;
      dp[n] = rhs / m;
    end
    x[J-1] = dp[J-1];
    for (int n = J - 2; n >= 1; n--) x[n] = dp[n] - cp[n] * x[n+1];
    return x;
  endfunction

  // equation (1) on one mesh row: z, d2z, dz2, dp2 = zeta, Delta2 zeta, delta2 zeta, delta2 psi
  // along the row; p = psi along the row. Returns zeta(n+1/2); A and b delta1 psi by reference.
  function automatic vec_t zeta_row(input vec_t z, input vec_t d2z, input vec_t dz2,
                                    input vec_t dp2, input vec_t p, output vec_t a, output vec_t bdp1);
    vec_t lo, di, up, dp1;
    dp1 = cdiff(p);
    foreach (a[n]) begin
      a[n] = z[n] + A2 * d2z[n] + B8 * dp1[n] * dz2[n];
      bdp1[n] = B8 * dp1[n];
      lo[n] = -A2 - B8 * dp2[n];
      di[n] = 1.0 + 2.0 * A2;
      up[n] = -A2 + B8 * dp2[n];
    end
    return tri_solve(lo, di, up, a, -2.0 / (H * H) * p[1], -2.0 / (H * H) * p[J-1]);
  endfunction

  // equation (2) on one mesh column: zh = zeta(n+1/2), bdp1 = b delta1 psi, a = A, p = psi
  function automatic vec_t zeta_col(input vec_t zh, input vec_t bdp1, input vec_t a, input vec_t p);
    vec_t lo, di, up, d;
    foreach (d[n]) begin
      d[n] = 2.0 * zh[n] - a[n];
      lo[n] = -A2 + bdp1[n];
      di[n] = 1.0 + 2.0 * A2;
      up[n] = -A2 - bdp1[n];
    end
    return tri_solve(lo, di, up, d, -2.0 / (H * H) * p[1], -2.0 / (H * H) * p[J-1] - 2.0 / H * U);
  endfunction

  // equation (3) on one mesh row: p = psi(r), d2p = Delta2 psi(r), z = zeta(n+1); B by reference
  function automatic vec_t psi_row(input vec_t p, input vec_t d2p, input vec_t z, output vec_t b);
    vec_t lo, di, up;
    foreach (b[n]) begin
      b[n] = p[n] + C * d2p[n] + SG * z[n];
      lo[n] = -C; di[n] = 1.0 + 2.0 * C; up[n] = -C;
    end
    return tri_solve(lo, di, up, b, 0.0, 0.0);
  endfunction

  // equation (4) on one mesh column: ph = psi(r+1/2), b = B, z = zeta(n+1)
  function automatic vec_t psi_col(input vec_t ph, input vec_t b, input vec_t z);
    vec_t lo, di, up, d;
    foreach (d[n]) begin
      d[n] = 2.0 * ph[n] - b[n] + SG * z[n];
      lo[n] = -C; di[n] = 1.0 + 2.0 * C; up[n] = -C;
    end
    return tri_solve(lo, di, up, d, 0.0, 0.0);
  endfunction

  // column-side boundary values of zeta(n+1) for column j, from psi(n) of that column
  function automatic vec_t with_col_boundary(input vec_t z, input vec_t p);
    vec_t r = z;
    r[0] = -2.0 / (H * H) * p[1];
    r[J] = -2.0 / (H * H) * p[J-1] - 2.0 / H * U;
    return r;
  endfunction

  function automatic real poisson_residual(input grid_t p, input grid_t z);
    real m = 0.0;
    for (int i = 1; i < J; i++)
      for (int j = 1; j < J; j++) begin
        automatic real e = (p[i+1][j] + p[i-1][j] + p[i][j+1] + p[i][j-1] - 4.0 * p[i][j]) / (H * H) + z[i][j];
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

  task automatic au_half_step_end(input int me);
    @(negedge clk);
    au_p0_out[me][AU_P0_END] = 1'b1;
    while (!au_p0_in[me][AU_P0_STOP]) @(negedge clk);
    au_p0_out[me][AU_P0_END] = 1'b0;
    while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
  endtask

  // the five numbers a column owner hands to a row owner at the start of a time step
  task automatic put_set5(input int me, input int k, input vec_t z, input vec_t p);
    vec_t d2z = sdiff2(z), dz2 = cdiff(z), dp2 = cdiff(p);
    put_real(me, au_col(k), z[k]);
    put_real(me, au_col(k), d2z[k]);
    put_real(me, au_col(k), dz2[k]);
    put_real(me, au_col(k), dp2[k]);
    put_real(me, au_col(k), p[k]);
  endtask

  grid_t zeta_ref, psi_ref;
  real res_before, res_after;

  function automatic vec_t row_of(input grid_t g, input int j);   // g[.][j]
    vec_t r;
    foreach (r[i]) r[i] = g[i][j];
    return r;
  endfunction

  initial begin
    grid_t zero;
    foreach (zero[i, j]) zero[i][j] = 0.0;
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0; end

    // ---- serial reference ----
    zeta_ref = zero; psi_ref = zero;
    for (int t = 0; t < T; t++) begin
      grid_t zh, bd, aa, znew, bb, ph;
      grid_t d2z_c, dz2_c, dp2_c;
      zh = zero; bd = zero; aa = zero; znew = zero; bb = zero; ph = zero;
      // column-side differences (what column owners send)
      for (int i = 0; i <= J; i++) begin
        d2z_c[i] = sdiff2(zeta_ref[i]); dz2_c[i] = cdiff(zeta_ref[i]); dp2_c[i] = cdiff(psi_ref[i]);
      end
      for (int j = 1; j < J; j++) begin
        automatic vec_t a, b1, x;
        x = zeta_row(row_of(zeta_ref, j), row_of(d2z_c, j), row_of(dz2_c, j), row_of(dp2_c, j),
                     row_of(psi_ref, j), a, b1);
        for (int i = 1; i < J; i++) begin zh[i][j] = x[i]; aa[i][j] = a[i]; bd[i][j] = b1[i]; end
      end
      for (int i = 1; i < J; i++)
        znew[i] = with_col_boundary(zeta_col(zh[i], bd[i], aa[i], psi_ref[i]), psi_ref[i]);
      if (t == T - 1) res_before = poisson_residual(psi_ref, znew);
      for (int r = 0; r < P; r++) begin
        grid_t d2p_c;
        for (int i = 0; i <= J; i++) d2p_c[i] = sdiff2(psi_ref[i]);
        for (int j = 1; j < J; j++) begin
          automatic vec_t b, x;
          x = psi_row(row_of(psi_ref, j), row_of(d2p_c, j), row_of(znew, j), b);
          for (int i = 1; i < J; i++) begin ph[i][j] = x[i]; bb[i][j] = b[i]; end
        end
        for (int i = 1; i < J; i++) psi_ref[i] = psi_col(ph[i], bb[i], znew[i]);
      end
      zeta_ref = znew;
    end
    res_after = poisson_residual(psi_ref, zeta_ref);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int k0 = 1; k0 < J; k0++) begin
      fork
        automatic int me = k0;
        begin
          automatic vec_t zc, pc;        // column me: zeta[me][.], psi[me][.]
          automatic vec_t zr, pr;        // row me: zeta[.][me] (n+1 after step iv), psi[.][me]
          automatic vec_t zh, bd, aa, bb, ph;
          foreach (zc[k]) begin zc[k] = 0.0; pc[k] = 0.0; end
          while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
          for (int k = 1; k < J; k++) put_set5(me, k, zc, pc);
          for (int t = 0; t < T; t++) begin
            automatic vec_t d2z, dz2, dp2, zn;
            // i), ii) row step: receive the five-number sets, solve (1), send the triples
            au_half_step_end(me);
            foreach (zr[i]) begin zr[i] = 0.0; pr[i] = 0.0; d2z[i] = 0.0; dz2[i] = 0.0; dp2[i] = 0.0; end
            for (int i = 1; i < J; i++) begin
              get_real(me, au_row(i), zr[i]);
              get_real(me, au_row(i), d2z[i]);
              get_real(me, au_row(i), dz2[i]);
              get_real(me, au_row(i), dp2[i]);
              get_real(me, au_row(i), pr[i]);
            end
            zh = zeta_row(zr, d2z, dz2, dp2, pr, aa, bd);
            for (int i = 1; i < J; i++) begin
              put_real(me, au_row(i), zh[i]);
              put_real(me, au_row(i), bd[i]);
              put_real(me, au_row(i), aa[i]);
            end
            // iii) column step: receive the triples, solve (2), send {zeta(n+1), Delta2 psi(n)}
            au_half_step_end(me);
            foreach (zh[k]) begin zh[k] = 0.0; bd[k] = 0.0; aa[k] = 0.0; end
            for (int k = 1; k < J; k++) begin
              get_real(me, au_col(k), zh[k]);
              get_real(me, au_col(k), bd[k]);
              get_real(me, au_col(k), aa[k]);
            end
            zn = with_col_boundary(zeta_col(zh, bd, aa, pc), pc);
            zc = zn;
            begin
              automatic vec_t d2p = sdiff2(pc);
              for (int k = 1; k < J; k++) begin
                put_real(me, au_col(k), zc[k]);
                put_real(me, au_col(k), d2p[k]);
              end
            end
            for (int r = 0; r < P; r++) begin
              automatic vec_t d2p;
              // iv), vi) row step: receive {zeta(n+1), Delta2 psi} or {Delta2 psi, psi}, solve (3)
              au_half_step_end(me);
              foreach (d2p[i]) d2p[i] = 0.0;
              for (int i = 1; i < J; i++) begin
                if (r == 0) begin
                  get_real(me, au_row(i), zr[i]);
                  get_real(me, au_row(i), d2p[i]);
                end else begin
                  get_real(me, au_row(i), d2p[i]);
                  get_real(me, au_row(i), pr[i]);
                end
              end
              ph = psi_row(pr, d2p, zr, bb);
              for (int i = 1; i < J; i++) begin
                put_real(me, au_row(i), bb[i]);
                put_real(me, au_row(i), ph[i]);
              end
              // v) column step: receive {B, psi(r+1/2)}, solve (4), send to the row owners
              au_half_step_end(me);
              foreach (ph[k]) begin ph[k] = 0.0; bb[k] = 0.0; end
              for (int k = 1; k < J; k++) begin
                get_real(me, au_col(k), bb[k]);
                get_real(me, au_col(k), ph[k]);
              end
              pc = psi_col(ph, bb, zc);
              if (r < P - 1) begin
                automatic vec_t d2pc = sdiff2(pc);
                for (int k = 1; k < J; k++) begin
                  put_real(me, au_col(k), d2pc[k]);
                  put_real(me, au_col(k), pc[k]);
                end
              end else begin
                for (int k = 1; k < J; k++) put_set5(me, k, zc, pc);
              end
            end
          end
          @(negedge clk);
          au_p0_out[me][AU_P0_END] = 1'b1;
        end
      join_none
    end

    // MU: start, run the half-step barriers, wait for the last end, collect
    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int h = 0; h <= T * (2 + 2 * P); h++) begin
      for (int k = 1; k < J; k++) begin
        @(negedge clk);
        mu_p0_out = 8'(k);
        #4;
        while (!mu_p0_end) begin @(negedge clk); #4; end
      end
      if (h < T * (2 + 2 * P)) begin
        @(negedge clk);
        mu_p0_out = 8'h30;
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h00;
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h60;
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h00;
      end
    end
    begin
      real zmax = 0.0, pmax = 0.0;
      for (int i = 1; i < J; i++)
        for (int k = 1; k < J; k++) begin
          real z, d2z, dz2, dp2, p;
          get_real(-1, {4'(i), 4'(k)}, z);
          get_real(-1, {4'(i), 4'(k)}, d2z);
          get_real(-1, {4'(i), 4'(k)}, dz2);
          get_real(-1, {4'(i), 4'(k)}, dp2);
          get_real(-1, {4'(i), 4'(k)}, p);
          check($realtobits(z) == $realtobits(zeta_ref[i][k]), $sformatf("zeta[%0d][%0d]", i, k));
          check($realtobits(p) == $realtobits(psi_ref[i][k]), $sformatf("psi[%0d][%0d]", i, k));
          if ((z < 0.0 ? -z : z) > zmax) zmax = (z < 0.0 ? -z : z);
          if ((p < 0.0 ? -p : p) > pmax) pmax = (p < 0.0 ? -p : p);
        end
      $display("max |zeta| %g, max |psi| %g; Poisson residual %g before, %g after the inner iteration",
               zmax, pmax, res_before, res_after);
      check(zmax > 0.0 && pmax > 0.0, "the lid drives a flow");
      check(res_after < 0.5 * res_before, "inner iteration reduces the Poisson residual");
    end
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

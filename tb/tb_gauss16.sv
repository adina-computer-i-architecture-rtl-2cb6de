// tb_gauss16: Gauss elimination for 16 unknowns run on the ADINA-I interconnect at full size.
//
// AU-j owns equation j. The MU sends row a_j and b_j to AU-j through FIFO-(j,j) and starts all
// AUs. Forward elimination: when AU-s has eliminated x_0..x_(s-1) from its own equation, it
// sends its normalised coefficients (a_sk/a_ss for k > s, then b_s/a_ss) to every AU-j, j > s,
// through FIFO-(j,s); each such AU eliminates x_s as soon as they arrive. Back substitution:
// AU-F finds x_F and sends it to AU-E, AU-D, ..., AU-0 in that order through FIFO-(i,F); each AU
// substitutes every x_k as soon as it arrives, so AU-(j-1) can find x_(j-1) at once, and each
// AU also gives its x_j to the MU through FIFO-(j,j). No global synchronisation is used: every
// step waits only on FIFO ready flags.
//
// The arithmetic is exact integer arithmetic modulo the prime 65521 in place of floating point,
// and the matrix is built as L U so no pivoting is needed. The MU checks every x_j against the
// solution the right-hand side was made from.
module tb_gauss16;
  import adina_pkg::*;
  localparam int WATCHDOG = 200000;
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

  localparam int M = 16;               // unknowns, one per AU
  localparam longint PR = 65521;       // arithmetic modulo this prime

  function automatic longint md(input longint a);
    longint r = a % PR;
    return (r < 0) ? r + PR : r;
  endfunction

  function automatic longint inv(input longint a);   // a^(PR-2) mod PR
    longint r = 1, b = md(a), e = PR - 2;
    while (e > 0) begin
      if (e[0]) r = md(r * b);
      b = md(b * b);
      e = e >> 1;
    end
    return r;
  endfunction

  longint A [M][M], bvec [M], xsol [M];
  int got_x = 0;

  initial begin
    longint L [M][M], U [M][M];
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0; end
    // A = L U with unit lower L and upper U with a non-zero diagonal: no pivoting is needed,
    // as in the original example
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        L[i][j] = (i == j) ? 1 : (j < i) ? longint'($urandom_range(0, 65520)) : 0;
        U[i][j] = (i == j) ? longint'($urandom_range(1, 65520)) :
                  (j > i) ? longint'($urandom_range(0, 65520)) : 0;
      end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        A[i][j] = 0;
        for (int k = 0; k < M; k++) A[i][j] = md(A[i][j] + L[i][k] * U[k][j]);
      end
    for (int i = 0; i < M; i++) xsol[i] = $urandom_range(0, 65520);
    for (int i = 0; i < M; i++) begin
      bvec[i] = 0;
      for (int k = 0; k < M; k++) bvec[i] = md(bvec[i] + A[i][k] * xsol[k]);
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int j0 = 0; j0 < M; j0++) begin
      fork
        automatic int j = j0;
        begin
          automatic longint a [M];
          automatic longint b;
          automatic logic [31:0] w;
          // receive the row a_j and b_j from the MU through FIFO-(j,j)
          for (int k = 0; k < M; k++) begin get_word(j, au_row(j), w); a[k] = longint'(w); end
          get_word(j, au_row(j), w); b = longint'(w);
          while (!au_p0_in[j][AU_P0_START]) @(negedge clk);
          // forward elimination: for every s < j, take the coefficients of AU-s from
          // FIFO-(j,s) and eliminate x_s
          for (int s = 0; s < j; s++) begin
            automatic longint c [M];
            automatic longint cb, f;
            for (int k = s + 1; k < M; k++) begin get_word(j, au_col(s), w); c[k] = longint'(w); end
            get_word(j, au_col(s), w); cb = longint'(w);
            f = a[s];
            a[s] = 0;
            for (int k = s + 1; k < M; k++) a[k] = md(a[k] - f * c[k]);
            b = md(b - f * cb);
          end
          // now AU-j's equation starts at x_j: send its normalised coefficients to every
          // AU-i, i > j, through FIFO-(i,j)
          begin
            automatic longint ia = inv(a[j]);
            for (int i = j + 1; i < M; i++) begin
              for (int k = j + 1; k < M; k++) put_word(j, au_row(i), 32'(md(a[k] * ia)));
              put_word(j, au_row(i), 32'(md(b * ia)));
            end
          end
          // back substitution: receive x_k from AU-k through FIFO-(j,k), k = F down to j+1,
          // substituting each at once
          for (int k = M - 1; k > j; k--) begin
            get_word(j, au_col(k), w);
            b = md(b - a[k] * longint'(w));
          end
          b = md(b * inv(a[j]));
          // x_j: to every AU-i, i < j, in decreasing order, through FIFO-(i,j), and to the MU
          for (int i = j - 1; i >= 0; i--) put_word(j, au_row(i), 32'(b));
          put_word(j, au_row(j), 32'(b));
          au_p0_out[j][AU_P0_END] = 1'b1;
        end
      join_none
    end

    // MU: rows and right-hand sides to the AUs, start them, collect x
    for (int j = 0; j < M; j++) begin
      for (int k = 0; k < M; k++) put_word(-1, {4'(j), 4'(j)}, 32'(A[j][k]));
      put_word(-1, {4'(j), 4'(j)}, 32'(bvec[j]));
    end
    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int j = M - 1; j >= 0; j--) begin
      logic [31:0] w;
      @(negedge clk);
      mu_p0_out = 8'(j);
      #4;
      while (!mu_p0_end) begin @(negedge clk); #4; end
      get_word(-1, {4'(j), 4'(j)}, w);
      check(longint'(w) == xsol[j], $sformatf("x_%0d", j));
    end
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

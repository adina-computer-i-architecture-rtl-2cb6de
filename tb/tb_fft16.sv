// tb_fft16: a 16-point FFT run on the ADINA-I interconnect at its full size.
//
// Each of the 16 AUs (testbench processes) holds one point x(k). In stage l = 1..4, AU-k and
// AU-k' = k + 16/2^l pair up (k has bit 4-l clear). AU-k' sends x(k') to AU-k through
// FIFO-(k,k') while AU-k sends x(k) to AU-k' through FIFO-(k',k); AU-k' then forms
// TR = Re x(k') C + Im x(k') S and sends it over, AU-k forms TI = Im x(k') C - Re x(k') S and
// sends it back; AU-k keeps x(k) + (TR, TI), AU-k' keeps x(k) - (TR, TI). C and S are
// cos(2 pi p/16) and sin(2 pi p/16) from a table (p is the bit-reversed index of the
// document's formula). AUs run the four stages without any global synchronisation, each
// DMA just waiting on FIFO ready flags. Finally AU-k puts its point into FIFO-(k,k) and the
// MU collects X(n) = x4(bit-reversed n).
//
// Fixed point: data are 32-bit integers, C and S are scaled by 2^14, products shifted back.
// Checks: every X(n) equals the same fixed-point algorithm run serially here (exact), and the
// real-valued DFT within a small rounding tolerance.
module tb_fft16;
  import adina_pkg::*;
  localparam int unsigned N = 16;
  localparam int GAMMA = 4;

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
  int done = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // send 32-bit words, low byte first, through the FIFO selected by p1
  task automatic put_words(input int p, input logic [7:0] p1, input logic [31:0] w [$]);
    port_req_t r;
    int k = 0;
    @(negedge clk);
    if (p < 0) mu_p1 = p1; else au_p1[p] = p1;
    r = PORT_REQ_IDLE; r.en = 1'b1; r.wr = 1'b1;
    while (k < 4 * w.size()) begin
      automatic port_rsp_t s;
      r.stb = 1'b1; r.wdata = w[k / 4][8 * (k % 4) +: 8];
      set_req(p, r);
      #4;
      s = rsp_of(p);
      if (s.gnt && s.rdy) k++;
      @(negedge clk);
    end
    set_req(p, PORT_REQ_IDLE);
  endtask

  task automatic get_words(input int p, input logic [7:0] p1, input int n,
                           output logic [31:0] w [$]);
    port_req_t r;
    logic [7:0] bytes [$];
    bytes = {};
    @(negedge clk);
    if (p < 0) mu_p1 = p1; else au_p1[p] = p1;
    r = PORT_REQ_IDLE; r.en = 1'b1; r.wr = 1'b0;
    while (bytes.size() < 4 * n) begin
      automatic port_rsp_t s;
      r.stb = 1'b1;
      set_req(p, r);
      #4;
      s = rsp_of(p);
      if (s.gnt && s.rdy) bytes.push_back(s.rdata);
      @(negedge clk);
    end
    set_req(p, PORT_REQ_IDLE);
    w = {};
    for (int i = 0; i < n; i++) w.push_back({bytes[4*i+3], bytes[4*i+2], bytes[4*i+1], bytes[4*i]});
  endtask

  function automatic logic [7:0] au_row(input int i);   // FIFO-(i, self)
    return {4'b0000, 4'(i)};
  endfunction
  function automatic logic [7:0] au_col(input int k);   // FIFO-(self, k)
    return {4'b0001, 4'(k)};
  endfunction

  function automatic int bitrev(input int v);
    int r = 0;
    for (int b = 0; b < GAMMA; b++) if (v[b]) r |= 1 << (GAMMA - 1 - b);
    return r;
  endfunction

  function automatic int twiddle_p(input int k, input int l);
    return bitrev(k >> (GAMMA - l));
  endfunction

  int ctab [N], stab [N];
  int x0r [N], x0i [N];

  function automatic int fx(input longint a);   // scale back a product by 2^14
    return int'(a >>> 14);
  endfunction

  initial begin
    int sr [N], si [N];
    logic [31:0] res [$];
    for (int p = 0; p < N; p++) begin
      ctab[p] = int'($rtoi($cos(2.0 * 3.14159265358979 * p / N) * 16384.0 + ($cos(2.0 * 3.14159265358979 * p / N) >= 0 ? 0.5 : -0.5)));
      stab[p] = int'($rtoi($sin(2.0 * 3.14159265358979 * p / N) * 16384.0 + ($sin(2.0 * 3.14159265358979 * p / N) >= 0 ? 0.5 : -0.5)));
    end
    for (int k = 0; k < N; k++) begin
      x0r[k] = $urandom_range(0, 2000) - 1000;
      x0i[k] = $urandom_range(0, 2000) - 1000;
      au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0;
    end
    // the same fixed-point algorithm, serially
    sr = x0r; si = x0i;
    for (int l = 1; l <= GAMMA; l++) begin
      automatic int d = N >> l;
      for (int k = 0; k < N; k++) begin
        if ((k & d) == 0) begin
          automatic int kp = k + d, p = twiddle_p(k, l), tr, ti;
          tr = fx(longint'(sr[kp]) * ctab[p] + longint'(si[kp]) * stab[p]);
          ti = fx(longint'(si[kp]) * ctab[p] - longint'(sr[kp]) * stab[p]);
          sr[kp] = sr[k] - tr; si[kp] = si[k] - ti;
          sr[k]  = sr[k] + tr; si[k]  = si[k] + ti;
        end
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // the AUs
    for (int k0 = 0; k0 < N; k0++) begin
      fork
        automatic int me = k0;
        begin
          automatic int xr = x0r[me], xi = x0i[me];
          automatic logic [31:0] w [$];
          while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
          for (int l = 1; l <= GAMMA; l++) begin
            automatic int d = N >> l;
            automatic bit upper = (me & d) != 0;
            automatic int partner = upper ? me - d : me + d;
            automatic int k = upper ? partner : me;
            automatic int p = twiddle_p(k, l);
            automatic int pr, pi, tr, ti;
            // exchange points: write on my row to FIFO-(partner, me), read my column FIFO-(me, partner)
            put_words(me, au_row(partner), {32'(xr), 32'(xi)});
            get_words(me, au_col(partner), 2, w);
            pr = int'(w[0]); pi = int'(w[1]);
            if (upper) begin
              tr = fx(longint'(xr) * ctab[p] + longint'(xi) * stab[p]);
              put_words(me, au_row(partner), {32'(tr)});
              get_words(me, au_col(partner), 1, w);
              ti = int'(w[0]);
              xr = pr - tr; xi = pi - ti;
            end else begin
              ti = fx(longint'(pi) * ctab[p] - longint'(pr) * stab[p]);
              put_words(me, au_row(partner), {32'(ti)});
              get_words(me, au_col(partner), 1, w);
              tr = int'(w[0]);
              xr = xr + tr; xi = xi + ti;
            end
          end
          put_words(me, au_row(me), {32'(xr), 32'(xi)});
          au_p0_out[me][AU_P0_END] = 1'b1;
          done++;
        end
      join_none
    end

    // MU: broadcast start, then collect X(n) = x4(bitrev(n)) when each AU has finished
    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      mu_p0_out = 8'(k);
      #4;
      while (!mu_p0_end) begin @(negedge clk); #4; end
      get_words(-1, {4'(k), 4'(k)}, 2, res);
      check(int'(res[0]) == sr[k] && int'(res[1]) == si[k], $sformatf("x4(%0d) equals the serial result", k));
      begin
        automatic int n = bitrev(k);
        automatic real er = 0.0, ei = 0.0, dr, di;
        automatic int gr = int'(res[0]), gi = int'(res[1]);
        for (int t = 0; t < N; t++) begin
          er += x0r[t] * $cos(2.0 * 3.14159265358979 * t * n / N) + x0i[t] * $sin(2.0 * 3.14159265358979 * t * n / N);
          ei += x0i[t] * $cos(2.0 * 3.14159265358979 * t * n / N) - x0r[t] * $sin(2.0 * 3.14159265358979 * t * n / N);
        end
        dr = real'(gr) - er;
        di = real'(gi) - ei;
        check(dr < 8.0 && dr > -8.0 && di < 8.0 && di > -8.0, $sformatf("X(%0d) against the DFT", n));
      end
    end
    check(done == N, "all AUs finished");
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

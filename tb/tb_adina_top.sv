// tb_adina_top: end-to-end test of the ADINA-I interconnect at its full size (16 AUs, 16 x 16
// FIFOs of 64 bytes), with the MU and the AUs played by processes of the testbench.
//
// Each processor is modelled as its DMA would use the array: latch a FIFO selection on P1,
// raise en with the direction, move bytes while rdy is high (a slow DMA leaves gaps between
// bytes), drop en. Words are 32 bits sent low byte first. Three parallel programs are run:
//
//  1. Matrix product C = A B of two 16 x 16 matrices. The MU sends row a_j to AU-j through
//     FIFO-(j,j), then column b_k to every FIFO-(k,i). AU-j receives a_j while the MU is still
//     sending (slowly, so the MU runs into a full FIFO-(k,k) and waits). The MU starts every AU
//     with a broadcast start; AU-j reads b_k from FIFO-(k,j) for all k, forms c_jk, writes its row
//     of C into FIFO-(j,j), raises end of calculation and an interrupt request. The MU starts
//     the AUs one by one with addressed starts after filling the array. The MU polls
//     each AU's end flag on P0[7], reads the row once with the loop bus (keeping it) and once
//     more to empty the FIFO, and compares both with C computed here.
//  2. One elimination step as in Gauss elimination: AU-0 sends its pivot row to every AU-j
//     through FIFO-(j,0) while the MU sends b_j through the same FIFO, so the two contend
//     for its entrance; AU-j must receive both messages whole.
//  3. The first FFT stage for 16 points, where the twiddle factor is 1: AU-k and AU-k' = k+8
//     exchange their points through FIFO-(k,k') and FIFO-(k',k) at the same time, then exchange
//     TR and TI, and form x(k)+x(k') and x(k)-x(k'). All AUs get one broadcast start here.
//  Finally the MU broadcasts stop and checks that every end flag has dropped.
//
// A monitor counts each mechanism of the design: a side found engaged by another processor
// (wait), a write held by a full FIFO, a read held by an empty FIFO, a loop-bus byte, addressed
// and broadcast start, broadcast stop, an end flag seen by the MU, an interrupt request, and
// pairs exchanging at once. Any of them that never happens counts as a failure. Byte transfer
// rate is checked too: one clock to engage, then one byte per clock.
module tb_adina_top;
  import adina_pkg::*;
  localparam int unsigned N = 16;
  localparam int unsigned SLOW_GAP = 24;   // clocks between bytes of a slow AU DMA

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
    repeat (60000) @(posedge clk);
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

  // ---------------------------------------------------------------- port drivers (p < 0: MU)
  function automatic port_rsp_t rsp_of(input int p);
    return (p < 0) ? mu_rsp : au_rsp[p];
  endfunction

  task automatic set_req(input int p, input port_req_t r);
    if (p < 0) mu_req = r; else au_req[p] = r;
  endtask

  task automatic put(input int p, input logic [7:0] p1, input logic [7:0] data [$],
                     input int gap, output int clocks);
    port_req_t r;
    int k = 0;
    clocks = 0;
    @(negedge clk);
    if (p < 0) mu_p1 = p1; else au_p1[p] = p1;
    r = PORT_REQ_IDLE; r.en = 1'b1; r.wr = 1'b1;
    while (k < data.size()) begin
      automatic port_rsp_t s;
      r.stb = 1'b1; r.wdata = data[k];
      set_req(p, r);
      #4;
      s = rsp_of(p);
      clocks++;
      if (s.gnt && s.rdy) begin
        k++;
        if (gap > 0 && k < data.size()) begin
          @(negedge clk);
          r.stb = 1'b0; set_req(p, r);
          repeat (gap - 1) @(negedge clk);
          clocks += gap;
          continue;
        end
      end
      @(negedge clk);
    end
    set_req(p, PORT_REQ_IDLE);
  endtask

  task automatic get(input int p, input logic [7:0] p1, input int n, input bit lp,
                     input int gap, output logic [7:0] data [$], output int clocks);
    port_req_t r;
    data = {};
    clocks = 0;
    @(negedge clk);
    if (p < 0) mu_p1 = p1; else au_p1[p] = p1;
    r = PORT_REQ_IDLE; r.en = 1'b1; r.wr = 1'b0; r.loop = lp;
    while (data.size() < n) begin
      automatic port_rsp_t s;
      r.stb = 1'b1;
      set_req(p, r);
      #4;
      s = rsp_of(p);
      clocks++;
      if (s.gnt && s.rdy) begin
        data.push_back(s.rdata);
        if (gap > 0 && data.size() < n) begin
          @(negedge clk);
          r.stb = 1'b0; set_req(p, r);
          repeat (gap - 1) @(negedge clk);
          clocks += gap;
          continue;
        end
      end
      @(negedge clk);
    end
    set_req(p, PORT_REQ_IDLE);
  endtask

  function automatic void push_word(ref logic [7:0] q [$], input logic [31:0] w);
    for (int b = 0; b < 4; b++) q.push_back(w[8*b +: 8]);
  endfunction

  function automatic logic [31:0] word_at(input logic [7:0] q [$], input int idx);
    return {q[4*idx+3], q[4*idx+2], q[4*idx+1], q[4*idx]};
  endfunction

  function automatic logic [7:0] mu_sel(input int i, input int j);
    return {4'(i), 4'(j)};
  endfunction
  function automatic logic [7:0] au_row(input int i);   // FIFO-(i, self)
    return {3'b000, 1'b0, 4'(i)};
  endfunction
  function automatic logic [7:0] au_col(input int k);   // FIFO-(self, k)
    return {3'b000, 1'b1, 4'(k)};
  endfunction

  // ---------------------------------------------------------------- mechanism monitor
  int n_wait = 0, n_full = 0, n_empty = 0, n_loop = 0, n_start_one = 0, n_start_all = 0;
  int n_stop_all = 0, n_end_seen = 0, n_irq = 0, n_pair_exchange = 0;
  int wait_run [N+1];

  always begin
    @(negedge clk); #4;
    if (rst_n) begin
      for (int p = -1; p < int'(N); p++) begin
        automatic port_req_t r;
        automatic port_rsp_t s;
        r = (p < 0) ? mu_req : au_req[p];
        s = rsp_of(p);
        if (r.en && !s.gnt) begin
          wait_run[p+1]++;
          if (wait_run[p+1] == 2) n_wait++;   // beyond the one-clock engage
        end else wait_run[p+1] = 0;
        if (r.en && s.gnt && r.stb && !s.rdy) begin
          if (r.wr) n_full++; else n_empty++;
        end
        if (p < 0 && r.en && r.loop && s.gnt && s.rdy && r.stb) n_loop++;
      end
      if (mu_irq) n_irq++;
      // AU-k and AU-k' writing to each other at the same time
      for (int k = 0; k < N/2; k++)
        if (au_req[k].en && au_req[k].wr && au_req[k+N/2].en && au_req[k+N/2].wr &&
            au_p1[k][4:0] == au_row(k + N/2)[4:0] && au_p1[k+N/2][4:0] == au_row(k)[4:0])
          n_pair_exchange++;
    end
  end

  // ---------------------------------------------------------------- data
  logic [31:0] A [N][N], B [N][N], C [N][N];
  logic [31:0] xr [N], xi [N];
  bit started [N];
  int done = 0;    // processes of the current program that have finished

  task automatic wait_done(input int n);
    while (done < n) @(negedge clk);
    done = 0;
  endtask

  task automatic mu_command(input logic [7:0] p0);
    @(negedge clk);
    mu_p0_out = p0;
    #4;
    for (int k = 0; k < N; k++) begin
      if (p0[MU_P0_START] && au_p0_in[k][AU_P0_START]) begin
        if (p0[MU_P0_BCAST]) n_start_all++; else n_start_one++;
      end
    end
    if (p0[MU_P0_STOP] && p0[MU_P0_BCAST] && (au_p0_in[0][AU_P0_STOP])) n_stop_all++;
    @(negedge clk); @(negedge clk);
    mu_p0_out = {4'b0000, p0[3:0]};
  endtask

  // MU polls the end flag of AU-j
  task automatic mu_wait_end(input int j);
    int polls = 0;
    @(negedge clk);
    mu_p0_out = {4'b0000, 4'(j)};
    forever begin
      #4;
      if (mu_p0_end) break;
      polls++;
      @(negedge clk);
    end
    n_end_seen++;
  endtask

  initial begin
    int c;
    logic [7:0] q [$];
    for (int k = 0; k < N; k++) begin
      au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0;
      wait_run[k] = 0;
    end
    wait_run[N] = 0;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        A[j][i] = 32'($urandom_range(0, 1000));
        B[j][i] = 32'($urandom_range(0, 1000));
      end
    for (int j = 0; j < N; j++)
      for (int k = 0; k < N; k++) begin
        C[j][k] = '0;
        for (int i = 0; i < N; i++) C[j][k] += A[j][i] * B[i][k];
      end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // transfer rate: one 64-byte block through an idle FIFO
    q = {};
    for (int b = 0; b < 64; b++) q.push_back(8'(b));
    put(-1, mu_sel(3, 5), q, 0, c);
    check(c == 65, $sformatf("64 bytes in %0d clocks, expected 65", c));
    get(5, au_row(3), 64, 1'b0, 0, q, c);
    check(c == 65 && q[63] == 8'd63, "64 bytes out in 65 clocks");

    // ------------------------------------------------ 1. matrix product
    fork
      // MU: rows of A, then columns of B, then a start for each AU
      begin
        for (int j = 0; j < N; j++) begin
          automatic logic [7:0] d [$];
          automatic int cc;
          d = {};
          for (int i = 0; i < N; i++) push_word(d, A[j][i]);
          put(-1, mu_sel(j, j), d, 0, cc);
        end
        for (int k = 0; k < N; k++) begin
          automatic logic [7:0] d [$];
          d = {};
          for (int i = 0; i < N; i++) push_word(d, B[i][k]);
          for (int i = 0; i < N; i++) begin
            automatic int cc;
            put(-1, mu_sel(k, i), d, 0, cc);
          end
        end
        check(node_not_full == '0, "every FIFO filled up");
        for (int k = 0; k < N; k++) mu_command(8'h40 | 8'(k));   // start AU-k
      end
      // AUs: receive a_j slowly, wait for start, compute, return the row of C
      for (int k = 0; k < N; k++) begin
        fork
          automatic int j = k;
          begin
            automatic logic [7:0] d [$];
            automatic logic [31:0] arow [N], crow [N];
            automatic int cc;
            get(j, au_row(j), 64, 1'b0, SLOW_GAP, d, cc);
            for (int i = 0; i < N; i++) arow[i] = word_at(d, i);
            while (!au_p0_in[j][AU_P0_START]) @(negedge clk);
            for (int kk = 0; kk < N; kk++) begin
              get(j, au_row(kk), 64, 1'b0, 0, d, cc);
              crow[kk] = '0;
              for (int i = 0; i < N; i++) crow[kk] += arow[i] * word_at(d, i);
            end
            d = {};
            for (int kk = 0; kk < N; kk++) push_word(d, crow[kk]);
            put(j, au_row(j), d, 0, cc);
            @(negedge clk);
            au_p0_out[j][AU_P0_END] = 1'b1;
            au_p0_out[j][AU_P0_IRQ] = 1'b1;
            done++;
          end
        join_none
      end
    join
    wait_done(N);
    // MU collects C
    check(mu_irq, "interrupt request from the AUs");
    for (int j = 0; j < N; j++) begin
      automatic logic [7:0] d [$], d2 [$];
      automatic bit ok = 1'b1;
      mu_wait_end(j);
      get(-1, mu_sel(j, j), 64, 1'b1, 0, d, c);    // look with the loop bus
      get(-1, mu_sel(j, j), 64, 1'b0, 0, d2, c);   // then take it
      for (int kk = 0; kk < N; kk++)
        if (word_at(d, kk) != C[j][kk] || word_at(d2, kk) != C[j][kk]) ok = 1'b0;
      check(ok, $sformatf("row %0d of C", j));
      au_p0_out[j][AU_P0_IRQ] = 1'b0;
    end
    check(node_not_empty == '0, "all FIFOs empty after the product");

    // ------------------------------------------------ 2. pivot row and right-hand sides
    fork
      begin   // AU-0: pivot row to every AU-j through FIFO-(j,0), its row
        for (int j = 1; j < N; j++) begin
          automatic logic [7:0] d [$];
          automatic int cc;
          d = {};
          for (int w = 0; w < 4; w++) push_word(d, 32'h5000_0000 + 32'(w));
          put(0, au_row(j), d, 0, cc);
        end
      end
      begin   // MU: b_j through the same FIFO-(j,0)
        for (int j = 1; j < N; j++) begin
          automatic logic [7:0] d [$];
          automatic int cc;
          d = {};
          push_word(d, 32'hB000_0000 + 32'(j));
          put(-1, mu_sel(j, 0), d, 0, cc);
        end
      end
      for (int k = 1; k < N; k++) begin
        fork
          automatic int j = k;
          begin   // AU-j: 5 words from FIFO-(j,0), its column
            automatic logic [7:0] d [$];
            automatic int cc;
            automatic bit ok;
            get(j, au_col(0), 20, 1'b0, 0, d, cc);
            if (word_at(d, 0) == 32'hB000_0000 + 32'(j))
              ok = word_at(d, 1) == 32'h5000_0000 && word_at(d, 4) == 32'h5000_0003;
            else
              ok = word_at(d, 0) == 32'h5000_0000 && word_at(d, 3) == 32'h5000_0003 &&
                   word_at(d, 4) == 32'hB000_0000 + 32'(j);
            check(ok, $sformatf("AU-%0d got pivot row and b_j whole", j));
            done++;
          end
        join_none
      end
    join
    wait_done(N - 1);

    // ------------------------------------------------ 3. first FFT stage, pairs (k, k+8)
    for (int k = 0; k < N; k++) begin
      xr[k] = 32'($urandom_range(0, 5000));
      xi[k] = 32'($urandom_range(0, 5000));
      started[k] = 1'b0;
    end
    for (int k = 0; k < N; k++) begin
      fork
        automatic int me = k;
        automatic int kp = (k < N/2) ? k + N/2 : k - N/2;
        automatic bit upper = (k >= N/2);     // this AU is AU-k'
        begin
          automatic logic [7:0] d [$];
          automatic logic [31:0] pr, pi, tr, ti, outr, outi;
          automatic int cc;
          while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
          started[me] = 1'b1;
          // exchange points: send through FIFO-(kp, me) on my row, receive
          // through FIFO-(me, kp) on my column
          d = {}; push_word(d, xr[me]); push_word(d, xi[me]);
          put(me, au_row(kp), d, 0, cc);
          get(me, au_col(kp), 8, 1'b0, 0, d, cc);
          pr = word_at(d, 0); pi = word_at(d, 1);
          // AU-k' finds TR = Re x(k')*C + Im x(k')*S, AU-k finds TI = Im x(k')*C - Re x(k')*S;
          // with p = 0, C = 1 and S = 0
          d = {};
          if (upper) begin tr = xr[me]; push_word(d, tr); end
          else       begin ti = pi;     push_word(d, ti); end
          put(me, au_row(kp), d, 0, cc);
          get(me, au_col(kp), 4, 1'b0, 0, d, cc);
          if (upper) ti = word_at(d, 0); else tr = word_at(d, 0);
          if (upper) begin outr = pr - tr; outi = pi - ti; end
          else       begin outr = xr[me] + tr; outi = xi[me] + ti; end
          if (upper)
            check(outr == xr[kp] - xr[me] && outi == xi[kp] - xi[me], $sformatf("x1(%0d)", me));
          else
            check(outr == xr[me] + xr[kp] && outi == xi[me] + xi[kp], $sformatf("x1(%0d)", me));
          @(negedge clk);
          au_p0_out[me][AU_P0_END] = 1'b1;
          done++;
        end
      join_none
    end
    // MU clears end flags by a broadcast stop, then starts all AUs at once
    mu_command(8'h30);
    for (int k = 0; k < N; k++) au_p0_out[k][AU_P0_END] = 1'b0;
    mu_command(8'h60);
    wait_done(N);
    for (int k = 0; k < N; k++) begin
      mu_wait_end(k);
      check(started[k], $sformatf("AU-%0d started", k));
    end
    // broadcast stop: AUs return to receiving programs and drop their end flag
    mu_command(8'h30);
    for (int k = 0; k < N; k++) if (au_p0_in[k][AU_P0_STOP] || 1'b1) au_p0_out[k] = '0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      mu_p0_out = {4'b0000, 4'(k)};
      #4;
      check(!mu_p0_end, $sformatf("end flag of AU-%0d cleared", k));
    end
    check(node_not_empty == '0, "all FIFOs empty at the end");

    $display("mechanisms: wait=%0d full=%0d empty=%0d loop=%0d start_one=%0d start_all=%0d stop_all=%0d end_seen=%0d irq=%0d pair_exchange=%0d",
             n_wait, n_full, n_empty, n_loop, n_start_one, n_start_all, n_stop_all, n_end_seen,
             n_irq, n_pair_exchange);
    check(n_wait > 0, "a processor waited for an engaged side");
    check(n_full > 0, "a write waited on a full FIFO");
    check(n_empty > 0, "a read waited on an empty FIFO");
    check(n_loop == N * 64, "loop bus carried every byte the MU looked at");
    check(n_start_one == N, "addressed start reached each AU");
    check(n_start_all == N, "broadcast start reached every AU");
    check(n_stop_all > 0, "broadcast stop");
    check(n_end_seen == 2 * N, "end flags seen by the MU");
    check(n_irq > 0, "interrupt request seen");
    check(n_pair_exchange > 0, "pairs exchanged at the same time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_poisson_iteration: the simple iteration for the Poisson equation run on the ADINA-I
// interconnect at full size, with 14 AUs on a 16 x 16 mesh (J = 15, interior 1..14).
//
//   psi(r+1)[i][j] = psi[i][j] + s (psi[i+1][j] + psi[i-1][j] + psi[i][j+1] + psi[i][j-1]
//                    - 4 psi[i][j]) + g[i][j]
//
// AU-j (j = 1..14) owns mesh row j, psi[1..14][j]. Each iteration has two half steps:
//   row step:    AU-j reads the sums psi[i][j+1] + psi[i][j-1] from FIFO-(i,j) (its row side),
//                updates psi[i][j] for all i with its own neighbours along i, and writes the
//                new psi[i][j] back into FIFO-(i,j).
//   column step: AU-i reads psi[i][k] from FIFO-(i,k) (its column side), forms the sums
//                psi[i][k+1] + psi[i][k-1] and writes them into FIFO-(i,k).
// Every FIFO thus carries data one way in one half step and the other way in the next. Since
// one FIFO serves both directions, a half step may start only when the previous one has ended
// everywhere: each AU raises its end flag, the MU polls them all, clears them with a broadcast
// stop and starts the next half step with a broadcast start (this synchronisation is the
// testbench's choice). After P = 5 iterations the MU reads psi[i][j] out of every FIFO-(i,j).
// Numbers are integers with s = 1/4 (a shift), compared exactly with the same iteration done
// serially here.
module tb_poisson_iteration;
  import adina_pkg::*;
  localparam int unsigned N = 16;
  localparam int J = 15;
  localparam int P = 5;

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

  int psi0 [J+1][J+1], g [J+1][J+1], ref_psi [J+1][J+1];

  // AU side of the end/stop/start handshake between half steps
  task automatic au_half_step_end(input int me);
    @(negedge clk);
    au_p0_out[me][AU_P0_END] = 1'b1;
    while (!au_p0_in[me][AU_P0_STOP]) @(negedge clk);
    au_p0_out[me][AU_P0_END] = 1'b0;
    while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
  endtask

  initial begin
    int t [J+1][J+1];
    for (int i = 0; i <= J; i++)
      for (int j = 0; j <= J; j++) begin
        psi0[i][j] = 0;
        g[i][j] = (i == 0 || j == 0 || i == J || j == J) ? 0 : $urandom_range(0, 4000) - 2000;
      end
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0; end
    // serial reference
    ref_psi = psi0;
    for (int r = 0; r < P; r++) begin
      t = ref_psi;
      for (int i = 1; i < J; i++)
        for (int j = 1; j < J; j++)
          t[i][j] = ref_psi[i][j] + ((ref_psi[i+1][j] + ref_psi[i-1][j] + ref_psi[i][j+1] +
                                      ref_psi[i][j-1] - 4 * ref_psi[i][j]) >>> 2) + g[i][j];
      ref_psi = t;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int k0 = 1; k0 < J; k0++) begin
      fork
        automatic int me = k0;
        begin
          automatic int row [J+1];     // psi[i][me], i = 0..J
          automatic int col [J+1];     // psi[me][k], k = 0..J
          automatic logic [31:0] w;
          foreach (row[i]) row[i] = psi0[i][me];
          foreach (col[k]) col[k] = psi0[me][k];
          // first column step from the initial values
          while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
          for (int k = 1; k < J; k++) put_word(me, au_col(k), 32'(col[k+1] + col[k-1]));
          for (int r = 0; r < P; r++) begin
            automatic int sums [J+1];
            automatic int nrow [J+1];
            au_half_step_end(me);
            // row step
            for (int i = 1; i < J; i++) begin get_word(me, au_row(i), w); sums[i] = int'(w); end
            nrow = row;
            for (int i = 1; i < J; i++)
              nrow[i] = row[i] + ((row[i+1] + row[i-1] + sums[i] - 4 * row[i]) >>> 2) + g[i][me];
            row = nrow;
            for (int i = 1; i < J; i++) put_word(me, au_row(i), 32'(row[i]));
            au_half_step_end(me);
            // column step (not after the last iteration: the MU collects instead)
            if (r < P - 1) begin
              for (int k = 1; k < J; k++) begin get_word(me, au_col(k), w); col[k] = int'(w); end
              for (int k = 1; k < J; k++) put_word(me, au_col(k), 32'(col[k+1] + col[k-1]));
            end
          end
        end
      join_none
    end

    // MU: start, then run the 2P half-step barriers
    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int h = 0; h < 2 * P; h++) begin
      for (int k = 1; k < J; k++) begin
        @(negedge clk);
        mu_p0_out = 8'(k);
        #4;
        while (!mu_p0_end) begin @(negedge clk); #4; end
      end
      @(negedge clk);
      mu_p0_out = 8'h30;                 // broadcast stop: clear end flags
      repeat (2) @(negedge clk);
      mu_p0_out = 8'h00;
      repeat (2) @(negedge clk);
      if (h < 2 * P - 1) begin
        mu_p0_out = 8'h60;               // broadcast start: next half step
        repeat (2) @(negedge clk);
        mu_p0_out = 8'h00;
      end
    end
    // MU collects psi after P iterations
    for (int i = 1; i < J; i++)
      for (int j = 1; j < J; j++) begin
        logic [31:0] w;
        get_word(-1, {4'(i), 4'(j)}, w);
        check(int'(w) == ref_psi[i][j], $sformatf("psi[%0d][%0d]", i, j));
      end
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

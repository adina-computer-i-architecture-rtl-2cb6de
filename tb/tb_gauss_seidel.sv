// tb_gauss_seidel: the Gauss-Seidel iteration for the Poisson equation run on the ADINA-I
// interconnect at full size, 14 AUs on a 16 x 16 mesh (interior 1..14), 5 sweeps.
//
//   psi[i][j] <- (psi[i-1][j] + psi[i+1][j] + psi[i][j-1] + psi[i][j+1]) / 4 + g[i][j]
//
// AU-j owns mesh row j and sweeps i = 1..14. For each point it takes psi[i][j+1] (the upper
// AU's value from the previous sweep) from FIFO-(j,j+1) and psi[i][j-1] (the lower AU's value
// from this sweep) from FIFO-(j,j-1), computes psi[i][j] and sends it at once to FIFO-(j-1,j)
// and FIFO-(j+1,j), then moves to the next point. The mesh is thus updated as a wave along
// i + j, and only the FIFOs next to the diagonal carry data. No global synchronisation: each AU
// waits only on FIFO ready flags, an AU that runs ahead stalls on a full FIFO. Before its first
// sweep an AU sends its initial row to the AU below. At the end each AU hands its row to the MU
// through FIFO-(j,j).
//
// Integers with a right shift for the division by 4; the result must equal the same sweeps
// done serially, exactly.
module tb_gauss_seidel;
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

  localparam int J = 15;               // mesh 0..J, interior 1..J-1, one AU per interior row
  localparam int P = 5;                // iterations

  int psi0 [J+1][J+1], g [J+1][J+1], ref_psi [J+1][J+1];

  initial begin
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0; end
    for (int i = 0; i <= J; i++)
      for (int j = 0; j <= J; j++) begin
        automatic bit on_edge = (i == 0 || j == 0 || i == J || j == J);
        psi0[i][j] = on_edge ? 0 : $urandom_range(0, 4000) - 2000;
        g[i][j]    = on_edge ? 0 : $urandom_range(0, 400) - 200;
      end
    // serial Gauss-Seidel, new values at (i-1,j) and (i,j-1)
    ref_psi = psi0;
    for (int r = 0; r < P; r++)
      for (int j = 1; j < J; j++)
        for (int i = 1; i < J; i++)
          ref_psi[i][j] = ((ref_psi[i-1][j] + ref_psi[i+1][j] + ref_psi[i][j-1] +
                            ref_psi[i][j+1]) >>> 2) + g[i][j];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int j0 = 1; j0 < J; j0++) begin
      fork
        automatic int j = j0;
        begin
          automatic int row [J+1];
          automatic logic [31:0] w;
          foreach (row[i]) row[i] = psi0[i][j];
          while (!au_p0_in[j][AU_P0_START]) @(negedge clk);
          // the AU below needs this row's old values for its first sweep
          if (j > 1) for (int i = 1; i < J; i++) put_word(j, au_row(j - 1), 32'(row[i]));
          for (int r = 0; r < P; r++) begin
            for (int i = 1; i < J; i++) begin
              automatic int up = 0, down = 0;
              if (j < J - 1) begin get_word(j, au_col(j + 1), w); up = int'(w); end     // psi[i][j+1], old
              if (j > 1)     begin get_word(j, au_col(j - 1), w); down = int'(w); end   // psi[i][j-1], new
              row[i] = ((row[i-1] + row[i+1] + down + up) >>> 2) + g[i][j];
              // the AU below uses it in its next sweep, the AU above in this one; the
              // last sweep's values are not needed below
              if (j > 1 && r < P - 1) put_word(j, au_row(j - 1), 32'(row[i]));
              if (j < J - 1)          put_word(j, au_row(j + 1), 32'(row[i]));
            end
          end
          for (int i = 1; i < J; i++) put_word(j, au_row(j), 32'(row[i]));
          au_p0_out[j][AU_P0_END] = 1'b1;
        end
      join_none
    end

    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int j = 1; j < J; j++) begin
      @(negedge clk);
      mu_p0_out = 8'(j);
      #4;
      while (!mu_p0_end) begin @(negedge clk); #4; end
      for (int i = 1; i < J; i++) begin
        logic [31:0] w;
        get_word(-1, {4'(j), 4'(j)}, w);
        check(int'(w) == ref_psi[i][j], $sformatf("psi[%0d][%0d]", i, j));
      end
    end
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

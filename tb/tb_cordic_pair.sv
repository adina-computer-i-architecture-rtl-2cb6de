// tb_cordic_pair: COS and SIN of p pi/8 (p = 0..3) by the CORDIC method on pairs of AUs, run
// on the ADINA-I interconnect at full size.
//
// Pair p is AU-p and AU-(p+8). Both start from x0 = 0.60725293..., y0 = 0, v0 = p pi/8 and
// run the same angle sequence v for n = 0..16:
//   v_n >= 0: x <- x - 2^-n y, y <- y + 2^-n x, v <- v - atan 2^-n
//   v_n <  0: x <- x + 2^-n y, y <- y - 2^-n x, v <- v + atan 2^-n
// AU-p keeps x, AU-(p+8) keeps y. Every iteration each sends its value to the other through
// its FIFO of the pair and takes the partner's from the other one. The four pairs run at
// once. At the end AU-p gives x_17 (the cosine) and AU-(p+8) gives y_17 (the sine) to the MU
// through their diagonal FIFOs.
//
// Fixed point with 28 fraction bits. Checked exactly against the same iteration done
// serially, and against $cos/$sin within 2^-16 (about 1.5e-5), the size of the last angle step;
// the largest error seen is 1.05e-5, which is the document's "five digits".
module tb_cordic_pair;
  import adina_pkg::*;
  localparam int WATCHDOG = 100000;
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

  localparam int NIT = 17;             // n = 0..16
  localparam int FRAC = 28;            // fixed point: value * 2^28

  int gam [NIT];
  int x_ref [4], y_ref [4];

  function automatic int q(input real v);
    return int'($rtoi(v * (2.0 ** FRAC) + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  initial begin
    for (int n = 0; n < NIT; n++) gam[n] = q($atan(2.0 ** (-n)));
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_p1[k] = '0; au_p0_out[k] = '0; end
    // serial reference
    for (int p = 0; p < 4; p++) begin
      automatic int x = q(0.6072529350088813), y = 0, v = q(p * 3.14159265358979 / 8.0);
      for (int n = 0; n < NIT; n++) begin
        automatic int xn = x, yn = y;
        if (v >= 0) begin x = xn - (yn >>> n); y = yn + (xn >>> n); v = v - gam[n]; end
        else        begin x = xn + (yn >>> n); y = yn - (xn >>> n); v = v + gam[n]; end
      end
      x_ref[p] = x; y_ref[p] = y;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // pair p: AU-p finds x, AU-(p+8) finds y; both run the same v
    for (int a0 = 0; a0 < 8; a0++) begin
      fork
        automatic int me = (a0 < 4) ? a0 : a0 + 4;
        automatic bit finds_y = (a0 >= 4);
        automatic int p = a0 % 4;
        automatic int partner = finds_y ? me - 8 : me + 8;
        begin
          automatic int mine = finds_y ? 0 : q(0.6072529350088813);
          automatic int v = q(p * 3.14159265358979 / 8.0);
          automatic logic [31:0] w;
          while (!au_p0_in[me][AU_P0_START]) @(negedge clk);
          for (int n = 0; n < NIT; n++) begin
            automatic int other;
            // send my value through FIFO-(partner, me), take the partner's from FIFO-(me, partner)
            put_word(me, au_row(partner), 32'(mine));
            get_word(me, au_col(partner), w);
            other = int'(w);
            if (!finds_y) mine = (v >= 0) ? mine - (other >>> n) : mine + (other >>> n);
            else          mine = (v >= 0) ? mine + (other >>> n) : mine - (other >>> n);
            v = (v >= 0) ? v - gam[n] : v + gam[n];
          end
          put_word(me, au_row(me), 32'(mine));
          au_p0_out[me][AU_P0_END] = 1'b1;
        end
      join_none
    end

    @(negedge clk);
    mu_p0_out = 8'h60;
    repeat (2) @(negedge clk);
    mu_p0_out = 8'h00;
    for (int p = 0; p < 4; p++) begin
      logic [31:0] wx, wy;
      real c, s;
      @(negedge clk);
      mu_p0_out = 8'(p);
      #4;
      while (!mu_p0_end) begin @(negedge clk); #4; end
      get_word(-1, {4'(p), 4'(p)}, wx);
      @(negedge clk);
      mu_p0_out = 8'(p + 8);
      #4;
      while (!mu_p0_end) begin @(negedge clk); #4; end
      get_word(-1, {4'(p + 8), 4'(p + 8)}, wy);
      check(int'(wx) == x_ref[p] && int'(wy) == y_ref[p], $sformatf("p=%0d equals the serial result", p));
      c = real'(int'(wx)) / (2.0 ** FRAC) - $cos(p * 3.14159265358979 / 8.0);
      s = real'(int'(wy)) / (2.0 ** FRAC) - $sin(p * 3.14159265358979 / 8.0);
      check(c < 2.0 ** -16 && c > -(2.0 ** -16) && s < 2.0 ** -16 && s > -(2.0 ** -16), $sformatf("COS and SIN of %0d pi/8 to five digits", p));
    end
    check(node_not_empty == '0, "all FIFOs empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

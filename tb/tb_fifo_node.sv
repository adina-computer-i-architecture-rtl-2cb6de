// tb_fifo_node: self-checking test of one buffer memory FIFO-(i,j) with its three ports.
//
// Port 0 is the MU, port 1 the row AU (AU-j), port 2 the column AU (AU-i). Each port is driven
// by a small DMA-like task: raise en with the direction, wait for gnt, then strobe one byte per
// clock while rdy is high, then drop en. The test checks: bytes come out in the order they went
// in, whoever wrote and read them; the buffer takes exactly DEPTH bytes; a second processor
// asking for an engaged side waits until the first lets go; simultaneous requests for a free
// side go MU first, then row, then column; a side stays with its holder however long it keeps
// en high; entrance and exit serve two processors at once; a loop read by the MU leaves the
// contents in place. Inputs change on the falling edge; a byte
// counts as moved when stb, gnt and rdy are all high just before the rising edge.
module tb_fifo_node;
  import adina_pkg::*;
  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  port_req_t req [3];
  port_rsp_t rsp [3];
  logic not_empty, not_full;
  int checks = 0, failures = 0;

  fifo_node #(.DEPTH(DEPTH)) dut (
    .clk(clk), .rst_n(rst_n),
    .mu_req(req[0]),  .mu_rsp(rsp[0]),
    .row_req(req[1]), .row_rsp(rsp[1]),
    .col_req(req[2]), .col_rsp(rsp[2]),
    .not_empty(not_empty), .not_full(not_full)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
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

  // Write a list of bytes through port p; returns the number of clocks from en to release.
  task automatic put(input int p, input logic [7:0] data [$], output int clocks);
    int k = 0;
    clocks = 0;
    @(negedge clk);
    req[p].en = 1'b1; req[p].wr = 1'b1; req[p].loop = 1'b0;
    while (k < data.size()) begin
      req[p].stb = 1'b1;
      req[p].wdata = data[k];
      #4;
      if (rsp[p].gnt && rsp[p].rdy) k++;
      @(negedge clk);
      clocks++;
    end
    req[p] = PORT_REQ_IDLE;
  endtask

  // Read n bytes through port p (with the loop bus if lp); returns them.
  task automatic get(input int p, input int n, input bit lp, output logic [7:0] data [$]);
    data = {};
    @(negedge clk);
    req[p].en = 1'b1; req[p].wr = 1'b0; req[p].loop = lp;
    while (data.size() < n) begin
      req[p].stb = 1'b1;
      #4;
      if (rsp[p].gnt && rsp[p].rdy) data.push_back(rsp[p].rdata);
      @(negedge clk);
    end
    req[p] = PORT_REQ_IDLE;
  endtask

  function automatic bit same(input logic [7:0] a [$], input logic [7:0] b [$]);
    if (a.size() != b.size()) return 1'b0;
    foreach (a[k]) if (a[k] !== b[k]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    logic [7:0] d0 [$], d1 [$], r [$], r2 [$];
    int clk0, clk1;
    for (int p = 0; p < 3; p++) req[p] = PORT_REQ_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. MU writes, row AU reads; column AU writes, MU reads
    d0 = {}; for (int k = 0; k < 10; k++) d0.push_back(8'(8'h30 + k));
    put(0, d0, clk0);
    check(clk0 == 11, "engage takes one clock, then one byte per clock");
    get(1, 10, 1'b0, r);
    check(same(r, d0), "MU -> row AU bytes in order");
    d0 = {}; for (int k = 0; k < 7; k++) d0.push_back(8'($urandom));
    put(2, d0, clk0);
    get(0, 7, 1'b0, r);
    check(same(r, d0), "column AU -> MU bytes in order");
    check(!not_empty, "empty after reading all");

    // 2. capacity: the entrance stops taking bytes after DEPTH
    @(negedge clk);
    req[1].en = 1'b1; req[1].wr = 1'b1;
    begin
      automatic int taken = 0;
      repeat (DEPTH + 10) begin
        req[1].stb = 1'b1; req[1].wdata = 8'(taken);
        #4;
        if (rsp[1].gnt && rsp[1].rdy) taken++;
        @(negedge clk);
      end
      check(taken == DEPTH, "buffer takes exactly DEPTH bytes");
      check(!not_full, "input ready low when full");
    end
    req[1] = PORT_REQ_IDLE;

    // 3. a loop read by the MU leaves the contents in place
    get(0, DEPTH, 1'b1, r);
    d0 = {}; for (int k = 0; k < DEPTH; k++) d0.push_back(8'(k));
    check(same(r, d0), "loop read returns the contents");
    get(2, DEPTH, 1'b0, r2);
    check(same(r2, d0), "contents kept after loop read");

    // 4. simultaneous requests for a free entrance: MU first, then row, then column.
    //    The later ones wait while the earlier holds the side.
    d0 = {8'hA0, 8'hA1, 8'hA2};
    d1 = {8'hB0, 8'hB1};
    fork
      put(0, d0, clk0);
      put(1, d1, clk1);
      begin
        automatic logic [7:0] d2 [$];
        automatic int c2;
        d2 = {8'hC0};
        put(2, d2, c2);
        check(c2 > clk1, "column AU waited longest");
      end
      begin
        // while the MU holds the entrance, the others are not granted
        @(negedge clk); #4;
        @(negedge clk); #4;
        check(rsp[0].gnt && !rsp[1].gnt && !rsp[2].gnt, "MU wins a free entrance");
      end
    join
    check(clk1 > clk0, "row AU waited for the MU");
    get(1, 6, 1'b0, r);
    check(same(r, {8'hA0, 8'hA1, 8'hA2, 8'hB0, 8'hB1, 8'hC0}), "order after contention");

    // 5. entrance and exit are independent: column AU streams in while row AU streams out
    d0 = {}; for (int k = 0; k < 40; k++) d0.push_back(8'($urandom));
    fork
      put(2, d0, clk0);
      get(1, 40, 1'b0, r);
    join
    check(same(r, d0), "concurrent write and read");
    check(clk0 <= 42, "writer not slowed by concurrent reader");

    // 6. exit held by the row AU (engaged, not yet moving bytes): the MU, asking later, is
    //    not granted until the row AU lets go, then gets the bytes
    d0 = {8'h11, 8'h22, 8'h33, 8'h44};
    put(0, d0, clk0);
    @(negedge clk);
    req[1].en = 1'b1; req[1].wr = 1'b0; req[1].stb = 1'b0;
    repeat (2) @(negedge clk);
    req[0].en = 1'b1; req[0].wr = 1'b0; req[0].stb = 1'b0;
    repeat (4) begin
      @(negedge clk); #4;
      check(rsp[1].gnt && !rsp[0].gnt, "exit stays with its holder");
    end
    @(negedge clk);
    req[1] = PORT_REQ_IDLE;
    @(negedge clk); #4;
    check(rsp[0].gnt, "MU granted the exit after the row AU let go");
    req[0] = PORT_REQ_IDLE;
    get(0, 4, 1'b0, r2);
    check(same(r2, d0), "bytes intact after the wait");

    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_fifo_array: self-checking test of the buffer-memory array and its selection decoding.
//
// Runs at N = 4 AUs (16 nodes) to stay short; the decoding is the same at N = 16. Checks:
// the MU reaches every node by its 'ij' selection; AU-j reaches FIFO-(i,j) on its row with
// {0,i} and AU-i reaches it on its column with {1,j}; all AUs exchange with a partner at the
// same time, AU-i through FIFO-(i,j) and AU-j through FIFO-(j,i), as the document describes;
// an AU that selects a node whose exit the MU holds waits for it; a loop read by the MU leaves
// the node's contents for the AU. Ports are driven by DMA-like tasks as in tb_fifo_node.
module tb_fifo_array;
  import adina_pkg::*;
  localparam int unsigned N  = 4;
  localparam int unsigned IW = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2*IW-1:0] mu_sel = '0;
  port_req_t mu_req = PORT_REQ_IDLE;
  port_rsp_t mu_rsp;
  logic [IW:0] au_sel [N];
  port_req_t au_req [N];
  port_rsp_t au_rsp [N];
  logic [N*N-1:0] node_not_empty, node_not_full;
  int checks = 0, failures = 0;

  fifo_array #(.N(N), .DEPTH(64)) dut (.*);

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

  // p = -1 is the MU, otherwise AU-p
  task automatic put(input int p, input logic [IW*2-1:0] sel, input logic [7:0] data [$]);
    int k = 0;
    @(negedge clk);
    if (p < 0) begin
      mu_sel = sel; mu_req.en = 1'b1; mu_req.wr = 1'b1; mu_req.loop = 1'b0;
    end else begin
      au_sel[p] = sel[IW:0]; au_req[p].en = 1'b1; au_req[p].wr = 1'b1; au_req[p].loop = 1'b0;
    end
    while (k < data.size()) begin
      automatic port_rsp_t rs;
      if (p < 0) begin mu_req.stb = 1'b1; mu_req.wdata = data[k]; end
      else begin au_req[p].stb = 1'b1; au_req[p].wdata = data[k]; end
      #4;
      rs = (p < 0) ? mu_rsp : au_rsp[p];
      if (rs.gnt && rs.rdy) k++;
      @(negedge clk);
    end
    if (p < 0) mu_req = PORT_REQ_IDLE; else au_req[p] = PORT_REQ_IDLE;
  endtask

  task automatic get(input int p, input logic [IW*2-1:0] sel, input int n, input bit lp,
                     output logic [7:0] data [$], output int clocks);
    data = {};
    clocks = 0;
    @(negedge clk);
    if (p < 0) begin
      mu_sel = sel; mu_req.en = 1'b1; mu_req.wr = 1'b0; mu_req.loop = lp;
    end else begin
      au_sel[p] = sel[IW:0]; au_req[p].en = 1'b1; au_req[p].wr = 1'b0; au_req[p].loop = 1'b0;
    end
    while (data.size() < n) begin
      automatic port_rsp_t rs;
      if (p < 0) mu_req.stb = 1'b1; else au_req[p].stb = 1'b1;
      #4;
      rs = (p < 0) ? mu_rsp : au_rsp[p];
      if (rs.gnt && rs.rdy) data.push_back(rs.rdata);
      @(negedge clk);
      clocks++;
    end
    if (p < 0) mu_req = PORT_REQ_IDLE; else au_req[p] = PORT_REQ_IDLE;
  endtask

  function automatic logic [IW*2-1:0] au_code(input bit column, input int idx);
    return (IW*2)'({column, IW'(idx)});
  endfunction

  initial begin
    logic [7:0] r [$];
    int c;
    for (int k = 0; k < N; k++) begin au_req[k] = PORT_REQ_IDLE; au_sel[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. MU fills every node with its own tag
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        put(-1, {IW'(i), IW'(j)}, {8'(16 * i + j), 8'(~(16 * i + j))});
    check(&node_not_empty, "every node filled");
    // read back through the row AU or the column AU, alternately
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if ((i + j) % 2 == 0) get(j, au_code(1'b0, i), 2, 1'b0, r, c);   // AU-j, row
        else                  get(i, au_code(1'b1, j), 2, 1'b0, r, c);   // AU-i, column
        check(r[0] == 8'(16 * i + j) && r[1] == 8'(~(16 * i + j)), $sformatf("route node (%0d,%0d)", i, j));
      end
    check(node_not_empty == '0, "every node drained");

    // 2. all pairs (x, x^1) exchange at the same time
    for (int k = 0; k < N; k++) begin
      fork
        automatic int x = k;
        automatic int y = k ^ 1;
        begin
          automatic logic [7:0] got [$];
          automatic int cc;
          put(x, au_code(1'b1, y), {8'(8'h80 + x), 8'(8'h40 + x), 8'(8'h20 + x)});  // to FIFO-(x,y)
          get(x, au_code(1'b0, y), 3, 1'b0, got, cc);                               // from FIFO-(y,x)
          check(got[0] == 8'(8'h80 + y) && got[1] == 8'(8'h40 + y) && got[2] == 8'(8'h20 + y),
                $sformatf("AU-%0d got partner's data", x));
        end
      join_none
    end
    wait fork;

    // 3. the MU holds the exit of FIFO-(1,2) with a loop read; AU-2 waits for it, then
    //    finds the contents still there
    put(-1, {IW'(1), IW'(2)}, {8'h01, 8'h02, 8'h03});
    fork
      begin
        automatic logic [7:0] m [$];
        automatic int cc;
        get(-1, {IW'(1), IW'(2)}, 3, 1'b1, m, cc);
        check(m[0] == 8'h01 && m[2] == 8'h03, "MU loop read");
      end
      begin
        automatic logic [7:0] a [$];
        automatic int cc;
        @(negedge clk);
        get(2, au_code(1'b0, 1), 3, 1'b0, a, cc);
        check(a[0] == 8'h01 && a[1] == 8'h02 && a[2] == 8'h03, "AU reads after MU loop read");
        check(cc >= 5, "AU waited while the MU held the exit");
      end
    join

    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// fifo_array: the N x N buffer-memory array of ADINA-I and the buses that reach it.
//
// FIFO-(i,j) (node i,j; i = column index, j = row index) is connected to three buses: the MU
// data bus, which reaches every node; the row bus of AU-j, which reaches FIFO-(0..N-1, j); and
// the column bus of AU-i, which reaches FIFO-(i, 0..N-1). So AU-i and AU-j can always trade
// data through the pair FIFO-(i,j) / FIFO-(j,i), and the MU can reach any node.
//
// Each processor selects one node with the value latched on its PORT 1 before it starts a
// transfer. MU: mu_sel = {i, j}, i in the upper digit. AU-x: au_sel[x] = {0, i} selects FIFO-(i,x)
// on its row, {1, k} selects FIFO-(x,k) on its column. The array decodes these selections into
// per-node request gates and steers each node's response back to the processor that selected
// it; everything else happens in fifo_node (arbitration, loop bus, storage). Decoding and
// steering are combinational, so the port timing is that of fifo_node: gnt one clock after
// en, then one byte per clock while rdy is high.
module fifo_array
  import adina_pkg::*;
#(
  parameter int unsigned N     = N_AU,
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // MU port
  input  logic [2*IW-1:0] mu_sel,
  input  port_req_t     mu_req,
  output port_rsp_t     mu_rsp,
  // AU ports
  input  logic [IW:0]   au_sel [N],
  input  port_req_t     au_req [N],
  output port_rsp_t     au_rsp [N],
  // Output-ready and input-ready flags of every node, node (i,j) at bit i*N + j
  output logic [N*N-1:0] node_not_empty,
  output logic [N*N-1:0] node_not_full
);

  port_rsp_t mu_rsp_n  [N][N];
  port_rsp_t row_rsp_n [N][N];
  port_rsp_t col_rsp_n [N][N];

  for (genvar i = 0; i < N; i++) begin : g_col
    for (genvar j = 0; j < N; j++) begin : g_row
      port_req_t mu_q, row_q, col_q;

      always_comb begin
        mu_q  = (mu_sel    == {IW'(i), IW'(j)}) ? mu_req    : PORT_REQ_IDLE;
        row_q = (au_sel[j] == {1'b0, IW'(i)})   ? au_req[j] : PORT_REQ_IDLE;
        col_q = (au_sel[i] == {1'b1, IW'(j)})   ? au_req[i] : PORT_REQ_IDLE;
      end

      fifo_node #(.DEPTH(DEPTH)) u_node (
        .clk       (clk),
        .rst_n     (rst_n),
        .mu_req    (mu_q),
        .mu_rsp    (mu_rsp_n[i][j]),
        .row_req   (row_q),
        .row_rsp   (row_rsp_n[i][j]),
        .col_req   (col_q),
        .col_rsp   (col_rsp_n[i][j]),
        .not_empty (node_not_empty[i*N + j]),
        .not_full  (node_not_full[i*N + j])
      );
    end
  end

  // Steer responses back. A selection that names no node (N not a power of two) reads idle.
  always_comb begin
    logic [IW-1:0] si, sj;
    si = mu_sel[2*IW-1:IW];
    sj = mu_sel[IW-1:0];
    mu_rsp = PORT_RSP_IDLE;
    if (32'(si) < N && 32'(sj) < N) mu_rsp = mu_rsp_n[si][sj];
  end

  for (genvar x = 0; x < N; x++) begin : g_au
    always_comb begin
      logic [IW-1:0] y;
      y = au_sel[x][IW-1:0];
      au_rsp[x] = PORT_RSP_IDLE;
      if (32'(y) < N) begin
        if (au_sel[x][IW]) au_rsp[x] = col_rsp_n[x][y];   // FIFO-(x, y)
        else               au_rsp[x] = row_rsp_n[y][x];   // FIFO-(y, x)
      end
    end
  end

endmodule

// adina_top: the interconnect of the ADINA-I parallel computer.
//
// ADINA-I is one master unit (MU) and N arithmetic units (AU-0..AU-(N-1)), each a small
// processor with its own memory and DMA controller, joined by an N x N array of FIFO buffer
// memories: AU-i and AU-j exchange data through FIFO-(i,j) and FIFO-(j,i) without knowing
// each other's state, each only waiting on the FIFO's input-ready or output-ready flag. The
// processors themselves are not part of this RTL: their ports are brought out here.
//
// Per processor, this module takes the value latched on PORT 1 (selection of a FIFO, see
// fifo_array) and a byte-wide DMA transfer port (adina_pkg::port_req_t / port_rsp_t), and it
// carries the PORT 0 control signals between the MU and the AUs (see control_lines). With the
// default N = 16, the MU selects with P1[7:0] = 'ij' and an AU with P1[4:0] = {row/column,
// digit}; P1 bits the selection does not use are ignored. Byte transfers take one clock
// each once a side is engaged, which takes one clock; control lines are combinational.
module adina_top
  import adina_pkg::*;
#(
  parameter int unsigned N     = N_AU,
  parameter int unsigned DEPTH = FIFO_DEPTH,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  // MU
  input  logic [7:0]   mu_p1,
  input  port_req_t    mu_req,
  output port_rsp_t    mu_rsp,
  input  logic [7:0]   mu_p0_out,
  output logic         mu_p0_end,        // MU P0[7] input
  output logic [N-1:0] mu_pio_irq,       // interrupt requests to the MU's PIO
  output logic         mu_irq,
  // AUs
  input  logic [7:0]   au_p1     [N],
  input  port_req_t    au_req    [N],
  output port_rsp_t    au_rsp    [N],
  input  logic [7:0]   au_p0_out [N],
  output logic [7:0]   au_p0_in  [N],
  // observation: output-ready and input-ready flags of node (i,j) at bit i*N + j
  output logic [N*N-1:0] node_not_empty,
  output logic [N*N-1:0] node_not_full
);

  logic [IW:0]   au_sel [N];
  logic [N-1:0]  au_end, au_irq_req, au_start, au_stop;

  for (genvar k = 0; k < N; k++) begin : g_au
    assign au_sel[k]     = au_p1[k][IW:0];
    assign au_end[k]     = au_p0_out[k][AU_P0_END];
    assign au_irq_req[k] = au_p0_out[k][AU_P0_IRQ];
    always_comb begin
      au_p0_in[k]              = '0;
      au_p0_in[k][AU_P0_START] = au_start[k];
      au_p0_in[k][AU_P0_STOP]  = au_stop[k];
    end
  end

  fifo_array #(.N(N), .DEPTH(DEPTH)) u_array (
    .clk            (clk),
    .rst_n          (rst_n),
    .mu_sel         (mu_p1[2*IW-1:0]),
    .mu_req         (mu_req),
    .mu_rsp         (mu_rsp),
    .au_sel         (au_sel),
    .au_req         (au_req),
    .au_rsp         (au_rsp),
    .node_not_empty (node_not_empty),
    .node_not_full  (node_not_full)
  );

  control_lines #(.N(N)) u_ctrl (
    .mu_p0_out   (mu_p0_out),
    .mu_p0_end   (mu_p0_end),
    .au_p0_end   (au_end),
    .au_p0_irq   (au_irq_req),
    .au_p0_start (au_start),
    .au_p0_stop  (au_stop),
    .au_irq      (mu_pio_irq),
    .mu_irq      (mu_irq)
  );

endmodule

// fifo_node: one buffer memory FIFO-(i,j) of the ADINA-I array with its bus connections.
//
// The buffer is two fifo_chip parts side by side, low nibble in the first and high nibble in
// the second, so it holds DEPTH bytes. Three processors can reach it: the MU, AU-j (the AU on
// whose row it lies, "row" port) and AU-i (the AU on whose column it lies, "col" port). The
// entrance and the exit are separate sides, each engaged by one user at a time: a processor
// that asks for a side held by another waits (gnt low) until the holder drops en. When two ask
// for a free side in the same cycle, the MU wins, then the row AU, then the column AU (the
// order is this design's choice). Engagement takes one clock: gnt rises the cycle after en.
//
// The loop bus joins the exit to the entrance. When the MU reads with loop set, it must hold
// both the exit and, on behalf of the loop bus, the entrance; every byte it reads is then
// shifted back in, so the FIFO keeps its contents after the MU has looked at them.
//
// Ports use adina_pkg::port_req_t / port_rsp_t (see there). The caller gates each request with
// its own selection decode: a request seen here is meant for this node. All on one clock;
// reset empties the FIFO and frees both sides.
module fifo_node
  import adina_pkg::*;
#(
  parameter int unsigned DEPTH   = FIFO_DEPTH,
  parameter int unsigned CHIP_WD = CHIP_W
) (
  input  logic      clk,
  input  logic      rst_n,
  input  port_req_t mu_req,
  output port_rsp_t mu_rsp,
  input  port_req_t row_req,
  output port_rsp_t row_rsp,
  input  port_req_t col_req,
  output port_rsp_t col_rsp,
  output logic      not_empty,     // output ready of the buffer, for observation
  output logic      not_full       // input ready of the buffer, for observation
);
  localparam int unsigned NCHIP = DATA_W / CHIP_WD;

  owner_e ent_own_q, ent_own_d, ext_own_q, ext_own_d;

  // Requests per side
  logic mu_in_req, loop_req, row_in_req, col_in_req;
  logic mu_out_req, row_out_req, col_out_req;

  assign mu_in_req   = mu_req.en  &&  mu_req.wr;
  assign loop_req    = mu_req.en  && !mu_req.wr && mu_req.loop;
  assign row_in_req  = row_req.en &&  row_req.wr;
  assign col_in_req  = col_req.en &&  col_req.wr;
  assign mu_out_req  = mu_req.en  && !mu_req.wr;
  assign row_out_req = row_req.en && !row_req.wr;
  assign col_out_req = col_req.en && !col_req.wr;

  // Entrance: the holder keeps it while it still asks; a free side goes by priority.
  always_comb begin
    logic keep;
    unique case (ent_own_q)
      OWN_MU:   keep = mu_in_req;
      OWN_LOOP: keep = loop_req;
      OWN_ROW:  keep = row_in_req;
      OWN_COL:  keep = col_in_req;
      default:  keep = 1'b0;
    endcase
    if (keep)            ent_own_d = ent_own_q;
    else if (mu_in_req)  ent_own_d = OWN_MU;
    else if (loop_req)   ent_own_d = OWN_LOOP;
    else if (row_in_req) ent_own_d = OWN_ROW;
    else if (col_in_req) ent_own_d = OWN_COL;
    else                 ent_own_d = OWN_NONE;
  end

  always_comb begin
    logic keep;
    unique case (ext_own_q)
      OWN_MU:  keep = mu_out_req;
      OWN_ROW: keep = row_out_req;
      OWN_COL: keep = col_out_req;
      default: keep = 1'b0;
    endcase
    if (keep)             ext_own_d = ext_own_q;
    else if (mu_out_req)  ext_own_d = OWN_MU;
    else if (row_out_req) ext_own_d = OWN_ROW;
    else if (col_out_req) ext_own_d = OWN_COL;
    else                  ext_own_d = OWN_NONE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_own_q <= OWN_NONE;
      ext_own_q <= OWN_NONE;
    end else begin
      ent_own_q <= ent_own_d;
      ext_own_q <= ext_own_d;
    end
  end

  // Grants: a holder is granted only while it still asks for the side it holds.
  logic mu_gnt_in, mu_gnt_out, row_gnt_in, row_gnt_out, col_gnt_in, col_gnt_out, loop_gnt;
  assign mu_gnt_in   = (ent_own_q == OWN_MU)   && mu_in_req;
  assign loop_gnt    = (ent_own_q == OWN_LOOP) && loop_req;
  assign mu_gnt_out  = (ext_own_q == OWN_MU)   && mu_out_req && (!mu_req.loop || loop_gnt);
  assign row_gnt_in  = (ent_own_q == OWN_ROW)  && row_in_req;
  assign row_gnt_out = (ext_own_q == OWN_ROW)  && row_out_req;
  assign col_gnt_in  = (ent_own_q == OWN_COL)  && col_in_req;
  assign col_gnt_out = (ext_own_q == OWN_COL)  && col_out_req;

  // The buffer: NCHIP chips sharing the shift signals, each holding CHIP_WD bits of a byte.
  logic              shift_in, shift_out;
  logic [DATA_W-1:0] din, dout;
  logic [NCHIP-1:0]  chip_in_rdy, chip_out_rdy;
  logic              in_rdy, out_rdy;

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    fifo_chip #(.WIDTH(CHIP_WD), .DEPTH(DEPTH)) u_chip (
      .clk       (clk),
      .rst_n     (rst_n),
      .shift_in  (shift_in),
      .din       (din[c*CHIP_WD +: CHIP_WD]),
      .in_ready  (chip_in_rdy[c]),
      .shift_out (shift_out),
      .dout      (dout[c*CHIP_WD +: CHIP_WD]),
      .out_ready (chip_out_rdy[c])
    );
  end

  assign in_rdy    = &chip_in_rdy;
  assign out_rdy   = &chip_out_rdy;
  assign not_empty = out_rdy;
  assign not_full  = in_rdy;

  // Exit side: one byte leaves when the holder strobes and a byte is there.
  assign shift_out = out_rdy && ((mu_gnt_out  && mu_req.stb)  ||
                                 (row_gnt_out && row_req.stb) ||
                                 (col_gnt_out && col_req.stb));

  // Entrance side: the loop bus writes back what the MU reads; a leaving byte frees room,
  // so the loop never stalls on a full FIFO.
  always_comb begin
    shift_in = 1'b0;
    din      = '0;
    unique case (ent_own_q)
      OWN_MU:   begin shift_in = mu_gnt_in  && mu_req.stb  && in_rdy; din = mu_req.wdata;  end
      OWN_ROW:  begin shift_in = row_gnt_in && row_req.stb && in_rdy; din = row_req.wdata; end
      OWN_COL:  begin shift_in = col_gnt_in && col_req.stb && in_rdy; din = col_req.wdata; end
      OWN_LOOP: begin shift_in = loop_gnt && mu_gnt_out && mu_req.stb && out_rdy; din = dout; end
      default:  begin shift_in = 1'b0; din = '0; end
    endcase
  end

  // Responses
  always_comb begin
    mu_rsp  = PORT_RSP_IDLE;
    row_rsp = PORT_RSP_IDLE;
    col_rsp = PORT_RSP_IDLE;
    mu_rsp.rdata  = dout;
    row_rsp.rdata = dout;
    col_rsp.rdata = dout;
    mu_rsp.gnt  = mu_req.wr  ? mu_gnt_in  : mu_gnt_out;
    mu_rsp.rdy  = mu_req.wr  ? in_rdy     : out_rdy;
    row_rsp.gnt = row_req.wr ? row_gnt_in : row_gnt_out;
    row_rsp.rdy = row_req.wr ? in_rdy     : out_rdy;
    col_rsp.gnt = col_req.wr ? col_gnt_in : col_gnt_out;
    col_rsp.rdy = col_req.wr ? in_rdy     : out_rdy;
  end

  // Rules of the two sides: at most one writer and one reader shift per cycle, and the two
  // chips of a buffer never disagree.
  a_chips_agree: assert property (@(posedge clk) disable iff (!rst_n)
    (&chip_in_rdy || ~|chip_in_rdy) && (&chip_out_rdy || ~|chip_out_rdy));
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({mu_gnt_out, row_gnt_out, col_gnt_out}));
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({mu_gnt_in, loop_gnt, row_gnt_in, col_gnt_in}));

endmodule

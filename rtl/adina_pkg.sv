// adina_pkg: types and constants shared by the ADINA-I buffer-memory interconnect.
//
// ADINA-I joins one master unit (MU) and N arithmetic units (AU-0..AU-(N-1)) through an
// N x N array of FIFO buffer memories. FIFO-(i,j) sits on the row bus of AU-j and on the
// column bus of AU-i, and every FIFO is also on the data bus of the MU. Each processor talks
// to the array through one byte-wide port, described here as a request/response struct pair.
//
// Port protocol (this design's choice; the original machine drives it from a DMA controller):
//   en    held high while the processor keeps one side of the selected FIFO engaged
//         (the DMA ENABLE line); dropping it frees the side for another processor.
//   wr    direction: 1 = shift into the FIFO entrance, 0 = shift out of the exit
//         (the DMA DIRECTION line).
//   stb   one byte transfer requested in this cycle.
//   loop  MU only: while reading, write every byte read back into the same FIFO's
//         entrance over the loop bus, so the FIFO keeps its contents.
//   gnt   the side is engaged by this processor.
//   rdy   input ready (room at the entrance) for a write, output ready (a byte at the
//         exit) for a read. A byte moves in every cycle with stb && gnt && rdy.
//   rdata the byte at the exit (fall-through), valid while gnt && rdy on a read.
//
// Selection (the latched PORT 1 value): the MU puts the two hex digits 'ij' on P1, i in the
// upper digit; an AU puts a flag and one digit on P1[4:0]: flag 0 with digit i selects
// FIFO-(i, self) on its row, flag 1 with digit k selects FIFO-(self, k) on its column.
package adina_pkg;

  // Numbers of the trial machine: 16 AUs, a 16 x 16 FIFO array, byte-wide buses,
  // each FIFO two 64 x 4 chips side by side.
  localparam int unsigned N_AU      = 16;
  localparam int unsigned DATA_W    = 8;
  localparam int unsigned FIFO_DEPTH = 64;
  localparam int unsigned CHIP_W    = 4;

  // PORT 0 bit positions, MU side
  localparam int unsigned MU_P0_STOP  = 4;  // 1: AU returns to receiving programs
  localparam int unsigned MU_P0_BCAST = 5;  // 1: start/stop goes to every AU
  localparam int unsigned MU_P0_START = 6;  // 1: AU starts its calculation
  localparam int unsigned MU_P0_END   = 7;  // input: end of calculation of the addressed AU
  // PORT 0 bit positions, AU side
  localparam int unsigned AU_P0_STOP  = 4;  // input
  localparam int unsigned AU_P0_IRQ   = 5;  // output: interrupt request to the MU
  localparam int unsigned AU_P0_START = 6;  // input
  localparam int unsigned AU_P0_END   = 7;  // output: end of calculation

  typedef struct packed {
    logic              en;
    logic              wr;
    logic              stb;
    logic              loop;
    logic [DATA_W-1:0] wdata;
  } port_req_t;

  typedef struct packed {
    logic              gnt;
    logic              rdy;
    logic [DATA_W-1:0] rdata;
  } port_rsp_t;

  localparam port_req_t PORT_REQ_IDLE = '{en: 1'b0, wr: 1'b0, stb: 1'b0, loop: 1'b0, wdata: '0};
  localparam port_rsp_t PORT_RSP_IDLE = '{gnt: 1'b0, rdy: 1'b0, rdata: '0};

  // Who holds one side of a FIFO. LOOP is the loop bus, the FIFO's own exit feeding
  // its entrance.
  typedef enum logic [2:0] {
    OWN_NONE = 3'd0,
    OWN_MU   = 3'd1,
    OWN_ROW  = 3'd2,   // AU-j, on whose row FIFO-(i,j) lies
    OWN_COL  = 3'd3,   // AU-i, on whose column FIFO-(i,j) lies
    OWN_LOOP = 3'd4
  } owner_e;

  // Software conventions for the processors' RAM (no hardware of their own): the MU keeps a
  // 16 x 16 grid of 16-byte blocks at 2000h..2FFFh, block (i,j) at 2ij0h; an AU keeps
  // 32-byte blocks, its row at 1C00h + 20h*i and its column at 1E00h + 20h*k.
  // Word m of a block holds bytes 4m..4m+3.
  function automatic logic [15:0] mu_block_addr(input logic [3:0] i, input logic [3:0] j,
                                                input logic [1:0] m, input logic [1:0] b);
    return {4'h2, i, j, m, b};
  endfunction

  function automatic logic [15:0] au_block_addr(input logic column, input logic [3:0] idx,
                                                input logic [2:0] m, input logic [1:0] b);
    return 16'h1C00 + (column ? 16'h0200 : 16'h0000) + 16'(idx) * 16'h20 + {11'd0, m, b};
  endfunction

endpackage

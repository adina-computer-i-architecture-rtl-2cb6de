// control_lines: the PORT 0 signal network between the MU and the AUs of ADINA-I.
//
// The MU addresses one AU with the hex digit j on its P0[3:0]. A 1 on P0[6] tells that AU to
// start its calculation, a 1 on P0[4] tells it to stop and return to receiving programs; with
// P0[5] also at 1 the same command goes to every AU at once (broadcast). The MU reads on its
// P0[7] the end-of-calculation flag of the AU whose number is on P0[3:0]. On the AU side, P0[6]
// and P0[4] are the start and stop inputs, P0[7] is the end-of-calculation output and P0[5]
// an interrupt request to the MU, which the MU receives through its PIO.
//
// The network is purely combinational, decode and multiplexing only: each processor latches
// its own port, so levels here simply follow those latches. Interrupt requests reach the
// MU both as one line per AU (au_irq, for the PIO to read) and as their OR (mu_irq), which is
// this design's choice: the document says only that the PIO receives them.
module control_lines
  import adina_pkg::*;
#(
  parameter int unsigned N  = N_AU,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [7:0]   mu_p0_out,   // MU PORT 0 as driven by the MU
  output logic         mu_p0_end,   // to MU P0[7]
  input  logic [N-1:0] au_p0_end,   // AU-k P0[7]
  input  logic [N-1:0] au_p0_irq,   // AU-k P0[5]
  output logic [N-1:0] au_p0_start, // to AU-k P0[6]
  output logic [N-1:0] au_p0_stop,  // to AU-k P0[4]
  output logic [N-1:0] au_irq,      // interrupt requests as seen by the MU's PIO
  output logic         mu_irq       // any AU requests an interrupt
);
  logic [3:0] j;
  assign j = mu_p0_out[3:0];

  always_comb begin
    for (int k = 0; k < N; k++) begin
      logic hit;
      hit = mu_p0_out[MU_P0_BCAST] || (32'(j) == k);
      au_p0_start[k] = hit && mu_p0_out[MU_P0_START];
      au_p0_stop[k]  = hit && mu_p0_out[MU_P0_STOP];
    end
    mu_p0_end = (32'(j) < N) ? au_p0_end[IW'(j)] : 1'b0;
  end

  assign au_irq = au_p0_irq;
  assign mu_irq = |au_p0_irq;

endmodule

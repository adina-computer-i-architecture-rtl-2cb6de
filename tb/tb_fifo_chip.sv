// tb_fifo_chip: self-checking test of one 64 x 4 fall-through FIFO chip.
//
// A queue in the testbench is the reference. The test fills the chip until input ready
// drops (it must drop after exactly DEPTH words), checks that a shift-in when full is refused,
// that a shift-in together with a shift-out when full is accepted, drains it checking order
// and fall-through timing (a word written into an empty FIFO is at the output one clock later),
// then runs random traffic. Inputs change on the falling edge, outputs are checked just
// before the rising edge.
module tb_fifo_chip;
  localparam int unsigned WIDTH = 4;
  localparam int unsigned DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic shift_in = 1'b0, shift_out = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic in_ready, out_ready;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q [$];

  fifo_chip #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // one clock: drive at negedge, check flags and head just before posedge, update model
  task automatic cycle(input bit si, input bit so, input logic [WIDTH-1:0] d);
    @(negedge clk);
    shift_in = si; shift_out = so; din = d;
    #4;
    check(out_ready == (q.size() != 0), "out_ready");
    check(in_ready == (q.size() != DEPTH), "in_ready");
    if (q.size() != 0) check(dout == q[0], "head word");
    @(posedge clk);
    begin
      bit popped;
      popped = so && q.size() != 0;
      if (popped) void'(q.pop_front());
      if (si && (q.size() < DEPTH)) q.push_back(d);
    end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill until input ready drops
    n = 0;
    while (n < DEPTH + 5) begin
      cycle(1'b1, 1'b0, WIDTH'(n * 7 + 3));
      n++;
    end
    check(q.size() == DEPTH, "holds exactly DEPTH words");
    // shift in while full together with shift out
    cycle(1'b1, 1'b1, 4'hA);
    check(q.size() == DEPTH, "full push+pop keeps count");
    // drain
    while (q.size() != 0) cycle(1'b0, 1'b1, '0);
    cycle(1'b0, 1'b1, '0);   // shift out on empty is ignored
    // fall-through: one word in, visible the next cycle
    cycle(1'b1, 1'b0, 4'h5);
    cycle(1'b0, 1'b0, '0);
    check(out_ready && dout == 4'h5, "fall-through");
    // random traffic
    repeat (4000) cycle(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), WIDTH'($urandom));
    cycle(1'b0, 1'b0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// shared_counter: the counter shared by the A/D and D/A converter tests.
//
// It advances once per half LSB of ramp travel. Its bits {q[2], q[1]}
// are the reference bits {R2, R1} that time the ideal transitions of the
// A/D converter (q[0] is R0, the half-LSB bit), and its upper bits, shifted
// by a fixed amount in the controller, form the D/A converter test code.
// The load value INIT = 3 ({R2,R1} = 01, R0 = 1) puts the first half LSB of
// the ramp into the offset window, as in the timing of the offset and INL
// tests. The width is chosen by the instantiating controller so that one
// whole test run never wraps the count.
//
// Timing: q changes on the rising clock edge where inc (or load) is high;
// load wins over inc. Reset is asynchronous, active low, to INIT.
//
// The start value and the half-LSB rate follow the described timing; the
// width rule and the reset are this design's choices.
module shared_counter #(
  parameter int unsigned W    = 11,
  parameter int unsigned INIT = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         inc,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= W'(INIT);
    else if (load) q <= W'(INIT);
    else if (inc)  q <= q + 1'b1;
  end

endmodule

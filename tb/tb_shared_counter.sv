// tb_shared_counter: reset and load values, counting, wrap-around and the
// reference-bit sequence {R2,R1},R0 = 01,1 -> 10,0 -> 10,1 -> 11,0 -> ...
// of the shared counter, compared with a reference count kept here.
//
// The stimulus and any reduced parameters are this bench's own choices; the
// expected values follow the described test rules.
module tb_shared_counter;
  import bist_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, inc = 1'b0;
  logic [4:0] q;
  int   checks = 0, failures = 0;
  int   ref_q;

  always #5 clk = ~clk;

  shared_counter #(.W(5), .INIT(3)) dut (.clk, .rst_n, .load, .inc, .q);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    @(posedge clk); #1;
    check(q == 5'd3, "reset value");
    check(cnt_width(8, 8, 0, 0) == 10, "counter width for the default configuration");
    @(negedge clk); rst_n = 1'b1;
    ref_q = 3;
    for (int i = 0; i < 80; i++) begin
      inc  = ($urandom_range(0, 3) != 0);
      load = (i == 50);
      @(posedge clk); #1;
      if (load) ref_q = 3;
      else if (inc) ref_q = (ref_q + 1) % 32;
      check(int'(q) == ref_q, $sformatf("step %0d: q=%0d expected %0d", i, q, ref_q));
      @(negedge clk);
    end
    // reference bits along the first half-LSB steps
    load = 1'b1; inc = 1'b0; @(negedge clk); load = 1'b0; inc = 1'b1;
    begin
      int r21 [6] = '{1, 2, 2, 3, 3, 0};
      int r0  [6] = '{1, 0, 1, 0, 1, 0};
      for (int i = 0; i < 6; i++) begin
        check(int'(q[2:1]) == r21[i] && int'(q[0]) == r0[i], $sformatf("reference bits at step %0d", i));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

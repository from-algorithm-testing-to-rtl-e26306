// tb_sova_delay: self-checking testbench of the X+E delay line. Random values are
// pushed on random enable cycles; each output is compared with the value pushed
// DEPTH-1 enables earlier (a queue in the testbench), and clear is exercised.
module tb_sova_delay;
  import sova_pkg::*;

  localparam int unsigned DEPTH = TRUNC_LEN;

  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [W_XE-1:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [W_XE-1:0] q [$];

  sova_delay #(.DEPTH(DEPTH), .WIDTH(W_XE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (DEPTH) q.push_front('0);
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      clr = ($urandom_range(0, 499) == 0);
      en  = ($urandom_range(0, 3) != 0);
      din = W_XE'($urandom);
      @(posedge clk);
      if (clr) begin
        q.delete();
        repeat (DEPTH) q.push_front('0);
      end else if (en) begin
        q.push_front(din);
        void'(q.pop_back());
      end
      @(negedge clk);
      checks++;
      if (dout !== q[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d exp %0d", t, dout, q[DEPTH-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

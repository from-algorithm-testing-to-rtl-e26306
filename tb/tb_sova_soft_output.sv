// tb_sova_soft_output: exhaustive self-checking testbench of the soft output
// unit over decoded bit, every X+E value and a sweep of reliabilities.
module tb_sova_soft_output;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  logic dec_bit;
  soft_t soft_mag;
  logic signed [W_XE-1:0] xe_del;
  logic signed [W_OUT-1:0] ext;
  int checks = 0, failures = 0;

  sova_soft_output dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int m = 0; m < 1024; m++)
        for (int x = -16; x < 16; x++) begin
          int e;
          dec_bit  = b[0];
          soft_mag = soft_t'(m);
          xe_del   = W_XE'(x);
          #1;
          e = sat4((b != 0 ? m : -m) - x);
          checks++;
          if (int'(ext) != e) begin
            failures++;
            if (failures < 10) $display("b=%0d m=%0d x=%0d got %0d exp %0d", b, m, x, ext, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

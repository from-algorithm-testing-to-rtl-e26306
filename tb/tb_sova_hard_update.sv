// tb_sova_hard_update: self-checking testbench of the hard-decision register
// exchange. A reference keeps the 16 survivor histories as queues and extends
// each by the history of the predecessor found by searching the encoder's
// next-state table; after every step all registers and the decoded bit of a
// random read state are compared.
module tb_sova_hard_update;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int unsigned DEPTH = TRUNC_LEN;

  logic clk = 0, rst_n = 0, clr = 0, upd_en = 0;
  logic [N_STATES-1:0] hard = '0;
  state_t rd_state = '0;
  logic [DEPTH-1:0] regs [N_STATES];
  logic dec_bit;

  int checks = 0, failures = 0;
  bit hist [16][DEPTH];  // hist[s][0] newest

  sova_hard_update #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit nh [16][DEPTH];
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (hist[s, j]) hist[s][j] = 0;
    @(negedge clk);
    for (int t = 0; t < 2000; t++) begin
      clr    = ($urandom_range(0, 499) == 0);
      upd_en = ($urandom_range(0, 7) != 0);
      hard   = N_STATES'($urandom);
      @(posedge clk);
      if (clr) begin
        foreach (hist[s, j]) hist[s][j] = 0;
      end else if (upd_en) begin
        for (int s = 0; s < 16; s++) begin
          int p;
          p = ref_pred(s, int'(hard[s]));
          nh[s][0] = hard[s];
          for (int j = 1; j < DEPTH; j++) nh[s][j] = hist[p][j-1];
        end
        hist = nh;
      end
      @(negedge clk);
      for (int s = 0; s < 16; s++)
        for (int j = 0; j < DEPTH; j++) begin
          checks++;
          if (regs[s][j] !== hist[s][j]) begin
            failures++;
            if (failures < 10) $display("t=%0d s=%0d j=%0d", t, s, j);
          end
        end
      rd_state = state_t'($urandom);
      #1;
      checks++;
      if (dec_bit !== hist[rd_state][DEPTH-1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

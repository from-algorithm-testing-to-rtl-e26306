// tb_sova_soft_update: self-checking testbench of the soft value register
// exchange. Hard values, deltas and hard-register contents are random each step
// (so survivor and competitor decisions differ often and rarely alike); a
// reference with predecessors from the encoder table applies the minimum rule.
// After every step the soft value of all 16 rows' oldest entry is read through
// the read-state multiplexer and compared.
module tb_sova_soft_update;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int unsigned DEPTH = TRUNC_LEN;

  logic clk = 0, rst_n = 0, clr = 0, upd_en = 0;
  logic [N_STATES-1:0] hard = '0;
  soft_t delta [N_STATES];
  logic [DEPTH-1:0] hregs [N_STATES];
  state_t rd_state = '0;
  soft_t soft_mag;

  int checks = 0, failures = 0, min_taken = 0;
  int sv [16][DEPTH];

  sova_soft_update #(.DEPTH(DEPTH)) dut (.*);

  always #50 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nv [16][DEPTH];
    foreach (delta[s]) delta[s] = '0;
    foreach (hregs[s]) hregs[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (sv[s, j]) sv[s][j] = 1023;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      clr    = ($urandom_range(0, 999) == 0);
      upd_en = ($urandom_range(0, 7) != 0);
      hard   = N_STATES'($urandom);
      foreach (delta[s]) delta[s] = soft_t'($urandom_range(0, 1023));
      // mostly agreeing histories with some disagreeing bits
      foreach (hregs[s]) hregs[s] = {$urandom, $urandom} & {$urandom, $urandom};
      @(posedge clk);
      if (clr) begin
        foreach (sv[s, j]) sv[s][j] = 1023;
      end else if (upd_en) begin
        for (int s = 0; s < 16; s++) begin
          int ps, pc;
          ps = ref_pred(s, int'(hard[s]));
          pc = ref_pred(s, 1 - int'(hard[s]));
          nv[s][0] = int'(delta[s]);
          for (int j = 1; j < DEPTH; j++) begin
            if (hregs[ps][j-1] != hregs[pc][j-1] && int'(delta[s]) < sv[ps][j-1]) begin
              nv[s][j] = int'(delta[s]);
              min_taken++;
            end else nv[s][j] = sv[ps][j-1];
          end
        end
        sv = nv;
      end
      @(negedge clk);
      for (int s = 0; s < 16; s++) begin
        rd_state = state_t'(s);
        #1;
        checks++;
        if (int'(soft_mag) != sv[s][DEPTH-1]) begin
          failures++;
          if (failures < 10) $display("t=%0d s=%0d got %0d exp %0d", t, s, soft_mag, sv[s][DEPTH-1]);
        end
      end
    end
    checks++;
    if (min_taken == 0) failures++;
    $display("minimum updates %0d", min_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

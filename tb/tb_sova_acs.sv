// tb_sova_acs: self-checking testbench of the add-compare-select unit.
// Random SNR, Y and X+E values (full range, so clipping and large deltas occur)
// are applied step by step, with occasional idle cycles and frame restarts; before
// every clock edge the hard values, deltas and best state are compared with the
// integer reference model.
module tb_sova_acs;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [W_SNR-1:0] snr = '0;
  logic signed [W_Y-1:0] y = '0;
  logic signed [W_XE-1:0] xe = '0;
  logic [N_STATES-1:0] hard;
  soft_t delta [N_STATES];
  state_t best_state;

  int checks = 0, failures = 0, cycles = 0;

  sova_acs dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sova_ref m;
    bit eh [16];
    int ed [16];
    int eb;
    m = new();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      start = ($urandom_range(0, 199) == 0);
      in_valid = ($urandom_range(0, 9) != 0);
      snr = W_SNR'($urandom);
      y   = W_Y'($urandom);
      xe  = W_XE'($urandom);
      if (t < 1000) begin  // moderate values first, then full range
        y  = W_Y'($signed(y) >>> 1);
        xe = W_XE'($signed(xe) >>> 1);
      end
      #1;
      if (!start && in_valid) begin
        m.step(int'(snr), int'(y), int'(xe), eh, ed, eb);
        for (int s = 0; s < 16; s++) begin
          checks++;
          if (hard[s] !== eh[s] || int'(delta[s]) != ed[s]) begin
            failures++;
            if (failures < 10) $display("t=%0d s=%0d hard %0d/%0d delta %0d/%0d", t, s, hard[s], eh[s], delta[s], ed[s]);
          end
        end
        checks++;
        if (int'(best_state) != eb) begin
          failures++;
          if (failures < 10) $display("t=%0d best %0d/%0d", t, best_state, eb);
        end
      end else if (start) begin
        m.init();
      end
    end
    $display("clip events %0d, delta saturations %0d", m.clip_events, m.delta_sat_events);
    checks++;
    if (m.clip_events == 0) begin failures++; $display("metric clipping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

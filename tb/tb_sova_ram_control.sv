// tb_sova_ram_control: self-checking testbench of the register supervision.
// Random step and start patterns; checks clear and write enables, that the read
// state is the best state of the last step, and that out_valid rises exactly
// after the DEPTH-th step of a frame and falls at start.
module tb_sova_ram_control;
  import sova_pkg::*;

  localparam int unsigned DEPTH = TRUNC_LEN;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  state_t best_state = '0;
  logic clr, upd_en, out_valid;
  state_t rd_state;

  int checks = 0, failures = 0;
  int steps = 0, valid_rises = 0;
  state_t exp_rd = '0;

  sova_ram_control #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("%0t: %s", $time, what);
    end
  endtask

  initial begin
    logic prev_valid;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev_valid = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      check(out_valid == (steps >= int'(DEPTH)), "out_valid");
      check(rd_state == exp_rd, "rd_state");
      if (out_valid && !prev_valid) valid_rises++;
      prev_valid = out_valid;
      start      = ($urandom_range(0, 299) == 0);
      in_valid   = ($urandom_range(0, 3) != 0);
      best_state = state_t'($urandom);
      #1;
      check(clr == start, "clr");
      check(upd_en == (in_valid && !start), "upd_en");
      @(posedge clk);
      if (start) begin steps = 0; exp_rd = '0; end
      else if (in_valid) begin steps++; exp_rd = best_state; end
    end
    check(valid_rises > 3, "out_valid rose too rarely");
    $display("out_valid rises %0d", valid_rises);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

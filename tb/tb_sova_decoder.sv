// tb_sova_decoder: end-to-end self-checking testbench of the SOVA decoder at its
// default size (truncation path length 50).
//
// Information bits are encoded with the RSC (37,21) encoder written out in the
// testbench, mapped to +/-4, disturbed with approximately Gaussian noise (sum of
// uniform variables), quantised to the 4-bit inputs and, for X+E, summed with a
// random a-priori value. Several frames are decoded: noiseless, all-ones input,
// noisy with random SNR weights and idle cycles between steps, and very noisy.
//
// For every output the testbench computes the expected decoded bit and
// extrinsic value independently: the add-compare-select runs in the integer
// reference model, and the decoded bit and its reliability are found by tracing
// the best path back through the stored decisions and, at every step on it,
// tracing the competing path back to the bit in question (the traceback form of
// the soft output Viterbi update). It checks the decoder's latency (first output
// exactly after the 50th step of a frame), that noiseless frames decode without
// error, and counts how often each mechanism occurred: metric clipping, minimum
// updates of soft values, saturated and unsaturated extrinsic outputs, idle
// cycles, frame restarts and corrected channel errors. One that never happens is
// a failure.
module tb_sova_decoder;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L    = TRUNC_LEN;
  localparam int NMAX = 1200;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [W_SNR-1:0] snr = '0;
  logic signed [W_Y-1:0] y = '0;
  logic signed [W_XE-1:0] xe = '0;
  logic out_valid, dec_bit;
  logic signed [W_OUT-1:0] ext_info;

  sova_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clip = 0, n_min = 0, n_sat = 0, n_unsat = 0, n_idle = 0, n_restart = 0;
  int n_corrected = 0, n_biterr = 0;
  int pred_tab [16][2];

  bit H [NMAX][16];
  int D [NMAX][16];
  int BS [NMAX];
  int XEV [NMAX];
  bit INFO [NMAX];
  bit CHD [NMAX];  // channel hard decision of the systematic symbol

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("%0t: FAIL %s", $time, what);
    end
  endtask

  function automatic int noise(int sigma4);
    // sum of four uniforms in [-sigma4, sigma4] / 2: roughly Gaussian
    int acc = 0;
    if (sigma4 == 0) return 0;
    for (int i = 0; i < 4; i++) acc += $urandom_range(0, 2 * sigma4) - sigma4;
    return acc / 2;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  // Expected output for bit k after step t (traceback SOVA).
  task automatic expected(input int t, input int k, output int hb, output int ext_e);
    int sp [NMAX];
    int st, rel;
    st = BS[t];
    for (int tau = t; tau >= k; tau--) begin
      sp[tau] = st;
      st = pred_tab[st][H[tau][st]];
    end
    hb = int'(H[k][sp[k]]);
    rel = 1023;
    for (int tau = k; tau <= t; tau++) begin
      int s, c, cb;
      s = sp[tau];
      if (tau == k) cb = 1 - hb;
      else begin
        c = pred_tab[s][1 - H[tau][s]];
        for (int tp = tau - 1; tp > k; tp--) c = pred_tab[c][H[tp][c]];
        cb = int'(H[k][c]);
      end
      if (cb != hb && D[tau][s] < rel) begin
        rel = D[tau][s];
        if (tau != k) n_min++;
      end
    end
    ext_e = sat4((hb != 0 ? rel : -rel) - XEV[k]);
  endtask

  // Decode one frame of n information bits followed by L-1 flush steps.
  task automatic run_frame(input int n, input int mode, input int sigma4,
                           input int snr_w, input int apri, input int gap_pct);
    sova_ref m;
    int es;
    int nsteps;
    m = new();
    nsteps = n + L - 1;
    @(negedge clk);
    start = 1; in_valid = 0;
    @(negedge clk);
    start = 0;
    n_restart++;
    es = 0;
    for (int t = 0; t < nsteps; t++) begin
      int u, p, xv, yv, ev, hb, ee;
      bit hh [16];
      int dd [16];
      int bb;
      // idle cycles between steps
      while ($urandom_range(0, 99) < gap_pct) begin
        in_valid = 0;
        @(negedge clk);
        n_idle++;
        check(out_valid == (t >= L), "out_valid held during idle");
      end
      if (t < n) begin
        u  = (mode == 1) ? 1 : int'($urandom_range(0, 1));
        p  = ref_parity(es, u);
        es = ref_next(es, u);
        xv = clampi((u != 0 ? 4 : -4) + noise(sigma4), -8, 7);
        yv = clampi((p != 0 ? 4 : -4) + noise(sigma4), -8, 7);
        ev = (apri == 0) ? 0 : int'($urandom_range(0, 2 * apri)) - apri + (u != 0 ? apri / 2 : -(apri / 2));
        ev = clampi(xv + ev, -16, 15);
        INFO[t] = bit'(u);
        CHD[t]  = (xv > 0);
      end else begin
        xv = 0; yv = 0; ev = 0;
      end
      in_valid = 1;
      snr = W_SNR'(snr_w);
      y   = W_Y'(yv);
      xe  = W_XE'(ev);
      XEV[t] = ev;
      m.step(snr_w, yv, ev, hh, dd, bb);
      for (int s = 0; s < 16; s++) begin H[t][s] = hh[s]; D[t][s] = dd[s]; end
      BS[t] = bb;
      @(negedge clk);
      in_valid = 0;
      // latency: output valid exactly from the L-th step on
      check(out_valid == (t >= L - 1), $sformatf("out_valid after step %0d", t));
      if (out_valid) begin
        int k;
        k = t - L + 1;
        expected(t, k, hb, ee);
        check(int'(dec_bit) == hb, $sformatf("dec_bit k=%0d", k));
        check(int'(ext_info) == ee, $sformatf("ext_info k=%0d got %0d exp %0d", k, ext_info, ee));
        if (ee == 7 || ee == -8) n_sat++; else n_unsat++;
        if (k < n) begin
          if (dec_bit != INFO[k]) n_biterr++;
          if (mode == 0 && sigma4 == 0) check(dec_bit == INFO[k], "noiseless frame decodes without error");
          if (CHD[k] != INFO[k] && dec_bit == INFO[k]) n_corrected++;
        end
      end
    end
    n_clip += m.clip_events;
  endtask

  initial begin
    for (int s = 0; s < 16; s++)
      for (int u = 0; u < 2; u++) pred_tab[s][u] = ref_pred(s, u);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(300, 0, 0, 4, 0, 0);   // noiseless
    $display("frame 1 (noiseless): bit errors %0d", n_biterr);
    n_biterr = 0;
    run_frame(300, 1, 3, 4, 0, 0);   // all-ones input, noisy
    $display("frame 2 (all ones, noisy): bit errors %0d", n_biterr);
    n_biterr = 0;
    run_frame(500, 0, 4, 6, 3, 30);  // noisy, a-priori, idle cycles
    $display("frame 3 (noisy, idle cycles): bit errors %0d", n_biterr);
    n_biterr = 0;
    run_frame(300, 0, 8, 15, 6, 0);  // very noisy, large weights
    $display("frame 4 (very noisy): bit errors %0d", n_biterr);
    $display("mechanisms: clip=%0d soft-min=%0d ext-sat=%0d ext-unsat=%0d idle=%0d restart=%0d corrected=%0d",
             n_clip, n_min, n_sat, n_unsat, n_idle, n_restart, n_corrected);
    check(n_clip > 0, "metric clipping never happened");
    check(n_min > 0, "soft value minimum update never happened");
    check(n_sat > 0, "extrinsic saturation never happened");
    check(n_unsat > 0, "unsaturated extrinsic never happened");
    check(n_idle > 0, "idle cycles never happened");
    check(n_restart > 1, "frame restart never happened");
    check(n_corrected > 0, "no channel error was corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

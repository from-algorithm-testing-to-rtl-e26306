// tb_sova_awgn_frames: workload testbench. Decodes two interleaver-sized frames
// of 128 x 128 = 16384 bits, one component decoder pass, BPSK over an AWGN
// channel at Eb/N0 = 2.5 dB for the rate-1/2 code (noise from the Box-Muller
// transform), quantised to the 4-bit inputs with an amplitude of 3 levels. The
// first frame has all-ones encoder input, the second random bits. Every decoded
// bit and extrinsic value is compared with the traceback reference, the decoded
// bit error rate must be below the raw channel error rate, and a histogram of
// the extrinsic values is printed.
module tb_sova_awgn_frames;
  import sova_pkg::*;
  import sova_ref_pkg::*;

  localparam int L    = TRUNC_LEN;
  localparam int NMAX = 16384 + TRUNC_LEN;

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
    #100ms;
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

  function automatic real gauss(real sigma);
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000000.0;
    u2 = (real'($urandom_range(0, 999999))) / 1000000.0;
    return sigma * $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic int quant(real v);
    return clampi(int'($floor(v + 0.5)), -8, 7);
  endfunction

  int hist [16];
  int n_chan_err = 0;

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
  task automatic run_frame(input int n, input int mode, input real sig,
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
        xv = quant((u != 0 ? 3.0 : -3.0) + gauss(sig));
        yv = quant((p != 0 ? 3.0 : -3.0) + gauss(sig));
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
        if (k < n) hist[ee + 8]++;
        if (k < n) begin
          if (dec_bit != INFO[k]) n_biterr++;
          if (CHD[k] != INFO[k] && dec_bit == INFO[k]) n_corrected++;
          if (CHD[k] != INFO[k]) n_chan_err++;
        end
      end
    end
    n_clip += m.clip_events;
  endtask

  initial begin
    real sig;
    // Eb/N0 = 2.5 dB, rate 1/2: Es/N0 = 10^(0.25)/2, sigma^2 = 1/(2 Es/N0),
    // scaled by the amplitude of 3 quantisation levels.
    sig = 3.0 * $sqrt(1.0 / (2.0 * ($pow(10.0, 0.25) / 2.0)));
    for (int s = 0; s < 16; s++)
      for (int u = 0; u < 2; u++) pred_tab[s][u] = ref_pred(s, u);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      foreach (hist[i]) hist[i] = 0;
      n_biterr = 0; n_chan_err = 0;
      run_frame(16384, f == 0 ? 1 : 0, sig, 4, 0, 0);
      $display("frame %0d (%s): channel errors %0d, decoded errors %0d of 16384",
               f, f == 0 ? "all ones" : "random bits", n_chan_err, n_biterr);
      $write("extrinsic histogram -8..7:");
      foreach (hist[i]) $write(" %0d", hist[i]);
      $write("\n");
      check(n_biterr < n_chan_err, "decoding does not reduce the error rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

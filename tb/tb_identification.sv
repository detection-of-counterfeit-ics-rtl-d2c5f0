`timescale 1ns/1ps
// tb_identification: the identification experiment, run on two protection
// circuits at their default size. One part is genuine and the other is a
// counterfeit carrying another key. Both are programmed, reset, and watched
// for the first 50 000 keystream cycles (plus calibration and warm-up).
//
// The compressed EM measurement of a part is modelled as one value per clock:
// the number of active leakage circuits plus Gaussian noise (sigma 8, about
// the size of the full signal). The manufacturer side is modelled too. A
// spec-level Trivium model gives the keystream of the genuine key. Ten
// identification sequences of 1000 bits are taken at random non-overlapping
// offsets, with 10 % of their bits flipped.
//
// Each sequence is correlated (Pearson) with both measurements at its own
// offset, and with the genuine measurement at 100 wrong offsets. The
// threshold is tanh(z / sqrt(L - 3)) with z = 7. The genuine part must exceed
// it at every correct offset, and nothing else may reach it. The calibration
// cycles must also correlate with the alternating 1,0,... pattern.
module tb_identification;
  import trivium_ref_pkg::*;
  import cid_pkg::*;
  localparam int KS    = 50_000;         // keystream cycles recorded
  localparam int PRE   = TRIV_WARMUP;    // calibration + gap before bit 0
  localparam int L     = 1000;           // identification sequence length
  localparam int NSEQ  = 10;
  localparam int WRONG = 100;            // wrong offsets tried per sequence
  localparam real Z    = 7.0;
  localparam real SIGMA = 8.0;

  logic clk = 0, rst_n = 0, pin_g = 0, pin_c = 0;
  logic init_g, init_c, cen_g, cen_c, leak_g, leak_c;
  ce_phase_e ph_g, ph_c;
  logic [9:0] lc_en_g, lc_en_c, lc_out_g, lc_out_c;
  int checks = 0, failures = 0;

  real meas_g [PRE + KS];
  real meas_c [PRE + KS];
  bit  ks     [KS];
  bit  seq    [NSEQ][L];
  int  offs   [NSEQ];

  ic_protection genuine (.clk, .rst_n, .pin(pin_g), .initialized(init_g),
                         .crypto_en(cen_g), .leakage_en(leak_g), .phase(ph_g),
                         .lc_en(lc_en_g), .lc_out(lc_out_g));
  ic_protection fake    (.clk, .rst_n, .pin(pin_c), .initialized(init_c),
                         .crypto_en(cen_c), .leakage_en(leak_c), .phase(ph_c),
                         .lc_en(lc_en_c), .lc_out(lc_out_c));

  always #10 clk = ~clk;

  initial begin
    repeat (PRE + KS + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom()) / 4294967296.0;
    return s - 6.0;
  endfunction

  // Pearson correlation of sequence j with the measurement from sample base
  function automatic real rho(input bit genuine_part, input int j, input int base);
    real sm, ss, smm, sss, sms, m, s, cov, vm, vs;
    sm = 0.0; ss = 0.0; smm = 0.0; sss = 0.0; sms = 0.0;
    for (int i = 0; i < L; i++) begin
      m = genuine_part ? meas_g[base + i] : meas_c[base + i];
      s = seq[j][i] ? 1.0 : 0.0;
      sm += m; ss += s; smm += m * m; sss += s * s; sms += m * s;
    end
    cov = sms - sm * ss / L;
    vm  = smm - sm * sm / L;
    vs  = sss - ss * ss / L;
    return cov / $sqrt(vm * vs);
  endfunction

  function automatic real threshold();
    real k2;
    k2 = Z / $sqrt(real'(L - 3));
    return ($exp(2.0 * k2) - 1.0) / ($exp(2.0 * k2) + 1.0);
  endfunction

  initial begin
    key_t k, kf;
    iv_t  v;
    trivium_ref r;
    real  thr, c, cmax;
    int   n, w;
    r = new();
    k  = {$urandom(), $urandom(), 16'($urandom())};
    kf = {$urandom(), $urandom(), 16'($urandom())};
    v  = {$urandom(), $urandom(), 16'($urandom())};

    // manufacturer: keystream of the genuine key and ten published sequences
    r.init(k, v);
    for (int i = 0; i < KS; i++) ks[i] = r.next();
    for (int j = 0; j < NSEQ; j++) begin
      offs[j] = j * (KS / NSEQ) + int'($urandom_range(KS / NSEQ - L));
      for (int i = 0; i < L; i++)
        seq[j][i] = ks[offs[j] + i] ^ ($urandom_range(9) == 0);
    end

    // programming: the same serial protocol into both parts
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    pin_g = 1; pin_c = 1;
    @(negedge clk);
    for (int i = 0; i < 80; i++) begin pin_g = k[i]; pin_c = kf[i]; @(negedge clk); end
    for (int i = 0; i < 80; i++) begin pin_g = v[i]; pin_c = v[i];  @(negedge clk); end
    pin_g = 0; pin_c = 0;
    repeat (3) @(negedge clk);

    // reset, then record one compressed sample per clock from engine cycle 0
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    n = 0;
    while (!cen_g && n < 400) begin @(negedge clk); n++; end
    expect_true("both parts initialised", init_g && init_c && cen_c);
    @(negedge clk);
    for (int cyc = 0; cyc < PRE + KS; cyc++) begin
      #1;
      meas_g[cyc] = real'($countones(lc_en_g)) + SIGMA * gauss();
      meas_c[cyc] = real'($countones(lc_en_c)) + SIGMA * gauss();
      @(negedge clk);
    end
    expect_true("genuine part still leaking keystream", ph_g == CE_KS);

    thr = threshold();
    $display("threshold for L=%0d, z=%0.0f: %f", L, Z, thr);

    // calibration: reuse slot 0 for the alternating pattern
    for (int i = 0; i < L; i++) seq[0][i] = (i % 2 == 0);
    c = rho(1, 0, 0);
    $display("calibration correlation %f", c);
    expect_true("calibration pattern found", c >= thr);
    for (int i = 0; i < L; i++) seq[0][i] = ks[offs[0] + i] ^ ($urandom_range(9) == 0);

    cmax = 0.0;
    for (int j = 0; j < NSEQ; j++) begin
      c = rho(1, j, PRE + offs[j]);
      $display("sequence %0d at offset %0d: genuine %f, counterfeit %f",
               j, offs[j], c, rho(0, j, PRE + offs[j]));
      expect_true($sformatf("genuine part identified by sequence %0d", j), c >= thr);
      c = rho(0, j, PRE + offs[j]);
      expect_true($sformatf("counterfeit rejected by sequence %0d", j),
                  c < thr && c > -thr);
      for (int t = 0; t < WRONG; t++) begin
        w = int'($urandom_range(KS - L));
        if (w == offs[j]) w = (w + 1) % (KS - L);
        c = rho(1, j, PRE + w);
        if (c < 0.0) c = -c;
        if (c > cmax) cmax = c;
        expect_true($sformatf("sequence %0d below threshold at wrong offset %0d", j, w),
                    c < thr);
      end
    end
    $display("largest |correlation| at a wrong offset: %f", cmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

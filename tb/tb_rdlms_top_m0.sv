// tb_rdlms_top_m0: end-to-end testbench of the adaptive filter with
// MULT_STAGES = 0, i.e. no registers behind the multipliers: the plain,
// non-retimed transposed-form DLMS. Its adaptation delay is m = 3; y(k)
// appears after k+2 and e(k) after k+3 enabled edges.
//
// Workload and checks are those of tb_rdlms_top: noise cancellation of
// 20000 samples of tone bursts, with white noise reaching d through the
// 4-tap path h = (0.5, -0.3, 0.2, 0.1) and a random sample enable. On every
// cycle y, e and all weights must equal a sample-by-sample model of the
// delayed-LMS equations; the first weight change must follow the first
// nonzero error on e by M+1 = 1 enabled edge; the residual noise in e must
// fall by at least 10 dB and by 3 dB more than in the first 500 samples;
// stalls and weight updates must occur.
module tb_rdlms_top_m0;
  localparam int W     = 8;
  localparam int TAPS  = 4;
  localparam int M     = 0;               // register stages per multiplier
  localparam int L     = 2 * M + 3;       // adaptation delay
  localparam int SH    = 7 + 3;           // 2^-7 format, 2mu = 2^-3
  localparam int NSAMP = 20000;
  localparam real PI   = 3.14159265358979;

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0] x, d, y, e;
  logic signed [W-1:0] w [TAPS];

  int checks = 0;
  int failures = 0;
  int n = 0;
  int stalls = 0, updates = 0, delay_checks = 0;

  int hx [NSAMP + 16];
  int hd [NSAMP + 16];
  int hs [NSAMP + 16];
  int yref [NSAMP + 16];
  int eref [NSAMP + 16];
  int wref [NSAMP + 16][TAPS];
  int h [TAPS] = '{64, -38, 26, 13};

  always #5 clk = ~clk;

  rdlms_top #(.MULT_STAGES(M)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .d(d), .y(y), .e(e), .w(w)
  );

  function automatic int sat(int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  // round(v / 2^s), halves rounded up, written with division
  function automatic int round_div(int v, int s);
    int q = 1 << s;
    int t = v + q / 2;
    return (t >= 0) ? (t / q) : -((-t + q - 1) / q);
  endfunction

  // Model: sample k has been applied at enabled edge k.
  task automatic model_step(int k);
    int acc = 0;
    for (int j = 0; j < TAPS; j++)
      if (k - j >= 0) acc += wref[k-j][j] * hx[k-j];
    yref[k] = sat(round_div(acc, 7));
    eref[k] = sat(hd[k] - yref[k]);
    for (int i = 0; i < TAPS; i++) begin
      int dl = 0;
      if (k - L - i >= 0) dl = round_div(eref[k-L] * hx[k-L-i], SH);
      wref[k+1][i] = sat(wref[k][i] + dl);
      if (dl != 0) updates++;
    end
  endtask

  // Speech-like clean signal: tone bursts of varying pitch and loudness
  // with pauses, a non-stationary signal the filter must leave untouched.
  function automatic int clean(int k);
    int seg = k / 700;
    int pos = k % 700;
    real amp, f;
    if (seg % 3 == 2) return 0;                     // pause
    amp = 20.0 + 10.0 * (seg % 4);
    f = 0.01 + 0.004 * (seg % 5);
    amp = amp * $sin(PI * pos / 700.0);            // burst envelope
    return $rtoi(amp * $sin(2.0 * PI * f * k));
  endfunction

  initial begin : watchdog
    repeat (2 * NSAMP + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int noise, k;
    int first_e_n, first_w_n;
    real p_in0, p_out0, p_in1, p_out1, gain0, gain1;
    first_e_n = -1; first_w_n = -1;
    p_in0 = 0.0; p_out0 = 0.0; p_in1 = 0.0; p_out1 = 0.0;
    for (int i = 0; i < TAPS; i++) wref[0][i] = 0;
    rst_n = 1'b0; en = 1'b0; x = '0; d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n < NSAMP) begin
      @(negedge clk);
      // Compare outputs after n enabled edges.
      k = n - M - 2;
      checks++;
      if (int'(y) != ((k >= 0) ? yref[k] : 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, yref[k]);
      end
      k = n - M - 3;
      checks++;
      if (int'(e) != ((k >= 0) ? eref[k] : 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d e=%0d expected %0d", n, e, eref[k]);
      end
      for (int i = 0; i < TAPS; i++) begin
        checks++;
        if (int'(w[i]) != wref[n][i]) begin
          failures++;
          if (failures < 10) $display("n=%0d w[%0d]=%0d expected %0d", n, i, w[i], wref[n][i]);
        end
      end
      // Delayed update seen on the ports.
      if (first_e_n < 0 && e != 0) first_e_n = n;
      if (first_w_n < 0 && (w[0] != 0 || w[1] != 0 || w[2] != 0 || w[3] != 0)) begin
        first_w_n = n;
        delay_checks++;
        checks++;
        if (first_e_n < 0 || first_w_n - first_e_n != M + 1) begin
          failures++;
          $display("first weight change at %0d, first error at %0d", first_w_n, first_e_n);
        end
      end
      // Next sample.
      en = (n < 16) || ($urandom_range(0, 9) != 0);
      if (en) begin
        if (n < 8) begin
          hx[n] = 100; hs[n] = 0;
        end else begin
          hx[n] = int'($urandom_range(0, 127)) - 64;
          hs[n] = clean(n);
        end
        noise = 0;
        for (int j = 0; j < TAPS; j++) if (n - j >= 0) noise += h[j] * hx[n-j];
        hd[n] = sat(hs[n] + round_div(noise, 7));
        x = W'(hx[n]);
        d = W'(hd[n]);
        model_step(n);
        // Residual noise before and after adaptation.
        if (n >= 8 && n < 508) begin
          p_in0  += real'((hd[n] - hs[n]) ** 2);
          p_out0 += real'((eref[n] - hs[n]) ** 2);
        end
        if (n >= NSAMP - 5000) begin
          p_in1  += real'((hd[n] - hs[n]) ** 2);
          p_out1 += real'((eref[n] - hs[n]) ** 2);
        end
        n++;
      end else begin
        stalls++;
        x = W'($urandom);   // ignored while en = 0
        d = W'($urandom);
      end
    end
    gain0 = 10.0 * $log10(p_in0 / (p_out0 + 1.0e-9));
    gain1 = 10.0 * $log10(p_in1 / (p_out1 + 1.0e-9));
    $display("noise reduction: first 500 samples %0.1f dB, last 5000 samples %0.1f dB", gain0, gain1);
    $display("final weights %0d %0d %0d %0d (path %0d %0d %0d %0d)",
             w[0], w[1], w[2], w[3], h[0], h[1], h[2], h[3]);
    $display("stalls=%0d weight_updates=%0d delayed_update_checks=%0d", stalls, updates, delay_checks);
    checks++;
    if (gain1 < 10.0 || gain1 < gain0 + 3.0) begin failures++; $display("noise not cancelled"); end
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    if (updates == 0) begin failures++; $display("no weight update"); end
    if (delay_checks == 0) begin failures++; $display("delayed update not observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

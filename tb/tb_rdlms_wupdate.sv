// tb_rdlms_wupdate: self-checking testbench of the weight update block.
//
// Random samples x and random error words e are applied with a random
// sample enable. The testbench keeps its own weight vector and updates it
// once per enabled edge with the delayed coefficient update written out
// from the equations:
//   w_i <- sat( w_i + round( e(j-M) * x(j-M-E_LAT-i) / 2^(7+MU_SHIFT) ) )
// at enabled edge j, where e(j-M) is the error word applied M = 2 edges
// earlier (the update multiplier's pipeline) and the sample is the one
// applied E_LAT + M + i edges earlier (E_LAT = 5, the error latency of the
// top level). Values before the first edge are zero. All weights are
// compared on every cycle. Saturation of a weight at both limits, positive
// and negative updates and stalls are counted and must each occur.
module tb_rdlms_wupdate;
  localparam int unsigned W        = 8;
  localparam int unsigned TAPS     = 4;
  localparam int unsigned M        = 2;
  localparam int unsigned MU_SHIFT = 3;
  localparam int unsigned E_LAT    = 5;
  localparam int          NSAMP    = 6000;

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0] x, e;
  logic signed [W-1:0] w [TAPS];

  int checks = 0;
  int failures = 0;
  int n = 0;
  int stalls = 0, sat_hi = 0, sat_lo = 0, upd_pos = 0, upd_neg = 0;
  int hx [NSAMP + 8];
  int he [NSAMP + 8];
  int wref [TAPS];

  always #5 clk = ~clk;

  rdlms_wupdate #(
    .W(W), .TAPS(TAPS), .MULT_STAGES(M), .MU_SHIFT(MU_SHIFT), .E_LAT(E_LAT)
  ) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .e(e), .w(w)
  );

  function automatic int hist(ref int h [NSAMP + 8], input int j);
    return (j >= 0) ? h[j] : 0;
  endfunction

  // round(v / 2^s), halves rounded up, without shifts
  function automatic int round_div(int v, int s);
    int q = 1 << s;
    int t = v + q / 2;
    return (t >= 0) ? (t / q) : -((-t + q - 1) / q);
  endfunction

  initial begin : watchdog
    repeat (3 * NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int j, delta, nw;
    rst_n = 1'b0; en = 1'b0; x = '0; e = '0;
    for (int i = 0; i < int'(TAPS); i++) wref[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n < NSAMP) begin
      @(negedge clk);
      for (int i = 0; i < int'(TAPS); i++) begin
        checks++;
        if (int'(w[i]) != wref[i]) begin
          failures++;
          if (failures < 10) $display("n=%0d w[%0d]=%0d expected %0d", n, i, w[i], wref[i]);
        end
      end
      en = ($urandom_range(0, 3) != 0);
      x = W'($urandom);
      // Long runs of one error sign drive the weights into saturation.
      case ((n / 300) % 3)
        0: e = W'($urandom_range(0, 127));
        1: e = -W'($urandom_range(0, 128));
        default: e = W'($urandom);
      endcase
      if (en) begin
        hx[n] = int'(x);
        he[n] = int'(e);
        // Update applied at this edge (index n).
        j = n;
        for (int i = 0; i < int'(TAPS); i++) begin
          delta = round_div(hist(he, j - int'(M)) * hist(hx, j - int'(M) - int'(E_LAT) - i),
                            int'(W) - 1 + int'(MU_SHIFT));
          nw = wref[i] + delta;
          if (delta > 0) upd_pos++;
          if (delta < 0) upd_neg++;
          if (nw > 127) begin nw = 127; sat_hi++; end
          if (nw < -128) begin nw = -128; sat_lo++; end
          wref[i] = nw;
        end
        n++;
      end else stalls++;
    end
    $display("stalls=%0d upd_pos=%0d upd_neg=%0d saturate_high=%0d saturate_low=%0d",
             stalls, upd_pos, upd_neg, sat_hi, sat_lo);
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    if (upd_pos == 0 || upd_neg == 0) begin failures++; $display("update sign not exercised"); end
    if (sat_hi == 0) begin failures++; $display("no positive saturation"); end
    if (sat_lo == 0) begin failures++; $display("no negative saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_rdlms_filter: self-checking testbench of the transposed-form filter
// block.
//
// Random 8-bit samples x and random weights that change every sample are
// applied with a random sample enable. The testbench keeps the history of
// both and computes, independently of the block's structure, what a
// transposed FIR with two-register multipliers must produce: tap j uses the
// weight it had j samples earlier,
//   acc(k) = sum_j w_j(k-j) x(k-j),  y(k) = sat(round(acc(k) / 2^7)),
// with acc(k) visible after k+M+1 and y(k) after k+M+2 enabled edges
// (M = 2). Every enabled and stalled cycle is checked, so the latency is
// checked too. Large weights make the output saturate; the testbench counts
// saturations in both directions and stalls, and fails if one never occurs.
module tb_rdlms_filter;
  localparam int unsigned W    = 8;
  localparam int unsigned TAPS = 4;
  localparam int unsigned M    = 2;
  localparam int          NSAMP = 5000;

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0] x;
  logic signed [W-1:0] w [TAPS];
  logic signed [2*W+$clog2(TAPS):0] acc;
  logic signed [W-1:0] y;

  int checks = 0;
  int failures = 0;
  int n = 0;
  int stalls = 0, sat_hi = 0, sat_lo = 0;
  int hx [NSAMP + 8];
  int hw [NSAMP + 8][TAPS];

  always #5 clk = ~clk;

  rdlms_filter dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .w(w), .acc(acc), .y(y)
  );

  function automatic int ref_acc(int k);
    int s = 0;
    if (k < 0) return 0;
    for (int j = 0; j < int'(TAPS); j++)
      if (k - j >= 0) s += hw[k-j][j] * hx[k-j];
    return s;
  endfunction

  function automatic int ref_y(int k);
    int r;
    if (k < 0) return 0;
    r = ref_acc(k);
    // round half up, then divide by 2^7 (floor)
    r = r + 64;
    r = (r >= 0) ? (r / 128) : -((-r + 127) / 128);
    if (r > 127) r = 127;
    if (r < -128) r = -128;
    return r;
  endfunction

  initial begin : watchdog
    repeat (3 * NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ea, k;
    rst_n = 1'b0; en = 1'b0; x = '0;
    for (int i = 0; i < int'(TAPS); i++) w[i] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n < NSAMP) begin
      @(negedge clk);
      ea = ref_acc(n - int'(M) - 1);
      ey = ref_y(n - int'(M) - 2);
      checks += 2;
      if (int'(acc) != ea) begin
        failures++;
        if (failures < 10) $display("n=%0d acc=%0d expected %0d", n, acc, ea);
      end
      if (int'(y) != ey) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d expected %0d", n, y, ey);
      end
      k = n - int'(M) - 2;
      if (k >= 0 && en) begin
        if (ey == 127 && ref_acc(k) + 64 >= 128 * 128) sat_hi++;
        if (ey == -128 && ref_acc(k) + 64 < -128 * 128) sat_lo++;
      end
      en = ($urandom_range(0, 4) != 0);
      x = W'($urandom);
      // Weight sets: mostly moderate, every 50 samples a run of extremes.
      for (int i = 0; i < int'(TAPS); i++) begin
        if ((n / 50) % 4 == 3) w[i] = (x[W-1] ^ i[0]) ? -128 : 127;
        else                    w[i] = W'($urandom_range(0, 127)) - 64;
      end
      if (en) begin
        hx[n] = int'(x);
        for (int i = 0; i < int'(TAPS); i++) hw[n][i] = int'(w[i]);
        n++;
      end else stalls++;
    end
    $display("stalls=%0d saturate_high=%0d saturate_low=%0d", stalls, sat_hi, sat_lo);
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    if (sat_hi == 0) begin failures++; $display("no positive saturation"); end
    if (sat_lo == 0) begin failures++; $display("no negative saturation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

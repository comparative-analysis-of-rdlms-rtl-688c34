// tb_rdlms_error: self-checking testbench of the error unit.
//
// Random desired samples d and random filter outputs y are applied with a
// random sample enable. With the alignment delay D = 4 (the filter latency
// for two-register multipliers), the error register must hold, after n
// enabled edges, e = sat(d(n-1-D) - y(n-1)), where d(j) and y(j) are the
// values present at enabled edge j and d of a negative index is the reset
// value zero. Extreme operand pairs are forced so that the difference
// saturates in both directions; stalls and saturations are counted and must
// each occur.
module tb_rdlms_error;
  localparam int unsigned W     = 8;
  localparam int unsigned D     = 4;
  localparam int          NSAMP = 5000;

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0] d, y, e;

  int checks = 0;
  int failures = 0;
  int n = 0;
  int stalls = 0, sat_hi = 0, sat_lo = 0;
  int hd [NSAMP + 8];
  int hy [NSAMP + 8];

  always #5 clk = ~clk;

  rdlms_error #(.W(W), .D_DELAY(D)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .d(d), .y(y), .e(e)
  );

  initial begin : watchdog
    repeat (3 * NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ee, dd, diff;
    rst_n = 1'b0; en = 1'b0; d = '0; y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n < NSAMP) begin
      @(negedge clk);
      if (n == 0) ee = 0;
      else begin
        dd = (n - 1 - int'(D) >= 0) ? hd[n - 1 - int'(D)] : 0;
        diff = dd - hy[n-1];
        ee = (diff > 127) ? 127 : (diff < -128) ? -128 : diff;
      end
      checks++;
      if (int'(e) != ee) begin
        failures++;
        if (failures < 10) $display("n=%0d e=%0d expected %0d", n, e, ee);
      end
      en = ($urandom_range(0, 3) != 0);
      d = W'($urandom);
      y = W'($urandom);
      if (en) begin
        hd[n] = int'(d);
        hy[n] = int'(y);
        if (n - int'(D) >= 0) begin
          diff = hd[n - int'(D)] - int'(y);
          if (diff > 127) sat_hi++;
          if (diff < -128) sat_lo++;
        end
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

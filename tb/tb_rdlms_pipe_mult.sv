// tb_rdlms_pipe_mult: self-checking testbench of the pipelined multiplier.
//
// Two instances are driven with the same random signed operands and a
// random sample enable: the default two-stage multiplier and a
// combinational one (STAGES = 0). The testbench records the operands at
// every enabled edge and expects, after n enabled edges, the product of the
// operands of edge n-STAGES (zero while the pipeline still holds its reset
// value). Operand extremes (-128 * -128, 127 * -128) are forced regularly.
module tb_rdlms_pipe_mult;
  localparam int unsigned W      = 8;
  localparam int unsigned STAGES = 2;
  localparam int          NSAMP  = 4000;

  logic clk;
  initial clk = 1'b0;
  logic rst_n;
  logic en;
  logic signed [W-1:0]   a, b;
  logic signed [2*W-1:0] p2, p0;

  int checks = 0;
  int failures = 0;
  int n = 0;
  int stalls = 0;
  int hist_p [NSAMP + 8];

  always #5 clk = ~clk;

  rdlms_pipe_mult #(.A_W(W), .B_W(W)) dut2 (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .p(p2)
  );
  rdlms_pipe_mult #(.A_W(W), .B_W(W), .STAGES(0)) dut0 (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .p(p0)
  );

  initial begin : watchdog
    repeat (3 * NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    rst_n = 1'b0; en = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (n < NSAMP) begin
      @(negedge clk);
      // Two-stage output: product of edge n-STAGES.
      expected = (n >= int'(STAGES)) ? hist_p[n - int'(STAGES)] : 0;
      checks++;
      if (int'(p2) != expected) begin
        failures++;
        if (failures < 10) $display("n=%0d p2=%0d expected %0d", n, p2, expected);
      end
      // Choose the next operands and enable.
      en = ($urandom_range(0, 3) != 0);
      if ((n % 97) == 5)       begin a = -128; b = -128; end
      else if ((n % 97) == 6)  begin a = 127;  b = -128; end
      else begin a = W'($urandom); b = W'($urandom); end
      #1;
      checks++;
      if (int'(p0) != int'(a) * int'(b)) begin
        failures++;
        if (failures < 10) $display("p0=%0d a=%0d b=%0d", p0, a, b);
      end
      if (en) begin
        hist_p[n] = int'(a) * int'(b);
        n++;
      end else stalls++;
    end
    if (stalls == 0) begin failures++; $display("no stall exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

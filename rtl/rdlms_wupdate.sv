// rdlms_wupdate: weight update block of the RDLMS adaptive filter, the
// delayed coefficient update
//   w_i(n+1) = w_i(n) + 2mu * e(n-m) * x(n-m-i),   i = 0 .. TAPS-1.
//
// How it works: the input samples run down a delay line (the z^-1 chain
// under the weight update multipliers). Tap i reads the sample that belongs
// with the error word currently in e, i.e. x delayed by E_LAT+i samples,
// and multiplies it by e in a multiplier with MULT_STAGES pipeline
// registers. The product (Q2.14 for 8 bits) is scaled by 2mu = 2^-MU_SHIFT
// and brought back to the weight format by one arithmetic shift with
// rounding (half up), and added to the weight register with saturation.
//
// The adaptation delay m is the number of samples between forming y(n) and
// using e(n) in the update. With the error arriving E_LAT samples after its
// input sample and MULT_STAGES more in the update multiplier,
// m = E_LAT + MULT_STAGES (2*MULT_STAGES + 3 = 7 with the defaults of the
// top level). The update loop (weight register -> filter -> error -> update
// multiplier -> weight register) holds these delays instead of a single
// long combinational path; this placement of the delays is the retiming.
// The structure follows the architecture; the step size, rounding,
// saturation and zero reset of the weights are choices of this
// implementation.
//
// Interface: one sample per enabled clock (en = 1); all registers hold while
// en = 0. x is the raw input sample (the same one the filter block sees), e
// the registered error. w holds the current weights.
module rdlms_wupdate #(
  parameter int unsigned W           = rdlms_pkg::DEF_DATA_W,
  parameter int unsigned TAPS        = rdlms_pkg::DEF_N_TAPS,
  parameter int unsigned MULT_STAGES = rdlms_pkg::DEF_MULT_STAGES,
  parameter int unsigned MU_SHIFT    = rdlms_pkg::DEF_MU_SHIFT,
  // Samples between x(k) on the input and e(k) in the error register.
  parameter int unsigned E_LAT       = rdlms_pkg::y_latency(rdlms_pkg::DEF_MULT_STAGES) + 1,
  localparam int unsigned PROD_W     = 2 * W,
  localparam int unsigned LINE       = E_LAT + TAPS - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] e,
  output logic signed [W-1:0] w [TAPS]
);

  localparam int unsigned SH = W - 1 + MU_SHIFT;
  localparam logic signed [PROD_W:0] ROUND = (PROD_W+1)'(1) <<< (SH - 1);
  localparam logic signed [PROD_W:0] W_MAX = (PROD_W+1)'((1 << (W - 1)) - 1);
  localparam logic signed [PROD_W:0] W_MIN = -((PROD_W+1)'(1) <<< (W - 1));

  // Input delay line: x_q[j] holds x delayed by j+1 samples.
  logic signed [W-1:0] x_q [LINE];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(LINE); j++) x_q[j] <= '0;
    end else if (en) begin
      x_q[0] <= x;
      for (int j = 1; j < int'(LINE); j++) x_q[j] <= x_q[j-1];
    end
  end

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    logic signed [PROD_W-1:0] upd;
    logic signed [PROD_W:0]   delta;
    logic signed [PROD_W:0]   w_next;

    rdlms_pipe_mult #(.A_W(W), .B_W(W), .STAGES(MULT_STAGES)) u_mult (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .a    (e),
      .b    (x_q[E_LAT-1+i]),
      .p    (upd)
    );

    // 2mu scaling and return to the weight format, rounded.
    assign delta  = ((PROD_W+1)'(upd) + ROUND) >>> SH;
    assign w_next = (PROD_W+1)'(w[i]) + delta;

    always_ff @(posedge clk) begin
      if (!rst_n)
        w[i] <= '0;
      else if (en) begin
        if (w_next > W_MAX)      w[i] <= W'(W_MAX);
        else if (w_next < W_MIN) w[i] <= W'(W_MIN);
        else                     w[i] <= W'(w_next);
      end
    end
  end

endmodule

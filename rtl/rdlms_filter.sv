// rdlms_filter: filter block of the RDLMS adaptive filter, a transposed-form
// FIR whose weights come from the weight update block.
//
// How it works: the current input sample x is broadcast to all N_TAPS
// multipliers, tap i forming w[i]*x. Each product passes through the
// multiplier's MULT_STAGES pipeline registers and enters a chain of adders
// separated by one register each (the transposed FIR structure): register i
// holds product i plus register i+1, register N_TAPS-1 holds product
// N_TAPS-1 alone. Register 0 is the full-precision sum; it is rounded to the
// nearest DATA_W-bit value (Q1.7 for 8 bits, round half up), saturated, and
// stored in the output register y.
//
// Because the partial sums walk down the chain one register per sample, tap
// j contributes the weight it had j samples earlier:
//   y(k) = sat(round( sum_j w_j(k-j) * x(k-j) )),
// which is the known behaviour of a transposed-form adaptive filter. The
// transposed structure and the delays behind each multiplier follow the
// architecture; the rounding, saturation and output register are choices of
// this implementation.
//
// Interface: one sample per enabled clock (en = 1); all registers hold while
// en = 0. Timing: y(k) is in y MULT_STAGES+2 enabled edges after x(k) was
// applied; acc, the unrounded sum, is one edge earlier.
module rdlms_filter
#(
  parameter int unsigned W           = rdlms_pkg::DEF_DATA_W,
  parameter int unsigned TAPS        = rdlms_pkg::DEF_N_TAPS,
  parameter int unsigned MULT_STAGES = rdlms_pkg::DEF_MULT_STAGES,
  localparam int unsigned PROD_W     = 2 * W,
  localparam int unsigned ACC_W      = PROD_W + $clog2(TAPS) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [W-1:0]     x,
  input  logic signed [W-1:0]     w   [TAPS],
  output logic signed [ACC_W-1:0] acc,
  output logic signed [W-1:0]     y
);

  localparam logic signed [ACC_W-1:0] ROUND = ACC_W'(1) <<< (W - 2);
  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'((1 << (W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] Y_MIN = -(ACC_W'(1) <<< (W - 1));

  logic signed [PROD_W-1:0] prod [TAPS];
  logic signed [ACC_W-1:0]  sum_q [TAPS];

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    rdlms_pipe_mult #(.A_W(W), .B_W(W), .STAGES(MULT_STAGES)) u_mult (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .a    (w[i]),
      .b    (x),
      .p    (prod[i])
    );
  end

  // Transposed adder chain: one register between neighbouring adders.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(TAPS); i++) sum_q[i] <= '0;
    end else if (en) begin
      for (int i = 0; i < int'(TAPS) - 1; i++)
        sum_q[i] <= ACC_W'(prod[i]) + sum_q[i+1];
      sum_q[TAPS-1] <= ACC_W'(prod[TAPS-1]);
    end
  end

  assign acc = sum_q[0];

  // Rescale Q2.14 -> Q1.7 with rounding and saturation.
  logic signed [ACC_W-1:0] scaled;
  assign scaled = (sum_q[0] + ROUND) >>> (W - 1);

  always_ff @(posedge clk) begin
    if (!rst_n)
      y <= '0;
    else if (en) begin
      if (scaled > Y_MAX)      y <= W'(Y_MAX);
      else if (scaled < Y_MIN) y <= W'(Y_MIN);
      else                     y <= W'(scaled);
    end
  end

endmodule

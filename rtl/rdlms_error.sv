// rdlms_error: error computation of the RDLMS adaptive filter,
// e(k) = d(k) - y(k).
//
// How it works: the desired sample d(k) enters with x(k), but the pipelined
// filter block delivers y(k) only D_DELAY samples later. A D_DELAY-deep
// shift register therefore aligns d with y; the difference of the two is
// saturated to W bits and stored in the error register e. The step size
// 2*mu is not applied here: being a power of two, it is a shift in the
// weight update block.
//
// The subtractor d - y and its place in the error feedback loop follow the
// architecture; the alignment shift register (needed because the filter is
// pipelined), the saturation and the register on e are choices of this
// implementation.
//
// Interface: one sample per enabled clock (en = 1); all registers hold while
// en = 0. Timing: when y presents y(k), e takes e(k) at the same enabled
// edge, i.e. e(k) is in e D_DELAY+1 enabled edges after d(k) was applied.
module rdlms_error #(
  parameter int unsigned W       = rdlms_pkg::DEF_DATA_W,
  parameter int unsigned D_DELAY = rdlms_pkg::y_latency(rdlms_pkg::DEF_MULT_STAGES)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d,
  input  logic signed [W-1:0] y,
  output logic signed [W-1:0] e
);

  localparam logic signed [W:0] E_MAX = (W+1)'((1 << (W - 1)) - 1);
  localparam logic signed [W:0] E_MIN = -((W+1)'(1) <<< (W - 1));

  logic signed [W-1:0] d_aligned;

  if (D_DELAY == 0) begin : g_nodelay
    assign d_aligned = d;
  end else begin : g_delay
    logic signed [W-1:0] d_q [D_DELAY];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(D_DELAY); i++) d_q[i] <= '0;
      end else if (en) begin
        d_q[0] <= d;
        for (int i = 1; i < int'(D_DELAY); i++) d_q[i] <= d_q[i-1];
      end
    end
    assign d_aligned = d_q[D_DELAY-1];
  end

  logic signed [W:0] diff;
  assign diff = (W+1)'(d_aligned) - (W+1)'(y);

  always_ff @(posedge clk) begin
    if (!rst_n)
      e <= '0;
    else if (en) begin
      if (diff > E_MAX)      e <= W'(E_MAX);
      else if (diff < E_MIN) e <= W'(E_MIN);
      else                   e <= W'(diff);
    end
  end

endmodule

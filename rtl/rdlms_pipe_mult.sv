// rdlms_pipe_mult: signed multiplier followed by STAGES pipeline registers.
//
// The architecture places two delays ("2D") behind every multiplier, so that
// a retiming tool (or the synthesis tool's register balancing) can move them
// into the multiplier array and cut its critical path. Here the full product
// a*b is formed in one expression and then passes through STAGES registers;
// STAGES = 0 gives a purely combinational multiplier. All registers advance
// only when en is high, so the whole filter stalls as one when no new sample
// arrives. Synchronous, active-low reset clears the pipeline.
//
// Timing: p at the clock edge after the STAGES-th enabled edge equals the
// product of the a, b that were present at the first of those edges.
module rdlms_pipe_mult #(
  parameter int unsigned A_W    = 8,
  parameter int unsigned B_W    = 8,
  parameter int unsigned STAGES = 2
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic signed [A_W-1:0]         a,
  input  logic signed [B_W-1:0]         b,
  output logic signed [A_W+B_W-1:0]     p
);

  logic signed [A_W+B_W-1:0] prod;
  assign prod = a * b;

  if (STAGES == 0) begin : g_comb
    assign p = prod;
  end else begin : g_pipe
    logic signed [A_W+B_W-1:0] pipe_q [STAGES];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int s = 0; s < int'(STAGES); s++) pipe_q[s] <= '0;
      end else if (en) begin
        pipe_q[0] <= prod;
        for (int s = 1; s < int'(STAGES); s++) pipe_q[s] <= pipe_q[s-1];
      end
    end

    assign p = pipe_q[STAGES-1];
  end

endmodule

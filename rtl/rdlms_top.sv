// rdlms_top: 8-bit, 4-tap retimed delayed-LMS (RDLMS) adaptive FIR filter.
//
// An LMS adaptive filter adjusts its weights each sample so that its output
// y follows a desired signal d; the error e = d - y drives the update
// w(n+1) = w(n) + 2mu e(n) x(n). In hardware the error feedback loop
// (weights -> multipliers -> adder chain -> subtractor -> update multiplier
// -> weights) would be one long combinational path. The delayed LMS updates
// with the error of m samples ago instead, which lets m registers be
// distributed around that loop; placing them so that no register-to-
// register path holds more than one multiplier (the longest adder path is
// the rounding and weight adders of the update) is the retiming that gives
// this filter its short critical path.
//
// Structure:
//   rdlms_filter   transposed-form FIR, 2 registers behind each multiplier,
//                  one register between the adders of the chain, output
//                  register y (rounded and saturated to 8 bits);
//   rdlms_error    aligns d with y and registers e = d - y (saturated);
//   rdlms_wupdate  input delay line, e*x multipliers with 2 registers,
//                  2mu = 2^-MU_SHIFT scaling and weight accumulators.
// The split into filter block and weight update block, the transposed
// filter, the 2-register multipliers and the 8-bit word length follow the
// architecture; tap count 4 follows its transposed-DLMS drawing. The step
// size, Q1.7 fixed-point format, rounding, saturation, the sample enable
// and the reset are choices of this implementation.
//
// Behaviour, with M = MULT_STAGES and samples counted in enabled clocks:
//   y(k)   = sat(round( sum_j w_j(k-j) x(k-j) )),  output on y at k+M+2
//   e(k)   = sat( d(k) - y(k) ),                    output on e at k+M+3
//   w_i(n+1) = sat( w_i(n) + round(e(n-m) x(n-m-i) 2^-(7+MU_SHIFT)) ),
//   with adaptation delay m = 2M+3 (7 for the defaults).
// Interface: x and d are sampled together on each rising clock edge with
// en = 1; with en = 0 every register holds (the filter stalls). rst_n is a
// synchronous active-low reset that clears all registers, weights included.
module rdlms_top #(
  parameter int unsigned W           = rdlms_pkg::DEF_DATA_W,
  parameter int unsigned TAPS        = rdlms_pkg::DEF_N_TAPS,
  parameter int unsigned MULT_STAGES = rdlms_pkg::DEF_MULT_STAGES,
  parameter int unsigned MU_SHIFT    = rdlms_pkg::DEF_MU_SHIFT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] y,
  output logic signed [W-1:0] e,
  output logic signed [W-1:0] w [TAPS]
);

  localparam int unsigned Y_LAT = rdlms_pkg::y_latency(MULT_STAGES);
  localparam int unsigned ACC_W = 2 * W + $clog2(TAPS) + 1;

  logic signed [ACC_W-1:0] acc_unused;

  rdlms_filter #(.W(W), .TAPS(TAPS), .MULT_STAGES(MULT_STAGES)) u_filter (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x    (x),
    .w    (w),
    .acc  (acc_unused),
    .y    (y)
  );

  rdlms_error #(.W(W), .D_DELAY(Y_LAT)) u_error (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .d    (d),
    .y    (y),
    .e    (e)
  );

  rdlms_wupdate #(
    .W(W), .TAPS(TAPS), .MULT_STAGES(MULT_STAGES), .MU_SHIFT(MU_SHIFT),
    .E_LAT(Y_LAT + 1)
  ) u_wupdate (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .x    (x),
    .e    (e),
    .w    (w)
  );

endmodule

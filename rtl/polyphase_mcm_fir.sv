// polyphase_mcm_fir: P-parallel polyphase FIR filter whose subfilters share
// one MCM block per input lane.
//
// Each clock brings P consecutive samples x[Pk+0] .. x[Pk+P-1] (lane 0 is the
// oldest) and produces y[Pk+m] = sum_i C[i] x[Pk+m-i]. The taps are split into
// P phases E_r (taps r, r+P, r+2P ...). Output lane m sums, over every input
// lane j, the phase r = (m-j) mod P subfilter applied to lane j, delayed by
// one clock when j > m (that lane's sample belongs to the previous block).
// All P subfilters on one input lane are transpose-form chains whose taps
// all multiply that lane's current sample, so one mcm_block built for the
// whole impulse response serves them all: symmetric, repeated, negated or
// power-of-two-scaled coefficients then cost no extra adders.
//
// The structure follows the filter design (shared MCM per input sample,
// transpose subfilters, z^-1 on the wrapped phases). This design's choices:
// the P terms of an output lane are summed in one registered adder stage;
// all words are ACC_W bits and wrap, exact at the output.
//
// Timing: a new block every clock; latency MCM_LAT + 2 clocks.
// NT must be a multiple of P.
module polyphase_mcm_fir
  import par_fir_pkg::*;
#(
  parameter int        P       = 8,
  parameter int        NT      = FIR0_TAPS,
  parameter coef_vec_t C       = FIR0_COEFS,
  parameter int        IN_W    = 16,
  parameter int        ACC_W   = acc_width(C, NT, IN_W),
  parameter int        MCM_LAT = mcm_depth(C, NT)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x [P],
  output logic signed [ACC_W-1:0] y [P]
);

  localparam mcm_graph_t G  = mcm_build(C, NT);
  localparam int         NS = NT / P;   // taps per subfilter

  initial begin
    assert (NT % P == 0)
      else $error("polyphase_mcm_fir: NT=%0d is not a multiple of P=%0d", NT, P);
  end

  // sub[j][r]: phase r subfilter on input lane j; sub_q: one clock later.
  logic signed [ACC_W-1:0] sub   [P][P];
  logic signed [ACC_W-1:0] sub_q [P][P];

  for (genvar j = 0; j < P; j++) begin : g_lane
    logic signed [ACC_W-1:0] prod [int'(G.n)];

    mcm_block #(
      .IN_W (IN_W),
      .OUT_W(ACC_W),
      .G    (G),
      .LAT  (MCM_LAT)
    ) u_mcm (
      .clk (clk),
      .rst (rst),
      .x   (x[j]),
      .prod(prod)
    );

    for (genvar r = 0; r < P; r++) begin : g_phase
      mcm_transposed_fir #(
        .W (ACC_W),
        .NT(NS),
        .C (phase_part(C, NT, P, r)),
        .G (G)
      ) u_sub (
        .clk (clk),
        .rst (rst),
        .prod(prod),
        .y   (sub[j][r])
      );
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < P; j++)
      for (int r = 0; r < P; r++)
        sub_q[j][r] <= rst ? '0 : sub[j][r];
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < P; m++) begin
      logic signed [ACC_W-1:0] s;
      s = '0;
      for (int j = 0; j < P; j++) begin
        if (j <= m) s = s + sub[j][m-j];
        else        s = s + sub_q[j][m-j+P];
      end
      y[m] <= rst ? '0 : s;
    end
  end

endmodule

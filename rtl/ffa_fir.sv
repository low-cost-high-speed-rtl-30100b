// ffa_fir: P-parallel FIR filter built by nesting 2-parallel Fast FIR
// Algorithm (FFA) stages, with MCM-based transpose-form subfilters.
//
// Each clock brings P consecutive samples x[Pk+0] .. x[Pk+P-1] (lane 0 is the
// oldest) and produces the P outputs y[Pk+m] = sum_i C[i] x[Pk+m-i].
// One 2-parallel FFA stage splits the input into its even samples X0 and odd
// samples X1 and the taps into H0 (even) and H1 (odd), then uses three
// half-length, P/2-parallel filters instead of four:
//   Y0 = H0 X0,   Y1 = H1 X1,   Y2 = (H0+H1)(X0+X1)
//   y_even = Y0 + z^-1 Y1,      y_odd = Y2 - Y0 - Y1
// where z^-1 is a delay of one sample of the half-rate stream. For P/2 lanes
// that delay is a lane rotation: lane j takes Y1 lane j-1, and lane 0 takes
// the last lane of Y1 from the previous clock. The three filters are this
// same module with P/2 lanes, so a P = 2^p filter nests p stages and has 3^p
// single-lane subfilters; the recursion ends at P = 1 with an mcm_block
// followed by an mcm_transposed_fir.
//
// The FFA equations, the nesting of 2-parallel stages and the MCM subfilters
// follow the filter design. This design's choices: every stage registers its
// pre-adder (and delays X0, X1 to match) and its post-adders, whose odd
// output has two adders between registers; all internal words are ACC_W bits
// and wrap, which is exact at the output when ACC_W holds every output (see
// par_fir_pkg::acc_width); the pre-added input grows by one bit per stage.
//
// Timing: a new block of P samples every clock; latency MCM_LAT + 1 + 2p
// clocks (MCM_LAT must cover the deepest adder graph of all subfilters,
// par_fir_pkg::ffa_mcm_depth). NT must be a multiple of P.
module ffa_fir
  import par_fir_pkg::*;
#(
  parameter int        P       = 8,
  parameter int        NT      = FIR0_TAPS,
  parameter coef_vec_t C       = FIR0_COEFS,
  parameter int        IN_W    = 16,
  parameter int        ACC_W   = acc_width(C, NT, IN_W),
  parameter int        MCM_LAT = ffa_mcm_depth(C, NT, P)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x [P],
  output logic signed [ACC_W-1:0] y [P]
);

  initial begin
    assert (P >= 1 && (P & (P - 1)) == 0)
      else $error("ffa_fir: P=%0d is not a power of two", P);
    assert (NT % P == 0)
      else $error("ffa_fir: NT=%0d is not a multiple of P=%0d", NT, P);
  end

  if (P == 1) begin : g_leaf
    localparam mcm_graph_t G = mcm_build(C, NT);
    logic signed [ACC_W-1:0] prod [int'(G.n)];

    mcm_block #(
      .IN_W (IN_W),
      .OUT_W(ACC_W),
      .G    (G),
      .LAT  (MCM_LAT)
    ) u_mcm (
      .clk (clk),
      .rst (rst),
      .x   (x[0]),
      .prod(prod)
    );

    mcm_transposed_fir #(
      .W (ACC_W),
      .NT(NT),
      .C (C),
      .G (G)
    ) u_sub (
      .clk (clk),
      .rst (rst),
      .prod(prod),
      .y   (y[0])
    );

  end else begin : g_split
    localparam int H = P / 2;

    logic signed [IN_W-1:0]  x0_q [H];   // even samples, delayed
    logic signed [IN_W-1:0]  x1_q [H];   // odd samples, delayed
    logic signed [IN_W:0]    xs_q [H];   // pre-adder X0 + X1
    logic signed [ACC_W-1:0] y0 [H];     // H0 X0
    logic signed [ACC_W-1:0] y1 [H];     // H1 X1
    logic signed [ACC_W-1:0] y2 [H];     // (H0+H1)(X0+X1)
    logic signed [ACC_W-1:0] y1_last_q;  // last lane of Y1, one clock ago
    logic signed [ACC_W-1:0] y1_dly [H]; // Y1 delayed by one half-rate sample

    always_ff @(posedge clk) begin
      for (int j = 0; j < H; j++) begin
        if (rst) begin
          x0_q[j] <= '0;
          x1_q[j] <= '0;
          xs_q[j] <= '0;
        end else begin
          x0_q[j] <= x[2*j];
          x1_q[j] <= x[2*j+1];
          xs_q[j] <= (IN_W+1)'(x[2*j]) + (IN_W+1)'(x[2*j+1]);
        end
      end
    end

    ffa_fir #(
      .P(H), .NT(NT/2), .C(ffa_part(C, NT, 0)),
      .IN_W(IN_W), .ACC_W(ACC_W), .MCM_LAT(MCM_LAT)
    ) u_h0 (.clk(clk), .rst(rst), .x(x0_q), .y(y0));

    ffa_fir #(
      .P(H), .NT(NT/2), .C(ffa_part(C, NT, 1)),
      .IN_W(IN_W), .ACC_W(ACC_W), .MCM_LAT(MCM_LAT)
    ) u_h1 (.clk(clk), .rst(rst), .x(x1_q), .y(y1));

    ffa_fir #(
      .P(H), .NT(NT/2), .C(ffa_part(C, NT, 2)),
      .IN_W(IN_W+1), .ACC_W(ACC_W), .MCM_LAT(MCM_LAT)
    ) u_h01 (.clk(clk), .rst(rst), .x(xs_q), .y(y2));

    always_comb begin
      y1_dly[0] = y1_last_q;
      for (int j = 1; j < H; j++) y1_dly[j] = y1[j-1];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        y1_last_q <= '0;
        for (int j = 0; j < H; j++) begin
          y[2*j]   <= '0;
          y[2*j+1] <= '0;
        end
      end else begin
        y1_last_q <= y1[H-1];
        for (int j = 0; j < H; j++) begin
          y[2*j]   <= y0[j] + y1_dly[j];
          y[2*j+1] <= y2[j] - y0[j] - y1[j];
        end
      end
    end
  end

endmodule

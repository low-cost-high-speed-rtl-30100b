// mcm_transposed_fir: transpose-form FIR subfilter fed by an MCM block.
//
// In transpose form every tap multiplies the same current input sample, so
// all products come from one mcm_block; this module is the adder chain after
// it. Tap i takes the product of the graph node whose fundamental is the odd
// part of |C[i]|, shifts it left by the number of trailing zero bits of C[i],
// and adds it to (or, for a negative coefficient, subtracts it from) the
// partial sum arriving from tap i+1 through one register:
//   acc[NT-1] <= t[NT-1];  acc[i] <= acc[i+1] +/- t[i];  y = acc[0].
// Zero taps only carry the partial sum. The tap-to-node mapping is fixed at
// elaboration from the same graph the MCM was built from (G), which may have
// been built for a larger coefficient set than this subfilter's taps, as in
// the polyphase filter where one MCM serves several subfilters.
//
// The structure (MCM followed by a z^-1/adder chain, subtractors for negative
// coefficients, shifts for even ones) follows the filter design; the
// synchronous reset of the chain is this design's choice.
//
// Interface: prod are the MCM outputs for the current sample x[n];
// y[n'] = sum_i C[i] * x[n'-i] for the samples whose products arrived.
// Timing: y is registered, one cycle after the products of x[n].
// Arithmetic wraps modulo 2^W.
module mcm_transposed_fir
  import par_fir_pkg::*;
#(
  parameter int         W  = 30,
  parameter int         NT = FIR0_TAPS,
  parameter coef_vec_t  C  = FIR0_COEFS,
  parameter mcm_graph_t G  = mcm_build(C, NT)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] prod [int'(G.n)],
  output logic signed [W-1:0] y
);

  logic signed [W-1:0] acc [NT];

  initial begin
    assert (mcm_complete(G, C, NT))
      else $error("mcm_transposed_fir: adder graph lacks a fundamental of C");
  end

  for (genvar i = 0; i < NT; i++) begin : g_tap
    localparam int  CV   = int'(C[i]);
    localparam int  MAG  = iabs(CV);
    localparam int  NODE = (MAG == 0) ? 0 : mcm_find(G, odd_part(MAG));
    localparam int  SH   = (MAG == 0) ? 0 : tz_count(MAG);
    localparam bit  NEG  = (CV < 0);
    logic signed [W-1:0] term;
    logic signed [W-1:0] prev;

    if (MAG == 0) begin : g_zero
      assign term = '0;
    end else begin : g_term
      assign term = prod[(NODE < 0) ? 0 : NODE] <<< SH;
    end

    if (i == NT - 1) begin : g_last
      assign prev = '0;
    end else begin : g_chain
      assign prev = acc[i+1];
    end

    always_ff @(posedge clk) begin
      if (rst)      acc[i] <= '0;
      else if (NEG) acc[i] <= prev - term;
      else          acc[i] <= prev + term;
    end
  end

  assign y = acc[0];

endmodule

// par_fir_top: multiplierless super-sample-rate FIR filter for an RF-sampling
// front end.
//
// An RF data converter delivers P samples per fabric clock; this top filters
// that stream with the same impulse response in the two multiplierless
// structures, side by side and fed by the same input:
//   * ffa_*  : nested 2-parallel Fast FIR Algorithm with MCM subfilters
//              (ffa_fir), the fewest constant multiplications in general;
//   * pp_*   : polyphase with one MCM shared by all subfilters of an input
//              lane (polyphase_mcm_fir), which exploits coefficient symmetry
//              fully and suits short subfilters.
// Both compute y[n] = sum_i COEFS[i] x[n-i] exactly, at full precision
// (ACC_W bits). A user needing only one structure leaves the other's outputs
// open and synthesis removes it.
//
// The defaults are an 8-parallel filter (the least parallelism that carries
// the full ADC rate at a fabric clock of at least 500 MHz) with 16-bit input
// samples and the 15-tap half-band filter fir0 of the RFSoC ADC's decimation
// chain, padded with one zero to 16 taps. With DECIMATE = 1 the top acts as
// the half-band decimator: only the even-indexed outputs y[2n] are kept, P/2
// per clock. Decimation here discards the odd outputs after full-rate
// filtering, this design's simplest reading; it saves no subfilter logic.
//
// Interface: x[0..P-1] are P consecutive samples, lane 0 the oldest; in_valid
// marks clocks that carry samples. The filters run every clock; *_valid
// follows in_valid through the latency so that the outputs of valid input
// blocks are marked. Outputs y[n] for input blocks that arrived while
// in_valid was low are still computed from whatever was on x.
// Timing: one block per clock; FFA latency FFA_LATENCY = MCM depth + 1 +
// 2 log2(P) clocks, polyphase latency PP_LATENCY = MCM depth + 2 clocks.
// Reset is synchronous and active high and clears all filter state.
module par_fir_top
  import par_fir_pkg::*;
#(
  parameter int        P        = 8,
  parameter int        NTAPS    = FIR0_TAPS,
  parameter coef_vec_t COEFS    = FIR0_COEFS,
  parameter int        IN_W     = 16,
  parameter int        COEF_W   = 16,
  parameter bit        DECIMATE = 1'b0,
  localparam int       ACC_W    = acc_width(COEFS, NTAPS, IN_W),
  localparam int       OUT_L    = DECIMATE ? P / 2 : P
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x        [P],
  output logic                    ffa_valid,
  output logic signed [ACC_W-1:0] ffa_y    [OUT_L],
  output logic                    pp_valid,
  output logic signed [ACC_W-1:0] pp_y     [OUT_L]
);

  localparam int FFA_MCM_LAT = ffa_mcm_depth(COEFS, NTAPS, P);
  localparam int PP_MCM_LAT  = mcm_depth(COEFS, NTAPS);
  localparam int FFA_LATENCY = FFA_MCM_LAT + 1 + 2 * clog2i(P);
  localparam int PP_LATENCY  = PP_MCM_LAT + 2;

  initial begin
    for (int i = 0; i < NTAPS; i++)
      assert (int'(COEFS[i]) < (1 <<< (COEF_W - 1)) && int'(COEFS[i]) >= -(1 <<< (COEF_W - 1)))
        else $error("par_fir_top: coefficient %0d does not fit COEF_W=%0d bits", i, COEF_W);
    assert (!DECIMATE || P >= 2)
      else $error("par_fir_top: decimation needs P >= 2");
  end

  logic signed [ACC_W-1:0] ffa_full [P];
  logic signed [ACC_W-1:0] pp_full  [P];

  ffa_fir #(
    .P      (P),
    .NT     (NTAPS),
    .C      (COEFS),
    .IN_W   (IN_W),
    .ACC_W  (ACC_W),
    .MCM_LAT(FFA_MCM_LAT)
  ) u_ffa (
    .clk(clk),
    .rst(rst),
    .x  (x),
    .y  (ffa_full)
  );

  polyphase_mcm_fir #(
    .P      (P),
    .NT     (NTAPS),
    .C      (COEFS),
    .IN_W   (IN_W),
    .ACC_W  (ACC_W),
    .MCM_LAT(PP_MCM_LAT)
  ) u_pp (
    .clk(clk),
    .rst(rst),
    .x  (x),
    .y  (pp_full)
  );

  // Output lanes: all of them, or only the even-indexed samples.
  for (genvar m = 0; m < OUT_L; m++) begin : g_out
    localparam int SRC = DECIMATE ? 2 * m : m;
    assign ffa_y[m] = ffa_full[SRC];
    assign pp_y[m]  = pp_full[SRC];
  end

  // Valid flags follow the data through each structure's latency.
  logic [FFA_LATENCY-1:0] ffa_vpipe;
  logic [PP_LATENCY-1:0]  pp_vpipe;

  always_ff @(posedge clk) begin
    if (rst) begin
      ffa_vpipe <= '0;
      pp_vpipe  <= '0;
    end else begin
      ffa_vpipe <= {ffa_vpipe[FFA_LATENCY-2:0], in_valid};
      pp_vpipe  <= {pp_vpipe[PP_LATENCY-2:0], in_valid};
    end
  end

  assign ffa_valid = ffa_vpipe[FFA_LATENCY-1];
  assign pp_valid  = pp_vpipe[PP_LATENCY-1];

endmodule

// tb_mcm_transposed_fir: self-checking testbench for mcm_transposed_fir.
//
// Two single-lane filters, each an mcm_block followed by the transpose adder
// chain under test: the 16-tap half-band set fir0, and an 11-tap set with
// negative, even, repeated and zero coefficients. Random and full-scale input
// samples are filtered and every output is compared with a direct convolution
// y[n] = sum_i h[i] x[n-i] computed here, at the expected latency of the
// graph depth plus one clock.
module tb_mcm_transposed_fir;
  import par_fir_pkg::*;

  localparam int IN_W = 16;
  localparam int W    = 40;
  localparam int NCYC = 500;
  localparam int NB   = 11;
  localparam coef_vec_t CB = coef_vec_t'({
      32'sd7, -32'sd12, 32'sd0, 32'sd1000, -32'sd32768, 32'sd32767,
      32'sd1000, 32'sd96, -32'sd7, 32'sd0, 32'sd1});

  localparam mcm_graph_t GA = mcm_build(FIR0_COEFS, FIR0_TAPS);
  localparam mcm_graph_t GB = mcm_build(CB, NB);
  localparam int LA = int'(GA.max_depth);
  localparam int LB = int'(GB.max_depth);

  logic clk = 0;
  logic rst;
  logic signed [IN_W-1:0] x;
  logic signed [W-1:0] pa [int'(GA.n)];
  logic signed [W-1:0] pb [int'(GB.n)];
  logic signed [W-1:0] ya, yb;

  int checks = 0, failures = 0;
  longint hist [$];

  mcm_block #(.IN_W(IN_W), .OUT_W(W), .G(GA), .LAT(LA)) u_ma (
    .clk(clk), .rst(rst), .x(x), .prod(pa));
  mcm_transposed_fir #(.W(W), .NT(FIR0_TAPS), .C(FIR0_COEFS), .G(GA)) dut_a (
    .clk(clk), .rst(rst), .prod(pa), .y(ya));
  mcm_block #(.IN_W(IN_W), .OUT_W(W), .G(GB), .LAT(LB)) u_mb (
    .clk(clk), .rst(rst), .x(x), .prod(pb));
  mcm_transposed_fir #(.W(W), .NT(NB), .C(CB), .G(GB)) dut_b (
    .clk(clk), .rst(rst), .prod(pb), .y(yb));

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y(coef_vec_t c, int n, int idx);
    longint s;
    s = 0;
    for (int i = 0; i < n; i++)
      if (idx - i >= 0) s += longint'(int'(c[i])) * hist[idx - i];
    return s;
  endfunction

  initial begin
    rst = 1; x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < NCYC; i++) begin
      longint xv;
      case (i % 9)
        0:       xv = 32767;
        1:       xv = -32768;
        2:       xv = (i < 40) ? 0 : longint'($signed(16'($urandom)));
        default: xv = longint'($signed(16'($urandom)));
      endcase
      x = IN_W'(xv);
      hist.push_back(xv);
      @(posedge clk); #1;
      if (i + 1 - (LA + 1) >= 0) begin
        checks++;
        if (longint'(ya) != ref_y(FIR0_COEFS, FIR0_TAPS, i + 1 - (LA + 1))) begin
          failures++;
          if (failures < 10) $display("FAIL fir0 n=%0d got %0d want %0d", i + 1 - (LA + 1),
                                      ya, ref_y(FIR0_COEFS, FIR0_TAPS, i + 1 - (LA + 1)));
        end
      end
      if (i + 1 - (LB + 1) >= 0) begin
        checks++;
        if (longint'(yb) != ref_y(CB, NB, i + 1 - (LB + 1))) begin
          failures++;
          if (failures < 10) $display("FAIL setB n=%0d got %0d want %0d", i + 1 - (LB + 1),
                                      yb, ref_y(CB, NB, i + 1 - (LB + 1)));
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ffa_fir: self-checking testbench for ffa_fir.
//
// Three nested-FFA filters fed with the same random sample stream:
//   * 2-parallel, 8 taps, nonlinear phase (one FFA stage),
//   * 4-parallel, 24 taps, nonlinear phase (two nested stages),
//   * 8-parallel, 16-tap half-band fir0 (three stages, the default).
// Each output lane is compared with a direct convolution of the serial
// sample stream, at the latency graph depth + 1 + 2 log2(P) clocks, so a
// wrong latency, lane order or FFA recombination shows as a mismatch.
module tb_ffa_fir;
  import par_fir_pkg::*;

  localparam int IN_W = 16;
  localparam int NBLK = 300;

  // Deterministic pseudo-random 16-bit coefficient set.
  function automatic coef_vec_t rand_set(int n, int seed);
    coef_vec_t c;
    int s;
    c = '0;
    s = seed;
    for (int i = 0; i < n; i++) begin
      s = s * 1103515245 + 12345;
      c[i] = 32'((s >>> 8) % 32768);
      if (i % 5 == 3) c[i] = 0;
    end
    return c;
  endfunction

  localparam coef_vec_t C2 = rand_set(8, 11);
  localparam coef_vec_t C4 = rand_set(24, 5);

  logic clk = 0;
  logic rst;
  logic signed [IN_W-1:0] x2 [2];
  logic signed [IN_W-1:0] x4 [4];
  logic signed [IN_W-1:0] x8 [8];
  localparam int W2 = acc_width(C2, 8, IN_W);
  localparam int W4 = acc_width(C4, 24, IN_W);
  localparam int W8 = acc_width(FIR0_COEFS, FIR0_TAPS, IN_W);
  localparam int L2 = ffa_mcm_depth(C2, 8, 2) + 1 + 2;
  localparam int L4 = ffa_mcm_depth(C4, 24, 4) + 1 + 4;
  localparam int L8 = ffa_mcm_depth(FIR0_COEFS, FIR0_TAPS, 8) + 1 + 6;
  logic signed [W2-1:0] y2 [2];
  logic signed [W4-1:0] y4 [4];
  logic signed [W8-1:0] y8 [8];

  int checks = 0, failures = 0;
  longint s2 [$], s4 [$], s8 [$];

  ffa_fir #(.P(2), .NT(8),  .C(C2), .IN_W(IN_W)) dut2 (.clk(clk), .rst(rst), .x(x2), .y(y2));
  ffa_fir #(.P(4), .NT(24), .C(C4), .IN_W(IN_W)) dut4 (.clk(clk), .rst(rst), .x(x4), .y(y4));
  ffa_fir dut8 (.clk(clk), .rst(rst), .x(x8), .y(y8));

  always #5 clk = ~clk;

  initial begin
    #(10 * (NBLK + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv(ref longint s [$], input coef_vec_t c, input int n, input int idx);
    longint a;
    a = 0;
    for (int i = 0; i < n; i++)
      if (idx - i >= 0) a += longint'(int'(c[i])) * s[idx - i];
    return a;
  endfunction

  function automatic longint smp(int i);
    case (i % 11)
      0:       return 32767;
      1:       return -32768;
      default: return longint'($signed(16'($urandom)));
    endcase
  endfunction

  task automatic check(string nm, longint got, longint want, int n);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("FAIL %s n=%0d got %0d want %0d", nm, n, got, want);
    end
  endtask

  initial begin
    rst = 1;
    foreach (x2[j]) x2[j] = '0;
    foreach (x4[j]) x4[j] = '0;
    foreach (x8[j]) x8[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int b = 0; b < NBLK; b++) begin
      for (int j = 0; j < 2; j++) begin s2.push_back(smp(2*b+j)); x2[j] = IN_W'(s2[$]); end
      for (int j = 0; j < 4; j++) begin s4.push_back(smp(4*b+j)); x4[j] = IN_W'(s4[$]); end
      for (int j = 0; j < 8; j++) begin s8.push_back(smp(8*b+j)); x8[j] = IN_W'(s8[$]); end
      @(posedge clk); #1;
      if (b + 1 - L2 >= 0)
        for (int j = 0; j < 2; j++)
          check("P2", longint'(y2[j]), conv(s2, C2, 8, 2*(b+1-L2)+j), 2*(b+1-L2)+j);
      if (b + 1 - L4 >= 0)
        for (int j = 0; j < 4; j++)
          check("P4", longint'(y4[j]), conv(s4, C4, 24, 4*(b+1-L4)+j), 4*(b+1-L4)+j);
      if (b + 1 - L8 >= 0)
        for (int j = 0; j < 8; j++)
          check("P8", longint'(y8[j]), conv(s8, FIR0_COEFS, FIR0_TAPS, 8*(b+1-L8)+j), 8*(b+1-L8)+j);
      @(negedge clk);
    end
    $display("latencies P2=%0d P4=%0d P8=%0d", L2, L4, L8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

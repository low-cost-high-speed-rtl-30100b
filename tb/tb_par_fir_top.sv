// tb_par_fir_top: end-to-end testbench of par_fir_top at its default size.
//
// Instance dut has no parameter overrides: 8 samples per clock, 16-bit input,
// the 16-tap half-band fir0. Instance dut_dec is the same filter as a
// half-band decimator (DECIMATE = 1, four outputs per clock). A random stream
// with full-scale bursts and a gap in in_valid is filtered; both structures'
// outputs (FFA and polyphase) are compared with a direct convolution at their
// latencies, and the valid flags are checked against the delayed in_valid.
// Mechanisms counted, each of which must occur at least once:
//   pre-adder word growth   the top FFA stage's pre-adder leaves 16-bit range
//   lane rotation           the z^-1 of an FFA stage carries a non-zero term
//                           from the previous clock into lane 0
//   wrapped polyphase phase a delayed (previous-block) subfilter term is
//                           non-zero
//   decimated output        an output of the decimating instance was checked
//   valid gap               an output clock with *_valid low
module tb_par_fir_top;
  import par_fir_pkg::*;

  localparam int P    = 8;
  localparam int IN_W = 16;
  localparam int NBLK = 400;
  localparam int ACC_W = acc_width(FIR0_COEFS, FIR0_TAPS, IN_W);
  localparam int LF = ffa_mcm_depth(FIR0_COEFS, FIR0_TAPS, P) + 1 + 6;
  localparam int LP = mcm_depth(FIR0_COEFS, FIR0_TAPS) + 2;

  logic clk = 0;
  logic rst;
  logic in_valid;
  logic signed [IN_W-1:0] x [P];
  logic ffa_valid, pp_valid, ffa_valid_d, pp_valid_d;
  logic signed [ACC_W-1:0] ffa_y [P];
  logic signed [ACC_W-1:0] pp_y  [P];
  logic signed [ACC_W-1:0] ffa_yd [P/2];
  logic signed [ACC_W-1:0] pp_yd  [P/2];

  int checks = 0, failures = 0;
  int n_growth = 0, n_rotate = 0, n_wrap = 0, n_dec = 0, n_gap = 0;
  longint s [$];
  bit vhist [$];

  par_fir_top dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
    .ffa_valid(ffa_valid), .ffa_y(ffa_y), .pp_valid(pp_valid), .pp_y(pp_y));

  par_fir_top #(.DECIMATE(1'b1)) dut_dec (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
    .ffa_valid(ffa_valid_d), .ffa_y(ffa_yd), .pp_valid(pp_valid_d), .pp_y(pp_yd));

  always #5 clk = ~clk;

  initial begin
    #(10 * (NBLK + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint conv(int idx);
    longint a;
    a = 0;
    for (int i = 0; i < FIR0_TAPS; i++)
      if (idx - i >= 0) a += longint'(int'(FIR0_COEFS[i])) * s[idx - i];
    return a;
  endfunction

  function automatic longint smp(int blk, int j);
    if (blk % 37 < 3) return (j % 2 == 0) ? 32767 : -32768 + 32767 * (blk % 2);
    return longint'($signed(16'($urandom)));
  endfunction

  task automatic check(string nm, longint got, longint want, int n);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 12) $display("FAIL %s n=%0d got %0d want %0d", nm, n, got, want);
    end
  endtask

  // Mechanism monitors.
  always @(posedge clk) if (!rst) begin
    for (int j = 0; j < P/2; j++)
      if (dut.u_ffa.g_split.xs_q[j] > 32767 || dut.u_ffa.g_split.xs_q[j] < -32768) n_growth++;
    if (dut.u_ffa.g_split.y1_last_q != 0) n_rotate++;
    for (int j = 1; j < P; j++)
      if (dut.u_pp.sub_q[j][P-j] != 0) n_wrap++;
  end

  initial begin
    rst = 1; in_valid = 0;
    foreach (x[j]) x[j] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int b = 0; b < NBLK; b++) begin
      int nf, np;
      for (int j = 0; j < P; j++) begin
        s.push_back(smp(b, j));
        x[j] = IN_W'(s[$]);
      end
      in_valid = !(b >= 100 && b < 110);
      vhist.push_back(in_valid);
      @(posedge clk); #1;
      nf = b + 1 - LF;
      np = b + 1 - LP;
      if (nf >= 0) begin
        checks++;
        if (ffa_valid != vhist[nf]) begin failures++; $display("FAIL ffa_valid at block %0d", nf); end
        if (!ffa_valid) n_gap++;
        for (int j = 0; j < P; j++) check("ffa", longint'(ffa_y[j]), conv(P*nf+j), P*nf+j);
        checks++;
        if (ffa_valid_d != vhist[nf]) begin failures++; $display("FAIL dec ffa_valid at %0d", nf); end
        for (int j = 0; j < P/2; j++) begin
          check("ffa_dec", longint'(ffa_yd[j]), conv(P*nf+2*j), P*nf+2*j);
          n_dec++;
        end
      end
      if (np >= 0) begin
        checks++;
        if (pp_valid != vhist[np]) begin failures++; $display("FAIL pp_valid at block %0d", np); end
        if (!pp_valid) n_gap++;
        for (int j = 0; j < P; j++) check("pp", longint'(pp_y[j]), conv(P*np+j), P*np+j);
        checks++;
        if (pp_valid_d != vhist[np]) begin failures++; $display("FAIL dec pp_valid at %0d", np); end
        for (int j = 0; j < P/2; j++) begin
          check("pp_dec", longint'(pp_yd[j]), conv(P*np+2*j), P*np+2*j);
          n_dec++;
        end
      end
      @(negedge clk);
    end
    $display("mechanisms: growth=%0d rotate=%0d wrap=%0d decimated=%0d valid_gap=%0d",
             n_growth, n_rotate, n_wrap, n_dec, n_gap);
    checks += 5;
    if (n_growth == 0) begin failures++; $display("FAIL pre-adder growth never seen"); end
    if (n_rotate == 0) begin failures++; $display("FAIL lane rotation never seen"); end
    if (n_wrap   == 0) begin failures++; $display("FAIL wrapped phase never seen"); end
    if (n_dec    == 0) begin failures++; $display("FAIL no decimated output checked"); end
    if (n_gap    == 0) begin failures++; $display("FAIL no valid gap seen"); end
    $display("latencies ffa=%0d pp=%0d", LF, LP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

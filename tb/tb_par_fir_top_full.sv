// tb_par_fir_top_full: par_fir_top at its default size, with no parameter
// changes: 8 samples per clock, 16-bit input, the 16-tap half-band fir0.
// A random stream with full-scale bursts and a gap in in_valid is filtered;
// both structures' outputs (FFA and polyphase) are compared with a direct
// convolution at their latencies, and the valid flags with the delayed
// in_valid. Pre-adder word growth, FFA lane rotation, wrapped polyphase
// phases and the valid gap are counted and must each occur at least once.
// The decimating mode is covered by tb_par_fir_top.
module tb_par_fir_top_full;
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
  logic ffa_valid, pp_valid;
  logic signed [ACC_W-1:0] ffa_y [P];
  logic signed [ACC_W-1:0] pp_y  [P];

  int checks = 0, failures = 0;
  int n_growth = 0, n_rotate = 0, n_wrap = 0, n_gap = 0;
  longint s [$];
  bit vhist [$];

  par_fir_top dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .x(x),
    .ffa_valid(ffa_valid), .ffa_y(ffa_y), .pp_valid(pp_valid), .pp_y(pp_y));


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
      end
      if (np >= 0) begin
        checks++;
        if (pp_valid != vhist[np]) begin failures++; $display("FAIL pp_valid at block %0d", np); end
        if (!pp_valid) n_gap++;
        for (int j = 0; j < P; j++) check("pp", longint'(pp_y[j]), conv(P*np+j), P*np+j);
      end
      @(negedge clk);
    end
    $display("mechanisms: growth=%0d rotate=%0d wrap=%0d valid_gap=%0d",
             n_growth, n_rotate, n_wrap, n_gap);
    checks += 4;
    if (n_growth == 0) begin failures++; $display("FAIL pre-adder growth never seen"); end
    if (n_rotate == 0) begin failures++; $display("FAIL lane rotation never seen"); end
    if (n_wrap   == 0) begin failures++; $display("FAIL wrapped phase never seen"); end
    if (n_gap    == 0) begin failures++; $display("FAIL no valid gap seen"); end
    $display("latencies ffa=%0d pp=%0d", LF, LP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

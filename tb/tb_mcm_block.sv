// tb_mcm_block: self-checking testbench for mcm_block.
//
// Builds the adder graph of the 16-tap half-band set fir0 and checks, for
// random and extreme input samples, that every node output equals the input
// times that node's fundamental exactly LAT clocks later, where LAT is the
// graph depth. It also checks the graph itself: the fundamentals of fir0
// (odd parts 1, 3, 27, 615 of 6, 54, 256, 1230, 2048) must all be present and
// built with five adders, the count of the reference graph for this set.
module tb_mcm_block;
  import par_fir_pkg::*;

  localparam int IN_W  = 16;
  localparam int OUT_W = 32;
  localparam mcm_graph_t G = mcm_build(FIR0_COEFS, FIR0_TAPS);
  localparam int LAT = int'(G.max_depth);
  localparam int NCYC = 400;

  logic clk = 0;
  logic rst;
  logic signed [IN_W-1:0]  x;
  logic signed [OUT_W-1:0] prod [int'(G.n)];

  int checks = 0, failures = 0;
  longint hist [$];

  mcm_block #(.IN_W(IN_W), .OUT_W(OUT_W), .G(G), .LAT(LAT)) dut (
    .clk(clk), .rst(rst), .x(x), .prod(prod));

  always #5 clk = ~clk;

  initial begin
    #(10 * (NCYC + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint pick(int i);
    case (i % 7)
      0:       return 32767;
      1:       return -32768;
      default: return longint'($signed(16'($urandom)));
    endcase
  endfunction

  initial begin
    static int fl [4] = '{3, 27, 615, 1};
    rst = 1; x = '0;
    repeat (3) @(posedge clk);
    // Graph structure checks.
    checks++;
    if (int'(G.n) - 1 != 5) begin
      failures++; $display("FAIL: graph has %0d adders, expected 5", int'(G.n) - 1);
    end
    foreach (fl[i]) begin
      checks++;
      if (mcm_find(G, fl[i]) < 0) begin
        failures++; $display("FAIL: fundamental %0d missing", fl[i]);
      end
    end
    // Every node must be its operands combined as recorded.
    for (int k = 1; k < int'(G.n); k++) begin
      longint a, b, v;
      a = longint'(G.value[G.src_a[k]]) <<< G.shift_a[k];
      b = longint'(G.value[G.src_b[k]]);
      v = (G.op[k] == 2'd0) ? a + b : (G.op[k] == 2'd1) ? a - b : b - a;
      checks++;
      if (v != longint'(G.value[k])) begin
        failures++; $display("FAIL: node %0d value %0d, operands give %0d", k, G.value[k], v);
      end
    end
    @(negedge clk); rst = 0;
    for (int i = 0; i < NCYC; i++) begin
      longint xv;
      xv = pick(i);
      x = IN_W'(xv);
      hist.push_back(xv);
      @(posedge clk); #1;
      // After this edge, the sample applied LAT-1 edges ago... compare below.
      if (hist.size() >= LAT) begin
        longint xo;
        xo = hist[hist.size() - LAT];
        for (int k = 0; k < int'(G.n); k++) begin
          checks++;
          if (longint'(prod[k]) != xo * longint'(G.value[k])) begin
            failures++;
            if (failures < 10)
              $display("FAIL: cycle %0d node %0d (x%0d): got %0d want %0d",
                       i, k, G.value[k], prod[k], xo * longint'(G.value[k]));
          end
        end
      end
      @(negedge clk);
    end
    $display("graph: %0d nodes, depth %0d", G.n, G.max_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

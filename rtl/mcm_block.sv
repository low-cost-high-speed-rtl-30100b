// mcm_block: pipelined multiple constant multiplication (MCM).
//
// Multiplies one input sample by every fundamental of an adder graph using
// only shifts and adders, no multipliers. The graph (par_fir_pkg::mcm_graph_t)
// is worked out at elaboration from the coefficient set by
// par_fir_pkg::mcm_build; this module only turns it into hardware. Each node
// k is one adder (or subtractor) registered at pipeline stage depth[k]; its
// operands are taken from stage depth[k]-1, so operands built at shallower
// stages are carried forward by plain pipeline registers. Every node is then
// carried on to the last stage, so all products leave together.
//
// The pipelined shift-and-add structure, with registers balancing the graph,
// follows the MCM graphs of the filter design; the graph-building method is
// this design's own simple greedy one (see par_fir_pkg), not H_cub.
//
// Interface: x is the input sample; prod[k] = x * value[k] for every node
// k < G.n (entries past G.n are zero).
// Timing: prod is valid LAT cycles after x, LAT >= G.max_depth; a new sample
// is accepted every cycle. Synchronous active-high reset clears the pipeline.
// Arithmetic wraps modulo 2^OUT_W; OUT_W must hold x times the largest
// fundamental for prod to be exact (the filters only need it modulo 2^OUT_W).
module mcm_block
  import par_fir_pkg::*;
#(
  parameter int         IN_W  = 16,
  parameter int         OUT_W = 30,
  parameter mcm_graph_t G     = mcm_build(FIR0_COEFS, FIR0_TAPS),
  parameter int         LAT   = (G.max_depth > 0) ? int'(G.max_depth) : 1
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] prod [int'(G.n)]
);

  // pipe[s][k]: node k at pipeline stage s (stage 0 is the raw input).
  logic signed [OUT_W-1:0] pipe [LAT+1][int'(G.n)];

  initial begin
    assert (LAT >= int'(G.max_depth))
      else $error("mcm_block: LAT %0d below graph depth %0d", LAT, G.max_depth);
  end

  for (genvar k = 0; k < int'(G.n); k++) begin : g_node
    if (k == 0) begin : g_input
      assign pipe[0][0] = OUT_W'(x);
    end else begin : g_none0
      assign pipe[0][k] = '0;
    end

    for (genvar s = 1; s <= LAT; s++) begin : g_stage
      if (s < int'(G.depth[k])) begin : g_unused
        assign pipe[s][k] = '0;
      end else if (k > 0 && s == int'(G.depth[k])) begin : g_adder
        localparam int A  = int'(G.src_a[k]);
        localparam int B  = int'(G.src_b[k]);
        localparam int SH = int'(G.shift_a[k]);
        localparam mcm_op_e OP = mcm_op_e'(G.op[k]);
        logic signed [OUT_W-1:0] a_sh;
        logic signed [OUT_W-1:0] sum;
        assign a_sh = pipe[s-1][A] <<< SH;
        always_comb begin
          unique case (OP)
            OP_ADD:  sum = a_sh + pipe[s-1][B];
            OP_SUB:  sum = a_sh - pipe[s-1][B];
            default: sum = pipe[s-1][B] - a_sh;
          endcase
        end
        always_ff @(posedge clk) begin
          if (rst) pipe[s][k] <= '0;
          else     pipe[s][k] <= sum;
        end
      end else begin : g_delay
        always_ff @(posedge clk) begin
          if (rst) pipe[s][k] <= '0;
          else     pipe[s][k] <= pipe[s-1][k];
        end
      end
    end

    assign prod[k] = pipe[LAT][k];
  end

endmodule

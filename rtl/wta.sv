// wta: Winner-Takes-All disparity selection. Finds the index of the smallest of
// D filtered costs with a binary tree of compare-select nodes (ties keep the
// lower index), padded to a power of two. One output register.
// A comparator tree is what the source architecture names; tie handling and the
// output register are this design's own choices.
// Timing: the disparity for the costs presented at an enabled step is on `disp`
// after that step's edge.
module wta
  import gifsm_pkg::*;
#(
  parameter int unsigned D  = 64,
  parameter int unsigned DW = (D > 1) ? $clog2(D) : 1
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic signed [Q_W-1:0] cost [D],
  output logic [DW-1:0]         disp
);
  localparam int unsigned LV = (D > 1) ? $clog2(D) : 1;
  localparam int unsigned P  = 1 << LV;

  // Node k of the heap-ordered tree: leaves are P..2P-1, the root is 1.
  logic signed [Q_W-1:0] v  [2*P];
  logic [DW-1:0]         ix [2*P];

  assign v[0]  = '0;
  assign ix[0] = '0;

  for (genvar i = 0; i < P; i++) begin : g_leaf
    if (i < D) begin : g_cost
      assign v[P+i] = cost[i];
    end else begin : g_pad
      assign v[P+i] = {1'b0, {(Q_W-1){1'b1}}};
    end
    assign ix[P+i] = DW'(i);
  end

  for (genvar k = 1; k < P; k++) begin : g_node
    // The right child wins only when strictly smaller.
    wire take_r = v[2*k+1] < v[2*k];
    assign v[k]  = take_r ? v[2*k+1]  : v[2*k];
    assign ix[k] = take_r ? ix[2*k+1] : ix[2*k];
  end

  always_ff @(posedge clk) if (en) disp <= ix[1];
endmodule

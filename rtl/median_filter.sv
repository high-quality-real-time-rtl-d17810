// median_filter: histogram-based weighted median of an m x m window of
// disparities, computed in one step. Each window position drives a ROM whose
// word at address v has ones in bits NB-1-v down to 0 (0: all ones, NB-1: only
// bit 0), i.e. a thermometer code; the position's weight is the ROM enable
// (disabled ROMs output zero). Adder trees sum the ROM words bit-wise, so bin k
// (k = 0..NB-1, bit NB-1-k) holds the number of weighted values <= k: a
// cumulative histogram. Comparators flag the hist whose count exceeds half the
// total weight, and a priority encoder returns the lowest flagged bin, the
// weighted median. The weight generator of the segment-based (adaptive) filter
// sets a weight to one where the position's segment label equals the centre's;
// with ADAPTIVE = 0 all weights are one and the unit is a plain median filter
// (spike removal). The ROM coding, adder trees and priority encoder follow the
// document; the comparison threshold (half the summed weights) is this design's
// reading of it. `bypass` passes the centre value (used at image borders).
// Timing: one output register.
module median_filter #(
  parameter int unsigned MW       = 5,    // window size m
  parameter int unsigned DW       = 6,    // disparity bits
  parameter int unsigned SW       = 3,    // segment label bits
  parameter bit          ADAPTIVE = 1'b1
) (
  input  logic          clk,
  input  logic          en,
  input  logic          bypass,
  input  logic [DW-1:0] disp  [MW][MW],
  input  logic [SW-1:0] label [MW][MW],
  output logic [DW-1:0] median,
  output logic          changed         // registered: median differs from the centre
);
  localparam int unsigned NB = 1 << DW;
  localparam int unsigned CW = $clog2(MW * MW + 1);
  localparam int unsigned C  = (MW - 1) / 2;

  logic [NB-1:0] rom  [MW][MW];
  logic          wgt  [MW][MW];
  logic [CW-1:0] hist [NB];
  logic [CW-1:0] wsum;
  logic [DW-1:0] med_c;
  logic          found;

  always_comb begin
    wsum = '0;
    for (int i = 0; i < MW; i++) begin
      for (int j = 0; j < MW; j++) begin
        wgt[i][j] = ADAPTIVE ? (label[i][j] == label[C][C]) : 1'b1;
        rom[i][j] = wgt[i][j] ? ({NB{1'b1}} >> disp[i][j]) : '0;
        wsum      = wsum + CW'(wgt[i][j]);
      end
    end
    for (int k = 0; k < NB; k++) begin
      hist[k] = '0;
      for (int i = 0; i < MW; i++)
        for (int j = 0; j < MW; j++)
          hist[k] = hist[k] + CW'(rom[i][j][NB-1-k]);
    end
    med_c = disp[C][C];
    found = 1'b0;
    for (int k = 0; k < NB; k++) begin
      if (!found && hist[k] > (wsum >> 1)) begin
        med_c = DW'(k);
        found = 1'b1;
      end
    end
    if (bypass) med_c = disp[C][C];
  end

  always_ff @(posedge clk) begin
    if (en) begin
      median  <= med_c;
      changed <= (med_c != disp[C][C]);
    end
  end
endmodule

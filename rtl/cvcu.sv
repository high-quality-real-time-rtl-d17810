// cvcu: Cost Volume Construction Unit. Two banks of DM cost computation units
// compare the left new pixel and the left old pixel with the DM right pixels
// d = 0..DM-1 columns to their left, giving the left-referenced costs
// C_L(x, d) of the window's entering and leaving rows; they are registered. The
// right-referenced cost volume is not computed again: C_R(x', d) = C_L(x'+d, d),
// so the cost memory delays slice d by DM-1-d steps (a diagonal read of the
// left costs), aligning every slice on right pixel x' = x-(DM-1). The grey
// guidance is registered alongside so that it stays aligned with the costs.
// Structure per the document; the delay-line form of the cost memory is this
// design's choice.
// Timing: left outputs trail the GCMMU outputs by one step, right outputs by DM.
module cvcu
  import gifsm_pkg::*;
#(
  parameter int unsigned DM  = 64,
  parameter int unsigned TC  = 7,
  parameter int unsigned TG  = 2,
  parameter int unsigned SHC = 3,
  parameter int unsigned SHG = 6
) (
  input  logic              clk,
  input  logic              en,
  input  pix_t              l_new,
  input  pix_t              l_old,
  input  pix_t              r_new [DM],
  input  pix_t              r_old [DM],
  input  logic [7:0]        gl_new_i,
  input  logic [7:0]        gl_old_i,
  input  logic [7:0]        gl_mid_i,
  input  logic [7:0]        gr_new_i,
  input  logic [7:0]        gr_old_i,
  input  logic [7:0]        gr_mid_i,
  output logic [COST_W-1:0] cl_new [DM],
  output logic [COST_W-1:0] cl_old [DM],
  output logic [COST_W-1:0] cr_new [DM],
  output logic [COST_W-1:0] cr_old [DM],
  output logic [7:0]        gl_new,
  output logic [7:0]        gl_old,
  output logic [7:0]        gl_mid,
  output logic [7:0]        gr_new,
  output logic [7:0]        gr_old,
  output logic [7:0]        gr_mid
);
  for (genvar d = 0; d < DM; d++) begin : g_d
    logic [COST_W-1:0] c_new, c_old;
    ccu #(.TC(TC), .TG(TG), .SHC(SHC), .SHG(SHG)) u_ccu_new (.ref_pix(l_new), .tgt_pix(r_new[d]), .cost(c_new));
    ccu #(.TC(TC), .TG(TG), .SHC(SHC), .SHG(SHG)) u_ccu_old (.ref_pix(l_old), .tgt_pix(r_old[d]), .cost(c_old));
    always_ff @(posedge clk) begin
      if (en) begin
        cl_new[d] <= c_new;
        cl_old[d] <= c_old;
      end
    end
    delay_line #(.W(COST_W), .D(DM - 1 - d)) u_cm_new (.clk, .en, .din(cl_new[d]), .dout(cr_new[d]));
    delay_line #(.W(COST_W), .D(DM - 1 - d)) u_cm_old (.clk, .en, .din(cl_old[d]), .dout(cr_old[d]));
  end

  always_ff @(posedge clk) begin
    if (en) begin
      gl_new <= gl_new_i; gl_old <= gl_old_i; gl_mid <= gl_mid_i;
      gr_new <= gr_new_i; gr_old <= gr_old_i; gr_mid <= gr_mid_i;
    end
  end
endmodule

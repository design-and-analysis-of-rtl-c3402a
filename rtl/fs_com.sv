`timescale 1ns / 1ps
// fs_com: behavioural model of the full-swing, fully synthesizable clocked
// comparator. It is a model, not synthesizable logic: the real part is built
// from standard cells whose useful behaviour is analog (discharge races
// between cross-coupled gates), which logic simulation cannot reproduce.
//
// What the model keeps of the real part, at the level of its internal
// logic signals:
//  * NAND stage. Outputs (S2, R2) rest at 0 in precharge. When it resolves
//    it gives S2 = 1, R2 = 0 for inp > inn and S2 = 0, R2 = 1 otherwise. It
//    resolves only for common-mode levels in its upper range.
//  * NOR stage. Outputs (S1, R1) rest at 0 in precharge. When it resolves it
//    gives S1 = 0, R1 = 1 for inp > inn and S1 = 1, R1 = 0 otherwise. It
//    resolves only in its lower range. The two ranges overlap around VSUP/2.
//  * Control signal generator. Each input goes through an inverter whose
//    switching threshold is about VSUP/2 (VM_FRAC), and a NAND2 of the two
//    inverter outputs gives stg_sel: 1 when either input is above the
//    threshold. In the overlap region this selects the faster NAND stage.
//  * Controlled SR latches. stg_sel = 1 forces S1 and R1 to 0;
//    stg_sel = 0 forces S2 and R2 to 0. Only one stage reaches the output.
//  * Dual-input SR latch. It takes the decision of whichever stage is
//    active (S2/R2 from the NAND stage, R1/S1 from the NOR stage) and holds
//    if neither is active. If both stages reached it at once, it would show
//    the published failure of the ungated circuit: both outputs low for
//    inp > inn, both high otherwise. The controlled latches prevent this.
//    The latch is modelled by this behaviour, not gate by gate.
// Outputs change TPD_NS after the rising clock edge and hold while the clock
// is low.
//
// The signal values above follow the published description. The stage ranges
// (NAND_MIN_FRAC, NOR_MAX_FRAC) are not published as numbers; the defaults
// are this model's choice. TPD_NS defaults to the published worst-case
// clock-to-output delay at a 0.5 V supply (662 ps). OFFSET_V models a static
// input offset (0 by default).
//
// Interface: out = 1 when inp > inn, outn its complement.
// Timing: sampled on the rising edge of clk, valid TPD_NS later.
module fs_com #(
  parameter real TPD_NS        = 0.662,
  parameter real VM_FRAC       = 0.5,
  parameter real NAND_MIN_FRAC = 0.4,
  parameter real NOR_MAX_FRAC  = 0.6,
  parameter real OFFSET_V      = 0.0
) (
  input  logic clk,
  input  real  inp,
  input  real  inn,
  input  real  vsup,
  output logic out,
  output logic outn,
  output logic stg_sel
);

  logic decision, sel, nand_ok, nor_ok;
  logic s1, r1, s2, r2;        // stage outputs after the controlled latches
  logic nand_act, nor_act;
  real  vcm;

  always_comb begin
    vcm      = 0.5 * (inp + inn);
    decision = (inp - inn) > OFFSET_V;
    // Control signal generator: NOT on each input, NAND2 of the results.
    sel      = !(!(inp > VM_FRAC * vsup) && !(inn > VM_FRAC * vsup));
    nand_ok  = vcm >= NAND_MIN_FRAC * vsup;
    nor_ok   = vcm <= NOR_MAX_FRAC * vsup;
    // Stage outputs (0 = precharge), masked by the controlled SR latches.
    s2       = sel  && nand_ok && decision;
    r2       = sel  && nand_ok && !decision;
    s1       = !sel && nor_ok  && !decision;
    r1       = !sel && nor_ok  && decision;
    nand_act = s2 || r2;
    nor_act  = s1 || r1;
  end

  initial begin
    out     = 1'b0;
    outn    = 1'b1;
    stg_sel = 1'b1;
  end

  // Dual-input SR latch, evaluated in the sampling phase.
  always @(posedge clk) begin
    stg_sel <= sel;
    if (nand_act && nor_act) begin
      out  <= #(TPD_NS) !s2;
      outn <= #(TPD_NS) !s2;
    end else if (nand_act) begin
      out  <= #(TPD_NS) s2;
      outn <= #(TPD_NS) r2;
    end else if (nor_act) begin
      out  <= #(TPD_NS) r1;
      outn <= #(TPD_NS) s1;
    end
  end

endmodule

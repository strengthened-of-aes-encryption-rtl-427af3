// rpfl_cell -- behavioural model of the Random Power Fixed Logic (RPFL) exclusive gate.
//
// The real part is a 10-transistor static CMOS cell (5 NMOS, 5 PMOS): a
// complementary exclusive gate plus two select transistors, M1 and M2, that
// rewire its pull-down and pull-up networks between two topologies:
//   r = 0 : AND-OR-Invert  (M1 off, M2 on)   y = ~((a & b) | (~a & ~b))
//   r = 1 : OR-AND-Invert  (M1 on,  M2 off)  y = ~((a | ~b) & (~a | b))
// Both give y = a ^ b, but the series/parallel arrangement of the conducting
// transistors, and so the VDD-to-GND resistance and the current drawn while an
// input switches, differs between them. Driving r from a random source makes the
// gate's supply current vary independently of its data while its logic stays
// fixed. The gate's topologies, its two select transistors and the idea of a
// random r follow the RPFL proposal; building it as exclusive-OR rather than
// exclusive-NOR is a choice of this design, because AddRoundKey needs XOR.
//
// This file is a behavioural model: it reproduces the logic only. The power
// behaviour exists only in the transistor-level cell, which must replace this
// model in a physical flow and be kept from being re-optimised (a synthesis
// tool would merge both forms into one XOR and remove the point of the cell).
//
// Interface: a, b data inputs; r topology select; y = a ^ b. Purely
// combinational; r should be stable while a or b switch.
module rpfl_cell (
  input  logic a,
  input  logic b,
  input  logic r,
  output logic y
);

  logic y_aoi;  // sum-of-products network, active when r = 0
  logic y_oai;  // product-of-sums network, active when r = 1

  always_comb begin
    y_aoi = ~((a & b) | (~a & ~b));
    y_oai = ~((a | ~b) & (~a | b));
    y     = r ? y_oai : y_aoi;
  end

endmodule

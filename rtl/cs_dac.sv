// cs_dac: digital model of one binary-weighted current-steering DAC (one per weight).
//
// Each magnitude bit b switches a mirrored current of dac_width(COL, b) unit currents
// onto the DAC's magnitude line (a 0 bit dumps it to ground). The transistor widths
// carry the coefficient f(COL), so the weight is scaled for free. The magnitude line
// is then steered to the shared positive line when (sign XOR hist) is 1 and to the
// negative line otherwise, which multiplies the sign-magnitude weight by the bipolar
// history bit (hist = 1 means taken, +1; hist = 0 means not taken, -1). The bias DAC
// ties hist to 1.
//
// Currents are integers in units of I_u, which is the ideal (linear-transistor)
// behaviour of the circuit; mismatch and non-linearity are not modelled.
//
// Interface: weight (sign + 6-bit magnitude), hist; outputs i_pos / i_neg, exactly
// one of which carries the magnitude current. Purely combinational.
module cs_dac
  import anp_pkg::*;
#(
  parameter int unsigned COL = 0   // weight position 0..128, 0 = bias
) (
  input  weight_t  weight,
  input  logic     hist,
  output current_t i_pos,
  output current_t i_neg
);

  current_t i_mag;

  always_comb begin
    i_mag = '0;
    for (int unsigned b = 0; b < MAG_BITS; b++) begin
      if (weight.mag[b]) i_mag += current_t'(dac_width(COL, b));
    end
  end

  // Current steering switch driven by sign XOR history bit.
  assign i_pos = (weight.sign ^ hist) ? i_mag : '0;
  assign i_neg = (weight.sign ^ hist) ? '0    : i_mag;

endmodule

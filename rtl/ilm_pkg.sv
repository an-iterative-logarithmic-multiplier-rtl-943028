// ilm_pkg: shared constants of the iterative logarithmic multiplier.
//
// The multiplier approximates N1*N2 by writing each operand as 2^k + residue
// and dropping the residue*residue term; each error-correction circuit (ECC)
// repeats the same step on the two residues. The defaults below are the main
// configuration: 16-bit unsigned operands, a 32-bit product and two ECCs,
// the configuration quoted for the >150 MHz, <2 % worst-case-error result.
package ilm_pkg;

  // Operand width n; the product and all internal sums are 2n bits wide.
  parameter int unsigned OPERAND_W = 16;

  // Number of error-correction circuits after the first basic block.
  parameter int unsigned NUM_ECC = 2;

  // Pipeline depth of one pipelined basic block (stages 1..4).
  parameter int unsigned BB_STAGES = 4;

  // Width of a characteristic number k for an operand of w bits.
  function automatic int unsigned k_width(int unsigned w);
    return (w > 1) ? $clog2(w) : 1;
  endfunction

  // Latency in clock cycles of the pipelined multiplier: the basic block of
  // the last ECC starts one cycle after the one before it, and its output is
  // summed combinationally with the registered running product.
  function automatic int unsigned pipe_latency(int unsigned num_ecc);
    return BB_STAGES + num_ecc;
  endfunction

endpackage

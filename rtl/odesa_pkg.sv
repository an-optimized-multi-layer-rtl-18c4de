// odesa_pkg: types and helper functions shared by the ODESA spiking neural
// network blocks.
//
// The decay shape of a synapse is selected with decay_e: DECAY_LINEAR counts
// the time surface down by one step per clock (the main configuration), and
// DECAY_EXP halves it every clock (the shift-right alternative). Both are
// built without multipliers.
//
// Default widths (8-bit decay counter, 8-bit weights) are this design's own
// choice; the network sizes used elsewhere come from the 4_6_3_3 network.
package odesa_pkg;

  typedef enum logic {
    DECAY_LINEAR = 1'b0,
    DECAY_EXP    = 1'b1
  } decay_e;

  // Width of a neuron potential: sum of N_SYN products of a W_BITS weight and
  // an N_BITS time-surface value.
  function automatic int pot_width(input int w_bits, input int n_bits, input int n_syn);
    return w_bits + n_bits + $clog2(n_syn + 1);
  endfunction

  // Reset value of a weight: a fixed scrambled pattern so that the neurons of
  // a layer do not start identical. Bit w_bits-2 is forced to one, so the value
  // lies in [2^(w_bits-2), 2^w_bits-1].
  function automatic int unsigned init_weight(input int neuron, input int syn, input int w_bits);
    int unsigned h;
    h = (neuron * 32'd2654435761) ^ (syn * 32'd40503) ^ 32'h9E37;
    h = h ^ (h >> 13);
    h = h * 32'd1103515245 + 32'd12345;
    return ((h >> 8) & ((32'd1 << w_bits) - 1)) | (32'd1 << (w_bits - 2));
  endfunction

endpackage

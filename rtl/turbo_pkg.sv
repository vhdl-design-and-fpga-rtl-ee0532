// turbo_pkg: constants and functions shared by the majority-logic turbo decoder.
//
// The component codes are Difference Set Codes (DSC), cyclic codes of length
// n = q^2 + q + 1 (q = 2^s) built on a perfect difference set P = {p_0 .. p_q}
// modulo n. Every cyclic shift of the incidence vector of P is a parity check,
// and the J = q + 1 checks that contain a given bit j meet only in j; they are
// the "orthogonal equations" used by one-step majority-logic (threshold)
// decoding. Three codes are supported, as in the design this RTL follows:
// DSC(7,3) (J=3), DSC(21,11) (J=5) and DSC(73,45) (J=9). The sets themselves are
// this design's choice of the standard perfect difference sets for these
// lengths.
//
// Also here: the tag that travels with each frame row to say which decoding
// pass it is in.
package turbo_pkg;

  // Number of orthogonal equations per bit (size of the difference set).
  function automatic int ds_size(input int n);
    case (n)
      7:       return 3;
      21:      return 5;
      73:      return 9;
      default: return 0;
    endcase
  endfunction

  // Element i of the perfect difference set modulo n.
  function automatic int ds_elem(input int n, input int i);
    int s7  [3] = '{0, 1, 3};
    int s21 [5] = '{0, 1, 4, 14, 16};
    int s73 [9] = '{0, 1, 3, 7, 15, 31, 36, 54, 63};
    case (n)
      7:       return s7[i % 3];
      21:      return s21[i % 5];
      73:      return s73[i % 9];
      default: return 0;
    endcase
  endfunction

  // Dimension k of DSC(n, k), for reference and for checking.
  function automatic int ds_dim(input int n);
    case (n)
      7:       return 3;
      21:      return 11;
      73:      return 45;
      default: return 0;
    endcase
  endfunction

  // Frame tag: which pass through the two-SISO loop a frame is in, and the
  // index of its last pass (number of iterations minus one).
  typedef struct packed {
    logic [1:0] pass;
    logic [1:0] last;
  } iter_tag_t;

  localparam int TAG_BITS = $bits(iter_tag_t);

endpackage

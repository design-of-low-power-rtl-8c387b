// codec_pkg: types and sizes shared by the joint crosstalk-avoidance /
// single-error-correction link codecs (DAP, BSC and MDR).
//
// All three codes protect a K-bit flit by sending every flit bit on two
// adjacent wires and adding the even parity of the flit. Duplicating each bit
// keeps neighbouring wires of a pair switching together, which limits the
// worst-case coupling of any wire to p = 2; the parity bit together with the
// two copies gives a Hamming distance of three, enough to correct one wrong
// wire. The codes differ only in where the parity goes:
//   DAP  2K+1 wires, parity on the top wire.
//   BSC  2K+1 wires, parity alternates between the top and the bottom wire on
//        successive codewords, so two successive codewords never share a
//        boundary between duplicated pairs.
//   MDR  2K+2 wires, two copies of the parity on the two top wires.
// The flit width of 32 bits is the inter-switch link width used in the
// energy evaluation; the 4-bit examples of the code tables are reached by
// overriding K.
package codec_pkg;

  // Which joint code a link uses.
  typedef enum logic [1:0] {
    CODE_DAP = 2'd0,
    CODE_BSC = 2'd1,
    CODE_MDR = 2'd2
  } code_e;

  // Uncoded inter-switch link width (flit width) of the evaluated NoCs.
  localparam int unsigned FLIT_W = 32;

  // Number of link wires a code needs for a K-bit flit.
  function automatic int unsigned code_width(code_e code, int unsigned k);
    return (code == CODE_MDR) ? 2 * k + 2 : 2 * k + 1;
  endfunction

endpackage

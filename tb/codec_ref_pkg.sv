// codec_ref_pkg: reference model of the three link codes for the testbenches.
//
// Codewords are built the way the code tables print them, top wire first:
// start from the parity bit(s) and append every flit bit twice, from the most
// significant bit down. The BSC shifted codeword is the DAP codeword moved up
// by one wire with the parity re-entering at wire 0. Words are held in a
// 66-bit vector (enough for K <= 32); bits above the code width are zero.
package codec_ref_pkg;

  localparam int MAXW = 66;
  typedef logic [MAXW-1:0] word_t;

  function automatic logic ref_parity(logic [31:0] x, int k);
    logic p = 1'b0;
    for (int i = 0; i < k; i++) p ^= x[i];
    return p;
  endfunction

  function automatic word_t ref_dap(logic [31:0] x, int k);
    word_t w = word_t'(ref_parity(x, k));
    for (int i = k - 1; i >= 0; i--) w = (w << 2) | word_t'({x[i], x[i]});
    return w;
  endfunction

  function automatic word_t ref_mdr(logic [31:0] x, int k);
    logic  p = ref_parity(x, k);
    word_t w = word_t'({p, p});
    for (int i = k - 1; i >= 0; i--) w = (w << 2) | word_t'({x[i], x[i]});
    return w;
  endfunction

  function automatic word_t ref_bsc(logic [31:0] x, int k, bit shifted);
    word_t mask = (word_t'(1) << (2 * k + 1)) - 1;
    word_t w    = ref_dap(x, k);
    if (shifted) w = ((w << 1) | word_t'(ref_parity(x, k))) & mask;
    return w;
  endfunction

  // 1 when, going from prev to cur on nw wires, a switching wire sees a
  // total coupling above 2 (sum over both neighbours of |delta_i - delta_j|).
  function automatic bit ref_coupling_violation(word_t prev, word_t cur, int nw);
    for (int i = 0; i < nw; i++) begin
      int di = int'(cur[i]) - int'(prev[i]);
      int c  = 0;
      if (di == 0) continue;
      if (i > 0)      c += (di - (int'(cur[i-1]) - int'(prev[i-1]))) * ((di - (int'(cur[i-1]) - int'(prev[i-1]))) < 0 ? -1 : 1);
      if (i < nw - 1) c += (di - (int'(cur[i+1]) - int'(prev[i+1]))) * ((di - (int'(cur[i+1]) - int'(prev[i+1]))) < 0 ? -1 : 1);
      if (c > 2) return 1'b1;
    end
    return 1'b0;
  endfunction

endpackage

// bsc_encoder: Boundary Shift Code encoder stage at the sending end of a link.
//
// The codeword is the DAP codeword (each flit bit on two adjacent wires plus
// the even parity of the flit), but on every second codeword the whole word
// is moved up by one wire and the parity goes to the opposite side:
//   unshifted (1st, 3rd, ... codeword after reset):
//       code[2i] = code[2i+1] = x[i],   code[2K] = parity
//   shifted   (2nd, 4th, ... codeword):
//       code[2i+1] = code[2i+2] = x[i], code[0]  = parity
// The odd wires therefore always carry x[0..K-1]; only the even wires are
// switched by the phase, which is the multiplexer column of the BSC encoder
// drawing. Because the pair boundaries move on every codeword, two successive
// codewords never share a boundary, and no wire can see both of its
// neighbours switch against it.
//
// Timing: when enc_en is high the codeword is registered on the rising edge
// (one cycle of latency) and the phase flips for the next codeword. While
// enc_en is low the wires hold and the phase does not change. The phase
// advancing per codeword rather than per clock, and the first codeword after
// reset being unshifted (as in the first row of the code table), are choices
// of this design. Reset is synchronous, active low, and clears the wires.
module bsc_encoder #(
  parameter int unsigned K = codec_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enc_en,   // a flit is presented this cycle
  input  logic [K-1:0] flit,
  output logic [2*K:0] code,     // link wires, registered
  output logic         shifted   // phase of the codeword now on the wires
);

  logic [2*K:0] dap_word, code_d;
  logic         phase_q;          // 1: the next codeword is sent shifted

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      dap_word[2*i]   = flit[i];
      dap_word[2*i+1] = flit[i];
    end
    dap_word[2*K] = ^flit;
    // shifted word: rotate the DAP word up by one, parity lands on wire 0
    code_d = phase_q ? {dap_word[2*K-1:0], dap_word[2*K]} : dap_word;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code    <= '0;
      phase_q <= 1'b0;
      shifted <= 1'b0;
    end else if (enc_en) begin
      code    <= code_d;
      shifted <= phase_q;
      phase_q <= ~phase_q;
    end
  end

endmodule

// mdr_encoder: Modified Dual Rail encoder stage at the sending end of a link.
//
// The dual rail code sends K check bits c[i] = d[i] beside the K data bits,
// plus the check bit c[K] = d[0] ^ ... ^ d[K-1]. Each data bit and its copy
// sit on two adjacent wires (code[2i], code[2i+1]), and the modified form
// sends c[K] twice, on the two top wires code[2K] and code[2K+1], so that the
// parity wire also has a partner switching with it. For K = 4 this gives the
// MDR column of the code table (printed top wire first).
//
// Timing: when enc_en is high the codeword is registered on the rising edge
// (one cycle of latency); otherwise the wires hold. Reset is synchronous,
// active low, and clears the wires. Placing both parity copies on the top
// side is read from the code table; the register and enable are choices of
// this design.
module mdr_encoder #(
  parameter int unsigned K = codec_pkg::FLIT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           enc_en,  // a flit is presented this cycle
  input  logic [K-1:0]   flit,
  output logic [2*K+1:0] code     // link wires, registered
);

  logic [2*K+1:0] code_d;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      code_d[2*i]   = flit[i];
      code_d[2*i+1] = flit[i];
    end
    code_d[2*K]   = ^flit;
    code_d[2*K+1] = ^flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      code <= '0;
    else if (enc_en) code <= code_d;
  end

endmodule

// dap_encoder: Duplicate-Add-Parity encoder stage at the sending end of a link.
//
// Flit bit x[i] drives the two adjacent wires code[2i] and code[2i+1]; the top
// wire code[2K] carries the even parity of the whole flit. For K = 4 this is
// exactly the wiring y0..y8 of the classic DAP encoder drawing (x0 -> y0,y1,
// ..., x3 -> y6,y7, parity -> y8), and it reproduces the DAP column of the
// code table (printed y8 first).
//
// The encoder is a pipeline stage of its own: when enc_en is high the flit is
// encoded and registered on the rising clock edge, so code changes one cycle
// after the flit is presented. While enc_en is low the wires keep their last
// codeword and do not toggle. Reset (active low, synchronous) drives all
// wires low. Registering the codec output and the enable that gates it are
// choices of this design; the code itself follows the DAP definition.
module dap_encoder #(
  parameter int unsigned K = codec_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enc_en,   // a flit is presented this cycle
  input  logic [K-1:0] flit,
  output logic [2*K:0] code      // link wires, registered
);

  logic [2*K:0] code_d;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      code_d[2*i]   = flit[i];
      code_d[2*i+1] = flit[i];
    end
    code_d[2*K] = ^flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)      code <= '0;
    else if (enc_en) code <= code_d;
  end

endmodule

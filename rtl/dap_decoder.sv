// dap_decoder: Duplicate-Add-Parity decoder stage at the receiving end of a link.
//
// The parity of the upper copy (the odd wires code[1], code[3], ...) is
// recomputed and compared with the parity wire code[2K]. If they agree the
// upper copy is taken as the flit; if they differ the upper copy or the
// parity wire was hit and the lower copy (the even wires) is taken. Any single
// wrong wire is therefore corrected. For K = 4 this is the DAP decoder
// drawing: y1,y3,y5,y7 and y8 form the select of four 2:1 multiplexers whose
// input 1 is y0,y2,y4,y6 and whose input 0 is y1,y3,y5,y7.
//
// When dec_en is high the decoded flit is registered on the rising clock edge
// (one cycle of latency) together with flit_valid and mismatch, the
// multiplexer select (1 = a parity mismatch was seen and the lower copy was
// used). While dec_en is low the outputs hold and flit_valid is low.
// Registering the output, the enable and the mismatch output are choices of
// this design. Reset is synchronous, active low.
module dap_decoder #(
  parameter int unsigned K = codec_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dec_en,     // a codeword is on the wires this cycle
  input  logic [2*K:0] code,
  output logic [K-1:0] flit,       // decoded flit, registered
  output logic         flit_valid, // flit was updated by the last edge
  output logic         mismatch    // parity mismatch: lower copy was selected
);

  logic [K-1:0] upper, lower, flit_d;
  logic         sel_lower;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      lower[i] = code[2*i];
      upper[i] = code[2*i+1];
    end
    sel_lower = (^upper) ^ code[2*K];
    flit_d    = sel_lower ? lower : upper;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flit       <= '0;
      flit_valid <= 1'b0;
      mismatch   <= 1'b0;
    end else begin
      flit_valid <= dec_en;
      if (dec_en) begin
        flit     <= flit_d;
        mismatch <= sel_lower;
      end
    end
  end

endmodule

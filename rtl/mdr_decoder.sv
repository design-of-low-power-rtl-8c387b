// mdr_decoder: Modified Dual Rail decoder stage at the receiving end of a link.
//
// The parity of the upper data copy (odd wires) is recomputed and compared
// with the two received parity copies. If both parity copies agree with each
// other, a mismatch against them means the upper copy is wrong and the lower
// copy (even wires) is taken. If the two parity copies disagree, the single
// error is on a parity wire, the data copies are both intact and the upper
// copy is taken. Any single wrong wire is corrected.
//
// Timing: when dec_en is high the decoded flit is registered on the rising
// edge (one cycle of latency), with flit_valid and mismatch (1 = the lower
// copy was selected). While dec_en is low nothing changes and flit_valid is
// low. Using the second parity copy to recognise a parity-wire error is a
// choice of this design. Reset is synchronous, active low.
module mdr_decoder #(
  parameter int unsigned K = codec_pkg::FLIT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           dec_en,     // a codeword is on the wires this cycle
  input  logic [2*K+1:0] code,
  output logic [K-1:0]   flit,       // decoded flit, registered
  output logic           flit_valid,
  output logic           mismatch    // lower copy was selected
);

  logic [K-1:0] upper, lower, flit_d;
  logic         parity_ok, sel_lower;

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      lower[i] = code[2*i];
      upper[i] = code[2*i+1];
    end
    parity_ok = (code[2*K] == code[2*K+1]);
    sel_lower = parity_ok & ((^upper) ^ code[2*K]);
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

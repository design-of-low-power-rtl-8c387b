// bsc_decoder: Boundary Shift Code decoder stage at the receiving end of a link.
//
// The decoder keeps its own copy of the codeword phase, which flips on every
// codeword it accepts, in step with the encoder. A shifted codeword is first
// moved back down by one wire (the first multiplexer column of the BSC
// decoder drawing) so that it has the DAP layout; then the parity of the
// upper copy is recomputed, compared with the parity wire, and the lower copy
// is taken on a mismatch, the upper copy otherwise. Any single wrong wire is
// corrected.
//
// Timing: when dec_en is high the decoded flit is registered on the rising
// edge (one cycle of latency), with flit_valid and mismatch (1 = parity
// mismatch, lower copy used). While dec_en is low nothing changes and
// flit_valid is low. The phase is reset to "unshifted", matching the encoder;
// this requires that every codeword the encoder sends reaches the decoder
// exactly once. Reset is synchronous, active low.
module bsc_decoder #(
  parameter int unsigned K = codec_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         dec_en,     // a codeword is on the wires this cycle
  input  logic [2*K:0] code,
  output logic [K-1:0] flit,       // decoded flit, registered
  output logic         flit_valid,
  output logic         mismatch    // parity mismatch: lower copy was selected
);

  logic [2*K:0] dap_word;
  logic [K-1:0] upper, lower, flit_d;
  logic         sel_lower;
  logic         phase_q;          // 1: the next codeword arrives shifted

  always_comb begin
    // undo the one-wire shift: parity comes back from wire 0 to the top
    dap_word = phase_q ? {code[0], code[2*K:1]} : code;
    for (int unsigned i = 0; i < K; i++) begin
      lower[i] = dap_word[2*i];
      upper[i] = dap_word[2*i+1];
    end
    sel_lower = (^upper) ^ dap_word[2*K];
    flit_d    = sel_lower ? lower : upper;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      flit       <= '0;
      flit_valid <= 1'b0;
      mismatch   <= 1'b0;
      phase_q    <= 1'b0;
    end else begin
      flit_valid <= dec_en;
      if (dec_en) begin
        flit     <= flit_d;
        mismatch <= sel_lower;
        phase_q  <= ~phase_q;
      end
    end
  end

endmodule

// coded_link: one inter-switch NoC link protected by a joint crosstalk
// avoidance and single error correction code.
//
// The encoder stage sits at the output of the sending switch, the decoder
// stage at the input of the receiving switch, and the NW link wires run
// between them. Each codec adds one pipeline stage to the link, so a flit
// presented with in_valid at a rising edge leaves with out_valid two rising
// edges later; flits may be sent back to back or with idle cycles between
// them, and the wires hold their last codeword while the link is idle.
//
// The CODE parameter picks the code (DAP, BSC or MDR; see codec_pkg). A
// valid wire runs beside the coded wires to tell the decoder when a new
// codeword is on the link; it stands for the link-level flow control of the
// switches, which this block does not model, and is not coded.
//
// wire_fault is XORed onto the wires between the two stages. It models a
// transient upset on the wire segment (noise, a particle strike, ground
// bounce) and is held at zero in normal use; any single set bit is
// corrected by the decoder. link_code shows the codeword the encoder drives,
// link_shifted tells whether a BSC codeword is
// sent shifted (always 0 for DAP and MDR), and out_mismatch tells that the
// decoder took the lower data copy.
//
// An assertion checks the crosstalk rule the codes exist for: between two
// successive codewords on the wires no switching wire sees a total coupling
// above 2 (one neighbour switching against it, or both neighbours still),
// i.e. the worst-case wire delay stays at (1 + 2*lambda)*tau.
module coded_link
  import codec_pkg::*;
#(
  parameter code_e       CODE = CODE_DAP,
  parameter int unsigned K    = FLIT_W,
  localparam int unsigned NW  = code_width(CODE, K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [K-1:0]  in_flit,
  input  logic [NW-1:0] wire_fault,   // transient-upset model, 0 in normal use
  output logic [NW-1:0] link_code,    // codeword driven onto the wires
  output logic          link_shifted, // BSC only: the codeword is shifted
  output logic          out_valid,
  output logic [K-1:0]  out_flit,
  output logic          out_mismatch
);

  logic          link_valid;
  logic [NW-1:0] rx_code;

  always_ff @(posedge clk) begin
    if (!rst_n) link_valid <= 1'b0;
    else        link_valid <= in_valid;
  end

  assign rx_code = link_code ^ wire_fault;

  if (CODE == CODE_DAP) begin : g_dap
    assign link_shifted = 1'b0;
    dap_encoder #(.K(K)) u_enc (
      .clk, .rst_n, .enc_en(in_valid), .flit(in_flit), .code(link_code)
    );
    dap_decoder #(.K(K)) u_dec (
      .clk, .rst_n, .dec_en(link_valid), .code(rx_code),
      .flit(out_flit), .flit_valid(out_valid), .mismatch(out_mismatch)
    );
  end else if (CODE == CODE_BSC) begin : g_bsc
    bsc_encoder #(.K(K)) u_enc (
      .clk, .rst_n, .enc_en(in_valid), .flit(in_flit), .code(link_code),
      .shifted(link_shifted)
    );
    bsc_decoder #(.K(K)) u_dec (
      .clk, .rst_n, .dec_en(link_valid), .code(rx_code),
      .flit(out_flit), .flit_valid(out_valid), .mismatch(out_mismatch)
    );
  end else begin : g_mdr
    assign link_shifted = 1'b0;
    mdr_encoder #(.K(K)) u_enc (
      .clk, .rst_n, .enc_en(in_valid), .flit(in_flit), .code(link_code)
    );
    mdr_decoder #(.K(K)) u_dec (
      .clk, .rst_n, .dec_en(link_valid), .code(rx_code),
      .flit(out_flit), .flit_valid(out_valid), .mismatch(out_mismatch)
    );
  end

  // ---- crosstalk rule on the encoder output -------------------------------
  logic [NW-1:0] code_prev;
  logic          xtalk_ok;

  always_ff @(posedge clk) begin
    if (!rst_n) code_prev <= '0;
    else        code_prev <= link_code;
  end

  // Coupling of wire i towards neighbour j is |delta_i - delta_j| with delta
  // in {-1, 0, +1}; it is 2 only when the two switch in opposite directions.
  function automatic int unsigned pair_coupling(logic i_now, logic i_prev,
                                                logic j_now, logic j_prev);
    int di, dj;
    di = int'(i_now) - int'(i_prev);
    dj = int'(j_now) - int'(j_prev);
    return (di > dj) ? unsigned'(di - dj) : unsigned'(dj - di);
  endfunction

  always_comb begin
    xtalk_ok = 1'b1;
    for (int unsigned i = 0; i < NW; i++) begin
      int unsigned coupling;
      coupling = 0;
      if (i > 0)
        coupling += pair_coupling(link_code[i], code_prev[i], link_code[i-1], code_prev[i-1]);
      if (i < NW - 1)
        coupling += pair_coupling(link_code[i], code_prev[i], link_code[i+1], code_prev[i+1]);
      if (link_code[i] != code_prev[i] && coupling > 2) xtalk_ok = 1'b0;
    end
  end

  a_max_coupling: assert property (@(posedge clk) disable iff (!rst_n) xtalk_ok)
    else $error("coded_link: coupling above 2 between successive codewords");

endmodule

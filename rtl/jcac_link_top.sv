// jcac_link_top: the three joint crosstalk-avoidance / single-error-correction
// link codes on a 32-bit inter-switch NoC link, side by side.
//
// Each of the three channels is a complete coded link (coded_link): encoder
// stage at the sending switch, the coded wires, decoder stage at the
// receiving switch. The channels are independent; each has its own flit
// input, its own transient-fault mask on its wires and its own outputs, so
// the codes can be compared on the same traffic or used on their own.
//   DAP  Duplicate-Add-Parity, 2K+1 = 65 wires
//   BSC  Boundary Shift Code,  2K+1 = 65 wires
//   MDR  Modified Dual Rail,   2K+2 = 66 wires
// against the K = 32 wires of an uncoded link.
//
// The NoC switches at the two ends are not part of this design: the *_in_*
// ports are what the sending switch's output port drives, the *_out_* ports
// what the receiving switch's input buffer takes. Timing on every channel: a
// flit presented with *_in_valid at a rising edge appears with *_out_valid at
// the second rising edge after it (one pipeline stage in each codec). The
// *_fault ports model transient upsets on the wires and are held at zero in
// normal use. Reset is synchronous and active low.
module jcac_link_top
  import codec_pkg::*;
#(
  parameter int unsigned K = FLIT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  // Duplicate-Add-Parity channel
  input  logic           dap_in_valid,
  input  logic [K-1:0]   dap_in_flit,
  input  logic [2*K:0]   dap_fault,
  output logic [2*K:0]   dap_link_code,
  output logic           dap_out_valid,
  output logic [K-1:0]   dap_out_flit,
  output logic           dap_out_mismatch,
  // Boundary Shift Code channel
  input  logic           bsc_in_valid,
  input  logic [K-1:0]   bsc_in_flit,
  input  logic [2*K:0]   bsc_fault,
  output logic [2*K:0]   bsc_link_code,
  output logic           bsc_link_shifted,
  output logic           bsc_out_valid,
  output logic [K-1:0]   bsc_out_flit,
  output logic           bsc_out_mismatch,
  // Modified Dual Rail channel
  input  logic           mdr_in_valid,
  input  logic [K-1:0]   mdr_in_flit,
  input  logic [2*K+1:0] mdr_fault,
  output logic [2*K+1:0] mdr_link_code,
  output logic           mdr_out_valid,
  output logic [K-1:0]   mdr_out_flit,
  output logic           mdr_out_mismatch
);

  logic dap_shifted_unused, mdr_shifted_unused;

  coded_link #(.CODE(CODE_DAP), .K(K)) u_dap (
    .clk, .rst_n,
    .in_valid(dap_in_valid), .in_flit(dap_in_flit), .wire_fault(dap_fault),
    .link_code(dap_link_code), .link_shifted(dap_shifted_unused),
    .out_valid(dap_out_valid), .out_flit(dap_out_flit),
    .out_mismatch(dap_out_mismatch)
  );

  coded_link #(.CODE(CODE_BSC), .K(K)) u_bsc (
    .clk, .rst_n,
    .in_valid(bsc_in_valid), .in_flit(bsc_in_flit), .wire_fault(bsc_fault),
    .link_code(bsc_link_code), .link_shifted(bsc_link_shifted),
    .out_valid(bsc_out_valid), .out_flit(bsc_out_flit),
    .out_mismatch(bsc_out_mismatch)
  );

  coded_link #(.CODE(CODE_MDR), .K(K)) u_mdr (
    .clk, .rst_n,
    .in_valid(mdr_in_valid), .in_flit(mdr_in_flit), .wire_fault(mdr_fault),
    .link_code(mdr_link_code), .link_shifted(mdr_shifted_unused),
    .out_valid(mdr_out_valid), .out_flit(mdr_out_flit),
    .out_mismatch(mdr_out_mismatch)
  );

endmodule

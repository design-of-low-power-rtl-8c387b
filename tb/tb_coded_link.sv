// tb_coded_link: self-checking testbench of one coded link (encoder stage,
// wires, decoder stage), for each of the three codes at a 4-bit flit width.
//
// The six flits of the code table are sent back to back through a DAP, a BSC
// and an MDR link. One clock after each flit enters, the wires must carry the
// printed codeword (row 4 with its parity taken from the parity equation, as
// the printed parity of flit 1010 disagrees with it); one clock later the flit
// must leave the decoder. While each codeword is on the wires one wire is
// flipped, a different one for each row, and the flit must still arrive
// intact. A random phase with idle cycles and random single upsets follows,
// checked against the reference model and a scoreboard.
module tb_coded_link;
  import codec_pkg::*;
  import codec_ref_pkg::*;

  localparam int K = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [2:0]  iv, ov, om;
  logic [3:0]  ifl [3];
  logic [3:0]  ofl [3];
  logic [9:0]  flt [3];
  logic [9:0]  lc  [3];
  logic [8:0]  dap_lc, bsc_lc;
  logic [9:0]  mdr_lc;
  logic [2:0]  sh;

  coded_link #(.CODE(CODE_DAP), .K(K)) u_dap (.clk, .rst_n,
    .in_valid(iv[0]), .in_flit(ifl[0]), .wire_fault(flt[0][8:0]), .link_code(dap_lc),
    .link_shifted(sh[0]), .out_valid(ov[0]), .out_flit(ofl[0]), .out_mismatch(om[0]));
  coded_link #(.CODE(CODE_BSC), .K(K)) u_bsc (.clk, .rst_n,
    .in_valid(iv[1]), .in_flit(ifl[1]), .wire_fault(flt[1][8:0]), .link_code(bsc_lc),
    .link_shifted(sh[1]), .out_valid(ov[1]), .out_flit(ofl[1]), .out_mismatch(om[1]));
  coded_link #(.CODE(CODE_MDR), .K(K)) u_mdr (.clk, .rst_n,
    .in_valid(iv[2]), .in_flit(ifl[2]), .wire_fault(flt[2]), .link_code(mdr_lc),
    .link_shifted(sh[2]), .out_valid(ov[2]), .out_flit(ofl[2]), .out_mismatch(om[2]));

  assign lc[0] = {1'b0, dap_lc};
  assign lc[1] = {1'b0, bsc_lc};
  assign lc[2] = mdr_lc;

  localparam int NW [3] = '{9, 9, 10};
  localparam logic [3:0] T_FLIT [6] = '{4'b0010, 4'b0010, 4'b1100, 4'b1010, 4'b0100, 4'b0011};
  localparam logic [9:0] T_CODE [3][6] = '{
    '{10'b100001100, 10'b100001100, 10'b011110000, 10'b111001100, 10'b100110000, 10'b000001111},
    '{10'b100001100, 10'b000011001, 10'b011110000, 10'b110011001, 10'b100110000, 10'b000011110},
    '{10'b1100001100, 10'b1100001100, 10'b0011110000, 10'b1111001100, 10'b1100110000, 10'b0000001111}};
  // parity wires per code and phase, to compare row 4 without them
  localparam logic [9:0] P_MASK [3] = '{10'b0100000000, 10'b0100000001, 10'b1100000000};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic word_t model(int ch, logic [3:0] f, bit shifted);
    case (ch)
      0:       return ref_dap(32'(f), K);
      1:       return ref_bsc(32'(f), K, shifted);
      default: return ref_mdr(32'(f), K);
    endcase
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] q_flit [3][$];
    bit         phase [3];
    bit         wire_ph [3];
    bit         on_wire [3];
    int         n_out;
    word_t      w;
    for (int ch = 0; ch < 3; ch++) begin
      iv[ch] = 1'b0; ifl[ch] = '0; flt[ch] = '0; phase[ch] = 0; wire_ph[ch] = 0; on_wire[ch] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // ---- code table rows back to back, one upset per row ----
    for (int r = 0; r < 8; r++) begin
      @(negedge clk);
      for (int ch = 0; ch < 3; ch++) begin
        iv[ch]  = (r < 6);
        ifl[ch] = (r < 6) ? T_FLIT[r] : 4'b0;
        flt[ch] = '0;
        if (r >= 1 && r <= 6) flt[ch][(r * 3 + ch) % NW[ch]] = 1'b1;  // on codeword r-1
      end
      @(posedge clk);
      #1;
      for (int ch = 0; ch < 3; ch++) begin
        if (r < 6) begin
          w = model(ch, T_FLIT[r], bit'(r % 2));
          check(lc[ch] == w[9:0], $sformatf("code %0d row %0d: wires %b model %b", ch, r + 1, lc[ch], w[9:0]));
          if (r != 3)
            check(lc[ch] == T_CODE[ch][r], $sformatf("code %0d row %0d: wires %b table %b", ch, r + 1, lc[ch], T_CODE[ch][r]));
          else
            check((lc[ch] & ~P_MASK[ch]) == (T_CODE[ch][r] & ~P_MASK[ch]), $sformatf("code %0d row 4 data wires", ch));
        end
        check(ov[ch] == (r >= 1 && r <= 6), $sformatf("code %0d cycle %0d: out_valid", ch, r));
        if (r >= 1 && r <= 6)
          check(ofl[ch] == T_FLIT[r-1], $sformatf("code %0d row %0d: out %b", ch, r, ofl[ch]));
      end
    end

    // ---- random flits, idle cycles and single upsets ----
    for (int ch = 0; ch < 3; ch++) phase[ch] = 1'b0;  // six codewords sent: phase back to 0
    n_out = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int ch = 0; ch < 3; ch++) begin
        flt[ch] = '0;
        if ($urandom_range(0, 1) == 1) flt[ch][$urandom_range(0, NW[ch] - 1)] = 1'b1;
        iv[ch]  = (n < 495) && ($urandom_range(0, 2) != 0);
        ifl[ch] = 4'($urandom);
        if (iv[ch]) begin
          q_flit[ch].push_back(ifl[ch]);
          wire_ph[ch] = phase[ch];
          phase[ch]   = (ch == 1) ? !phase[ch] : 1'b0;
        end
        on_wire[ch] = iv[ch];
      end
      @(posedge clk);
      #1;
      for (int ch = 0; ch < 3; ch++) begin
        if (on_wire[ch]) begin
          w = model(ch, ifl[ch], wire_ph[ch]);
          check(lc[ch] == w[9:0], $sformatf("code %0d random: wires %b model %b", ch, lc[ch], w[9:0]));
          check(sh[ch] == wire_ph[ch], $sformatf("code %0d random: shifted flag", ch));
        end
        if (ov[ch]) begin
          n_out++;
          if (q_flit[ch].size() == 0) check(1'b0, "flit out with none in flight");
          else check(ofl[ch] == q_flit[ch].pop_front(), $sformatf("code %0d random: wrong flit", ch));
        end
      end
    end
    for (int ch = 0; ch < 3; ch++) check(q_flit[ch].size() == 0, $sformatf("code %0d: flits lost", ch));
    check(n_out > 500, "too few flits delivered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_bsc_decoder: self-checking testbench of the Boundary Shift Code decoder.
//
// A 4-bit instance decodes the six printed codewords of the code table in
// order. Row 4 carries a parity bit that disagrees with its flit (1010 has
// even parity 0, the table prints 1), which to the decoder is a single wrong
// parity wire: it must still return 1010 and report the mismatch there, and
// only there. A 32-bit instance, the link width of the design, gets random
// codewords from the reference model in codec_ref_pkg, each clean or with one
// random wire flipped, with random idle cycles; the flit must always come back
// intact one clock later, and the mismatch output must tell whether the lower
// copy was used. Errors on the upper copy, the lower copy and the parity
// wire(s) must each have been exercised.
// The decoder's own phase must follow the encoder's: the random part
// alternates shifted and unshifted codewords on every accepted codeword and
// leaves the phase alone on idle cycles.
module tb_bsc_decoder;
  import codec_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int hits [4] = '{0, 0, 0, 0};   // clean, upper copy, lower copy, parity

  logic              en4, en32;
  logic [8:0]        c4;
  logic [64:0]       c32;
  logic [3:0]        f4;
  logic [31:0]       f32;
  logic              v4, v32, m4, m32;

  bsc_decoder #(.K(4)) u4 (.clk, .rst_n, .dec_en(en4), .code(c4),
                          .flit(f4), .flit_valid(v4), .mismatch(m4));
  bsc_decoder u32 (.clk, .rst_n, .dec_en(en32), .code(c32),
                  .flit(f32), .flit_valid(v32), .mismatch(m32));

  localparam logic [3:0]  T_FLIT [6] = '{4'b0010, 4'b0010, 4'b1100, 4'b1010, 4'b0100, 4'b0011};
  localparam logic [8:0]  T_CODE [6] = '{9'b100001100, 9'b000011001, 9'b011110000, 9'b110011001, 9'b100110000, 9'b000011110};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected mismatch output for a single error on wire e (e < 0: none)
  function automatic bit exp_mismatch(int e, bit shifted);
    int idx;
    if (e < 0) return 1'b0;
    idx = shifted ? ((e == 0) ? 64 : e - 1) : e;
    return (idx == 64) || (idx % 2 == 1);
  endfunction

  // error class: 0 clean, 1 upper copy, 2 lower copy, 3 parity wire
  function automatic int err_class(int e, bit shifted);
    int idx;
    if (e < 0) return 0;
    idx = shifted ? ((e == 0) ? 64 : e - 1) : e;
    if (idx == 64) return 3;
    return (idx % 2 == 1) ? 1 : 2;
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] f, last;
    word_t       w;
    int          e;
    bit          phase;
    en4 = 1'b0; en32 = 1'b0; c4 = '0; c32 = '0;
    repeat (3) @(posedge clk);
    #1;
    check(!v4 && !v32 && f4 == '0 && f32 == '0, "outputs cleared by reset");
    @(negedge clk) rst_n = 1'b1;

    // ---- printed codewords, one per cycle ----
    for (int r = 0; r < 6; r++) begin
      @(negedge clk);
      en4 = 1'b1;
      c4  = T_CODE[r];
      @(posedge clk);
      #1;
      check(v4, $sformatf("row %0d valid", r + 1));
      check(f4 == T_FLIT[r], $sformatf("row %0d: got %b flit %b", r + 1, f4, T_FLIT[r]));
      check(m4 == (r == 3), $sformatf("row %0d: mismatch %b", r + 1, m4));
    end
    @(negedge clk);
    en4 = 1'b0;
    c4  = '1;
    @(posedge clk);
    #1;
    check(!v4 && f4 == T_FLIT[5], "outputs hold while dec_en is low");

    // ---- random codewords with single-wire errors, 32-bit flits ----
    phase = 1'b0;
    last  = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      en32 = ($urandom_range(0, 4) != 0);
      f    = $urandom;
      w    = ref_bsc(f, 32, phase);
      e    = ($urandom_range(0, 3) == 0) ? -1 : int'($urandom_range(0, 64));
      if (e >= 0) w[e] = ~w[e];
      c32  = w[64:0];
      @(posedge clk);
      #1;
      check(v32 == en32, $sformatf("random %0d: valid", n));
      if (en32) begin
        hits[err_class(e, phase)]++;
        check(f32 == f, $sformatf("random %0d: error on wire %0d, got %h flit %h", n, e, f32, f));
        check(m32 == exp_mismatch(e, phase), $sformatf("random %0d: mismatch for wire %0d", n, e));
        last  = f;
        phase = !phase;
      end else begin
        check(f32 == last, $sformatf("random %0d: output changed while idle", n));
      end
    end
    for (int k = 0; k < 4; k++) check(hits[k] > 0, $sformatf("error class %0d never exercised", k));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

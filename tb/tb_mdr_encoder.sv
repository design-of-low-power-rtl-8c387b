// tb_mdr_encoder: self-checking testbench of the Modified Dual Rail encoder.
//
// A 4-bit instance is driven with the six flits of the code table and its
// wires are compared with the printed codewords (top wire first). In row 4
// (flit 1010) the printed parity is 1 although the even parity of 1010 is 0;
// there the data wires are compared with the table and the parity wire(s)
// with the parity equation. A 32-bit instance, the link width of the design,
// is driven with random flits and random idle cycles and compared with the
// reference model in codec_ref_pkg. Checked as well: reset clears the wires,
// the codeword appears one clock after the flit, and the wires hold while
// enc_en is low.
module tb_mdr_encoder;
  import codec_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic           en4, en32;
  logic [3:0]     f4;
  logic [31:0]    f32;
  logic [9:0]     c4;
  logic [65:0]    c32;

  mdr_encoder #(.K(4)) u4 (.clk, .rst_n, .enc_en(en4), .flit(f4), .code(c4));
  mdr_encoder u32 (.clk, .rst_n, .enc_en(en32), .flit(f32), .code(c32));

  localparam logic [3:0]  T_FLIT [6] = '{4'b0010, 4'b0010, 4'b1100, 4'b1010, 4'b0100, 4'b0011};
  localparam logic [9:0]  T_CODE [6] = '{10'b1100001100, 10'b1100001100, 10'b0011110000, 10'b1111001100, 10'b1100110000, 10'b0000001111};
  localparam logic [9:0]  P_MASK = 10'b1100000000;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t exp4;
    word_t exp32;
    en4 = 1'b0; en32 = 1'b0; f4 = '0; f32 = '0;
    repeat (3) @(posedge clk);
    #1;
    check(c4 == '0 && c32 == '0, "wires cleared by reset");
    @(negedge clk) rst_n = 1'b1;

    // ---- code table, 4-bit flits, one per cycle ----
    for (int r = 0; r < 6; r++) begin
      @(negedge clk);
      en4 = 1'b1;
      f4  = T_FLIT[r];
      #1;
      if (r > 0) check(c4 == exp4[9:0], $sformatf("row %0d: wires change before the clock", r + 1));
      @(posedge clk);
      #1;
      exp4 = ref_mdr(32'(T_FLIT[r]), 4);
      if (r != 3)
        check(c4 == T_CODE[r], $sformatf("row %0d: got %b table %b", r + 1, c4, T_CODE[r]));
      else
        check((c4 & ~P_MASK) == (T_CODE[r] & ~P_MASK), $sformatf("row 4 data wires: got %b", c4));
      check(c4 == exp4[9:0], $sformatf("row %0d: got %b model %b", r + 1, c4, exp4[9:0]));
    end

    // ---- idle: wires hold ----
    @(negedge clk);
    en4 = 1'b0;
    f4  = 4'b1111;
    exp4 = word_t'(c4);
    repeat (3) @(posedge clk);
    #1;
    check(c4 == exp4[9:0], "wires hold while enc_en is low");

    // ---- random traffic at the full 32-bit width ----
    exp32 = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en32 = ($urandom_range(0, 3) != 0);
      f32  = $urandom;
      @(posedge clk);
      #1;
        if (en32) exp32 = ref_mdr(f32, 32);
        check(c32 == exp32[65:0], $sformatf("random %0d: got %h model %h", n, c32, exp32[65:0]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_jcac_link_top: end-to-end testbench of the three coded 32-bit links.
//
// The top is used at its default size (32-bit flits, 65/65/66 wires). Each
// channel gets its own random flit stream with random idle cycles, and on
// every cycle a random single-wire upset (or none) is put on its wires. A
// scoreboard per channel checks that every flit comes out intact, in order and
// exactly two clocks after it went in, and that the mismatch output tells
// when the decoder fell back to the lower data copy. On every cycle the wires
// of each channel are compared with the previous cycle: no switching wire may
// see a coupling above 2. The same test on the raw flit stream shows how often
// an uncoded 32-wire link would have had the worst case (coupling 4).
//
// Every mechanism of the design must happen at least once: back-to-back and
// idle cycles, a corrected error on the upper copy, on the lower copy and on
// a parity wire for each code, shifted and unshifted BSC codewords, and an MDR
// parity-copy disagreement. A watchdog ends the run if it hangs.
module tb_jcac_link_top;
  import codec_ref_pkg::*;

  localparam int K      = 32;
  localparam int NCYC   = 4000;
  localparam int LAT    = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // channel 0 = DAP, 1 = BSC, 2 = MDR
  logic [2:0]  iv;
  logic [31:0] ifl [3];
  word_t       flt [3];
  word_t       lc  [3];
  logic [2:0]  ov, om;
  logic [31:0] ofl [3];
  logic [64:0] dap_code, bsc_code;
  logic [65:0] mdr_code;
  logic        bsc_shifted;

  jcac_link_top dut (
    .clk, .rst_n,
    .dap_in_valid(iv[0]), .dap_in_flit(ifl[0]), .dap_fault(flt[0][64:0]),
    .dap_link_code(dap_code), .dap_out_valid(ov[0]), .dap_out_flit(ofl[0]),
    .dap_out_mismatch(om[0]),
    .bsc_in_valid(iv[1]), .bsc_in_flit(ifl[1]), .bsc_fault(flt[1][64:0]),
    .bsc_link_code(bsc_code), .bsc_link_shifted(bsc_shifted),
    .bsc_out_valid(ov[1]), .bsc_out_flit(ofl[1]), .bsc_out_mismatch(om[1]),
    .mdr_in_valid(iv[2]), .mdr_in_flit(ifl[2]), .mdr_fault(flt[2][65:0]),
    .mdr_link_code(mdr_code), .mdr_out_valid(ov[2]), .mdr_out_flit(ofl[2]),
    .mdr_out_mismatch(om[2])
  );

  assign lc[0] = word_t'(dap_code);
  assign lc[1] = word_t'(bsc_code);
  assign lc[2] = word_t'(mdr_code);

  localparam int NW [3] = '{65, 65, 66};
  localparam string CNAME [3] = '{"DAP", "BSC", "MDR"};

  // scoreboard
  logic [31:0] q_flit [3][$];
  longint      q_cyc  [3][$];
  bit          q_mis  [3][$];

  // mechanism counters
  int n_b2b [3], n_idle [3], n_upper [3], n_lower [3], n_par [3];
  int n_out [3];
  int n_bsc_shifted = 0, n_bsc_unshifted = 0, n_mdr_par_split = 0;
  int n_raw_worst = 0, n_coded_worst = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // expected mismatch for an upset on wire e of a codeword, and its class
  // (1 upper copy, 2 lower copy, 3 parity wire)
  function automatic int err_class(int ch, int e, bit shifted);
    int idx = e;
    if (ch == 1 && shifted) idx = (e == 0) ? 2 * K : e - 1;
    if (idx >= 2 * K) return 3;
    return (idx % 2 == 1) ? 1 : 2;
  endfunction

  function automatic bit exp_mismatch(int ch, int cls);
    if (ch == 2) return cls == 1;         // MDR: a parity-copy split keeps the upper copy
    return cls == 1 || cls == 3;
  endfunction

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    bit          on_wire [3];     // a codeword sent last cycle is on the wires now
    bit          phase   [3];     // BSC phase of the next codeword
    bit          wire_ph [3];     // BSC phase of the codeword on the wires
    word_t       prev_lc [3];
    logic [31:0] prev_raw [3];
    for (int ch = 0; ch < 3; ch++) begin
      iv[ch] = 1'b0; ifl[ch] = '0; flt[ch] = '0;
      on_wire[ch] = 0; phase[ch] = 0; wire_ph[ch] = 0; prev_lc[ch] = '0; prev_raw[ch] = '0;
      n_b2b[ch] = 0; n_idle[ch] = 0; n_upper[ch] = 0; n_lower[ch] = 0; n_par[ch] = 0; n_out[ch] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      for (int ch = 0; ch < 3; ch++) begin
        // upset on the wires for the codeword the decoder takes at the next edge
        int e;
        e = ($urandom_range(0, 2) == 0) ? -1 : int'($urandom_range(0, NW[ch] - 1));
        flt[ch] = '0;
        if (e >= 0) flt[ch][e] = 1'b1;
        if (on_wire[ch]) begin
          if (e >= 0) begin
            int cls;
            cls = err_class(ch, e, wire_ph[ch]);
            q_mis[ch][$] = exp_mismatch(ch, cls);
            case (cls)
              1: n_upper[ch]++;
              2: n_lower[ch]++;
              default: n_par[ch]++;
            endcase
            if (ch == 2 && cls == 3) n_mdr_par_split++;
          end
        end
        // next flit, or an idle cycle; the last 10 cycles drain the links
        iv[ch]  = (n < NCYC - 10) && ($urandom_range(0, 3) != 0);
        ifl[ch] = $urandom;
        if (iv[ch]) begin
          if (on_wire[ch]) n_b2b[ch]++;
          q_flit[ch].push_back(ifl[ch]);
          q_cyc[ch].push_back(cyc);
          q_mis[ch].push_back(1'b0);
          if (ch == 1) begin
            if (phase[1]) n_bsc_shifted++; else n_bsc_unshifted++;
          end
          if (ch == 0) begin
            if (ref_coupling_violation(word_t'(prev_raw[0]), word_t'(ifl[0]), K)) n_raw_worst++;
            prev_raw[0] = ifl[0];
          end
          wire_ph[ch] = phase[ch];
          phase[ch]   = (ch == 1) ? !phase[ch] : 1'b0;
        end else begin
          n_idle[ch]++;
        end
        on_wire[ch] = iv[ch];
      end

      @(posedge clk);
      #1;
      for (int ch = 0; ch < 3; ch++) begin
        if (ref_coupling_violation(prev_lc[ch], lc[ch], NW[ch])) begin
          n_coded_worst++;
          check(1'b0, $sformatf("%s: coupling above 2 on the wires", CNAME[ch]));
        end
        prev_lc[ch] = lc[ch];
        if (ch == 1) check(bsc_shifted == wire_ph[1],
                           "BSC: shifted flag of the codeword on the wires");
        if (ov[ch]) begin
          n_out[ch]++;
          if (q_flit[ch].size() == 0) begin
            check(1'b0, $sformatf("%s: flit out with none in flight", CNAME[ch]));
          end else begin
            logic [31:0] f;
            longint      c0;
            bit          m;
            f  = q_flit[ch].pop_front();
            c0 = q_cyc[ch].pop_front();
            m  = q_mis[ch].pop_front();
            check(ofl[ch] == f, $sformatf("%s: got %h sent %h", CNAME[ch], ofl[ch], f));
            check(cyc - c0 == longint'(LAT), $sformatf("%s: latency %0d", CNAME[ch], cyc - c0));
            check(om[ch] == m, $sformatf("%s: mismatch %b expected %b", CNAME[ch], om[ch], m));
          end
        end
      end
    end

    for (int ch = 0; ch < 3; ch++) begin
      check(q_flit[ch].size() == 0, $sformatf("%s: %0d flits lost", CNAME[ch], q_flit[ch].size()));
      check(n_b2b[ch] > 0,   $sformatf("%s: no back-to-back flits", CNAME[ch]));
      check(n_idle[ch] > 0,  $sformatf("%s: no idle cycle", CNAME[ch]));
      check(n_upper[ch] > 0, $sformatf("%s: no upper-copy error corrected", CNAME[ch]));
      check(n_lower[ch] > 0, $sformatf("%s: no lower-copy error corrected", CNAME[ch]));
      check(n_par[ch] > 0,   $sformatf("%s: no parity-wire error corrected", CNAME[ch]));
      $display("%s: %0d flits, %0d back-to-back, %0d idle cycles, corrected %0d upper / %0d lower / %0d parity",
               CNAME[ch], n_out[ch], n_b2b[ch], n_idle[ch], n_upper[ch], n_lower[ch], n_par[ch]);
    end
    check(n_bsc_shifted > 0 && n_bsc_unshifted > 0, "BSC: both codeword phases used");
    check(n_mdr_par_split > 0, "MDR: no parity-copy disagreement");
    check(n_raw_worst > 0, "raw stream never had a worst-case pattern to avoid");
    $display("BSC: %0d shifted, %0d unshifted codewords; MDR: %0d parity-copy splits",
             n_bsc_shifted, n_bsc_unshifted, n_mdr_par_split);
    $display("worst-case coupling transitions: uncoded %0d, coded %0d", n_raw_worst, n_coded_worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_link_energy_workload: wire-activity workload on the three coded 32-bit
// links against an uncoded 32-wire link.
//
// Two traffic sets are sent through the top, back to back: uniformly random
// flits, and long runs of all-zero and all-one flits (low-activity data). For
// every codeword change on the wires the testbench counts self transitions
// (sum of delta_i^2) and coupling activity between neighbours (sum of
// (delta_i - delta_j)^2), on the DUT's wires and on the raw flits as an
// uncoded link would carry them. The counts measured on the DUT are compared
// with the same counts on codewords built by the reference model.
//
// A relative interconnect energy per flit follows from the usual bus model
// E ~ V^2 * (self + lambda * coupling), in units of the wire's ground
// capacitance. It is printed for lambda = 1 and 4, with 1.2 V on the uncoded
// link and 0.86 V on the coded ones, the reduced swing the error correction
// allows. For random traffic the coded links must come out below the uncoded
// link at both lambda values, and no coded wire may ever see a coupling above
// 2. Codec and switch energy are not modelled.
module tb_link_energy_workload;
  import codec_ref_pkg::*;

  localparam int K      = 32;
  localparam int NRAND  = 3000;
  localparam int NRUNS  = 40;     // runs of identical flits
  localparam int RUNLEN = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic        in_valid;
  logic [31:0] in_flit;
  logic [64:0] dap_code, bsc_code;
  logic [65:0] mdr_code;
  logic [2:0]  ov, om;
  logic [31:0] ofl [3];
  logic        bsc_shifted;

  jcac_link_top dut (
    .clk, .rst_n,
    .dap_in_valid(in_valid), .dap_in_flit(in_flit), .dap_fault('0),
    .dap_link_code(dap_code), .dap_out_valid(ov[0]), .dap_out_flit(ofl[0]),
    .dap_out_mismatch(om[0]),
    .bsc_in_valid(in_valid), .bsc_in_flit(in_flit), .bsc_fault('0),
    .bsc_link_code(bsc_code), .bsc_link_shifted(bsc_shifted),
    .bsc_out_valid(ov[1]), .bsc_out_flit(ofl[1]), .bsc_out_mismatch(om[1]),
    .mdr_in_valid(in_valid), .mdr_in_flit(in_flit), .mdr_fault('0),
    .mdr_link_code(mdr_code), .mdr_out_valid(ov[2]), .mdr_out_flit(ofl[2]),
    .mdr_out_mismatch(om[2])
  );

  localparam string NAME [4] = '{"uncoded", "DAP", "BSC", "MDR"};
  localparam int    NW   [4] = '{32, 65, 65, 66};

  // activity counters: [link][traffic set]
  longint self_dut [4][2], coup_dut [4][2], self_ref [4][2], coup_ref [4][2];
  int     flits [2];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic void activity(word_t prev, word_t cur, int nw,
                                   output longint s, output longint c);
    s = 0;
    c = 0;
    for (int i = 0; i < nw; i++) begin
      longint di = longint'(cur[i]) - longint'(prev[i]);
      s += di * di;
      if (i < nw - 1) begin
        longint dj = longint'(cur[i+1]) - longint'(prev[i+1]);
        c += (di - dj) * (di - dj);
      end
    end
  endfunction

  initial begin : watchdog
    repeat (NRAND + NRUNS * RUNLEN + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t  prev_dut [4], prev_ref [4], cur_dut [4], cur_ref [4];
    bit     ph;
    longint s, c;
    int     set;
    real    e [4][2];
    for (int l = 0; l < 4; l++) begin
      prev_dut[l] = '0; prev_ref[l] = '0;
      for (int t = 0; t < 2; t++) begin
        self_dut[l][t] = 0; coup_dut[l][t] = 0; self_ref[l][t] = 0; coup_ref[l][t] = 0;
      end
    end
    flits[0] = 0; flits[1] = 0;
    ph = 1'b0;
    in_valid = 1'b0;
    in_flit  = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int n = 0; n < NRAND + NRUNS * RUNLEN; n++) begin
      @(negedge clk);
      set      = (n < NRAND) ? 0 : 1;
      in_valid = 1'b1;
      in_flit  = (set == 0) ? 32'($urandom) : {32{bit'(((n - NRAND) / RUNLEN) % 2)}};
      @(posedge clk);
      #1;
      flits[set]++;
      cur_dut[0] = word_t'(in_flit);
      cur_dut[1] = word_t'(dap_code);
      cur_dut[2] = word_t'(bsc_code);
      cur_dut[3] = word_t'(mdr_code);
      cur_ref[0] = word_t'(in_flit);
      cur_ref[1] = ref_dap(in_flit, K);
      cur_ref[2] = ref_bsc(in_flit, K, ph);
      cur_ref[3] = ref_mdr(in_flit, K);
      ph = !ph;
      for (int l = 0; l < 4; l++) begin
        activity(prev_dut[l], cur_dut[l], NW[l], s, c);
        self_dut[l][set] += s;
        coup_dut[l][set] += c;
        activity(prev_ref[l], cur_ref[l], NW[l], s, c);
        self_ref[l][set] += s;
        coup_ref[l][set] += c;
        if (l > 0 && ref_coupling_violation(prev_dut[l], cur_dut[l], NW[l]))
          check(1'b0, $sformatf("%s: coupling above 2", NAME[l]));
        prev_dut[l] = cur_dut[l];
        prev_ref[l] = cur_ref[l];
      end
    end

    for (int l = 1; l < 4; l++)
      for (int t = 0; t < 2; t++) begin
        check(self_dut[l][t] == self_ref[l][t], $sformatf("%s set %0d: self transitions %0d, model %0d",
                                                          NAME[l], t, self_dut[l][t], self_ref[l][t]));
        check(coup_dut[l][t] == coup_ref[l][t], $sformatf("%s set %0d: coupling activity %0d, model %0d",
                                                          NAME[l], t, coup_dut[l][t], coup_ref[l][t]));
      end

    for (int lam = 1; lam <= 4; lam += 3) begin
      for (int t = 0; t < 2; t++) begin
        for (int l = 0; l < 4; l++) begin
          real v;
          v = (l == 0) ? 1.2 : 0.86;
          e[l][t] = v * v * (real'(self_dut[l][t]) + lam * real'(coup_dut[l][t])) / real'(flits[t]);
        end
        $display("lambda=%0d %-7s  uncoded %6.2f  DAP %6.2f  BSC %6.2f  MDR %6.2f  (V^2*C per flit)",
                 lam, (t == 0) ? "random" : "runs", e[0][t], e[1][t], e[2][t], e[3][t]);
      end
      for (int l = 1; l < 4; l++)
        check(e[l][0] < e[0][0], $sformatf("lambda=%0d: %s not below uncoded on random traffic", lam, NAME[l]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

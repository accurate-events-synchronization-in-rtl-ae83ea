// tb_nco_correlator: the NCO_Correlator against a noiseless generated signal.
//
// A mock downstream answers each End of Code 7 clocks later (ds_done) and counts codes,
// standing in for N_c. Checked:
//  * the carrier-aided code rate word against 1.023 MHz (1 + fd/f_L1) / Fs * 2^32;
//  * the sample index of every End of Code: the k-th comes with the first sample m after
//    N_init for which (m+1) * code_word >= k * 1023 * 2^32;
//  * correlator sums of an aligned signal: prompt I near A*15*samples, Q small,
//    early and late about half of prompt; a signal one sample ahead gives E > L, one
//    sample behind L > E;
//  * a measurement on a sample that closes a code: the record waits for ds_done, holds the
//    wrapped code phase, the carrier phase and a code count that includes that code;
//    a measurement in mid-code answers at once;
//  * a start index already in the past is reported (start_missed).
module tb_nco_correlator;
  import gnss_pkg::*;

  localparam real FS = 4.0e6;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_do_meas = 0;
  logic signed [7:0] s_i = 0, s_q = 0;
  logic [NS_W-1:0] s_index = 0;
  logic init_valid = 0, stop = 0, cmd_valid = 0;
  chan_init_t init = '0;
  logic signed [31:0] cmd_carr_word = 0;
  logic [31:0] cmd_code_word = 0;
  logic eoc, ds_done = 0, meas_enable, meas_valid, busy, tracking, start_missed;
  corr_t eoc_corr;
  logic [4:0] n_c = 0;
  meas_t meas;
  logic [PRN_W-1:0] prn;
  logic signed [31:0] carr_word;
  logic [31:0] code_word;
  int checks = 0, failures = 0;

  nco_correlator #(.SAMPLE_W(8), .FS_HZ(4_000_000)) dut (
    .clk, .rst_n, .s_valid, .s_i, .s_q, .s_index, .s_do_meas, .init_valid, .init, .stop,
    .cmd_valid, .cmd_carr_word, .cmd_code_word, .eoc, .eoc_corr, .ds_done, .n_c,
    .bit_sync(1'b1), .n_b(NB_W'(5)), .n_f(NF_W'(77)), .frame_sync(1'b1), .tow_valid(1'b0),
    .meas_enable, .meas_valid, .meas, .busy, .tracking, .start_missed, .prn, .carr_word, .code_word
  );
  gps_signal_gen #(.NSAT(1), .W(8), .FS(FS)) gen ();

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mock downstream: answer each End of Code after 7 clocks, counting codes
  int eoc_count = 0;
  longint eoc_index [$];
  corr_t  eoc_sums [$];
  longint last_index = 0;
  always @(posedge clk) if (rst_n && eoc) begin
    eoc_count++;
    eoc_index.push_back(last_index);
    eoc_sums.push_back(eoc_corr);
    fork begin
      repeat (7) @(posedge clk);
      n_c <= n_c + 1'b1;
      ds_done <= 1'b1;
      @(posedge clk) ds_done <= 1'b0;
    end join_none
  end

  int meas_count = 0;
  meas_t meas_q [$];
  longint meas_clk [$];
  longint clk_count = 0;
  always @(posedge clk) begin
    clk_count++;
    if (meas_valid) begin meas_q.push_back(meas); meas_clk.push_back(clk_count); end
  end

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  logic signed [31:0] cmd_init_word;
  longint meas_sample_clk [$];
  longint n = 0;
  longint meas_at = -1;
  task automatic run_to(input longint last);
    while (n <= last) begin
      logic signed [7:0] a, b;
      gen.sample(n, a, b);
      @(negedge clk);
      s_valid = 1; s_i = a; s_q = b; s_index = NS_W'(n);
      s_do_meas = (n == meas_at);
      if (s_do_meas) meas_sample_clk.push_back(clk_count);
      last_index = n;
      @(negedge clk);
      s_valid = 0; s_do_meas = 0;
      @(negedge clk);
      n++;
    end
  endtask

  task automatic start_chan(input longint n_init, input real fd);
    @(negedge clk);
    init_valid = 1;
    init.prn = PRN_W'(3);
    init.carr_word = 32'($rtoi(fd * 4294967296.0 / FS + 0.5));
    cmd_init_word = init.carr_word;
    init.n_init = NS_W'(n_init);
    @(negedge clk);
    init_valid = 0;
    init = '0;        // the command is only valid with init_valid
  endtask

  initial begin
    longint n_init, k, m, total, tot_c;
    real exp_word, a, ip;
    longint cw;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- aligned signal, 5 code periods, two measurements
    n_init = 3000;
    gen.set_sat(0, 3, real'(n_init), 1000.0, 40.0);
    start_chan(n_init, 1000.0);
    exp_word = 4294967296.0 * 1.023e6 * (1.0 + 1000.0 / 1575.42e6) / FS;
    @(negedge clk);
    check(code_word >= 32'($rtoi(exp_word)) - 2 && code_word <= 32'($rtoi(exp_word)) + 2, "code rate word");
    cw = longint'(code_word);
    // measurement on the sample that closes code 2
    m = (2 * 1023 * 64'd4294967296 + cw - 1) / cw;   // samples in two codes
    meas_at = n_init + m - 1;
    run_to(n_init + 2 * 4000 + 1233);
    meas_at = n_init + 2 * 4000 + 1234;                // mid-code measurement
    run_to(n_init + 5 * 4000 + 50);

    check(eoc_index.size() == 5, $sformatf("%0d End of Code events", eoc_index.size()));
    for (int e = 0; e < eoc_index.size(); e++) begin
      k = e + 1;
      m = (k * 1023 * 64'd4294967296 + cw - 1) / cw;
      check(eoc_index[e] == n_init + m - 1, $sformatf("End of Code %0d at sample %0d, expected %0d",
            k, eoc_index[e], n_init + m - 1));
      a  = 40.0 * 15.0 * 4000.0;
      ip = real'(eoc_sums[e].ip);
      check(ip > 0.85 * a && ip < 1.1 * a, $sformatf("prompt I %0d", eoc_sums[e].ip));
      check(absr(real'(eoc_sums[e].qp)) < 0.1 * ip, $sformatf("prompt Q %0d", eoc_sums[e].qp));
      check(real'(eoc_sums[e].ie) > 0.4 * ip && real'(eoc_sums[e].ie) < 0.6 * ip, "early half of prompt");
      check(real'(eoc_sums[e].il) > 0.4 * ip && real'(eoc_sums[e].il) < 0.6 * ip, "late half of prompt");
    end

    check(meas_q.size() == 2, $sformatf("%0d measurement records", meas_q.size()));
    if (meas_q.size() == 2) begin
      // first: closes code 2, so N_c = 2 and the code phase has wrapped
      m = (2 * 1023 * 64'd4294967296 + cw - 1) / cw;
      total = m * cw;
      check(meas_q[0].n_c == 5'd2, $sformatf("N_c %0d in first record", meas_q[0].n_c));
      check(meas_q[0].code_int == 10'((total >> 32) - 2 * 1023) && meas_q[0].code_frac == total[31:0],
            "wrapped code phase of first record");
      check(meas_q[0].ns_tag == NS_W'(n_init + m), "time tag of first record");
      check(meas_clk[0] - meas_sample_clk[0] >= 8, "first record waits for ds_done");
      check(meas_clk[1] - meas_sample_clk[1] <= 3, "second record at once");
      tot_c = m * longint'(cmd_init_word);
      check(meas_q[0].carr_frac == tot_c[31:0] && meas_q[0].carr_cycles == 32'(tot_c >> 32), "carrier phase");
      check(meas_q[0].n_b == NB_W'(5) && meas_q[0].n_f == NF_W'(77) && meas_q[0].prn == PRN_W'(3), "copied counters");
      // second: mid-code, N_c = 2
      total = (2 * 4000 + 1235) * cw;
      check(meas_q[1].n_c == 5'd2, $sformatf("N_c %0d in second record", meas_q[1].n_c));
      check(meas_q[1].code_int == 10'((total >> 32) - 2 * 1023) && meas_q[1].code_frac == total[31:0],
            "code phase of second record");
    end

    // ---------------- signal one sample ahead: early wins
    meas_at = -1;
    eoc_sums.delete(); eoc_index.delete();
    n_init = n + 2000;
    gen.set_sat(0, 3, real'(n_init) - 1.0, 1000.0, 40.0);
    start_chan(n_init, 1000.0);
    run_to(n_init + 4100);
    check(eoc_sums.size() == 1 && real'(eoc_sums[0].ie) > 1.3 * real'(eoc_sums[0].il), "signal ahead: E > L");
    // ---------------- signal one sample behind: late wins
    eoc_sums.delete();
    n_init = n + 2000;
    gen.set_sat(0, 3, real'(n_init) + 1.0, 1000.0, 40.0);
    start_chan(n_init, 1000.0);
    run_to(n_init + 4100);
    check(eoc_sums.size() == 1 && real'(eoc_sums[0].il) > 1.3 * real'(eoc_sums[0].ie), "signal behind: L > E");
    // ---------------- start index in the past
    start_chan(10, 0.0);
    run_to(n + 600);
    check(!busy, "channel released after a missed start");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int missed = 0;
  always @(posedge clk) if (start_missed) missed++;
  final if (missed != 1) $display("start_missed pulses: %0d", missed);
endmodule

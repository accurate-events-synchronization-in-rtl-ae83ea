// tb_gnss_receiver_top: end-to-end run of the receiver at reduced sizes (2.046 MHz
// sampling, acquisition over one code period and 3 Doppler bins, 50-bit frames).
//
// The generated signal holds PRN 7 (+508 Hz), PRN 21 (-505 Hz) and PRN 25 (+20 Hz) in
// noise, each with frames carrying a preamble and the time of week. The manager searches
// PRN 7, 21 and 30 (absent) and starts channels for what it finds; the host starts
// PRN 25 directly. After frame synchronisation two measurements are taken on all
// channels: one anywhere, one on the sample that closes a code of the PRN 25 channel.
// Checked: detections, channel starts and Doppler pull-in; one record per tracking
// channel per measurement, all with the same time tag, each with a transmit time
// T_chip*phi_c + T_c*N_c + T_b*N_b + T_f*N_f within 0.1 chip of the generated signal's;
// a measurement target in the past is reported. Every mechanism is counted and must occur:
// acquisition detection and rejection, manager and host channel starts, End of Code,
// End of Integration, End of Bit, bit and frame synchronisation, time of week, records,
// a record waiting for Measurement_Enable, and a missed measurement target.
module tb_gnss_receiver_top;
  import gnss_pkg::*;

  localparam real FS  = 2.046e6;
  localparam int  NCH = 6;
  localparam int  BPF = 50;
  localparam int  TOW0 = 2000;
  localparam int  NSAT = 3;
  int  sat_prn [NSAT] = '{7, 21, 25};
  real sat_n0  [NSAT] = '{1234.6, 1777.2, 400.0};
  real sat_fd  [NSAT] = '{508.0, -505.0, 20.0};

  logic clk = 0, rst_n = 0;
  logic fe_valid = 0;
  logic signed [7:0] fe_i = 0, fe_q = 0;
  logic meas_arm = 0, meas_armed, meas_missed, mgr_enable = 0;
  logic [NS_W-1:0] meas_ns = 0, n_s;
  logic [32:1] prn_mask = '0;
  logic [NCH-1:0] host_init_valid = '0, chan_stop = '0;
  chan_init_t host_init = '0;
  logic [NCH-1:0] meas_valid, dbit_valid, dbit, chan_busy, chan_tracking, chan_start_missed;
  logic [NCH-1:0] ev_eoc, ev_eoi, ev_eob, meas_enable;
  meas_t meas [NCH];
  logic [PRN_W-1:0] chan_prn [NCH];
  logic signed [31:0] chan_doppler [NCH];
  corr_t integ [NCH];
  logic acq_busy, acq_valid, mgr_no_channel;
  acq_result_t acq_result;
  logic [15:0] mgr_n_detect, mgr_n_search;
  int checks = 0, failures = 0;

  gnss_receiver_top #(
    .SAMPLE_W(8), .FS_HZ(2_046_000), .NCH(NCH), .SPC(2046), .STORE_LEN(4096), .NCOH(1),
    .NUM_BINS(3), .BIN_HZ(500), .DET_RATIO(14), .BITS_PER_FRAME(BPF), .TCOMP_SAMPLES(2046)
  ) dut (.*);
  gps_signal_gen #(.NSAT(NSAT), .W(8), .FS(FS), .NBITS(1200)) gen ();

  always #5 clk = ~clk;
  initial begin
    #4_000_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // front end: one sample every 3 clocks
  longint n = 0;
  int ph = 0;
  always @(negedge clk) begin
    fe_valid <= 1'b0;
    ph <= (ph == 2) ? 0 : ph + 1;
    if (ph == 0 && rst_n) begin
      logic signed [7:0] a, b;
      gen.sample(n, a, b);
      fe_valid <= 1'b1; fe_i <= a; fe_q <= b;
      n++;
    end
  end

  // mechanism counters
  int c_eoc = 0, c_eoi = 0, c_eob = 0, c_det = 0, c_rej = 0, c_missed = 0, c_rec = 0, c_wait = 0;
  always @(posedge clk) if (rst_n) begin
    c_eoc += $countones(ev_eoc);
    c_eoi += $countones(ev_eoi);
    c_eob += $countones(ev_eob);
    if (acq_valid && acq_result.detect) c_det++;
    if (acq_valid && !acq_result.detect) c_rej++;
    if (meas_missed) c_missed++;
  end

  meas_t recs [$];
  int    rec_ch [$];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) if (meas_valid[c]) begin
      recs.push_back(meas[c]);
      rec_ch.push_back(c);
      c_rec++;
      if (low_seen[c]) c_wait++;
    end
  end
  // Measurement_Enable seen low between the measurement sample and the record
  logic [NCH-1:0] low_seen = '0;
  always @(posedge clk) if (rst_n) begin
    if (dut.s_do_meas) low_seen <= '0;
    else low_seen <= low_seen | ~meas_enable;
  end

  function automatic int sat_of(input int p);
    for (int s = 0; s < NSAT; s++) if (sat_prn[s] == p) return s;
    return -1;
  endfunction
  function automatic real true_chips(input int s, input longint tag);
    return (real'(tag) - sat_n0[s]) * 1.023e6 * (1.0 + sat_fd[s] / 1575.42e6) / FS
           + real'(TOW0) * real'(BPF) * 20.0 * 1023.0;
  endfunction
  function automatic real rec_chips(input meas_t r);
    return real'(r.code_int) + real'(r.code_frac) / 4294967296.0
           + 1023.0 * (real'(r.n_c) + 20.0 * (real'(r.n_b) + real'(BPF) * real'(r.n_f)));
  endfunction

  task automatic measure_at(input longint idx);
    @(negedge clk);
    meas_arm = 1; meas_ns = NS_W'(idx);
    @(negedge clk);
    meas_arm = 0;
  endtask

  task automatic check_records(input int from, input int expect_n);
    check(recs.size() - from == expect_n, $sformatf("%0d records, expected %0d", recs.size() - from, expect_n));
    for (int r = from; r < recs.size(); r++) begin
      int s;
      real err;
      s = sat_of(int'(recs[r].prn));
      check(s >= 0 && recs[r].ns_tag == recs[from].ns_tag, "record PRN and common time tag");
      check(recs[r].bit_sync && recs[r].frame_sync && recs[r].tow_valid, $sformatf("record of PRN %0d synchronised: %0d%0d%0d nc %0d nb %0d nf %0d", recs[r].prn, recs[r].bit_sync, recs[r].frame_sync, recs[r].tow_valid, recs[r].n_c, recs[r].n_b, recs[r].n_f));
      if (s >= 0) begin
        err = rec_chips(recs[r]) - true_chips(s, longint'(recs[r].ns_tag));
        check(absr(err) < 0.1, $sformatf("PRN %0d transmit time off by %f chip", recs[r].prn, err));
      end
    end
  endtask

  initial begin
    int ch25, first;
    longint t_start, eoc_sample;
    real rem, dopp;
    for (int s = 0; s < NSAT; s++) begin
      for (int j = 0; j < 1200 / BPF; j++) begin
        bit d30;
        for (int b = 0; b < BPF; b++) gen.set_bit(s, j*BPF + b, 1'($urandom));
        for (int b = 0; b < 8; b++) gen.set_bit(s, j*BPF + b, 1'(8'b1000_1011 >> (7 - b)));
        d30 = gen.nav[s][j*BPF + 29];
        for (int b = 0; b < 17; b++) gen.set_bit(s, j*BPF + 30 + b, 1'(32'(TOW0 + j + 1) >> (16 - b)) ^ d30);
      end
      gen.set_sat(s, sat_prn[s], sat_n0[s], sat_fd[s], 4.0);
    end
    gen.sigma = 10.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // host starts PRN 25 on channel 5 at its 40th code start
    @(negedge clk);
    host_init_valid[5] = 1;
    host_init.prn = 6'd25;
    host_init.carr_word = 32'($rtoi(20.0 * 4294967296.0 / FS));
    host_init.n_init = NS_W'(longint'(sat_n0[2] + 40.0 * 2046.0 / (1.0 + 20.0 / 1575.42e6) + 0.5));
    @(negedge clk);
    host_init_valid = '0;
    // manager searches PRN 7, 21, 30
    prn_mask[7] = 1; prn_mask[21] = 1; prn_mask[30] = 1;
    mgr_enable = 1;
    wait (mgr_n_search == 16'd3);
    mgr_enable = 0;
    wait (c_det + c_rej == 3);
    repeat (200) @(posedge clk);
    check(c_det == 2 && c_rej == 1, $sformatf("%0d detections, %0d rejections", c_det, c_rej));
    check(chan_busy[0] && chan_busy[1] && chan_busy[5], "channels 0, 1 (manager) and 5 (host) allocated");
    t_start = longint'(n_s);
    // let the loops pull in and the frames synchronise: 3 frames and 20 bits
    wait (longint'(n_s) > t_start + longint'(2046.0 * 20.0 * (3.0 * BPF + 20.0)));
    check(chan_tracking == 6'b100011, $sformatf("tracking channels %b", chan_tracking));
    for (int c = 0; c < NCH; c++) if (chan_tracking[c]) begin
      int s;
      s = sat_of(int'(chan_prn[c]));
      dopp = real'(chan_doppler[c]) * FS / 4294967296.0;
      check(s >= 0 && absr(dopp - sat_fd[s]) < 3.0, $sformatf("channel %0d Doppler %f Hz", c, dopp));
    end
    // a target in the past
    measure_at(10);
    repeat (20) @(posedge clk);
    // measurement 1
    first = recs.size();
    measure_at(longint'(n_s) + 1000);
    wait (longint'(n_s) > longint'(meas_ns) + 100);
    check_records(first, 3);
    // measurement 2: the sample that closes a code of PRN 25
    ch25 = -1;
    for (int r = first; r < recs.size(); r++) if (recs[r].prn == 6'd25) ch25 = r;
    if (ch25 >= 0) begin
      rem = 1023.0 - (real'(recs[ch25].code_int) + real'(recs[ch25].code_frac) / 4294967296.0);
      eoc_sample = longint'(recs[ch25].ns_tag) + longint'($ceil(rem / (1.023e6 * (1.0 + 20.0 / 1575.42e6) / FS))) - 1;
      while (eoc_sample < longint'(n_s) + 50) eoc_sample += 2046;
      first = recs.size();
      measure_at(eoc_sample);
      wait (longint'(n_s) > eoc_sample + 100);
      check_records(first, 3);
    end
    // mechanisms
    check(c_eoc > 0, "End of Code events");
    check(c_eoi > 0, "End of Integration events");
    check(c_eob > 0, "End of Bit events");
    check(c_missed == 1, $sformatf("%0d missed measurement targets", c_missed));
    check(c_wait >= 1, $sformatf("%0d records waited for Measurement_Enable", c_wait));
    check(chan_start_missed == '0, "no late start");
    $display("mechanisms: detect=%0d reject=%0d eoc=%0d eoi=%0d eob=%0d records=%0d waited=%0d missed=%0d",
             c_det, c_rej, c_eoc, c_eoi, c_eob, c_rec, c_wait, c_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

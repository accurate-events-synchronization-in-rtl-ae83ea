// tb_gnss_receiver_top_full: the receiver at its default parameters (4 MHz sampling, six
// channels, 300-bit frames), with no parameter overridden.
//
// The default acquisition search (21 Doppler bins x 4000 delays x 7 coherent codes over
// 8.192 ms of samples) needs about 2.4e9 clocks, which is far beyond a simulation budget of
// minutes. This run therefore starts four channels from the host interface, as the channel
// manager would after an acquisition, with acquisition-grade Doppler errors of up to 30 Hz,
// and tracks 13 s of signal (52 million samples): loop pull-in, bit synchronisation, frame
// synchronisation over two 300-bit frames, the time of week, and sample-exact measurements.
// The generated frames begin 40 bits into the signal, so that the first preamble falls
// after bit synchronisation. Each record's transmit time
// T_chip*phi_c + T_c*N_c + T_b*N_b + T_f*N_f is checked against the generated signal
// (tolerance 0.1 chip). A measurement is taken one second in, before frame
// synchronisation, and checked modulo one data bit; two more are taken after the time of
// week is known, the second on the sample that closes a code of channel 0.
// The front end delivers one sample every 2 clocks. Counted mechanisms: channel starts,
// End of Code, End of Integration, End of Bit, bit and frame synchronisation, records, a
// record that waited for Measurement_Enable and a missed measurement target.
module tb_gnss_receiver_top_full;
  import gnss_pkg::*;

  localparam real FS   = 4.0e6;
  localparam int  NCH  = 6;
  localparam int  NSAT = 4;
  int  sat_prn [NSAT] = '{3, 12, 19, 31};
  real sat_n0  [NSAT] = '{1234.6, 2777.2, 400.3, 3901.9};
  real sat_fd  [NSAT] = '{1500.0, -2200.0, 600.0, -40.0};
  real sat_err [NSAT] = '{25.0, -30.0, 15.0, -20.0};
  localparam int  BPF  = 300;
  localparam int  FOFF = 40;     // bit at which frame 0 begins
  localparam int  TOW0 = 5000;   // N_f of frame 0
  localparam int  NBITS = 700;

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

  gnss_receiver_top dut (.*);
  gps_signal_gen #(.NSAT(NSAT), .W(8), .FS(FS), .NBITS(NBITS)) gen ();

  always #5 clk = ~clk;
  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL: watchdog");
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

  // front end: one sample every 2 clocks
  longint n = 0;
  int ph = 0;
  always @(negedge clk) begin
    fe_valid <= 1'b0;
    ph <= (ph == 1) ? 0 : ph + 1;
    if (ph == 0 && rst_n) begin
      logic signed [7:0] a, b;
      gen.sample(n, a, b);
      fe_valid <= 1'b1; fe_i <= a; fe_q <= b;
      n++;
    end
  end

  // mechanism counters
  int c_eoc = 0, c_eoi = 0, c_eob = 0, c_missed = 0, c_rec = 0, c_wait = 0;
  always @(posedge clk) if (rst_n) begin
    c_eoc += $countones(ev_eoc);
    c_eoi += $countones(ev_eoi);
    c_eob += $countones(ev_eob);
    if (meas_missed) c_missed++;
  end

  meas_t recs [$];
  logic [NCH-1:0] low_seen = '0;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NCH; c++) if (meas_valid[c]) begin
      recs.push_back(meas[c]);
      c_rec++;
      if (low_seen[c]) c_wait++;
    end
  end
  // Measurement_Enable seen low between the measurement sample and the record
  always @(posedge clk) if (rst_n) begin
    if (dut.s_do_meas) low_seen <= '0;
    else low_seen <= low_seen | ~meas_enable;
  end

  function automatic int sat_of(input int p);
    for (int s = 0; s < NSAT; s++) if (sat_prn[s] == p) return s;
    return -1;
  endfunction
  function automatic real period(input int s);
    return FS / (1.023e6 * (1.0 + sat_fd[s] / 1575.42e6)) * 1023.0;
  endfunction
  // transmitted chips since the first bit edge, modulo one data bit (20460 chips)
  function automatic real true_chips_bit(input int s, input longint tag);
    real c;
    c = (real'(tag) - sat_n0[s]) * 1023.0 / period(s);
    return c - 20460.0 * $floor(c / 20460.0);
  endfunction
  function automatic real rec_chips_bit(input meas_t r);
    return real'(r.code_int) + real'(r.code_frac) / 4294967296.0 + 1023.0 * real'(r.n_c);
  endfunction
  // transmitted chips counted from the time of week origin
  function automatic real true_chips(input int s, input longint tag);
    return (real'(tag) - sat_n0[s]) * 1023.0 / period(s)
           + (real'(TOW0) * real'(BPF) - real'(FOFF)) * 20460.0;
  endfunction
  function automatic real rec_chips(input meas_t r);
    return rec_chips_bit(r) + 20460.0 * (real'(r.n_b) + real'(BPF) * real'(r.n_f));
  endfunction

  task automatic measure_at(input longint idx);
    @(negedge clk);
    meas_arm = 1; meas_ns = NS_W'(idx);
    @(negedge clk);
    meas_arm = 0;
  endtask

  task automatic check_records(input int from, input int expect_n, input bit full);
    check(recs.size() - from == expect_n, $sformatf("%0d records, expected %0d", recs.size() - from, expect_n));
    for (int r = from; r < recs.size(); r++) begin
      int s;
      real err;
      s = sat_of(int'(recs[r].prn));
      check(s >= 0 && recs[r].ns_tag == recs[from].ns_tag && recs[r].bit_sync,
            $sformatf("record of PRN %0d: tag and bit synchronisation", recs[r].prn));
      if (full) begin
        check(recs[r].frame_sync && recs[r].tow_valid,
              $sformatf("record of PRN %0d: frame synchronisation and time of week", recs[r].prn));
        if (s >= 0) begin
          err = rec_chips(recs[r]) - true_chips(s, longint'(recs[r].ns_tag));
          check(absr(err) < 0.1, $sformatf("PRN %0d transmit time off by %f chip", recs[r].prn, err));
        end
      end else if (s >= 0) begin
        err = rec_chips_bit(recs[r]) - true_chips_bit(s, longint'(recs[r].ns_tag));
        if (err > 10230.0) err -= 20460.0;
        if (err < -10230.0) err += 20460.0;
        check(absr(err) < 0.1, $sformatf("PRN %0d transmit time off by %f chip", recs[r].prn, err));
      end
    end
  endtask

  initial begin
    int first, r0;
    real dopp, rem;
    longint eoc_sample;
    for (int s = 0; s < NSAT; s++) begin
      for (int k = 0; k < NBITS; k++) gen.set_bit(s, k, 1'($urandom));
      for (int j = 0; FOFF + (j + 1) * BPF <= NBITS; j++) begin
        bit d30;
        for (int b = 0; b < 8; b++) gen.set_bit(s, FOFF + j*BPF + b, 1'(8'b1000_1011 >> (7 - b)));
        d30 = gen.nav[s][FOFF + j*BPF + 29];
        for (int b = 0; b < 17; b++)
          gen.set_bit(s, FOFF + j*BPF + 30 + b, 1'(32'(TOW0 + j + 1) >> (16 - b)) ^ d30);
      end
      gen.set_sat(s, sat_prn[s], sat_n0[s], sat_fd[s], 4.0);
    end
    gen.sigma = 10.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the host starts channel s on satellite s at its 10th code start
    for (int s = 0; s < NSAT; s++) begin
      @(negedge clk);
      host_init_valid = '0;
      host_init_valid[s] = 1;
      host_init.prn = PRN_W'(sat_prn[s]);
      host_init.carr_word = 32'($rtoi((sat_fd[s] + sat_err[s]) * 4294967296.0 / FS));
      host_init.n_init = NS_W'(longint'(sat_n0[s] + 10.0 * period(s) + 0.5));
    end
    @(negedge clk);
    host_init_valid = '0;
    repeat (20) @(posedge clk);
    check(chan_busy == 6'b001111, $sformatf("channels allocated %b", chan_busy));
    // one second of signal
    wait (longint'(n_s) > 4_000_000);
    check(chan_tracking == 6'b001111 && chan_start_missed == '0, $sformatf("tracking channels %b", chan_tracking));
    for (int c = 0; c < NSAT; c++) begin
      int s;
      s = sat_of(int'(chan_prn[c]));
      dopp = real'(chan_doppler[c]) * FS / 4294967296.0;
      check(s >= 0 && absr(dopp - sat_fd[s]) < 3.0, $sformatf("channel %0d Doppler %f Hz", c, dopp));
    end
    // a target in the past
    measure_at(10);
    repeat (20) @(posedge clk);
    // a measurement before frame synchronisation
    first = recs.size();
    measure_at(longint'(n_s) + 1000);
    wait (longint'(n_s) > longint'(meas_ns) + 100);
    check_records(first, NSAT, 1'b0);
    // after the time of week of frame 1 (bit FOFF + 2*BPF starts frame 2)
    wait (longint'(n_s) > longint'(sat_n0[0] + real'(20 * (FOFF + 2 * BPF + 5)) * period(0)));
    first = recs.size();
    measure_at(longint'(n_s) + 1000);
    wait (longint'(n_s) > longint'(meas_ns) + 100);
    check_records(first, NSAT, 1'b1);
    // on the sample that closes a code of channel 0
    r0 = -1;
    for (int r = first; r < recs.size(); r++) if (recs[r].prn == PRN_W'(sat_prn[0])) r0 = r;
    if (r0 >= 0) begin
      rem = 1023.0 - (real'(recs[r0].code_int) + real'(recs[r0].code_frac) / 4294967296.0);
      eoc_sample = longint'(recs[r0].ns_tag) + longint'($ceil(rem * period(0) / 1023.0)) - 1;
      while (eoc_sample < longint'(n_s) + 50) eoc_sample += 4000;
      first = recs.size();
      measure_at(eoc_sample);
      wait (longint'(n_s) > eoc_sample + 100);
      check_records(first, NSAT, 1'b1);
    end
    // mechanisms
    check(c_eoc > 0, "End of Code events");
    check(c_eoi > 0, "End of Integration events");
    check(c_eob > 0, "End of Bit events");
    check(c_missed == 1, $sformatf("%0d missed measurement targets", c_missed));
    check(c_wait >= 1, $sformatf("%0d records waited for Measurement_Enable", c_wait));
    $display("mechanisms: starts=%0d eoc=%0d eoi=%0d eob=%0d records=%0d waited=%0d missed=%0d",
             NSAT, c_eoc, c_eoi, c_eob, c_rec, c_wait, c_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_tracking_channel: one channel in closed loop on a generated signal (PRN 12,
// +1520 Hz, code start 0.3 sample after the start index, noise, 60-bit frames carrying a
// preamble and the time of week). The channel starts with a 20 Hz Doppler error.
// Checked: the phase loop pulls in (Doppler within 3 Hz, prompt Q small against I), bit
// and frame synchronisation, the decoded bits, N_f from the time of week (read in frame 2, used from frame 3), and two
// measurements (one in mid-code, one on the sample that closes a code) whose transmit
// time T_chip*phi_c + T_c*N_c + T_b*N_b + T_f*N_f agrees with the generated signal to
// within 0.1 chip at the record's time tag.
// Reduced sizes: 2.046 MHz sampling, 60-bit frames.
module tb_tracking_channel;
  import gnss_pkg::*;

  localparam real FS  = 2.046e6;
  localparam int  BPF = 60;
  localparam real N0  = 50000.3;
  localparam int  TOW0 = 1000;
  logic clk = 0, rst_n = 0;
  logic s_valid = 0, s_do_meas = 0, init_valid = 0, stop = 0;
  logic signed [7:0] s_i = 0, s_q = 0;
  logic [NS_W-1:0] s_index = 0;
  chan_init_t init = '0;
  logic meas_valid, busy, tracking, start_missed, dbit_valid, dbit, ev_eoc, ev_eoi, ev_eob, meas_enable;
  meas_t meas;
  logic [PRN_W-1:0] prn;
  logic signed [31:0] doppler_word;
  corr_t integ;
  int checks = 0, failures = 0;

  tracking_channel #(.SAMPLE_W(8), .FS_HZ(2_046_000), .BITS_PER_FRAME(BPF)) dut (.*);
  gps_signal_gen #(.NSAT(1), .W(8), .FS(FS), .NBITS(600)) gen ();

  always #5 clk = ~clk;
  initial begin
    #2_000_000_000;
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

  bit nav [600];
  longint n = 0, meas_at = -1;
  task automatic run_to(input longint last);
    while (n <= last) begin
      logic signed [7:0] a, b;
      gen.sample(n, a, b);
      @(negedge clk);
      s_valid = 1; s_i = a; s_q = b; s_index = NS_W'(n); s_do_meas = (n == meas_at);
      @(negedge clk);
      s_valid = 0; s_do_meas = 0;
      @(negedge clk);
      n++;
    end
  endtask

  // decoded bits and lock statistics
  int bit_k = 0, bit_err = 0, bits_checked = 0;
  real sum_i = 0, sum_q = 0;
  int eoi_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (dbit_valid && dut.frame_sync) begin
      bits_checked++;
    end
    if (ev_eoi) begin
      eoi_n++;
      if (eoi_n > 400) begin
        sum_i += absr(real'(integ.ip));
        sum_q += absr(real'(integ.qp));
      end
    end
  end
  // bit index of each decoded bit, from the generated signal's timing
  always @(posedge clk) if (rst_n && dbit_valid && dut.frame_sync) begin
    longint b;
    b = longint'($floor(((real'(s_index) - N0) * 1.023e6 * (1.0 + 1520.0 / 1575.42e6) / FS) / 1023.0 / 20.0)) - 1;
    if (dbit != nav[b]) bit_err++;
  end

  meas_t recs [$];
  int waited = 0;
  always @(posedge clk) if (rst_n && meas_valid) begin
    recs.push_back(meas);
    if (!$past(meas_enable) || !$past(meas_enable, 2)) waited++;
  end

  function automatic real true_chips(input longint tag);
    // chips since the start of frame 0 of week-time TOW0 frames
    return (real'(tag) - N0) * 1.023e6 * (1.0 + 1520.0 / 1575.42e6) / FS
           + real'(TOW0) * real'(BPF) * 20.0 * 1023.0;
  endfunction
  function automatic real rec_chips(input meas_t r);
    return real'(r.code_int) + real'(r.code_frac) / 4294967296.0
           + 1023.0 * (real'(r.n_c) + 20.0 * (real'(r.n_b) + real'(BPF) * real'(r.n_f)));
  endfunction

  initial begin
    real dopp, err, rem;
    longint eoc_sample;
    for (int j = 0; j < 600 / BPF; j++) begin
      bit d30;
      for (int b = 0; b < BPF; b++) nav[j*BPF + b] = 1'($urandom);
      for (int b = 0; b < 8; b++) nav[j*BPF + b] = 1'(8'b1000_1011 >> (7 - b));
      d30 = nav[j*BPF + 29];
      for (int b = 0; b < 17; b++) nav[j*BPF + 30 + b] = 1'(32'(TOW0 + j + 1) >> (16 - b)) ^ d30;
    end
    for (int k = 0; k < 600; k++) gen.set_bit(0, k, nav[k]);
    gen.sigma = 10.0;
    gen.set_sat(0, 12, N0, 1520.0, 4.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    init_valid = 1;
    init.prn = 6'd12;
    init.carr_word = 32'($rtoi(1500.0 * 4294967296.0 / FS));
    init.n_init = 48'd50000;
    @(negedge clk);
    init_valid = 0;
    // run until the time of week has been read (frame 2 onwards)
    run_to(longint'(N0) + longint'(2046.0 * 20.0 * (3.0 * BPF + 20.0)));
    dopp = real'(doppler_word) * FS / 4294967296.0;
    check(absr(dopp - 1520.0) < 3.0, $sformatf("Doppler estimate %f Hz", dopp));
    check(sum_q < 0.3 * sum_i, $sformatf("prompt Q/I %f after pull-in", sum_q / sum_i));
    check(dut.u_isync.bit_sync && dut.frame_sync, "bit and frame synchronisation");
    check(bits_checked > 50 && bit_err <= 1, $sformatf("%0d decoded bits, %0d wrong", bits_checked, bit_err));
    check(dut.tow_valid && 32'(dut.n_f) == TOW0 + 3, $sformatf("N_f %0d", dut.n_f));
    // measurement in mid-code
    meas_at = n + 777;
    run_to(n + 1500);
    check(recs.size() == 1, "first record");
    if (recs.size() == 1) begin
      err = rec_chips(recs[0]) - true_chips(longint'(recs[0].ns_tag));
      check(absr(err) < 0.1, $sformatf("transmit time of record 1 off by %f chip", err));
      // predict the sample that closes the next code: about 0.5 chip per sample
      rem = 1023.0 - (real'(recs[0].code_int) + real'(recs[0].code_frac) / 4294967296.0);
      eoc_sample = longint'(recs[0].ns_tag) + longint'($ceil(rem / (1.023e6 * (1.0 + 1520.0 / 1575.42e6) / FS))) - 1;
      meas_at = eoc_sample;
      run_to(eoc_sample + 200);
      check(recs.size() == 2, "second record");
      if (recs.size() == 2) begin
        err = rec_chips(recs[1]) - true_chips(longint'(recs[1].ns_tag));
        check(absr(err) < 0.1, $sformatf("transmit time of record 2 off by %f chip", err));
        check(recs[1].code_int == 10'd0, $sformatf("record 2 code phase %0d just after the code end", recs[1].code_int));
        check(waited == 1, $sformatf("%0d records waited for Measurement_Enable", waited));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

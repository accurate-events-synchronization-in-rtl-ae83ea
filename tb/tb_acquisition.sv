// tb_acquisition: a noisy PRN 7 signal (+1000 Hz, a code start at a fractional sample
// offset) is recorded and searched at a reduced size: 2.046 MHz, one code period per
// cell, 5 bins of 500 Hz. Checked: N_acqui is the index of the first recorded sample;
// the delay points at a code start of the signal (within one sample); the Doppler is the
// +1000 Hz bin; the detection flag; the recording and search time against
// 2 * STORE_LEN + NUM_BINS * SPC * NCOH * SPC clocks. The detection ratio is raised to
// 14 because with one code period per cell the largest of 10230 noise cells is about
// ln(10230) = 9 times the mean; and no detection for an absent PRN.
module tb_acquisition;
  import gnss_pkg::*;

  localparam real FS = 2.046e6;
  localparam int  SPC = 2046;
  localparam int  BINS = 5;
  logic clk = 0, rst_n = 0, s_valid = 0, start = 0;
  logic signed [7:0] s_i = 0, s_q = 0;
  logic [NS_W-1:0] s_index = 0;
  logic [PRN_W-1:0] prn = 7;
  logic busy, result_valid;
  acq_result_t result;
  int checks = 0, failures = 0;

  acquisition #(.SAMPLE_W(8), .FS_HZ(2_046_000), .SPC(SPC), .STORE_LEN(4096), .NCOH(1),
                .NUM_BINS(BINS), .BIN_HZ(500), .DET_RATIO(14)) dut (.*);
  gps_signal_gen #(.NSAT(1), .W(8), .FS(FS)) gen ();

  always #5 clk = ~clk;
  initial begin
    #800_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // free-running sample bus, one sample every 2 clocks
  longint n = 0;
  always @(negedge clk) begin
    if (!s_valid) begin
      logic signed [7:0] a, b;
      gen.sample(n, a, b);
      s_valid <= 1; s_i <= a; s_q <= b; s_index <= NS_W'(n);
      n++;
    end else s_valid <= 0;
  end

  initial begin
    real n0, off;
    longint t0, t1, exp_clk;
    n0 = 1000.4;
    gen.sigma = 12.0;
    gen.set_sat(0, 7, n0, 1000.0, 6.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3000) @(posedge clk);
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      prn = (run == 0) ? 6'd7 : 6'd8;
      start = 1;
      t0 = longint'($time);
      @(negedge clk);
      start = 0;
      wait (result_valid);
      t1 = longint'($time);
      @(negedge clk);
      exp_clk = 4096 * 2 + longint'(BINS) * SPC * SPC;   // recording, then the search
      check((t1 - t0) / 10 <= exp_clk + 30 && (t1 - t0) / 10 >= exp_clk - 30,
            $sformatf("search took %0d clocks, expected about %0d", (t1 - t0) / 10, exp_clk));
      check(result.prn == prn, "PRN echoed");
      if (run == 0) begin
        check(result.n_acqui > 3000 / 2 - 10 && result.n_acqui < 3000 / 2 + 10, $sformatf("N_acqui %0d", result.n_acqui));
        off = real'(result.n_acqui) + real'(result.delay) - n0;
        off = off - $floor(off / (real'(SPC) * (1.0 + 1000.0 / 1575.42e6)) + 0.5) * real'(SPC);
        check(off <= 1.0 && off >= -1.0, $sformatf("delay %0d is %f samples from a code start", result.delay, off));
        check(result.carr_word >= 32'sd2099197 && result.carr_word <= 32'sd2099203,
              $sformatf("Doppler word %0d, expected 1000 Hz = 2099200", result.carr_word));
        check(result.detect, "signal detected");
      end else begin
        check(!result.detect, "absent PRN not detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

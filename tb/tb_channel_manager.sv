// tb_channel_manager: a mock acquisition answers each request 50 clocks later, detecting
// only PRN 5 and PRN 7; mock channels become busy when started. Checked:
//  * the search order over the PRN mask and that a PRN held by a busy channel is not
//    searched again;
//  * the start index: more than TCOMP samples after the sample counter, less than one
//    received code period beyond that, and an integer number of received code periods
//    T_c/(1+fd/f_L1)*Fs (real arithmetic here) after N_acqui + d, to within 0.5 sample,
//    5000 periods after the acquisition;
//  * the lowest free channel is used, and a detection with no free channel is reported.
module tb_channel_manager;
  import gnss_pkg::*;

  localparam int NCH = 4;
  localparam real FS = 4.0e6;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [32:1] prn_mask = '0;
  logic [NS_W-1:0] n_s = 0;
  logic [NCH-1:0] chan_busy = '0;
  logic [PRN_W-1:0] chan_prn [NCH];
  logic acq_start, acq_valid = 0, no_channel;
  logic [PRN_W-1:0] acq_prn;
  acq_result_t acq_result = '0;
  logic [NCH-1:0] init_valid;
  chan_init_t init;
  logic [15:0] n_detect, n_search;
  int checks = 0, failures = 0;

  channel_manager #(.FS_HZ(4_000_000), .NCH(NCH), .TCOMP_SAMPLES(4000)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sample counter: one sample every 3 clocks, from 20 000 000
  initial n_s = 20_000_000;
  int div3 = 0;
  always @(posedge clk) begin
    div3 <= (div3 == 2) ? 0 : div3 + 1;
    if (div3 == 2) n_s <= n_s + 1'b1;
  end

  // mock acquisition
  int req [$];
  int hold_chan2 = 0;
  always @(posedge clk) if (rst_n && acq_start) begin
    req.push_back(int'(acq_prn));
    fork begin
      automatic int p = int'(acq_prn);
      repeat (50) @(posedge clk);
      if (hold_chan2) begin chan_busy[2] <= 1'b1; chan_prn[2] <= 6'd9; end
      acq_result.detect    <= (p == 5 || p == 7);
      acq_result.prn       <= PRN_W'(p);
      acq_result.delay     <= 16'd1234;
      acq_result.carr_word <= -32'sd3221225;            // -3000 Hz
      acq_result.n_acqui   <= 48'd77;
      acq_valid <= 1'b1;
      @(posedge clk) acq_valid <= 1'b0;
    end join_none
  end

  // mock channels
  int inits = 0, init_chan = -1, noch = 0;
  chan_init_t got;
  longint ns_at_init;
  always @(posedge clk) if (rst_n) begin
    if (no_channel) noch++;
    for (int k = 0; k < NCH; k++) if (init_valid[k]) begin
      inits++;
      init_chan = k;
      got = init;
      ns_at_init = longint'(n_s);
      chan_busy[k] <= 1'b1;
      chan_prn[k]  <= init.prn;
    end
  end

  initial begin
    real fd, per, x, kr;
    for (int k = 0; k < NCH; k++) chan_prn[k] = '0;
    chan_busy[0] = 1'b1; chan_prn[0] = 6'd20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prn_mask[4] = 1; prn_mask[5] = 1;
    enable = 1;
    wait (inits == 1);
    repeat (600) @(posedge clk);
    check(req.size() >= 4 && req[0] == 4 && req[1] == 5, "search order 4, 5");
    for (int r = 2; r < req.size(); r++) check(req[r] == 4, $sformatf("request %0d for PRN %0d", r, req[r]));
    check(init_chan == 1, $sformatf("started channel %0d, expected 1", init_chan));
    check(got.prn == 6'd5 && got.carr_word == -32'sd3221225, "PRN and Doppler passed on");
    fd  = -3221225.0 * FS / 4294967296.0;
    per = FS * 1.0e-3 / (1.0 + fd / 1575.42e6);
    x   = real'(got.n_init) - (77.0 + 1234.0);
    kr  = $floor(x / per + 0.5);
    check((x - kr * per) <= 0.5 && (x - kr * per) >= -0.5, $sformatf("N_init off a code start by %f samples", x - kr * per));
    check(real'(got.n_init) > real'(ns_at_init) + 4000.0 - 200.0, "N_init after N_s + TCOMP");
    check(real'(got.n_init) < real'(ns_at_init) + 4000.0 + per, "N_init within one period of the bound");
    check(kr > 4900.0, $sformatf("%f periods after the acquisition", kr));
    // no free channel
    enable = 0;
    repeat (200) @(posedge clk);
    prn_mask = '0; prn_mask[7] = 1;
    chan_busy[3] = 1'b1; chan_prn[3] = 6'd11;
    hold_chan2 = 1;
    enable = 1;
    repeat (2000) @(posedge clk);
    check(noch == 1 && inits == 1, $sformatf("no_channel %0d, starts %0d", noch, inits));
    check(n_detect == 16'd2, "detections counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

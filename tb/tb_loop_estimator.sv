// tb_loop_estimator: integrator outputs with known phase and delay errors. The expected
// discriminators (tangent of the phase error in rad*2^12, (|E|-|L|)/(2(|E|+|L|)) in
// chip*2^12) and the new NCO words (second-order phase loop, first-order carrier-aided
// delay loop, gains in Hz per rad and chip/s per chip) are computed here in real
// arithmetic. Also checked: the Costas sign rule, the +/-pi/2 clamp for a zero prompt I,
// the integral state carried from one update to the next, and the update latency.
module tb_loop_estimator;
  import gnss_pkg::*;

  localparam real FS = 4.0e6;
  localparam real W  = 4294967296.0 / FS;   // carrier/code word LSBs per Hz (per chip/s)
  logic clk = 0, rst_n = 0, init_valid = 0, eoi = 0;
  logic signed [31:0] init_carr_word = 0;
  corr_t eoi_corr = '0;
  logic cmd_valid;
  logic signed [31:0] cmd_carr_word, doppler_word;
  logic [31:0] cmd_code_word;
  logic signed [15:0] pll_disc, dll_disc;
  int checks = 0, failures = 0;

  loop_estimator #(.FS_HZ(4_000_000)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1_000_000;
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

  real integ;   // reference integral, in carrier word LSBs

  task automatic run(input int ip, input int qp, input int e, input int l, input real exp_pll, input real exp_dll);
    int lat;
    real carr, code, nominal;
    @(negedge clk);
    eoi = 1;
    eoi_corr = '0;
    eoi_corr.ip = ip; eoi_corr.qp = qp; eoi_corr.ie = e; eoi_corr.il = l;
    @(negedge clk);
    eoi = 0;
    lat = 1;
    while (!cmd_valid && lat < 1000) begin @(negedge clk); lat++; end
    check(lat < 110, $sformatf("update latency %0d clocks", lat));
    check(absr(real'(pll_disc) - exp_pll) <= 1.5, $sformatf("phase discriminator %0d, expected %f", pll_disc, exp_pll));
    check(absr(real'(dll_disc) - exp_dll) <= 1.5, $sformatf("delay discriminator %0d, expected %f", dll_disc, exp_dll));
    integ += real'(pll_disc) / 4096.0 * 0.127 * W;
    carr = integ + real'(pll_disc) / 4096.0 * 6.366 * W;
    nominal = 1.023e6 * W;
    code = nominal + carr / 1540.0 + real'(dll_disc) / 4096.0 * 8.0 * W;
    check(absr(real'(doppler_word) - integ) < 3.0 + 0.002 * absr(integ), $sformatf("Doppler word %0d, expected %f", doppler_word, integ));
    check(absr(real'(cmd_carr_word) - carr) < 3.0 + 0.002 * absr(carr), $sformatf("carrier word %0d, expected %f", cmd_carr_word, carr));
    check(absr(real'(cmd_code_word) - code) < 4.0 + 0.001 * absr(code - nominal), $sformatf("code word %0d, expected %f", cmd_code_word, code));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    init_valid = 1; init_carr_word = 32'sd536871;   // 500 Hz
    @(negedge clk);
    init_valid = 0;
    integ = 536871.0;
    run(100000, 10000, 50000, 30000, 409.6, 512.0);
    run(-100000, 10000, 30000, 50000, -409.6, -512.0);
    run(200000, -50000, 40000, 40000, -1024.0, 0.0);
    run(0, 3000, 40000, 20000, 6434.0, 682.67);        // clamp to pi/2
    run(-80000, -8000, 10000, 30000, 409.6, -1024.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

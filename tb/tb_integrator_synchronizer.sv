// tb_integrator_synchronizer: End of Code events with prompt values carrying random
// navigation bits whose edges fall on code index 7 + 20k. A mock data decoder answers
// each End of Bit 3 clocks later. Checked, with INT_CODES = 2:
//  * no End of Bit before bit synchronisation, synchronisation within 40 bits;
//  * after it, End of Bit exactly on the last code of each bit, with the right bit value;
//  * N_c = codes completed in the current bit after each code;
//  * End of Integration every 2 codes, aligned on the bit edge after synchronisation,
//    carrying the sum of the correlator values of those codes;
//  * one ds_done per End of Code, after bit_done for an End of Bit.
module tb_integrator_synchronizer;
  import gnss_pkg::*;

  logic clk = 0, rst_n = 0, restart = 0, eoc = 0, bit_done = 0;
  corr_t eoc_corr = '0, eoi_corr;
  logic eoi, eob, eob_bit, ds_done, bit_sync;
  logic [4:0] n_c;
  int checks = 0, failures = 0;

  integrator_synchronizer #(.INT_CODES(2), .BS_THRESH(8)) dut (.*);

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

  // mock decoder
  int eob_n = 0, done_n = 0, eoi_n = 0;
  always @(posedge clk) if (rst_n && eob) fork begin
    repeat (3) @(posedge clk);
    bit_done <= 1'b1;
    @(posedge clk) bit_done <= 1'b0;
  end join_none
  always @(posedge clk) if (rst_n && ds_done) done_n++;

  bit bits [100];
  initial begin
    int idx, sync_at;
    corr_t acc;
    bit saw_eob, saw_eoi;
    for (int b = 0; b < 100; b++) bits[b] = 1'($urandom);
    acc = '0;
    sync_at = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (idx = 0; idx < 1600; idx++) begin
      int bi;
      bi = (idx + 13) / 20;   // bit edges on idx = 7 + 20k
      @(negedge clk);
      eoc = 1;
      eoc_corr.ip = bits[bi] ? -32'sd1000 - 32'(idx % 7) : 32'sd1000 + 32'(idx % 5);
      eoc_corr.qp = 32'(idx % 11) - 5;
      eoc_corr.ie = 32'(idx);
      eoc_corr.qe = 32'sd3;
      eoc_corr.il = -32'(idx);
      eoc_corr.ql = 32'sd7;
      acc.ip += eoc_corr.ip; acc.qp += eoc_corr.qp; acc.ie += eoc_corr.ie;
      acc.qe += eoc_corr.qe; acc.il += eoc_corr.il; acc.ql += eoc_corr.ql;
      @(negedge clk);
      eoc = 0;
      saw_eob = eob;
      saw_eoi = eoi;
      if (saw_eoi) begin
        check(eoi_corr == acc, $sformatf("integrated values at code %0d", idx));
        acc = '0;
        eoi_n++;
      end
      if (saw_eob) begin
        eob_n++;
        check(sync_at >= 0 && (idx - 6) % 20 == 0, $sformatf("End of Bit at code %0d", idx));
        check(eob_bit == bits[bi], $sformatf("bit value at code %0d", idx));
      end
      if (bit_sync && sync_at < 0) begin
        sync_at = idx;
        acc = eoc_corr;     // the integration restarts with the first code of a bit
      end
      if (sync_at >= 0) begin
        check(32'(n_c) == (idx - 6) % 20, $sformatf("N_c %0d at code %0d", n_c, idx));
        if (idx > sync_at + 1) check(saw_eoi == ((idx - 6) % 2 == 0), $sformatf("End of Integration alignment at %0d", idx));
      end
      repeat (10) @(negedge clk);
    end
    check(sync_at >= 0 && sync_at < 800, $sformatf("bit synchronisation at code %0d", sync_at));
    check(eob_n > 30, $sformatf("%0d End of Bit events", eob_n));
    check(done_n == 1600, $sformatf("%0d ds_done for 1600 End of Code", done_n));
    check(eoi_n >= 790, $sformatf("%0d End of Integration", eoi_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

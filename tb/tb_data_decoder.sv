// tb_data_decoder: feeds GPS-like 300-bit frames (preamble, a D30 bit at position 29,
// the time of week count of the next frame in bits 30..46 XOR D30, random elsewhere),
// inverted as a Costas loop may deliver them, starting in the middle of a frame.
// Checked: frame synchronisation on the second whole preamble and not before; N_b = bits done
// in the frame after every bit; N_f = time of week of the current frame once it has been
// read, with tow_valid; corrected output bits; one bit_done per bit.
module tb_data_decoder;
  import gnss_pkg::*;

  localparam int F = 300;
  logic clk = 0, rst_n = 0, restart = 0, eob = 0, eob_bit = 0;
  logic bit_done, frame_sync, tow_valid, dbit_valid, dbit;
  logic [NB_W-1:0] n_b;
  logic [NF_W-1:0] n_f;
  int checks = 0, failures = 0;

  data_decoder #(.BITS_PER_FRAME(F)) dut (.*);

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

  bit stream [5*F];
  int done_n = 0;
  always @(posedge clk) if (rst_n && bit_done) done_n++;

  initial begin
    int tow0, start, sync_bit, pos;
    bit d30;
    tow0 = 12345;
    for (int j = 0; j < 5; j++) begin
      for (int b = 0; b < F; b++) stream[j*F + b] = 1'($urandom);
      for (int b = 0; b < 8; b++) stream[j*F + b] = 1'(8'b1000_1011 >> (7 - b));
      d30 = stream[j*F + 29];
      for (int b = 0; b < 17; b++) stream[j*F + 30 + b] = 1'(32'(tow0 + j + 1) >> (16 - b)) ^ d30;
    end
    start = 123;
    sync_bit = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = start; k < 5 * F; k++) begin
      @(negedge clk);
      eob = 1;
      eob_bit = ~stream[k];
      @(negedge clk);
      eob = 0;
      @(negedge clk);
      pos = k % F;
      if (frame_sync && sync_bit < 0) sync_bit = k;
      if (sync_bit >= 0) begin
        check(32'(n_b) == (pos + 1) % F, $sformatf("N_b %0d after frame bit %0d", n_b, pos));
        if (k != sync_bit) check(dbit == stream[k], $sformatf("corrected bit %0d", k));
        if (k >= 3 * F - 1)
          check(tow_valid && 32'(n_f) == tow0 + (k + 1) / F, $sformatf("N_f %0d at bit %0d", n_f, k));
      end
    end
    // the first whole preamble is at 300; it is confirmed one frame later
    check(sync_bit == 2 * F + 7, $sformatf("frame synchronisation after bit %0d", sync_bit));
    check(done_n == 5 * F - start, $sformatf("%0d bit_done for %0d bits", done_n, 5 * F - start));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

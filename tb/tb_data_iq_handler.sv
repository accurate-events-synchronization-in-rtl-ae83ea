// tb_data_iq_handler: drives random samples at irregular intervals and checks that each
// leaves one clock later, unchanged, with its own index; that N_s counts the samples;
// that Do_Measurement marks exactly the sample whose index equals the armed target; and
// that a target already in the past is reported as missed.
module tb_data_iq_handler;
  import gnss_pkg::*;

  logic clk = 0, rst_n = 0;
  logic fe_valid = 0, meas_arm = 0;
  logic signed [7:0] fe_i = 0, fe_q = 0;
  logic [NS_W-1:0] meas_ns = 0;
  logic meas_armed, meas_missed, s_valid, s_do_meas;
  logic signed [7:0] s_i, s_q;
  logic [NS_W-1:0] s_index, n_s;
  int checks = 0, failures = 0;

  data_iq_handler #(.SAMPLE_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference
  int sent = 0, got = 0, meas_seen = 0, missed_seen = 0;
  logic signed [7:0] exp_i [int], exp_q [int];

  always @(posedge clk) if (rst_n && s_valid) begin
    checks++;
    if (s_index != NS_W'(got) || s_i != exp_i[got] || s_q != exp_q[got]) begin
      failures++;
      $display("sample %0d: index %0d data %0d,%0d expected %0d,%0d", got, s_index, s_i, s_q, exp_i[got], exp_q[got]);
    end
    if (s_do_meas) begin
      meas_seen++;
      checks++;
      if (s_index != 64'd37) begin failures++; $display("Do_Measurement at %0d", s_index); end
    end
    got++;
  end
  always @(posedge clk) if (rst_n && meas_missed) missed_seen++;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) begin meas_arm = 1; meas_ns = 37; end
    @(negedge clk) meas_arm = 0;
    for (int k = 0; k < 100; k++) begin
      @(negedge clk);
      fe_valid = 1;
      fe_i = 8'($urandom);
      fe_q = 8'($urandom);
      exp_i[sent] = fe_i;
      exp_q[sent] = fe_q;
      sent++;
      @(negedge clk);
      fe_valid = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      if (k == 60) begin
        meas_arm = 1; meas_ns = 10;    // already past
        @(negedge clk) meas_arm = 0;
      end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (n_s != NS_W'(sent)) begin failures++; $display("N_s = %0d, sent %0d", n_s, sent); end
    checks++;
    if (got != sent) begin failures++; $display("got %0d of %0d samples", got, sent); end
    checks++;
    if (meas_seen != 1) begin failures++; $display("%0d measurement flags", meas_seen); end
    checks++;
    if (missed_seen != 1 || meas_armed) begin failures++; $display("missed %0d armed %0d", missed_seen, meas_armed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ca_code_table: checks the PRN code table against an independent model.
//
// The reference builds the G1 and G2 sequences once and forms each PRN code as
// G1(i) xor G2(i - delay), using the published code-phase delays of G2 (not the
// phase-selector taps the block uses). All 1023 chips of all 32 PRNs are compared, the
// first 10 chips of PRN 1..10 are also checked against their published octal values, and
// the load time (1024 clocks from start to ready) is checked.
module tb_ca_code_table;
  import gnss_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  logic [PRN_W-1:0] prn = 1;
  logic [CA_CHIPS-1:0] table_q;
  int checks = 0, failures = 0;

  ca_code_table dut (.clk, .rst_n, .start, .prn, .ready, .table_q);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int delays [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                      469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860, 861, 862};
  int first10 [10] = '{'o1440, 'o1620, 'o1710, 'o1744, 'o1133, 'o1455, 'o1131, 'o1454, 'o1626, 'o1504};
  bit g1s [1023], g2s [1023];

  initial begin
    bit [10:1] r1, r2;
    int cyc, bad, top10;
    r1 = '1; r2 = '1;
    for (int i = 0; i < 1023; i++) begin
      g1s[i] = r1[10];
      g2s[i] = r2[10];
      r1 = {r1[9:1], r1[3] ^ r1[10]};
      r2 = {r2[9:1], r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10]};
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 1; p <= 32; p++) begin
      @(negedge clk);
      prn = PRN_W'(p);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!ready) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 1024) begin failures++; $display("PRN %0d: ready after %0d clocks", p, cyc); end
      bad = 0;
      for (int i = 0; i < 1023; i++)
        if (table_q[i] != (g1s[i] ^ g2s[(i - delays[p-1] + 1023) % 1023])) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("PRN %0d: %0d chips differ", p, bad); end
      if (p <= 10) begin
        top10 = 0;
        for (int i = 0; i < 10; i++) top10 = (top10 << 1) | int'(table_q[i]);
        checks++;
        if (top10 != first10[p-1]) begin
          failures++; $display("PRN %0d: first chips %o, expected %o", p, top10, first10[p-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

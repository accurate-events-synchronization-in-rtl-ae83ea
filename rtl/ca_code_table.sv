// ca_code_table: PRN code table of one tracking channel (GPS L1 C/A).
//
// On a start pulse the block runs the two 10-stage C/A generators (G1 = 1+x^3+x^10,
// G2 = 1+x^2+x^3+x^6+x^8+x^9+x^10, both preset to all ones) for 1023 clocks and writes
// one chip per clock into a 1023-bit table, chip 0 first. The satellite is selected by
// the pair of G2 stages that are added to G1 (the standard phase-selector taps).
// The table is then read combinationally by chip index by the code NCO.
// Timing: `ready` rises 1024 clocks after `start`; the table must not be used before.
// A stored table (rather than a generator stepped by the NCO) follows the description
// of a code NCO that walks through "the end of the PRN code table"; generating the
// table in hardware instead of loading it is this design's choice.
module ca_code_table
  import gnss_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,              // load the table for `prn`
  input  logic [PRN_W-1:0] prn,                // 1..32
  output logic             ready,              // table holds the code of the last `prn`
  output logic [CA_CHIPS-1:0] table_q           // table_q[i] = chip i (1 means -1 in BPSK)
);

  // G2 phase-selector taps, stage numbers 1..10, for PRN 1..32.
  function automatic logic [7:0] g2_taps(input logic [PRN_W-1:0] p);
    case (p)
      6'd1:  return {4'd2, 4'd6};   6'd2:  return {4'd3, 4'd7};   6'd3:  return {4'd4, 4'd8};
      6'd4:  return {4'd5, 4'd9};   6'd5:  return {4'd1, 4'd9};   6'd6:  return {4'd2, 4'd10};
      6'd7:  return {4'd1, 4'd8};   6'd8:  return {4'd2, 4'd9};   6'd9:  return {4'd3, 4'd10};
      6'd10: return {4'd2, 4'd3};   6'd11: return {4'd3, 4'd4};   6'd12: return {4'd5, 4'd6};
      6'd13: return {4'd6, 4'd7};   6'd14: return {4'd7, 4'd8};   6'd15: return {4'd8, 4'd9};
      6'd16: return {4'd9, 4'd10};  6'd17: return {4'd1, 4'd4};   6'd18: return {4'd2, 4'd5};
      6'd19: return {4'd3, 4'd6};   6'd20: return {4'd4, 4'd7};   6'd21: return {4'd5, 4'd8};
      6'd22: return {4'd6, 4'd9};   6'd23: return {4'd1, 4'd3};   6'd24: return {4'd4, 4'd6};
      6'd25: return {4'd5, 4'd7};   6'd26: return {4'd6, 4'd8};   6'd27: return {4'd7, 4'd9};
      6'd28: return {4'd8, 4'd10};  6'd29: return {4'd1, 4'd6};   6'd30: return {4'd2, 4'd7};
      6'd31: return {4'd3, 4'd8};   default: return {4'd4, 4'd9};
    endcase
  endfunction

  logic [10:1] g1, g2;        // stage n of the generator is g[n]
  logic [3:0]  tap_a, tap_b;
  logic [9:0]  idx;
  logic        busy;

  wire chip = g1[10] ^ g2[tap_a] ^ g2[tap_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1      <= '1;
      g2      <= '1;
      idx     <= '0;
      busy    <= 1'b0;
      ready   <= 1'b0;
      tap_a   <= 4'd2;
      tap_b   <= 4'd6;
      table_q <= '0;
    end else if (start) begin
      g1      <= '1;
      g2      <= '1;
      idx     <= '0;
      busy    <= 1'b1;
      ready   <= 1'b0;
      {tap_a, tap_b} <= g2_taps(prn);
    end else if (busy) begin
      table_q[idx] <= chip;
      g1 <= {g1[9:1], g1[3] ^ g1[10]};
      g2 <= {g2[9:1], g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10]};
      idx <= idx + 10'd1;
      if (idx == 10'(CA_CHIPS - 1)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end
    end
  end

endmodule

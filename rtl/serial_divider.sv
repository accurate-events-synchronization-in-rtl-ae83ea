// serial_divider: unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; `done` pulses NW clocks later with
// quotient = dividend / divisor (all ones when the divisor is zero). A start while busy
// restarts the division. Used by the loop estimator (discriminator normalisation) and by
// the channel manager (received code period).
module serial_divider #(
  parameter int unsigned NW = 32,   // dividend and quotient width
  parameter int unsigned DW = 32    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient
);

  logic [NW-1:0]   q;
  logic [DW:0]     rem;
  logic [DW-1:0]   d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]     trial;

  assign trial = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; d <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; quotient <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        rem  <= '0;
        d    <= divisor;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (trial >= {1'b0, d}) begin
          rem <= trial - {1'b0, d};
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= trial;
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (32'(cnt) == NW - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
          quotient <= (trial >= {1'b0, d}) ? {q[NW-2:0], 1'b1} : {q[NW-2:0], 1'b0};
        end
      end
    end
  end

endmodule

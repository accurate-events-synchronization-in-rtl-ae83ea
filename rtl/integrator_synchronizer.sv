// integrator_synchronizer: second stage of a tracking channel, run at each End of Code.
//
// At each End of Code it
//   * adds the six correlator sums to the integrators; every INT_CODES codes it sends
//     the integrated values to the loop estimator (End of Integration, eoi) and clears them;
//   * advances the code counter N_c (codes completed in the current navigation bit);
//     when N_c reaches 20 it sends the bit (sign of the prompt in-phase sum over the 20
//     codes) to the data decoder (End of Bit, eob) and resets N_c to 0.
// Bit synchronisation: until the bit edge is known, N_c runs modulo 20 without End of
// Bit events, and a sign change of the prompt in-phase value between two codes adds one
// to a histogram bin selected by N_c. When a bin reaches BS_THRESH while no other bin is
// above half of it, the edge is declared there: the current code is the first of a bit,
// N_c becomes 1 and the integration phase restarts. If another bin is too high the
// histogram is cleared and the count starts over.
// Handshake: every End of Code is answered by one ds_done pulse, given when its effect is
// complete: one clock after the event, or, for an End of Bit, on the clock after the data
// decoder acknowledges the bit (bit_done). An End of Code arriving while one is still in
// progress is an error (assertion).
// The histogram method, its threshold and the integration length are this design's
// choices; the events and the counter follow the source description.
module integrator_synchronizer
  import gnss_pkg::*;
#(
  parameter int unsigned INT_CODES = 1,   // codes per integration, divides 20
  parameter int unsigned BS_THRESH = 8    // sign changes that fix the bit edge
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         restart,     // new channel: forget bit synchronisation
  input  logic         eoc,
  input  corr_t        eoc_corr,
  // End of Integration
  output logic         eoi,
  output corr_t        eoi_corr,
  // End of Bit
  output logic         eob,
  output logic         eob_bit,     // 1 when the prompt in-phase sum is negative
  input  logic         bit_done,
  // completion towards the NCO_Correlator (sets Measurement_Enable)
  output logic         ds_done,
  output logic [4:0]   n_c,
  output logic         bit_sync
);

  localparam int unsigned HW = $clog2(BS_THRESH + 1);

  corr_t                   integ;
  logic [$clog2(INT_CODES+1)-1:0] int_cnt;
  logic signed [CORR_W+4:0] bit_acc;
  logic                    prev_neg, have_prev;
  logic [HW-1:0]           hist [CODES_PER_BIT];
  logic                    wait_bit;

  corr_t integ_next;
  logic  ip_neg, transition, others_low;
  logic [4:0] nc_inc;

  always_comb begin
    integ_next.ie = integ.ie + eoc_corr.ie;
    integ_next.qe = integ.qe + eoc_corr.qe;
    integ_next.ip = integ.ip + eoc_corr.ip;
    integ_next.qp = integ.qp + eoc_corr.qp;
    integ_next.il = integ.il + eoc_corr.il;
    integ_next.ql = integ.ql + eoc_corr.ql;
    ip_neg     = eoc_corr.ip[CORR_W-1];
    transition = have_prev && (ip_neg != prev_neg);
    nc_inc     = n_c + 5'd1;
    others_low = 1'b1;
    for (int k = 0; k < CODES_PER_BIT; k++)
      if (k != int'(n_c) && 32'(hist[k]) > BS_THRESH / 2) others_low = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      int_cnt   <= '0;
      bit_acc   <= '0;
      prev_neg  <= 1'b0;
      have_prev <= 1'b0;
      for (int k = 0; k < CODES_PER_BIT; k++) hist[k] <= '0;
      wait_bit  <= 1'b0;
      eoi       <= 1'b0;
      eoi_corr  <= '0;
      eob       <= 1'b0;
      eob_bit   <= 1'b0;
      ds_done   <= 1'b0;
      n_c       <= '0;
      bit_sync  <= 1'b0;
    end else begin
      eoi     <= 1'b0;
      eob     <= 1'b0;
      ds_done <= 1'b0;
      if (wait_bit && bit_done) begin
        wait_bit <= 1'b0;
        ds_done  <= 1'b1;
      end
      if (restart) begin
        integ     <= '0;
        int_cnt   <= '0;
        bit_acc   <= '0;
        have_prev <= 1'b0;
        for (int k = 0; k < CODES_PER_BIT; k++) hist[k] <= '0;
        wait_bit  <= 1'b0;
        n_c       <= '0;
        bit_sync  <= 1'b0;
      end else if (eoc) begin
        prev_neg  <= ip_neg;
        have_prev <= 1'b1;
        // integrators
        if (32'(int_cnt) == INT_CODES - 1) begin
          eoi      <= 1'b1;
          eoi_corr <= integ_next;
          integ    <= '0;
          int_cnt  <= '0;
        end else begin
          integ    <= integ_next;
          int_cnt  <= int_cnt + 1'b1;
        end
        if (!bit_sync) begin
          ds_done <= 1'b1;
          n_c     <= (32'(nc_inc) == CODES_PER_BIT) ? 5'd0 : nc_inc;
          if (transition) begin
            if (32'(hist[n_c]) + 1 >= BS_THRESH) begin
              for (int k = 0; k < CODES_PER_BIT; k++) hist[k] <= '0;
              if (others_low) begin
                // this code opens a bit
                bit_sync <= 1'b1;
                n_c      <= 5'd1;
                bit_acc  <= (CORR_W+5)'(eoc_corr.ip);
                integ    <= '0;
                if (INT_CODES == 1) begin
                  int_cnt <= '0;
                end else begin
                  int_cnt  <= 1;
                  integ    <= eoc_corr;
                  eoi      <= 1'b0;
                end
              end
            end else begin
              hist[n_c] <= hist[n_c] + 1'b1;
            end
          end
        end else if (32'(nc_inc) == CODES_PER_BIT) begin
          n_c      <= 5'd0;
          eob      <= 1'b1;
          eob_bit  <= (bit_acc + (CORR_W+5)'(eoc_corr.ip)) < 0;
          bit_acc  <= '0;
          wait_bit <= 1'b1;
        end else begin
          n_c      <= nc_inc;
          bit_acc  <= bit_acc + (CORR_W+5)'(eoc_corr.ip);
          ds_done  <= 1'b1;
        end
      end
    end
  end

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) eoc |-> !wait_bit);

endmodule

// data_iq_handler: receives the complex samples of the RF front end, numbers them and
// hands them out to the acquisition and to every tracking channel.
//
// The sample counter register N_s counts the samples received since reset; each sample
// leaves this block tagged with its own index (0 for the first sample), which is the time
// base of the whole receiver: t_rx = t_rx0 + index / Fs. There is no buffer: every
// sample is forwarded one clock after it arrives, and all blocks downstream must take it
// in that clock.
// Measurement events: the host writes a target index N_meas and arms it (meas_arm for
// one clock). The sample whose index equals N_meas leaves with the Do_Measurement flag
// set, after which the target is disarmed. An armed target that is already in the past is
// reported through meas_missed and disarmed.
// Timing: fe_valid may be asserted at most every other clock (the tracking channels need
// at least one clock between samples for their handshakes). Sample width and the host
// register interface are this design's choices.
module data_iq_handler
  import gnss_pkg::*;
#(
  parameter int unsigned SAMPLE_W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // front end
  input  logic                       fe_valid,
  input  logic signed [SAMPLE_W-1:0] fe_i,
  input  logic signed [SAMPLE_W-1:0] fe_q,
  // host: measurement event
  input  logic                       meas_arm,
  input  logic [NS_W-1:0]            meas_ns,
  output logic                       meas_armed,
  output logic                       meas_missed,     // pulse
  // sample bus to acquisition and tracking
  output logic                       s_valid,
  output logic signed [SAMPLE_W-1:0] s_i,
  output logic signed [SAMPLE_W-1:0] s_q,
  output logic [NS_W-1:0]            s_index,
  output logic                       s_do_meas,
  // sample counter register N_s
  output logic [NS_W-1:0]            n_s
);

  logic [NS_W-1:0] meas_target;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_s         <= '0;
      s_valid     <= 1'b0;
      s_i         <= '0;
      s_q         <= '0;
      s_index     <= '0;
      s_do_meas   <= 1'b0;
      meas_armed  <= 1'b0;
      meas_target <= '0;
      meas_missed <= 1'b0;
    end else begin
      s_valid     <= fe_valid;
      s_do_meas   <= 1'b0;
      meas_missed <= 1'b0;
      if (fe_valid) begin
        s_i     <= fe_i;
        s_q     <= fe_q;
        s_index <= n_s;
        n_s     <= n_s + 1'b1;
        if (meas_armed && meas_target == n_s) begin
          s_do_meas  <= 1'b1;
          meas_armed <= 1'b0;
        end else if (meas_armed && meas_target < n_s) begin
          meas_missed <= 1'b1;
          meas_armed  <= 1'b0;
        end
      end
      if (meas_arm) begin
        meas_armed  <= 1'b1;
        meas_target <= meas_ns;
      end
    end
  end

endmodule

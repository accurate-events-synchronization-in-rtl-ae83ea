// tracking_channel: one autonomous satellite tracking channel.
//
// Four blocks run as a cascade of events, each at its own rate:
//   NCO_Correlator (every sample) --End of Code--> Integrator Synchronizer
//   Integrator Synchronizer --End of Integration--> LoopEstimator --commands--> NCO
//   Integrator Synchronizer --End of Bit--> DataDecoder
// The NCO_Correlator also answers measurement events, reading N_c from the integrator
// synchroniser and N_b, N_f from the data decoder once Measurement_Enable says they are
// up to date. The channel is started by an init command (PRN, Doppler, start sample
// N_init) and then needs nothing from the host; a new init or `stop` restarts it.
// Samples are taken straight from the sample bus with no buffer: each must be consumed
// in the clock it is presented, and the downstream stages finish an event within a few
// clocks, far inside one code period.
module tracking_channel
  import gnss_pkg::*;
#(
  parameter int unsigned     SAMPLE_W       = 8,
  parameter longint unsigned FS_HZ          = 4_000_000,
  parameter int unsigned     INT_CODES      = 1,
  parameter int unsigned     BS_THRESH      = 8,
  parameter int unsigned     BITS_PER_FRAME = 300
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  input  logic signed [SAMPLE_W-1:0] s_i,
  input  logic signed [SAMPLE_W-1:0] s_q,
  input  logic [NS_W-1:0]            s_index,
  input  logic                       s_do_meas,
  input  logic                       init_valid,
  input  chan_init_t                 init,
  input  logic                       stop,
  output logic                       meas_valid,
  output meas_t                      meas,
  output logic                       busy,
  output logic                       tracking,
  output logic                       start_missed,
  output logic [PRN_W-1:0]           prn,
  output logic signed [31:0]         doppler_word,
  output logic                       dbit_valid,
  output logic                       dbit,
  // event strobes, for observation
  output logic                       ev_eoc,
  output logic                       ev_eoi,
  output logic                       ev_eob,
  output logic                       meas_enable,
  output corr_t                      integ
);

  logic               cmd_valid;
  logic signed [31:0] cmd_carr_word;
  logic [31:0]        cmd_code_word;
  corr_t              eoc_corr;
  logic               ds_done, bit_done, eob_bit;
  logic [4:0]         n_c;
  logic               bit_sync, frame_sync, tow_valid;
  logic [NB_W-1:0]    n_b;
  logic [NF_W-1:0]    n_f;
  logic               restart;

  assign restart = init_valid | stop;

  nco_correlator #(.SAMPLE_W(SAMPLE_W), .FS_HZ(FS_HZ)) u_nco (
    .clk, .rst_n, .s_valid, .s_i, .s_q, .s_index, .s_do_meas,
    .init_valid, .init, .stop,
    .cmd_valid, .cmd_carr_word, .cmd_code_word,
    .eoc(ev_eoc), .eoc_corr,
    .ds_done, .n_c, .bit_sync, .n_b, .n_f, .frame_sync, .tow_valid,
    .meas_enable, .meas_valid, .meas,
    .busy, .tracking, .start_missed, .prn, .carr_word(), .code_word()
  );

  integrator_synchronizer #(.INT_CODES(INT_CODES), .BS_THRESH(BS_THRESH)) u_isync (
    .clk, .rst_n, .restart, .eoc(ev_eoc), .eoc_corr,
    .eoi(ev_eoi), .eoi_corr(integ), .eob(ev_eob), .eob_bit, .bit_done,
    .ds_done, .n_c, .bit_sync
  );

  loop_estimator #(.FS_HZ(FS_HZ)) u_loop (
    .clk, .rst_n, .init_valid, .init_carr_word(init.carr_word),
    .eoi(ev_eoi), .eoi_corr(integ),
    .cmd_valid, .cmd_carr_word, .cmd_code_word, .doppler_word, .pll_disc(), .dll_disc()
  );

  data_decoder #(.BITS_PER_FRAME(BITS_PER_FRAME)) u_dec (
    .clk, .rst_n, .restart, .eob(ev_eob), .eob_bit, .bit_done,
    .n_b, .n_f, .frame_sync, .tow_valid, .dbit_valid, .dbit
  );

endmodule

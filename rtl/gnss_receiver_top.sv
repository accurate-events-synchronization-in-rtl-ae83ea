// gnss_receiver_top: programmable-logic part of a GPS L1 C/A receiver with sample-exact
// event timing.
//
// Data path: front-end samples -> Data IQ handler (numbers every sample) -> acquisition
// and NCH tracking channels, all fed from the same sample bus with no buffer.
// Control: the channel manager starts acquisitions for the PRNs in prn_mask and starts a
// free tracking channel at a computed sample index N_init for each detection. A host may
// also start a channel directly (host_init_valid), with priority over the manager, or
// stop one (chan_stop).
// Measurements: the host arms a measurement at sample index meas_ns; every tracking
// channel then returns one record (meas_valid[ch], meas[ch]) whose phases and counters
// all refer to the same receiver time, ready for the pseudo-range computation
//   t_sv = T_chip*phi_c + T_c*N_c + T_b*N_b + T_f*N_f.
// The processor-side parts of the receiver (measurement processing, navigation, ephemeris
// decoding) are outside this block; their inputs are brought out as ports.
module gnss_receiver_top
  import gnss_pkg::*;
#(
  parameter int unsigned     SAMPLE_W       = 8,
  parameter longint unsigned FS_HZ          = 4_000_000,
  parameter int unsigned     NCH            = 6,
  parameter int unsigned     SPC            = 4000,
  parameter int unsigned     STORE_LEN      = 32768,
  parameter int unsigned     NCOH           = 7,
  parameter int unsigned     NUM_BINS       = 21,
  parameter int unsigned     BIN_HZ         = 500,
  parameter int unsigned     DET_RATIO      = 8,
  parameter int unsigned     INT_CODES      = 1,
  parameter int unsigned     BS_THRESH      = 8,
  parameter int unsigned     BITS_PER_FRAME = 300,
  parameter int unsigned     TCOMP_SAMPLES  = 4000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // RF front end
  input  logic                       fe_valid,
  input  logic signed [SAMPLE_W-1:0] fe_i,
  input  logic signed [SAMPLE_W-1:0] fe_q,
  // host: measurement event
  input  logic                       meas_arm,
  input  logic [NS_W-1:0]            meas_ns,
  output logic                       meas_armed,
  output logic                       meas_missed,
  output logic [NS_W-1:0]            n_s,
  // host: manager and channels
  input  logic                       mgr_enable,
  input  logic [32:1]                prn_mask,
  input  logic [NCH-1:0]             host_init_valid,
  input  chan_init_t                 host_init,
  input  logic [NCH-1:0]             chan_stop,
  // to the measurement processing
  output logic [NCH-1:0]             meas_valid,
  output meas_t                      meas [NCH],
  // to the message decoding
  output logic [NCH-1:0]             dbit_valid,
  output logic [NCH-1:0]             dbit,
  // status
  output logic [NCH-1:0]             chan_busy,
  output logic [NCH-1:0]             chan_tracking,
  output logic [NCH-1:0]             chan_start_missed,
  output logic [PRN_W-1:0]           chan_prn [NCH],
  output logic signed [31:0]         chan_doppler [NCH],
  output logic [NCH-1:0]             ev_eoc,
  output logic [NCH-1:0]             ev_eoi,
  output logic [NCH-1:0]             ev_eob,
  output logic [NCH-1:0]             meas_enable,
  output corr_t                      integ [NCH],
  output logic                       acq_busy,
  output logic                       acq_valid,
  output acq_result_t                acq_result,
  output logic                       mgr_no_channel,
  output logic [15:0]                mgr_n_detect,
  output logic [15:0]                mgr_n_search
);

  logic                       s_valid, s_do_meas;
  logic signed [SAMPLE_W-1:0] s_i, s_q;
  logic [NS_W-1:0]            s_index;
  logic                       acq_start;
  logic [PRN_W-1:0]           acq_prn;
  logic [NCH-1:0]             mgr_init_valid;
  chan_init_t                 mgr_init;

  data_iq_handler #(.SAMPLE_W(SAMPLE_W)) u_iq (
    .clk, .rst_n, .fe_valid, .fe_i, .fe_q, .meas_arm, .meas_ns, .meas_armed, .meas_missed,
    .s_valid, .s_i, .s_q, .s_index, .s_do_meas, .n_s
  );

  acquisition #(
    .SAMPLE_W(SAMPLE_W), .FS_HZ(FS_HZ), .SPC(SPC), .STORE_LEN(STORE_LEN), .NCOH(NCOH),
    .NUM_BINS(NUM_BINS), .BIN_HZ(BIN_HZ), .DET_RATIO(DET_RATIO)
  ) u_acq (
    .clk, .rst_n, .s_valid, .s_i, .s_q, .s_index, .start(acq_start), .prn(acq_prn),
    .busy(acq_busy), .result_valid(acq_valid), .result(acq_result)
  );

  channel_manager #(.FS_HZ(FS_HZ), .NCH(NCH), .TCOMP_SAMPLES(TCOMP_SAMPLES)) u_mgr (
    .clk, .rst_n, .enable(mgr_enable), .prn_mask, .n_s, .chan_busy, .chan_prn,
    .acq_start, .acq_prn, .acq_valid, .acq_result,
    .init_valid(mgr_init_valid), .init(mgr_init),
    .no_channel(mgr_no_channel), .n_detect(mgr_n_detect), .n_search(mgr_n_search)
  );

  for (genvar ch = 0; ch < NCH; ch++) begin : g_ch
    logic       ch_init_valid;
    chan_init_t ch_init;
    assign ch_init_valid = host_init_valid[ch] | mgr_init_valid[ch];
    assign ch_init       = host_init_valid[ch] ? host_init : mgr_init;

    tracking_channel #(
      .SAMPLE_W(SAMPLE_W), .FS_HZ(FS_HZ), .INT_CODES(INT_CODES), .BS_THRESH(BS_THRESH),
      .BITS_PER_FRAME(BITS_PER_FRAME)
    ) u_trk (
      .clk, .rst_n, .s_valid, .s_i, .s_q, .s_index, .s_do_meas,
      .init_valid(ch_init_valid), .init(ch_init), .stop(chan_stop[ch]),
      .meas_valid(meas_valid[ch]), .meas(meas[ch]),
      .busy(chan_busy[ch]), .tracking(chan_tracking[ch]),
      .start_missed(chan_start_missed[ch]), .prn(chan_prn[ch]),
      .doppler_word(chan_doppler[ch]), .dbit_valid(dbit_valid[ch]), .dbit(dbit[ch]),
      .ev_eoc(ev_eoc[ch]), .ev_eoi(ev_eoi[ch]), .ev_eob(ev_eob[ch]),
      .meas_enable(meas_enable[ch]), .integ(integ[ch])
    );
  end

endmodule

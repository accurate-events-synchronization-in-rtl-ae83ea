// nco_correlator: first stage of a tracking channel, the only one run at every sample.
//
// It holds a carrier NCO, a code NCO and six correlators (early, prompt and late, in
// phase and quadrature). For every sample it
//   * removes the carrier: the sample is rotated by minus the carrier phase, using a
//     16-point cos/sin table indexed by the 32-bit phase rounded to its top 4 bits;
//   * multiplies by the early, prompt and late chips of the PRN code table, read at
//     code phase + 1/2, + 0, - 1/2 chip, and adds the six products to the correlators;
//   * advances the carrier phase by the carrier word and the code phase by the code word.
// When the code phase passes the end of the 1023-chip table an End of Code event is
// issued (eoc, one clock) with the six sums, which then restart from zero.
//
// Start: after an init command the channel loads its code table, then waits for the
// sample whose index equals N_init and processes it with code phase 0 and carrier phase
// 0. A sample index already beyond N_init when waiting ends the attempt (start_missed).
//
// Commands: the loop estimator writes new carrier and code words (cmd_valid); they are
// used from the next sample on. No event is raised for them.
//
// Measurement: for the sample flagged Do_Measurement, the carrier and code phases after
// that sample (that is, the phases at sample index N_meas + 1, the record's ns_tag) are
// saved at once and processing goes on. Every End of Code clears the Measurement_Enable
// flag; the integrator/synchroniser sets it again (ds_done) once it and the data decoder
// have taken that event into their counters. The record is completed with N_c, N_b and
// N_f and sent (meas_valid) as soon as Measurement_Enable is set, so the counters always
// match the saved code phase, even when the measurement sample closes a code period.
// The table size, carrier-table resolution, +/- 1/2 chip correlator spacing and widths
// are this design's choices; the event scheme follows the source description.
module nco_correlator
  import gnss_pkg::*;
#(
  parameter int unsigned    SAMPLE_W = 8,
  parameter longint unsigned FS_HZ   = 4_000_000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // samples from the Data IQ handler
  input  logic                       s_valid,
  input  logic signed [SAMPLE_W-1:0] s_i,
  input  logic signed [SAMPLE_W-1:0] s_q,
  input  logic [NS_W-1:0]            s_index,
  input  logic                       s_do_meas,
  // channel control
  input  logic                       init_valid,
  input  chan_init_t                 init,
  input  logic                       stop,
  // NCO commands from the loop estimator
  input  logic                       cmd_valid,
  input  logic signed [31:0]         cmd_carr_word,
  input  logic [31:0]                cmd_code_word,
  // End of Code event
  output logic                       eoc,
  output corr_t                      eoc_corr,
  // downstream state for the measurement
  input  logic                       ds_done,
  input  logic [4:0]                 n_c,
  input  logic                       bit_sync,
  input  logic [NB_W-1:0]            n_b,
  input  logic [NF_W-1:0]            n_f,
  input  logic                       frame_sync,
  input  logic                       tow_valid,
  output logic                       meas_enable,
  output logic                       meas_valid,
  output meas_t                      meas,
  // status
  output logic                       busy,          // channel allocated
  output logic                       tracking,
  output logic                       start_missed,  // pulse
  output logic [PRN_W-1:0]           prn,
  output logic signed [31:0]         carr_word,
  output logic [31:0]                code_word
);

  localparam logic [31:0] CODE_NOM = code_nominal_word(FS_HZ);
  localparam int unsigned PW = SAMPLE_W + 6;   // width of one wiped-off product

  typedef enum logic [1:0] {IDLE, LOAD, WAIT, TRACK} state_e;
  state_e state;

  logic [NS_W-1:0]    n_init;
  logic [31:0]        carr_phase;
  logic signed [31:0] carr_cycles;
  logic [9:0]         code_int;
  logic [31:0]        code_frac;
  corr_t              acc;
  logic               tab_start, tab_ready;
  logic [CA_CHIPS-1:0] code_tab;
  logic               meas_pending;
  meas_t              meas_hold;

  ca_code_table u_table (
    .clk, .rst_n, .start(tab_start), .prn(prn), .ready(tab_ready), .table_q(code_tab)
  );

  // ---------------------------------------------------------------- per-sample datapath
  logic               proc;
  logic signed [4:0]  cv, sv;
  logic signed [PW-1:0] wi, wq;
  logic [9:0]         e_idx, l_idx;
  logic               chip_e, chip_p, chip_l;
  corr_t              acc_next;
  logic [32:0]        code_frac_sum;
  logic [10:0]        code_int_sum;
  logic               eoc_now;
  logic [9:0]         code_int_next;
  logic [31:0]        carr_phase_next;
  logic signed [33:0] carr_sum;
  logic signed [31:0] carr_cycles_next;

  function automatic logic signed [CORR_W-1:0] add_chip(input logic signed [CORR_W-1:0] a,
                                                        input logic signed [PW-1:0] v,
                                                        input logic chip_bit);
    return chip_bit ? a - CORR_W'(v) : a + CORR_W'(v);
  endfunction

  always_comb begin
    proc = s_valid && (state == TRACK || (state == WAIT && s_index == n_init));
    cv = cos16(carr_phase[31:28] + 4'(carr_phase[27]));
    sv = sin16(carr_phase[31:28] + 4'(carr_phase[27]));
    // sample * exp(-j*phase)
    wi = PW'(s_i * cv) + PW'(s_q * sv);
    wq = PW'(s_q * cv) - PW'(s_i * sv);
    e_idx = code_frac[31] ? ((code_int == 10'(CA_CHIPS - 1)) ? 10'd0 : code_int + 10'd1) : code_int;
    l_idx = code_frac[31] ? code_int : ((code_int == 10'd0) ? 10'(CA_CHIPS - 1) : code_int - 10'd1);
    chip_e = code_tab[e_idx];
    chip_p = code_tab[code_int];
    chip_l = code_tab[l_idx];
    acc_next.ie = add_chip(acc.ie, wi, chip_e);
    acc_next.qe = add_chip(acc.qe, wq, chip_e);
    acc_next.ip = add_chip(acc.ip, wi, chip_p);
    acc_next.qp = add_chip(acc.qp, wq, chip_p);
    acc_next.il = add_chip(acc.il, wi, chip_l);
    acc_next.ql = add_chip(acc.ql, wq, chip_l);
    // code NCO
    code_frac_sum = {1'b0, code_frac} + {1'b0, code_word};
    code_int_sum  = {1'b0, code_int} + 11'(code_frac_sum[32]);
    eoc_now       = code_int_sum >= 11'(CA_CHIPS);
    code_int_next = eoc_now ? 10'(code_int_sum - 11'(CA_CHIPS)) : code_int_sum[9:0];
    // carrier NCO with whole-cycle count
    carr_sum         = $signed({2'b00, carr_phase}) + 34'(carr_word);
    carr_phase_next  = carr_sum[31:0];
    carr_cycles_next = carr_cycles + 32'($signed(carr_sum[33:32]));
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= IDLE;
      n_init       <= '0;
      prn          <= '0;
      carr_word    <= '0;
      code_word    <= CODE_NOM;
      carr_phase   <= '0;
      carr_cycles  <= '0;
      code_int     <= '0;
      code_frac    <= '0;
      acc          <= '0;
      eoc          <= 1'b0;
      eoc_corr     <= '0;
      tab_start    <= 1'b0;
      start_missed <= 1'b0;
      meas_enable  <= 1'b1;
      meas_pending <= 1'b0;
      meas_hold    <= '0;
      meas_valid   <= 1'b0;
      meas         <= '0;
    end else begin
      eoc          <= 1'b0;
      tab_start    <= 1'b0;
      start_missed <= 1'b0;
      meas_valid   <= 1'b0;

      if (cmd_valid) begin
        carr_word <= cmd_carr_word;
        code_word <= cmd_code_word;
      end

      case (state)
        IDLE: ;
        LOAD: if (tab_ready && !tab_start) state <= WAIT;
        WAIT: if (s_valid && s_index > n_init) begin
                state        <= IDLE;
                start_missed <= 1'b1;
              end else if (proc) begin
                state <= TRACK;
              end
        TRACK: ;
        default: state <= IDLE;
      endcase

      if (proc) begin
        carr_phase  <= carr_phase_next;
        carr_cycles <= carr_cycles_next;
        code_frac   <= code_frac_sum[31:0];
        code_int    <= code_int_next;
        if (eoc_now) begin
          eoc         <= 1'b1;
          eoc_corr    <= acc_next;
          acc         <= '0;
          meas_enable <= 1'b0;
        end else begin
          acc <= acc_next;
        end
        if (s_do_meas) begin
          meas_pending          <= 1'b1;
          meas_hold.prn         <= prn;
          meas_hold.ns_tag      <= s_index + 1'b1;
          meas_hold.code_int    <= code_int_next;
          meas_hold.code_frac   <= code_frac_sum[31:0];
          meas_hold.carr_cycles <= carr_cycles_next;
          meas_hold.carr_frac   <= carr_phase_next;
          meas_hold.carr_word   <= carr_word;
        end
      end

      if (ds_done) meas_enable <= 1'b1;

      if (meas_pending && meas_enable) begin
        meas_pending    <= 1'b0;
        meas_valid      <= 1'b1;
        meas            <= meas_hold;
        meas.n_c        <= n_c;
        meas.n_b        <= n_b;
        meas.n_f        <= n_f;
        meas.bit_sync   <= bit_sync;
        meas.frame_sync <= frame_sync;
        meas.tow_valid  <= tow_valid;
      end

      if (stop) begin
        state        <= IDLE;
        meas_pending <= 1'b0;
      end
      if (init_valid) begin
        state        <= LOAD;
        tab_start    <= 1'b1;
        prn          <= init.prn;
        n_init       <= init.n_init;
        carr_word    <= init.carr_word;
        code_word    <= code_rate_word(CODE_NOM, init.carr_word);
        carr_phase   <= '0;
        carr_cycles  <= '0;
        code_int     <= '0;
        code_frac    <= '0;
        acc          <= '0;
        meas_enable  <= 1'b1;
        meas_pending <= 1'b0;
      end
    end
  end

  assign busy     = (state != IDLE);
  assign tracking = (state == TRACK);

  // The downstream handshake: a completion only ever answers an End of Code.
  a_done_after_eoc: assert property (@(posedge clk) disable iff (!rst_n)
                                     ds_done |-> !meas_enable);

endmodule

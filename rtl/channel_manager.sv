// channel_manager: runs the acquisition and starts tracking channels from its results.
//
// Search: while `enable` is set and a channel is free, it takes the next PRN (round robin
// over 1..32) that is set in prn_mask and is not already held by a busy channel, and
// starts the acquisition for it.
// Channel start: for a detection it computes the sample index at which a code period of
// that satellite will begin, late enough to leave time for the channel to get ready:
//   T_c^rx  = T_c / (1 + f_d / f_L1)         received code period, as a sample count
//             = 1023 * 2^32 / code_word      (code_word = carrier-aided code rate word)
//   N_init  = N_acqui + d + k * T_c^rx * Fs, the smallest k with N_init > N_s + TCOMP_SAMPLES
// where d is the delay found by the acquisition and N_s the sample counter when the
// computation starts. T_c^rx is kept with 32 fractional bits, so the accumulated rounding
// stays far below one sample for seconds of elapsed time; k is found by adding 1024 code
// periods at a time, then one at a time. The lowest free channel then gets
// {PRN, Doppler, N_init} (init_valid one-hot for one clock).
// Timing: about 80 clocks for the division plus one clock per added step.
// In the source design this is software on the processor; here it is logic so that
// acquisition and tracking run without a host. The search order and TCOMP_SAMPLES are
// this design's choices; the start-time rule follows the source description.
module channel_manager
  import gnss_pkg::*;
#(
  parameter longint unsigned FS_HZ         = 4_000_000,
  parameter int unsigned     NCH           = 6,
  parameter int unsigned     TCOMP_SAMPLES = 4000
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic [32:1]            prn_mask,
  input  logic [NS_W-1:0]        n_s,
  input  logic [NCH-1:0]         chan_busy,
  input  logic [PRN_W-1:0]       chan_prn [NCH],
  // acquisition
  output logic                   acq_start,
  output logic [PRN_W-1:0]       acq_prn,
  input  logic                   acq_valid,
  input  acq_result_t            acq_result,
  // channel initialisation
  output logic [NCH-1:0]         init_valid,
  output chan_init_t             init,
  // status
  output logic                   no_channel,     // pulse: detection with every channel busy
  output logic [15:0]            n_detect,
  output logic [15:0]            n_search
);

  localparam logic [31:0] CODE_NOM = code_nominal_word(FS_HZ);
  localparam int unsigned TW = NS_W + 32;        // sample index with 32 fractional bits

  typedef enum logic [2:0] {PICK, ACQ, DIV, STEP, ISSUE} state_e;
  state_e state;

  logic [PRN_W-1:0] cur;          // next PRN to consider
  acq_result_t      res;
  logic [TW-1:0]    t_start, t_thr;
  logic [TW-1:0]    period;       // T_c^rx * Fs, 32 fractional bits
  logic             div_start, div_busy, div_done;
  logic [79:0]      div_q;
  logic [31:0]      code_word;

  serial_divider #(.NW(80), .DW(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(80'(CA_CHIPS) << 64), .divisor(code_word),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  // PRN held by a busy channel?
  function automatic logic held(input logic [PRN_W-1:0] p, input logic [NCH-1:0] b,
                                input logic [PRN_W-1:0] cp [NCH]);
    logic h;
    h = 1'b0;
    for (int k = 0; k < NCH; k++) if (b[k] && cp[k] == p) h = 1'b1;
    return h;
  endfunction

  logic             free_any;
  logic [$clog2(NCH+1)-1:0] free_idx;
  always_comb begin
    free_any = 1'b0;
    free_idx = '0;
    for (int k = NCH - 1; k >= 0; k--)
      if (!chan_busy[k]) begin
        free_any = 1'b1;
        free_idx = ($clog2(NCH+1))'(k);
      end
  end

  logic [TW-1:0] big_step;
  assign big_step = period << 10;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= PICK; cur <= PRN_W'(1); res <= '0; t_start <= '0; t_thr <= '0; period <= '0;
      div_start <= 1'b0; code_word <= CODE_NOM; acq_start <= 1'b0; acq_prn <= '0;
      init_valid <= '0; init <= '0; no_channel <= 1'b0; n_detect <= '0; n_search <= '0;
    end else begin
      acq_start  <= 1'b0;
      div_start  <= 1'b0;
      init_valid <= '0;
      no_channel <= 1'b0;
      case (state)
        PICK: if (enable && free_any) begin
          cur <= (cur == PRN_W'(32)) ? PRN_W'(1) : cur + 1'b1;
          if (prn_mask[cur] && !held(cur, chan_busy, chan_prn)) begin
            acq_start <= 1'b1;
            acq_prn   <= cur;
            n_search  <= n_search + 1'b1;
            state     <= ACQ;
          end
        end
        ACQ: if (acq_valid) begin
          if (acq_result.detect) begin
            res       <= acq_result;
            code_word <= code_rate_word(CODE_NOM, acq_result.carr_word);
            div_start <= 1'b1;
            n_detect  <= n_detect + 1'b1;
            state     <= DIV;
          end else begin
            state <= PICK;
          end
        end
        DIV: if (div_done) begin
          period  <= TW'(div_q);
          t_start <= TW'(res.n_acqui + NS_W'(res.delay)) << 32;
          t_thr   <= TW'(n_s + NS_W'(TCOMP_SAMPLES)) << 32;
          state   <= STEP;
        end
        STEP: begin
          if (t_start + big_step <= t_thr)  t_start <= t_start + big_step;
          else if (t_start <= t_thr)        t_start <= t_start + period;
          else                              state   <= ISSUE;
        end
        ISSUE: begin
          state <= PICK;
          if (free_any) begin
            init_valid[free_idx] <= 1'b1;
            init.prn       <= res.prn;
            init.carr_word <= res.carr_word;
            init.n_init    <= NS_W'((t_start + (TW'(1) << 31)) >> 32);
          end else begin
            no_channel <= 1'b1;
          end
        end
        default: state <= PICK;
      endcase
    end
  end

endmodule

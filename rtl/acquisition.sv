// acquisition: single signal-search engine shared by all tracking channels.
//
// On `start` it records the next STORE_LEN samples of the sample bus (8.192 ms at the
// default 4 MHz) and keeps the index of the first one, N_acqui. It then searches the
// record for the requested PRN over NUM_BINS Doppler bins of BIN_HZ and over every
// sample delay d of one code period (SPC samples): for each cell it correlates the
// record, starting at sample d, with a carrier-wiped local replica over NCOH whole code
// periods, squares the coherent sum of each period (after a right shift of
// METRIC_SHIFT bits) and adds the squares. The best cell gives the code delay (a code
// period of the satellite starts at sample N_acqui + d), the Doppler estimate and the
// peak metric; the sum of all cell metrics is the noise-floor estimate. A detection is
// declared when peak * (number of cells) >= DET_RATIO * sum, that is when the peak is
// DET_RATIO times the mean cell.
// Timing: recording takes STORE_LEN samples; the search takes
// NUM_BINS * SPC * NCOH * SPC clocks plus a few (one sample per clock);
// result_valid pulses at the end. DET_RATIO must stay above the largest-to-mean ratio of
// pure noise cells, about ln(cells) for NCOH = 1 and less for larger NCOH.
// This is a serial time-domain search. It computes the same correlation as an FFT-based
// search, one cell at a time, and is far slower. The replica ignores code Doppler over
// the record. Bin layout, metric and detection rule are this design's choices.
module acquisition
  import gnss_pkg::*;
#(
  parameter int unsigned     SAMPLE_W     = 8,
  parameter longint unsigned FS_HZ        = 4_000_000,
  parameter int unsigned     SPC          = 4000,     // samples per 1 ms code period
  parameter int unsigned     STORE_LEN    = 32768,    // 8.192 ms at 4 MHz
  parameter int unsigned     NCOH         = 7,        // code periods per cell, NCOH+1 <= STORE_LEN/SPC
  parameter int unsigned     NUM_BINS     = 21,
  parameter int unsigned     BIN_HZ       = 500,
  parameter int unsigned     METRIC_SHIFT = 6,
  parameter int unsigned     DET_RATIO    = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  input  logic signed [SAMPLE_W-1:0] s_i,
  input  logic signed [SAMPLE_W-1:0] s_q,
  input  logic [NS_W-1:0]            s_index,
  input  logic                       start,
  input  logic [PRN_W-1:0]           prn,
  output logic                       busy,
  output logic                       result_valid,
  output acq_result_t                result
);

  localparam logic [31:0] CODE_NOM = code_nominal_word(FS_HZ);
  localparam int unsigned AW       = $clog2(STORE_LEN);
  localparam int unsigned PW       = SAMPLE_W + 6;
  localparam longint      BIN_WORD = longint'((longint'(BIN_HZ) << 32) / FS_HZ);
  localparam longint      CELLS    = longint'(NUM_BINS) * longint'(SPC);

  typedef enum logic [1:0] {IDLE, REC, SEARCH, DONE} state_e;
  state_e state;

  logic [2*SAMPLE_W-1:0] mem [STORE_LEN];
  logic [2*SAMPLE_W-1:0] rd_q;
  logic [AW:0]           wr_addr;
  logic [PRN_W-1:0]      prn_q;
  logic                  tab_start, tab_ready;
  logic [CA_CHIPS-1:0]   code_tab;

  ca_code_table u_table (
    .clk, .rst_n, .start(tab_start), .prn(prn_q), .ready(tab_ready), .table_q(code_tab)
  );

  // search counters (stage 0)
  logic [$clog2(NUM_BINS+1)-1:0] bin;
  logic [15:0]        delay;
  logic [15:0]        n_in;       // sample within the code period
  logic [7:0]         code_cnt;   // code period within the cell
  logic               s0_run;
  logic signed [31:0] bin_word;
  logic [31:0]        carr_ph;
  logic [9:0]         code_int;
  logic [31:0]        code_frac;
  // stage 1
  logic               s1_run, s1_chip, s1_eop, s1_eoc;
  logic [3:0]         s1_ph;
  logic signed [31:0] acc_i, acc_q;
  logic [47:0]        cell_metric;
  // results
  logic [47:0]        best;
  logic [15:0]        best_delay;
  logic signed [31:0] best_word;
  logic [63:0]        total;

  // stage-1 arithmetic
  logic signed [SAMPLE_W-1:0] xi, xq;
  logic signed [4:0]  cv, sv;
  logic signed [PW-1:0] wi, wq;
  logic signed [31:0] acc_i_n, acc_q_n, ci, cq;
  logic [47:0]        sq, metric_n;
  logic [32:0]        code_frac_sum;
  logic [10:0]        code_int_sum;

  always_comb begin
    xi = rd_q[2*SAMPLE_W-1:SAMPLE_W];
    xq = rd_q[SAMPLE_W-1:0];
    cv = cos16(s1_ph);
    sv = sin16(s1_ph);
    wi = PW'(xi * cv) + PW'(xq * sv);
    wq = PW'(xq * cv) - PW'(xi * sv);
    acc_i_n  = s1_chip ? acc_i - 32'(wi) : acc_i + 32'(wi);
    acc_q_n  = s1_chip ? acc_q - 32'(wq) : acc_q + 32'(wq);
    ci       = acc_i_n >>> METRIC_SHIFT;
    cq       = acc_q_n >>> METRIC_SHIFT;
    sq       = 48'(64'(ci * ci) + 64'(cq * cq));
    metric_n = cell_metric + sq;
    code_frac_sum = {1'b0, code_frac} + {1'b0, CODE_NOM};
    code_int_sum  = {1'b0, code_int} + 11'(code_frac_sum[32]);
  end

  always_ff @(posedge clk) begin
    if (state == REC && s_valid && wr_addr < (AW+1)'(STORE_LEN))
      mem[wr_addr[AW-1:0]] <= {s_i, s_q};
    rd_q <= mem[AW'(32'(delay) + 32'(code_cnt) * SPC + 32'(n_in))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; wr_addr <= '0; prn_q <= '0; tab_start <= 1'b0;
      bin <= '0; delay <= '0; n_in <= '0; code_cnt <= '0; s0_run <= 1'b0; bin_word <= '0;
      carr_ph <= '0; code_int <= '0; code_frac <= '0;
      s1_run <= 1'b0; s1_chip <= 1'b0; s1_eop <= 1'b0; s1_eoc <= 1'b0; s1_ph <= '0;
      acc_i <= '0; acc_q <= '0; cell_metric <= '0;
      best <= '0; best_delay <= '0; best_word <= '0; total <= '0;
      result_valid <= 1'b0; result <= '0;
    end else begin
      tab_start    <= 1'b0;
      result_valid <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state     <= REC;
          prn_q     <= prn;
          tab_start <= 1'b1;
          wr_addr   <= '0;
        end
        REC: begin
          if (s_valid && wr_addr < (AW+1)'(STORE_LEN)) begin
            if (wr_addr == '0) result.n_acqui <= s_index;
            wr_addr <= wr_addr + 1'b1;
          end
          if (wr_addr == (AW+1)'(STORE_LEN) && tab_ready && !tab_start) begin
            state    <= SEARCH;
            bin      <= '0;
            delay    <= '0;
            n_in     <= '0;
            code_cnt <= '0;
            s0_run   <= 1'b1;
            bin_word <= -32'((NUM_BINS - 1) / 2) * 32'(BIN_WORD);
            carr_ph  <= '0;
            code_int <= '0;
            code_frac <= '0;
            best     <= '0;
            total    <= '0;
            acc_i    <= '0;
            acc_q    <= '0;
            cell_metric <= '0;
          end
        end
        SEARCH: begin
          // stage 0: address (in the memory block above), replica for sample n
          s1_run  <= s0_run;
          s1_chip <= code_tab[code_int];
          s1_ph   <= carr_ph[31:28] + 4'(carr_ph[27]);
          s1_eop  <= 32'(n_in) == SPC - 1;
          s1_eoc  <= 32'(n_in) == SPC - 1 && 32'(code_cnt) == NCOH - 1;
          if (s0_run) begin
            carr_ph   <= carr_ph + bin_word;
            code_frac <= code_frac_sum[31:0];
            code_int  <= (code_int_sum >= 11'(CA_CHIPS)) ? 10'(code_int_sum - 11'(CA_CHIPS))
                                                         : code_int_sum[9:0];
            if (32'(n_in) == SPC - 1) begin
              n_in <= '0;
              if (32'(code_cnt) == NCOH - 1) begin
                // next cell
                code_cnt  <= '0;
                carr_ph   <= '0;
                code_int  <= '0;
                code_frac <= '0;
                if (32'(delay) == SPC - 1) begin
                  delay <= '0;
                  if (32'(bin) == NUM_BINS - 1) s0_run <= 1'b0;
                  bin      <= bin + 1'b1;
                  bin_word <= bin_word + 32'(BIN_WORD);
                end else begin
                  delay <= delay + 1'b1;
                end
              end else begin
                code_cnt <= code_cnt + 1'b1;
              end
            end else begin
              n_in <= n_in + 1'b1;
            end
          end
          // stage 1: accumulate
          if (s1_run) begin
            if (s1_eop) begin
              acc_i <= '0;
              acc_q <= '0;
              if (s1_eoc) begin
                cell_metric <= '0;
                total       <= total + 64'(metric_n);
                if (metric_n > best) begin
                  best       <= metric_n;
                  // the cell just finished is the one before stage 0's counters
                  best_delay <= (delay == '0) ? 16'(SPC - 1) : delay - 1'b1;
                  best_word  <= (delay == '0) ? bin_word - 32'(BIN_WORD) : bin_word;
                end
              end else begin
                cell_metric <= metric_n;
              end
            end else begin
              acc_i <= acc_i_n;
              acc_q <= acc_q_n;
            end
          end else if (!s0_run) begin
            state <= DONE;
          end
        end
        DONE: begin
          state               <= IDLE;
          result_valid        <= 1'b1;
          result.prn          <= prn_q;
          result.delay        <= best_delay;
          result.carr_word    <= best_word;
          result.peak         <= best;
          result.total        <= total;
          result.detect       <= 80'(best) * 80'(CELLS) >= 80'(total) * 80'(DET_RATIO);
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule

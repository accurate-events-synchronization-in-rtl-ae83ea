// loop_estimator: third stage of a tracking channel, run at each End of Integration.
//
// From the early, prompt and late integrator outputs it computes
//   * the phase discriminator, a Costas error Qp*sign(Ip)/|Ip| (the tangent of the
//     residual carrier phase, which stays insensitive to the data bit), clamped to +/-pi/2,
//     in radians * 2^12;
//   * the delay discriminator (|E|-|L|) / (2(|E|+|L|)) in chips * 2^12, with the
//     magnitudes approximated by max + min/2;
// and filters them:
//   * phase loop, second order: integ += KI*e; carrier word = integ + KP*e;
//   * delay loop, first order, carrier aided: code word = nominal + carrier word / 1540
//     + KD*e.
// The new words are written into the NCO_Correlator command registers (cmd_valid); the
// integral term is the Doppler estimate. The two divisions share one serial divider, so
// the update follows the End of Integration by about 2*48+6 clocks; no event is raised.
// Gains are given as physical constants (mHz per rad, mHz per rad per update, milli-chip/s
// per chip) and converted to the word scales at elaboration for the sample rate FS_HZ.
// Discriminator and filter types, gains and all widths are this design's choices; the
// source places the loop filters in software, here they are logic so that the channel
// closes its loops on its own.
module loop_estimator
  import gnss_pkg::*;
#(
  parameter longint unsigned FS_HZ       = 4_000_000,
  parameter longint unsigned PLL_KP_MHZ  = 6366,   // 2*zeta*wn/(2*pi), Bn = 15 Hz
  parameter longint unsigned PLL_KI_MHZ  = 127,    // wn^2*T/(2*pi), T = 1 ms
  parameter longint unsigned DLL_K_MCPS  = 8000    // 4*Bn, Bn = 2 Hz
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init_valid,
  input  logic signed [31:0] init_carr_word,
  input  logic               eoi,
  input  corr_t              eoi_corr,
  output logic               cmd_valid,
  output logic signed [31:0] cmd_carr_word,
  output logic [31:0]        cmd_code_word,
  output logic signed [31:0] doppler_word,
  output logic signed [15:0] pll_disc,     // rad * 2^12
  output logic signed [15:0] dll_disc      // chip * 2^12
);

  localparam logic [31:0] CODE_NOM = code_nominal_word(FS_HZ);
  localparam longint KP_Q16 = longint'((PLL_KP_MHZ << 36) / (FS_HZ * 1000));
  localparam longint KI_Q16 = longint'((PLL_KI_MHZ << 36) / (FS_HZ * 1000));
  localparam longint KD_Q16 = longint'((DLL_K_MCPS << 36) / (FS_HZ * 1000));
  localparam logic signed [15:0] HALF_PI = 16'sd6434;

  typedef enum logic [2:0] {IDLE, PLL_DIV, DLL_START, DLL_DIV, UPDATE} state_e;
  state_e state;

  corr_t c;
  logic  pll_neg, dll_neg;
  logic  div_start, div_busy, div_done;
  logic [47:0] div_num, div_q;
  logic [33:0] div_den;

  serial_divider #(.NW(48), .DW(34)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_num), .divisor(div_den),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  function automatic logic [32:0] absv(input logic signed [CORR_W-1:0] v);
    return v[CORR_W-1] ? 33'(-$signed({v[CORR_W-1], v})) : 33'(v);
  endfunction

  function automatic logic [33:0] mag(input logic signed [CORR_W-1:0] i, input logic signed [CORR_W-1:0] q);
    logic [32:0] a, b;
    a = absv(i);
    b = absv(q);
    return (a > b) ? 34'(a) + 34'(b >> 1) : 34'(b) + 34'(a >> 1);
  endfunction

  logic [33:0] mag_e, mag_l;
  always_comb begin
    mag_e  = mag(c.ie, c.qe);
    mag_l  = mag(c.il, c.ql);
  end

  logic signed [15:0] q_sat;
  always_comb q_sat = (div_q > 48'(HALF_PI)) ? HALF_PI : 16'(div_q);

  logic signed [31:0] carr_int_next, carr_word_next;
  logic signed [63:0] p_prop, p_int, p_dll;
  always_comb begin
    p_int          = 64'(pll_disc) * KI_Q16;
    p_prop         = 64'(pll_disc) * KP_Q16;
    p_dll          = 64'(dll_disc) * KD_Q16;
    carr_int_next  = doppler_word + 32'(p_int >>> 16);
    carr_word_next = carr_int_next + 32'(p_prop >>> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= IDLE;
      c             <= '0;
      pll_neg       <= 1'b0;
      dll_neg       <= 1'b0;
      div_start     <= 1'b0;
      div_num       <= '0;
      div_den       <= '0;
      cmd_valid     <= 1'b0;
      cmd_carr_word <= '0;
      cmd_code_word <= CODE_NOM;
      doppler_word  <= '0;
      pll_disc      <= '0;
      dll_disc      <= '0;
    end else begin
      div_start <= 1'b0;
      cmd_valid <= 1'b0;
      case (state)
        IDLE: if (eoi) begin
          c         <= eoi_corr;
          state     <= PLL_DIV;
          div_start <= 1'b1;
          // |Qp| * 2^12 / |Ip|, sign = sign(Qp) xor sign(Ip)
          div_num   <= 48'(absv(eoi_corr.qp)) << 12;
          div_den   <= (eoi_corr.ip == '0) ? 34'd1 : 34'(absv(eoi_corr.ip));
          pll_neg   <= eoi_corr.qp[CORR_W-1] ^ eoi_corr.ip[CORR_W-1];
        end
        PLL_DIV: if (div_done) begin
          pll_disc <= pll_neg ? -q_sat : q_sat;
          state    <= DLL_START;
        end
        DLL_START: begin
          div_start <= 1'b1;
          div_num   <= 48'(34'(mag_e > mag_l ? mag_e - mag_l : mag_l - mag_e)) << 11;
          div_den   <= (mag_e + mag_l == '0) ? 34'd1 : mag_e + mag_l;
          dll_neg   <= mag_l > mag_e;
          state     <= DLL_DIV;
        end
        DLL_DIV: if (div_done) begin
          dll_disc <= dll_neg ? -16'(div_q) : 16'(div_q);
          state    <= UPDATE;
        end
        UPDATE: begin
          doppler_word  <= carr_int_next;
          cmd_carr_word <= carr_word_next;
          cmd_code_word <= code_rate_word(CODE_NOM, carr_word_next) + 32'(p_dll >>> 16);
          cmd_valid     <= 1'b1;
          state         <= IDLE;
        end
        default: state <= IDLE;
      endcase
      if (init_valid) begin
        state        <= IDLE;
        doppler_word <= init_carr_word;
        pll_disc     <= '0;
        dll_disc     <= '0;
      end
    end
  end

endmodule

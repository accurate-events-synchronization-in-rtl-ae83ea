// gnss_pkg: types and constants shared by the GPS L1 C/A receiver blocks.
//
// Fixed-point conventions used throughout the design:
//   * carrier frequency word: signed 32 bits, one LSB = Fs / 2^32 Hz. It is added
//     to a 32-bit carrier phase accumulator (one LSB = 2^-32 cycle) at every sample.
//     The receiver input is complex baseband, so this word is the Doppler alone.
//   * code rate word: unsigned 32 bits, chips per sample times 2^32. It is added to
//     the 32-bit fractional part of the code phase at every sample.
//   * sample counter N_s: NS_W bits, index of a sample since reset.
// The code rate follows the carrier (carrier aiding): GPS L1 is 1540 times the C/A
// chipping rate, so the code Doppler word is the carrier word divided by 1540.
package gnss_pkg;

  localparam int unsigned CA_CHIPS      = 1023;  // chips in one GPS C/A code period
  localparam int unsigned CODES_PER_BIT = 20;    // C/A codes per 50 bit/s navigation bit
  localparam int unsigned NS_W          = 48;    // sample counter width
  localparam int unsigned CORR_W        = 32;    // correlator / integrator accumulator width
  localparam int unsigned NB_W          = 9;     // bit counter width (up to 511 bits per frame)
  localparam int unsigned NF_W          = 20;    // frame counter width
  localparam int unsigned PRN_W         = 6;     // PRN number 1..32

  // Nominal code rate word: 1.023 MHz / Fs * 2^32.
  function automatic logic [31:0] code_nominal_word(input longint unsigned fs_hz);
    return 32'((64'd1023000 << 32) / fs_hz);
  endfunction

  // Carrier-aided code rate word: nominal + carrier_word / 1540.
  function automatic logic [31:0] code_rate_word(input logic [31:0] nominal,
                                                 input logic signed [31:0] carr_word);
    logic signed [63:0] prod;
    prod = 64'(carr_word) * 64'sd2788939;   // 2788939 = floor(2^32 / 1540)
    return nominal + 32'(prod >>> 32);
  endfunction

  // One entry of a 16-point cos/sin table, amplitude 15: round(15*cos(2*pi*k/16)).
  function automatic logic signed [4:0] cos16(input logic [3:0] k);
    case (k)
      4'd0:  return 5'sd15;   4'd1:  return 5'sd14;   4'd2:  return 5'sd11;   4'd3:  return 5'sd6;
      4'd4:  return 5'sd0;    4'd5:  return -5'sd6;   4'd6:  return -5'sd11;  4'd7:  return -5'sd14;
      4'd8:  return -5'sd15;  4'd9:  return -5'sd14;  4'd10: return -5'sd11;  4'd11: return -5'sd6;
      4'd12: return 5'sd0;    4'd13: return 5'sd6;    4'd14: return 5'sd11;   default: return 5'sd14;
    endcase
  endfunction

  // sin(2*pi*k/16) = cos(2*pi*(k-4)/16)
  function automatic logic signed [4:0] sin16(input logic [3:0] k);
    return cos16(k - 4'd4);
  endfunction

  // Channel initialisation command (Manager -> tracking channel).
  typedef struct packed {
    logic [PRN_W-1:0]  prn;
    logic signed [31:0] carr_word;   // Doppler estimate
    logic [NS_W-1:0]   n_init;       // sample index at which a PRN code period begins
  } chan_init_t;

  // Correlator outputs for one code period, or integrator outputs.
  typedef struct packed {
    logic signed [CORR_W-1:0] ie, qe, ip, qp, il, ql;
  } corr_t;

  // Acquisition result (Acquisition -> Manager).
  typedef struct packed {
    logic               detect;
    logic [PRN_W-1:0]   prn;
    logic [15:0]        delay;       // sample offset of a code start in the record
    logic signed [31:0] carr_word;   // Doppler of the best bin
    logic [47:0]        peak;        // best cell metric
    logic [63:0]        total;       // sum of all cell metrics (noise floor estimate)
    logic [NS_W-1:0]    n_acqui;     // sample index of the first recorded sample
  } acq_result_t;

  // Raw measurement record (tracking channel -> Measurer Navigator).
  typedef struct packed {
    logic [PRN_W-1:0]   prn;
    logic [NS_W-1:0]    ns_tag;      // sample index the phases below refer to
    logic [9:0]         code_int;    // integer chips of the code phase
    logic [31:0]        code_frac;   // fractional chips, 2^-32 chip
    logic signed [31:0] carr_cycles; // accumulated whole carrier cycles
    logic [31:0]        carr_frac;   // carrier phase, 2^-32 cycle
    logic signed [31:0] carr_word;   // Doppler
    logic [4:0]         n_c;         // completed codes in the current bit
    logic [NB_W-1:0]    n_b;         // completed bits in the current frame
    logic [NF_W-1:0]    n_f;         // frame counter
    logic               bit_sync;
    logic               frame_sync;
    logic               tow_valid;
  } meas_t;

endpackage

// data_decoder: fourth stage of a tracking channel, run at each End of Bit.
//
// It keeps the bit counter N_b (bits completed in the current frame) and the frame
// counter N_f, finds the frame start with a preamble detector and sets N_f from the time
// of week carried in the message.
//   * Preamble detector: the last 8 bits are compared with 10001011 and with its
//     inverse (the Costas loop leaves the bit polarity open). A match is remembered for
//     its position in the frame (a one-frame ring of match flags); a match of the same
//     polarity exactly one frame later fixes the frame start and the polarity
//     (frame_sync). N_b is then 8, the preamble length. A missing preamble at a later
//     frame start drops frame_sync.
//   * Time of week: bits 31..47 of the frame (the 17-bit TOW count of the hand-over word,
//     inverted when bit 30, the last parity bit of the first word, is 1) give the count
//     of the next frame start in frame periods. At that frame start N_f takes it and
//     tow_valid is set; otherwise N_f counts frames.
// Every bit is answered with bit_done on the next clock; polarity-corrected bits are
// output (dbit_valid) for the software that decodes ephemerides.
// A frame here is a GPS subframe (300 bits, 6 s), the period that holds the preamble and
// the time of week. Parity words are not checked: this is this design's simplification.
module data_decoder
  import gnss_pkg::*;
#(
  parameter int unsigned BITS_PER_FRAME = 300
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            eob,
  input  logic            eob_bit,
  output logic            bit_done,
  output logic [NB_W-1:0] n_b,
  output logic [NF_W-1:0] n_f,
  output logic            frame_sync,
  output logic            tow_valid,
  output logic            dbit_valid,
  output logic            dbit
);

  localparam logic [7:0] PREAMBLE = 8'b1000_1011;

  logic [46:0]      sr;           // sr[0] is the newest bit
  logic             polarity;     // 1: received bits are inverted
  logic [BITS_PER_FRAME-1:0] seen, seen_pol;
  logic [NB_W-1:0]  pos;          // n_b before synchronisation
  logic [16:0]      tow;
  logic             tow_pending;

  logic [46:0] sr_next;
  logic        m_pos, m_neg;
  logic [NB_W-1:0] nb_inc;
  logic [NB_W-1:0] pos_next;
  logic [16:0] tow_field;

  always_comb begin
    sr_next  = {sr[45:0], eob_bit};
    m_pos    = sr_next[7:0] == PREAMBLE;
    m_neg    = sr_next[7:0] == ~PREAMBLE;
    nb_inc   = n_b + 1'b1;
    pos_next = (32'(pos) == BITS_PER_FRAME - 1) ? '0 : pos + 1'b1;
    // frame bits 30..46 are sr_next[16:0]; bit 29 (D30 of word 1) is sr_next[17]
    tow_field = sr_next[16:0] ^ {17{sr_next[17] ^ polarity}} ^ {17{polarity}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      polarity    <= 1'b0;
      seen        <= '0;
      seen_pol    <= '0;
      pos         <= '0;
      tow         <= '0;
      tow_pending <= 1'b0;
      n_b         <= '0;
      n_f         <= '0;
      frame_sync  <= 1'b0;
      tow_valid   <= 1'b0;
      bit_done    <= 1'b0;
      dbit_valid  <= 1'b0;
      dbit        <= 1'b0;
    end else begin
      bit_done   <= 1'b0;
      dbit_valid <= 1'b0;
      if (restart) begin
        sr          <= '0;
        seen        <= '0;
        pos         <= '0;
        n_b         <= '0;
        n_f         <= '0;
        frame_sync  <= 1'b0;
        tow_valid   <= 1'b0;
        tow_pending <= 1'b0;
      end else if (eob) begin
        bit_done   <= 1'b1;
        sr         <= sr_next;
        dbit_valid <= 1'b1;
        dbit       <= eob_bit ^ polarity;
        pos        <= pos_next;
        if (!frame_sync) begin
          n_b <= pos_next;
          seen[pos]     <= m_pos | m_neg;
          seen_pol[pos] <= m_neg;
          if ((m_pos | m_neg) && seen[pos] && seen_pol[pos] == m_neg) begin
            frame_sync <= 1'b1;
            polarity   <= m_neg;
            n_b        <= NB_W'(8);
            n_f        <= n_f + 1'b1;
          end
        end else begin
          if (32'(nb_inc) == BITS_PER_FRAME) begin
            n_b         <= '0;
            n_f         <= tow_pending ? NF_W'(tow) : n_f + 1'b1;
            tow_valid   <= tow_valid | tow_pending;
            tow_pending <= 1'b0;
          end else begin
            n_b <= nb_inc;
          end
          if (32'(nb_inc) == 8 && !(polarity ? m_neg : m_pos)) begin
            frame_sync <= 1'b0;
            tow_valid  <= 1'b0;
            seen       <= '0;
          end
          if (32'(nb_inc) == 47) begin
            tow         <= tow_field;
            tow_pending <= 1'b1;
          end
        end
      end
    end
  end

endmodule

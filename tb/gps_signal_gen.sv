// gps_signal_gen: behavioural complex-baseband GPS L1 C/A signal source for the
// testbenches (not synthesizable).
//
// Up to NSAT satellites, each with its own PRN, sample index of a code start (n0, real,
// so fractional code offsets are possible), Doppler in Hz, amplitude and navigation bits
// (bit k starts at code period 20*k after n0). The code rate follows the Doppler
// (1.023 MHz * (1 + fd / 1575.42 MHz)). Gaussian-like noise of standard deviation
// `sigma` is added and the sum is rounded and saturated to W bits.
// The PRN codes are built here from the G1/G2 sequences and the published G2 delays,
// independently of the design's code generator.
module gps_signal_gen #(
  parameter int  NSAT  = 4,
  parameter int  W     = 8,
  parameter real FS    = 4.0e6,
  parameter int  NBITS = 1200
);
  bit  code [32][1023];
  int  prn_q [NSAT];
  real n0 [NSAT], fd [NSAT], amp [NSAT];
  bit  nav [NSAT][NBITS];
  real sigma = 0.0;
  int  delays [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                       469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860, 861, 862};

  initial begin
    bit [10:1] r1, r2;
    bit g1s [1023], g2s [1023];
    r1 = '1; r2 = '1;
    for (int i = 0; i < 1023; i++) begin
      g1s[i] = r1[10];
      g2s[i] = r2[10];
      r1 = {r1[9:1], r1[3] ^ r1[10]};
      r2 = {r2[9:1], r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10]};
    end
    for (int p = 0; p < 32; p++)
      for (int i = 0; i < 1023; i++)
        code[p][i] = g1s[i] ^ g2s[(i - delays[p] + 1023) % 1023];
    for (int s = 0; s < NSAT; s++) amp[s] = 0.0;
  end

  task automatic set_sat(input int s, input int prn, input real start, input real dopp, input real a);
    prn_q[s] = prn;
    n0[s]    = start;
    fd[s]    = dopp;
    amp[s]   = a;
  endtask

  task automatic set_bit(input int s, input int k, input bit b);
    nav[s][k] = b;
  endtask

  function automatic real gauss();
    real g;
    g = 0.0;
    for (int k = 0; k < 4; k++) g += (real'($urandom % 65536) / 65536.0 - 0.5);
    return g * 1.7320508;
  endfunction

  function automatic int sat_w(input real v);
    int r;
    r = int'(v);  // rounds to nearest
    if (r > (1 << (W - 1)) - 1) r = (1 << (W - 1)) - 1;
    if (r < -(1 << (W - 1))) r = -(1 << (W - 1));
    return r;
  endfunction

  // sample n of the composite signal
  task automatic sample(input longint n, output logic signed [W-1:0] si, output logic signed [W-1:0] sq);
    real vi, vq, t, cp, ph, sgn;
    longint chip, period;
    vi = sigma * gauss();
    vq = sigma * gauss();
    for (int s = 0; s < NSAT; s++) begin
      if (amp[s] != 0.0) begin
        t  = (real'(n) - n0[s]) / FS;
        cp = t * 1.023e6 * (1.0 + fd[s] / 1575.42e6);
        chip   = longint'($floor(cp));
        period = longint'($floor(cp / 1023.0));
        sgn = code[prn_q[s] - 1][int'(((chip % 1023) + 1023) % 1023)] ? -1.0 : 1.0;
        if (period >= 0 && nav[s][int'((period / 20) % NBITS)]) sgn = -sgn;
        ph = 2.0 * 3.14159265358979 * fd[s] * t;
        vi += amp[s] * sgn * $cos(ph);
        vq += amp[s] * sgn * $sin(ph);
      end
    end
    si = W'(sat_w(vi));
    sq = W'(sat_w(vq));
  endtask
endmodule

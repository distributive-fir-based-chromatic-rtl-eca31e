// cde_pkg: shared types, constants and elaboration-time tables of the
// distributive FIR chromatic dispersion equalizer (D-FIR-CDE / MD-FIR-CDE).
//
// The equalizer compensates a fixed amount of chromatic dispersion, so every
// coefficient-dependent quantity is a constant worked out before the hardware
// runs. This package does that work with constant functions:
//   * coef_levels  - the CD-compensating FIR taps from the closed-form
//                    time-domain solution, c(k) ~ sqrt(jA) exp(-j pi A t^2),
//                    t = k - M, A = T^2 / (2 pi |beta2| L), quantized to the
//                    2*DELTA+1 levels m = -DELTA..DELTA of
//                    c^Q = round(DELTA * c / cmax) / DELTA, where cmax is the
//                    largest real or imaginary part over all taps. The table
//                    holds the integer level m of taps k = 0..M (the other
//                    half of the filter is the mirror image).
//   * group_*      - multiplicity n_m of each level and the order in which
//                    the Control Units route taps: groups +1, -1, +2, -2, ...,
//                    +DELTA, -DELTA, then the null (level 0) taps, which no
//                    summation block reads.
//   * csd_digit    - canonical signed digit (non-adjacent form) of a level,
//                    used by the shift-and-add multipliers.
// The link constants are those of the reference 100G PM-QPSK experiment
// (beta2 = -20.4 ps^2/km, 4000 km, 50 GSa/s). Sample and accumulator widths
// are this design's choice: 8-bit I/Q in, 24-bit I/Q everywhere after the
// symmetric pre-adder, wide enough that no node ever rounds or overflows at
// N = 901 with DELTA up to 8.
package cde_pkg;

  localparam int W_IN     = 8;     // input sample width per I/Q part
  localparam int W_ACC    = 24;    // internal and output width per I/Q part
  localparam int MAX_HALF = 1024;  // capacity of the half-filter tables (M+1)

  localparam real PI               = 3.14159265358979323846;
  localparam real BETA2_PS2_PER_KM = -20.4;  // group velocity dispersion
  localparam real LINK_KM          = 4000.0; // accumulated fibre length
  localparam real TS_PS            = 20.0;   // sample period, 50 GSa/s

  typedef struct packed {
    logic signed [W_IN-1:0] re;
    logic signed [W_IN-1:0] im;
  } cin_t;

  typedef struct packed {
    logic signed [W_ACC-1:0] re;
    logic signed [W_ACC-1:0] im;
  } cacc_t;

  typedef logic signed [7:0] lvl_t;       // one quantization level
  typedef logic        [15:0] idx_t;       // one tap index
  // Tables are packed arrays: constant evaluation in some tools is much
  // faster on packed than on unpacked arrays.
  typedef lvl_t [MAX_HALF-1:0] lvl_tab_t;  // quantization level of each tap
  typedef idx_t [MAX_HALF-1:0] idx_tab_t;  // routing order: tap index per slot

  // ---------------------------------------------------------------- arithmetic
  function automatic cacc_t cext(cin_t a);
    cacc_t r;
    r.re = W_ACC'(a.re);
    r.im = W_ACC'(a.im);
    return r;
  endfunction

  function automatic cacc_t cadd(cacc_t a, cacc_t b);
    cacc_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cacc_t csub(cacc_t a, cacc_t b);
    cacc_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

  // ------------------------------------------------------------- coefficients
  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // Phase of tap k of an n_taps-long compensating filter (centre tap k = M).
  function automatic real tap_phase(int n_taps, int k);
    real a;
    real t;
    a = (TS_PS * TS_PS) / (2.0 * PI * rabs(BETA2_PS2_PER_KM) * LINK_KM);
    t = real'(k - (n_taps - 1) / 2);
    return PI / 4.0 - PI * a * t * t;
  endfunction

  // Quantized level (-delta..delta) of the real (imag = 0) or imaginary
  // (imag = 1) part of taps k = 0..M; entries above M are zero.
  function automatic lvl_tab_t coef_levels(int n_taps, int delta, bit imag);
    lvl_tab_t r;
    real      cmax;
    real      v;
    int       nh;
    nh   = (n_taps - 1) / 2 + 1;
    cmax = 0.0;
    for (int k = 0; k < nh; k++) begin
      if (rabs($cos(tap_phase(n_taps, k))) > cmax) cmax = rabs($cos(tap_phase(n_taps, k)));
      if (rabs($sin(tap_phase(n_taps, k))) > cmax) cmax = rabs($sin(tap_phase(n_taps, k)));
    end
    r = '0;
    for (int k = 0; k < MAX_HALF; k++) begin
      if (k < nh) begin
        v = imag ? $sin(tap_phase(n_taps, k)) : $cos(tap_phase(n_taps, k));
        r[k] = lvl_t'(int'(real'(delta) * v / cmax));  // nearest integer
      end
    end
    return r;
  endfunction

  // ------------------------------------------------------------------ routing
  // Level carried by routing group g: +1, -1, +2, -2, ...
  function automatic int group_level(int g);
    return (g % 2 == 0) ? (g / 2 + 1) : -(g / 2 + 1);
  endfunction

  // Multiplicity of level lev among taps 0..nh-1.
  function automatic int level_count(lvl_tab_t q, int nh, int lev);
    int c;
    c = 0;
    for (int k = 0; k < nh; k++) if (int'(q[k]) == lev) c++;
    return c;
  endfunction

  function automatic int group_count(lvl_tab_t q, int nh, int g);
    return level_count(q, nh, group_level(g));
  endfunction

  // First routed slot of group g.
  function automatic int group_offset(lvl_tab_t q, int nh, int g);
    int o;
    o = 0;
    for (int h = 0; h < g; h++) o += group_count(q, nh, h);
    return o;
  endfunction

  // Offsets of all groups in one pass: entry g is the first slot of group g,
  // entry 2*delta the end of the last group (delta <= 31).
  typedef logic [63:0][15:0] off_tab_t;

  function automatic off_tab_t group_offsets(lvl_tab_t q, int nh, int delta);
    off_tab_t o;
    int       c [64];
    int       lv;
    for (int g = 0; g < 64; g++) c[g] = 0;
    for (int k = 0; k < nh; k++) begin
      lv = int'(q[k]);
      if (lv > 0 && lv <= delta) c[2*(lv-1)]++;
      else if (lv < 0 && -lv <= delta) c[2*(-lv-1)+1]++;
    end
    o = '0;
    for (int g = 1; g <= 2 * delta; g++) o[g] = 16'(o[g-1] + 16'(c[g-1]));
    return o;
  endfunction

  // Tap index placed in each routed slot: groups in order, null taps last.
  function automatic idx_tab_t route_perm(lvl_tab_t q, int nh, int delta);
    idx_tab_t r;
    int       j;
    j = 0;
    for (int k = 0; k < MAX_HALF; k++) r[k] = '0;
    for (int g = 0; g < 2 * delta; g++)
      for (int k = 0; k < nh; k++)
        if (int'(q[k]) == group_level(g)) begin
          r[j] = idx_t'(k);
          j++;
        end
    for (int k = 0; k < nh; k++)
      if (int'(q[k]) == 0 || int'(q[k]) > delta || int'(q[k]) < -delta) begin
        r[j] = idx_t'(k);
        j++;
      end
    return r;
  endfunction

  // True when every level lies in -delta..delta.
  function automatic bit levels_ok(lvl_tab_t q, int nh, int delta);
    for (int k = 0; k < nh; k++) if (int'(q[k]) > delta || int'(q[k]) < -delta) return 1'b0;
    return 1'b1;
  endfunction

  // ---------------------------------------------------------------------- CSD
  // Digit (-1, 0 or +1) at bit position pos of the non-adjacent form of val >= 0.
  function automatic int csd_digit(int val, int pos);
    int x;
    int d;
    x = val;
    d = 0;
    for (int i = 0; i <= pos; i++) begin
      if (x % 2 != 0) begin
        d = (x % 4 == 1) ? 1 : -1;
        x = (x - d) / 2;
      end else begin
        d = 0;
        x = x / 2;
      end
    end
    return d;
  endfunction

  // Number of non-zero CSD digits of val (shifts per SAM; adders = this - 1).
  function automatic int csd_weight(int val);
    int w;
    w = 0;
    for (int i = 0; i < 31; i++) if (csd_digit(val, i) != 0) w++;
    return w;
  endfunction

endpackage

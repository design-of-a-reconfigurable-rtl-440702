// bis_pkg: types, constants and constant functions shared by the bioimpedance
// spectroscopy system.
//
// The system clock is 50 MHz. The excitation sinusoid has 510 segments per
// cycle and the frequency sweep covers 40 Hz to 100 kHz in 1001 steps, as in
// the design description. Phase is carried in whole degrees (9 bits), the
// balancing amplitude |Vf| in 8 bits, and each record carries a 7-bit flag
// field: a 6-bit BIS module identifier and a 'processed' bit.
//
// Raw record (24 bits):        {flags[6:0], phase[8:0], amp[7:0]}
//   bit 23..18 = BIS id, bit 17 = processed, bit 16..8 = phase, bit 7..0 = |Vf|
// Processed record (88 bits):  {raw[23:0], ZxR[31:0], ZxI[31:0]}
//
// The sine values used by the DAC drivers and by the processor's lookup table
// are produced at elaboration by sin_approx(), Bhaskara's rational
// approximation of a half sine wave (error below 0.2 % of full scale). The
// table contents are this design's choice; the description only says that a
// lookup table is used.
package bis_pkg;

  localparam int unsigned CLK_HZ      = 50_000_000;
  localparam int unsigned SEGMENTS    = 510;      // DAC samples per sine cycle
  localparam int unsigned F_MIN_HZ    = 40;
  localparam int unsigned F_MAX_HZ    = 100_000;
  localparam int unsigned FREQ_STEPS  = 1001;     // frequency points per sweep
  localparam int unsigned FIDX_W      = 10;       // frequency step index width
  localparam int unsigned FHZ_W       = 17;       // frequency in Hz width
  localparam int unsigned ID_W        = 6;        // BIS identifier width
  localparam int unsigned PHASE_W     = 9;        // degrees, 0..359
  localparam int unsigned AMP_W       = 8;
  localparam int unsigned DAC_W       = 8;
  localparam int unsigned ADC_W       = 8;
  localparam int unsigned Z_W         = 32;       // ZxR / ZxI width
  localparam int unsigned Z_FRAC      = 8;        // fractional bits of ZxR / ZxI
  localparam int unsigned TRIG_FRAC   = 14;       // sin/cos scale 2^14
  localparam int unsigned RAW_W       = 24;
  localparam int unsigned REC_W       = 88;
  localparam int unsigned REC_BYTES   = REC_W / 8;   // 11
  localparam int unsigned RAW_BYTES   = RAW_W / 8;   // 3
  localparam int unsigned MEM_AW      = 22;       // 4 MB flash, byte address

  typedef struct packed {
    logic [ID_W-1:0] bis_id;
    logic            processed;
  } flags_t;

  typedef struct packed {
    flags_t              flags;
    logic [PHASE_W-1:0]  phase;   // degrees
    logic [AMP_W-1:0]    amp;     // |Vf|
  } raw_t;

  typedef struct packed {
    raw_t                   raw;
    logic signed [Z_W-1:0]  zxr;
    logic signed [Z_W-1:0]  zxi;
  } rec_t;

  // Phase steps applied by DAC 2 in successive approximation order (degrees).
  localparam int unsigned N_PSTEPS = 8;
  function automatic logic [7:0] phase_step(input logic [2:0] idx);
    case (idx)
      3'd0: return 8'd90;
      3'd1: return 8'd45;
      3'd2: return 8'd23;
      3'd3: return 8'd11;
      3'd4: return 8'd6;
      3'd5: return 8'd3;
      3'd6: return 8'd2;
      default: return 8'd1;
    endcase
  endfunction

  // sin(2*pi*x/period) * scale, rounded toward zero, by Bhaskara's formula
  // sin(pi*u/h) ~= 16u(h-u) / (5h^2 - 4u(h-u)) for 0 <= u <= h = period/2.
  function automatic longint sin_approx(input longint x, input longint period,
                                        input longint scale);
    longint u, h, p, r;
    logic   neg;
    h = period / 2;
    u = x % period;
    if (u < 0) u = u + period;
    neg = (u >= h);
    if (neg) u = u - h;
    p = u * (h - u);
    r = (16 * scale * p) / (5 * h * h - 4 * p);
    return neg ? -r : r;
  endfunction

  // Frequency (Hz) of sweep step idx: 40 Hz + idx * (100 kHz - 40 Hz) / 1000.
  function automatic logic [FHZ_W-1:0] step_to_hz(input logic [FIDX_W-1:0] idx);
    return FHZ_W'(F_MIN_HZ + (32'(idx) * (F_MAX_HZ - F_MIN_HZ)) / (FREQ_STEPS - 1));
  endfunction

endpackage

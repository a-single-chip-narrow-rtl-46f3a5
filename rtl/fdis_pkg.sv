// fdis_pkg: shared types and constants of the frequency-domain interference
// suppressor (FDIS).
//
// The FDIS removes narrow-band interference from a complex baseband stream:
// overlapped, windowed 256-point blocks are transformed by a pipelined FFT,
// bins whose log-magnitude exceeds an adaptive "N-sigma" threshold are zeroed,
// and an inverse FFT returns the block to the time domain. Word sizes that the
// text of the design fixes (12-bit input, 20-bit internal, 256 points) are the
// defaults here; the coefficient and statistic widths are this design's choice.
package fdis_pkg;

  // Word sizes
  localparam int unsigned IN_W   = 12;  // input I and Q
  localparam int unsigned DATA_W = 20;  // internal precision (IN_W + log2 N)
  localparam int unsigned TW_W   = 16;  // twiddle coefficient, Q1.14 signed
  localparam int unsigned TW_F   = 14;  // twiddle fraction bits
  localparam int unsigned WIN_W  = 16;  // window coefficient, Q0.16 unsigned
  localparam int unsigned LF     = 6;   // fraction bits of the dB values
  localparam int unsigned DB_W   = 12;  // dB value, unsigned, LF fraction bits
  localparam int unsigned NV_W   = 8;   // N scale factor, unsigned Q4.4
  localparam int unsigned NV_F   = 4;
  localparam int unsigned NLEV   = 4;   // number of sigma levels
  localparam int unsigned NSEL   = 5;   // number of N values

  // Complex sample at internal precision
  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  // Control that travels with every block through the FFT stages
  typedef struct packed {
    logic valid;  // block carries data (idle blocks keep the pipeline moving)
    logic inv;    // 1: inverse transform (conjugate weights)
    logic scale;  // 1: divide by two in every stage (1/N overall)
  } blk_tag_t;

  // User-programmable excision settings
  typedef struct packed {
    logic                               excise_en;
    logic [NLEV-1:0][DB_W-1:0]          sigma_lvl;  // ascending levels, dB Q.LF
    logic [NSEL-1:0][NV_W-1:0]          n_val;      // N for 0..4 levels exceeded
  } excise_cfg_t;

  // Bit reversal of the low `bits` bits of v
  function automatic int unsigned bitrev(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

endpackage

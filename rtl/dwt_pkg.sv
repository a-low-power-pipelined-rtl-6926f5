// dwt_pkg: constants and types shared by the RNS 2-D DWT processor.
//
// The filter datapath works in the residue number system with the moduli
// set {255, 256, 257} (dynamic range 255*256*257 = 16,776,960, about 24 bits).
// A number is carried as three residues; residues of the modulo-257 channel
// need 9 bits, the other two 8 bits, so every residue is held in a 9-bit field.
//
// The filters are the Daubechies (CDF) 9/7 analysis filters. Their
// coefficients are quantised here to COEF_FRAC = 10 fractional bits, a choice
// of this design; the symmetric filters need 5 distinct low-pass and 4
// distinct high-pass coefficients, i.e. 9 look-up tables per channel and 27
// for the three channels.
package dwt_pkg;

  localparam int NCH      = 3;                      // residue channels
  localparam int MODS [NCH] = '{255, 256, 257};     // channel 0, 1, 2
  localparam int RNS_M    = 255 * 256 * 257;        // dynamic range
  localparam int RNS_HALF = RNS_M / 2;              // signed split point

  localparam int LP_TAPS  = 9;
  localparam int HP_TAPS  = 7;
  localparam int LP_UNIQ  = (LP_TAPS + 1) / 2;      // 5
  localparam int HP_UNIQ  = (HP_TAPS + 1) / 2;      // 4

  localparam int COEF_FRAC = 10;
  // h[0], h[+-1], ... : round(coefficient * 2**COEF_FRAC)
  localparam int LP_COEF [LP_UNIQ] = '{617, 273, -80, -17, 27};
  localparam int HP_COEF [HP_UNIQ] = '{1142, -605, -59, 93};

  localparam int DATA_W   = 16;   // width of stored image / coefficient words
  localparam int OUT_W    = 24;   // width of a reverse-converted filter result

  // external memory: commands of the simplified SDRAM command interface,
  // bursts of BURST_LEN words moved at two words per clock (DDR)
  typedef enum logic [1:0] {MEM_NOP, MEM_READ, MEM_WRITE, MEM_REFRESH} mem_cmd_e;
  localparam int BURST_LEN = 4;
  localparam int BEATS     = BURST_LEN / 2;   // clocks per burst

  typedef logic [8:0] res_t;               // one residue
  typedef res_t [NCH-1:0] rns_t;           // one number in RNS form

  // a + b modulo m, for a, b < m
  function automatic res_t mod_add(res_t a, res_t b, int m);
    logic [9:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= 10'(m)) s = s - 10'(m);
    return s[8:0];
  endfunction

  // constant helper: non-negative residue of an integer
  function automatic int cmod(int x, int m);
    int r;
    r = x % m;
    if (r < 0) r = r + m;
    return r;
  endfunction

endpackage

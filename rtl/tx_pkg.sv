// tx_pkg: types, constants and rate tables shared by the 802.11n MIMO transmitter.
//
// The modulation and coding scheme (MCS) tables, the 20/40 MHz subcarrier counts and the
// Gray constellation levels are those of IEEE 802.11n HT-mixed format with the long
// (800 ns) guard interval, which is the configuration this transmitter supports.
// The fixed-point format (13-bit two's complement, 1.0 = 2048) is this design's choice;
// the 13-bit sample width follows the IFFT interface.
package tx_pkg;

  // One complex frequency-domain sample, 13-bit signed real and imaginary parts.
  localparam int SW = 13;
  typedef struct packed {
    logic signed [SW-1:0] re;
    logic signed [SW-1:0] im;
  } cplx_t;

  // Unit amplitude (BPSK point, pilot) in the 13-bit format.
  localparam int ONE = 2048;

  // Packet configuration, captured by the Tx controller at start.
  typedef struct packed {
    logic [3:0]  mcs;     // 0-7: one spatial stream, 8-15: two spatial streams
    logic        bw40;    // 1: 40 MHz channel (128-point IFFT), 0: 20 MHz (64-point)
    logic        stbc;    // space-time block coding, honoured for MCS 0-7 only
    logic [15:0] length;  // PSDU length in bytes
    logic [6:0]  seed;    // scrambler initial state, seed[i] = register stage x(i+1)
  } tx_cfg_t;

  typedef enum logic [1:0] {R12, R23, R34, R56} rate_e;

  // Coded bits per subcarrier per stream: 1, 2, 4 or 6.
  function automatic logic [2:0] n_bpscs(input logic [3:0] mcs);
    case (mcs[2:0])
      3'd0:        return 3'd1;
      3'd1, 3'd2:  return 3'd2;
      3'd3, 3'd4:  return 3'd4;
      default:     return 3'd6;
    endcase
  endfunction

  function automatic rate_e code_rate(input logic [3:0] mcs);
    case (mcs[2:0])
      3'd0, 3'd1, 3'd3: return R12;
      3'd5:             return R23;
      3'd7:             return R56;
      default:          return R34;
    endcase
  endfunction

  // Two spatial streams for MCS 8-15.
  function automatic logic two_ss(input logic [3:0] mcs);
    return mcs[3];
  endfunction

  // Two transmit chains are active with two spatial streams or with STBC.
  function automatic logic two_tx(input tx_cfg_t c);
    return c.mcs[3] | c.stbc;
  endfunction

  // STBC is only defined here for a single spatial stream.
  function automatic logic stbc_on(input tx_cfg_t c);
    return c.stbc & ~c.mcs[3];
  endfunction

  // Data subcarriers per OFDM symbol.
  function automatic logic [6:0] n_sd(input logic bw40);
    return bw40 ? 7'd108 : 7'd52;
  endfunction

  // Occupied subcarriers (data + pilots) per symbol.
  function automatic logic [6:0] n_occ(input logic bw40);
    return bw40 ? 7'd114 : 7'd56;
  endfunction

  // Coded bits per symbol per spatial stream.
  function automatic logic [9:0] n_cbpss(input tx_cfg_t c);
    return 10'(n_sd(c.bw40)) * 10'(n_bpscs(c.mcs));
  endfunction

  // Coded bits per symbol over all spatial streams.
  function automatic logic [10:0] n_cbps(input tx_cfg_t c);
    return c.mcs[3] ? {n_cbpss(c), 1'b0} : {1'b0, n_cbpss(c)};
  endfunction

  // Data bits per symbol.
  function automatic logic [10:0] n_dbps(input tx_cfg_t c);
    logic [12:0] cb;
    cb = 13'(n_cbps(c));
    case (code_rate(c.mcs))
      R12:     return 11'(cb / 2);
      R23:     return 11'((cb * 2) / 3);
      R34:     return 11'((cb * 3) / 4);
      default: return 11'((cb * 5) / 6);
    endcase
  endfunction

  // Bit index at which the 6 tail bits start: 16 SERVICE bits plus the PSDU.
  function automatic logic [19:0] tail_pos(input tx_cfg_t c);
    return 20'd16 + {1'b0, c.length, 3'b000};
  endfunction

  // Subcarrier index k of the p-th occupied subcarrier in IFFT bin order
  // (positive frequencies first, then the negative ones).
  function automatic logic signed [7:0] k_of_pos(input logic bw40, input logic [6:0] pos);
    if (!bw40) return (pos < 7'd28) ? 8'(pos) + 8'sd1  : 8'(pos) - 8'sd56;
    else       return (pos < 7'd57) ? 8'(pos) + 8'sd2  : 8'(pos) - 8'sd115;
  endfunction

  // Pilot subcarriers: 20 MHz at +-7, +-21; 40 MHz at +-11, +-25, +-53.
  function automatic logic is_pilot(input logic bw40, input logic signed [7:0] k);
    if (!bw40) return (k == 7) || (k == -7) || (k == 21) || (k == -21);
    else       return (k == 11) || (k == -11) || (k == 25) || (k == -25) ||
                      (k == 53) || (k == -53);
  endfunction

  // Pilot number, counted from the lowest frequency pilot upwards.
  function automatic logic [2:0] pilot_idx(input logic bw40, input logic signed [7:0] k);
    if (!bw40) begin
      case (k)
        -8'sd21: return 3'd0;
        -8'sd7:  return 3'd1;
        8'sd7:   return 3'd2;
        default: return 3'd3;
      endcase
    end else begin
      case (k)
        -8'sd53: return 3'd0;
        -8'sd25: return 3'd1;
        -8'sd11: return 3'd2;
        8'sd11:  return 3'd3;
        8'sd25:  return 3'd4;
        default: return 3'd5;
      endcase
    end
  endfunction

  // Gray-coded amplitude of one axis: nb bits (1 for BPSK/QPSK, 2 for 16-QAM,
  // 3 for 64-QAM), first bit in b[0]. Levels are n * ONE / sqrt(E) rounded, with
  // E = 1 (BPSK), 2 (QPSK), 10 (16-QAM), 42 (64-QAM).
  function automatic logic signed [SW-1:0] axis_level(input logic [1:0] nb, input logic [2:0] b,
                                                      input logic qpsk);
    logic signed [SW-1:0] a;
    case (nb)
      2'd1: a = qpsk ? 13'sd1448 : 13'sd2048;
      2'd2: a = b[1] ? 13'sd648 : 13'sd1943;                      // 01,11 -> 1 ; 00,10 -> 3
      default: case ({b[1], b[2]})                                // 64-QAM magnitude
        2'b10:   a = 13'sd316;   // x10 -> 1
        2'b11:   a = 13'sd948;   // x11 -> 3
        2'b01:   a = 13'sd1580;  // x01 -> 5
        default: a = 13'sd2212;  // x00 -> 7
      endcase
    endcase
    return b[0] ? a : -a;
  endfunction

  function automatic cplx_t cneg(input cplx_t x);
    cplx_t y; y.re = -x.re; y.im = -x.im; return y;
  endfunction

  function automatic cplx_t cconj(input cplx_t x);
    cplx_t y; y.re = x.re; y.im = -x.im; return y;
  endfunction

endpackage
